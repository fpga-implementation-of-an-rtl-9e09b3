// wicsc_drive_top: the FPGA side of the 36-slot multiphase drive.  Two
// independent halves share the 200 MHz clock:
//  * measurement: adc_acquisition makes the 10 MHz sampling clock for the three
//    14-bit ADC boards and deserialises their 3 x 12 LVDS lanes into one sample
//    per slot; a 30-sample register file can capture one slot's samples on
//    request and hand them to the processor one by one;
//  * actuation: pwm_section turns the configuration code and reference
//    amplitude chosen by the control into 36 interleaved PWM leg signals, with
//    smooth transitions when the configuration changes.
// The control algorithm that would link the two (current and speed loops, run
// on the processor) is not part of this design: the samples are outputs and the
// configuration and amplitude are inputs.  LVDS receivers, the processor and the
// optical links to the inverters are outside it too; their signals are ports.
module wicsc_drive_top #(
  parameter int unsigned N_BOARDS  = 3,
  parameter int unsigned N_CH      = 12,
  parameter int unsigned ADC_HALF  = 10,   // 200 MHz / (2*10) = 10 MHz sampling clock
  parameter int unsigned ACQ_HALF  = 20,   // 5 MHz acquisition rate
  parameter int unsigned RF_DEPTH  = 30,
  parameter int unsigned CMAX      = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned STEP      = 100,
  parameter int unsigned FREQ_WORD = 1074,
  parameter int unsigned RAMP_STEP = 8
) (
  input  logic                                              clk,
  input  logic                                              rst_n,
  // ADC boards
  output logic                                              adc_clk,
  input  logic [N_BOARDS-1:0]                               adc_dco,
  input  logic [N_BOARDS-1:0]                               adc_fco,
  input  logic [N_BOARDS-1:0][N_CH-1:0]                     adc_din,
  output logic [N_BOARDS*N_CH-1:0][wicsc_pkg::SAMPLE_W-1:0] samples,
  output logic [N_BOARDS-1:0]                               samples_valid,
  // Register file towards the processor
  input  logic                                              rf_save,
  input  logic [$clog2(N_BOARDS*N_CH)-1:0]                  rf_sel,
  output logic                                              rf_busy,
  output logic [wicsc_pkg::SAMPLE_W-1:0]                    rf_data,
  output logic                                              rf_valid,
  input  logic                                              rf_ready,
  // PWM
  input  logic [3:0]                                        cfg_req,
  input  logic [wicsc_pkg::CW-1:0]                          amp,
  output logic [N_BOARDS*N_CH-1:0]                          pwm,
  output logic [3:0]                                        cfg_cur,
  output logic                                              pwm_busy,
  output logic                                              period_done
);
  import wicsc_pkg::*;

  localparam int unsigned NS = N_BOARDS * N_CH;

  logic                    acq_start;
  logic                    rf_full;
  logic                    rf_in_valid;
  carrier_t [NS-1:0]       carriers, refs;

  adc_acquisition #(
    .N_BOARDS(N_BOARDS), .N_CH(N_CH),
    .ADC_HIGH(ADC_HALF), .ADC_LOW(ADC_HALF), .ACQ_HIGH(ACQ_HALF), .ACQ_LOW(ACQ_HALF)
  ) u_acq (
    .clk, .rst_n, .adc_clk, .dco(adc_dco), .fco(adc_fco), .din(adc_din),
    .samples, .valid(samples_valid), .acq_start
  );

  assign rf_in_valid = samples_valid[32'(rf_sel) / N_CH];

  sample_register_file #(.DEPTH(RF_DEPTH), .WIDTH(SAMPLE_W), .N_SLOTS(NS)) u_rf (
    .clk, .rst_n, .save(rf_save), .sel(rf_sel), .in_samples(samples), .in_valid(rf_in_valid),
    .busy(rf_busy), .full(rf_full), .out_data(rf_data), .out_valid(rf_valid), .out_ready(rf_ready)
  );

  pwm_section #(
    .N_SLOTS(NS), .CMAX(CMAX), .STEP(STEP), .FREQ_WORD(FREQ_WORD), .RAMP_STEP(RAMP_STEP)
  ) u_pwm (
    .clk, .rst_n, .cfg_req, .amp, .pwm, .carriers, .refs, .cfg_cur, .period_done, .busy(pwm_busy)
  );
endmodule
