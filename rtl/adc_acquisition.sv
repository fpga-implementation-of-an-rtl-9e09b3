// adc_acquisition: the complete sample-acquisition system for the 36 slot
// currents.  A single adc_clock_generator drives the common sampling clock of
// the three ADC boards (so they sample simultaneously) and the acquisition start
// pulse; three sampling_sections, one per board, each read the 12 serial lanes
// of their board using that board's DCO and FCO.  Slot s (0..35) is lane s%12 of
// board s/12: this lane order is this design's choice.
//
// Interface: adc_clk goes to the boards; dco/fco/din are the (already
// single-ended) LVDS outputs of the boards; samples holds the latest word of
// each slot, valid[b] pulses when board b's 12 words have been updated.
module adc_acquisition #(
  parameter int unsigned N_BOARDS = 3,
  parameter int unsigned N_CH     = 12,
  parameter int unsigned ADC_HIGH = 10,
  parameter int unsigned ADC_LOW  = 10,
  parameter int unsigned ACQ_HIGH = 20,
  parameter int unsigned ACQ_LOW  = 20
) (
  input  logic                                                 clk,
  input  logic                                                 rst_n,
  output logic                                                 adc_clk,
  input  logic [N_BOARDS-1:0]                                  dco,
  input  logic [N_BOARDS-1:0]                                  fco,
  input  logic [N_BOARDS-1:0][N_CH-1:0]                        din,
  output logic [N_BOARDS*N_CH-1:0][wicsc_pkg::SAMPLE_W-1:0]    samples,
  output logic [N_BOARDS-1:0]                                  valid,
  output logic                                                 acq_start
);
  logic acq_clk;

  adc_clock_generator #(
    .ADC_HIGH(ADC_HIGH), .ADC_LOW(ADC_LOW), .ACQ_HIGH(ACQ_HIGH), .ACQ_LOW(ACQ_LOW)
  ) u_clkgen (
    .clk, .rst_n, .adc_clk, .acq_clk, .acq_start
  );

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    sampling_section #(.N_CH(N_CH)) u_sec (
      .clk, .rst_n,
      .start   (acq_start),
      .dco     (dco[b]),
      .fco     (fco[b]),
      .din     (din[b]),
      .samples (samples[b*N_CH +: N_CH]),
      .valid   (valid[b])
    );
  end
endmodule
