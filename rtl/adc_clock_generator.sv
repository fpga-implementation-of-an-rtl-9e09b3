// adc_clock_generator: the clock generator of the acquisition system.  Two
// clk_dividers run from the 200 MHz FPGA clock: one makes the sampling clock that
// is routed to the three ADC boards (default 10 MHz), the other makes the
// acquisition signal, at a frequency equal to or lower than the sampling clock,
// whose rising edge tells the sampling sections to capture the next word
// (default 5 MHz, one of the rates the document simulated).  Both rates are set by
// parameters counting FPGA clocks, as in the document.
//
// Interface: adc_clk (to the ADCs), acq_clk (the acquisition square wave) and
// acq_start (one-clock pulse on each rising edge of acq_clk, registered timing:
// asserted in the cycle before acq_clk rises).
module adc_clock_generator #(
  parameter int unsigned ADC_HIGH = 10,
  parameter int unsigned ADC_LOW  = 10,
  parameter int unsigned ACQ_HIGH = 20,
  parameter int unsigned ACQ_LOW  = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic adc_clk,
  output logic acq_clk,
  output logic acq_start
);
  logic adc_rise_unused;

  clk_divider #(.HIGH_CNT(ADC_HIGH), .LOW_CNT(ADC_LOW)) u_adc_div (
    .clk, .rst_n, .clk_out(adc_clk), .rise(adc_rise_unused)
  );

  clk_divider #(.HIGH_CNT(ACQ_HIGH), .LOW_CNT(ACQ_LOW)) u_acq_div (
    .clk, .rst_n, .clk_out(acq_clk), .rise(acq_start)
  );
endmodule
