// pwm_comparator: compares each slot's carrier with its reference.  The leg
// signal of slot k is 1 (upper switch on) while the reference is above the
// carrier, and 0 otherwise; outputs are registered, one clock after the inputs.
// The comparison is the document's; the sense of the output and the register
// are this design's choices.  No dead time is inserted here (the document does
// not describe one).
module pwm_comparator #(
  parameter int unsigned N_SLOTS = wicsc_pkg::N_SLOTS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  wicsc_pkg::carrier_t [N_SLOTS-1:0]  carriers,
  input  wicsc_pkg::carrier_t [N_SLOTS-1:0]  refs,
  output logic [N_SLOTS-1:0]                 pwm
);
  always_ff @(posedge clk) begin
    if (!rst_n) pwm <= '0;
    else for (int k = 0; k < N_SLOTS; k++) pwm[k] <= (refs[k] > carriers[k]);
  end
endmodule
