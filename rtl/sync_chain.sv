// sync_chain: the synchronization chain of a sampling section.  The ADC's frame
// clock FCO and data clock DCO are not used as clocks: each is sampled by two
// flip-flops in series on the FPGA clock, and an edge is seen as a difference
// between the two flip-flop outputs.  A change of DCO (either edge, the data is
// double-data-rate) and a rising edge of FCO (start of a 14-bit word) are then
// registered once more before they reach the FSM.  The chain also holds the 4-bit
// bit counter that the FSM enables on every acquired bit and clears after a word.
//
// The two-flip-flop pairs and the 4-bit counter follow the document; the extra
// register on the edge flags is this design's choice (it is part of the fixed
// control latency matched by the five-stage data delay, see sampling_section).
//
// Timing: a DCO level captured at clock edge n gives dco_chg = 1 in the cycle
// after edge n+1.
module sync_chain (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dco,
  input  logic       fco,
  input  logic       cnt_en,
  input  logic       cnt_clr,
  output logic       dco_chg,
  output logic       fco_rise,
  output logic [3:0] bit_cnt
);
  logic dco_q1, dco_q2, fco_q1, fco_q2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dco_q1 <= 1'b0; dco_q2 <= 1'b0;
      fco_q1 <= 1'b0; fco_q2 <= 1'b0;
      dco_chg <= 1'b0; fco_rise <= 1'b0;
    end else begin
      dco_q1 <= dco;  dco_q2 <= dco_q1;
      fco_q1 <= fco;  fco_q2 <= fco_q1;
      dco_chg  <= dco_q1 ^ dco_q2;
      fco_rise <= fco_q1 & ~fco_q2;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || cnt_clr) bit_cnt <= '0;
    else if (cnt_en)       bit_cnt <= bit_cnt + 1'b1;
  end
endmodule
