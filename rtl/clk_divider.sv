// clk_divider: derives a slow square wave from the FPGA clock with a free-running
// counter, an equality comparator and a two-state FSM.
//
// The counter advances on every clock.  The comparator pulses `match` for one
// clock when the count equals the constant of the current FSM state
// (HIGH_CNT-1 in state HIGH, LOW_CNT-1 in state LOW).  On a match the FSM resets
// the counter and moves to the other state; the output is 1 in HIGH and 0 in
// LOW.  The wave therefore stays HIGH_CNT clocks high and LOW_CNT clocks low.
// The counter/comparator/FSM structure is the one described for the thesis
// design; separate high and low constants (the document speaks of "the width of
// the two sections") and the reset to the LOW state are this design's choices.
//
// Interface: clk, rst_n (active low, synchronous), clk_out (registered),
// rise (one-clock pulse in the cycle clk_out goes from 0 to 1).
module clk_divider #(
  parameter int unsigned HIGH_CNT = 10,   // 10 + 10 clocks at 200 MHz = 10 MHz
  parameter int unsigned LOW_CNT  = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic rise
);
  localparam int unsigned MAXC = (HIGH_CNT > LOW_CNT) ? HIGH_CNT : LOW_CNT;
  localparam int unsigned W    = (MAXC > 1) ? $clog2(MAXC) : 1;

  typedef enum logic {S_LOW = 1'b0, S_HIGH = 1'b1} state_e;

  state_e       state;
  logic [W-1:0] count;
  logic         match;

  // Comparator: the constant depends on the state.
  always_comb begin
    if (state == S_HIGH) match = (count == W'(HIGH_CNT - 1));
    else                 match = (count == W'(LOW_CNT - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOW;
      count <= '0;
    end else if (match) begin
      state <= (state == S_HIGH) ? S_LOW : S_HIGH;
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign clk_out = (state == S_HIGH);
  assign rise    = (match && state == S_LOW);

  initial begin
    assert (HIGH_CNT >= 1 && LOW_CNT >= 1) else $error("clk_divider: counts must be >= 1");
  end
endmodule
