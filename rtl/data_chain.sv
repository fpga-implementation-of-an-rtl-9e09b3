// data_chain: the data chain of one serial ADC lane.  The lane is sampled by a
// row of DELAY always-enabled flip-flops (five in the document), whose last
// output feeds a 14-bit shift register.  The delay lets the data wait for the
// synchronization chain and the FSM to decide that the current bit is to be
// taken.  The shift register shifts (MSB first, so the first bit ends in bit 13)
// one clock after `sr_en` is seen: the enable is re-registered locally, which is
// this design's choice to keep the fan-out of the FSM enable to one flip-flop per
// lane.  With the sync chain's three stages and the FSM's two, a bit captured by
// the first flip-flop at clock edge n is shifted in at edge n+5, which is why
// DELAY must stay 5 in a sampling_section.
module data_chain #(
  parameter int unsigned DELAY = 5,
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  input  logic             sr_en,
  output logic [WIDTH-1:0] word
);
  logic [DELAY-1:0] dly;
  logic             en_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dly  <= '0;
      en_q <= 1'b0;
      word <= '0;
    end else begin
      dly  <= {dly[DELAY-2:0], din};
      en_q <= sr_en;
      if (en_q) word <= {word[WIDTH-2:0], dly[DELAY-1]};
    end
  end

  initial assert (DELAY >= 2) else $error("data_chain: DELAY must be at least 2");
endmodule
