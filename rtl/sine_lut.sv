// sine_lut: registered sine table.  A 12-bit angle (4096 steps per turn) gives
// round(AMP * sin(2*pi*(angle+0.5)/4096)) one clock later, as a signed 16-bit
// number.  Only the first quadrant is stored (1024 entries); the other three are
// folded onto it.  The half-step offset keeps the four quadrants exact mirror
// images.  The table is computed at elaboration from the series
// sin x = x - x^3/3! + x^5/5! - ... (to x^11) in 2^30 fixed point, so no data
// file is needed.  Table size and method are this design's choices.
module sine_lut #(
  parameter int unsigned AMP = 16383
) (
  input  logic               clk,
  input  logic [11:0]        angle,
  output logic signed [15:0] sine
);
  typedef logic [1023:0][14:0] tab_t;

  function automatic tab_t make_table();
    tab_t          t;
    longint        x, term, sum;
    longint        pi30;
    pi30 = 64'd3373259426;                 // round(pi * 2^30)
    for (int i = 0; i < 1024; i++) begin
      x    = ((2 * i + 1) * pi30) / 4096;  // (i+0.5) * (pi/2) / 1024
      sum  = x;
      term = x;
      for (int n = 1; n <= 5; n++) begin
        term = (term * x) >>> 30;
        term = (term * x) >>> 30;
        term = -term / ((2 * n) * (2 * n + 1));
        sum  = sum + term;
      end
      t[i] = 15'((sum * AMP + (64'd1 << 29)) >>> 30);
    end
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  logic [9:0]  idx;
  logic [14:0] mag;

  assign idx = angle[10] ? ~angle[9:0] : angle[9:0];
  assign mag = TABLE[idx];

  always_ff @(posedge clk) begin
    sine <= angle[11] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end
endmodule
