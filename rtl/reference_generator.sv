// reference_generator: the sinusoidal references (modulating signals) of all
// slots, in carrier counts (0..CMAX, centred on CMAX/2).
//
// A 32-bit phase accumulator advances by FREQ_WORD per clock (1074 gives
// 50.00 Hz at 200 MHz).  Slot k of a configuration with m phases and qs slots per
// pole per phase belongs to phase belt b = k / qs and is driven by
// sin(wt - b*180deg/m): belts 180/m degrees apart give the phases and their
// complements (A, -C, B, -A, C, -B for three phases), all slots of a belt share
// one reference, and six-, nine- and eighteen-phase configurations come out as
// three-phase sets shifted by 30, 20 and 10 degrees.  The 120-degree phase spacing
// and the 30-degree shift of the two sets in m6p2 follow the document; the
// general slot-to-phase rule is this design's choice.
//
// Transitions (document, section on smooth transitions): on `trans_start` the
// old and new configurations' sinusoids are both computed and added with
// weights (1-w) and w; w rises by RAMP_STEP/2^WB at every `period_tick` (one
// switching period) until it reaches 1, then the new configuration is adopted.
// The reference is thus continuous however different the two sinusoids are.
//
// Implementation: the slots are served in turn, one per clock, through two
// sine tables (old and new); a 3-stage pipeline gives
// ref = CMAX/2 + amp * ((1-w)*sin_old + w*sin_new), so every reference is
// refreshed every N_SLOTS clocks (180 ns); the value written at the end of clock
// n+2 uses the phase accumulator of clock n.
// `amp` is the peak amplitude in counts (CMAX/2 uses the full carrier range).
module reference_generator #(
  parameter int unsigned N_SLOTS   = wicsc_pkg::N_SLOTS,
  parameter int unsigned CMAX      = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned FREQ_WORD = 1074,
  parameter int unsigned WB        = 10,
  parameter int unsigned RAMP_STEP = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [3:0]                         cfg,
  input  logic                               trans_start,
  input  logic                               period_tick,
  input  logic [wicsc_pkg::CW-1:0]           amp,
  output wicsc_pkg::carrier_t [N_SLOTS-1:0]  refs,
  output logic                               ramp_busy
);
  import wicsc_pkg::*;

  localparam int unsigned SW = $clog2(N_SLOTS);

  // Electrical angle (2^32 per turn) of the belt that holds slot k.
  function automatic logic [31:0] slot_theta(int unsigned k, logic [3:0] c);
    int unsigned    m, belt;
    longint unsigned th;
    m    = cfg_phases(c);
    belt = k / (N_SLOTS / (m * cfg_poles(c)));
    th   = (longint'(belt) << 32) / (2 * m);
    return th[31:0];
  endfunction

  logic [31:0]          acc;
  logic [3:0]           cfg_a, cfg_b;
  logic [WB:0]          w;
  logic [SW-1:0]        s0, s1, s2;
  logic [11:0]          ang_a, ang_b;
  logic signed [15:0]   sin_a, sin_b;
  logic signed [31:0]   mix;
  logic signed [31:0]   mix_n;
  logic signed [47:0]   scaled;

  // Phase accumulator and slot sequencer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      s0  <= '0;
    end else begin
      acc <= acc + FREQ_WORD;
      s0  <= (s0 == SW'(N_SLOTS - 1)) ? '0 : s0 + 1'b1;
    end
  end

  // Cross-fade control.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_a     <= '0;
      cfg_b     <= '0;
      w         <= '0;
      ramp_busy <= 1'b0;
    end else if (trans_start) begin
      if (ramp_busy) cfg_a <= cfg_b;   // a new request cuts a running ramp short
      cfg_b     <= cfg;
      w         <= '0;
      ramp_busy <= 1'b1;
    end else if (ramp_busy) begin
      if (w >= (WB+1)'(1 << WB)) begin
        cfg_a     <= cfg_b;
        w         <= '0;
        ramp_busy <= 1'b0;
      end else if (period_tick) begin
        w <= (w + (WB+1)'(RAMP_STEP) > (WB+1)'(1 << WB)) ? (WB+1)'(1 << WB) : w + (WB+1)'(RAMP_STEP);
      end
    end else begin
      cfg_a <= cfg;
      cfg_b <= cfg;
    end
  end

  // Stage 0: angles of slot s0 in both configurations.
  always_comb begin
    logic [31:0] pa, pb;
    pa    = acc - slot_theta(32'(s0), cfg_a);
    pb    = acc - slot_theta(32'(s0), cfg_b);
    ang_a = pa[31:20];
    ang_b = pb[31:20];
  end

  sine_lut u_sin_a (.clk, .angle(ang_a), .sine(sin_a));
  sine_lut u_sin_b (.clk, .angle(ang_b), .sine(sin_b));

  // Stage 2: weighted sum.
  assign mix_n = (32'(sin_a) * $signed({1'b0, (WB+1)'(1 << WB) - w})
                + 32'(sin_b) * $signed({1'b0, w})) >>> WB;

  // Scale and centre (same stage as the write).
  assign scaled = 48'(mix) * $signed({1'b0, amp});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1   <= '0;
      s2   <= '0;
      mix  <= '0;
      refs <= '{default: CW'(CMAX / 2)};
    end else begin
      s1  <= s0;
      s2  <= s1;
      mix <= mix_n;
      refs[s2] <= CW'(32'(CMAX / 2) + 32'(scaled >>> 14));
    end
  end
endmodule
