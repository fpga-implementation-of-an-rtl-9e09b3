// tb_reference_generator: FREQ_WORD = 2^16 (a 65536-clock sine period, so a
// whole cycle fits in a short run), amplitude 6000.  Every clock, every slot's
// reference is compared with 6300 + amp * sin(wt - belt*180/m) computed with
// real arithmetic for the clock at which that slot's angle was taken (refs are
// refreshed in turn, one slot per clock, three clocks of latency).  The
// configuration is then changed and period ticks are given: during the
// cross-fade each reference must equal the weighted sum of the old and new
// sinusoids for the weight reached, and after 1024/8 = 128 ticks the ramp must
// end on the new configuration.
`timescale 1ns/1ps
module tb_reference_generator;
  import wicsc_pkg::*;
  localparam longint FW = 65536;
  localparam int AMP = 6000;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg = 0;
  logic trans_start = 0, period_tick = 0;
  carrier_t [35:0] refs;
  logic ramp_busy;
  int checks = 0, failures = 0;
  int cyc = -1;            // index of the last rising edge after reset release
  int w_at [int];          // weight in force at each clock
  int cfg_a_at [int], cfg_b_at [int];
  int maxerr = 0;

  reference_generator #(.FREQ_WORD(FW)) dut (.clk, .rst_n, .cfg, .trans_start, .period_tick,
    .amp(CW'(AMP)), .refs, .ramp_busy);

  always #2.5 clk = ~clk;

  function automatic int phases_of(int c);
    int m [9] = '{3, 3, 3, 3, 6, 6, 9, 9, 18};
    return m[c];
  endfunction
  function automatic int poles_of(int c);
    int pl [9] = '{2, 4, 6, 12, 2, 6, 2, 4, 2};
    return pl[c];
  endfunction
  // sin of the slot's angle at clock c, table angle resolution 4096 per turn.
  function automatic real slot_sin(int c, int k, int cf);
    longint unsigned th, a;
    int belt;
    belt = k / (36 / (phases_of(cf) * poles_of(cf)));
    th = (longint'(belt) << 32) / (2 * phases_of(cf));
    a  = ((longint'(c) * FW) - th) & 64'hFFFF_FFFF;
    return $sin(2.0 * 3.14159265358979 * (real'(a >> 20) + 0.5) / 4096.0);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of the cross-fade state per clock (recorded for the pipeline).
  int w_model = 0, ca = 0, cb = 0;
  bit busy_model = 0;
  always @(posedge clk) if (rst_n) begin
    cyc = cyc + 1;
    w_at[cyc] = w_model; cfg_a_at[cyc] = ca; cfg_b_at[cyc] = cb;
  end

  // Check: at the falling edge after rising edge j, slot s holds the value
  // computed in clock c = the latest c <= j-3 in which the sequencer pointed at
  // s; in clock c the accumulator holds (c+1)*FW and the sequencer (c+1) % 36.
  always @(negedge clk) if (rst_n && cyc > 80) begin
    for (int s = 0; s < 36; s++) begin
      int c, wa, err;
      real e;
      c = cyc - 3 - (((cyc - 2) % 36) - s + 36) % 36;
      wa = w_at[c + 1];
      e = 6300.0 + AMP * ((1024 - wa) * slot_sin(c + 1, s, cfg_a_at[c]) + wa * slot_sin(c + 1, s, cfg_b_at[c])) / 1024.0;
      err = int'(refs[s]) - int'(e);
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 2) begin
        failures++;
        if (failures < 10) $display("clk %0d slot %0d: %0d exp %0.1f c=%0d wa=%0d a=%0d b=%0d", cyc, s, refs[s], e, c, wa, cfg_a_at[c], cfg_b_at[c]);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (70000) @(negedge clk);
    // transition m3p2 -> m9p2 with a cross-fade over 128 ticks
    cfg = 4'd6; trans_start = 1; busy_model = 1; cb = 6;
    @(negedge clk); trans_start = 0;
    for (int t = 0; t < 128; t++) begin
      repeat (40) @(negedge clk);
      period_tick = 1; w_model = (w_model + 8 > 1024) ? 1024 : w_model + 8;
      @(negedge clk); period_tick = 0;
      checks++;
      if (!ramp_busy) begin failures++; $display("ramp ended early at tick %0d", t); end
    end
    ca = 6; w_model = 0;     // adopted one clock after the weight reaches 1
    @(negedge clk);
    checks++;
    if (ramp_busy) begin failures++; $display("ramp did not end"); end
    repeat (70000) @(negedge clk);
    $display("max error %0d counts", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
