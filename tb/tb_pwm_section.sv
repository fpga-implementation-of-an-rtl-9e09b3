// tb_pwm_section: carriers, references and comparator together, CMAX = 90
// (180-clock period), STEP = 15, RAMP_STEP = 64, 2^20 frequency word.
// 1. With zero amplitude every leg must switch with 50 % duty, and in the
//    3-phase 2-pole configuration slot k must lead slot 0 by k*10 clocks
//    (20 degrees per slot, repeating after 18 slots).
// 2. At every clock each output must be (reference > carrier) of the clock
//    before, with a real amplitude and across a configuration change.
// 3. The configuration change must end with carriers and references both
//    idle and on the new configuration.
`timescale 1ns/1ps
module tb_pwm_section;
  import wicsc_pkg::*;
  localparam int C = 90, P = 180;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_req = 0, cfg_cur;
  logic [CW-1:0] amp = 0;
  logic [35:0] pwm, expv;
  carrier_t [35:0] carriers, refs;
  logic period_done, busy;
  int checks = 0, failures = 0;
  int rise_t [36];

  pwm_section #(.CMAX(C), .STEP(15), .FREQ_WORD(1 << 20), .RAMP_STEP(64)) dut (
    .clk, .rst_n, .cfg_req, .amp, .pwm, .carriers, .refs, .cfg_cur, .period_done, .busy);

  always #2.5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // comparator relation, every clock
  int cyc = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 5) begin
      checks++;
      if (pwm != expv) begin failures++; if (failures < 10) $display("pwm %h exp %h", pwm, expv); end
    end
    for (int k = 0; k < 36; k++) expv[k] = (refs[k] > carriers[k]);
  end

  initial begin
    int t_start, highs [36];
    logic [35:0] prevp;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3 * P) @(negedge clk);
    // 1. interleaving, zero amplitude: reference = 45 everywhere
    for (int k = 0; k < 36; k++) begin rise_t[k] = -1; highs[k] = 0; end
    prevp = pwm; t_start = cyc;
    repeat (P) begin
      @(negedge clk);
      for (int k = 0; k < 36; k++) begin
        if (pwm[k] && !prevp[k] && rise_t[k] < 0) rise_t[k] = cyc - t_start;
        highs[k] += pwm[k];
      end
      prevp = pwm;
    end
    for (int k = 0; k < 36; k++) begin
      checks += 2;
      if (highs[k] < P / 2 - 1 || highs[k] > P / 2 + 1) begin failures++; $display("slot %0d duty %0d/%0d", k, highs[k], P); end
      if (((rise_t[0] - rise_t[k]) % P + P) % P != ((k % 18) * 10) % P) begin
        failures++; $display("slot %0d rises at %0d, slot 0 at %0d", k, rise_t[k], rise_t[0]);
      end
    end
    // 2./3. amplitude and a configuration change
    amp = 14'd40;
    repeat (5000) @(negedge clk);
    cfg_req = 4'd1;
    repeat (5) @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("no transition"); end
    while (busy) @(negedge clk);
    checks += 2;
    if (cfg_cur != 4'd1) failures++;
    if (dut.u_refs.cfg_a != 4'd1) begin failures++; $display("references not on new configuration"); end
    repeat (5000) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
