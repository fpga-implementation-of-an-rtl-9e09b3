// tb_carrier_generation: all 36 slots with CMAX = 90 (180-clock period, a
// multiple of 18) and STEP = 15.  In steady state every carrier must equal the
// triangle shifted by its slot's phase in the current configuration (checked at
// every clock against an independent slot-to-phase rule), all slots must share
// the period boundary, and a change of configuration must reach the new
// phases.  Goes through all nine configurations.
`timescale 1ns/1ps
module tb_carrier_generation;
  import wicsc_pkg::*;
  localparam int C = 90, P = 180, STEP = 15;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_req, cfg_cur;
  carrier_t [35:0] carriers;
  logic period_done, trans_start, in_transition;
  int checks = 0, failures = 0;
  int n_trans_start = 0;

  carrier_generation #(.CMAX(C), .STEP(STEP)) dut (.clk, .rst_n, .cfg_req, .carriers,
    .period_done, .cfg_cur, .trans_start, .in_transition);

  always #2.5 clk = ~clk;

  function automatic int poles_of(int c);
    int pl [9] = '{2, 4, 6, 12, 2, 6, 2, 4, 2};
    return pl[c];
  endfunction
  function automatic int t0_of(int c, int k);
    int s;
    s = 36 / poles_of(c);
    return ((k % s) * P) / s;
  endfunction
  function automatic int tri_wave(int x);
    return (x < C) ? x : P - x;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ps = 0, steady = 0, ccur = 0;
  always @(negedge clk) if (rst_n) begin
    if (trans_start) n_trans_start++;
    if (steady >= 2) begin
      for (int k = 0; k < 36; k++) begin
        checks++;
        if (int'(carriers[k]) != tri_wave((ps + t0_of(ccur, k)) % P)) begin
          failures++;
          if (failures < 10) $display("cfg %0d slot %0d: %0d exp %0d", ccur, k, carriers[k], tri_wave((ps + t0_of(ccur, k)) % P));
        end
      end
    end
    if (period_done) begin
      ps = 0;
      if (!in_transition) steady++; else steady = 0;
    end else ps++;
  end

  initial begin
    cfg_req = 4'd0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4 * P) @(negedge clk);
    for (int c = 1; c <= 9; c++) begin
      steady = 0;
      cfg_req = 4'(c % 9);
      ccur = c % 9;
      repeat (2) @(negedge clk);
      checks++;
      if (cfg_cur != cfg_req) begin failures++; $display("cfg_cur %0d", cfg_cur); end
      while (in_transition) @(negedge clk);
      repeat (4 * P) @(negedge clk);
      checks++;
      if (steady < 2) begin failures++; $display("cfg %0d never steady", c); end
    end
    checks++;
    if (n_trans_start != 9) begin failures++; $display("%0d transitions started", n_trans_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
