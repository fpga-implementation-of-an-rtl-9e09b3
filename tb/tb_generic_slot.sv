// tb_generic_slot: one slot (number 7) with CMAX = 90, STEP = 10, receiving
// the vector of its configuration from a testbench table.  Through a sequence
// of configuration changes it checks: in steady state the carrier equals the
// triangle shifted by the configuration's phase at every clock; inside a
// period it moves by exactly one count per clock; at period boundaries during a
// transition it jumps by at most STEP+1; every transition ends.
`timescale 1ns/1ps
module tb_generic_slot;
  import wicsc_pkg::*;
  localparam int C = 90, P = 180, STEP = 10, K = 7;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_req;
  carrier_param_t param_req;
  carrier_t carrier;
  logic period_done, in_transition, start_t;
  logic [3:0] cfg_cur;
  int checks = 0, failures = 0;
  int n_trans = 0, n_max_jump = 0;

  generic_slot #(.CMAX(C), .STEP(STEP)) dut (.clk, .rst_n, .cfg_req, .param_req,
    .carrier, .period_done, .cfg_cur, .in_transition, .start_t);

  always #2.5 clk = ~clk;

  function automatic int poles_of(int c);
    int pl [9] = '{2, 4, 6, 12, 2, 6, 2, 4, 2};
    return pl[c];
  endfunction
  function automatic int t0_of(int c);
    int s;
    s = 36 / poles_of(c);
    return ((K % s) * P) / s;
  endfunction
  function automatic int tri_wave(int x);
    return (x < C) ? x : P - x;
  endfunction
  function automatic carrier_param_t vec(int t0);
    carrier_param_t v;
    if (t0 < C) begin v.trend = 1; v.offset = CW'(t0);     v.d1 = CW'(C - t0); end
    else        begin v.trend = 0; v.offset = CW'(P - t0); v.d1 = CW'(P - t0); end
    return v;
  endfunction
  assign param_req = vec(t0_of(int'(cfg_req)));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ps = 0, prev = -1, steady = 0, t0_cur;
  bit prev_done = 0;
  always @(negedge clk) if (rst_n && dut.running) begin
    if (prev >= 0) begin
      int d;
      d = int'(carrier) - prev; if (d < 0) d = -d;
      checks++;
      if (prev_done) begin
        if (d > STEP + 1) begin failures++; $display("boundary jump %0d", d); end
        if (d > 1) n_max_jump++;
      end else if (d != 1) begin
        failures++; $display("step %0d inside a period", d);
      end
    end
    if (steady >= 2) begin
      checks++;
      if (int'(carrier) != tri_wave((ps + t0_cur) % P)) begin
        failures++; $display("steady carrier %0d exp %0d (ps %0d)", carrier, tri_wave((ps + t0_cur) % P), ps);
      end
    end
    prev = int'(carrier);
    prev_done = period_done;
    if (period_done) begin
      ps = 0;
      if (!in_transition && !start_t) steady++; else steady = 0;
    end else ps++;
  end

  initial begin
    int seq [8] = '{0, 1, 3, 8, 2, 5, 7, 0};
    cfg_req = 4'd0;
    t0_cur = t0_of(0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4 * P) @(negedge clk);
    for (int i = 1; i < 8; i++) begin
      steady = 0;
      cfg_req = 4'(seq[i]);
      t0_cur = t0_of(seq[i]);
      @(negedge clk);
      while (in_transition) @(negedge clk);
      n_trans++;
      repeat (4 * P) @(negedge clk);
      checks++;
      if (steady < 2) begin failures++; $display("never steady after cfg %0d", seq[i]); end
    end
    checks++;
    if (n_max_jump == 0) begin failures++; $display("no gradual transition observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
