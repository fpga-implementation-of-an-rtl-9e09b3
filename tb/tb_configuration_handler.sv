// tb_configuration_handler: the parameter input follows the requested
// configuration through a testbench table; T_READ and the transition
// handler's end are modelled.  Checks: one LOAD with the requested vector after
// reset, no START_T before T_READ, START_T with the right old/new vectors on
// every valid change, invalid codes ignored, and changes during a transition
// held back until the handler ends.
`timescale 1ns/1ps
module tb_configuration_handler;
  import wicsc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_req;
  carrier_param_t param_req, param_out, old_param, new_param;
  logic t_read = 0, th_done = 0;
  logic load, start_t, in_transition;
  logic [3:0] cfg_cur;
  int checks = 0, failures = 0;
  int n_load = 0, n_start = 0;

  configuration_handler dut (.clk, .rst_n, .cfg_req, .param_req, .t_read, .th_done,
    .load, .param_out, .start_t, .old_param, .new_param, .cfg_cur, .in_transition);

  always #2.5 clk = ~clk;

  // Arbitrary distinct vector per configuration code.
  function automatic carrier_param_t tvec(logic [3:0] c);
    return carrier_param_t'({25'(c) * 25'd1234567 + 25'd77, c});
  endfunction
  assign param_req = tvec(cfg_req);

  always_ff @(posedge clk) t_read <= load;
  always @(negedge clk) begin
    if (load) n_load++;
    if (start_t) n_start++;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic [3:0] cur, nxt;
    cfg_req = 4'd2;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // start-up load
    while (!load) @(negedge clk);
    checks += 2;
    if (param_out != tvec(4'd2)) begin failures++; $display("start-up vector"); end
    if (start_t) failures++;
    wait_clk(5);
    checks += 2;
    if (n_load != 1) begin failures++; $display("%0d start-up loads", n_load); end
    if (cfg_cur != 4'd2) failures++;
    cur = 4'd2;
    for (int rep = 0; rep < 30; rep++) begin
      // invalid code: ignored
      cfg_req = 4'(9 + $urandom % 7);
      wait_clk(4);
      checks++;
      if (n_start != rep || in_transition) begin failures++; $display("invalid code started a transition"); end
      do nxt = 4'($urandom % 9); while (nxt == cur);
      cfg_req = nxt;
      while (!start_t) @(negedge clk);
      checks += 3;
      if (old_param != tvec(cur)) begin failures++; $display("old vector"); end
      if (new_param != tvec(nxt)) begin failures++; $display("new vector"); end
      if (cfg_cur != nxt) failures++;
      // a further request during the transition must wait
      cfg_req = cur;
      wait_clk(10);
      checks++;
      if (n_start != rep + 1 || !in_transition) begin failures++; $display("request during transition"); end
      cfg_req = nxt;
      th_done = 1; wait_clk(1); th_done = 0;
      wait_clk(3);
      checks++;
      if (in_transition) begin failures++; $display("transition did not end"); end
      cur = nxt;
    end
    checks++;
    if (n_load != 1) begin failures++; $display("CH loaded during run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
