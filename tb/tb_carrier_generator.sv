// tb_carrier_generator: with CMAX = 60 (120-clock period) the carrier is
// compared every clock with an independent model tri((n + t0) mod 120) of a
// triangle shifted by t0.  New parameters are loaded at random moments, for
// random phases in both trends; they must take effect only at the next period
// start, DONE must mark the last clock of every period, and T_READ must answer
// every LOAD one clock later.
`timescale 1ns/1ps
module tb_carrier_generator;
  import wicsc_pkg::*;
  localparam int C = 60, P = 2 * C;
  logic clk = 0, rst_n = 0;
  carrier_param_t param_in;
  logic load = 0;
  logic t_read, done, running;
  carrier_t carrier;
  int checks = 0, failures = 0;
  int ph, cur_t0, pend_t0, n_loads = 0, n_periods = 0;
  bit started, load_q;

  carrier_generator #(.CMAX(C)) dut (.clk, .rst_n, .param_in, .load, .t_read, .done, .running, .carrier);

  always #2.5 clk = ~clk;

  function automatic int tri_wave(int x);
    return (x < C) ? x : P - x;
  endfunction

  function automatic carrier_param_t vec(int t0);
    carrier_param_t v;
    if (t0 < C) begin v.trend = 1; v.offset = CW'(t0);     v.d1 = CW'(C - t0); end
    else        begin v.trend = 0; v.offset = CW'(P - t0); v.d1 = CW'(P - t0); end
    return v;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nt0;
    started = 0; ph = 0; cur_t0 = 0; pend_t0 = 0; load_q = 0;
    param_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    checks++;
    if (running) begin failures++; $display("running before first load"); end
    for (int n = 0; n < 6000; n++) begin
      // check the state reached after the last rising edge
      if (started) begin
        checks += 2;
        if (int'(carrier) != tri_wave((ph + cur_t0) % P)) begin
          failures++; $display("n=%0d ph=%0d t0=%0d carrier=%0d exp=%0d", n, ph, cur_t0, carrier, tri_wave((ph + cur_t0) % P));
        end
        if (done != (ph == P - 1)) begin failures++; $display("done=%0b at ph=%0d", done, ph); end
      end
      checks++;
      if (t_read != load_q) begin failures++; $display("t_read=%0b", t_read); end
      // stimulus for the next edge
      load = (!started) || (($urandom % 150) == 0);
      nt0  = $urandom % P;
      if (n % 700 == 350) nt0 = 0;          // corner cases
      if (n % 700 == 500) nt0 = C;
      param_in = vec(nt0);
      // model of the next edge
      load_q = load;
      if (!started) begin
        started = 1; ph = 0; cur_t0 = nt0; pend_t0 = nt0;
      end else begin
        if (load) begin pend_t0 = nt0; n_loads++; end
        if (ph == P - 1) begin ph = 0; cur_t0 = pend_t0; n_periods++; end
        else ph++;
      end
      @(negedge clk);
      load = 0;
    end
    checks++;
    if (n_loads < 10 || n_periods < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
