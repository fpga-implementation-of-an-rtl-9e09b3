// tb_transition_handler: a behavioural carrier generator (DONE every 120
// clocks, T_READ one clock after LOAD) surrounds the handler, CMAX = 60,
// STEP = 7.  For random old/new carriers of all four kinds (standard up/down,
// up-to-down, down-to-up) and for identical ones, it checks: the kind
// reported, that loads come only right after DONE, that every loaded vector is
// self-consistent, that the carrier phase moves by at most STEP per period,
// that the shorter way round is taken (number of loads), that the last vector
// is the new one, and that t_done closes the transition.
`timescale 1ns/1ps
module tb_transition_handler;
  import wicsc_pkg::*;
  localparam int C = 60, P = 2 * C, STEP = 7;
  logic clk = 0, rst_n = 0;
  logic start_t = 0, cg_done = 0, t_read = 0;
  carrier_param_t old_param, new_param, param_out;
  logic load, busy, t_done;
  ttype_e ttype_q;
  int checks = 0, failures = 0;
  int cyc = 0, last_done = -100;
  int cnt_type [5] = '{0, 0, 0, 0, 0};

  transition_handler #(.CMAX(C), .STEP(STEP)) dut (
    .clk, .rst_n, .start_t, .old_param, .new_param, .cg_done, .t_read,
    .load, .param_out, .busy, .t_done, .ttype_q
  );

  always #2.5 clk = ~clk;

  // Behavioural CG handshake.
  always_ff @(posedge clk) begin
    cyc     <= cyc + 1;
    cg_done <= ((cyc + 1) % P == P - 1);
    t_read  <= load;
  end
  always @(negedge clk) if (cg_done) last_done = cyc;

  function automatic carrier_param_t vec(int t0);
    carrier_param_t v;
    if (t0 < C) begin v.trend = 1; v.offset = CW'(t0);     v.d1 = CW'(C - t0); end
    else        begin v.trend = 0; v.offset = CW'(P - t0); v.d1 = CW'(P - t0); end
    return v;
  endfunction

  function automatic int phase_of(carrier_param_t v);
    return v.trend ? int'(v.offset) : (P - int'(v.offset)) % P;
  endfunction

  function automatic int cdist(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return (d > P - d) ? P - d : d;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_old, t_new, n_loads, prev_ph, pdist, exp_type;
    carrier_param_t last;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 80; rep++) begin
      t_old = $urandom % P;
      t_new = $urandom % P;
      if (rep % 10 == 3) t_new = t_old;
      if (rep % 10 == 5) begin t_old = 10; t_new = P - 20; end   // forced UD
      if (rep % 10 == 6) begin t_old = P - 5; t_new = 30; end    // forced DU
      old_param = vec(t_old);
      new_param = vec(t_new);
      if (old_param == new_param)                 exp_type = TT_NONE;
      else if (old_param.trend == new_param.trend) exp_type = (new_param.offset > old_param.offset) ? TT_STD_INC : TT_STD_DEC;
      else                                         exp_type = old_param.trend ? TT_UD : TT_DU;
      repeat ($urandom % 200) @(negedge clk);
      @(negedge clk); start_t = 1;
      @(negedge clk); start_t = 0;
      checks++;
      if (int'(ttype_q) != exp_type) begin failures++; $display("type %0d exp %0d", ttype_q, exp_type); end
      cnt_type[exp_type]++;
      n_loads = 0; prev_ph = t_old; last = old_param;
      while (!t_done) begin
        @(negedge clk);
        if (load) begin
          n_loads++;
          checks += 3;
          if (cyc - last_done > 3) begin failures++; $display("load %0d clocks after DONE", cyc - last_done); end
          if (param_out.d1 != (param_out.trend ? CW'(C) - param_out.offset : param_out.offset)) begin
            failures++; $display("inconsistent vector");
          end
          if (cdist(phase_of(param_out), prev_ph) > STEP) begin
            failures++; $display("phase jump %0d -> %0d", prev_ph, phase_of(param_out));
          end
          prev_ph = phase_of(param_out);
          last = param_out;
        end
      end
      pdist = cdist(t_old, t_new);
      checks += 2;
      if (last != new_param) begin failures++; $display("final vector %h exp %h", last, new_param); end
      if (n_loads < (pdist + STEP - 1) / STEP || n_loads > (pdist + STEP - 1) / STEP + 1) begin
        failures++; $display("%0d loads for distance %0d", n_loads, pdist);
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after t_done"); end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt_type[i] == 0) begin failures++; $display("transition kind %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
