// tb_carrier_parameter_generator: for all nine configurations and 36 slots the
// vector must describe the triangle shifted by (k mod S) * 360/S degrees, with
// S = 36/poles slots per pole: the testbench rebuilds the carrier waveform
// from the vector (three sections) and compares it with the shifted triangle
// at every point of the 25200-clock period.  Spot checks: 3-phase 2-pole slot 1
// is 20 degrees (1400 clocks) ahead of slot 0; 3-phase 6-pole repeats after six
// slots; 18 is the largest number of distinct carriers.
`timescale 1ns/1ps
module tb_carrier_parameter_generator;
  import wicsc_pkg::*;
  localparam int C = 12600, P = 25200;
  logic [3:0] cfg;
  carrier_param_t [35:0] params;
  int checks = 0, failures = 0;

  carrier_parameter_generator dut (.cfg, .params);

  function automatic int poles_of(int c);
    int pl [9] = '{2, 4, 6, 12, 2, 6, 2, 4, 2};
    return pl[c];
  endfunction

  function automatic int tri_wave(int x);
    return (x < C) ? x : P - x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, t0, v, bad, maxdistinct;
    maxdistinct = 0;
    for (int c = 0; c < 9; c++) begin
      cfg = 4'(c);
      #1;
      s = 36 / poles_of(c);
      if (s > maxdistinct) maxdistinct = s;
      for (int k = 0; k < 36; k++) begin
        t0 = ((k % s) * P) / s;
        // rebuild the carrier from the vector
        v = int'(params[k].offset);
        bad = 0;
        for (int n = 0; n < P; n++) begin
          logic up;
          if (n < int'(params[k].d1))          up = params[k].trend;
          else if (n < int'(params[k].d1) + C) up = ~params[k].trend;
          else                                 up = params[k].trend;
          if (v != tri_wave((n + t0) % P)) bad++;
          v = up ? v + 1 : v - 1;
        end
        checks++;
        if (bad != 0) begin failures++; $display("cfg %0d slot %0d: %0d wrong points", c, k, bad); end
      end
    end
    cfg = CFG_M3P2; #1;
    checks += 2;
    if (params[1].offset != 14'd1400 || params[1].trend != 1'b1) begin failures++; $display("m3p2 slot 1"); end
    if (params[0].offset != 14'd0) failures++;
    cfg = CFG_M3P6; #1;
    checks++;
    if (params[6] != params[0] || params[7] != params[1] || params[1] == params[0]) begin failures++; $display("m3p6 repetition"); end
    checks++;
    if (maxdistinct != 18) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
