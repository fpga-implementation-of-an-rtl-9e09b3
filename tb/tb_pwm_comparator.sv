// tb_pwm_comparator: random carriers and references, including equal values;
// each output must be (reference > carrier) of the previous clock.
`timescale 1ns/1ps
module tb_pwm_comparator;
  import wicsc_pkg::*;
  logic clk = 0, rst_n = 0;
  carrier_t [35:0] carriers, refs;
  logic [35:0] pwm, expv;
  int checks = 0, failures = 0;

  pwm_comparator dut (.clk, .rst_n, .carriers, .refs, .pwm);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    carriers = '0; refs = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int k = 0; k < 36; k++) begin
        carriers[k] = CW'($urandom % 12601);
        refs[k]     = ($urandom % 4 == 0) ? carriers[k] : CW'($urandom % 12601);
        expv[k]     = (int'(refs[k]) > int'(carriers[k]));
      end
      @(negedge clk);
      checks++;
      if (pwm != expv) begin failures++; $display("pwm %h exp %h", pwm, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
