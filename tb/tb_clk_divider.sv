// tb_clk_divider: checks the high and low widths of the divided wave for an
// asymmetric setting (3 high, 5 low) and that `rise` announces each rising edge.
`timescale 1ns/1ps
module tb_clk_divider;
  logic clk = 0, rst_n = 0;
  logic clk_out, rise;
  int checks = 0, failures = 0;

  clk_divider #(.HIGH_CNT(3), .LOW_CNT(5)) dut (.clk, .rst_n, .clk_out, .rise);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run_len, runs;
    logic prev, prev_rise;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    prev = clk_out; prev_rise = rise; run_len = 0; runs = 0;
    repeat (400) begin
      @(posedge clk); #0.1;
      // rise in the previous cycle <=> clk_out just went 0 -> 1
      checks++;
      if ((prev_rise == 1) != (prev == 0 && clk_out == 1)) begin
        failures++; $display("rise mismatch at %0t", $time);
      end
      if (clk_out == prev) run_len++;
      else begin
        if (runs > 0) begin
          checks++;
          if (run_len + 1 != (prev ? 3 : 5)) begin
            failures++; $display("%s width %0d at %0t", prev ? "high" : "low", run_len + 1, $time);
          end
        end
        runs++; run_len = 0;
      end
      prev = clk_out; prev_rise = rise;
    end
    checks++; if (runs < 90) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
