// tb_adc_clock_generator: with the default settings the ADC clock must be
// 10 MHz (period 100 ns, 50 % duty) and the acquisition signal 5 MHz, with one
// acq_start pulse per acquisition period.
`timescale 1ns/1ps
module tb_adc_clock_generator;
  logic clk = 0, rst_n = 0;
  logic adc_clk, acq_clk, acq_start;
  int checks = 0, failures = 0;
  realtime last_adc_rise, last_acq_rise, last_adc_fall;
  int n_adc = 0, n_acq = 0, n_start = 0;

  adc_clock_generator dut (.clk, .rst_n, .adc_clk, .acq_clk, .acq_start);

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge adc_clk) begin
    if (n_adc > 0) begin
      checks++;
      if ($realtime - last_adc_rise != 100.0) begin
        failures++; $display("adc_clk period %0t", $realtime - last_adc_rise);
      end
    end
    n_adc++; last_adc_rise = $realtime;
  end
  always @(negedge adc_clk) begin
    if (n_adc > 0) begin
      checks++;
      if ($realtime - last_adc_rise != 50.0) begin failures++; $display("adc_clk high time"); end
    end
    last_adc_fall = $realtime;
  end
  always @(posedge acq_clk) begin
    if (n_acq > 0) begin
      checks++;
      if ($realtime - last_acq_rise != 200.0) begin failures++; $display("acq period"); end
    end
    n_acq++; last_acq_rise = $realtime;
  end
  always @(posedge clk) if (rst_n && acq_start) n_start++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4000) @(posedge clk);
    checks++;
    if (n_start != n_acq && n_start != n_acq + 1) begin
      failures++; $display("acq_start %0d vs rises %0d", n_start, n_acq);
    end
    checks++;
    if (n_adc < 195 || n_acq < 95) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
