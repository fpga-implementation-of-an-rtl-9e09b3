// tb_adc_acquisition: three modelled ADC boards, clocked by the design's own
// 10 MHz sampling clock, with data skews of 0, 1.0 and 1.8 ns.  All 36 slot
// samples must match the model, the three boards must deliver the same
// conversion, consecutive words must be two conversions apart (5 MHz
// acquisition of a 10 MHz ADC), and one word set per 40 clocks must arrive.
`timescale 1ns/1ps
module tb_adc_acquisition;
  localparam int NB = 3, NC = 12;
  logic clk = 0, rst_n = 0;
  logic adc_clk, acq_start;
  logic [NB-1:0] dco, fco, valid;
  logic [NB-1:0][NC-1:0] din;
  logic [NB*NC-1:0][13:0] samples;
  int checks = 0, failures = 0;
  int last_k [NB] = '{-1, -1, -1};
  int n_words [NB] = '{0, 0, 0};
  int k_of [NB];

  always #2.5 clk = ~clk;

  ad9249_model #(.N_CH(NC), .BOARD(0), .EARLY_PS(0))    u_adc0 (.adc_clk, .dco(dco[0]), .fco(fco[0]), .dout(din[0]));
  ad9249_model #(.N_CH(NC), .BOARD(1), .EARLY_PS(1000)) u_adc1 (.adc_clk, .dco(dco[1]), .fco(fco[1]), .dout(din[1]));
  ad9249_model #(.N_CH(NC), .BOARD(2), .EARLY_PS(1800)) u_adc2 (.adc_clk, .dco(dco[2]), .fco(fco[2]), .dout(din[2]));

  adc_acquisition dut (.clk, .rst_n, .adc_clk, .dco, .fco, .din, .samples, .valid, .acq_start);

  function automatic logic [13:0] model_value(int unsigned kk, int unsigned c, int unsigned board);
    return 14'((kk * 977 + c * 1231 + board * 3079 + 5) ^ (kk << 3));
  endfunction

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar b = 0; b < NB; b++) begin : g_chk
    always @(negedge clk) if (rst_n && valid[b]) begin
      int found;
      found = -1;
      for (int kk = 0; kk < 600; kk++)
        if (samples[b*NC] == model_value(kk, 0, b) && samples[b*NC+7] == model_value(kk, 7, b)) found = kk;
      checks++;
      if (found < 0) begin failures++; $display("board %0d: unknown word", b); end
      else begin
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (samples[b*NC+c] != model_value(found, c, b)) begin
            failures++; $display("slot %0d: %h exp %h", b*NC+c, samples[b*NC+c], model_value(found, c, b));
          end
        end
        if (last_k[b] >= 0) begin
          checks++;
          if (found != last_k[b] + 2) begin failures++; $display("board %0d: conversion %0d after %0d", b, found, last_k[b]); end
        end
        last_k[b] = found;
      end
      n_words[b]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (8000) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (n_words[b] < 195) begin failures++; $display("board %0d: %0d words", b, n_words[b]); end
    end
    checks++;
    if (last_k[0] != last_k[1] || last_k[1] != last_k[2]) begin
      failures++; $display("boards out of step: %0d %0d %0d", last_k[0], last_k[1], last_k[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
