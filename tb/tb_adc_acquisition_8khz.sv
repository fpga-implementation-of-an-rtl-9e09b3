// tb_adc_acquisition_8khz: the acquisition at the low rate, with the ADC
// boards still converting at 10 MHz: the second divider is set to 12500 + 12500
// clocks (8 kHz), so one conversion in 1250 is taken.  Three modelled boards,
// with their data lanes 0, 0.8 and 1.6 ns ahead of DCO.  Checks that each
// board delivers exactly one word every 25000 clocks, that consecutive words
// are 1250 conversions apart, and every sample of every lane against the model.
`timescale 1ns/1ps
module tb_adc_acquisition_8khz;
  localparam int NB = 3, NC = 12, NWORDS = 12;
  logic clk = 0, rst_n = 0;
  logic adc_clk, acq_start;
  logic [NB-1:0] dco, fco, valid;
  logic [NB-1:0][NC-1:0] din;
  logic [NB*NC-1:0][13:0] samples;
  int checks = 0, failures = 0;
  int n_words [NB];

  ad9249_model #(.N_CH(NC), .BOARD(0), .EARLY_PS(0))    u_adc0 (.adc_clk, .dco(dco[0]), .fco(fco[0]), .dout(din[0]));
  ad9249_model #(.N_CH(NC), .BOARD(1), .EARLY_PS(800))  u_adc1 (.adc_clk, .dco(dco[1]), .fco(fco[1]), .dout(din[1]));
  ad9249_model #(.N_CH(NC), .BOARD(2), .EARLY_PS(1600)) u_adc2 (.adc_clk, .dco(dco[2]), .fco(fco[2]), .dout(din[2]));

  adc_acquisition #(.ACQ_HIGH(12500), .ACQ_LOW(12500)) dut (
    .clk, .rst_n, .adc_clk, .dco, .fco, .din, .samples, .valid, .acq_start);

  always #2.5 clk = ~clk;

  function automatic logic [13:0] model_value(int unsigned kk, int unsigned c, int unsigned board);
    return 14'((kk * 977 + c * 1231 + board * 3079 + 5) ^ (kk << 3));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(negedge clk) cyc++;

  for (genvar b = 0; b < NB; b++) begin : g_chk
    int last_k = -1;
    longint last_cyc = -1;
    always @(negedge clk) if (rst_n && valid[b]) begin
      int k;
      k = -1;
      for (int kk = (last_k < 0 ? 0 : last_k + 1200); kk < (last_k < 0 ? 4000 : last_k + 1300); kk++)
        if (samples[b*NC] == model_value(kk, 0, b) && samples[b*NC+5] == model_value(kk, 5, b)) k = kk;
      checks++;
      if (k < 0) begin failures++; $display("board %0d: word not from the model", b); end
      else begin
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (samples[b*NC+c] != model_value(k, c, b)) failures++;
        end
        if (last_k >= 0) begin
          checks++;
          if (k - last_k != 1250) begin failures++; $display("board %0d: %0d conversions apart", b, k - last_k); end
        end
      end
      if (last_cyc >= 0) begin
        checks++;
        if (cyc - last_cyc != 25000) begin failures++; $display("board %0d: words %0d clocks apart", b, cyc - last_cyc); end
      end
      last_cyc = cyc;
      last_k = k;
      n_words[b]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_words[0] >= NWORDS && n_words[1] >= NWORDS && n_words[2] >= NWORDS);
    @(negedge clk);
    $display("words per board: %0d %0d %0d", n_words[0], n_words[1], n_words[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
