// tb_sampling_section: two sampling sections read two modelled ADC boards, one
// with data edges aligned to DCO, one with data 1.5 ns early.  The testbench
// makes a 10 MHz ADC clock from the 200 MHz clock and a start pulse every
// 40 clocks (5 MHz acquisition).  Every word must be the model's sample of one
// conversion on all 12 lanes, consecutive words two conversions apart, one word
// per start pulse, and the valid pulse no later than 7 clocks after the last
// DCO edge of the word (checked as a bound of 48 clocks from the start pulse).
`timescale 1ns/1ps
module tb_sampling_section;
  localparam int N_CH = 12;
  logic clk = 0, rst_n = 0;
  logic adc_clk = 0, start = 0;
  logic [1:0] dco, fco;
  logic [1:0][N_CH-1:0] din;
  logic [1:0][N_CH-1:0][13:0] samples;
  logic [1:0] valid;
  int checks = 0, failures = 0;
  int last_k [2] = '{-1, -1};
  int n_words [2] = '{0, 0};
  int cyc = 0, last_start = 0, n_starts = 0;

  always #2.5 clk = ~clk;

  ad9249_model #(.N_CH(N_CH), .BOARD(0), .EARLY_PS(0))    u_adc0 (.adc_clk, .dco(dco[0]), .fco(fco[0]), .dout(din[0]));
  ad9249_model #(.N_CH(N_CH), .BOARD(1), .EARLY_PS(1500)) u_adc1 (.adc_clk, .dco(dco[1]), .fco(fco[1]), .dout(din[1]));

  for (genvar b = 0; b < 2; b++) begin : g_dut
    sampling_section #(.N_CH(N_CH)) dut (
      .clk, .rst_n, .start, .dco(dco[b]), .fco(fco[b]), .din(din[b]),
      .samples(samples[b]), .valid(valid[b])
    );
  end

  function automatic logic [13:0] model_value(int unsigned kk, int unsigned c, int unsigned board);
    return 14'((kk * 977 + c * 1231 + board * 3079 + 5) ^ (kk << 3));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (cyc % 20 == 0) adc_clk <= 1;
      if (cyc % 20 == 10) adc_clk <= 0;
      start <= (cyc % 40 == 7);
      if (start) begin last_start = cyc; n_starts++; end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_chk
    always @(posedge clk) if (rst_n && valid[b]) begin
      int found;
      found = -1;
      for (int kk = 0; kk < 400; kk++)
        if (samples[b][0] == model_value(kk, 0, b) && samples[b][5] == model_value(kk, 5, b)) found = kk;
      checks++;
      if (found < 0) begin failures++; $display("board %0d: unknown word %h", b, samples[b][0]); end
      else begin
        for (int c = 0; c < N_CH; c++) begin
          checks++;
          if (samples[b][c] != model_value(found, c, b)) begin
            failures++; $display("board %0d lane %0d: %h exp %h", b, c, samples[b][c], model_value(found, c, b));
          end
        end
        if (last_k[b] >= 0) begin
          checks++;
          if (found != last_k[b] + 2) begin failures++; $display("board %0d conversion %0d after %0d", b, found, last_k[b]); end
        end
        last_k[b] = found;
      end
      checks++;
      if (cyc - last_start > 48) begin failures++; $display("late word: %0d clocks", cyc - last_start); end
      n_words[b]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4000) @(posedge clk);
    for (int b = 0; b < 2; b++) begin
      checks++;
      if (n_words[b] < n_starts - 2 || n_words[b] > n_starts) begin
        failures++; $display("board %0d: %0d words for %0d starts", b, n_words[b], n_starts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
