// tb_data_chain: random data and enables; the shift register must take, one
// clock after each enable, the bit that entered the chain five clocks before
// the shifting edge.
`timescale 1ns/1ps
module tb_data_chain;
  logic clk = 0, rst_n = 0;
  logic din = 0, sr_en = 0;
  logic [13:0] word;
  logic [13:0] exp_word;
  int checks = 0, failures = 0;
  logic dh [8];
  logic en_h [2];

  data_chain dut (.clk, .rst_n, .din, .sr_en, .word);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) dh[i] = 0;
    en_h[0] = 0; en_h[1] = 0;
    exp_word = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      // model: at this edge the register shifts if sr_en was 1 at the previous
      // edge, taking din as sampled 5 edges ago (dh[4] before this edge's update).
      if (en_h[0]) exp_word = {exp_word[12:0], dh[4]};
      for (int i = 7; i > 0; i--) dh[i] = dh[i-1];
      dh[0] = din;
      en_h[1] = en_h[0]; en_h[0] = sr_en;
      #0.1;
      if (n > 8) begin
        checks++;
        if (word != exp_word) begin failures++; $display("word %h exp %h at %0d", word, exp_word, n); end
      end
      din   <= 1'($urandom);
      sr_en <= 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
