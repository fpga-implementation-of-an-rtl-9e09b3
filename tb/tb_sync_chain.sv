// tb_sync_chain: random DCO/FCO levels; dco_chg and fco_rise must equal the
// change / rising edge of the inputs two and three clocks back, and the bit
// counter must count enables and clear.
`timescale 1ns/1ps
module tb_sync_chain;
  logic clk = 0, rst_n = 0;
  logic dco = 0, fco = 0, cnt_en = 0, cnt_clr = 0;
  logic dco_chg, fco_rise;
  logic [3:0] bit_cnt;
  int checks = 0, failures = 0;
  logic dh [4], fh [4];   // input history at the last four edges
  int exp_cnt;

  sync_chain dut (.clk, .rst_n, .dco, .fco, .cnt_en, .cnt_clr, .dco_chg, .fco_rise, .bit_cnt);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin dh[i] = 0; fh[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    exp_cnt = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      // shift history: value sampled at this edge
      for (int i = 3; i > 0; i--) begin dh[i] = dh[i-1]; fh[i] = fh[i-1]; end
      dh[0] = dco; fh[0] = fco;
      if (cnt_clr) exp_cnt = 0; else if (cnt_en) exp_cnt = (exp_cnt + 1) % 16;
      #0.1;
      if (n >= 4) begin
        checks += 3;
        if (dco_chg != (dh[1] ^ dh[2])) begin failures++; $display("dco_chg at %0d", n); end
        if (fco_rise != (fh[1] & ~fh[2])) begin failures++; $display("fco_rise at %0d", n); end
        if (bit_cnt != 4'(exp_cnt)) begin failures++; $display("bit_cnt %0d exp %0d", bit_cnt, exp_cnt); end
      end
      dco <= 1'($urandom);
      fco <= 1'($urandom);
      cnt_en  <= ($urandom % 3) != 0;
      cnt_clr <= ($urandom % 17) == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
