// tb_sampling_fsm: drives start, FCO-rise and DCO-change flags directly, with
// the bit counter modelled in the testbench.  After a start, the FCO rise and
// the next 13 DCO changes (with random gaps of 0..2 clocks) must each give one
// sr_en pulse, visible after the second rising edge that follows it (the one
// where it is sampled, then the registered output), no other sr_en may appear,
// and word_done must follow one clock after the last sr_en.
`timescale 1ns/1ps
module tb_sampling_fsm;
  logic clk = 0, rst_n = 0;
  logic start = 0, dco_chg = 0, fco_rise = 0;
  logic [3:0] bit_cnt;
  logic cnt_en, cnt_clr, sr_en, word_done;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit exp_sr [int];
  bit exp_done [int];
  int n_sr = 0, n_done = 0, n_words = 0;

  sampling_fsm dut (.clk, .rst_n, .start, .dco_chg, .fco_rise, .bit_cnt,
                    .cnt_en, .cnt_clr, .sr_en, .word_done);

  always #2.5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (!rst_n || cnt_clr) bit_cnt <= '0;
    else if (cnt_en) bit_cnt <= bit_cnt + 1'b1;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare outputs every cycle.
  // Index of the last rising clock edge (edges at 2.5 + 5n ns).  Inputs are
  // driven and outputs checked on falling edges, away from the sampling edge.
  function automatic int now_cyc();
    return int'($floor(($realtime - 2.5) / 5.0));
  endfunction

  always @(negedge clk) begin
    cyc = now_cyc();
    if (rst_n && cyc > 2) begin
      checks += 2;
      if (sr_en != (exp_sr.exists(cyc) ? 1'b1 : 1'b0)) begin
        failures++; $display("sr_en=%0b at cycle %0d", sr_en, cyc);
      end
      if (word_done != (exp_done.exists(cyc) ? 1'b1 : 1'b0)) begin
        failures++; $display("word_done=%0b at cycle %0d", word_done, cyc);
      end
      n_sr += sr_en; n_done += word_done;
    end
  end

  // Drive one clock of inputs; they are sampled at rising edge now_cyc()+1.
  task automatic drive(input logic s, input logic f, input logic d);
    @(negedge clk);
    start = s; fco_rise = f; dco_chg = d;
  endtask

  initial begin
    int t;
    t = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(0, 0, 0);
    for (int w = 0; w < 40; w++) begin
      // noise before start: must be ignored
      repeat ($urandom % 4) drive(0, 1'($urandom), 1'($urandom));
      drive(1, 0, 0);
      // a few DCO changes before the FCO rise: ignored
      repeat ($urandom % 3) drive(0, 0, 1);
      repeat ($urandom % 2) drive(0, 0, 0);
      drive(0, 1, 1);                       // FCO rise = first bit
      t = now_cyc() + 1; exp_sr[t + 1] = 1;
      for (int b = 1; b < 14; b++) begin
        repeat ($urandom % 3) drive(0, 0, 0);
        drive(0, 0, 1);
        t = now_cyc() + 1; exp_sr[t + 1] = 1;
      end
      exp_done[t + 2] = 1;
      n_words++;
      // DCO keeps toggling after the word: ignored until the next start
      repeat (6) drive(0, 0, 1);
    end
    drive(0, 0, 0);
    repeat (10) @(posedge clk);
    checks += 2;
    if (n_sr != 14 * n_words) begin failures++; $display("sr_en pulses %0d", n_sr); end
    if (n_done != n_words) begin failures++; $display("words %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
