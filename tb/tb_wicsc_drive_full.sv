// tb_wicsc_drive_full: the whole design with every parameter at its default
// (200 MHz clock, 10 MHz ADC clock, 12600-count carrier of 25200 clocks,
// 100-count transition step).  One complete operation:
//  - three modelled ADC boards deliver words; every acquired sample is checked
//    against the model and the acquisition rate (one word per board every
//    40 clocks) is checked,
//  - 30 samples of one slot are captured in the register file and read out,
//  - in m3p2 one switching period is watched: the 18 carriers must reach zero
//    1400 clocks apart (slot k leads slot 0 by (k mod 18) * 1400 clocks),
//  - the configuration is changed to m3p4 and run to completion; afterwards
//    the 9 carriers must be 2800 clocks apart,
//  - the PWM outputs are checked against the comparator relation throughout.
`timescale 1ns/1ps
module tb_wicsc_drive_full;
  import wicsc_pkg::*;
  localparam int NB = 3, NC = 12, P = 25200;
  logic clk = 0, rst_n = 0;
  logic adc_clk;
  logic [NB-1:0] dco, fco, samples_valid;
  logic [NB-1:0][NC-1:0] din;
  logic [NB*NC-1:0][13:0] samples;
  logic rf_save = 0, rf_ready = 0, rf_busy, rf_valid;
  logic [5:0] rf_sel = 0;
  logic [13:0] rf_data;
  logic [3:0] cfg_req = 0, cfg_cur;
  logic [CW-1:0] amp = 14'd5000;
  logic [35:0] pwm, expv;
  logic pwm_busy, period_done;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint zero_at [36];
  int n_words = 0;

  ad9249_model #(.N_CH(NC), .BOARD(0), .EARLY_PS(0))    u_adc0 (.adc_clk, .dco(dco[0]), .fco(fco[0]), .dout(din[0]));
  ad9249_model #(.N_CH(NC), .BOARD(1), .EARLY_PS(800))  u_adc1 (.adc_clk, .dco(dco[1]), .fco(fco[1]), .dout(din[1]));
  ad9249_model #(.N_CH(NC), .BOARD(2), .EARLY_PS(1600)) u_adc2 (.adc_clk, .dco(dco[2]), .fco(fco[2]), .dout(din[2]));

  wicsc_drive_top dut (
    .clk, .rst_n, .adc_clk, .adc_dco(dco), .adc_fco(fco), .adc_din(din), .samples, .samples_valid,
    .rf_save, .rf_sel, .rf_busy, .rf_data, .rf_valid, .rf_ready,
    .cfg_req, .amp, .pwm, .cfg_cur, .pwm_busy, .period_done);

  always #2.5 clk = ~clk;

  function automatic logic [13:0] model_value(int unsigned kk, int unsigned c, int unsigned board);
    return 14'((kk * 977 + c * 1231 + board * 3079 + 5) ^ (kk << 3));
  endfunction

  initial begin
    #30000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cyc++;

  // acquired words and their rate
  for (genvar b = 0; b < NB; b++) begin : g_chk
    int last_k = -1;
    longint last_cyc = -1;
    always @(negedge clk) if (rst_n && samples_valid[b]) begin
      int k;
      k = -1;
      for (int kk = (last_k < 0 ? 0 : last_k + 1); kk < (last_k < 0 ? 400 : last_k + 4); kk++)
        if (samples[b*NC] == model_value(kk, 0, b) && samples[b*NC+7] == model_value(kk, 7, b)) k = kk;
      checks++;
      if (k < 0) begin failures++; $display("board %0d: word not from the model", b); end
      else for (int c = 0; c < NC; c++) begin
        checks++;
        if (samples[b*NC+c] != model_value(k, c, b)) failures++;
      end
      if (last_cyc >= 0) begin
        checks++;
        if (cyc - last_cyc != 40) begin failures++; $display("board %0d: word spacing %0d", b, cyc - last_cyc); end
      end
      last_cyc = cyc;
      last_k = k;
      if (b == 0) n_words++;
    end
  end

  // comparator relation and carrier zero crossings
  always @(negedge clk) if (rst_n) begin
    if (cyc > 5) begin
      checks++;
      if (pwm != expv) begin failures++; if (failures < 10) $display("pwm mismatch"); end
    end
    for (int k = 0; k < 36; k++) begin
      expv[k] = (dut.refs[k] > dut.carriers[k]);
      if (dut.carriers[k] == 0) zero_at[k] = cyc;
    end
  end

  task automatic check_leads(input int n_car, input string name);
    longint t0;
    repeat (2 * P) @(negedge clk);
    for (int k = 0; k < 36; k++) begin
      t0 = (zero_at[0] - zero_at[k] + 2 * P) % P;
      checks++;
      if (t0 != (k % n_car) * (P / n_car)) begin
        failures++;
        $display("%s: slot %0d leads by %0d, expected %0d", name, k, t0, (k % n_car) * (P / n_car));
      end
    end
  endtask

  initial begin
    int sel, k0, n;
    longint t_start;
    logic [13:0] got [30];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) @(negedge clk);
    sel = 29;
    @(negedge clk); rf_save = 1; rf_sel = 6'(sel);
    @(negedge clk); rf_save = 0;
    while (!rf_valid) @(negedge clk);
    n = 0;
    while (n < 30) begin
      rf_ready = 1'($urandom);
      #0.1;
      if (rf_ready && rf_valid) begin got[n] = rf_data; n++; end
      @(negedge clk);
    end
    rf_ready = 0;
    k0 = -1;
    for (int kk = 0; kk < 4000; kk++) if (got[0] == model_value(kk, sel % NC, sel / NC)) k0 = kk;
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (k0 < 0 || got[i] != model_value(k0 + 2 * i, sel % NC, sel / NC)) begin
        failures++; $display("register file sample %0d", i);
      end
    end
    check_leads(18, "m3p2");
    cfg_req = 4'd1;
    t_start = cyc;
    repeat (4) @(negedge clk);
    checks++;
    if (cfg_cur != 4'd1) failures++;
    while (pwm_busy) @(negedge clk);
    $display("m3p2 -> m3p4 finished after %0d clocks (%0d periods)", cyc - t_start, (cyc - t_start) / P);
    check_leads(9, "m3p4");
    $display("words per board: %0d", n_words);
    checks++;
    if (n_words < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
