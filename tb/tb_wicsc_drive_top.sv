// tb_wicsc_drive_top: end-to-end run of the whole design at reduced PWM sizes
// (CMAX = 90, STEP = 15, RAMP_STEP = 64, 2^20 frequency word); the ADC side is
// at its real rates.  Three modelled ADC boards are driven by the design's own
// sampling clock.  The run
//  - checks every acquired sample of the 36 slots against the ADC model,
//  - captures 30 samples of one slot in the register file and reads them out
//    with a stalling ready, checking them against the model,
//  - checks the PWM outputs against the comparator relation at every clock,
//  - walks through configuration changes chosen so that standard (offset up
//    and down), up-to-down and down-to-up carrier transitions all occur, plus
//    an invalid code that must be ignored,
// and counts how often each mechanism happened; one that never happened is a
// failure.
`timescale 1ns/1ps
module tb_wicsc_drive_top;
  import wicsc_pkg::*;
  localparam int NB = 3, NC = 12, C = 90, P = 180;
  logic clk = 0, rst_n = 0;
  logic adc_clk;
  logic [NB-1:0] dco, fco, samples_valid;
  logic [NB-1:0][NC-1:0] din;
  logic [NB*NC-1:0][13:0] samples;
  logic rf_save = 0, rf_ready = 0, rf_busy, rf_valid;
  logic [5:0] rf_sel = 0;
  logic [13:0] rf_data;
  logic [3:0] cfg_req = 0, cfg_cur;
  logic [CW-1:0] amp = 14'd40;
  logic [35:0] pwm, expv;
  logic pwm_busy, period_done;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_words = 0, n_rf_out = 0, n_cfg_changes = 0, n_ramps = 0, n_invalid_ignored = 0;
  int n_type [5] = '{0, 0, 0, 0, 0};
  int seen_k [NB];

  ad9249_model #(.N_CH(NC), .BOARD(0), .EARLY_PS(0))    u_adc0 (.adc_clk, .dco(dco[0]), .fco(fco[0]), .dout(din[0]));
  ad9249_model #(.N_CH(NC), .BOARD(1), .EARLY_PS(800))  u_adc1 (.adc_clk, .dco(dco[1]), .fco(fco[1]), .dout(din[1]));
  ad9249_model #(.N_CH(NC), .BOARD(2), .EARLY_PS(1600)) u_adc2 (.adc_clk, .dco(dco[2]), .fco(fco[2]), .dout(din[2]));

  wicsc_drive_top #(.CMAX(C), .STEP(15), .FREQ_WORD(1 << 20), .RAMP_STEP(64)) dut (
    .clk, .rst_n, .adc_clk, .adc_dco(dco), .adc_fco(fco), .adc_din(din), .samples, .samples_valid,
    .rf_save, .rf_sel, .rf_busy, .rf_data, .rf_valid, .rf_ready,
    .cfg_req, .amp, .pwm, .cfg_cur, .pwm_busy, .period_done);

  always #2.5 clk = ~clk;

  function automatic logic [13:0] model_value(int unsigned kk, int unsigned c, int unsigned board);
    return 14'((kk * 977 + c * 1231 + board * 3079 + 5) ^ (kk << 3));
  endfunction
  function automatic int find_k(logic [13:0] v0, logic [13:0] v7, int b);
    for (int kk = 0; kk < 200000; kk++)
      if (v0 == model_value(kk, 0, b) && v7 == model_value(kk, 7, b)) return kk;
    return -1;
  endfunction

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC words: every lane of every board.
  for (genvar b = 0; b < NB; b++) begin : g_chk
    int last_k = -1;
    always @(negedge clk) if (rst_n && samples_valid[b]) begin
      int k;
      // search forward from the previous conversion only
      k = -1;
      for (int kk = (last_k < 0 ? 0 : last_k + 1); kk < (last_k < 0 ? 400 : last_k + 4); kk++)
        if (samples[b*NC] == model_value(kk, 0, b) && samples[b*NC+7] == model_value(kk, 7, b)) k = kk;
      checks++;
      if (k < 0) begin failures++; $display("board %0d: word not from the model", b); end
      else for (int c = 0; c < NC; c++) begin
        checks++;
        if (samples[b*NC+c] != model_value(k, c, b)) begin failures++; $display("slot %0d wrong", b*NC+c); end
      end
      last_k = k;
      seen_k[b] = k;
      if (b == 0) n_words++;
    end
  end

  // PWM outputs against the comparator relation.
  int cyc = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 5) begin
      checks++;
      if (pwm != expv) begin failures++; if (failures < 10) $display("pwm mismatch"); end
    end
    for (int k = 0; k < 36; k++) expv[k] = (dut.refs[k] > dut.carriers[k]);
  end

  // Transition kinds started in the slots.
  for (genvar k = 0; k < 36; k++) begin : g_tt
    always @(negedge clk) if (rst_n && dut.u_pwm.u_carriers.g_slot[k].u_slot.start_t) begin
      // the kind is registered one clock later
      @(negedge clk);
      n_type[int'(dut.u_pwm.u_carriers.g_slot[k].u_slot.u_th.ttype_q)]++;
    end
  end
  always @(negedge clk) if (rst_n && dut.u_pwm.u_refs.trans_start) n_ramps++;

  task automatic change_cfg(input logic [3:0] c);
    cfg_req = c;
    repeat (4) @(negedge clk);
    checks++;
    if (cfg_cur != c) begin failures++; $display("configuration %0d not taken", c); end
    while (pwm_busy) @(negedge clk);
    n_cfg_changes++;
    repeat (3 * P) @(negedge clk);
  endtask

  initial begin
    int sel, k0, n;
    logic [13:0] got [30];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) @(negedge clk);
    // register file: capture 30 samples of slot 17 and read them out
    sel = 17;
    @(negedge clk); rf_save = 1; rf_sel = 6'(sel);
    @(negedge clk); rf_save = 0;
    while (!rf_valid) @(negedge clk);
    n = 0;
    while (n < 30) begin
      rf_ready = 1'($urandom);
      #0.1;
      if (rf_ready && rf_valid) begin got[n] = rf_data; n++; n_rf_out++; end
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
    // configuration walk: m3p2 -> m3p4 -> m3p12 -> m18p2 -> m6p6 -> m3p2
    change_cfg(4'd1);
    change_cfg(4'd3);
    // invalid code: nothing may start
    cfg_req = 4'd12;
    repeat (50) @(negedge clk);
    checks++;
    if (pwm_busy || cfg_cur != 4'd3) begin failures++; $display("invalid code acted on"); end
    else n_invalid_ignored++;
    change_cfg(4'd8);
    change_cfg(4'd5);
    change_cfg(4'd0);
    $display("mechanisms: words=%0d rf_out=%0d cfg_changes=%0d ramps=%0d invalid_ignored=%0d",
             n_words, n_rf_out, n_cfg_changes, n_ramps, n_invalid_ignored);
    $display("transition kinds: none=%0d std_inc=%0d std_dec=%0d ud=%0d du=%0d",
             n_type[0], n_type[1], n_type[2], n_type[3], n_type[4]);
    checks += 9;
    if (n_words == 0) failures++;
    if (n_rf_out != 30) failures++;
    if (n_cfg_changes != 5) failures++;
    if (n_ramps != 5) failures++;
    if (n_invalid_ignored != 1) failures++;
    for (int i = 1; i < 5; i++) if (n_type[i] == 0) begin failures++; $display("kind %0d never happened", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
