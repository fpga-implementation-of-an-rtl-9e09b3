// tb_wicsc_configs_full: the whole design at its default sizes (12600-count
// carrier, 25200-clock period, STEP 100, 50 Hz references) taken through all
// nine configurations, including the transitions m3p2 -> m3p4, m3p2 -> m3p12
// and m3p2 -> m6p2.  The ADC inputs are held idle; acquisition is covered by
// the other top-level testbenches.
//
// In every configuration, once the transition has ended, it checks
//  - the carrier spacing: slot k reaches zero (k mod 36/p) * 25200/(36/p)
//    clocks before slot 0,
//  - the references: slot k follows CMAX/2 + amp*sin(wt - b*180deg/m) with
//    belt b = k / qs, within the sine table's angle resolution,
//  - the PWM outputs against the comparator relation (every clock).
// During every transition it checks that each carrier's phase moves by at
// most STEP clocks from one switching period to the next, and that the
// transition ends within 130 periods.
`timescale 1ns/1ps
module tb_wicsc_configs_full;
  import wicsc_pkg::*;
  localparam int P = 25200, C = 12600, STEP = 100;
  logic clk = 0, rst_n = 0;
  logic adc_clk;
  logic [2:0] dco = '0, fco = '0, samples_valid;
  logic [2:0][11:0] din = '0;
  logic [35:0][13:0] samples;
  logic rf_busy, rf_valid;
  logic [13:0] rf_data;
  logic [3:0] cfg_req = 0, cfg_cur;
  logic [CW-1:0] amp = 14'd5000;
  logic [35:0] pwm, expv;
  logic pwm_busy, period_done;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint zero_at [36];
  longint prev_zero [36];
  bit in_trans = 0;
  int max_jump = 0;

  wicsc_drive_top dut (
    .clk, .rst_n, .adc_clk, .adc_dco(dco), .adc_fco(fco), .adc_din(din), .samples, .samples_valid,
    .rf_save(1'b0), .rf_sel(6'd0), .rf_busy, .rf_data, .rf_valid, .rf_ready(1'b0),
    .cfg_req, .amp, .pwm, .cfg_cur, .pwm_busy, .period_done);

  always #2.5 clk = ~clk;

  initial begin
    #450000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 5) begin
      checks++;
      if (pwm != expv) begin failures++; if (failures < 10) $display("pwm mismatch"); end
    end
    for (int k = 0; k < 36; k++) begin
      expv[k] = (dut.refs[k] > dut.carriers[k]);
      if (dut.carriers[k] == 0) begin
        if (in_trans && prev_zero[k] > 0) begin
          longint d;
          // phase move, modulo the period (a zero may cross the period boundary)
          d = (cyc - prev_zero[k]) % P;
          if (d > P / 2) d = P - d;
          if (d > max_jump) max_jump = int'(d);
          checks++;
          if (d > STEP) begin failures++; $display("slot %0d phase jumped by %0d", k, d); end
        end
        prev_zero[k] = cyc;
        zero_at[k] = cyc;
      end
    end
  end

  function automatic int phases(int c);
    case (c) 0, 1, 2, 3: return 3; 4, 5: return 6; 6, 7: return 9; default: return 18; endcase
  endfunction
  function automatic int poles(int c);
    case (c) 0, 4, 6, 8: return 2; 1, 7: return 4; 2, 5: return 6; default: return 12; endcase
  endfunction

  task automatic check_config(input int c);
    int ncar, m, qs, worst;
    longint t0;
    real ph, e;
    ncar = 36 / poles(c);
    m = phases(c);
    qs = 36 / (m * poles(c));
    repeat (2 * P) @(negedge clk);
    for (int k = 0; k < 36; k++) begin
      t0 = (zero_at[0] - zero_at[k] + 2 * P) % P;
      checks++;
      if (t0 != (k % ncar) * (P / ncar)) begin
        failures++;
        $display("cfg %0d: slot %0d leads by %0d, expected %0d", c, k, t0, (k % ncar) * (P / ncar));
      end
    end
    worst = 0;
    for (int i = 0; i < 20; i++) begin
      repeat (997) @(negedge clk);
      ph = real'(dut.u_pwm.u_refs.acc) / 4294967296.0 * 2.0 * 3.14159265358979;
      for (int k = 0; k < 36; k++) begin
        e = real'(C / 2) + real'(amp) * $sin(ph - real'(k / qs) * 3.14159265358979 / real'(m))
            - real'(dut.refs[k]);
        if (e < 0) e = -e;
        if (int'(e) > worst) worst = int'(e);
        checks++;
        if (e > 12.0) begin failures++; if (failures < 20) $display("cfg %0d slot %0d ref off by %0f", c, k, e); end
      end
    end
    $display("cfg %0d: carriers and references checked, worst reference error %0d counts", c, worst);
  endtask

  task automatic change_cfg(input int c);
    longint t_start;
    cfg_req = 4'(c);
    for (int k = 0; k < 36; k++) prev_zero[k] = 0;
    in_trans = 1;
    t_start = cyc;
    repeat (4) @(negedge clk);
    checks++;
    if (cfg_cur != 4'(c)) failures++;
    while (pwm_busy) @(negedge clk);
    in_trans = 0;
    checks++;
    if (cyc - t_start > 130 * P) begin failures++; $display("transition too long"); end
    $display("-> cfg %0d after %0d periods", c, (cyc - t_start) / P);
    check_config(c);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(negedge clk);
    check_config(0);
    change_cfg(1);   // m3p2 -> m3p4
    change_cfg(0);
    change_cfg(3);   // m3p2 -> m3p12
    change_cfg(0);
    change_cfg(4);   // m3p2 -> m6p2
    change_cfg(5);
    change_cfg(6);
    change_cfg(7);
    change_cfg(8);
    change_cfg(2);
    $display("largest period-to-period phase move during transitions: %0d clocks", max_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
