// pwm_section: carrier-based PWM with interleaving inside the phases for the 36
// independently driven slots: carrier generation, reference generation and the
// comparator.  The reference generator follows the configuration of the carrier
// block and starts its cross-fade on the same clock as the carrier
// transitions, stepping once per switching period, so carriers and references
// change configuration together.
//
// Interface: cfg_req (configuration code from the control, 0..8), amp (reference
// peak in counts), pwm (one leg signal per slot), plus carriers, references
// and status for observation.
module pwm_section #(
  parameter int unsigned N_SLOTS   = wicsc_pkg::N_SLOTS,
  parameter int unsigned CMAX      = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned STEP      = 100,
  parameter int unsigned FREQ_WORD = 1074,
  parameter int unsigned RAMP_STEP = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [3:0]                         cfg_req,
  input  logic [wicsc_pkg::CW-1:0]           amp,
  output logic [N_SLOTS-1:0]                 pwm,
  output wicsc_pkg::carrier_t [N_SLOTS-1:0]  carriers,
  output wicsc_pkg::carrier_t [N_SLOTS-1:0]  refs,
  output logic [3:0]                         cfg_cur,
  output logic                               period_done,
  output logic                               busy
);
  logic trans_start, in_transition, ramp_busy;

  carrier_generation #(.N_SLOTS(N_SLOTS), .CMAX(CMAX), .STEP(STEP)) u_carriers (
    .clk, .rst_n, .cfg_req, .carriers, .period_done, .cfg_cur, .trans_start, .in_transition
  );

  reference_generator #(
    .N_SLOTS(N_SLOTS), .CMAX(CMAX), .FREQ_WORD(FREQ_WORD), .RAMP_STEP(RAMP_STEP)
  ) u_refs (
    .clk, .rst_n, .cfg(cfg_cur), .trans_start, .period_tick(period_done), .amp, .refs, .ramp_busy
  );

  pwm_comparator #(.N_SLOTS(N_SLOTS)) u_cmp (
    .clk, .rst_n, .carriers, .refs, .pwm
  );

  assign busy = in_transition | ramp_busy;
endmodule
