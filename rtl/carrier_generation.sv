// carrier_generation: the carrier block of the PWM section: N_SLOTS generic
// slots sharing one carrier parameter generator.  All slots leave reset
// together and load their first vectors in the same clock, so their carriers
// stay locked to a common switching period; the relative shifts come only from
// the parameter vectors.  A change of `cfg_req` starts a transition in every
// slot at once.
//
// Outputs: carriers, `period_done` (DONE of slot 0, marks the common period
// boundary), `cfg_cur` (configuration of slot 0), `trans_start` (slot 0's
// START_T, same clock in every slot) and `in_transition` (any slot still
// moving).
module carrier_generation #(
  parameter int unsigned N_SLOTS = wicsc_pkg::N_SLOTS,
  parameter int unsigned CMAX    = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned STEP    = 100
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [3:0]                          cfg_req,
  output wicsc_pkg::carrier_t [N_SLOTS-1:0]   carriers,
  output logic                                period_done,
  output logic [3:0]                          cfg_cur,
  output logic                                trans_start,
  output logic                                in_transition
);
  import wicsc_pkg::*;

  carrier_param_t [N_SLOTS-1:0] params;
  logic [N_SLOTS-1:0]           done_v, trans_v, start_v;
  logic [N_SLOTS-1:0][3:0]      cfg_v;

  carrier_parameter_generator #(.N_SLOTS(N_SLOTS), .CMAX(CMAX)) u_cpg (
    .cfg(cfg_req), .params
  );

  for (genvar k = 0; k < N_SLOTS; k++) begin : g_slot
    generic_slot #(.CMAX(CMAX), .STEP(STEP)) u_slot (
      .clk, .rst_n, .cfg_req, .param_req(params[k]),
      .carrier(carriers[k]), .period_done(done_v[k]), .cfg_cur(cfg_v[k]),
      .in_transition(trans_v[k]), .start_t(start_v[k])
    );
  end

  assign period_done   = done_v[0];
  assign cfg_cur       = cfg_v[0];
  assign trans_start   = start_v[0];
  assign in_transition = |trans_v;

  // All slots share one period boundary.
  assert property (@(posedge clk) disable iff (!rst_n) done_v[0] |-> &done_v);
endmodule
