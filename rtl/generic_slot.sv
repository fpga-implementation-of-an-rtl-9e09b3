// generic_slot: everything that makes the carrier of one stator slot: the
// carrier generator (CG), the configuration handler (CH) and the transition
// handler (TH).  The CG's parameter input and LOAD come from the CH at start-up
// and from the TH during transitions; T_READ and DONE go back to both.
// Structure as in the document; the multiplexer is driven by the CH state.
//
// Outputs: the carrier, `period_done` (the CG's DONE), the current
// configuration and `in_transition`.
module generic_slot #(
  parameter int unsigned CMAX = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned STEP = 100
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                cfg_req,
  input  wicsc_pkg::carrier_param_t param_req,
  output wicsc_pkg::carrier_t       carrier,
  output logic                      period_done,
  output logic [3:0]                cfg_cur,
  output logic                      in_transition,
  output logic                      start_t
);
  import wicsc_pkg::*;

  carrier_param_t ch_param, th_param, old_param, new_param, cg_param;
  logic           ch_load, th_load, cg_load, t_read, th_done, th_busy, running;
  ttype_e         ttype_unused;

  configuration_handler u_ch (
    .clk, .rst_n, .cfg_req, .param_req, .t_read, .th_done,
    .load(ch_load), .param_out(ch_param), .start_t, .old_param, .new_param,
    .cfg_cur, .in_transition
  );

  transition_handler #(.CMAX(CMAX), .STEP(STEP)) u_th (
    .clk, .rst_n, .start_t, .old_param, .new_param, .cg_done(period_done), .t_read,
    .load(th_load), .param_out(th_param), .busy(th_busy), .t_done(th_done),
    .ttype_q(ttype_unused)
  );

  assign cg_load  = ch_load | th_load;
  assign cg_param = th_load ? th_param : ch_param;

  carrier_generator #(.CMAX(CMAX)) u_cg (
    .clk, .rst_n, .param_in(cg_param), .load(cg_load), .t_read, .done(period_done),
    .running, .carrier
  );
endmodule
