// carrier_parameter_generator (CPG): gives every slot the parameter vector of
// its carrier in a configuration, which is where interleaving inside the phases
// comes from.
//
// With p poles the machine has N_SLOTS/p slots per pole; that many distinct
// carriers are used (18, 9, 6 or 3 for 2, 4, 6 or 12 poles; 18 is the largest,
// which is why the period is a multiple of 18), evenly shifted over the
// switching period and repeated from pole to pole: slot k gets the carrier
// shifted by t0 = (k mod (N_SLOTS/p)) * (2*CMAX) / (N_SLOTS/p) clocks, i.e.
// 20 degrees per slot in the 3-phase 2-pole configuration.  The number of
// distinct carriers, the 20-degree shift and the repetition after six carriers
// in 3-phase 6-pole follow the document; the general rule, the direction of the
// shift and the slot numbering from 0 are this design's choices.  Combinational: each slot's vector is a constant per
// pole count, so this is a small ROM.
module carrier_parameter_generator #(
  parameter int unsigned N_SLOTS = wicsc_pkg::N_SLOTS,
  parameter int unsigned CMAX    = wicsc_pkg::CARRIER_MAX
) (
  input  logic [3:0]                               cfg,
  output wicsc_pkg::carrier_param_t [N_SLOTS-1:0]  params
);
  import wicsc_pkg::*;

  // Parameter vector of slot k with p poles.
  function automatic carrier_param_t slot_param(int unsigned k, int unsigned p);
    int unsigned ncar, t0;
    ncar = N_SLOTS / p;
    t0   = (k % ncar) * ((2 * CMAX) / ncar);
    return param_from_phase(t0, CMAX);
  endfunction

  always_comb begin
    for (int k = 0; k < N_SLOTS; k++) begin
      case (cfg_poles(cfg))
        2:       params[k] = slot_param(k, 2);
        4:       params[k] = slot_param(k, 4);
        6:       params[k] = slot_param(k, 6);
        default: params[k] = slot_param(k, 12);
      endcase
    end
  end
endmodule
