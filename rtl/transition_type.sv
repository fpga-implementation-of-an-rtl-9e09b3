// transition_type: classifies the move from an old to a new carrier parameter
// vector, looking at the trend bits (the last bit of each vector) and the
// offsets.  Same trend: a standard transition, rising or falling offset.
// Different trend: up-to-down (UD) or down-to-up (DU); these pass through a
// reversal point, offset 0 or CMAX, where the rising and falling descriptions
// give the same waveform.  The point is chosen so that the total offset travel
// is shortest: via 0 costs old+new, via CMAX costs 2*CMAX-old-new.  The four
// categories are the document's; the choice of the reversal point is this
// design's.  Purely combinational.
module transition_type #(
  parameter int unsigned CMAX = wicsc_pkg::CARRIER_MAX
) (
  input  wicsc_pkg::carrier_param_t old_p,
  input  wicsc_pkg::carrier_param_t new_p,
  output wicsc_pkg::ttype_e         ttype,
  output logic [wicsc_pkg::CW-1:0]  rev_point
);
  import wicsc_pkg::*;

  logic [CW:0] via0;

  assign via0 = {1'b0, old_p.offset} + {1'b0, new_p.offset};

  always_comb begin
    rev_point = '0;
    if (old_p == new_p)                    ttype = TT_NONE;
    else if (old_p.trend == new_p.trend)   ttype = (new_p.offset > old_p.offset) ? TT_STD_INC : TT_STD_DEC;
    else                                   ttype = old_p.trend ? TT_UD : TT_DU;
    if (via0 > (CW+1)'(CMAX)) rev_point = CW'(CMAX);
  end
endmodule
