// wicsc_pkg: constants and types shared by the acquisition and PWM blocks of the
// multiphase (WICSC, wound independently-controlled stator coils) drive.
//
// The carrier is a triangle that moves by one count per 200 MHz clock between 0
// and CARRIER_MAX = 12600, so one switching period is 25200 clocks (about 7.94 kHz).
// 25200 is the first count above 200 MHz / 8 kHz that is a multiple of 18, the
// largest number of distinct carriers in any configuration.  A carrier is fully
// described by a 29-bit vector {first-section length (14), start offset (14),
// trend (1)}, the trend bit in the least significant place.  The nine operating
// configurations (phases m, poles p, integer slots per pole per phase) are coded
// 0..8 in the order m3p2, m3p4, m3p6, m3p12, m6p2, m6p6, m9p2, m9p4, m18p2.
package wicsc_pkg;

  localparam int unsigned N_SLOTS     = 36;     // independently driven stator slots
  localparam int unsigned CW          = 14;     // carrier / reference width
  localparam int unsigned CARRIER_MAX = 12600;  // carrier peak (counts)
  localparam int unsigned PERIOD      = 2 * CARRIER_MAX; // clocks per switching period
  localparam int unsigned SAMPLE_W    = 14;     // ADC resolution
  localparam int unsigned N_CFG       = 9;

  typedef logic [CW-1:0] carrier_t;

  // Carrier parameter vector, 29 bits. trend = 1: first section rising.
  typedef struct packed {
    logic [CW-1:0] d1;      // length of the first (and, by MAX-d1, the last) section
    logic [CW-1:0] offset;  // carrier value at the start of the period
    logic          trend;   // slope of the first section, 1 = up
  } carrier_param_t;

  typedef enum logic [3:0] {
    CFG_M3P2  = 4'd0,
    CFG_M3P4  = 4'd1,
    CFG_M3P6  = 4'd2,
    CFG_M3P12 = 4'd3,
    CFG_M6P2  = 4'd4,
    CFG_M6P6  = 4'd5,
    CFG_M9P2  = 4'd6,
    CFG_M9P4  = 4'd7,
    CFG_M18P2 = 4'd8
  } cfg_e;

  // Kind of carrier transition (see transition_type).
  typedef enum logic [2:0] {
    TT_NONE    = 3'd0,
    TT_STD_INC = 3'd1,
    TT_STD_DEC = 3'd2,
    TT_UD      = 3'd3,
    TT_DU      = 3'd4
  } ttype_e;

  // Number of phases of a configuration.
  function automatic int unsigned cfg_phases(logic [3:0] c);
    case (c)
      4'd0, 4'd1, 4'd2, 4'd3: return 3;
      4'd4, 4'd5:             return 6;
      4'd6, 4'd7:             return 9;
      default:                return 18;
    endcase
  endfunction

  // Number of poles of a configuration.
  function automatic int unsigned cfg_poles(logic [3:0] c);
    case (c)
      4'd0, 4'd4, 4'd6, 4'd8: return 2;
      4'd1, 4'd7:             return 4;
      4'd2, 4'd5:             return 6;
      default:                return 12;
    endcase
  endfunction

  // Slots per pole per phase, qs = N_SLOTS / (m * p).
  function automatic int unsigned cfg_qs(logic [3:0] c);
    return N_SLOTS / (cfg_phases(c) * cfg_poles(c));
  endfunction

  // Builds the parameter vector of a carrier whose phase within the switching
  // period is t0 clocks (0 <= t0 < 2*cmax): the carrier starts at tri(t0), where
  // tri rises from 0 to cmax and falls back.
  function automatic carrier_param_t param_from_phase(int unsigned t0, int unsigned cmax);
    carrier_param_t p;
    if (t0 < cmax) begin
      p.trend  = 1'b1;
      p.offset = CW'(t0);
      p.d1     = CW'(cmax - t0);
    end else begin
      p.trend  = 1'b0;
      p.offset = CW'(2 * cmax - t0);
      p.d1     = CW'(2 * cmax - t0);
    end
    return p;
  endfunction

  // Parameter vector from trend and offset (the first-section length follows).
  function automatic carrier_param_t param_from_offset(logic trend, logic [CW-1:0] offset,
                                                       int unsigned cmax);
    carrier_param_t p;
    p.trend  = trend;
    p.offset = offset;
    p.d1     = trend ? CW'(cmax - 32'(offset)) : offset;
    return p;
  endfunction

endpackage
