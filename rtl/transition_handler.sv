// transition_handler (TH): moves one slot's carrier gradually from the
// parameters of the old configuration to those of the new one.
//
// After START_T the handler waits for the carrier generator's DONE, so every
// transition begins at a period boundary.  Then, once per switching period, it
// moves the carrier offset by at most STEP counts towards the target and loads
// the resulting parameter vector (the first-section length follows from trend
// and offset).  A standard transition (same trend) is one such leg.  An
// up-to-down or down-to-up transition is two standard legs: first the offset
// moves, with the old trend, to the reversal point chosen by transition_type
// (0 or CMAX, where both trends describe the same waveform); the vector loaded
// there already carries the new trend, and the second leg moves the offset to
// its final value.  When the loaded vector equals the new one, `t_done` pulses.
//
// FSM: IDLE -> WAIT_DONE -> LOAD -> WAIT_TREAD -> (WAIT_DONE ... | END) -> IDLE.
// The transition types, the once-per-period loading at DONE and the split of
// UD/DU into two standard legs follow the document; the per-period step size
// STEP and the state encoding are this design's choices (the document's own
// controller uses separate wait and load states per leg and type).
// The CG applies a load at its next period start, so the offset changes by at
// most STEP between two consecutive periods.
module transition_handler #(
  parameter int unsigned CMAX = wicsc_pkg::CARRIER_MAX,
  parameter int unsigned STEP = 100
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start_t,
  input  wicsc_pkg::carrier_param_t old_param,
  input  wicsc_pkg::carrier_param_t new_param,
  input  logic                      cg_done,
  input  logic                      t_read,
  output logic                      load,
  output wicsc_pkg::carrier_param_t param_out,
  output logic                      busy,
  output logic                      t_done,
  output wicsc_pkg::ttype_e         ttype_q
);
  import wicsc_pkg::*;

  typedef enum logic [2:0] {
    H_IDLE       = 3'd0,
    H_WAIT_DONE  = 3'd1,
    H_LOAD       = 3'd2,
    H_WAIT_TREAD = 3'd3,
    H_END        = 3'd4
  } hstate_e;

  hstate_e        state;
  ttype_e         ttype;
  logic [CW-1:0]  rev_point;
  carrier_param_t target;      // final vector
  logic [CW-1:0]  cur_off;     // offset last loaded
  logic           cur_trend;
  logic           leg2;        // UD/DU: second leg reached
  logic [CW-1:0]  rev_q;

  // Offset and trend to load in the next period.
  logic [CW-1:0]  leg_tgt, next_off;
  logic           next_trend;
  logic           leg_end;

  transition_type #(.CMAX(CMAX)) u_type (
    .old_p(old_param), .new_p(new_param), .ttype, .rev_point
  );

  always_comb begin
    leg_tgt = (ttype_q == TT_UD || ttype_q == TT_DU) && !leg2 ? rev_q : target.offset;
    if (leg_tgt > cur_off) begin
      leg_end  = (leg_tgt - cur_off) <= CW'(STEP);
      next_off = leg_end ? leg_tgt : cur_off + CW'(STEP);
    end else begin
      leg_end  = (cur_off - leg_tgt) <= CW'(STEP);
      next_off = leg_end ? leg_tgt : cur_off - CW'(STEP);
    end
    // At the reversal point both trends give the same waveform: switch there.
    next_trend = leg_end ? target.trend : cur_trend;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= H_IDLE;
      ttype_q   <= TT_NONE;
      target    <= '0;
      cur_off   <= '0;
      cur_trend <= 1'b0;
      leg2      <= 1'b0;
      rev_q     <= '0;
      load      <= 1'b0;
      param_out <= '0;
      t_done    <= 1'b0;
    end else begin
      load   <= 1'b0;
      t_done <= 1'b0;
      unique case (state)
        H_IDLE: if (start_t) begin
          ttype_q   <= ttype;
          rev_q     <= rev_point;
          target    <= new_param;
          cur_off   <= old_param.offset;
          cur_trend <= old_param.trend;
          leg2      <= 1'b0;
          state     <= (ttype == TT_NONE) ? H_END : H_WAIT_DONE;
        end
        H_WAIT_DONE: if (cg_done) state <= H_LOAD;
        H_LOAD: begin
          load      <= 1'b1;
          param_out <= param_from_offset(next_trend, next_off, CMAX);
          cur_off   <= next_off;
          cur_trend <= next_trend;
          if (leg_end) leg2 <= 1'b1;
          state     <= H_WAIT_TREAD;
        end
        H_WAIT_TREAD: if (t_read) begin
          if (cur_off == target.offset && cur_trend == target.trend) state <= H_END;
          else                                                       state <= H_WAIT_DONE;
        end
        H_END: begin
          t_done <= 1'b1;
          state  <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  assign busy = (state != H_IDLE);

  // A load is never issued while the previous one is unacknowledged.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> state == H_WAIT_TREAD);
endmodule
