// sampling_fsm: the control FSM of a sampling section.  It
//   1. waits for the acquisition start pulse (IDLE),
//   2. waits for a rising edge of FCO, which marks the first bit of a word
//      (WAIT_FCO; that edge coincides with a DCO change, so it is the first bit),
//   3. waits for a change of DCO (WAIT_DCO),
//   4. enables the shift registers for one bit and counts it (SHIFT; one bit per
//      clock is possible, SHIFT follows SHIFT when DCO changes again at once),
//   5. checks that 14 bits were taken (CHECK), clears the counter and returns
//      to IDLE, so the next word is taken on the next start pulse.
// The sequence is the document's; the encoding, the registered outputs and the
// return to IDLE after every word are this design's choices.
//
// Outputs: sr_en (registered, one clock after the SHIFT state), cnt_en/cnt_clr
// for the bit counter in sync_chain, word_done (registered, one clock after the
// CHECK state).
module sampling_fsm #(
  parameter int unsigned WORD_BITS = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       dco_chg,
  input  logic       fco_rise,
  input  logic [3:0] bit_cnt,
  output logic       cnt_en,
  output logic       cnt_clr,
  output logic       sr_en,
  output logic       word_done
);
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,
    S_WAIT_FCO = 3'd1,
    S_WAIT_DCO = 3'd2,
    S_SHIFT    = 3'd3,
    S_CHECK    = 3'd4
  } state_e;

  state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:     if (start) state_n = S_WAIT_FCO;
      S_WAIT_FCO: if (fco_rise) state_n = S_SHIFT;
      S_WAIT_DCO: if (dco_chg) state_n = S_SHIFT;
      S_SHIFT: begin
        if (bit_cnt == 4'(WORD_BITS - 1)) state_n = S_CHECK;
        else if (dco_chg)                 state_n = S_SHIFT;
        else                              state_n = S_WAIT_DCO;
      end
      S_CHECK:    state_n = S_IDLE;
      default:    state_n = S_IDLE;
    endcase
  end

  assign cnt_en  = (state == S_SHIFT);
  assign cnt_clr = (state == S_CHECK) || (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sr_en     <= 1'b0;
      word_done <= 1'b0;
    end else begin
      state     <= state_n;
      sr_en     <= (state == S_SHIFT);
      word_done <= (state == S_CHECK);
    end
  end

  // A word never holds more bits than the counter can count.
  assert property (@(posedge clk) disable iff (!rst_n) bit_cnt <= 4'(WORD_BITS));
endmodule
