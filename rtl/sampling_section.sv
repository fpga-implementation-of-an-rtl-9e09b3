// sampling_section: acquisition of the serial outputs of one AD9249 board.  The
// DCO, FCO and data lanes are treated as ordinary data and sampled by the FPGA
// clock (200 MHz); they never clock anything.  One sync_chain and one
// sampling_fsm serve N_CH data_chains, as only one DCO/FCO pair of the board is
// used.  On each start pulse the FSM waits for the next word (FCO rising), takes
// its 14 bits on the 14 DCO changes, and `valid` pulses for one clock when all
// N_CH words, MSB first, two's complement as the ADC sends them, are in `samples`.
// A word stays in `samples` until the next one overwrites it.
//
// Latency: five clocks from the capture of a bit to its shift, so the last bit
// of a word is in `samples` in the cycle `valid` is high, 7 clocks after the
// FPGA clock edge that captured the last DCO change.
// Limit (from the document): DCO toggles at 14x the sampling clock and has to be
// seen at every level, so the sampling clock must stay at or below
// 200 MHz / 14 = 14.2 MHz.
module sampling_section #(
  parameter int unsigned N_CH = 12
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    start,
  input  logic                                    dco,
  input  logic                                    fco,
  input  logic [N_CH-1:0]                         din,
  output logic [N_CH-1:0][wicsc_pkg::SAMPLE_W-1:0] samples,
  output logic                                    valid
);
  import wicsc_pkg::*;

  logic       dco_chg, fco_rise, cnt_en, cnt_clr, sr_en, word_done;
  logic [3:0] bit_cnt;

  sync_chain u_sync (
    .clk, .rst_n, .dco, .fco, .cnt_en, .cnt_clr, .dco_chg, .fco_rise, .bit_cnt
  );

  sampling_fsm #(.WORD_BITS(SAMPLE_W)) u_fsm (
    .clk, .rst_n, .start, .dco_chg, .fco_rise, .bit_cnt,
    .cnt_en, .cnt_clr, .sr_en, .word_done
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    data_chain #(.DELAY(5), .WIDTH(SAMPLE_W)) u_chain (
      .clk, .rst_n, .din(din[c]), .sr_en, .word(samples[c])
    );
  end

  // Align the word-complete flag with the local enable register of the chains.
  always_ff @(posedge clk) begin
    if (!rst_n) valid <= 1'b0;
    else        valid <= word_done;
  end
endmodule
