// ad9249_model: behavioural model (not synthesizable) of the serial outputs of
// one 14-bit multichannel ADC board, for testbenches.
//
// At every rising edge of adc_clk the model takes conversion number k (counted
// from 0) and, LAT_PS later, sends it on every lane: 14 bits, MSB first, each
// lasting one fourteenth of the measured adc_clk period.  DCO toggles at the
// start of every bit (data is valid on both of its edges), FCO is high for the
// first seven bits of a word and low for the last seven.  The data lanes change
// EARLY_PS before the DCO edge, to model skew.  Lane c of conversion k carries
// sample_value(k, c), a fixed formula the testbench can reproduce.
`timescale 1ns/1ps
module ad9249_model #(
  parameter int unsigned N_CH     = 12,
  parameter int unsigned BOARD    = 0,
  parameter int unsigned LAT_PS   = 3000,
  parameter int unsigned EARLY_PS = 0,
  parameter int unsigned PER_PS   = 100000
) (
  input  logic            adc_clk,
  output logic            dco,
  output logic            fco,
  output logic [N_CH-1:0] dout
);
  int unsigned k = 0;

  function automatic logic [13:0] sample_value(int unsigned kk, int unsigned c);
    return 14'((kk * 977 + c * 1231 + BOARD * 3079 + 5) ^ (kk << 3));
  endfunction

  initial begin
    dco = 1'b0; fco = 1'b0; dout = '0;
  end

  // Bit i of a word starts at LAT_PS + i*PER_PS/14 after the clock edge.
  always @(posedge adc_clk) begin
    automatic int unsigned kk = k;
    k = k + 1;
    fork
      begin : data_lanes
        #((LAT_PS - EARLY_PS) * 1ps);
        for (int i = 0; i < 14; i++) begin
          for (int c = 0; c < N_CH; c++) dout[c] = sample_value(kk, c)[13-i];
          if (i < 13) #(((PER_PS * (i + 1)) / 14 - (PER_PS * i) / 14) * 1ps);
        end
      end
      begin : clocks
        #(LAT_PS * 1ps);
        for (int i = 0; i < 14; i++) begin
          dco = ~dco;
          fco = (i < 7);
          if (i < 13) #(((PER_PS * (i + 1)) / 14 - (PER_PS * i) / 14) * 1ps);
        end
      end
    join_none
  end
endmodule
