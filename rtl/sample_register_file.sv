// sample_register_file: the capture buffer used to look at the ADC samples.  On
// a `save` pulse it stores the next DEPTH samples of the selected slot (one per
// `in_valid`), then streams them out in order, one per accepted transfer on a
// valid/ready port towards the processor, and returns to idle.  While it is
// idle, samples are not stored: in normal operation each sample is simply
// overwritten by the next.  The capacity of 30 samples and the fill-then-send
// behaviour are the document's; the handshake and the slot selector are this
// design's choices.
module sample_register_file #(
  parameter int unsigned DEPTH   = 30,
  parameter int unsigned WIDTH   = 14,
  parameter int unsigned N_SLOTS = 36
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       save,
  input  logic [$clog2(N_SLOTS)-1:0] sel,
  input  logic [N_SLOTS-1:0][WIDTH-1:0] in_samples,
  input  logic                       in_valid,
  output logic                       busy,
  output logic                       full,
  output logic [WIDTH-1:0]           out_data,
  output logic                       out_valid,
  input  logic                       out_ready
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {R_IDLE, R_FILL, R_SEND} rstate_e;

  rstate_e              state;
  logic [WIDTH-1:0]     mem [DEPTH];
  logic [AW-1:0]        wptr, rptr;
  logic [$clog2(N_SLOTS)-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= R_IDLE;
      wptr  <= '0;
      rptr  <= '0;
      sel_q <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (save) begin
          state <= R_FILL;
          wptr  <= '0;
          sel_q <= sel;
        end
        R_FILL: if (in_valid) begin
          if (wptr == AW'(DEPTH - 1)) begin
            state <= R_SEND;
            rptr  <= '0;
          end
          wptr <= wptr + 1'b1;
        end
        R_SEND: if (out_ready) begin
          if (rptr == AW'(DEPTH - 1)) state <= R_IDLE;
          rptr <= rptr + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == R_FILL && in_valid) mem[wptr] <= in_samples[sel_q];
  end

  assign busy      = (state != R_IDLE);
  assign full      = (state == R_SEND);
  assign out_valid = (state == R_SEND);
  assign out_data  = mem[rptr];
endmodule
