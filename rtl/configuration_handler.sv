// configuration_handler (CH): per-slot controller between the control
// (configuration code from the processor) and the carrier generator.
//
// After reset it reads the requested configuration, presents the matching
// parameter vector from the carrier parameter generator and pulses LOAD; when
// the CG answers T_READ the slot runs.  While running it watches the requested
// configuration; a valid code different from the current one is a transition
// request: it freezes the old and new vectors, pulses START_T to the transition
// handler and waits for the handler's end before adopting the new
// configuration.  Requests made during a transition wait until it ends.
// Codes above 8 are ignored.
//
// States: INIT -> WAIT_TREAD -> RUN <-> TRANS.  The states and the LOAD,
// T_READ and START_T signals follow the document; the state encoding and the
// wait for the handler's end are this design's choices.
module configuration_handler (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                cfg_req,
  input  wicsc_pkg::carrier_param_t param_req,   // CPG output for cfg_req
  input  logic                      t_read,
  input  logic                      th_done,
  output logic                      load,
  output wicsc_pkg::carrier_param_t param_out,
  output logic                      start_t,
  output wicsc_pkg::carrier_param_t old_param,
  output wicsc_pkg::carrier_param_t new_param,
  output logic [3:0]                cfg_cur,
  output logic                      in_transition
);
  import wicsc_pkg::*;

  typedef enum logic [1:0] {
    C_INIT       = 2'd0,
    C_WAIT_TREAD = 2'd1,
    C_RUN        = 2'd2,
    C_TRANS      = 2'd3
  } cstate_e;

  cstate_e state;
  logic    req_ok;

  assign req_ok = (cfg_req < 4'(N_CFG));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= C_INIT;
      load      <= 1'b0;
      param_out <= '0;
      start_t   <= 1'b0;
      old_param <= '0;
      new_param <= '0;
      cfg_cur   <= '0;
    end else begin
      load    <= 1'b0;
      start_t <= 1'b0;
      unique case (state)
        C_INIT: if (req_ok) begin
          cfg_cur   <= cfg_req;
          param_out <= param_req;
          old_param <= param_req;
          new_param <= param_req;
          load      <= 1'b1;
          state     <= C_WAIT_TREAD;
        end
        C_WAIT_TREAD: if (t_read) state <= C_RUN;
        C_RUN: if (req_ok && cfg_req != cfg_cur) begin
          new_param <= param_req;
          cfg_cur   <= cfg_req;
          start_t   <= 1'b1;
          state     <= C_TRANS;
        end
        C_TRANS: if (th_done) begin
          old_param <= new_param;
          state     <= C_RUN;
        end
        default: state <= C_INIT;
      endcase
    end
  end

  assign in_transition = (state == C_TRANS);
endmodule
