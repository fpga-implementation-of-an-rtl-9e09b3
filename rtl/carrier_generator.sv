// carrier_generator (CG): produces the triangular carrier of one slot.
//
// The carrier moves by one count per clock.  A switching period of 2*CMAX
// clocks is split into three sections, all set by the 29-bit parameter vector:
// a first section of d1 clocks with the slope given by the trend bit, a second
// section of CMAX clocks with the opposite slope (the full excursion), and a
// third section of CMAX-d1 clocks with the first slope again.  The period starts
// at the value `offset`.  With offset = tri(t0) this is the carrier shifted by
// t0 clocks, which is how interleaving is obtained.
//
// Handshake (document: LOAD, T_READ, DONE): `load` writes `param_in` into a
// shadow register and `t_read` answers one clock later.  While stopped (after
// reset) the first load starts the carrier on the next clock.  While running,
// the shadow parameters become active only at the start of a switching period,
// so a load never cuts a period.  `done` is high in the last clock of every
// period.  The shadow register is this design's reading of "forces the loading
// of the new parameters at the beginning of a new switching period".
module carrier_generator #(
  parameter int unsigned CMAX = wicsc_pkg::CARRIER_MAX
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  wicsc_pkg::carrier_param_t param_in,
  input  logic                      load,
  output logic                      t_read,
  output logic                      done,
  output logic                      running,
  output wicsc_pkg::carrier_t       carrier
);
  import wicsc_pkg::*;

  localparam int unsigned PER = 2 * CMAX;
  localparam int unsigned TW  = $clog2(PER);

  carrier_param_t active, shadow;
  logic [TW-1:0]  tcount;
  logic           up;
  logic [TW-1:0]  sec1_end, sec2_end;

  assign sec1_end = TW'(active.d1);
  assign sec2_end = TW'(active.d1) + TW'(CMAX);

  // Slope of the current clock.
  always_comb begin
    if (tcount < sec1_end)      up = active.trend;
    else if (tcount < sec2_end) up = ~active.trend;
    else                        up = active.trend;
  end

  assign done = running && (tcount == TW'(PER - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= '0;
      shadow  <= '0;
      tcount  <= '0;
      carrier <= '0;
      running <= 1'b0;
      t_read  <= 1'b0;
    end else begin
      t_read <= load;
      if (load) shadow <= param_in;
      if (!running) begin
        if (load) begin
          active  <= param_in;
          carrier <= param_in.offset;
          tcount  <= '0;
          running <= 1'b1;
        end
      end else if (done) begin
        // New period: take the newest parameters.
        active  <= load ? param_in : shadow;
        carrier <= load ? param_in.offset : shadow.offset;
        tcount  <= '0;
      end else begin
        carrier <= up ? carrier + 1'b1 : carrier - 1'b1;
        tcount  <= tcount + 1'b1;
      end
    end
  end

  // The carrier never leaves [0, CMAX] for a valid parameter vector.
  assert property (@(posedge clk) disable iff (!rst_n) running |-> (carrier <= CW'(CMAX)));
endmodule
