// grid: one-dimensional digitizer interface (top level).
//
// A digitizing tablet has a row of wires under its surface. A cursor coil
// couples a field into them, and an analog detector reports (int_det) when
// the energised wire lies under the cursor. This block is the digital part
// between that detector and a host computer. On an asynchronous go request
// it clears a counter, steps it through the wires, one per clock, and drives
// the count out as grid_data to select the energised wire. When int_det
// comes back it copies the count into the output register (data) and, after
// clearing the counter, returns to idle with dav high. If the counter
// reaches the last wire without int_det, the scan starts again from wire 0.
//
// Structure: synchronizer (go -> sgo), fsm (controller), ctr (wire counter,
// also raising err on its last value) and data_reg (output register). This
// module only instantiates and wires them, as in the reference design,
// which also gives the default GRIDSIZE of 4 bits (16 wires).
//
// Interface: go is asynchronous to clk; int_det is expected to change only in
// response to grid_data and is therefore used without a synchroniser, as in
// the reference design. rst (synchronous, active high) is this design's
// addition; it leaves the controller in READY with the counter cleared.
// data is valid while dav is high after the first measurement.
//
// Timing: after go rises, sgo follows at the next rising edge and the scan
// starts at the one after. A measurement that finds the cursor while the
// count is P takes P+1 clocks in COUNT, then one in LOAD and one in RESET;
// data then holds (P+1) mod 2**GRIDSIZE (see fsm).
module grid #(
  parameter int unsigned GRIDSIZE = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                go,
  input  logic                int_det,
  output logic                dav,
  output logic [GRIDSIZE-1:0] data,
  output logic [GRIDSIZE-1:0] grid_data
);

  logic                sgo;
  logic                err;
  logic                count_enb;
  logic                n_clr;
  logic                n_ld;
  logic [GRIDSIZE-1:0] count_data;

  synchronizer u_sync (
    .clk (clk),
    .go  (go),
    .sgo (sgo)
  );

  fsm u_fsm (
    .clk       (clk),
    .rst       (rst),
    .sgo       (sgo),
    .int_det   (int_det),
    .err       (err),
    .dav       (dav),
    .count_enb (count_enb),
    .n_clr     (n_clr),
    .n_ld      (n_ld)
  );

  ctr #(.SIZE(GRIDSIZE)) u_ctr (
    .clk        (clk),
    .count_enb  (count_enb),
    .n_clr      (n_clr),
    .err        (err),
    .count_data (count_data)
  );

  assign grid_data = count_data;

  data_reg #(.SIZE(GRIDSIZE)) u_reg (
    .clk        (clk),
    .n_ld       (n_ld),
    .count_data (count_data),
    .data       (data)
  );

endmodule
