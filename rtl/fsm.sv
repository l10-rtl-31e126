// fsm: controller of the digitizer interface.
//
// Five states, encoded as in grid_pkg:
//   READY  idle. DAV is high while sgo is low. sgo high starts a scan.
//   COUNT  count_enb high: the counter steps through the grid wires, one per
//          clock. err (last wire reached) has priority and goes to ERRST;
//          otherwise int_det (cursor under the current wire) goes to LOAD;
//          otherwise stay.
//   LOAD   n_ld low for one clock: the register takes the count. -> RESET
//   RESET  n_clr low for one clock: the counter is cleared.       -> READY
//   ERRST  n_clr low for one clock: clear and scan again.         -> COUNT
// The state transitions, the output decoding and the state encoding follow
// the reference design. count_enb, n_ld and n_clr are Moore outputs; dav is
// a Mealy output (READY and not sgo), so it drops in the same cycle in which
// the synchronised request arrives.
//
// Because the counter also advances on the clock edge at which int_det is
// seen in COUNT, the value loaded in LOAD is one more than the wire that
// raised int_det (modulo the grid size). Because err has priority, a cursor
// under the last wire is never reported; the scan restarts instead. Both are
// properties of the reference design and are kept.
//
// This design's own additions: a synchronous, active-high rst that puts the
// machine in READY and, while it is high, holds n_clr low (so the counter
// starts from zero) and dav low; unused state codes return to READY.
//
// Timing: every decision is taken at a rising edge of clk; the outputs are
// decoded combinationally from the state (and sgo for dav).
module fsm
  import grid_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic sgo,
  input  logic int_det,
  input  logic err,
  output logic dav,
  output logic count_enb,
  output logic n_clr,
  output logic n_ld
);

  state_t state, state_next;

  always_comb begin
    unique case (state)
      READY:   state_next = sgo ? COUNT : READY;
      COUNT:   if (err)          state_next = ERRST;
               else if (int_det) state_next = LOAD;
               else              state_next = COUNT;
      LOAD:    state_next = RESET;
      RESET:   state_next = READY;
      ERRST:   state_next = COUNT;
      default: state_next = READY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= READY;
    else
      state <= state_next;
  end

  assign n_clr     = !(rst || state == RESET || state == ERRST);
  assign n_ld      = !(state == LOAD);
  assign count_enb = (state == COUNT);
  assign dav       = !rst && state == READY && !sgo;

  // The register is never loaded while the counter is moving.
  a_load_while_counting: assert property (@(posedge clk) disable iff (rst)
    !(count_enb && !n_ld));

  // After reset the state register only holds one of the five legal codes.
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {READY, COUNT, LOAD, ERRST, RESET});

endmodule
