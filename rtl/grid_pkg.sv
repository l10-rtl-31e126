// grid_pkg: types shared by the digitizer interface.
//
// The controller has five states. Their encoding is fixed to the state
// assignment of the reference design (READY 000, COUNT 001, LOAD 011,
// ERRST 010, RESET 100) so that the state register can be read on a logic
// analyser or waveform viewer with the same numbers. The three unused codes
// (101, 110, 111) are treated as READY by the controller, which is this
// design's choice.
package grid_pkg;

  typedef enum logic [2:0] {
    READY = 3'b000,  // idle, DAV high while no request is pending
    COUNT = 3'b001,  // scanning: counter enabled, waiting for INT or ERR
    LOAD  = 3'b011,  // cursor found: copy the count into the output register
    ERRST = 3'b010,  // scan ran off the end of the grid: clear and rescan
    RESET = 3'b100   // clear the counter after a successful load
  } state_t;

endpackage
