// grid_sensor_model: behavioural model of the analog sensing grid.
//
// Not synthesizable logic: it stands for the wire grid, the cursor coil and
// the phase-reversal detector. The wire selected by grid_data is energised;
// if the cursor is present and lies over that wire, int_det goes high after
// DETECT_DELAY (a settling time well inside one clock period), otherwise it
// goes low after the same delay. The cursor position and presence are set by
// the testbench.
module grid_sensor_model #(
  parameter int unsigned GRIDSIZE     = 4,
  parameter int unsigned DETECT_DELAY = 2
) (
  input  logic [GRIDSIZE-1:0] grid_data,
  input  logic [GRIDSIZE-1:0] cursor_pos,
  input  logic                cursor_present,
  output logic                int_det
);

  always @(grid_data, cursor_pos, cursor_present)
    int_det <= #DETECT_DELAY (cursor_present && grid_data == cursor_pos);

endmodule
