// ctr: grid-wire counter of the digitizer.
//
// A SIZE-bit synchronous binary up-counter. Both controls act only at a
// rising clock edge: n_clr low clears the count (and wins over counting),
// otherwise count_enb high adds one, wrapping from all ones to zero. The
// count is the index of the grid wire to energise.
//
// err is high whenever the count is all ones, i.e. the scan has reached the
// last wire without the cursor being found. It is decoded combinationally
// from the count, so it is valid one clock after the count changes and may
// glitch in between; it is only sampled by the controller's flip-flops.
//
// All of this follows the reference design, including the default width of
// three bits. The counter has no reset of its own: the controller clears it
// through n_clr.
module ctr #(
  parameter int unsigned SIZE = 3
) (
  input  logic            clk,
  input  logic            count_enb,
  input  logic            n_clr,
  output logic            err,
  output logic [SIZE-1:0] count_data
);

  always_ff @(posedge clk) begin
    if (!n_clr)
      count_data <= '0;
    else if (count_enb)
      count_data <= count_data + 1'b1;
  end

  assign err = &count_data;

endmodule
