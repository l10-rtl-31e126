// synchronizer: brings the asynchronous GO request into the clock domain.
//
// One rising-edge D flip-flop: sgo is go as sampled at the last rising edge
// of clk, so sgo follows go with a delay of up to one clock period. A single
// stage follows the reference design, whose rule is that an asynchronous
// event may change only one flip-flop. (The controller still decodes dav
// combinationally from sgo, as the reference design does.) The flop has no
// reset, as in the reference design; it holds a valid value after the first
// clock edge.
//
// Interface: clk, go (asynchronous), sgo (synchronous to clk).
module synchronizer (
  input  logic clk,
  input  logic go,
  output logic sgo
);

  always_ff @(posedge clk) begin
    sgo <= go;
  end

endmodule
