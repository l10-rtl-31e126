// data_reg: output register of the digitizer.
//
// A SIZE-bit register with an active-low synchronous load: at a rising edge
// of clk with n_ld low it takes count_data, otherwise it holds. It keeps the
// position that was found while the counter goes on to the next measurement.
//
// The behaviour and the default width of three bits follow the reference
// design. There is no reset, as there: the value is meaningful only after
// the first load, which the controller signals with DAV.
module data_reg #(
  parameter int unsigned SIZE = 3
) (
  input  logic            clk,
  input  logic            n_ld,
  input  logic [SIZE-1:0] count_data,
  output logic [SIZE-1:0] data
);

  always_ff @(posedge clk) begin
    if (!n_ld)
      data <= count_data;
  end

endmodule
