// data_reg_tb: self-checking test of the output register.
//
// Random data and random active-low loads are applied between clock edges;
// after each rising edge the output must equal the last value presented with
// n_ld low. The register has no reset, so the test loads it once before it
// starts comparing.
module data_reg_tb;

  logic       clk = 1'b0;
  logic       n_ld = 1'b1;
  logic [2:0] din = '0;
  logic [2:0] dout;
  logic [2:0] expected;
  int         checks = 0;
  int         failures = 0;
  int         loads = 0;

  always #5 clk = ~clk;

  data_reg dut (.clk(clk), .n_ld(n_ld), .count_data(din), .data(dout));

  initial begin
    @(negedge clk);
    n_ld = 1'b0;
    din  = 3'd5;
    expected = 3'd5;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (dout !== expected) begin
        failures++;
        $display("FAIL data %0d expected %0d at %0t", dout, expected, $time);
      end
      @(negedge clk);
      n_ld = 1'($urandom_range(0, 2) != 0);
      din  = 3'($urandom);
      if (!n_ld) begin
        expected = din;
        loads++;
      end
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
