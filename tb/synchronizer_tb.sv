// synchronizer_tb: self-checking test of the go synchroniser.
//
// go is changed at random times, including just before and just after the
// rising edge. After each edge sgo must equal the value go had at that edge,
// and it must not change between edges (one clock of latency, no
// combinational path from go to sgo).
module synchronizer_tb;

  logic clk = 1'b0;
  logic go = 1'b0;
  logic sgo;
  logic sampled;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  synchronizer dut (.clk(clk), .go(go), .sgo(sgo));

  initial begin
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      // Change go at a random point inside the clock period.
      #($urandom_range(1, 6));
      go = 1'($urandom);
      @(posedge clk);
      sampled = go;
      #1;
      checks++;
      if (sgo !== sampled) begin
        failures++;
        $display("FAIL sgo %0b expected %0b at %0t", sgo, sampled, $time);
      end
      // A change of go between edges must not reach sgo.
      go = ~go;
      #2;
      checks++;
      if (sgo !== sampled) begin
        failures++;
        $display("FAIL sgo changed between edges at %0t", $time);
      end
    end
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
