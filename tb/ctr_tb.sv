// ctr_tb: self-checking test of the grid-wire counter.
//
// Two counters are tested side by side: the default three-bit one and an
// eight-bit one. Both get the same random count_enb / n_clr stimulus, applied
// away from the rising edge. After every edge each count is compared with a
// reference count kept in the testbench, and err with "count is all ones".
// A free-running phase then checks that, with count_enb held high, the
// counter wraps back to zero after exactly 2**SIZE clocks.
module ctr_tb;

  logic       clk = 1'b0;
  logic       count_enb = 1'b0;
  logic       n_clr = 1'b0;
  logic       err3, err8;
  logic [2:0] cnt3;
  logic [7:0] cnt8;
  logic [2:0] ref3;
  logic [7:0] ref8;
  int         checks = 0;
  int         failures = 0;
  int         wraps3 = 0;

  always #5 clk = ~clk;

  ctr dut3 (.clk(clk), .count_enb(count_enb), .n_clr(n_clr), .err(err3), .count_data(cnt3));
  ctr #(.SIZE(8)) dut8 (.clk(clk), .count_enb(count_enb), .n_clr(n_clr), .err(err8), .count_data(cnt8));

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step(input logic enb, input logic nclr);
    @(negedge clk);
    count_enb = enb;
    n_clr     = nclr;
    @(posedge clk);
    if (!nclr) begin
      ref3 = '0;
      ref8 = '0;
    end else if (enb) begin
      ref3 = ref3 + 1'b1;
      ref8 = ref8 + 1'b1;
    end
    #1;
    check("count3", {5'b0, cnt3}, {5'b0, ref3});
    check("count8", cnt8, ref8);
    check("err3", {7'b0, err3}, {7'b0, (ref3 == 3'h7)});
    check("err8", {7'b0, err8}, {7'b0, (ref8 == 8'hff)});
  endtask

  initial begin
    ref3 = '0;
    ref8 = '0;
    step(1'b0, 1'b0);
    // Random enables and clears; clears are rare so that both counters reach
    // their all-ones value and wrap.
    for (int i = 0; i < 3000; i++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 299) != 0));
    // Clear wins over enable.
    step(1'b1, 1'b0);
    // Rate: with count_enb held high the three-bit counter returns to zero
    // every 8 clocks.
    for (int i = 0; i < 32; i++) begin
      step(1'b1, 1'b1);
      if (ref3 == 3'd0) wraps3++;
    end
    checks++;
    if (wraps3 != 4) begin
      failures++;
      $display("FAIL wrap count %0d, expected 4", wraps3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
