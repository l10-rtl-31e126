// regtst_tb: counter feeding the output register, tested together.
//
// The three-bit counter runs freely (count_enb tied high) and drives the
// register's data input, as in the digitizer. n_clr and n_ld are driven at
// random between clock edges. After each edge the counter must hold its
// reference count and the register the count it was offered at the last
// edge with n_ld low, i.e. the counter's value before that edge advanced it.
module regtst_tb;

  logic       clk = 1'b0;
  logic       n_clr = 1'b0;
  logic       n_ld = 1'b0;
  logic       err;
  logic [2:0] cntout;
  logic [2:0] reg_count;
  logic [2:0] ref_cnt = '0;
  logic [2:0] ref_reg = '0;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  ctr u_ctr (.clk(clk), .count_enb(1'b1), .n_clr(n_clr), .err(err), .count_data(cntout));
  data_reg u_reg (.clk(clk), .n_ld(n_ld), .count_data(cntout), .data(reg_count));

  initial begin
    // Two clocks with clear and load both active initialise the pair: the
    // first clears the counter, the second loads that zero into the register.
    repeat (2) @(posedge clk);
    ref_cnt = '0;
    ref_reg = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      n_clr = 1'($urandom_range(0, 9) != 0);
      n_ld  = 1'($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (!n_ld) ref_reg = ref_cnt;
      ref_cnt = n_clr ? ref_cnt + 1'b1 : 3'd0;
      #1;
      checks++;
      if (reg_count !== ref_reg) begin
        failures++;
        $display("FAIL reg_count %0d expected %0d at %0t", reg_count, ref_reg, $time);
      end
      checks++;
      if (cntout !== ref_cnt || err !== (ref_cnt == 3'd7)) begin
        failures++;
        $display("FAIL cntout %0d expected %0d at %0t", cntout, ref_cnt, $time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
