// grid_tb: end-to-end test of the digitizer interface at its default size.
//
// The top is instantiated with its default parameters (16 grid wires) and
// connected to a behavioural model of the sensing grid. The test makes a
// series of measurements. Each one raises go asynchronously (at a random
// point in the clock period) for one clock, waits for dav, and checks:
//   - the reported position: (P+1) mod 16 for a cursor over wire P, since
//     the counter steps once more on the clock edge at which the controller
//     sees int_det;
//   - the latency: from the edge that samples go to the edge after which
//     dav is high again is P+4 clocks (synchronise, P+1 in COUNT, LOAD,
//     RESET) when the cursor is found in the first pass;
//   - that grid_data steps by one each clock while the scan runs, and that
//     dav stays low throughout the measurement;
//   - that data holds its value while idle.
// Cases: every wire from 0 to 14; a cursor over wire 15, which the err
// priority makes undetectable, and a missing cursor, both of which make the
// scan overflow and restart (the cursor is then placed on a detectable wire
// mid-scan); go held for several clocks; and a reset in the middle of a
// scan. Each mechanism (synchronised start, scan, load, counter clear after
// load, overflow restart, reset, dav) is counted and must occur at least once.
module grid_tb;

  localparam int unsigned N     = 4;
  localparam int unsigned WIRES = 1 << N;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         go = 1'b0;
  logic         int_det;
  logic         dav;
  logic [N-1:0] data;
  logic [N-1:0] grid_data;
  logic [N-1:0] cursor_pos = '0;
  logic         cursor_present = 1'b0;

  int checks = 0;
  int failures = 0;
  int n_start = 0, n_scan_steps = 0, n_load = 0, n_clear = 0;
  int n_overflow = 0, n_reset = 0, n_dav = 0;

  always #5 clk = ~clk;

  grid dut (
    .clk       (clk),
    .rst       (rst),
    .go        (go),
    .int_det   (int_det),
    .dav       (dav),
    .data      (data),
    .grid_data (grid_data)
  );

  grid_sensor_model #(.GRIDSIZE(N)) u_sensor (
    .grid_data      (grid_data),
    .cursor_pos     (cursor_pos),
    .cursor_present (cursor_present),
    .int_det        (int_det)
  );

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Observe the counter on every edge: it either steps by one, or is cleared
  // after a load or an overflow.
  logic [N-1:0] prev_grid = '0;
  logic         scanning = 1'b0;
  always @(posedge clk) begin
    #1;
    if (!rst && scanning) begin
      if (grid_data == '0 && prev_grid == '1) n_overflow++;
      else if (grid_data == prev_grid + 1'b1) n_scan_steps++;
    end
    prev_grid = grid_data;
  end

  // One measurement. go rises at a random time inside a clock period and is
  // held for hold_clocks sampling edges. Returns the clocks from the first
  // sampling edge to the edge after which dav is high again.
  task automatic measure(input int hold_clocks, output int clocks);
    @(negedge clk);
    #($urandom_range(0, 3));
    go = 1'b1;
    @(posedge clk);
    clocks = 0;
    scanning = 1'b1;
    n_start++;
    #1;
    check("dav drops once the request is synchronised", !dav);
    for (int i = 1; i < hold_clocks; i++) begin
      @(posedge clk);
      clocks++;
    end
    #($urandom_range(1, 3));
    go = 1'b0;
    do begin
      @(posedge clk);
      clocks++;
      #1;
    end while (!dav && clocks < 20 * WIRES);
    scanning = 1'b0;
    check("dav returns", dav);
    if (dav) n_dav++;
    check("counter cleared after load", grid_data == '0);
    if (grid_data == '0) n_clear++;
  endtask

  task automatic idle_check(input logic [N-1:0] expected, input int cycles);
    repeat (cycles) begin
      @(posedge clk);
      #1;
      check("data holds while idle", data == expected);
      check("dav stays high while idle", dav);
      check("counter stays cleared while idle", grid_data == '0);
    end
  endtask

  initial begin
    int clocks;
    int steps_before;
    logic [N-1:0] exp_data;

    // Reset: two clocks leave the controller in READY and clear the counter.
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    n_reset++;
    #1;
    check("ready after reset", dav && grid_data == '0);

    // Every detectable wire, found in the first pass.
    cursor_present = 1'b1;
    for (int p = 0; p < WIRES - 1; p++) begin
      cursor_pos = N'(p);
      measure(1, clocks);
      exp_data = N'(p + 1);
      n_load++;
      check($sformatf("position for wire %0d (got %0d)", p, data), data == exp_data);
      check($sformatf("latency for wire %0d (got %0d, want %0d)", p, clocks, p + 4),
            clocks == p + 4);
      idle_check(exp_data, 3);
    end

    // Cursor over the last wire: err has priority, so the scan overflows and
    // restarts. After two passes the cursor moves to wire 6.
    cursor_pos = N'(WIRES - 1);
    steps_before = n_overflow;
    fork
      measure(1, clocks);
      begin
        wait (n_overflow == steps_before + 2);
        @(negedge clk);
        cursor_pos = N'(6);
      end
    join
    n_load++;
    check("position after overflow restarts", data == N'(7));
    check("two overflows before detection", n_overflow >= steps_before + 2);

    // No cursor at all for one pass, then the cursor appears on wire 2.
    cursor_present = 1'b0;
    steps_before = n_overflow;
    fork
      measure(1, clocks);
      begin
        wait (n_overflow == steps_before + 1);
        @(negedge clk);
        cursor_pos = N'(2);
        cursor_present = 1'b1;
      end
    join
    n_load++;
    check("position after missing cursor", data == N'(3));
    idle_check(N'(3), 2);

    // go held for three clocks: the request is still high when the first
    // scan ends, so a second measurement follows at once. A cursor over
    // wire 9 is far enough away that the scan outlasts the request.
    cursor_pos = N'(9);
    measure(3, clocks);
    n_load++;
    check($sformatf("position with long go (got %0d)", data), data == N'(10));
    check($sformatf("latency with long go (got %0d)", clocks), clocks == 9 + 4);

    // Reset in the middle of a scan returns to READY with a cleared counter.
    cursor_pos = N'(12);
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    repeat (5) @(negedge clk);
    check("scanning before reset", !dav && grid_data != '0);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n_reset++;
    #1;
    check("reset mid-scan gives READY", dav && grid_data == '0);
    check("reset does not load data", data == N'(10));

    // Final measurement after the reset.
    cursor_pos = N'(4);
    measure(1, clocks);
    n_load++;
    check("position after reset", data == N'(5));
    check("latency after reset", clocks == 4 + 4);

    $display("mechanisms: starts=%0d scan_steps=%0d loads=%0d clears=%0d overflows=%0d resets=%0d dav=%0d",
             n_start, n_scan_steps, n_load, n_clear, n_overflow, n_reset, n_dav);
    check("start happened", n_start > 0);
    check("scan happened", n_scan_steps > 0);
    check("load happened", n_load > 0);
    check("clear happened", n_clear > 0);
    check("overflow happened", n_overflow > 0);
    check("reset happened", n_reset > 1);
    check("dav happened", n_dav > 0);
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
