// fsm_tb: self-checking test of the digitizer controller.
//
// A reference model of the five-state machine is kept in the testbench,
// written from the state table (READY -sgo-> COUNT; COUNT -err-> ERRST,
// -int and not err-> LOAD; LOAD -> RESET -> READY; ERRST -> COUNT).
// Random sgo / int_det / err values are applied between clock edges; after
// each edge, and again after the inputs change, the four outputs are
// compared with what the model's state implies. Every one of the eight
// transitions of the state diagram, and reset from a running scan, must have
// occurred at least once.
module fsm_tb;
  import grid_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   sgo = 1'b0;
  logic   int_det = 1'b0;
  logic   err = 1'b0;
  logic   dav, count_enb, n_clr, n_ld;
  state_t model;
  int     checks = 0;
  int     failures = 0;
  // Transition counters, indexed by {from, to}.
  int     seen [string];

  always #5 clk = ~clk;

  fsm dut (.clk(clk), .rst(rst), .sgo(sgo), .int_det(int_det), .err(err),
           .dav(dav), .count_enb(count_enb), .n_clr(n_clr), .n_ld(n_ld));

  function automatic state_t next_of(state_t s, logic sg, logic in, logic er);
    case (s)
      READY:   return sg ? COUNT : READY;
      COUNT:   return er ? ERRST : (in ? LOAD : COUNT);
      LOAD:    return RESET;
      RESET:   return READY;
      default: return COUNT;  // ERRST
    endcase
  endfunction

  task automatic check_outputs(input string when);
    logic [3:0] expv, got;
    expv = {!rst && model == READY && !sgo,
            model == COUNT,
            !(rst || model == RESET || model == ERRST),
            !(model == LOAD)};
    got  = {dav, count_enb, n_clr, n_ld};
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s state %s: dav/enb/n_clr/n_ld = %b expected %b at %0t",
               when, model.name(), got, expv, $time);
    end
  endtask

  task automatic step(input logic r, input logic sg, input logic in, input logic er);
    state_t nxt;
    @(negedge clk);
    rst = r; sgo = sg; int_det = in; err = er;
    #1;
    check_outputs("before edge");
    @(posedge clk);
    nxt = r ? READY : next_of(model, sg, in, er);
    if (!r) seen[{model.name(), "->", nxt.name()}]++;
    else if (model == COUNT) seen["reset in COUNT"]++;
    model = nxt;
    #1;
    check_outputs("after edge");
  endtask

  initial begin
    model = READY;
    step(1'b1, 1'b0, 1'b0, 1'b0);
    step(1'b1, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < 4000; i++) begin
      // Mostly scanning: err and int are rarer than idle cycles.
      step(1'($urandom_range(0, 199) == 0),
           1'($urandom_range(0, 2) == 0),
           1'($urandom_range(0, 5) == 0),
           1'($urandom_range(0, 7) == 0));
    end
    foreach (seen[k]) $display("transition %s seen %0d times", k, seen[k]);
    begin
      static string need[9] = '{"READY->READY", "READY->COUNT", "COUNT->COUNT",
                         "COUNT->ERRST", "COUNT->LOAD", "LOAD->RESET",
                         "RESET->READY", "ERRST->COUNT", "reset in COUNT"};
      foreach (need[i]) begin
        checks++;
        if (!seen.exists(need[i])) begin
          failures++;
          $display("FAIL transition %s never occurred", need[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
