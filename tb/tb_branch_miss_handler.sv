// tb_branch_miss_handler: drives the branch miss handler on its own, playing
// the FIFO-sFMT with made-up head timestamps and pointers, through randomised
// instances of each ordering of events:
//   case A (commit before the first correct-path dispatch), case B (dispatch
//   first), both in one cycle, a second resolution that re-arms the handler,
//   a mispredicted commit the handler is not tracking, dispatch in the
//   resolution cycle, and timestamps that wrap.
// Expected penalties and pointer overwrites are computed from the scenario.
module tb_branch_miss_handler;
  import cpi_pkg::*;
  localparam int unsigned DEPTH = 64, TS_W = 32, PW = $clog2(DEPTH) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TS_W-1:0] ts_now = '0, fifo_pop_last_ts = '0, penalty;
  logic dispatch_valid = 1'b0, resolve_mispred = 1'b0, commit_mispred = 1'b0;
  logic [PW-1:0] fifo_tail = '0, fifo_pop_end_ptr = '0, set_head_ptr, set_tail_ptr;
  logic set_head, set_tail, penalty_valid, mispredict_bit;
  logic ev_case_a, ev_case_b, ev_same_cycle, ev_lost;
  bmh_state_e state;

  branch_miss_handler #(.DEPTH(DEPTH), .TS_W(TS_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  // one clock: apply the current inputs, advance time, clear strobes
  task automatic step();
    @(posedge clk); #1;
    ts_now = ts_now + 1'b1;
    dispatch_valid = 1'b0; resolve_mispred = 1'b0; commit_mispred = 1'b0;
  endtask

  task automatic idle(int n);
    for (int i = 0; i < n; i++) begin
      check(!penalty_valid, "unexpected penalty");
      step();
    end
  endtask

  task automatic expect_penalty(logic [TS_W-1:0] exp, string tag);
    check(penalty_valid && penalty == exp,
          $sformatf("%s: penalty_valid=%0b penalty=%0d expected %0d", tag, penalty_valid, penalty, exp));
    step();
  endtask

  task automatic resolve();
    resolve_mispred = 1'b1;
    // dispatches in the resolution cycle are still wrong-path
    dispatch_valid = 1'($urandom);
    step();
    check(state == BMH_RESOLVED && mispredict_bit, "not armed after resolution");
  endtask

  task automatic scen_case_a();
    logic [TS_W-1:0] tb = ts_now - TS_W'(1 + $urandom % 50);
    logic [PW-1:0]   pe = PW'($urandom);
    logic [TS_W-1:0] td;
    resolve();
    idle($urandom % 5);
    commit_mispred = 1'b1; fifo_pop_last_ts = tb; fifo_pop_end_ptr = pe;
    #0;
    check(set_tail && set_tail_ptr == pe && !set_head, "case A: tail not reset to the entry after the branch");
    check(ev_case_a, "case A strobe");
    step();
    check(state == BMH_CASE_A, "case A state");
    idle($urandom % 6);
    td = ts_now;
    dispatch_valid = 1'b1;
    step();
    expect_penalty(td - tb, "case A");
    check(!mispredict_bit, "case A: mispredict bit not cleared");
  endtask

  task automatic scen_case_b();
    logic [TS_W-1:0] tb = ts_now - TS_W'(1 + $urandom % 50);
    logic [PW-1:0]   pt = PW'($urandom);
    logic [TS_W-1:0] td;
    resolve();
    idle($urandom % 5);
    td = ts_now;
    dispatch_valid = 1'b1; fifo_tail = pt;
    #0;
    check(ev_case_b && !set_head && !set_tail, "case B start");
    step();
    check(state == BMH_CASE_B, "case B state");
    // further correct-path dispatches change nothing
    for (int i = $urandom % 6; i > 0; i--) begin
      dispatch_valid = 1'b1; fifo_tail = PW'($urandom);
      check(!penalty_valid, "case B: penalty before commit");
      step();
    end
    commit_mispred = 1'b1; fifo_pop_last_ts = tb;
    #0;
    check(set_head && set_head_ptr == pt && !set_tail, "case B: head not moved to saved pointer");
    step();
    expect_penalty(td - tb, "case B");
    check(!mispredict_bit, "case B: mispredict bit not cleared");
  endtask

  task automatic scen_same_cycle();
    logic [TS_W-1:0] tb = ts_now - TS_W'(1 + $urandom % 50);
    logic [PW-1:0]   pt = PW'($urandom);
    logic [TS_W-1:0] td;
    resolve();
    idle($urandom % 5);
    td = ts_now;
    dispatch_valid = 1'b1; commit_mispred = 1'b1; fifo_pop_last_ts = tb; fifo_tail = pt;
    #0;
    check(set_head && set_head_ptr == pt && !set_tail && ev_same_cycle, "same cycle: pointers");
    step();
    expect_penalty(td - tb, "same cycle");
  endtask

  task automatic scen_rearm();
    // case B started for one branch, then an older branch resolves: the
    // handler starts over and sees the older branch commit as case A
    logic [TS_W-1:0] tb = ts_now - TS_W'(1 + $urandom % 50);
    logic [TS_W-1:0] td;
    resolve();
    dispatch_valid = 1'b1; fifo_tail = PW'($urandom);
    step();
    check(state == BMH_CASE_B, "rearm: case B");
    resolve();
    idle(1 + $urandom % 3);
    commit_mispred = 1'b1; fifo_pop_last_ts = tb; fifo_pop_end_ptr = PW'($urandom);
    #0;
    check(set_tail && !set_head, "rearm: commit not treated as case A");
    step();
    td = ts_now;
    dispatch_valid = 1'b1;
    step();
    expect_penalty(td - tb, "rearm");
  endtask

  task automatic scen_lost();
    commit_mispred = 1'b1; fifo_pop_last_ts = TS_W'($urandom);
    #0;
    check(ev_lost && !set_head && !set_tail, "untracked commit");
    step();
    check(!penalty_valid && state == BMH_IDLE, "untracked commit produced a penalty");
    dispatch_valid = 1'b1;
    step();
    check(!penalty_valid, "dispatch while idle produced a penalty");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == BMH_IDLE && !mispredict_bit && !penalty_valid, "reset state");
    for (int k = 0; k < 200; k++) begin
      int unsigned sel;
      if (k == 100) ts_now = 32'hFFFF_FFF0;  // timestamps wrap during the second half
      sel = $urandom % 5;
      unique case (sel)
        0: scen_case_a();
        1: scen_case_b();
        2: scen_same_cycle();
        3: scen_rearm();
        default: scen_lost();
      endcase
      idle($urandom % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
