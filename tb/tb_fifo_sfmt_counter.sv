// tb_fifo_sfmt_counter: end-to-end test of the branch-misprediction counter at
// its default size (64 entries, 4 branches per cycle, 32-bit timestamps).
//
// A small model of a 4-wide out-of-order core produces the event stream: it
// dispatches instructions into a reorder buffer, resolves branches out of
// order after random execution delays, squashes everything younger than a
// mispredicted branch when it resolves, refills the front end after a random
// delay, and commits up to four instructions per cycle in order. The true
// penalty of every committed mispredicted branch (dispatch cycle of the first
// instruction fetched after its resolution minus its own dispatch cycle) is
// computed by the model and compared with every penalty the counter reports,
// and with the accumulated totals.
//
// Phases:
//   1. exact:   at most one resolved misprediction on the correct path at a
//               time (an older branch may still overtake a younger one); every
//               penalty must match. Then the core drains and the FIFO must be empty.
//   2. stress:  overlapping mispredictions and a reorder buffer larger than the
//               FIFO, so the single handler loses track and the FIFO overflows;
//               only the counting of these events is checked.
//   3. reset, then exact again with a different instruction mix.
// Every mechanism (case A, case B, both in one cycle, re-arm by an older
// branch, several pushes and pops per cycle, full FIFO, overflow, lost
// misprediction) must occur at least once.
module tb_fifo_sfmt_counter;
  import cpi_pkg::*;
  localparam int unsigned W = DEF_WIDTH, DEPTH = DEF_DEPTH, TS_W = DEF_TS_W, CNT_W = DEF_CNT_W;
  localparam int unsigned PW = $clog2(DEPTH) + 1, CW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0, count_en = 1'b1, clr = 1'b0;
  logic dispatch_valid = 1'b0, resolve_mispred = 1'b0, commit_mispred = 1'b0;
  logic [CW-1:0] dispatch_br_cnt = '0, commit_br_cnt = '0;
  logic [CNT_W-1:0] bmiss_cycles, bmiss_count;
  logic penalty_valid, mispredict_bit;
  logic [TS_W-1:0] penalty, timestamp;
  bmh_state_e handler_state;
  logic [PW-1:0] fifo_count;
  logic fifo_full, fifo_overflow, fifo_underflow;
  logic ev_case_a, ev_case_b, ev_same_cycle, ev_lost;

  fifo_sfmt_counter dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int unsigned id;
    bit          is_br;
    bit          mis;       // branch will be found mispredicted
    bit          resolved;
    longint      disp;      // dispatch cycle
    longint      ready;     // cycle from which it can resolve / complete
  } ins_t;

  ins_t   rob[$];
  longint first_disp[int unsigned];
  longint exp_q[$];
  bit     waiting, a_pending;
  int unsigned last_res_id, next_id;
  longint a_disp, cyc, refill;
  longint sum_exp;
  int unsigned n_exp;

  // phase settings
  bit exact;
  int unsigned rob_max, p_br, p_mis, p_disp, p_long;

  // mechanism counters (model side, and strobes seen from the counter)
  int n_case_a, n_case_b, n_same, n_rearm, n_overlap, n_multi_push, n_multi_pop;
  int d_case_a, d_case_b, d_same, d_lost, n_full;

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL cyc=%0d: %s", cyc, msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  task automatic model_reset();
    rob.delete(); first_disp.delete(); exp_q.delete();
    waiting = 0; a_pending = 0; refill = 0; cyc = 0;
    sum_exp = 0; n_exp = 0; next_id = 0;
  endtask

  // index of the oldest resolved, mispredicted branch still in the ROB (-1: none)
  function automatic int pending_idx();
    foreach (rob[i]) if (rob[i].is_br && rob[i].mis && rob[i].resolved) return i;
    return -1;
  endfunction

  task automatic push_expect(longint pen);
    if (exact) begin
      exp_q.push_back(pen);
      sum_exp += pen;
      n_exp++;
    end
  endtask

  // one cycle of the core model; `allow_dispatch` is cleared to drain
  task automatic cycle(bit allow_dispatch);
    int unsigned nc, brc, nd, brd;
    bit mis, res, same;
    int cand[$];
    int pidx;
    ins_t e;

    // outputs of the previous edge
    if (penalty_valid) begin
      if (exact) begin
        if (exp_q.size() == 0) fail($sformatf("unexpected penalty %0d", penalty));
        else begin
          longint ex = exp_q.pop_front();
          check(penalty == TS_W'(ex), $sformatf("penalty %0d expected %0d", penalty, ex));
        end
      end
    end
    check(timestamp == TS_W'(cyc), $sformatf("timestamp %0d expected %0d", timestamp, cyc));
    if (fifo_full) n_full++;

    // commit
    nc = 0; brc = 0; mis = 0; same = 0;
    while (nc < W && rob.size() > 0 && rob[0].ready <= cyc && (!rob[0].is_br || rob[0].resolved)) begin
      e = rob.pop_front();
      nc++;
      if (e.is_br) brc++;
      if (e.is_br && e.mis) begin
        mis = 1;
        if (first_disp.exists(e.id)) begin
          push_expect(first_disp[e.id] - e.disp);
          n_case_b++;
          first_disp.delete(e.id);
        end else begin
          a_pending = 1; a_disp = e.disp;
        end
        break;
      end
      if (first_disp.exists(e.id)) first_disp.delete(e.id);
    end

    // resolve: correct predictions silently, at most one misprediction
    res = 0;
    pidx = pending_idx();
    cand.delete();
    foreach (rob[i]) begin
      if (rob[i].is_br && !rob[i].resolved && rob[i].ready <= cyc) begin
        if (!rob[i].mis) rob[i].resolved = 1;
        else if (!exact || pidx < 0 || i < pidx) cand.push_back(i);
      end
    end
    if (cand.size() > 0 && ($urandom % 2) == 0) begin
      int unsigned r = $urandom % cand.size();
      int k = cand[r];
      if (pidx >= 0 && k < pidx) n_rearm++;
      if (pidx >= 0 && k > pidx) n_overlap++;
      rob[k].resolved = 1;
      while (rob.size() > k + 1) void'(rob.pop_back());
      res = 1;
      last_res_id = rob[k].id;
      waiting = 1;
      refill = longint'(1 + $urandom % 32'd6);
    end

    // dispatch
    nd = 0; brd = 0;
    if (!res && refill > 0) refill--;
    else if (!res && allow_dispatch && ($urandom % 100) < p_disp) begin
      int unsigned want = 1 + $urandom % W;
      while (nd < want && rob.size() < rob_max) begin
        ins_t n;
        n.id = next_id++;
        n.is_br = ($urandom % 100) < p_br;
        n.mis = n.is_br && (($urandom % 100) < p_mis);
        n.resolved = 0;
        n.disp = cyc;
        n.ready = cyc + 1 + longint'($urandom % (n.is_br ? 32'd12 : 32'd20));
        // an occasional long-latency instruction (a cache miss) blocks commit
        if (!n.is_br && ($urandom % 100) < p_long) n.ready += 200;
        rob.push_back(n);
        nd++;
        if (n.is_br) brd++;
      end
      if (nd > 0) begin
        if (waiting) begin first_disp[last_res_id] = cyc; waiting = 0; end
        if (a_pending) begin
          push_expect(cyc - a_disp);
          if (mis) n_same++; else n_case_a++;
          same = mis;
          a_pending = 0;
        end
      end
    end

    if (brd > 1) n_multi_push++;
    if (brc > 1) n_multi_pop++;

    dispatch_valid  = nd > 0;
    dispatch_br_cnt = CW'(brd);
    commit_br_cnt   = CW'(brc);
    commit_mispred  = mis;
    resolve_mispred = res;
    #1;
    if (ev_case_a) d_case_a++;
    if (ev_case_b) d_case_b++;
    if (ev_same_cycle) d_same++;
    if (ev_lost) d_lost++;
    @(posedge clk); #1;
    cyc++;
  endtask

  task automatic drain_and_check(string tag);
    int guard = 0;
    while (rob.size() > 0 && guard < 2000) begin cycle(0); guard++; end
    // one more instruction so that a pending case A completes
    refill = 0;
    p_disp = 100; p_br = 0;
    cycle(1);
    rob.delete();
    repeat (4) cycle(0);
    check(exp_q.size() == 0, $sformatf("%s: %0d penalties never reported", tag, exp_q.size()));
    check(fifo_count == '0, $sformatf("%s: FIFO holds %0d entries after drain", tag, fifo_count));
    check(bmiss_cycles == CNT_W'(sum_exp) && bmiss_count == CNT_W'(n_exp),
          $sformatf("%s: totals %0d/%0d expected %0d/%0d", tag, bmiss_cycles, bmiss_count, sum_exp, n_exp));
    check(!fifo_overflow && !fifo_underflow, $sformatf("%s: FIFO flags", tag));
    check(handler_state == BMH_IDLE && !mispredict_bit, $sformatf("%s: handler not idle", tag));
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    dispatch_valid = 0; dispatch_br_cnt = '0; commit_br_cnt = '0;
    commit_mispred = 0; resolve_mispred = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    model_reset();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a0, b0, s0;
    do_reset();

    // phase 1: exact accounting
    exact = 1; rob_max = 28; p_br = 25; p_mis = 15; p_disp = 90; p_long = 1;
    repeat (30000) cycle(1);
    drain_and_check("phase 1");
    // case B also starts for branches that an older misprediction later
    // overtakes, so the counter sees at least as many case B starts
    check(d_case_a == n_case_a && d_case_b >= n_case_b && d_same == n_same,
          $sformatf("case strobes %0d/%0d/%0d, model %0d/%0d/%0d",
                    d_case_a, d_case_b, d_same, n_case_a, n_case_b, n_same));
    check(d_lost == 0, "lost misprediction in exact phase");
    $display("phase 1: %0d penalties, %0d cycles", n_exp, sum_exp);

    // phase 2: overlapping misses and overflow
    exact = 0; rob_max = 200; p_br = 60; p_mis = 4; p_disp = 95; p_long = 3;
    repeat (8000) cycle(1);
    check(fifo_overflow, "phase 2: FIFO never overflowed");
    $display("phase 2: overlaps=%0d lost=%0d overflow=%0b underflow=%0b",
             n_overlap, d_lost, fifo_overflow, fifo_underflow);

    // phase 3: reset, exact again with a branch-heavy mix
    do_reset();
    a0 = d_case_a; b0 = d_case_b; s0 = d_same;
    n_case_a = a0; n_case_b = b0; n_same = s0;
    exact = 1; rob_max = 28; p_br = 50; p_mis = 25; p_disp = 80; p_long = 0;
    repeat (30000) cycle(1);
    drain_and_check("phase 3");
    check(d_case_a == n_case_a && d_case_b >= n_case_b && d_same == n_same,
          "phase 3: case strobes differ from model");
    $display("phase 3: %0d penalties, %0d cycles", n_exp, sum_exp);

    $display("mechanisms: caseA=%0d caseB=%0d same=%0d rearm=%0d overlap=%0d lost=%0d multipush=%0d multipop=%0d full=%0d",
             n_case_a, n_case_b, n_same, n_rearm, n_overlap, d_lost, n_multi_push, n_multi_pop, n_full);
    check(n_case_a > 0, "case A never happened");
    check(n_case_b > 0, "case B never happened");
    check(n_same > 0, "same-cycle commit and dispatch never happened");
    check(n_rearm > 0, "re-arm by an older misprediction never happened");
    check(n_overlap > 0 && d_lost > 0, "lost misprediction never happened");
    check(n_multi_push > 0, "multi-branch dispatch never happened");
    check(n_multi_pop > 0, "multi-branch commit never happened");
    check(n_full > 0, "FIFO never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
