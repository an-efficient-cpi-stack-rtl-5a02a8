// fifo_sfmt_counter: branch-misprediction cycle accounting for a superscalar
// out-of-order core, built around the FIFO-sFMT.
//
// The core reports, every cycle, how many branches it dispatched and
// committed, whether any instruction dispatched, whether a branch was
// resolved as mispredicted, and whether the youngest committed branch was
// mispredicted. The counter keeps only the dispatch timestamp of every
// in-flight branch, in program order, in a FIFO (fifo_sfmt). A single branch
// miss handler (branch_miss_handler) uses the FIFO head at commit time and the
// timer (ts_timer) at the first correct-path dispatch to compute the cycles
// lost to a misprediction, and to drop wrong-path branches from the FIFO. The
// penalties are summed in branch_penalty_counter.
//
//   dispatch ---> ts_timer --ts--> fifo_sfmt (tail push)
//   commit   ------------------->  fifo_sfmt (head pop) --head ts--> branch_miss_handler
//   resolve  ---------------------------------------------------->   |  penalty
//                                  fifo_sfmt <--head/tail overwrite--+--> branch_penalty_counter
//
// Structure and algorithm follow the document; the event interface, the
// multi-branch-per-cycle bandwidth, widths and reset are this design's.
// Interface rules: a cycle's commit group ends at a mispredicted branch; the
// core stops dispatching wrong-path instructions once it reports a
// resolution, so every later dispatch is on the correct path.
// Timing: all inputs are sampled at the rising edge of clk; the penalty of a
// misprediction shows on `penalty_valid` one cycle after the event that
// completes it, and in `bmiss_cycles` one cycle after that.
module fifo_sfmt_counter
  import cpi_pkg::*;
#(
  parameter int unsigned DEPTH = cpi_pkg::DEF_DEPTH,
  parameter int unsigned WIDTH = cpi_pkg::DEF_WIDTH,
  parameter int unsigned TS_W  = cpi_pkg::DEF_TS_W,
  parameter int unsigned CNT_W = cpi_pkg::DEF_CNT_W,
  localparam int unsigned PW   = $clog2(DEPTH) + 1,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             count_en,         // timer runs
  input  logic             clr,              // clear the accumulated component
  // processor events
  input  logic             dispatch_valid,   // >=1 instruction dispatched
  input  logic [CW-1:0]    dispatch_br_cnt,  // branches among them
  input  logic             resolve_mispred,  // branch resolved as mispredicted
  input  logic [CW-1:0]    commit_br_cnt,    // branches committed
  input  logic             commit_mispred,   // youngest of them was mispredicted
  // results
  output logic [CNT_W-1:0] bmiss_cycles,
  output logic [CNT_W-1:0] bmiss_count,
  output logic             penalty_valid,
  output logic [TS_W-1:0]  penalty,
  output logic [TS_W-1:0]  timestamp,
  // status
  output logic             mispredict_bit,
  output bmh_state_e       handler_state,
  output logic [PW-1:0]    fifo_count,
  output logic             fifo_full,
  output logic             fifo_overflow,
  output logic             fifo_underflow,
  output logic             ev_case_a,
  output logic             ev_case_b,
  output logic             ev_same_cycle,
  output logic             ev_lost
);

  logic [TS_W-1:0] pop_last_ts;
  logic [PW-1:0]   pop_end_ptr, tail_ptr;
  logic            set_head, set_tail;
  logic [PW-1:0]   set_head_ptr, set_tail_ptr;

  ts_timer #(.TS_W(TS_W)) u_timer (
    .clk, .rst_n, .en(count_en), .ts(timestamp)
  );

  fifo_sfmt #(.DEPTH(DEPTH), .WIDTH(WIDTH), .TS_W(TS_W)) u_fifo (
    .clk, .rst_n,
    .push_cnt     (dispatch_br_cnt),
    .push_ts      (timestamp),
    .pop_cnt      (commit_br_cnt),
    .pop_last_ts  (pop_last_ts),
    .pop_end_ptr  (pop_end_ptr),
    .set_head     (set_head),
    .set_head_ptr (set_head_ptr),
    .set_tail     (set_tail),
    .set_tail_ptr (set_tail_ptr),
    .head_ptr     (),
    .tail_ptr     (tail_ptr),
    .count        (fifo_count),
    .empty        (),
    .full         (fifo_full),
    .overflow     (fifo_overflow),
    .underflow    (fifo_underflow)
  );

  branch_miss_handler #(.DEPTH(DEPTH), .TS_W(TS_W)) u_bmh (
    .clk, .rst_n,
    .ts_now           (timestamp),
    .dispatch_valid   (dispatch_valid),
    .resolve_mispred  (resolve_mispred),
    .commit_mispred   (commit_mispred && commit_br_cnt != '0),
    .fifo_tail        (tail_ptr),
    .fifo_pop_last_ts (pop_last_ts),
    .fifo_pop_end_ptr (pop_end_ptr),
    .set_head, .set_head_ptr, .set_tail, .set_tail_ptr,
    .penalty_valid, .penalty, .mispredict_bit,
    .state            (handler_state),
    .ev_case_a, .ev_case_b, .ev_same_cycle, .ev_lost
  );

  branch_penalty_counter #(.TS_W(TS_W), .CNT_W(CNT_W)) u_acc (
    .clk, .rst_n, .clr,
    .penalty_valid, .penalty,
    .bmiss_cycles, .bmiss_count
  );

  // Branches dispatch only with an instruction dispatch.
  a_br_needs_dispatch: assert property (@(posedge clk) disable iff (!rst_n)
                                        dispatch_br_cnt != '0 |-> dispatch_valid);

endmodule
