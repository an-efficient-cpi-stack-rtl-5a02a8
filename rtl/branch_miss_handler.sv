// branch_miss_handler: the single branch miss handler of the FIFO-sFMT. It
// holds a timestamp register, the mispredict bit (here: state != BMH_IDLE) and
// a FIFO pointer, and turns three processor events into (1) the removal of
// wrong-path branch timestamps from the FIFO-sFMT and (2) the penalty of a
// mispredicted branch, defined as the dispatch time of the first correct-path
// instruction minus the dispatch time of the mispredicted branch.
//
// Following the document:
//  * resolve_mispred (branch executed and found mispredicted) sets the
//    mispredict bit. A later resolution simply starts over, so with several
//    misses outstanding only the last one is accounted.
//  * Case A - the mispredicted branch commits before any correct-path
//    instruction dispatches: its timestamp (FIFO head) is saved, and the FIFO
//    tail is set just past it, discarding all younger (wrong-path) entries.
//    The first correct-path dispatch then yields penalty = now - saved.
//  * Case B - correct-path instructions dispatch first: the current time and
//    the current FIFO tail are saved. When the branch commits, penalty =
//    saved time - FIFO timestamp of the branch, and the FIFO head is moved to
//    the saved pointer, discarding the wrong-path entries between them.
//    The document's text names the tail pointer once and the head pointer
//    once as the target of this copy; only moving the head drops the
//    wrong-path entries while keeping the younger correct-path ones, so the
//    head is used.
//
// This design's choices: an explicit 2-bit state (the document's "timestamp
// set" flag plus which case is pending); a dispatch in the same cycle as a
// resolution counts as wrong-path; a mispredicted commit and the first
// correct-path dispatch in the same cycle are handled in one step (penalty =
// now - branch timestamp, head moved to the old tail). A mispredicted commit
// that the handler is not waiting for (its state was overwritten) is counted
// on `ev_lost` and only pops the FIFO. Interface rule for the core: a commit
// group that contains a mispredicted branch ends with that branch.
//
// Timing: state and pointer overwrites change at the clock edge after the
// event; `penalty_valid`/`penalty` are registered and appear one cycle after
// the event that completes the penalty. Synchronous active-low reset.
module branch_miss_handler
  import cpi_pkg::*;
#(
  parameter int unsigned DEPTH = cpi_pkg::DEF_DEPTH,
  parameter int unsigned TS_W  = cpi_pkg::DEF_TS_W,
  localparam int unsigned PW   = $clog2(DEPTH) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ts_now,           // current timestamp
  // processor events
  input  logic            dispatch_valid,   // at least one instruction dispatched this cycle
  input  logic            resolve_mispred,  // a branch resolved as mispredicted
  input  logic            commit_mispred,   // youngest branch committed this cycle was mispredicted
  // FIFO-sFMT view
  input  logic [PW-1:0]   fifo_tail,        // tail before this cycle's pushes
  input  logic [TS_W-1:0] fifo_pop_last_ts, // dispatch time of the youngest committing branch
  input  logic [PW-1:0]   fifo_pop_end_ptr, // entry following it
  // FIFO-sFMT pointer overwrites
  output logic            set_head,
  output logic [PW-1:0]   set_head_ptr,
  output logic            set_tail,
  output logic [PW-1:0]   set_tail_ptr,
  // result
  output logic            penalty_valid,
  output logic [TS_W-1:0] penalty,
  output logic            mispredict_bit,
  output bmh_state_e      state,
  // event strobes (for observation)
  output logic            ev_case_a,        // branch committed first
  output logic            ev_case_b,        // correct path dispatched first
  output logic            ev_same_cycle,    // both in the same cycle
  output logic            ev_lost           // mispredicted commit the handler was not tracking
);

  logic [TS_W-1:0] ts_reg;    // timestamp register
  logic [PW-1:0]   ptr_reg;   // FIFO pointer

  bmh_state_e      state_d;
  logic [TS_W-1:0] ts_d;
  logic [PW-1:0]   ptr_d;
  logic            pen_v_d;
  logic [TS_W-1:0] pen_d;

  always_comb begin
    state_d       = state;
    ts_d          = ts_reg;
    ptr_d         = ptr_reg;
    pen_v_d       = 1'b0;
    pen_d         = '0;
    set_head      = 1'b0;
    set_head_ptr  = ptr_reg;
    set_tail      = 1'b0;
    set_tail_ptr  = fifo_pop_end_ptr;
    ev_case_a     = 1'b0;
    ev_case_b     = 1'b0;
    ev_same_cycle = 1'b0;
    ev_lost       = 1'b0;

    unique case (state)
      BMH_IDLE: begin
        if (commit_mispred) ev_lost = 1'b1;
      end
      BMH_RESOLVED: begin
        if (commit_mispred && dispatch_valid && !resolve_mispred) begin
          pen_v_d       = 1'b1;
          pen_d         = ts_now - fifo_pop_last_ts;
          set_head      = 1'b1;
          set_head_ptr  = fifo_tail;
          state_d       = BMH_IDLE;
          ev_same_cycle = 1'b1;
        end else if (commit_mispred) begin
          ts_d      = fifo_pop_last_ts;
          set_tail  = 1'b1;
          state_d   = BMH_CASE_A;
          ev_case_a = 1'b1;
        end else if (dispatch_valid && !resolve_mispred) begin
          ts_d      = ts_now;
          ptr_d     = fifo_tail;
          state_d   = BMH_CASE_B;
          ev_case_b = 1'b1;
        end
      end
      BMH_CASE_A: begin
        if (commit_mispred) ev_lost = 1'b1;
        if (dispatch_valid && !resolve_mispred) begin
          pen_v_d = 1'b1;
          pen_d   = ts_now - ts_reg;
          state_d = BMH_IDLE;
        end
      end
      BMH_CASE_B: begin
        if (commit_mispred) begin
          pen_v_d  = 1'b1;
          pen_d    = ts_reg - fifo_pop_last_ts;
          set_head = 1'b1;
          state_d  = BMH_IDLE;
        end
      end
      default: state_d = BMH_IDLE;
    endcase

    // A new resolution always (re)arms the handler: last miss wins.
    if (resolve_mispred) state_d = BMH_RESOLVED;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= BMH_IDLE;
      ts_reg        <= '0;
      ptr_reg       <= '0;
      penalty_valid <= 1'b0;
      penalty       <= '0;
    end else begin
      state         <= state_d;
      ts_reg        <= ts_d;
      ptr_reg       <= ptr_d;
      penalty_valid <= pen_v_d;
      penalty       <= pen_d;
    end
  end

  assign mispredict_bit = (state != BMH_IDLE);

endmodule
