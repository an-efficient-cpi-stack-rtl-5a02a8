// fifo_sfmt: the FIFO-sFMT, a circular queue holding only the dispatch
// timestamps of in-flight branches (no ROB IDs, no CAM).
//
// Operation (per the document): every dispatched branch writes the current
// timestamp at the tail and advances the tail; every committed branch advances
// the head. Branches commit in program order, so the head entry is always the
// dispatch time of the oldest in-flight branch. The branch miss handler can
// overwrite either pointer to drop the entries of wrong-path branches, which
// never commit.
//
// This design's choices: up to WIDTH branches may be pushed and up to WIDTH
// popped in one cycle (all pushed entries of a cycle carry the same
// timestamp); pointers carry one extra wrap bit so that full and empty are
// told apart; DEPTH must be a power of two. A push that does not fit is
// dropped and sets the sticky `overflow` flag; a pop from an empty queue is
// ignored and sets the sticky `underflow` flag (both can only happen if the
// core has more branches in flight than DEPTH, or after the single miss
// handler lost track of overlapping mispredictions).
//
// Timing: pops, pushes and pointer overwrites take effect at the next clock
// edge. `pop_last_ts` and `pop_end_ptr` are combinational from the current
// head and `pop_cnt`: the timestamp of the youngest branch committing in this
// cycle, and the pointer just past it. A pointer overwrite wins over the
// normal advance of the same pointer; pushes are always written at the old tail.
module fifo_sfmt #(
  parameter int unsigned DEPTH = cpi_pkg::DEF_DEPTH,
  parameter int unsigned WIDTH = cpi_pkg::DEF_WIDTH,
  parameter int unsigned TS_W  = cpi_pkg::DEF_TS_W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = AW + 1,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // dispatch side
  input  logic [CW-1:0]   push_cnt,      // branches dispatched this cycle
  input  logic [TS_W-1:0] push_ts,       // their dispatch timestamp
  // commit side
  input  logic [CW-1:0]   pop_cnt,       // branches committed this cycle
  output logic [TS_W-1:0] pop_last_ts,   // dispatch time of the youngest of them
  output logic [PW-1:0]   pop_end_ptr,   // head pointer after this cycle's pops
  // pointer overwrites from the branch miss handler
  input  logic            set_head,
  input  logic [PW-1:0]   set_head_ptr,
  input  logic            set_tail,
  input  logic [PW-1:0]   set_tail_ptr,
  // status
  output logic [PW-1:0]   head_ptr,
  output logic [PW-1:0]   tail_ptr,
  output logic [PW-1:0]   count,
  output logic            empty,
  output logic            full,
  output logic            overflow,      // sticky: a push was dropped
  output logic            underflow      // sticky: a pop found the queue empty
);

  logic [TS_W-1:0] mem [DEPTH];

  logic [PW-1:0] space;
  logic [CW-1:0] pushes, pops;
  logic [AW-1:0] last_idx;

  always_comb begin
    count  = tail_ptr - head_ptr;
    empty  = (count == '0);
    full   = (count == PW'(DEPTH));
    space  = PW'(DEPTH) - count;
    pushes = (PW'(push_cnt) > space) ? CW'(space) : push_cnt;
    pops   = (PW'(pop_cnt)  > count) ? CW'(count) : pop_cnt;
    pop_end_ptr = head_ptr + PW'(pops);
    last_idx    = AW'(pop_end_ptr - 1'b1);
    pop_last_ts = mem[last_idx];
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (i < pushes) mem[AW'(tail_ptr + PW'(i))] <= push_ts;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_ptr  <= '0;
      tail_ptr  <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      head_ptr <= set_head ? set_head_ptr : pop_end_ptr;
      tail_ptr <= set_tail ? set_tail_ptr : tail_ptr + PW'(pushes);
      if (pushes != push_cnt) overflow  <= 1'b1;
      if (pops   != pop_cnt)  underflow <= 1'b1;
    end
  end

  // DEPTH must be a power of two for the wrap-bit pointer arithmetic.
  initial assert ((1 << AW) == DEPTH) else $error("fifo_sfmt: DEPTH must be a power of two");
  // The handler never moves the tail back in a cycle in which branches dispatch.
  a_no_push_on_set_tail: assert property (@(posedge clk) disable iff (!rst_n)
                                          set_tail |-> push_cnt == '0);

endmodule
