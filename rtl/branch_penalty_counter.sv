// branch_penalty_counter: the branch-misprediction component of the CPI
// stack. Each penalty produced by the branch miss handler is added to
// `bmiss_cycles`, and `bmiss_count` counts how many mispredictions were
// accounted. Dividing `bmiss_cycles` by the committed instruction count gives
// the branch-misprediction CPI component.
//
// The document states that computed penalties are accounted into the CPI
// stack; the accumulator width, the count of accounted misses and the
// synchronous clear input are this design's choices. Counters wrap at
// 2**CNT_W. Timing: an accepted penalty is visible in the outputs one cycle
// later; `clr` (synchronous) has priority over an add in the same cycle.
module branch_penalty_counter #(
  parameter int unsigned TS_W  = cpi_pkg::DEF_TS_W,
  parameter int unsigned CNT_W = cpi_pkg::DEF_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,            // software clear
  input  logic             penalty_valid,
  input  logic [TS_W-1:0]  penalty,
  output logic [CNT_W-1:0] bmiss_cycles,   // accumulated penalty cycles
  output logic [CNT_W-1:0] bmiss_count     // number of accounted mispredictions
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      bmiss_cycles <= '0;
      bmiss_count  <= '0;
    end else if (penalty_valid) begin
      bmiss_cycles <= bmiss_cycles + CNT_W'(penalty);
      bmiss_count  <= bmiss_count + 1'b1;
    end
  end

endmodule
