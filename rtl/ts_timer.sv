// ts_timer: the cycle counter that produces the timestamps of the FIFO-sFMT.
// Every branch dispatch is stamped with the current value, and the branch
// miss handler subtracts two such values to obtain a misprediction penalty.
// The counter advances by one in every cycle in which `en` is high and wraps
// at 2**TS_W; because penalties are formed with modulo subtraction, wrapping
// is harmless as long as a single penalty is shorter than 2**TS_W cycles.
// Reset (synchronous to clk, active-low rst_n) clears it to zero.
// `en` is this design's addition: it lets software freeze the measurement;
// the document only speaks of "the current cycle count".
module ts_timer #(
  parameter int unsigned TS_W = cpi_pkg::DEF_TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,     // count this cycle
  output logic [TS_W-1:0] ts      // current timestamp
);

  always_ff @(posedge clk) begin
    if (!rst_n)  ts <= '0;
    else if (en) ts <= ts + 1'b1;
  end

endmodule
