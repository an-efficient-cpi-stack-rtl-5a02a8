// tb_branch_penalty_counter: random penalties are added and compared with a
// software sum; a clear in the middle restarts both counters.
module tb_branch_penalty_counter;
  localparam int unsigned TS_W = 16, CNT_W = 24;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, pv = 1'b0;
  logic [TS_W-1:0]  pen = '0;
  logic [CNT_W-1:0] cyc, cnt;
  longint unsigned sum = 0, n = 0;
  int checks = 0, failures = 0;

  branch_penalty_counter #(.TS_W(TS_W), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .clr, .penalty_valid(pv), .penalty(pen),
    .bmiss_cycles(cyc), .bmiss_count(cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      pv  = ($urandom % 3) == 0;
      pen = TS_W'($urandom);
      clr = (c == 500);
      @(posedge clk); #1;
      if (clr) begin sum = 0; n = 0; end
      else if (pv) begin sum += pen; n++; end
      checks++;
      if (cyc !== CNT_W'(sum) || cnt !== CNT_W'(n)) begin
        failures++;
        $display("cycle %0d: cycles=%0d count=%0d expected %0d %0d", c, cyc, cnt,
                 sum % (1 << CNT_W), n);
      end
    end
    clr = 1'b0; pv = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
