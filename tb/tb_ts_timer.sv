// tb_ts_timer: checks the timestamp timer against a software count while the
// enable toggles at random, including several wraps of a 4-bit timer.
module tb_ts_timer;
  localparam int unsigned TS_W = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [TS_W-1:0] ts;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  ts_timer #(.TS_W(TS_W)) dut (.clk, .rst_n, .en, .ts);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (ts !== '0) begin failures++; $display("not reset: %0d", ts); end
    for (int c = 0; c < 300; c++) begin
      en = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (en) model++;
      checks++;
      if (ts !== TS_W'(model)) begin
        failures++;
        $display("cycle %0d: ts=%0d expected %0d", c, ts, model % (1 << TS_W));
      end
    end
    if (model < 40) begin failures++; $display("timer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
