// tb_fifo_sfmt: drives the timestamp FIFO with random multi-entry pushes and
// pops and with the two pointer overwrites of the branch miss handler, and
// compares it with a queue model in which every entry carries a sequence
// number:
//   * "drop younger": pop k entries and move the tail just past them (the
//     queue model is emptied);
//   * "drop older":   move the head to a tail value recorded earlier (the
//     model drops all entries older than the recorded sequence number).
// A small depth makes the queue fill up, so dropped pushes (overflow) and
// pops of an empty queue (underflow) are exercised in a last phase.
module tb_fifo_sfmt;
  localparam int unsigned DEPTH = 8, WIDTH = 4, TS_W = 16;
  localparam int unsigned PW = $clog2(DEPTH) + 1, CW = $clog2(WIDTH + 1);

  typedef struct { int unsigned seq; logic [TS_W-1:0] ts; } ent_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0]   push_cnt = '0, pop_cnt = '0;
  logic [TS_W-1:0] push_ts = '0, pop_last_ts;
  logic [PW-1:0]   pop_end_ptr, head_ptr, tail_ptr, count;
  logic            set_head = 1'b0, set_tail = 1'b0;
  logic [PW-1:0]   set_head_ptr = '0, set_tail_ptr = '0;
  logic            empty, full, overflow, underflow;

  fifo_sfmt #(.DEPTH(DEPTH), .WIDTH(WIDTH), .TS_W(TS_W)) dut (.*);

  always #5 clk = ~clk;

  ent_t q[$];
  int unsigned next_seq = 0, rec_seq = 0;
  logic [PW-1:0] rec_ptr = '0;
  bit rec_valid = 0;
  int checks = 0, failures = 0;
  int n_full = 0, n_drop_younger = 0, n_drop_older = 0, n_multi = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned np, nq, op, space;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      op = $urandom % 16;
      set_head = 1'b0; set_tail = 1'b0;
      nq = (q.size() == 0) ? 0 : $urandom % ((q.size() < WIDTH ? q.size() : WIDTH) + 1);
      np = $urandom % (WIDTH + 1);
      push_ts = TS_W'($urandom);
      if (op == 0 && nq > 0) begin
        // drop all entries younger than the last popped one
        np = 0;
        set_tail = 1'b1;
      end else if (op == 1 && rec_valid && q.size() > 0 && q[0].seq <= rec_seq) begin
        // the handler moves the head forward only: pops stay older than the record
        while (nq > 0 && q[nq-1].seq >= rec_seq) nq--;
        set_head = 1'b1;
        set_head_ptr = rec_ptr;
      end
      push_cnt = CW'(np);
      pop_cnt  = CW'(nq);
      #1;
      set_tail_ptr = pop_end_ptr;
      // combinational checks before the edge
      checks++;
      if (count !== PW'(q.size())) fail($sformatf("count %0d model %0d", count, q.size()));
      checks++;
      if ((full !== (q.size() == DEPTH)) || (empty !== (q.size() == 0))) fail("full/empty");
      if (nq > 0) begin
        checks++;
        if (pop_last_ts !== q[nq-1].ts)
          fail($sformatf("pop_last_ts %0h model %0h", pop_last_ts, q[nq-1].ts));
        if (nq > 1) n_multi++;
      end
      if (op == 2) begin rec_ptr = tail_ptr; rec_seq = next_seq; rec_valid = 1; end
      if (q.size() == DEPTH) n_full++;
      @(posedge clk); #1;
      // update the model
      // pushes only use space that was free before this cycle's pops
      space = DEPTH - q.size();
      for (int i = 0; i < nq; i++) void'(q.pop_front());
      for (int i = 0; i < np; i++)
        if (i < space && !set_tail) begin q.push_back('{next_seq, push_ts}); next_seq++; end
      if (set_tail) begin q.delete(); n_drop_younger++; rec_valid = 0; end
      if (set_head) begin
        while (q.size() > 0 && q[0].seq < rec_seq) void'(q.pop_front());
        n_drop_older++;
      end
      checks++;
      if (head_ptr + PW'(q.size()) !== tail_ptr) fail("pointer distance");
      if (c == 2000) begin
        // last phase: flags must still be clear, then provoke them
        checks++;
        if (underflow) fail("spurious underflow");
      end
    end
    checks++;
    if (!overflow) fail("overflow never flagged");
    // pop from an empty queue
    pop_cnt = '0; push_cnt = '0;
    while (!empty) begin pop_cnt = CW'(1); @(posedge clk); #1; end
    pop_cnt = CW'(2);
    @(posedge clk); #1;
    pop_cnt = '0;
    checks++;
    if (!underflow || !empty) fail("underflow not flagged");
    checks++;
    if (n_full == 0 || n_drop_younger == 0 || n_drop_older == 0 || n_multi == 0)
      fail($sformatf("coverage full=%0d younger=%0d older=%0d multi=%0d",
                     n_full, n_drop_younger, n_drop_older, n_multi));
    $display("full=%0d drop_younger=%0d drop_older=%0d multipop=%0d",
             n_full, n_drop_younger, n_drop_older, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
