// tb_prefetch_buffer: self-checking test of the instruction prefetch FIFO.
//
// Random pushes, pops and occasional flushes drive the four-entry buffer; a
// queue in the testbench models the expected contents. Each cycle the test
// compares the head entry, valid, full and count with the queue. It also
// checks that a push into a full buffer without a pop is ignored, that push
// and pop in one cycle keep the count, that flush wins over a push in the
// same cycle, and that the buffer becomes full after exactly four pushes.
module tb_prefetch_buffer;
  import mb_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         flush, push, pop, valid, full;
  fetch_entry_t push_data, head;
  logic [2:0]   count;

  prefetch_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fetch_entry_t q [$];
  int n_full = 0, n_both = 0, n_flush = 0;

  task automatic compare(input string where);
    check(valid == (q.size() != 0), {where, ": valid"});
    check(full == (q.size() == DEPTH), {where, ": full"});
    check(int'(count) == q.size(), $sformatf("%s: count %0d exp %0d", where, count, q.size()));
    if (q.size() != 0)
      check(head == q[0], $sformatf("%s: head %h exp %h", where, head, q[0]));
  endtask

  initial begin
    flush = 1'b0;
    push = 1'b0;
    pop = 1'b0;
    push_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    compare("after reset");

    // Fill: full after exactly DEPTH pushes, then a push is refused
    for (int i = 0; i < DEPTH + 1; i++) begin
      push = 1'b1;
      push_data = '{pc: 32'(i * 4), instr: $urandom};
      if (q.size() < DEPTH) q.push_back(push_data);
      @(negedge clk);
      compare($sformatf("fill %0d", i));
    end
    push = 1'b0;
    check(full, "full after four pushes");

    // Random traffic
    for (int n = 0; n < 4000; n++) begin
      push  = $urandom_range(0, 2) != 0;
      pop   = $urandom_range(0, 2) != 0;
      flush = $urandom_range(0, 40) == 0;
      push_data = '{pc: $urandom, instr: $urandom};
      if (flush) begin
        q.delete();
        n_flush++;
      end else begin
        if (push && pop && q.size() != 0) n_both++;
        if (q.size() == DEPTH && push && pop) n_full++;
        // a push is accepted unless the buffer is full and nothing leaves
        if (pop && q.size() != 0) void'(q.pop_front());
        if (push && q.size() < DEPTH) q.push_back(push_data);
      end
      @(negedge clk);
      compare($sformatf("cycle %0d", n));
    end
    check(n_full > 0 && n_both > 0 && n_flush > 0, "all cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
