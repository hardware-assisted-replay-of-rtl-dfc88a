// tb_event_buffer: checks the two-in, one-out event FIFO against a queue.
// Random pushes on both inputs (push0 ordered before push1) and random pops;
// the head, empty flag and count are compared every cycle with a queue kept
// by the testbench. A phase without pops fills the buffer until an event is
// lost, which must set the sticky overflow flag.
module tb_event_buffer;
  import logger_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   push0 = 0, push1 = 0, pop = 0, empty, overflow;
  event_t ev0, ev1, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  event_t q [$];
  int checks = 0, failures = 0, n_pop = 0, n_both = 0;

  event_buffer #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push0_i(push0), .ev0_i(ev0), .push1_i(push1), .ev1_i(ev1),
    .pop_i(pop), .head_o(head), .empty_o(empty), .overflow_o(overflow), .count_o(count)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic event_t rnd_ev();
    event_t e;
    e = event_t'({$urandom(), $urandom()});
    return e;
  endfunction

  initial begin
    ev0 = '0; ev1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // compare state
      check(empty == (q.size() == 0), "empty flag");
      check(int'(count) == q.size(), $sformatf("count %0d expected %0d", count, q.size()));
      if (q.size() > 0) check(head == q[0], "head mismatch");
      check(!overflow, "unexpected overflow");
      // drive the next cycle, never beyond capacity in this phase
      pop   = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push0 = ($urandom_range(0, 2) == 0) && (q.size() < DEPTH - 1);
      push1 = ($urandom_range(0, 2) == 0) && (q.size() < DEPTH - 1);
      ev0 = rnd_ev(); ev1 = rnd_ev();
      @(posedge clk);
      #1;
      if (pop) begin void'(q.pop_front()); n_pop++; end
      if (push0) q.push_back(ev0);
      if (push1) q.push_back(ev1);
      if (push0 && push1) n_both++;
      pop = 0; push0 = 0; push1 = 0;
    end
    // fill until full, then one more
    @(negedge clk);
    while (q.size() < DEPTH) begin
      push0 = 1; ev0 = rnd_ev();
      @(posedge clk); #1; q.push_back(ev0); push0 = 0;
      @(negedge clk);
    end
    check(!overflow && count == DEPTH, "full without overflow");
    push0 = 1; ev0 = rnd_ev();
    @(posedge clk); #1; push0 = 0;
    @(negedge clk);
    check(overflow, "overflow flag not set");
    check(head == q[0] && count == DEPTH, "contents disturbed by the lost event");
    check(n_both > 0 && n_pop > 0, "no double pushes or pops exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
