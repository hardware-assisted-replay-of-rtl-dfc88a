// tb_log_buffer: checks the record ring and its drain to the logging disk.
// The testbench plays the instruction count table: it appends open and
// complete records (one or two per cycle) and completes open ones later with
// patch writes, while a randomly stalling disk takes completed records. It
// checks that the disk receives exactly the appended records, in order, each
// with its final contents, and never an open one; that count and free space
// add up; and that a full buffer whose head record is open raises exactly one
// delta request naming that record's CPU, after which the patch lets it drain;
// and that open records leave only when flush is raised.
module tb_log_buffer;
  import logger_pkg::*;
  localparam int DEPTH = 32, REQ = 8, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr0_en = 0, wr0_done = 0, wr1_en = 0, wr1_done = 0;
  logic [AW-1:0] wr0_addr = '0, wr1_addr = '0, tail;
  log_rec_t      wr0_rec = '0, wr1_rec = '0, disk_rec;
  logic [1:0]    alloc = '0;
  logic [AW:0]   free, count;
  logic          disk_valid, disk_ready = 0, dreq_valid, dreq_ready = 1, flush = 0;
  cpu_t          dreq_cpu;

  log_buffer #(.DEPTH(DEPTH), .REQ_FREE(REQ)) dut (
    .clk, .rst_n, .flush_i(flush),
    .wr0_en_i(wr0_en), .wr0_addr_i(wr0_addr), .wr0_rec_i(wr0_rec), .wr0_done_i(wr0_done),
    .wr1_en_i(wr1_en), .wr1_addr_i(wr1_addr), .wr1_rec_i(wr1_rec), .wr1_done_i(wr1_done),
    .alloc_i(alloc), .tail_o(tail), .free_o(free),
    .disk_valid_o(disk_valid), .disk_rec_o(disk_rec), .disk_ready_i(disk_ready),
    .dreq_valid_o(dreq_valid), .dreq_cpu_o(dreq_cpu), .dreq_ready_i(dreq_ready),
    .count_o(count)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // reference: every record ever appended, by sequence number
  log_rec_t ref_rec [4096];
  bit       ref_done [4096];
  int       n_app = 0, n_out = 0, n_dreq = 0;
  int       open_seq [$];
  bit       disk_rand = 1;

  always_ff @(posedge clk) if (rst_n) begin
    if (disk_valid && disk_ready) begin
      check(n_out < n_app, "drained more than appended");
      check(disk_rec == ref_rec[n_out], $sformatf("record %0d contents", n_out));
      check(ref_done[n_out] || flush, $sformatf("record %0d drained while open", n_out));
      n_out <= n_out + 1;
    end
    if (dreq_valid && dreq_ready) n_dreq <= n_dreq + 1;
    check(int'(count) + int'(free) == DEPTH, "count + free");
  end

  // one cycle of table activity: optionally patch an open record, append n
  // open_mode: 0 all complete, 1 random, 2 all open
  task automatic step(int n_append, bit patch_one, int open_mode);
    @(negedge clk);
    wr0_en = 0; wr1_en = 0; alloc = 0;
    if (int'(free) < n_append) n_append = 0;
    if (patch_one && open_seq.size() > 0) begin
      int idx = $urandom_range(0, open_seq.size() - 1);
      int s   = open_seq[idx];
      open_seq.delete(idx);
      ref_rec[s].delta = delta_t'($urandom_range(0, 4095));
      ref_done[s] = 1;
      wr0_en = 1; wr0_addr = AW'(s); wr0_rec = ref_rec[s]; wr0_done = 1;
      if (n_append > 1) n_append = 1;
    end
    for (int k = 0; k < n_append; k++) begin
      int  s = n_app + k;
      bit  d = (open_mode == 1) ? ($urandom_range(0, 2) != 0) : (open_mode == 0);
      ref_rec[s] = '{cpu: cpu_t'($urandom_range(0, 15)), delta: delta_t'($urandom_range(0, 4095)),
                     last: 1'($urandom_range(0, 1))};
      ref_done[s] = d;
      if (!d) open_seq.push_back(s);
      if (k == 0 && !wr0_en) begin
        wr0_en = 1; wr0_addr = AW'(s); wr0_rec = ref_rec[s]; wr0_done = d;
      end else begin
        wr1_en = 1; wr1_addr = AW'(s); wr1_rec = ref_rec[s]; wr1_done = d;
      end
    end
    alloc = 2'(n_append);
    @(posedge clk);
    #1;
    n_app += n_append;
    wr0_en = 0; wr1_en = 0; alloc = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); if (disk_rand) disk_ready = ($urandom_range(0, 2) != 0); end
    join_none
    // random traffic, keeping patches coming so nothing blocks for long
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 2), $urandom_range(0, 1), 1);
    while (open_seq.size() > 0) step(0, 1, 1);
    repeat (2 * DEPTH) @(negedge clk);
    check(n_out == n_app, $sformatf("drained %0d of %0d", n_out, n_app));
    // delta request: an open record at the head, the buffer filled behind it
    disk_rand = 0;
    disk_ready = 0;
    n_dreq = 0;
    step(1, 0, 2);
    while (int'(free) > 2) step(2, 0, 0);
    repeat (10) @(negedge clk);
    check(n_dreq == 1, $sformatf("%0d delta requests, expected 1", n_dreq));
    check(dreq_cpu == ref_rec[open_seq[0]].cpu, "delta request names the wrong CPU");
    check(n_out < n_app, "open head record was drained");
    // the CPU answers: record completed, everything drains
    disk_ready = 1;
    step(0, 1, 0);
    repeat (4 * DEPTH) @(negedge clk);
    check(n_out == n_app, $sformatf("after completion drained %0d of %0d", n_out, n_app));
    // end of logging: open records stay until flush, then leave as they are
    step(2, 0, 2);
    step(1, 0, 2);
    repeat (10) @(negedge clk);
    check(n_out == n_app - 3, "open records held before flush");
    flush = 1;
    repeat (10) @(negedge clk);
    flush = 0;
    check(n_out == n_app, $sformatf("flush drained %0d of %0d", n_out, n_app));
    $display("records=%0d delta_requests=%0d", n_app, n_dreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
