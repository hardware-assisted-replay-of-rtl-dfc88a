// tb_instruction_count_table: checks how events become log records.
// The log buffer is modelled by an array with a tail pointer. First the
// total-order example of the document (CPUs A and B, events with IC-deltas
// B16 A1 B2 A2 A2 B5) is checked record by record; then random events with
// random group markers. The expected log is worked out independently: for
// each event in order, a CPU's first event is preceded by a complete record
// of its own IC-delta; every event then has a record in event order that
// holds the IC-delta of the same CPU's next event (open if there is none)
// and the event's group marker. Back-pressure when the buffer has fewer than
// two free records is checked at the end.
module tb_instruction_count_table;
  import logger_pkg::*;
  localparam int LOG_AW = 12, CAP = 2**LOG_AW, NEV = 1200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ev_valid = 0, ev_ready;
  ict_ev_t           ev;
  logic [LOG_AW-1:0] tail;
  logic [LOG_AW:0]   free;
  logic              wr0_en, wr0_done, wr1_en, wr1_done;
  logic [LOG_AW-1:0] wr0_addr, wr1_addr;
  log_rec_t          wr0_rec, wr1_rec;
  logic [1:0]        alloc;
  int                limit = CAP;

  log_rec_t lrec [CAP];
  bit       ldone [CAP];
  int checks = 0, failures = 0;

  instruction_count_table #(.NCPU(16), .LOG_AW(LOG_AW)) dut (
    .clk, .rst_n, .ev_valid_i(ev_valid), .ev_i(ev), .ev_ready_o(ev_ready),
    .tail_i(tail), .free_i(free),
    .wr0_en_o(wr0_en), .wr0_addr_o(wr0_addr), .wr0_rec_o(wr0_rec), .wr0_done_o(wr0_done),
    .wr1_en_o(wr1_en), .wr1_addr_o(wr1_addr), .wr1_rec_o(wr1_rec), .wr1_done_o(wr1_done),
    .alloc_o(alloc)
  );

  // log buffer model (nothing drains)
  assign free = (LOG_AW+1)'(limit - int'(tail));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tail <= '0;
    else begin
      if (wr0_en) begin lrec[wr0_addr] <= wr0_rec; ldone[wr0_addr] <= wr0_done; end
      if (wr1_en) begin lrec[wr1_addr] <= wr1_rec; ldone[wr1_addr] <= wr1_done; end
      tail <= tail + LOG_AW'(alloc);
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  ict_ev_t evs [NEV];
  int      n_ev;

  task automatic send(ict_ev_t e);
    @(negedge clk);
    ev = e; ev_valid = 1;
    @(posedge clk);
    while (!ev_ready) @(posedge clk);
    #1 ev_valid = 0;
  endtask

  // walk the log and compare with the expected records
  task automatic verify(int base, string tag);
    int p = base;
    bit seen [16];
    for (int c = 0; c < 16; c++) seen[c] = 0;
    for (int i = 0; i < n_ev; i++) begin
      int j = -1;
      if (!seen[evs[i].cpu]) begin
        check(lrec[p].cpu == evs[i].cpu && lrec[p].delta == evs[i].delta && lrec[p].last &&
              ldone[p], $sformatf("%s: first-run record of event %0d at %0d", tag, i, p));
        p++;
        seen[evs[i].cpu] = 1;
      end
      for (int k = i + 1; k < n_ev && j < 0; k++) if (evs[k].cpu == evs[i].cpu) j = k;
      check(lrec[p].cpu == evs[i].cpu && lrec[p].last == evs[i].last,
            $sformatf("%s: record of event %0d at %0d", tag, i, p));
      if (j >= 0) check(ldone[p] && lrec[p].delta == evs[j].delta,
                        $sformatf("%s: event %0d record not completed with %0d (got %0d done %0b)",
                                  tag, i, evs[j].delta, lrec[p].delta, ldone[p]));
      else        check(!ldone[p], $sformatf("%s: event %0d record should be open", tag, i));
      p++;
    end
    check(p == int'(tail), $sformatf("%s: log length %0d, tail %0d", tag, p, tail));
  endtask

  initial begin
    ev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the document's total-order example: B=1, A=0
    evs[0] = '{cpu: 1, delta: 16, last: 1};
    evs[1] = '{cpu: 0, delta: 1,  last: 1};
    evs[2] = '{cpu: 1, delta: 2,  last: 1};
    evs[3] = '{cpu: 0, delta: 2,  last: 1};
    evs[4] = '{cpu: 0, delta: 2,  last: 1};
    evs[5] = '{cpu: 1, delta: 5,  last: 1};
    n_ev = 6;
    for (int i = 0; i < n_ev; i++) send(evs[i]);
    @(negedge clk);
    // hand-worked log: B:16 B:2 A:1 A:2 B:5 A:2 A:open B:open
    begin
      int exp_cpu [8] = '{1, 1, 0, 0, 1, 0, 0, 1};
      int exp_d   [6] = '{16, 2, 1, 2, 5, 2};
      for (int k = 0; k < 8; k++) begin
        check(int'(lrec[k].cpu) == exp_cpu[k], $sformatf("example record %0d cpu", k));
        if (k < 6) check(ldone[k] && int'(lrec[k].delta) == exp_d[k],
                         $sformatf("example record %0d delta %0d", k, lrec[k].delta));
        else       check(!ldone[k], $sformatf("example record %0d should be open", k));
      end
      check(tail == 8, "example log length");
    end
    verify(0, "example");
    // random events, fresh table
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    n_ev = NEV;
    for (int i = 0; i < NEV; i++)
      evs[i] = '{cpu: cpu_t'($urandom_range(0, 15)), delta: delta_t'($urandom_range(0, 4095)),
                 last: 1'($urandom_range(0, 1))};
    for (int i = 0; i < NEV; i++) begin
      send(evs[i]);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    @(negedge clk);
    verify(0, "random");
    // back-pressure: one free record left
    limit = int'(tail) + 1;
    @(negedge clk);
    check(!ev_ready, "ready with only one free record");
    limit = int'(tail) + 2;
    @(negedge clk);
    check(ev_ready, "not ready with two free records");
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
