// tb_logging_device: checks the logger board in both modes on random bus
// traffic (4 CPUs, 8 lines of one sharable page, private-page traffic,
// write-backs and delta-overflow pseudo-transactions).
//
// Every loggable transaction the bench sends is remembered with its CPU, line,
// kind and IC-delta. The drained log is then held against that list:
//   * total order: the log must equal a reference built record by record
//     (a CPU's first event writes a complete record and opens one; every later
//     event completes the CPU's open record with its IC-delta and opens a new
//     one), every record its own group;
//   * partial order: a CPU's records must carry its IC-deltas in order, no CPU
//     may appear twice in a group, and for any two transactions of different
//     CPUs on one line where at least one writes, the earlier one's record
//     must be in an earlier group. The k-th record of a CPU belongs to its
//     (k-1)-th event, which fixes the group of every event.
// Write-backs and private traffic must leave no record; every pseudo-
// transaction must be reported; nothing may be lost. CPU 3 transacts rarely,
// so its open record blocks the drain and must draw delta requests, which the
// bench answers with a pseudo-transaction from that CPU.
module tb_logging_device;
  import logger_pkg::*;

  localparam int unsigned NCPU = 4, NSLICE = 8, EVB = 16, DEPTH = 256, REQ = 160;
  localparam int unsigned PAGE_AW = 8, NLINES = 8, NTX = 4000;
  localparam int unsigned LOG_AW = $clog2(DEPTH);
  localparam logic [19:0] SH_PAGE = 20'h00010;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic mode_partial, bus_valid, wu_valid, pst_we, pst_sh, flush, disk_valid, disk_ready;
  logic dreq_valid, pseudo_valid, idle, lost, stall, fwd, ret, ovf, serr, busy;
  bus_tx_t tx;
  cpu_t wu_cpu, dreq_cpu, pseudo_cpu;
  logic [PAGE_AW-1:0] pst_page;
  log_rec_t disk_rec;
  logic [15:0] seq;
  logic [LOG_AW:0] log_count;
  logic [$clog2(EVB+1)-1:0] evb_count;

  logging_device #(
    .NCPU(NCPU), .NSLICE(NSLICE), .EVBUF_DEPTH(EVB), .LOG_DEPTH(DEPTH),
    .REQ_FREE(REQ), .PAGE_AW(PAGE_AW)
  ) dut (
    .clk, .rst_n, .mode_partial_i(mode_partial), .log_en_i(1'b1),
    .bus_valid_i(bus_valid), .bus_tx_i(tx), .bus_wu_valid_i(wu_valid), .bus_wu_cpu_i(wu_cpu),
    .pst_wr_en_i(pst_we), .pst_wr_page_i(pst_page), .pst_wr_shared_i(pst_sh),
    .pst_clear_i(1'b0), .pst_busy_o(busy), .flush_i(flush),
    .disk_valid_o(disk_valid), .disk_rec_o(disk_rec), .disk_ready_i(disk_ready),
    .dreq_valid_o(dreq_valid), .dreq_cpu_o(dreq_cpu), .dreq_ready_i(1'b1),
    .pseudo_valid_o(pseudo_valid), .pseudo_cpu_o(pseudo_cpu),
    .idle_o(idle), .lost_o(lost), .sched_stall_o(stall), .sched_fwd_o(fwd),
    .sched_retire_o(ret), .sched_ovf_o(ovf), .sched_err_o(serr), .sched_seq_o(seq),
    .log_count_o(log_count), .evbuf_count_o(evb_count)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  typedef struct {int cpu; int line; bit modify; bit pseudo; int delta;} lev_t;
  lev_t     evs [$];        // loggable transactions in bus order
  log_rec_t logq [$];
  int       pseudo_sent, pseudo_seen, dreqs, wbs;
  bit [NCPU-1:0] dreq_pend;
  bit       wu_valid_was;

  always @(posedge clk) begin
    if (rst_n && disk_valid && disk_ready) logq.push_back(disk_rec);
    if (rst_n && pseudo_valid) pseudo_seen++;
    if (rst_n && dreq_valid) begin dreqs++; dreq_pend[dreq_cpu] = 1'b1; end
  end

  task automatic send(int c, bus_op_e op, addr_t a, bit wu, int owner);
    tx = '{cpu: cpu_t'(c), op: op, addr: a, delta: delta_t'($urandom_range(4095))};
    bus_valid = 1'b1; wu_valid = wu; wu_cpu = cpu_t'(owner);
    @(negedge clk);
    wu_valid_was = wu_valid;
    bus_valid = 1'b0; wu_valid = 1'b0;
  endtask

  task automatic run(bit partial);
    int c, l, k, op = 0, cyc;
    mode_partial = partial; flush = 1'b0; bus_valid = 1'b0; wu_valid = 1'b0;
    pst_we = 1'b0; disk_ready = 1'b0; dreq_pend = '0;
    evs.delete(); logq.delete(); pseudo_sent = 0; pseudo_seen = 0; dreqs = 0; wbs = 0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (busy) @(negedge clk);
    pst_we = 1'b1; pst_page = PAGE_AW'(SH_PAGE); pst_sh = 1'b1;
    @(negedge clk);
    pst_we = 1'b0;
    fork
      forever begin
        disk_ready = $urandom_range(9) < 7;
        @(negedge clk);
      end
    join_none
    for (int i = 0; i < NTX; i++) begin
      // the bus waits while the board is close to full
      while (evb_count > EVB - 4 || log_count > DEPTH - 8) @(negedge clk);
      repeat ($urandom_range(2)) @(negedge clk);
      c = $urandom_range(NCPU - 1);
      if (c == 3 && $urandom_range(15) != 0) c = $urandom_range(2);
      for (int d = 0; d < NCPU; d++)
        if (dreq_pend[d]) begin c = d; op = 9; end
      l = $urandom_range(NLINES - 1);
      if (op != 9) op = $urandom_range(9);
      case (op)
        0, 1, 2: begin
          k = $urandom_range(NCPU - 1);
          send(c, BUS_READ, {SH_PAGE, 8'(l), 4'h0}, k != c && $urandom_range(3) == 0, k);
          evs.push_back('{c, l, 1'b0, 1'b0, tx.delta});
          if (k != c && wu_valid_was) wbs++;
        end
        3, 4: begin
          send(c, BUS_INVALIDATE, {SH_PAGE, 8'(l), 4'h0}, 1'b0, 0);
          evs.push_back('{c, l, 1'b1, 1'b0, tx.delta});
        end
        5: begin
          send(c, BUS_READ_MODIFY, {SH_PAGE, 8'(l), 4'h0}, 1'b0, 0);
          evs.push_back('{c, l, 1'b1, 1'b0, tx.delta});
        end
        6: begin send(c, BUS_WRITE_REPLACE, {SH_PAGE, 8'(l), 4'h0}, 1'b0, 0); wbs++; end
        7: send(c, $urandom_range(1) ? BUS_READ : BUS_INVALIDATE, {20'h00033, 8'(l), 4'h0}, 1'b0, 0);
        default: begin
          send(c, BUS_INVALIDATE, {LOGGER_PAGE, 8'(c), 4'h0}, 1'b0, 0);
          evs.push_back('{c, -1, 1'b0, 1'b1, tx.delta});
          pseudo_sent++;
          dreq_pend[c] = 1'b0;
        end
      endcase
      op = 0;
    end
    // every CPU ends with a pseudo-transaction, then the board is flushed
    for (int d = 0; d < NCPU; d++) begin
      send(d, BUS_INVALIDATE, {LOGGER_PAGE, 8'(d), 4'h0}, 1'b0, 0);
      evs.push_back('{d, -1, 1'b0, 1'b1, tx.delta});
      pseudo_sent++;
    end
    flush = 1'b1;
    cyc = 0;
    while (!(idle && log_count == 0) && cyc < 20000) begin @(negedge clk); cyc++; end
    flush = 1'b0;
    disable fork;
    repeat (3) @(negedge clk);
    check(partial);
  endtask

  task automatic check(bit partial);
    int grp [];
    int nrec [NCPU];
    int ev_of_cpu [NCPU][$];
    int g, bad;
    bit [NCPU-1:0] inset;
    chk(idle && log_count == 0, "log drained");
    chk(!lost, "nothing lost");
    chk(!serr, "scheduler consistent");
    chk(pseudo_seen == pseudo_sent, $sformatf("pseudo-transactions %0d of %0d reported",
                                              pseudo_seen, pseudo_sent));
    foreach (evs[i]) ev_of_cpu[evs[i].cpu].push_back(i);
    // record count: one per event plus one first record per CPU
    chk(logq.size() == evs.size() + NCPU,
        $sformatf("%0d records for %0d events", logq.size(), evs.size()));
    if (!partial) begin
      log_rec_t ref_q [$];
      int open [NCPU];
      bit seen_cpu [NCPU];
      foreach (seen_cpu[d]) seen_cpu[d] = 0;
      foreach (evs[i]) begin
        int d = evs[i].cpu;
        if (!seen_cpu[d]) begin
          ref_q.push_back('{cpu: cpu_t'(d), delta: delta_t'(evs[i].delta), last: 1'b1});
          seen_cpu[d] = 1;
        end else ref_q[open[d]].delta = delta_t'(evs[i].delta);
        open[d] = ref_q.size();
        ref_q.push_back('{cpu: cpu_t'(d), delta: '0, last: 1'b1});
      end
      bad = 0;
      foreach (ref_q[i]) if (i >= logq.size() || logq[i] != ref_q[i]) bad++;
      chk(bad == 0 && ref_q.size() == logq.size(),
          $sformatf("total-order log differs from reference in %0d records", bad));
      failures += (bad > 0) ? bad - 1 : 0;
      return;
    end
    // partial order: groups of every record, per-CPU deltas, dependencies
    grp = new[logq.size()];
    g = 0; inset = '0;
    foreach (logq[i]) begin
      grp[i] = g;
      chk(!inset[logq[i].cpu], "CPU twice in one group");
      inset[logq[i].cpu] = 1'b1;
      if (logq[i].last) begin g++; inset = '0; end
    end
    chk(logq[logq.size()-1].last, "log ends on a group boundary");
    begin
      int evgrp [] = new[evs.size()];
      foreach (nrec[d]) nrec[d] = 0;
      foreach (logq[i]) begin
        int d = logq[i].cpu;
        int k = nrec[d];
        // record k of CPU d: delta of its event k; it sits in the group of event k-1
        if (k < ev_of_cpu[d].size())
          chk(logq[i].delta == delta_t'(evs[ev_of_cpu[d][k]].delta),
              $sformatf("cpu %0d record %0d delta", d, k));
        else chk(logq[i].delta == '0, "closing record has IC-delta 0");
        if (k >= 1 && k - 1 < ev_of_cpu[d].size()) evgrp[ev_of_cpu[d][k-1]] = grp[i];
        nrec[d]++;
      end
      bad = 0;
      for (int i = 0; i < evs.size(); i++)
        for (int j = i + 1; j < evs.size() && j < i + 400; j++)
          if (evs[i].cpu != evs[j].cpu && evs[i].line >= 0 && evs[i].line == evs[j].line &&
              (evs[i].modify || evs[j].modify)) begin
            checks++;
            if (evgrp[i] >= evgrp[j]) bad++;
          end
      chk(bad == 0, $sformatf("%0d dependent pairs out of order", bad));
      failures += (bad > 0) ? bad - 1 : 0;
      $display("partial order: %0d records in %0d groups, %0d delta requests", logq.size(), g, dreqs);
    end
  endtask

  int fwds, stalls, ovfs;
  always @(posedge clk) begin
    if (rst_n && fwd) fwds++;
    if (rst_n && stall) stalls++;
    if (rst_n && ovf) ovfs++;
  end

  initial begin
    fwds = 0; stalls = 0; ovfs = 0;
    run(1'b0);
    chk(dreqs > 0, "total order: delta requests happened");
    run(1'b1);
    chk(dreqs > 0, "partial order: delta requests happened");
    chk(fwds > 0 && ovfs > 0, $sformatf("forwarding %0d, overflow write-outs %0d", fwds, ovfs));
    chk(wbs > 0, "write-backs sent");
    $display("stalls %0d forwards %0d overflow write-outs %0d", stalls, fwds, ovfs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
