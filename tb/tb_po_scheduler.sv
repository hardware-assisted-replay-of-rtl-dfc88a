// tb_po_scheduler: self-checking test of the partial-order slice scheduler.
//
// Feeds the scheduler a directed sequence (the eight dependent bus events of
// the document's scheduling example, back to back, so that two consecutive
// dependent events need forwarding) and then a random stream of reads,
// writes, write-backs and delta-overflow events over a few lines, with random
// gaps and a randomly stalling output. Every event carries a unique IC-delta
// that identifies it at the output. Checked independently of the design:
//   * every event leaves exactly once;
//   * for any two events in arrival order that conflict (same CPU, or same
//     line with at least one write) the earlier one is in an earlier slice;
//   * the group marker is set exactly on the last non-write-back entry of
//     every slice;
//   * at most one event is taken per six-cycle time step.
// Stalls, forwarded stores, write-outs and overflow write-outs must each occur.
module tb_po_scheduler;
  import logger_pkg::*;

  localparam int NCPU = 16, NSLICE = 16, NEV = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ev_avail, ev_pop, flush;
  event_t      ev;
  logic        out_valid, out_wb, out_last, out_ready;
  cpu_t        out_cpu;
  delta_t      out_delta;
  logic [15:0] out_seq;
  logic        idle, stall, fwd, retire, ovf, err;

  po_scheduler #(.NSLICE(NSLICE), .NCPU(NCPU)) dut (
    .clk, .rst_n, .ev_avail_i(ev_avail), .ev_i(ev), .ev_pop_o(ev_pop), .flush_i(flush),
    .out_valid_o(out_valid), .out_cpu_o(out_cpu), .out_delta_o(out_delta),
    .out_wb_o(out_wb), .out_last_o(out_last), .out_seq_o(out_seq), .out_ready_i(out_ready),
    .idle_o(idle), .stall_o(stall), .fwd_o(fwd), .retire_o(retire),
    .ovf_retire_o(ovf), .err_o(err)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // events to send
  event_t evs [NEV];
  int     slice_of [NEV];
  int     seen [NEV];
  int     gap [NEV];
  int     n_ev = 0, sent = 0;

  // output: track each slice's entries for the marker check
  int cur_seq = -1, cur_nonwb_left;
  int n_stall = 0, n_fwd = 0, n_retire = 0, n_ovf = 0, n_out = 0;
  int last_pop_cycle = -100, cycle = 0;
  int gap_cnt = 0;

  // sender: one event available at a time, after its gap
  assign ev_avail = (sent < n_ev) && (gap_cnt >= gap[sent]);
  assign ev       = evs[sent < n_ev ? sent : 0];

  // records of the slice currently leaving, for the last-marker check
  int pend_nonwb;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (ev_pop) begin
        check(cycle - last_pop_cycle >= 6, "more than one event per time step");
        last_pop_cycle <= cycle;
        sent    <= sent + 1;
        gap_cnt <= 0;
      end else if (sent < n_ev) gap_cnt <= gap_cnt + 1;
      if (stall)  n_stall++;
      if (fwd)    n_fwd++;
      if (retire) n_retire++;
      if (ovf)    n_ovf++;
      if (out_valid && out_ready) begin
        int id;
        id = int'(out_delta);
        n_out++;
        check(id < n_ev, "unknown event id at output");
        if (id < n_ev) begin
          check(seen[id] == 0, $sformatf("event %0d emitted twice", id));
          seen[id]++;
          slice_of[id] = int'(out_seq);
          check(out_cpu == evs[id].cpu && out_wb == evs[id].writeback,
                $sformatf("event %0d: cpu/wb mismatch", id));
        end
      end
    end
  end

  // independent check of the group marker: count non-wb entries per slice
  int nonwb_in_slice [int];
  int last_seen_in_slice [int];
  int last_pos_ok = 1;
  int nonwb_seen [int];
  always_ff @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s;
    s = int'(out_seq);
    if (!out_wb) begin
      nonwb_seen[s] = nonwb_seen.exists(s) ? nonwb_seen[s] + 1 : 1;
      if (out_last) last_seen_in_slice[s] = nonwb_seen[s];
    end else begin
      check(!out_last, "group marker on a write-back entry");
    end
  end

  function automatic bit conflicts(event_t a, event_t b);
    return (a.cpu == b.cpu) ||
           (!a.pseudo && !b.pseudo && a.line == b.line && (a.modify || b.modify));
  endfunction

  function automatic event_t mk(int cpu, int line, bit m, bit wb, bit ps, int id);
    event_t e;
    e.cpu = cpu_t'(cpu); e.line = line_t'(line); e.modify = m; e.writeback = wb;
    e.pseudo = ps; e.delta = delta_t'(id);
    return e;
  endfunction

  initial begin
    out_ready = 1;
    flush = 0;
    for (int i = 0; i < NEV; i++) begin seen[i] = 0; slice_of[i] = -1; gap[i] = 0; end
    // directed: the eight events of the scheduling example, one per step
    //   t1 R1 (cpu2)  t2 R2 (cpu0)  t3 I2 (cpu1)  t4 B2 (cpu1)
    //   t5 I1 (cpu0)  t6 R3 (cpu0)  t7 R2 (cpu2)  t8 I2 (cpu0)
    evs[0] = mk(2, 1, 0, 0, 0, 0);
    evs[1] = mk(0, 2, 0, 0, 0, 1);
    evs[2] = mk(1, 2, 1, 0, 0, 2);
    evs[3] = mk(1, 2, 1, 1, 0, 3);
    evs[4] = mk(0, 1, 1, 0, 0, 4);
    evs[5] = mk(0, 3, 0, 0, 0, 5);
    evs[6] = mk(2, 2, 0, 0, 0, 6);
    evs[7] = mk(0, 2, 1, 0, 0, 7);
    n_ev = 8;
    for (int i = 8; i < 48; i++) evs[i] = mk(5, i, 1, 0, 0, i);
    for (int i = 48; i < NEV; i++) begin
      int r;
      r = $urandom_range(0, 99);
      evs[i] = mk($urandom_range(0, NCPU - 1), $urandom_range(0, 7),
                  $urandom_range(0, 1), r < 10, r >= 95, i);
      if (evs[i].writeback) evs[i].modify = 1;
      if (evs[i].pseudo)    evs[i].modify = 0;
      gap[i] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 40) : 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed part, then flush it out completely
    wait (sent == 8);
    flush = 1;
    wait (idle);
    @(posedge clk);
    flush = 0;
    // the directed events: R2 (t7) and I2 (t8) are dependent and consecutive
    check(slice_of[6] < slice_of[7], "t7 R2 must precede t8 I2");
    // expected placement, worked out by hand from the dependences: slices
    // {R1,R2} {I2,I1} {B2,R3} {R2} {I2}, numbered from 1
    begin
      int exp_slice [8] = '{1, 1, 2, 3, 2, 3, 4, 5};
      for (int i = 0; i < 8; i++)
        check(slice_of[i] == exp_slice[i],
              $sformatf("directed event %0d in slice %0d, expected %0d", i, slice_of[i], exp_slice[i]));
    end
    check(slice_of[0] < slice_of[4], "t1 R1 must precede t5 I1");
    check(slice_of[1] < slice_of[2], "t2 R2 must precede t3 I2");
    check(slice_of[3] < slice_of[6], "t4 B2 must precede t7 R2");
    $display("directed slices: %0d %0d %0d %0d %0d %0d %0d %0d", slice_of[0], slice_of[1],
             slice_of[2], slice_of[3], slice_of[4], slice_of[5], slice_of[6], slice_of[7]);
    // burst: the output is held off while one CPU issues a run of events, so
    // the queue fills, loads stall and the head is written out on overflow
    out_ready = 0;
    n_ev = 48;
    repeat (1500) @(posedge clk);
    out_ready = 1;
    wait (sent == 48);
    flush = 1;
    wait (idle);
    @(posedge clk);
    flush = 0;
    // random part
    n_ev = NEV;
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 3) != 0);
      end
    join_none
    wait (sent == NEV);
    flush = 1;
    wait (idle);
    repeat (5) @(posedge clk);
    // every event exactly once
    for (int i = 0; i < NEV; i++) check(seen[i] == 1, $sformatf("event %0d seen %0d times", i, seen[i]));
    // dependencies
    for (int i = 0; i < NEV; i++)
      for (int j = i + 1; j < NEV; j++)
        if (conflicts(evs[i], evs[j]))
          check(slice_of[i] < slice_of[j],
                $sformatf("events %0d and %0d conflict but slices %0d >= %0d", i, j,
                          slice_of[i], slice_of[j]));
    // group marker on the last non-write-back entry of every slice
    foreach (nonwb_seen[s])
      check(last_seen_in_slice.exists(s) && last_seen_in_slice[s] == nonwb_seen[s],
            $sformatf("slice %0d: group marker misplaced", s));
    check(!err, "scheduler error flag");
    check(n_stall > 0,  "no load stall happened");
    check(n_fwd > 0,    "no forwarded store happened");
    check(n_retire > 0, "no slice written out");
    check(n_ovf > 0,    "no overflow write-out happened");
    $display("events=%0d slices=%0d stalls=%0d forwards=%0d writeouts=%0d overflow_writeouts=%0d",
             n_out, out_seq, n_stall, n_fwd, n_retire, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
