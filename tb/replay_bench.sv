// replay_bench: record-then-replay stimulus and checker for replay_system.
//
// The bench plays a small shared-memory multiprocessor around the record and
// replay hardware. Every CPU runs a fixed pseudo-random program of plain
// instructions, loads and stores to a few lines of one sharable page, and
// uncached reads of its own private page. A simple invalidation protocol
// (states I, S, M per CPU and line) decides which accesses need the bus:
// READ and READ-MODIFY misses, INVALIDATE upgrades, WRITE-REPLACE evictions,
// with WRITE-UPDATE from the owner of a modified line. The bus carries one
// transaction per BUSCYC cycles and grants CPUs in random order, so every run
// interleaves differently.
//
// Every program opens with a long stretch without loads or stores, so every
// instruction counter overflows, and CPU 0 later idles for QUIET instructions
// while the others fill the log, so its open record draws a delta request.
//
// Each round records a run (total order, then partial order), drains the log
// through the disk port, then replays it: the records are fed back on the
// playback port, the CPUs run only as far as the counter units let them, and
// every load that went to the bus while recording must return the same value
// again. (The partial-order log does not order a load that hit in the cache
// after its CPU's most recent logged event against a later invalidation by
// another CPU; such loads are counted and reported, not failed.) Each store
// writes a value unique to (CPU, instruction), so any reordering of dependent
// accesses shows. The bench counts the mechanisms it sees (delta overflows,
// delta requests, write-backs, forwarding, scheduler stalls, overflow
// write-outs, parallel playback groups) and reports a failure for any that
// REQUIRE marks as needed but never happened. Its bus refuses new loggable
// transactions while the logger's event buffer or log buffer is nearly full,
// standing in for a bus that the logging board may stall.
module replay_bench
  import logger_pkg::*;
#(
  parameter int unsigned NCPU        = 4,
  parameter int unsigned PAGE_AW     = 8,
  parameter int unsigned LOG_DEPTH   = 128,
  parameter int unsigned EVBUF_DEPTH = 16,
  parameter int unsigned NINSTR      = 3000,   // instructions per CPU per run
  parameter int unsigned QUIET       = 5000,   // CPU 0 idles this long
  parameter int unsigned BUSCYC      = 3,
  parameter int unsigned NLINES      = 6,
  parameter bit          PAUSE_DISK  = 1'b1,   // stop the disk for a while
  parameter logic [8:0]  REQUIRE     = 9'h1ff,
  parameter int unsigned SH_PM       = 250,    // shared accesses per 1000 instructions
  parameter int unsigned ST_PCT      = 40,     // ... of which stores, in percent
  parameter int unsigned PV_PM       = 50,     // private bus reads per 1000 instructions
  parameter int unsigned MIN_LOG_PM  = 0,      // required records per 1000 clocks
  parameter int unsigned MIN_BUS_PM  = 0,      // required bus transactions per 1000 clocks
  localparam int unsigned LOG_AW     = $clog2(LOG_DEPTH)
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               mode_partial_i,
  output logic               play_i,
  output logic [NCPU-1:0]    retire_i,
  output logic [NCPU-1:0]    tx_fire_i,
  output logic [NCPU-1:0]    tx_counts_i,
  output logic [NCPU-1:0]    pseudo_fire_i,
  input  logic [NCPU-1:0]    hold_o,
  input  logic [NCPU-1:0]    pseudo_req_o,
  output logic               bus_valid_i,
  output cpu_t               bus_cpu_i,
  output bus_op_e            bus_op_i,
  output addr_t              bus_addr_i,
  output logic               bus_wu_valid_i,
  output cpu_t               bus_wu_cpu_i,
  output logic               pst_wr_en_i,
  output logic [PAGE_AW-1:0] pst_wr_page_i,
  output logic               pst_wr_shared_i,
  output logic               pst_clear_i,
  input  logic               pst_busy_o,
  output logic               flush_i,
  input  logic               disk_valid_o,
  input  log_rec_t           disk_rec_o,
  output logic               disk_ready_i,
  output logic               play_rec_valid_i,
  output log_rec_t           play_rec_i,
  input  logic               play_rec_ready_o,
  input  logic               dreq_valid_o,
  input  cpu_t               dreq_cpu_o,
  input  logic               idle_o,
  input  logic               lost_o,
  input  logic               sched_stall_o,
  input  logic               sched_fwd_o,
  input  logic               sched_retire_o,
  input  logic               sched_ovf_o,
  input  logic               sched_err_o,
  input  logic [15:0]        sched_seq_o,
  input  logic [LOG_AW:0]    log_count_o,
  input  logic [$clog2(EVBUF_DEPTH+1)-1:0] evbuf_count_o,
  input  logic [31:0]        play_groups_o,
  input  logic [NCPU-1:0]    play_running_o,
  input  logic               play_err_o,
  output logic               done,
  output int                 checks,
  output int                 failures
);

  localparam logic [19:0] SH_PAGE = 20'h00010;
  localparam int unsigned OVF_RUN = 4200;
  localparam logic [19:0] PV_PAGE = 20'h00020;

  typedef enum int {ST_I, ST_S, ST_M} cstate_e;
  typedef enum int {OP_NONE, OP_LOAD, OP_STORE, OP_PRIV} iop_e;

  // mechanism counters
  localparam int M_OVF = 0, M_DREQ = 1, M_WU = 2, M_WR = 3, M_FWD = 4,
                 M_STALL = 5, M_OVFRET = 6, M_PARGRP = 7, M_MODES = 8;
  int mech [9];
  string mname [9] = '{"delta overflow", "delta request", "write-update",
                       "write-replace", "forwarding", "scheduler stall",
                       "overflow write-out", "parallel playback group",
                       "both logging modes"};

  int unsigned pc     [NCPU];     // next instruction of each CPU
  bit          fin    [NCPU];     // final pseudo-transaction sent
  cstate_e     cst    [NCPU][NLINES];
  int unsigned memv   [NLINES];
  int unsigned seen   [longint];  // value each load returned while recording
  bit          missed [longint];  // ... and whether it went to the bus
  int          hitdiff;
  log_rec_t    logq   [$];
  int          bus_busy;
  bit          replaying, running_cpus;

  // ---------------------------------------------------------------- program
  function automatic int unsigned mix(int unsigned a, int unsigned b);
    int unsigned h = a * 32'h9e3779b1 ^ (b + 32'h7f4a7c15) * 32'h85ebca6b;
    h ^= h >> 15; h *= 32'hc2b2ae35; h ^= h >> 13;
    return h;
  endfunction

  function automatic iop_e op_of(int c, int unsigned k);
    int unsigned h = mix(c, k);
    if (k < OVF_RUN) return OP_NONE;       // every counter overflows first
    if (c == 0 && k >= OVF_RUN + NINSTR / 3 && k < OVF_RUN + NINSTR / 3 + QUIET)
      return OP_NONE;
    if (h % 1000 < SH_PM) return ((h >> 12) % 100 < ST_PCT) ? OP_STORE : OP_LOAD;
    if (h % 1000 < SH_PM + PV_PM) return OP_PRIV;
    return OP_NONE;
  endfunction

  function automatic int line_of(int c, int unsigned k);
    return int'((mix(c, k) >> 8) % NLINES);
  endfunction

  function automatic int unsigned total_instr(int c);
    return OVF_RUN + ((c == 0) ? NINSTR + QUIET : NINSTR);
  endfunction

  function automatic addr_t sh_addr(int l);
    return {SH_PAGE, 8'(l), 4'h0};
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ bus driving
  task automatic put_bus(int c, bus_op_e op, addr_t a, bit wu, int owner);
    bus_valid_i    = 1'b1;
    bus_cpu_i      = cpu_t'(c);
    bus_op_i       = op;
    bus_addr_i     = a;
    bus_wu_valid_i = wu;
    bus_wu_cpu_i   = cpu_t'(owner);
    bus_busy       = BUSCYC;
  endtask

  function automatic int owner_of(int c, int l);
    for (int d = 0; d < NCPU; d++)
      if (d != c && cst[d][l] == ST_M) return d;
    return -1;
  endfunction

  // the bus may carry something the logger records
  function automatic bit pseudo_ok();
    return bus_busy == 0 && 32'(evbuf_count_o) < EVBUF_DEPTH - 4;
  endfunction

  // one CPU's turn in one cycle; blocking updates keep the order of the loop
  task automatic cpu_step(int c);
    iop_e op;
    int   l, own;
    bit   shared_ok;
    if (pc[c] >= total_instr(c)) begin
      // program finished: while recording, a last pseudo-transaction closes
      // the CPU's final record; later delta requests are still answered
      if ((pseudo_req_o[c] || (!replaying && !fin[c])) && pseudo_ok()) begin
        put_bus(c, BUS_INVALIDATE, {LOGGER_PAGE, 8'(c), 4'h0}, 0, 0);
        pseudo_fire_i[c] = 1'b1;
        fin[c] = 1'b1;
      end
      return;
    end
    if (pseudo_req_o[c]) begin
      if (pseudo_ok()) begin
        put_bus(c, BUS_INVALIDATE, {LOGGER_PAGE, 8'(c), 4'h0}, 0, 0);
        pseudo_fire_i[c] = 1'b1;
        if (!replaying && hold_o[c]) mech[M_OVF]++;
      end
      return;
    end
    if (hold_o[c]) return;
    if ($urandom_range(3) == 0) return;          // the CPU is busy elsewhere
    // a spontaneous eviction now and then
    if (bus_busy == 0 && $urandom_range(40) == 0) begin
      l = $urandom_range(NLINES - 1);
      if (cst[c][l] == ST_M) begin
        put_bus(c, BUS_WRITE_REPLACE, sh_addr(l), 0, 0);
        tx_fire_i[c] = 1'b1;
        cst[c][l] = ST_I;
        if (!replaying) mech[M_WR]++;
        return;
      end else if (cst[c][l] == ST_S) cst[c][l] = ST_I;
    end
    op = op_of(c, pc[c]);
    l  = line_of(c, pc[c]);
    shared_ok = pseudo_ok() && 32'(log_count_o) < LOG_DEPTH - 8;
    case (op)
      OP_NONE: ;
      OP_PRIV: begin
        if (bus_busy != 0) return;
        put_bus(c, BUS_READ, {PV_PAGE + 20'(c), 8'(l), 4'h0}, 0, 0);
        tx_fire_i[c] = 1'b1;
      end
      OP_LOAD: begin
        if (cst[c][l] == ST_I) begin
          if (!shared_ok) return;
          own = owner_of(c, l);
          put_bus(c, BUS_READ, sh_addr(l), own >= 0, own < 0 ? 0 : own);
          tx_fire_i[c] = 1'b1; tx_counts_i[c] = 1'b1;
          if (own >= 0) begin
            cst[own][l] = ST_S;
            if (!replaying) mech[M_WU]++;
          end
          cst[c][l] = ST_S;
        end
        if (replaying) begin
          chk(seen.exists({32'(c), pc[c]}), "load replayed that was not recorded");
          if (seen.exists({32'(c), pc[c]}) && seen[{32'(c), pc[c]}] != memv[l]) begin
            if (missed.exists({32'(c), pc[c]}))
              chk(0, $sformatf("cpu %0d instr %0d load miss: %08x, recorded %08x",
                               c, pc[c], memv[l], seen[{32'(c), pc[c]}]));
            else hitdiff++;
          end else checks++;
        end else begin
          seen[{32'(c), pc[c]}] = memv[l];
          if (tx_fire_i[c]) missed[{32'(c), pc[c]}] = 1'b1;
        end
      end
      OP_STORE: begin
        if (cst[c][l] != ST_M) begin
          if (!shared_ok) return;
          own = owner_of(c, l);
          put_bus(c, cst[c][l] == ST_S ? BUS_INVALIDATE : BUS_READ_MODIFY, sh_addr(l),
                  own >= 0, own < 0 ? 0 : own);
          tx_fire_i[c] = 1'b1; tx_counts_i[c] = 1'b1;
          if (own >= 0 && !replaying) mech[M_WU]++;
          for (int d = 0; d < NCPU; d++) if (d != c) cst[d][l] = ST_I;
          cst[c][l] = ST_M;
        end
        memv[l] = {8'(c), 24'(pc[c])};
      end
      default: ;
    endcase
    retire_i[c] = 1'b1;
    pc[c]++;
  endtask

  // ------------------------------------------------------------ main loop
  bit disk_on;
  int disk_pause;

  task automatic clear_drives();
    retire_i = '0; tx_fire_i = '0; tx_counts_i = '0; pseudo_fire_i = '0;
    bus_valid_i = 1'b0; bus_cpu_i = '0; bus_op_i = BUS_READ; bus_addr_i = '0;
    bus_wu_valid_i = 1'b0; bus_wu_cpu_i = '0;
  endtask

  task automatic reset_cpus();
    foreach (pc[c]) begin pc[c] = 0; fin[c] = 0; end
    foreach (cst[c, l]) cst[c][l] = ST_I;
    foreach (memv[l]) memv[l] = 32'hffff_0000 + l;
    bus_busy = 0;
  endtask

  // one cycle of CPU activity, called at the falling edge
  task automatic cycle();
    int start;
    clear_drives();
    if (bus_busy != 0) bus_busy--;
    start = $urandom_range(NCPU - 1);
    for (int i = 0; i < NCPU; i++) cpu_step((start + i) % NCPU);
  endtask

  function automatic bit all_done();
    for (int c = 0; c < NCPU; c++)
      if (pc[c] < total_instr(c) || (!replaying && !fin[c])) return 0;
    return 1;
  endfunction

  // disk: drains the log into logq
  int bus_count, traffic_cyc;
  always @(posedge clk) begin
    if (rst_n && bus_valid_i && !play_i) bus_count++;
    if (rst_n && !play_i && !flush_i && bus_count != 0) traffic_cyc++;
    if (rst_n && disk_valid_o && disk_ready_i) logq.push_back(disk_rec_o);
    if (rst_n && dreq_valid_o && !play_i) mech[M_DREQ]++;
    if (rst_n && sched_fwd_o) mech[M_FWD]++;
    if (rst_n && sched_stall_o) mech[M_STALL]++;
    if (rst_n && sched_ovf_o) mech[M_OVFRET]++;
  end

  // playback feed
  int feed_idx;
  int grp_cpus;
  always @(posedge clk) begin
    if (rst_n && play_rec_valid_i && play_rec_ready_o) feed_idx <= feed_idx + 1;
  end
  assign play_rec_valid_i = play_i && feed_idx < logq.size();
  assign play_rec_i       = (feed_idx < logq.size()) ? logq[feed_idx] : '0;

  task automatic record_and_replay(bit partial);
    int cyc, recs, groups, maxgrp, rate_cyc, rate_bus;
    bit [NCPU-1:0] inset;
    // ---- record
    rst_n = 1'b0; play_i = 1'b0; mode_partial_i = partial; flush_i = 1'b0;
    clear_drives(); reset_cpus(); replaying = 0;
    logq.delete(); seen.delete(); missed.delete(); feed_idx = 0; hitdiff = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (pst_busy_o) @(negedge clk);
    pst_wr_en_i = 1'b1; pst_wr_page_i = PAGE_AW'(SH_PAGE); pst_wr_shared_i = 1'b1;
    @(negedge clk);
    pst_wr_en_i = 1'b0;
    @(negedge clk);
    disk_on = 1; cyc = 0; disk_pause = PAUSE_DISK ? 400 : 0; bus_count = 0; traffic_cyc = 0;
    while (!all_done()) begin
      cycle();
      cyc++;
      // the disk stops once, a little after the start
      disk_on = !(cyc > 1000 && cyc <= 1000 + disk_pause);
      disk_ready_i = disk_on && ($urandom_range(9) != 0);
      @(negedge clk);
    end
    clear_drives();
    // rates from the first bus transaction, past the opening stretch
    rate_cyc = traffic_cyc > 0 ? traffic_cyc : 1;
    rate_bus = bus_count;
    flush_i = 1'b1; disk_ready_i = 1'b1;
    cyc = 0;
    while (!(idle_o && log_count_o == 0) && cyc < 100000) begin
      @(negedge clk); cyc++;
    end
    flush_i = 1'b0;
    chk(idle_o && log_count_o == 0, "log drained");
    chk(!lost_o, "no event lost");
    chk(!sched_err_o, "scheduler consistent");
    recs = logq.size();
    // every CPU's IC-deltas must add up to the instructions it ran
    for (int c = 0; c < NCPU; c++) begin
      int unsigned sum = 0;
      foreach (logq[i]) if (logq[i].cpu == cpu_t'(c)) sum += logq[i].delta;
      chk(sum == total_instr(c), $sformatf("cpu %0d log covers %0d of %0d instructions",
                                           c, sum, total_instr(c)));
    end
    // no CPU twice in one playback group; measure parallelism
    inset = '0; groups = 0; maxgrp = 0; grp_cpus = 0;
    foreach (logq[i]) begin
      chk(!inset[logq[i].cpu], "CPU twice in one group");
      inset[logq[i].cpu] = 1'b1; grp_cpus++;
      if (logq[i].last) begin
        groups++;
        if (grp_cpus > maxgrp) maxgrp = grp_cpus;
        if (grp_cpus > 1 && partial) mech[M_PARGRP]++;
        inset = '0; grp_cpus = 0;
      end
    end
    if (!partial) chk(groups == recs, "total order: every record is its own group");
    chk(recs > 0 && logq[recs-1].last, "log ends on a group boundary");
    $display("%s order: %0d records, %0d groups, widest group %0d CPUs",
             partial ? "partial" : "total", recs, groups, maxgrp);
    $display("  %0d clocks: %0d bus transactions, %0d records per 1000 clocks",
             rate_cyc, rate_bus * 1000 / rate_cyc, recs * 1000 / rate_cyc);
    chk(recs * 1000 / rate_cyc >= MIN_LOG_PM, "record rate below the required rate");
    chk(rate_bus * 1000 / rate_cyc >= MIN_BUS_PM, "bus rate below the required rate");
    // ---- replay
    rst_n = 1'b0; clear_drives(); reset_cpus(); replaying = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    play_i = 1'b1; disk_ready_i = 1'b0;
    @(negedge clk);
    cyc = 0;
    while (!(all_done() && feed_idx == recs && play_running_o == '0) && cyc < 2000000) begin
      cycle();
      cyc++;
      @(negedge clk);
    end
    clear_drives();
    repeat (5) @(negedge clk);
    chk(feed_idx == recs, "all records played");
    chk(all_done(), "every CPU ran its whole program");
    chk(play_groups_o == 32'(groups), $sformatf("playback groups %0d, log has %0d",
                                              play_groups_o, groups));
    chk(!play_err_o, "playback controller consistent");
    play_i = 1'b0;
    $display("%s order replayed in %0d cycles, %0d cache-hit loads differ", partial ? "partial" : "total", cyc, hitdiff);
    mech[M_MODES]++;
  endtask

  // state dump for a stuck run
  task automatic dump();
    for (int c = 0; c < NCPU; c++)
      $display("  cpu %0d pc %0d/%0d fin %0d hold %0d preq %0d", c, pc[c], total_instr(c),
               fin[c], hold_o[c], pseudo_req_o[c]);
    $display("  evbuf %0d log %0d idle %0d disk_valid %0d feed %0d/%0d running %b",
             evbuf_count_o, log_count_o, idle_o, disk_valid_o, feed_idx, logq.size(),
             play_running_o);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    foreach (mech[i]) mech[i] = 0;
    rst_n = 1'b0; play_i = 1'b0; mode_partial_i = 1'b0; flush_i = 1'b0;
    pst_wr_en_i = 1'b0; pst_wr_page_i = '0; pst_wr_shared_i = 1'b0; pst_clear_i = 1'b0;
    disk_ready_i = 1'b0;
    clear_drives();
    record_and_replay(1'b0);
    record_and_replay(1'b1);
    mech[M_MODES] = (mech[M_MODES] == 2) ? 1 : 0;
    foreach (mech[i]) begin
      $display("mechanism %-24s %0d", mname[i], mech[i]);
      if (REQUIRE[i]) chk(mech[i] > 0, {"mechanism never happened: ", mname[i]});
    end
    done = 1;
  end

endmodule
