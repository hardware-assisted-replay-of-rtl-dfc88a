// tb_replay_system: end-to-end test of the record and replay system at a small
// size (4 CPUs, 512-record log buffer, 256-page status table), so that the log
// buffer fills and delta requests, scheduler stalls and overflow write-outs all
// happen. See replay_bench for the stimulus and the checks.
module tb_replay_system;
  import logger_pkg::*;

  localparam int unsigned NCPU        = 4;
  localparam int unsigned PAGE_AW     = 8;
  localparam int unsigned LOG_DEPTH   = 512;
  localparam int unsigned EVBUF_DEPTH = 16;
  localparam int unsigned LOG_AW      = $clog2(LOG_DEPTH);

  logic               clk = 1'b0;
  logic               rst_n, mode_partial_i, play_i;
  logic [NCPU-1:0]    retire_i, tx_fire_i, tx_counts_i, pseudo_fire_i;
  logic [NCPU-1:0]    hold_o, pseudo_req_o;
  logic               bus_valid_i, bus_wu_valid_i;
  cpu_t               bus_cpu_i, bus_wu_cpu_i;
  bus_op_e            bus_op_i;
  addr_t              bus_addr_i;
  logic               pst_wr_en_i, pst_wr_shared_i, pst_clear_i, pst_busy_o;
  logic [PAGE_AW-1:0] pst_wr_page_i;
  logic               flush_i;
  logic               disk_valid_o, disk_ready_i;
  log_rec_t           disk_rec_o;
  logic               play_rec_valid_i, play_rec_ready_o;
  log_rec_t           play_rec_i;
  logic               dreq_valid_o;
  cpu_t               dreq_cpu_o;
  logic               idle_o, lost_o, sched_stall_o, sched_fwd_o, sched_retire_o;
  logic               sched_ovf_o, sched_err_o;
  logic [15:0]        sched_seq_o;
  logic [LOG_AW:0]    log_count_o;
  logic [$clog2(EVBUF_DEPTH+1)-1:0] evbuf_count_o;
  logic [31:0]        play_groups_o;
  logic [NCPU-1:0]    play_running_o;
  logic               play_err_o;
  logic               done;
  int                 checks, failures;

  always #5 clk = ~clk;

  replay_system #(
    .NCPU(NCPU), .NSLICE(16), .EVBUF_DEPTH(EVBUF_DEPTH),
    .LOG_DEPTH(LOG_DEPTH), .REQ_FREE(256), .PAGE_AW(PAGE_AW)
  ) u_dut (.*);

  replay_bench #(
    .NCPU(NCPU), .PAGE_AW(PAGE_AW), .LOG_DEPTH(LOG_DEPTH), .EVBUF_DEPTH(EVBUF_DEPTH),
    .NINSTR(3000), .QUIET(5000), .BUSCYC(3), .NLINES(6), .PAUSE_DISK(1'b1),
    .REQUIRE(9'h1ff)
  ) u_bench (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog expired");
    u_bench.dump();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
