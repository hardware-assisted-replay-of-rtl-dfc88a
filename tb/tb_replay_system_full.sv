// tb_replay_system_full: the record and replay system with every parameter at
// its default (16 CPUs, 16 slices, a 2^25-record log buffer, a page status
// table for the whole 32-bit address space), recorded and replayed once in
// each logging mode. The log buffer is far too large to fill here, so delta
// requests, scheduler stalls and overflow write-outs are counted but not
// required; the small end-to-end test forces them.
module tb_replay_system_full;
  import logger_pkg::*;

  localparam int unsigned NCPU        = 16;
  localparam int unsigned PAGE_AW     = 20;
  localparam int unsigned LOG_DEPTH   = 33554432;
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

  replay_system u_dut (.*);

  replay_bench #(
    .NCPU(NCPU), .PAGE_AW(PAGE_AW), .LOG_DEPTH(LOG_DEPTH), .EVBUF_DEPTH(EVBUF_DEPTH),
    .NINSTR(1500), .QUIET(4500), .BUSCYC(3), .NLINES(8), .PAUSE_DISK(1'b0),
    .REQUIRE(9'h19d)
  ) u_bench (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (6000000) @(posedge clk);
    $display("FAIL watchdog expired");
    u_bench.dump();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
