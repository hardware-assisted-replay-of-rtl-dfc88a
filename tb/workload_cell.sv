// workload_cell: one full-size record and replay system (every parameter at
// its default) driven by the end-to-end bench with a given traffic mix. The
// bench checks the replay and that the recorded bus and record rates reach
// the required floor.
module workload_cell
  import logger_pkg::*;
#(
  parameter int unsigned SH_PM      = 20,
  parameter int unsigned ST_PCT     = 40,
  parameter int unsigned PV_PM      = 10,
  parameter int unsigned NLINES     = 64,
  parameter int unsigned MIN_LOG_PM = 0,
  parameter int unsigned MIN_BUS_PM = 0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NCPU        = 16;
  localparam int unsigned PAGE_AW     = 20;
  localparam int unsigned LOG_DEPTH   = 33554432;
  localparam int unsigned EVBUF_DEPTH = 16;
  localparam int unsigned LOG_AW      = $clog2(LOG_DEPTH);

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


  replay_system u_dut (.*);

  replay_bench #(
    .NCPU(NCPU), .PAGE_AW(PAGE_AW), .LOG_DEPTH(LOG_DEPTH), .EVBUF_DEPTH(EVBUF_DEPTH),
    .NINSTR(6000), .QUIET(0), .BUSCYC(3), .NLINES(NLINES), .PAUSE_DISK(1'b0),
    .REQUIRE(9'h181), .SH_PM(SH_PM), .ST_PCT(ST_PCT), .PV_PM(PV_PM),
    .MIN_LOG_PM(MIN_LOG_PM), .MIN_BUS_PM(MIN_BUS_PM)
  ) u_bench (.*);

endmodule
