// replay_system: a multiprocessor's record-and-replay hardware, end to end.
//
// Shared-memory programs are non-deterministic because the order in which
// CPUs reach shared lines changes from run to run. This system records that
// order cheaply and forces it again on replay. Every CPU carries an
// instruction counter unit; each of its bus transactions also carries the
// number of instructions it executed since its last logged one (the IC-delta).
// A logger board snoops the bus, keeps only the transactions that can create
// an ordering between CPUs (misses and invalidations on sharable pages), and
// turns them into a log of (CPU, IC-delta) records, serial (total order) or
// in parallel slices (partial order). On playback the controller feeds the
// records back: each CPU runs exactly the logged number of instructions and
// reports with a pseudo-transaction on the bus, slice after slice.
//
// The CPUs, caches and the bus itself are outside: their signals are the
// ports. The bus model must put each CPU transaction on the snoop port in the
// same cycle as that CPU's tx_fire, with the CPU number; the top adds the
// IC-delta from that CPU's counter unit. A pseudo-transaction (granted by
// pseudo_fire) must appear on the snoop port as an INVALIDATE of a line in the
// logger's page. Delta requests from the board go straight to the counter unit
// of the CPU named (the board's bus master is modelled as always granted).
// Playback records come from the logging disk on the play_rec_* stream.
// mode_partial_i and play_i may change only while the board is idle.
module replay_system
  import logger_pkg::*;
#(
  parameter int unsigned NCPU        = 16,
  parameter int unsigned NSLICE      = 16,
  parameter int unsigned EVBUF_DEPTH = 16,
  parameter int unsigned LOG_DEPTH   = 33554432,
  parameter int unsigned REQ_FREE    = 4096,
  parameter int unsigned PAGE_AW     = PAGE_W,
  localparam int unsigned LOG_AW     = $clog2(LOG_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mode_partial_i,
  input  logic               play_i,
  // CPUs
  input  logic [NCPU-1:0]    retire_i,
  input  logic [NCPU-1:0]    tx_fire_i,
  input  logic [NCPU-1:0]    tx_counts_i,
  input  logic [NCPU-1:0]    pseudo_fire_i,
  output logic [NCPU-1:0]    hold_o,
  output logic [NCPU-1:0]    pseudo_req_o,
  // bus snoop
  input  logic               bus_valid_i,
  input  cpu_t               bus_cpu_i,
  input  bus_op_e            bus_op_i,
  input  addr_t              bus_addr_i,
  input  logic               bus_wu_valid_i,
  input  cpu_t               bus_wu_cpu_i,
  // operating system
  input  logic               pst_wr_en_i,
  input  logic [PAGE_AW-1:0] pst_wr_page_i,
  input  logic               pst_wr_shared_i,
  input  logic               pst_clear_i,
  output logic               pst_busy_o,
  input  logic               flush_i,
  // logging disk, write side
  output logic               disk_valid_o,
  output log_rec_t           disk_rec_o,
  input  logic               disk_ready_i,
  // logging disk, playback side
  input  logic               play_rec_valid_i,
  input  log_rec_t           play_rec_i,
  output logic               play_rec_ready_o,
  // status
  output logic               dreq_valid_o,
  output cpu_t               dreq_cpu_o,
  output logic               idle_o,
  output logic               lost_o,
  output logic               sched_stall_o,
  output logic               sched_fwd_o,
  output logic               sched_retire_o,
  output logic               sched_ovf_o,
  output logic               sched_err_o,
  output logic [15:0]        sched_seq_o,
  output logic [LOG_AW:0]    log_count_o,
  output logic [$clog2(EVBUF_DEPTH+1)-1:0] evbuf_count_o,
  output logic [31:0]        play_groups_o,
  output logic [NCPU-1:0]    play_running_o,
  output logic               play_err_o
);

  delta_t  delta [NCPU];
  bus_tx_t bus_tx;
  logic    pseudo_valid;
  cpu_t    pseudo_cpu;
  logic    start;
  cpu_t    start_cpu;
  delta_t  start_count;

  for (genvar c = 0; c < NCPU; c++) begin : g_cpu
    cpu_ic_unit u_ic (
      .clk, .rst_n, .play_i,
      .retire_i(retire_i[c]), .tx_fire_i(tx_fire_i[c]), .tx_counts_i(tx_counts_i[c]),
      .hold_o(hold_o[c]), .delta_o(delta[c]),
      .pseudo_req_o(pseudo_req_o[c]), .pseudo_fire_i(pseudo_fire_i[c]),
      .dreq_i(dreq_valid_o && !play_i && dreq_cpu_o == cpu_t'(c)),
      .play_start_i(start && start_cpu == cpu_t'(c)), .play_count_i(start_count)
    );
  end

  always_comb begin
    bus_tx.cpu   = bus_cpu_i;
    bus_tx.op    = bus_op_i;
    bus_tx.addr  = bus_addr_i;
    bus_tx.delta = delta[bus_cpu_i];
  end

  logging_device #(
    .NCPU(NCPU), .NSLICE(NSLICE), .EVBUF_DEPTH(EVBUF_DEPTH),
    .LOG_DEPTH(LOG_DEPTH), .REQ_FREE(REQ_FREE), .PAGE_AW(PAGE_AW)
  ) u_logger (
    .clk, .rst_n, .mode_partial_i, .log_en_i(!play_i),
    .bus_valid_i, .bus_tx_i(bus_tx), .bus_wu_valid_i, .bus_wu_cpu_i,
    .pst_wr_en_i, .pst_wr_page_i, .pst_wr_shared_i, .pst_clear_i, .pst_busy_o,
    .flush_i,
    .disk_valid_o, .disk_rec_o, .disk_ready_i,
    .dreq_valid_o, .dreq_cpu_o, .dreq_ready_i(1'b1),
    .pseudo_valid_o(pseudo_valid), .pseudo_cpu_o(pseudo_cpu),
    .idle_o, .lost_o, .sched_stall_o, .sched_fwd_o, .sched_retire_o, .sched_ovf_o,
    .sched_err_o, .sched_seq_o, .log_count_o, .evbuf_count_o
  );

  replay_controller #(.NCPU(NCPU)) u_play (
    .clk, .rst_n, .enable_i(play_i),
    .rec_valid_i(play_rec_valid_i), .rec_i(play_rec_i), .rec_ready_o(play_rec_ready_o),
    .start_o(start), .start_cpu_o(start_cpu), .start_count_o(start_count),
    .done_i(pseudo_valid && play_i), .done_cpu_i(pseudo_cpu),
    .running_o(play_running_o), .groups_o(play_groups_o), .err_o(play_err_o)
  );

endmodule
