// logging_device: the logger board attached to the multiprocessor bus.
//
// It snoops every bus transaction and writes a log from which the run can be
// replayed. Two modes share the board (mode_partial_i):
//   * total order: a loggable transaction goes straight to the instruction
//     count table, so the log is one serial schedule of (CPU, IC-delta)
//     records, each its own replay group;
//   * partial order: loggable transactions and write-backs go through the
//     event buffer into the slice scheduler, whose written-out slices (minus
//     the write-backs) become groups of records that may replay in parallel.
// Both end in the instruction count table and the log buffer, which drains
// completed records to the logging disk port. The block structure (page status
// table, instruction count table, log buffer; event buffer and scheduler for
// the partial order) follows the document's two logger diagrams; combining
// both loggers on one board with a mode input is this design's choice. The
// mode may only be changed while the device is idle (idle_o) and the log has
// been drained. log_en_i is low during playback, when only the
// pseudo-transactions matter.
//
// Interface: the bus snoop port takes one transaction per cycle with no
// back-pressure; the OS port writes the page status table; disk_* is a
// valid/ready record stream; dreq_* asks the board's bus master to send a
// delta request to a CPU; pseudo_* reports every delta-overflow
// pseudo-transaction (the "done" of a CPU during playback). Status outputs
// count nothing themselves: they pulse or stay set for a testbench or
// a host to observe.
module logging_device
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
  input  logic               log_en_i,      // 0 during playback: nothing is logged
  // bus snoop
  input  logic               bus_valid_i,
  input  bus_tx_t            bus_tx_i,
  input  logic               bus_wu_valid_i,
  input  cpu_t               bus_wu_cpu_i,
  // operating system: page status table
  input  logic               pst_wr_en_i,
  input  logic [PAGE_AW-1:0] pst_wr_page_i,
  input  logic               pst_wr_shared_i,
  input  logic               pst_clear_i,
  output logic               pst_busy_o,
  // end of logging: write out all slices, then let the open records go
  input  logic               flush_i,
  // logging disk
  output logic               disk_valid_o,
  output log_rec_t           disk_rec_o,
  input  logic               disk_ready_i,
  // delta request to a CPU
  output logic               dreq_valid_o,
  output cpu_t               dreq_cpu_o,
  input  logic               dreq_ready_i,
  // delta-overflow pseudo-transactions seen
  output logic               pseudo_valid_o,
  output cpu_t               pseudo_cpu_o,
  // status
  output logic               idle_o,
  output logic               lost_o,        // event dropped (buffer or log full)
  output logic               sched_stall_o,
  output logic               sched_fwd_o,
  output logic               sched_retire_o,
  output logic               sched_ovf_o,
  output logic               sched_err_o,
  output logic [15:0]        sched_seq_o,
  output logic [LOG_AW:0]    log_count_o,
  output logic [$clog2(EVBUF_DEPTH+1)-1:0] evbuf_count_o
);

  // page status table and filter
  logic               pst_lookup, pst_shared;
  logic [PAGE_AW-1:0] pst_page;
  logic               wb_valid, ev_valid;
  event_t             wb_ev, ev;

  page_status_table #(.PAGE_AW(PAGE_AW)) u_pst (
    .clk, .rst_n,
    .wr_en_i(pst_wr_en_i), .wr_page_i(pst_wr_page_i), .wr_shared_i(pst_wr_shared_i),
    .clear_i(pst_clear_i), .busy_o(pst_busy_o),
    .lookup_i(pst_lookup), .lookup_page_i(pst_page), .shared_o(pst_shared)
  );

  event_filter #(.PAGE_AW(PAGE_AW)) u_filter (
    .clk, .rst_n,
    .bus_valid_i, .bus_tx_i, .bus_wu_valid_i, .bus_wu_cpu_i,
    .pst_lookup_o(pst_lookup), .pst_page_o(pst_page), .pst_shared_i(pst_shared),
    .wb_valid_o(wb_valid), .wb_ev_o(wb_ev), .ev_valid_o(ev_valid), .ev_o(ev),
    .pseudo_valid_o, .pseudo_cpu_o
  );

  // partial order path
  logic   eb_empty, eb_overflow, eb_pop;
  logic [$clog2(EVBUF_DEPTH+1)-1:0] eb_count;
  event_t eb_head;
  logic   s_valid, s_wb, s_last, s_ready, s_idle;
  cpu_t   s_cpu;
  delta_t s_delta;

  event_buffer #(.DEPTH(EVBUF_DEPTH)) u_evbuf (
    .clk, .rst_n,
    .push0_i(log_en_i && mode_partial_i && wb_valid), .ev0_i(wb_ev),
    .push1_i(log_en_i && mode_partial_i && ev_valid), .ev1_i(ev),
    .pop_i(eb_pop), .head_o(eb_head), .empty_o(eb_empty),
    .overflow_o(eb_overflow), .count_o(eb_count)
  );

  po_scheduler #(.NSLICE(NSLICE), .NCPU(NCPU)) u_sched (
    .clk, .rst_n,
    .ev_avail_i(!eb_empty), .ev_i(eb_head), .ev_pop_o(eb_pop),
    .flush_i,
    .out_valid_o(s_valid), .out_cpu_o(s_cpu), .out_delta_o(s_delta),
    .out_wb_o(s_wb), .out_last_o(s_last), .out_seq_o(sched_seq_o), .out_ready_i(s_ready),
    .idle_o(s_idle), .stall_o(sched_stall_o), .fwd_o(sched_fwd_o),
    .retire_o(sched_retire_o), .ovf_retire_o(sched_ovf_o), .err_o(sched_err_o)
  );

  // instruction count table input
  logic    ict_valid, ict_ready;
  ict_ev_t ict_ev;
  logic    to_valid;

  assign to_valid = log_en_i && !mode_partial_i && ev_valid && !ev.writeback;

  always_comb begin
    if (mode_partial_i) begin
      ict_valid = s_valid && !s_wb;
      ict_ev    = '{cpu: s_cpu, delta: s_delta, last: s_last};
    end else begin
      ict_valid = to_valid;
      ict_ev    = '{cpu: ev.cpu, delta: ev.delta, last: 1'b1};
    end
  end
  assign s_ready = mode_partial_i && (s_wb || ict_ready);

  // instruction count table and log buffer
  logic              wr0_en, wr0_done, wr1_en, wr1_done;
  logic [LOG_AW-1:0] wr0_addr, wr1_addr, tail;
  log_rec_t          wr0_rec, wr1_rec;
  logic [1:0]        alloc;
  logic [LOG_AW:0]   free;

  instruction_count_table #(.NCPU(NCPU), .LOG_AW(LOG_AW)) u_ict (
    .clk, .rst_n,
    .ev_valid_i(ict_valid), .ev_i(ict_ev), .ev_ready_o(ict_ready),
    .tail_i(tail), .free_i(free),
    .wr0_en_o(wr0_en), .wr0_addr_o(wr0_addr), .wr0_rec_o(wr0_rec), .wr0_done_o(wr0_done),
    .wr1_en_o(wr1_en), .wr1_addr_o(wr1_addr), .wr1_rec_o(wr1_rec), .wr1_done_o(wr1_done),
    .alloc_o(alloc)
  );

  log_buffer #(.DEPTH(LOG_DEPTH), .REQ_FREE(REQ_FREE)) u_logbuf (
    .clk, .rst_n, .flush_i(flush_i && s_idle && eb_empty && !ict_valid),
    .wr0_en_i(wr0_en), .wr0_addr_i(wr0_addr), .wr0_rec_i(wr0_rec), .wr0_done_i(wr0_done),
    .wr1_en_i(wr1_en), .wr1_addr_i(wr1_addr), .wr1_rec_i(wr1_rec), .wr1_done_i(wr1_done),
    .alloc_i(alloc), .tail_o(tail), .free_o(free),
    .disk_valid_o, .disk_rec_o, .disk_ready_i,
    .dreq_valid_o, .dreq_cpu_o, .dreq_ready_i,
    .count_o(log_count_o)
  );

  // sticky loss flag: event buffer overflow or total-order event refused
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              lost_o <= 1'b0;
    else if (eb_overflow || (to_valid && !ict_ready)) lost_o <= 1'b1;
  end

  assign idle_o        = s_idle && eb_empty;
  assign evbuf_count_o = eb_count;

endmodule
