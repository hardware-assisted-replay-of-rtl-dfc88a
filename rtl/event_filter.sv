// event_filter: decides which snooped bus transactions the logger records.
//
// Each bus cycle may carry one transaction (CPU number, type, address and the
// issuing CPU's IC-delta) plus, for a read miss served by another cache's dirty
// copy, the number of that owning CPU (the overlapped WRITE-UPDATE). The filter
// looks the page up in the page status table and classifies the transaction:
//   * READ, READ-MODIFY and INVALIDATE on a sharable page are loggable;
//   * WRITE-REPLACE and WRITE-UPDATE on a sharable page are write-backs: the
//     partial-order scheduler needs them to stay consistent, the log never
//     holds them;
//   * an INVALIDATE of a line in the logger's own page is a delta-overflow
//     pseudo-transaction from a CPU: always loggable, with no address
//     dependence (it also tells a replaying logger that the CPU has finished);
//   * everything else (private pages, instruction fetches) is dropped.
// The classification rules follow the document. Carrying the write-update
// owner as a second field of the same cycle, and placing its write-back ahead
// of the read in event order, are this design's reading of the bus.
//
// Timing: one pipeline stage (the synchronous table lookup); outputs are valid
// one cycle after the transaction. There is no back-pressure: the bus cannot
// be stalled.
module event_filter
  import logger_pkg::*;
#(
  parameter int unsigned PAGE_AW = PAGE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // snooped bus
  input  logic               bus_valid_i,
  input  bus_tx_t            bus_tx_i,
  input  logic               bus_wu_valid_i,  // owner supplied the line (WRITE-UPDATE)
  input  cpu_t               bus_wu_cpu_i,
  // page status table lookup
  output logic               pst_lookup_o,
  output logic [PAGE_AW-1:0] pst_page_o,
  input  logic               pst_shared_i,
  // classified events (wb first, then ev, when both are valid)
  output logic               wb_valid_o,      // write-update of the owner
  output event_t             wb_ev_o,
  output logic               ev_valid_o,      // loggable, write-back or pseudo
  output event_t             ev_o,
  // pseudo-transaction seen (delta overflow) and its CPU
  output logic               pseudo_valid_o,
  output cpu_t               pseudo_cpu_o
);

  logic    s_valid, s_wu_valid;
  bus_tx_t s_tx;
  cpu_t    s_wu_cpu;

  assign pst_lookup_o = bus_valid_i;
  assign pst_page_o   = PAGE_AW'(bus_tx_i.addr[ADDR_W-1:PAGE_OFS]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid    <= 1'b0;
      s_wu_valid <= 1'b0;
      s_tx       <= '0;
      s_wu_cpu   <= '0;
    end else begin
      s_valid    <= bus_valid_i;
      s_wu_valid <= bus_valid_i && bus_wu_valid_i;
      s_tx       <= bus_tx_i;
      s_wu_cpu   <= bus_wu_cpu_i;
    end
  end

  logic is_logger_page, is_wb_op, is_log_op, is_pseudo;

  always_comb begin
    is_logger_page = (s_tx.addr[ADDR_W-1:PAGE_OFS] == LOGGER_PAGE);
    is_pseudo      = is_logger_page && (s_tx.op == BUS_INVALIDATE);
    is_wb_op       = (s_tx.op == BUS_WRITE_REPLACE) || (s_tx.op == BUS_WRITE_UPDATE);
    is_log_op      = (s_tx.op == BUS_READ) || (s_tx.op == BUS_READ_MODIFY) ||
                     (s_tx.op == BUS_INVALIDATE);

    ev_o.cpu       = s_tx.cpu;
    ev_o.line      = s_tx.addr[ADDR_W-1:LINE_OFS];
    ev_o.delta     = s_tx.delta;
    ev_o.modify    = is_pseudo ? 1'b0 : (s_tx.op != BUS_READ);
    ev_o.writeback = !is_pseudo && is_wb_op;
    ev_o.pseudo    = is_pseudo;
    ev_valid_o     = s_valid && (is_pseudo ||
                     (!is_logger_page && pst_shared_i && (is_log_op || is_wb_op)));

    wb_ev_o.cpu       = s_wu_cpu;
    wb_ev_o.line      = s_tx.addr[ADDR_W-1:LINE_OFS];
    wb_ev_o.delta     = '0;
    wb_ev_o.modify    = 1'b1;
    wb_ev_o.writeback = 1'b1;
    wb_ev_o.pseudo    = 1'b0;
    wb_valid_o        = s_valid && s_wu_valid && !is_logger_page && pst_shared_i &&
                        ((s_tx.op == BUS_READ) || (s_tx.op == BUS_READ_MODIFY));

    pseudo_valid_o = s_valid && is_pseudo;
    pseudo_cpu_o   = s_tx.cpu;
  end

endmodule
