// instruction_count_table: turns logged events into complete log records.
//
// A record tells playback how many instructions its CPU may run before it must
// stop, which is only known when that CPU's next logged event arrives with its
// IC-delta. The table therefore keeps, per CPU, the address of that CPU's last
// (open) record in the log buffer. For an event of CPU c with IC-delta d:
//   * if c has an open record, it is completed with d (patch write) and a new
//     open record for this event is appended;
//   * if this is c's first event, a complete record {c, d} covering the
//     instructions before it is appended, followed by the new open record.
// The open record carries the event's group marker; a first-event record is a
// group of its own. The table entry per CPU holding a pointer to the last
// record, and completing it with the next IC-delta, follow the document; the
// first-event record is this design's way of keeping every count within the
// 12-bit field (the alternative, adding the first delta into the next record,
// can exceed it).
//
// Interface: ev_valid_i/ev_ready_o handshake, one event per cycle. The log
// buffer offers its tail address and free space; the table issues up to two
// writes per cycle and tells the buffer how many records it appended (alloc_o).
// ev_ready_o is low while fewer than two records are free.
module instruction_count_table
  import logger_pkg::*;
#(
  parameter int unsigned NCPU   = 16,
  parameter int unsigned LOG_AW = 25
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ev_valid_i,
  input  ict_ev_t           ev_i,
  output logic              ev_ready_o,
  // log buffer
  input  logic [LOG_AW-1:0] tail_i,
  input  logic [LOG_AW:0]   free_i,
  output logic              wr0_en_o,
  output logic [LOG_AW-1:0] wr0_addr_o,
  output log_rec_t          wr0_rec_o,
  output logic              wr0_done_o,
  output logic              wr1_en_o,
  output logic [LOG_AW-1:0] wr1_addr_o,
  output log_rec_t          wr1_rec_o,
  output logic              wr1_done_o,
  output logic [1:0]        alloc_o
);

  typedef struct packed {
    logic              open;
    logic [LOG_AW-1:0] ptr;
    logic              last;
  } entry_t;

  entry_t table_q [NCPU];
  entry_t cur;
  logic   fire;
  logic [LOG_AW-1:0] new_ptr;

  assign ev_ready_o = (free_i >= 2);
  assign fire       = ev_valid_i && ev_ready_o;

  always_comb begin
    cur        = table_q[ev_i.cpu];
    wr0_en_o   = fire;
    wr0_done_o = 1'b1;
    wr1_en_o   = fire;
    wr1_done_o = 1'b0;
    wr1_rec_o  = '{cpu: ev_i.cpu, delta: '0, last: ev_i.last};
    if (cur.open) begin
      wr0_addr_o = cur.ptr;
      wr0_rec_o  = '{cpu: ev_i.cpu, delta: ev_i.delta, last: cur.last};
      new_ptr    = tail_i;
      alloc_o    = fire ? 2'd1 : 2'd0;
    end else begin
      wr0_addr_o = tail_i;
      wr0_rec_o  = '{cpu: ev_i.cpu, delta: ev_i.delta, last: 1'b1};
      new_ptr    = tail_i + 1'b1;
      alloc_o    = fire ? 2'd2 : 2'd0;
    end
    wr1_addr_o = new_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCPU; i++) table_q[i] <= '0;
    end else if (fire) begin
      table_q[ev_i.cpu] <= '{open: 1'b1, ptr: new_ptr, last: ev_i.last};
    end
  end

  initial assert (NCPU <= NCPU_MAX) else $error("instruction_count_table: NCPU too large");

endmodule
