// log_buffer: RAM ring holding log records until they go to the logging disk.
//
// Records are appended at the tail by the instruction count table, most of
// them still open (their IC-delta comes with the CPU's next event) and are
// completed later by a patch write. Completed records leave from the head, in
// order, through the disk port. An open record at the head blocks the drain;
// if the buffer is then nearly full, the buffer asks the logger's bus master
// to send a delta request to that record's CPU, whose delta-overflow reply
// completes the record. Holding records in a RAM ring, draining completed ones
// to disk, and the delta request follow the document; the default depth is
// its 64 MB buffer of 2-byte records. The request threshold (REQ_FREE free
// records) and the one-request-per-head rule are this design's choices. The
// threshold must leave room for every event that can reach the log before the
// reply does: in the partial-order logger that is up to NSLICE*NCPU events in
// the scheduler plus the event buffer, so the default of 4096 covers 16 CPUs
// and 16 slices many times over. Also this design's choice is
// flush_i: at the end of logging, once every CPU has stopped after a final
// delta-overflow pseudo-transaction, each CPU's last record is still open and
// covers no instructions; flush lets these leave with their IC-delta of 0.
//
// Interface: two write ports (append or patch) plus alloc_i, the number of
// records appended this cycle at tail_o and tail_o+1; free_o counts free
// slots. The disk port is a valid/ready stream. dreq_valid_o stays high until
// dreq_ready_i; no further request is made until the head record leaves.
module log_buffer
  import logger_pkg::*;
#(
  parameter int unsigned DEPTH    = 33554432,
  parameter int unsigned REQ_FREE = 4096,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // end of logging: open records leave as they are (IC-delta 0)
  input  logic          flush_i,
  // instruction count table side
  input  logic          wr0_en_i,
  input  logic [AW-1:0] wr0_addr_i,
  input  log_rec_t      wr0_rec_i,
  input  logic          wr0_done_i,
  input  logic          wr1_en_i,
  input  logic [AW-1:0] wr1_addr_i,
  input  log_rec_t      wr1_rec_i,
  input  logic          wr1_done_i,
  input  logic [1:0]    alloc_i,
  output logic [AW-1:0] tail_o,
  output logic [AW:0]   free_o,
  // logging disk
  output logic          disk_valid_o,
  output log_rec_t      disk_rec_o,
  input  logic          disk_ready_i,
  // delta request to the CPU owning the open head record
  output logic          dreq_valid_o,
  output cpu_t          dreq_cpu_o,
  input  logic          dreq_ready_i,
  output logic [AW:0]   count_o
);

  typedef struct packed {
    log_rec_t rec;
    logic     done;
  } slot_t;

  slot_t         mem [DEPTH];
  logic [AW-1:0] head, tail;
  logic [AW:0]   count;
  logic          head_req_sent;
  slot_t         head_slot;
  logic          drain;

  always_ff @(posedge clk) begin
    if (wr0_en_i) mem[wr0_addr_i] <= '{rec: wr0_rec_i, done: wr0_done_i};
    if (wr1_en_i) mem[wr1_addr_i] <= '{rec: wr1_rec_i, done: wr1_done_i};
  end

  assign head_slot    = mem[head];
  assign disk_valid_o = (count != 0) && (head_slot.done || flush_i);
  assign disk_rec_o   = head_slot.rec;
  assign drain        = disk_valid_o && disk_ready_i;

  assign tail_o  = tail;
  assign free_o  = (AW+1)'(DEPTH) - count;
  assign count_o = count;

  assign dreq_cpu_o   = head_slot.rec.cpu;
  assign dreq_valid_o = (count != 0) && !head_slot.done && !head_req_sent &&
                        (free_o < (AW+1)'(REQ_FREE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head          <= '0;
      tail          <= '0;
      count         <= '0;
      head_req_sent <= 1'b0;
    end else begin
      head  <= head + AW'(drain);
      tail  <= tail + AW'(alloc_i);
      count <= count + (AW+1)'(alloc_i) - (AW+1)'(drain);
      if (drain)                             head_req_sent <= 1'b0;
      else if (dreq_valid_o && dreq_ready_i) head_req_sent <= 1'b1;
    end
  end

  // The table must never append past the free space it was offered.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (AW+1)'(alloc_i) <= free_o)
    else $error("log_buffer: append beyond free space");

  initial assert ((DEPTH & (DEPTH - 1)) == 0 && REQ_FREE < DEPTH)
    else $error("log_buffer: DEPTH must be a power of two larger than REQ_FREE");

endmodule
