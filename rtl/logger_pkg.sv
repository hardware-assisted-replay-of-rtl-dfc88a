// logger_pkg: types and constants shared by the multiprocessor replay logger.
//
// The logger snoops a shared-memory bus and records, for every loggable
// cache-to-memory transaction, which CPU issued it and how many instructions
// that CPU executed since its previous logged transaction (the IC-delta).
// A log record is 2 bytes on the disk: a 4-bit CPU number and a 12-bit IC-delta,
// both widths as given for the 16-processor machine. Inside the logger each
// record also carries a one-bit group marker ("last"): a group is the set of
// records that may be replayed at the same time (a slice of the partial-order
// schedule, or a single record of the total-order schedule). The marker, the
// 32-bit physical address, the 16-byte line and the 4 KB page are this design's
// own choices.
package logger_pkg;

  localparam int unsigned NCPU_MAX  = 16;
  localparam int unsigned CPU_W     = 4;     // CPU number in a record
  localparam int unsigned DELTA_W   = 12;    // IC-delta in a record and on the bus
  localparam int unsigned ADDR_W    = 32;    // physical byte address
  localparam int unsigned LINE_OFS  = 4;     // 16-byte cache line
  localparam int unsigned PAGE_OFS  = 12;    // 4 KB page
  localparam int unsigned LINE_W    = ADDR_W - LINE_OFS;  // line address width
  localparam int unsigned PAGE_W    = ADDR_W - PAGE_OFS;  // page number width

  // Page owned by the logger. An INVALIDATE of a line in it is a pseudo
  // transaction: from a CPU it is a delta overflow, from the logger (line
  // number = target CPU) it is a delta request.
  localparam logic [PAGE_W-1:0] LOGGER_PAGE = '1;

  typedef logic [CPU_W-1:0]   cpu_t;
  typedef logic [DELTA_W-1:0] delta_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LINE_W-1:0]  line_t;

  // Bus transaction types of the snooping write-back cache protocol.
  typedef enum logic [2:0] {
    BUS_READ          = 3'd0,  // R  : read miss
    BUS_READ_MODIFY   = 3'd1,  // W  : write miss
    BUS_INVALIDATE    = 3'd2,  // Wi : write hit to a shared line
    BUS_WRITE_REPLACE = 3'd3,  // Wr : capacity write-back
    BUS_WRITE_UPDATE  = 3'd4   // Wu : coherency write-back
  } bus_op_e;

  // One snooped bus transaction.
  typedef struct packed {
    cpu_t    cpu;
    bus_op_e op;
    addr_t   addr;
    delta_t  delta;
  } bus_tx_t;

  // An event as seen by the scheduler and the instruction count table.
  typedef struct packed {
    cpu_t   cpu;
    line_t  line;
    delta_t delta;
    logic   modify;     // write to the line (READ-MODIFY, INVALIDATE, write-back)
    logic   writeback;  // enters the scheduler only, never the log
    logic   pseudo;     // delta overflow: no address dependence
  } event_t;

  // A log record: CPU number, IC-delta and the group marker.
  typedef struct packed {
    cpu_t   cpu;
    delta_t delta;
    logic   last;
  } log_rec_t;

  // An event handed to the instruction count table.
  typedef struct packed {
    cpu_t   cpu;
    delta_t delta;
    logic   last;       // closes a replay group
  } ict_ev_t;

endpackage
