// event_buffer: FIFO of events between the bus and the partial-order scheduler.
//
// The scheduler takes at most one event per 6-microcycle time step and stalls
// while a slice is being written out, so bursts of bus events wait here. Up to
// two events enter per cycle (an overlapped write-update and its read miss,
// push0 first) and one leaves. The document names the buffer and its role;
// the depth, the two-entry push and the sticky overflow flag are this design's
// choices. The bus cannot be held off, so an event that finds the buffer full
// is lost and overflow_o is set until reset.
//
// Timing: a pushed event is visible at the output the next cycle
// (empty_o low); pop_i removes the head in the same cycle it is acknowledged.
module event_buffer
  import logger_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push0_i,
  input  event_t ev0_i,
  input  logic   push1_i,
  input  event_t ev1_i,
  input  logic   pop_i,
  output event_t head_o,
  output logic   empty_o,
  output logic   overflow_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  event_t               mem [DEPTH];
  logic [AW-1:0]        rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic do_pop, acc0, acc1;
  logic [$clog2(DEPTH+1)-1:0] space;

  always_comb begin
    do_pop = pop_i && (count != 0);
    space  = ($clog2(DEPTH+1))'(DEPTH) - count;
    acc0   = push0_i && (space != 0);
    acc1   = push1_i && (space > (acc0 ? 1 : 0));
  end

  always_ff @(posedge clk) begin
    if (acc0) mem[wr_ptr] <= ev0_i;
    if (acc1) mem[acc0 ? AW'(wr_ptr + 1'b1) : wr_ptr] <= ev1_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      count      <= '0;
      overflow_o <= 1'b0;
    end else begin
      wr_ptr <= AW'(wr_ptr + acc0 + acc1);
      rd_ptr <= AW'(rd_ptr + do_pop);
      count  <= count + acc0 + acc1 - do_pop;
      if ((push0_i && !acc0) || (push1_i && !acc1)) overflow_o <= 1'b1;
    end
  end

  assign head_o  = mem[rd_ptr];
  assign empty_o = (count == 0);
  assign count_o = count;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("event_buffer: DEPTH must be a power of two");

endmodule
