// replay_controller: drives deterministic playback from a log.
//
// Records arrive in log order, each naming a CPU and an IC-delta, grouped by a
// "last" marker: all records of a group may run at the same time (a slice of a
// partial-order log; a total-order log has groups of one record). For every
// record the controller starts its CPU with the IC-delta (that CPU's
// instruction counter then lets it run exactly that many instructions) and,
// after the last record of a group, waits until every started CPU has
// reported, by its delta-overflow pseudo-transaction, that it has stopped.
// Only then is the next group taken. Starting the CPU named in a record with
// its IC-delta, waiting for the pseudo-transaction, and running a slice's CPUs
// at once follow the document; the record stream interface and the group
// marker are this design's choices.
//
// Interface: rec_valid_i/rec_ready_o stream, one record per cycle while a group
// is being started; start_o pulses for one cycle with start_cpu_o and
// start_count_o; done_i/done_cpu_i is a pseudo-transaction seen on the bus.
// err_o is set if a record names a CPU that is still running.
module replay_controller
  import logger_pkg::*;
#(
  parameter int unsigned NCPU = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable_i,
  input  logic            rec_valid_i,
  input  log_rec_t        rec_i,
  output logic            rec_ready_o,
  output logic            start_o,
  output cpu_t            start_cpu_o,
  output delta_t          start_count_o,
  input  logic            done_i,
  input  cpu_t            done_cpu_i,
  output logic [NCPU-1:0] running_o,
  output logic [31:0]     groups_o,
  output logic            err_o
);

  typedef enum logic {ST_ISSUE, ST_WAIT} state_e;
  state_e          state;
  logic [NCPU-1:0] running, done_mask;
  logic            take;

  assign rec_ready_o = enable_i && (state == ST_ISSUE);
  assign take        = rec_valid_i && rec_ready_o;
  assign running_o   = running;

  always_comb begin
    done_mask = '0;
    if (done_i) done_mask[done_cpu_i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_ISSUE;
      running       <= '0;
      start_o       <= 1'b0;
      start_cpu_o   <= '0;
      start_count_o <= '0;
      groups_o      <= '0;
      err_o         <= 1'b0;
    end else begin
      start_o <= take;
      if (take) begin
        start_cpu_o   <= rec_i.cpu;
        start_count_o <= rec_i.delta;
        if (running[rec_i.cpu] && !done_mask[rec_i.cpu]) err_o <= 1'b1;
      end
      running <= (running & ~done_mask) | (take ? (NCPU'(1) << rec_i.cpu) : '0);
      case (state)
        ST_ISSUE: if (take && rec_i.last) state <= ST_WAIT;
        default:  if (!start_o && (running & ~done_mask) == '0) begin
                    state    <= ST_ISSUE;
                    groups_o <= groups_o + 1;
                  end
      endcase
    end
  end

endmodule
