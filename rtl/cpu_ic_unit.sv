// cpu_ic_unit: the instruction counter each CPU keeps for the logger.
//
// While logging, the unit counts retired instructions since the CPU's previous
// logged transaction; that count is the IC-delta the CPU drives on the bus with
// each transaction. When the 12-bit count is full the CPU holds its next
// instruction and issues a delta-overflow pseudo-transaction (an INVALIDATE of
// a line in the logger's page) carrying the count; a delta request from the
// logger forces the same pseudo-transaction early. During playback the unit is
// loaded with a record's IC-delta, lets the CPU retire exactly that many
// instructions, then holds it and issues the pseudo-transaction to report that
// it is done. These behaviours follow the document.
//
// This design's choices: the count is restarted only by transactions the
// logger will log (tx_counts_i: READ, READ-MODIFY or INVALIDATE on a sharable
// page, known to the CPU from its page tables), so write-backs and private
// traffic need no record; a transaction's delta counts the instructions
// retired before the instruction that caused it; the request for a
// pseudo-transaction (pseudo_req_o) stays up until the bus grants it
// (pseudo_fire_i), which must not coincide with a retire while hold_o is high.
//
// Timing: delta_o is the count at the moment of tx_fire_i/pseudo_fire_i;
// retire_i is only legal while hold_o is low.
module cpu_ic_unit
  import logger_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   play_i,         // 0 = logging, 1 = playback
  // CPU side
  input  logic   retire_i,       // one instruction retired
  input  logic   tx_fire_i,      // CPU transaction on the bus this cycle
  input  logic   tx_counts_i,    // ... and the logger will log it
  output logic   hold_o,         // CPU must not retire
  output delta_t delta_o,        // IC-delta driven on the bus
  // pseudo-transaction (delta overflow / playback done)
  output logic   pseudo_req_o,
  input  logic   pseudo_fire_i,
  // logger side
  input  logic   dreq_i,         // delta request addressed to this CPU
  input  logic   play_start_i,   // playback: run play_count_i instructions
  input  delta_t play_count_i
);

  delta_t count;      // logging: instructions since the last logged transaction
  delta_t remaining;  // playback: instructions still allowed
  logic   running;    // playback: started and not yet reported done
  logic   dreq_pend;

  logic full, play_done;
  assign full      = (count == '1);
  assign play_done = running && (remaining == '0);

  always_comb begin
    if (play_i) begin
      hold_o       = !running || (remaining == '0);
      pseudo_req_o = play_done;
    end else begin
      hold_o       = full;
      pseudo_req_o = full || dreq_pend;
    end
  end
  assign delta_o = count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      remaining <= '0;
      running   <= 1'b0;
      dreq_pend <= 1'b0;
    end else if (play_i) begin
      count     <= '0;
      dreq_pend <= 1'b0;
      if (play_start_i) begin
        remaining <= play_count_i;
        running   <= 1'b1;
      end else begin
        if (retire_i && running && remaining != '0) remaining <= remaining - 1'b1;
        if (pseudo_fire_i && play_done) running <= 1'b0;
      end
    end else begin
      running <= 1'b0;
      if (dreq_i) dreq_pend <= 1'b1;
      if (pseudo_fire_i) begin
        count     <= '0;
        dreq_pend <= 1'b0;
      end else if (tx_fire_i && tx_counts_i) begin
        count <= delta_t'(retire_i);
      end else if (retire_i && !full) begin
        count <= count + 1'b1;
      end
    end
  end

  // the CPU honours hold
  a_hold: assert property (@(posedge clk) disable iff (!rst_n) !(retire_i && hold_o))
    else $error("cpu_ic_unit: instruction retired while held");

endmodule
