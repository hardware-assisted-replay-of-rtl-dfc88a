// po_scheduler: the partial-order scheduler, a circular queue of slices run
// in SIMD fashion by a six-microcycle microprogram.
//
// Each slice has a lookup register (LR), a virtual presence register (VPR,
// one bit per CPU), control flags, and an associative memory with one entry per
// CPU (line address, IC-delta, modify flag, match flag). Events are loaded
// into the LR of the tail slice and percolate one slice per time step toward
// the head. An event of CPU p stops at slice k, and is stored in the slice to
// its right (k+1, the slice it came from), when
//   * VPR[k][p] is set: p already has an event in slice k or later, or k is
//     the slice left of the head, whose VPR is held at all ones; or
//   * slice k holds an event to the same line that conflicts: any event if
//     the searching one writes, a write if it reads.
// A stored event then sends a "set-vp" bit leftward, one slice per step, which
// sets p's VPR bit in every slice it crosses until it meets one already set;
// later events of p travel behind that wave and so never overtake it. The
// result: an event depends only on events in earlier slices, and the slices
// can be replayed one after another, each with all its CPUs in parallel.
//
// Microcycles of one time step (after the document's microprogram):
//   0  load the next event into the tail LR (search=1, set-vp=0)
//   1  searching LR: present <= VPR[cpu];  wave LR: stop if VPR[cpu] set
//   2  searching & present: store; searching: match line in the memory;
//      wave LR: set VPR[cpu]
//   3  searching: store if a conflicting matched entry exists
//   4  storing LR: write the event into the next slice to the right, set its
//      VPR bits, become a wave; tail moves right if the tail slice was filled
//   5  all LRs shift one slice left; the head slice may be written out
// Forwarding (consecutive dependent events): in microcycle 4 a searching LR
// in the slice that receives a store checks itself against the stored event
// and, on a conflict, is stored one slice further right (the tail may then
// move by two). Reads and writes, VPR, the sentinel slice left of the head,
// forwarding and the tail/head rules follow the document. These are this
// design's choices: the head is written out when a wave reaches it, when
// fewer than four free slices remain past the tail (overflow), or on flush;
// no write-out happens while a searching LR sits in the head slice; a load is
// refused (stall) while fewer than four free slices remain; write-back and
// pseudo (delta overflow) events are stored like others, pseudo events never
// match an address.
//
// Output: one entry per cycle from a holding register that receives the whole
// head slice when it is written out; last_o marks the final entry of a slice
// that is not a write-back, seq_o numbers the slices. The queue stalls while
// the holding register is still busy with the previous slice.
module po_scheduler
  import logger_pkg::*;
#(
  parameter int unsigned NSLICE = 16,
  parameter int unsigned NCPU   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the event buffer
  input  logic        ev_avail_i,
  input  event_t      ev_i,
  output logic        ev_pop_o,
  // flush: write out every slice once no event is in flight
  input  logic        flush_i,
  // schedule output
  output logic        out_valid_o,
  output cpu_t        out_cpu_o,
  output delta_t      out_delta_o,
  output logic        out_wb_o,
  output logic        out_last_o,
  output logic [15:0] out_seq_o,
  input  logic        out_ready_i,
  // status
  output logic        idle_o,        // no event in the queue or the holder
  output logic        stall_o,       // event waiting, load refused
  output logic        fwd_o,         // a forwarded store happened
  output logic        retire_o,      // head slice written out
  output logic        ovf_retire_o,  // ... because of queue overflow
  output logic        err_o          // tail ran into the head (never expected)
);

  localparam int unsigned SW = $clog2(NSLICE);
  typedef logic [SW-1:0] sidx_t;

  typedef struct packed {
    logic   valid;
    logic   search;
    logic   set_vp;
    event_t ev;
  } lr_t;

  // slice state
  lr_t             lr      [NSLICE];
  logic [NCPU-1:0] vpr     [NSLICE];
  logic [NCPU-1:0] mem_v   [NSLICE];
  logic [NCPU-1:0] mem_mod [NSLICE];
  logic [NCPU-1:0] mem_wb  [NSLICE];
  logic [NCPU-1:0] mem_ps  [NSLICE];
  line_t           mem_line  [NSLICE][NCPU];
  delta_t          mem_delta [NSLICE][NCPU];
  logic            present [NSLICE];
  logic            store   [NSLICE];
  logic [NCPU-1:0] match   [NSLICE];

  sidx_t      head, tail;
  logic [2:0] uc;
  logic       retire_req;

  // holding register for the slice being written out
  logic [NCPU-1:0] h_v, h_wb;
  delta_t          h_delta [NCPU];
  logic [15:0]     seq;

  function automatic sidx_t inc(sidx_t a, int unsigned n);
    return sidx_t'((int'(a) + n) % NSLICE);
  endfunction

  function automatic logic conflicts(event_t a, event_t b);
    return (a.cpu == b.cpu) ||
           (!a.pseudo && !b.pseudo && a.line == b.line && (a.modify || b.modify));
  endfunction

  sidx_t sentinel;
  int unsigned free_slices;  // free slices strictly between tail and sentinel
  assign sentinel    = inc(head, NSLICE - 1);
  assign free_slices = (int'(sentinel) - int'(tail) - 1 + NSLICE) % NSLICE;

  // live[k]: slice k lies in the ring between the sentinel and the tail
  logic live [NSLICE];
  always_comb begin
    for (int k = 0; k < NSLICE; k++)
      live[k] = ((k - int'(sentinel) + NSLICE) % NSLICE) <=
                ((int'(tail) - int'(sentinel) + NSLICE) % NSLICE);
  end

  // microcycle 4: final store decision with forwarding, in ring order from
  // the sentinel to the tail
  logic fstore [NSLICE];
  logic fwd_hit [NSLICE];
  always_comb begin
    for (int k = 0; k < NSLICE; k++) begin
      fstore[k]  = 1'b0;
      fwd_hit[k] = 1'b0;
    end
    for (int i = 0; i < NSLICE; i++) begin
      automatic int k = (int'(sentinel) + i) % NSLICE;
      automatic int p = (k + NSLICE - 1) % NSLICE;
      if (lr[k].valid && store[k]) fstore[k] = 1'b1;
      else if (i > 0 && lr[k].valid && lr[k].search && fstore[p] &&
               conflicts(lr[p].ev, lr[k].ev)) begin
        fstore[k]  = 1'b1;
        fwd_hit[k] = 1'b1;
      end
    end
  end

  // any searching LR in the head slice blocks a write-out
  logic head_searching, any_lr, can_load, do_retire, wave_at_head;
  always_comb begin
    any_lr = 1'b0;
    for (int k = 0; k < NSLICE; k++) any_lr |= lr[k].valid;
    head_searching = lr[head].valid && lr[head].search;
    wave_at_head   = lr[head].valid && lr[head].set_vp;
    can_load  = (free_slices >= 4);
    do_retire = (uc == 3'd5) && (head != tail) && (h_v == '0) && !head_searching &&
                (retire_req || wave_at_head || free_slices < 4 ||
                 (flush_i && !any_lr && !ev_avail_i));
  end

  assign ev_pop_o = (uc == 3'd0) && ev_avail_i && can_load;
  assign stall_o  = (uc == 3'd0) && ev_avail_i && !can_load;
  assign idle_o   = !any_lr && (h_v == '0) && (head == tail);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uc         <= '0;
      head       <= sidx_t'(1);
      tail       <= sidx_t'(1);
      retire_req <= 1'b0;
      err_o      <= 1'b0;
      fwd_o      <= 1'b0;
      retire_o   <= 1'b0;
      ovf_retire_o <= 1'b0;
      for (int k = 0; k < NSLICE; k++) begin
        lr[k]      <= '0;
        vpr[k]     <= (k == 0) ? '1 : '0;
        mem_v[k]   <= '0;
        mem_mod[k] <= '0;
        mem_wb[k]  <= '0;
        mem_ps[k]  <= '0;
        present[k] <= 1'b0;
        store[k]   <= 1'b0;
        match[k]   <= '0;
      end
    end else begin
      uc       <= (uc == 3'd5) ? 3'd0 : uc + 3'd1;
      fwd_o    <= 1'b0;
      retire_o <= 1'b0;
      ovf_retire_o <= 1'b0;
      case (uc)
        3'd0: begin
          for (int k = 0; k < NSLICE; k++) store[k] <= 1'b0;
          if (ev_pop_o) lr[tail] <= '{valid: 1'b1, search: 1'b1, set_vp: 1'b0, ev: ev_i};
        end
        3'd1: begin
          for (int k = 0; k < NSLICE; k++) if (lr[k].valid) begin
            if (lr[k].search) present[k] <= vpr[k][lr[k].ev.cpu];
            if (lr[k].set_vp && vpr[k][lr[k].ev.cpu]) lr[k].set_vp <= 1'b0;
          end
        end
        3'd2: begin
          for (int k = 0; k < NSLICE; k++) if (lr[k].valid) begin
            if (lr[k].search && present[k]) begin
              store[k]      <= 1'b1;
              lr[k].search  <= 1'b0;
            end
            if (lr[k].search && !present[k])
              for (int i = 0; i < NCPU; i++)
                match[k][i] <= mem_v[k][i] && !mem_ps[k][i] && !lr[k].ev.pseudo &&
                               (mem_line[k][i] == lr[k].ev.line);
            else
              match[k] <= '0;
            if (lr[k].set_vp) vpr[k][lr[k].ev.cpu] <= 1'b1;
          end
        end
        3'd3: begin
          for (int k = 0; k < NSLICE; k++) if (lr[k].valid && lr[k].search) begin
            if ((match[k] & (mem_mod[k] | {NCPU{lr[k].ev.modify}})) != '0) begin
              store[k]     <= 1'b1;
              lr[k].search <= 1'b0;
            end
          end
        end
        3'd4: begin
          for (int k = 0; k < NSLICE; k++) if (fstore[k]) begin
            automatic int n = (k + 1) % NSLICE;
            automatic int c = int'(lr[k].ev.cpu);
            mem_v[n][c]     <= 1'b1;
            mem_mod[n][c]   <= lr[k].ev.modify;
            mem_wb[n][c]    <= lr[k].ev.writeback;
            mem_ps[n][c]    <= lr[k].ev.pseudo;
            mem_line[n][c]  <= lr[k].ev.line;
            mem_delta[n][c] <= lr[k].ev.delta;
            vpr[n][c]       <= 1'b1;
            vpr[k][c]       <= 1'b1;
            lr[k].search    <= 1'b0;
            lr[k].set_vp    <= 1'b1;
            if (fwd_hit[k]) fwd_o <= 1'b1;
          end
          if (fstore[tail])                tail <= inc(tail, 2);
          else if (fstore[inc(tail, NSLICE - 1)]) tail <= inc(tail, 1);
        end
        default: begin  // 5: shift left, write out the head slice
          for (int k = 0; k < NSLICE; k++) begin
            automatic int s = (k + 1) % NSLICE;
            automatic lr_t nx = lr[s];
            // an LR that has finished searching and carries no wave is dead
            if (!nx.search && !nx.set_vp) nx.valid = 1'b0;
            // nothing lives left of the sentinel
            if (k == int'(sentinel) && do_retire) nx.valid = 1'b0;
            if (!live[k] || s == int'(sentinel)) nx.valid = 1'b0;
            lr[k] <= nx;
          end
          if (wave_at_head && !do_retire) retire_req <= 1'b1;
          if (do_retire) begin
            retire_req    <= 1'b0;
            retire_o      <= 1'b1;
            ovf_retire_o  <= (free_slices < 4);
            mem_v[head]   <= '0;
            vpr[head]     <= '1;     // new sentinel
            vpr[sentinel] <= '0;     // old sentinel becomes free
            head          <= inc(head, 1);
          end
          if (inc(tail, 1) == sentinel || tail == sentinel) err_o <= 1'b1;
        end
      endcase
    end
  end

  // holding register: drain one entry per cycle, lowest CPU first
  logic [NCPU-1:0] h_first, h_rest, h_nonwb;
  int unsigned     h_idx;
  always_comb begin
    h_idx = 0;
    for (int i = NCPU - 1; i >= 0; i--) if (h_v[i]) h_idx = i;
    h_first = '0;
    h_first[h_idx] = h_v[h_idx];
    h_rest  = h_v & ~h_first;
    h_nonwb = h_rest & ~h_wb;
  end

  assign out_valid_o = (h_v != '0);
  assign out_cpu_o   = cpu_t'(h_idx);
  assign out_delta_o = h_delta[h_idx];
  assign out_wb_o    = h_wb[h_idx];
  assign out_last_o  = !h_wb[h_idx] && (h_nonwb == '0);
  assign out_seq_o   = seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_v  <= '0;
      h_wb <= '0;
      seq  <= '0;
    end else if (do_retire) begin
      h_v  <= mem_v[head];
      h_wb <= mem_wb[head];
      for (int i = 0; i < NCPU; i++) h_delta[i] <= mem_delta[head][i];
      seq  <= seq + 16'd1;
    end else if (out_valid_o && out_ready_i) begin
      h_v <= h_rest;
    end
  end

  initial assert (NSLICE >= 8 && (NSLICE & (NSLICE - 1)) == 0 && NCPU <= NCPU_MAX)
    else $error("po_scheduler: NSLICE must be a power of two >= 8, NCPU <= 16");

endmodule
