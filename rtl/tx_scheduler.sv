// tx_scheduler: priority transmit scheduler with threshold preemption.
//
// Serves the NPRIO outgoing queues, highest priority first, and drives the
// packet multiplexor word by word: first the modified header words from the
// descriptor, then the remaining payload, which it has the Rx SAR send over
// the payload path (cut-through). PREFETCH header words before the end of
// the header it raises the payload-path selection for the packet's Rx SAR
// (rx_pl_sel), the request to fetch the remaining payload, so the SAR can
// prepare it while the header is still going out.
//
// Preemption: while a packet of priority p is being sent, if a packet of a
// higher priority is waiting and more than THRESH words of the current
// packet remain, the current packet is stopped (its Rx SAR sees the payload
// path's avl fall and holds the rest), parked in a suspended slot one
// priority higher (p+1, at most the top priority) and the waiting packet
// starts in the same cycle. A suspended packet is a candidate at its raised
// priority and, within one priority, is served before the queue; it resumes
// from the next word. A preemption is skipped when the slot it would use is
// occupied. When a packet finishes, pl_done pulses for its Rx SAR and the
// next packet is picked in the following cycle.
//
// Tx SAR side: tx_sop marks a packet's first header word, tx_eop its last
// word, and tx_src names the Rx SAR it came from, which identifies it while
// packets to one Tx SAR are interleaved by preemption.
// Scheduling from the higher priority, the threshold test and the raise by
// one priority are the document's; THRESH, PREFETCH, the suspended slots and
// the sideband signals are this design's.
module tx_scheduler
  import fwd_pkg::*;
#(
  parameter int unsigned THRESH   = 16,
  parameter int unsigned PREFETCH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // outgoing queues
  input  logic [NPRIO-1:0]       oq_empty,
  input  out_desc_t [NPRIO-1:0]  oq_dout,
  output logic [NPRIO-1:0]       oq_pop,
  // to / from the packet multiplexor
  output logic [1:0]             mode,
  output logic [PORT_W-1:0]      tx_port,
  output logic [PORT_W-1:0]      rx_port,
  output logic [31:0]            hdr_word,
  input  logic                   xfer,
  // Rx SAR payload requests and completion
  output logic [NPORTS-1:0]      rx_pl_sel,
  output logic [NPORTS-1:0]      pl_done,
  // Tx SAR sideband
  output logic                   tx_sop,
  output logic                   tx_eop,
  output logic [PORT_W-1:0]      tx_src,
  // event strobes
  output logic                   ev_preempt,
  output logic                   ev_resume
);
  typedef struct packed {
    logic              valid;
    out_desc_t         d;
    logic [3:0]        hdr_pos;
    logic [15:0]       pl_left;
    logic [PRIO_W-1:0] prio;
  } ctx_t;

  ctx_t               act;
  ctx_t [NPRIO-1:0]   susp;

  // ---- candidate selection: highest level, suspended before queued
  logic              cand;
  logic [PRIO_W-1:0] cand_lvl;
  logic              cand_susp;
  always_comb begin
    cand      = 1'b0;
    cand_lvl  = '0;
    cand_susp = 1'b0;
    for (int l = 0; l < NPRIO; l++) begin
      if (susp[l].valid) begin
        cand = 1'b1; cand_lvl = PRIO_W'(l); cand_susp = 1'b1;
      end else if (!oq_empty[l]) begin
        cand = 1'b1; cand_lvl = PRIO_W'(l); cand_susp = 1'b0;
      end
    end
  end

  ctx_t cand_ctx;
  always_comb begin
    if (cand_susp) begin
      cand_ctx = susp[cand_lvl];
    end else begin
      cand_ctx         = '0;
      cand_ctx.valid   = 1'b1;
      cand_ctx.d       = oq_dout[cand_lvl];
      cand_ctx.hdr_pos = '0;
      cand_ctx.pl_left = oq_dout[cand_lvl].pl_nw;
      cand_ctx.prio    = cand_lvl;
    end
  end

  // ---- current word
  logic        in_hdr;
  logic [3:0]  pos_n;
  logic [15:0] left_n;
  logic        last;
  logic [16:0] remain_n;
  logic [PRIO_W-1:0] slot;
  logic        preempt;

  // what goes to the multiplexor depends on the registered context only
  always_comb begin
    in_hdr   = act.hdr_pos < act.d.hdr_nw;
    mode     = !act.valid ? 2'd0 : in_hdr ? 2'd1 : (act.pl_left != 0) ? 2'd2 : 2'd0;
    tx_port  = act.d.tx_port;
    rx_port  = act.d.rx_port;
    tx_src   = act.d.rx_port;
    hdr_word = act.d.w[act.hdr_pos];
  end

  always_comb begin
    pos_n    = act.hdr_pos + 4'((xfer && in_hdr) ? 1 : 0);
    left_n   = act.pl_left - 16'((xfer && !in_hdr) ? 1 : 0);
    last     = act.valid && (pos_n == act.d.hdr_nw) && (left_n == 0);
    tx_sop   = act.valid && in_hdr && (act.hdr_pos == 0);
    tx_eop   = last && xfer;
    remain_n = 17'(act.d.hdr_nw - pos_n) + 17'(left_n);
    slot     = (act.prio == PRIO_W'(NPRIO - 1)) ? act.prio : act.prio + 1'b1;
    preempt  = act.valid && !last && cand && (cand_lvl > act.prio)
               && (remain_n > 17'(THRESH)) && !susp[slot].valid;
    rx_pl_sel = '0;
    if (act.valid && act.pl_left != 0 &&
        (5'(act.d.hdr_nw) - 5'(act.hdr_pos)) <= 5'(PREFETCH))
      rx_pl_sel[act.d.rx_port] = 1'b1;
    pl_done = '0;
    if (last && (xfer || mode == 2'd0)) pl_done[act.d.rx_port] = 1'b1;
    oq_pop = '0;
    if (((!act.valid) || preempt) && cand && !cand_susp) oq_pop[cand_lvl] = 1'b1;
    ev_preempt = preempt;
    ev_resume  = ((!act.valid) || preempt) && cand && cand_susp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= '0;
      for (int l = 0; l < NPRIO; l++) susp[l] <= '0;
    end else if (!act.valid) begin
      if (cand) begin
        act <= cand_ctx;
        if (cand_susp) susp[cand_lvl].valid <= 1'b0;
      end
    end else if (pl_done != '0) begin
      act.valid <= 1'b0;
    end else if (preempt) begin
      susp[slot]         <= act;
      susp[slot].hdr_pos <= pos_n;
      susp[slot].pl_left <= left_n;
      susp[slot].prio    <= slot;
      act <= cand_ctx;
      if (cand_susp) susp[cand_lvl].valid <= 1'b0;
    end else begin
      act.hdr_pos <= pos_n;
      act.pl_left <= left_n;
    end
  end

endmodule
