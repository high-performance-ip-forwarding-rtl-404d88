// pkt_classifier: phase 5 of the lookup pipeline, packet classification.
//
// Puts each modified header into the outgoing queue chosen by its DS code
// point, in two clock cycles (2T, the document's figure): cycle 1 maps the
// DS code to a priority (ds_to_prio in fwd_pkg: class selector 5-7 -> 3,
// 3-4 -> 2, 1-2 -> 1, 0 -> 0; packets on the control/error path get the
// highest priority), cycle 2 writes the descriptor into that queue. If the
// queue is full the write waits and the unit takes no new header. The
// document says only that the queue is chosen by the DS code; the mapping
// and the treatment of control packets are this design's.
module pkt_classifier
  import fwd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  out_desc_t         in_d,
  // output queues
  input  logic [NPRIO-1:0]  oq_full,
  output logic [NPRIO-1:0]  oq_push,
  output out_desc_t         oq_din
);
  logic [1:0]        cnt;    // 0 idle, 1 mapping, 2 writing
  out_desc_t         d;
  logic [PRIO_W-1:0] prio;

  assign in_ready = (cnt == 2'd0);
  assign oq_din   = d;

  always_comb begin
    oq_push = '0;
    if (cnt == 2'd2 && !oq_full[prio]) oq_push[prio] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      unique case (cnt)
        2'd0:    if (in_valid) cnt <= 2'd1;
        2'd1:    cnt <= 2'd2;
        default: if (!oq_full[prio]) cnt <= 2'd0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cnt == 2'd0 && in_valid) d <= in_d;
    if (cnt == 2'd1) prio <= d.exc ? PRIO_W'(NPRIO - 1) : ds_to_prio(d.ds);
  end

endmodule
