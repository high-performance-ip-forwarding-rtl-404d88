// ip_fwd_engine: forwarding engine of an ATM-based gigabit router.
//
// Four Rx SAR controllers reassemble IP packets arriving from four
// 622 Mbit/s ATM switch ports. The engine fetches only each packet's header
// chunk over a shared header path, processes it in a five-phase pipeline
// and then sends the modified header to a Tx SAR, followed by the payload,
// which it has the Rx SAR send over a separate payload path and passes
// through without storing it (cut-through). The phases, each holding one
// header and handing it on when the next is free, are
//   1  hdr_verify     header analysis and verification           3T
//   2  lookup_ctrl    L3 longest-prefix / label exact-match lookup
//                     in the external CAM routing coprocessor     50 ns + 3T
//   3  lib_fetch      label information fetch (2 x 32-bit reads)  4T
//   4  hdr_modify     header modification                        3T
//   5  pkt_classifier classification into DS priority queues     2T
// with T = 10 ns at 100 MHz: 200 ns per header, and one header every 80 ns
// through phase 2, the slowest. Control and failed packets skip phases 2-3
// through exc_ctrl; the routing control processor fills the forwarding table
// (CAM) and the label information table (lib_sram) through fwd_mgr.
//
// Interfaces (all synchronous to clk; UTOPIA-style: a word moves when the
// slave's avl is high and the master's active-low en_n is low):
//   Rx SAR i   rx_arrived[i] packet waiting; rx_avl[i], rx_en_n[i];
//              rx_sel_pl[i] selection control (0 header path, 1 payload
//              path; raised early as the payload request); shared header
//              bus rx_hdr_data/len/encap and payload bus rx_pl_data.
//   Tx SAR i   tx_avl[i], tx_en_n[i]; shared tx_data with tx_sop, tx_eop
//              and tx_src (the Rx SAR the packet came from).
//   CAM        cam_req/op/addr/data out; cam_done, cam_hit, cam_index in.
//   host       one forwarding-information command per host_valid/ready.
// The architecture, phase times and interfaces follow the document; queue
// depths, the preemption threshold and the exception port are this design's
// parameters.
module ip_fwd_engine
  import fwd_pkg::*;
#(
  parameter int unsigned       HQ_DEPTH  = 1,
  parameter int unsigned       EXC_DEPTH = 2,
  parameter int unsigned       OQ_DEPTH  = 4,
  parameter int unsigned       THRESH    = 16,
  parameter int unsigned       PREFETCH  = 2,
  parameter logic [PORT_W-1:0] EXC_PORT  = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Rx SARs
  input  logic [NPORTS-1:0]      rx_arrived,
  output logic [NPORTS-1:0]      rx_avl,
  input  logic [NPORTS-1:0]      rx_en_n,
  output logic [NPORTS-1:0]      rx_sel_pl,
  input  logic [31:0]            rx_hdr_data,
  input  logic [15:0]            rx_hdr_len,
  input  logic [1:0]             rx_hdr_encap,
  input  logic [31:0]            rx_pl_data,
  // Tx SARs
  output logic [NPORTS-1:0]      tx_avl,
  input  logic [NPORTS-1:0]      tx_en_n,
  output logic [31:0]            tx_data,
  output logic                   tx_sop,
  output logic                   tx_eop,
  output logic [PORT_W-1:0]      tx_src,
  // CAM routing coprocessor
  output logic                   cam_req,
  output logic [1:0]             cam_op,
  output logic [CAM_IDX_W-1:0]   cam_addr,
  output logic [63:0]            cam_data,
  input  logic                   cam_done,
  input  logic                   cam_hit,
  input  logic [CAM_IDX_W-1:0]   cam_index,
  // routing control processor
  input  logic                   host_valid,
  output logic                   host_ready,
  input  logic [1:0]             host_cmd,
  input  logic [CAM_IDX_W-1:0]   host_index,
  input  logic [31:0]            host_addr,
  input  logic [5:0]             host_plen,
  input  logic [63:0]            host_data
);
  // ---------------- header fetch and header queues
  logic [NPORTS-1:0]  hf_avl, pl_done, hq_push, hq_full, hq_empty, hq_pop;
  hdr_rec_t           hq_din;
  hdr_rec_t           hq_dout [NPORTS];
  logic [NPORTS-1:0]  pl_busy;

  header_fetcher u_fetch (
    .clk, .rst_n,
    .rx_arrived,
    .rx_avl    (hf_avl),
    .rx_en_n,
    .hdr_data  (rx_hdr_data),
    .hdr_len   (rx_hdr_len),
    .hdr_encap (encap_e'(rx_hdr_encap)),
    .pl_done,
    .hq_full,
    .hq_push,
    .hq_din,
    .pl_busy
  );

  for (genvar i = 0; i < NPORTS; i++) begin : g_hq
    sync_fifo #(.T(hdr_rec_t), .DEPTH(HQ_DEPTH)) u_hq (
      .clk, .rst_n,
      .push (hq_push[i]), .din (hq_din),
      .pop  (hq_pop[i]),  .dout (hq_dout[i]),
      .full (hq_full[i]), .empty (hq_empty[i]),
      .count ()
    );
  end

  // ---------------- phase 1
  logic              hq_valid, p1_in_ready;
  logic [PORT_W-1:0] hq_grant;
  p1_t               p1;
  logic              p1_valid, p1_ready, p1_good;

  rr_select #(.N(NPORTS)) u_rr (
    .clk, .rst_n,
    .req   (~hq_empty),
    .take  (p1_in_ready),
    .valid (hq_valid),
    .grant (hq_grant)
  );

  always_comb begin
    hq_pop = '0;
    if (hq_valid && p1_in_ready) hq_pop[hq_grant] = 1'b1;
  end

  hdr_verify u_p1 (
    .clk, .rst_n,
    .in_valid  (hq_valid),
    .in_ready  (p1_in_ready),
    .in_hdr    (hq_dout[hq_grant]),
    .out_valid (p1_valid),
    .out_ready (p1_ready),
    .out_p     (p1)
  );

  // good headers go to the lookup, control/error headers past it
  logic p2_in_ready, xa_ready;
  assign p1_good  = (p1.exc == X_NONE);
  assign p1_ready = p1_good ? p2_in_ready : xa_ready;

  // ---------------- phase 2
  p2_t     p2;
  p1_t     miss_p;
  logic    p2_valid, p2_ready, miss_valid, miss_ready;
  logic    lk_req, lk_busy;
  cam_op_e lk_op, mgr_cam_op;
  logic [63:0] lk_key;

  lookup_ctrl u_p2 (
    .clk, .rst_n,
    .in_valid   (p1_valid && p1_good),
    .in_ready   (p2_in_ready),
    .in_p       (p1),
    .cam_req    (lk_req),
    .cam_op     (lk_op),
    .cam_key    (lk_key),
    .cam_done,
    .cam_hit,
    .cam_index,
    .cam_busy   (lk_busy),
    .out_valid  (p2_valid),
    .out_ready  (p2_ready),
    .out_q      (p2),
    .miss_valid,
    .miss_ready,
    .miss_p
  );

  // ---------------- control / error packets
  p1_t  xp;
  logic x_valid, x_ready;

  exc_ctrl #(.DEPTH(EXC_DEPTH)) u_exc (
    .clk, .rst_n,
    .a_valid   (p1_valid && !p1_good),
    .a_ready   (xa_ready),
    .a_p       (p1),
    .b_valid   (miss_valid),
    .b_ready   (miss_ready),
    .b_p       (miss_p),
    .out_valid (x_valid),
    .out_ready (x_ready),
    .out_p     (xp)
  );

  // ---------------- phase 3 and the label information table
  p3_t                   p3;
  logic                  p3_valid, p3_ready;
  logic                  lf_rd, sram_rd, sram_wr;
  logic [LIB_ADDR_W-1:0] lf_addr, sram_addr;
  logic [31:0]           sram_rdata, sram_wdata;

  lib_fetch u_p3 (
    .clk, .rst_n,
    .in_valid   (p2_valid),
    .in_ready   (p2_ready),
    .in_q       (p2),
    .sram_rd    (lf_rd),
    .sram_addr  (lf_addr),
    .sram_rdata (sram_rdata),
    .out_valid  (p3_valid),
    .out_ready  (p3_ready),
    .out_r      (p3)
  );

  lib_sram #(.AW(LIB_ADDR_W)) u_lib (
    .clk,
    .rd    (sram_rd),
    .wr    (sram_wr),
    .addr  (sram_addr),
    .wdata (sram_wdata),
    .rdata (sram_rdata)
  );

  fwd_mgr u_mgr (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_cmd, .host_index,
    .host_addr, .host_plen, .host_data,
    .lk_req, .lk_op, .lk_key, .lk_busy,
    .cam_req,
    .cam_op     (mgr_cam_op),
    .cam_addr,
    .cam_data,
    .lf_rd, .lf_addr,
    .sram_rd, .sram_wr, .sram_addr, .sram_wdata
  );
  assign cam_op = mgr_cam_op;

  // ---------------- phase 4
  out_desc_t p4;
  logic      p4_valid, p4_ready;

  hdr_modify #(.EXC_PORT(EXC_PORT)) u_p4 (
    .clk, .rst_n,
    .in_valid  (p3_valid),
    .in_ready  (p3_ready),
    .in_r      (p3),
    .exc_valid (x_valid),
    .exc_ready (x_ready),
    .exc_p     (xp),
    .out_valid (p4_valid),
    .out_ready (p4_ready),
    .out_d     (p4)
  );

  // ---------------- phase 5 and the outgoing queues
  logic [NPRIO-1:0]      oq_push, oq_full, oq_empty, oq_pop;
  out_desc_t             oq_din;
  out_desc_t [NPRIO-1:0] oq_dout;

  pkt_classifier u_p5 (
    .clk, .rst_n,
    .in_valid (p4_valid),
    .in_ready (p4_ready),
    .in_d     (p4),
    .oq_full,
    .oq_push,
    .oq_din
  );

  for (genvar q = 0; q < NPRIO; q++) begin : g_oq
    sync_fifo #(.T(out_desc_t), .DEPTH(OQ_DEPTH)) u_oq (
      .clk, .rst_n,
      .push (oq_push[q]), .din (oq_din),
      .pop  (oq_pop[q]),  .dout (oq_dout[q]),
      .full (oq_full[q]), .empty (oq_empty[q]),
      .count ()
    );
  end

  // ---------------- scheduler and multiplexor
  logic [1:0]        mode;
  logic [PORT_W-1:0] s_tx_port, s_rx_port;
  logic [31:0]       hdr_word;
  logic              xfer, ev_preempt, ev_resume;
  logic [NPORTS-1:0] mux_rx_avl;

  tx_scheduler #(.THRESH(THRESH), .PREFETCH(PREFETCH)) u_sched (
    .clk, .rst_n,
    .oq_empty, .oq_dout, .oq_pop,
    .mode,
    .tx_port  (s_tx_port),
    .rx_port  (s_rx_port),
    .hdr_word,
    .xfer,
    .rx_pl_sel (rx_sel_pl),
    .pl_done,
    .tx_sop, .tx_eop, .tx_src,
    .ev_preempt, .ev_resume
  );

  pkt_mux u_mux (
    .mode,
    .tx_port    (s_tx_port),
    .rx_port    (s_rx_port),
    .hdr_word,
    .tx_avl,
    .tx_en_n,
    .tx_data,
    .rx_pl_avl  (mux_rx_avl),
    .rx_en_n,
    .rx_pl_data,
    .xfer
  );

  // One SAR is never on both paths at once (it has no header fetched while
  // its payload is pending), so the two "available" sources can be merged.
  assign rx_avl = hf_avl | mux_rx_avl;

endmodule
