// hdr_modify: phase 4 of the lookup pipeline, outgoing header modification.
//
// Builds the outgoing header from the incoming header chunk and the label
// information entry, in three clock cycles (3T, the document's figure):
//   cycle 1  field changes: the TTL is decremented by the entry's hop count
//            (in the IPv4 header when the packet is IP-routed, i.e. plain
//            forwarding, label push or label pop; in the label for a label
//            swap), the DS code point is replaced when the entry says so,
//            and the new MPLS shim (label, EXP, bottom-of-stack, TTL) and the
//            new link-layer header for the outgoing encapsulation (IPOA
//            LLC/SNAP, PPP, MPLS or null) are formed.
//   cycle 2  IPv4 header checksum regeneration (full recomputation).
//   cycle 3  the outgoing header is assembled: new link-layer words, the new
//            shim if the packet leaves labelled, then the IPv4 header and the
//            rest of the chunk; frame length, payload word count and output
//            port are worked out.
// Packets from the control/error path (exc_*) are passed on unmodified to
// port EXC_PORT, on which the routing control processor is assumed to be
// reachable. Normal packets are served first when both wait. The operations
// are the document's; the label information layout, the push/swap/pop TTL
// rules and EXC_PORT are this design's.
module hdr_modify
  import fwd_pkg::*;
#(
  parameter logic [PORT_W-1:0] EXC_PORT = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  // looked-up packets from the label information fetch
  input  logic      in_valid,
  output logic      in_ready,
  input  p3_t       in_r,
  // control / error packets
  input  logic      exc_valid,
  output logic      exc_ready,
  input  p1_t       exc_p,
  // to classification
  output logic      out_valid,
  input  logic      out_ready,
  output out_desc_t out_d
);
  logic [1:0]  cnt;       // 0 idle, 1..3 working, output valid at 3
  logic        is_exc;
  p3_t         r;
  // cycle-1 results
  logic [4:0][31:0] ip_new;
  logic [31:0]      shim_new;
  logic [1:0][31:0] l2_new;
  logic [1:0]       l2n;
  logic             shim_out;
  logic             routed;
  logic [5:0]       ds_out;
  // cycle-2 result
  logic [15:0]      csum;

  assign in_ready  = (cnt == 2'd0);
  assign exc_ready = (cnt == 2'd0) && !in_valid;
  assign out_valid = (cnt == 2'd3);

  // ---- cycle 1: field changes
  p1_t              p;
  lib_t             lib;
  logic [4:0][31:0] ip_in;
  logic [31:0]      shim_in;
  logic             lab_in, lab_out, ip_routed;
  logic [7:0]       ttl_src, ttl_dec;
  logic [1:0][31:0] c_l2;
  logic [1:0]       c_l2n;
  logic [4:0][31:0] c_ip;
  logic [31:0]      c_shim;
  logic [5:0]       c_ds;

  always_comb begin
    p       = r.q.p;
    lib     = r.lib;
    for (int k = 0; k < 5; k++) ip_in[k] = p.h.w[3'(p.ipw) + 3'(k)];
    shim_in = p.h.w[p.l2w];
    lab_in  = (p.kind == K_MPLS);
    lab_out = (lib.op == OP_PUSH) || (lib.op == OP_SWAP);
    ip_routed = !(lab_in && lab_out);
    ttl_src = lab_in ? shim_in[7:0] : ip_in[2][31:24];
    ttl_dec = (ttl_src > 8'(lib.hop)) ? ttl_src - 8'(lib.hop) : 8'd0;
    c_ds    = lib.ds_replace ? lib.ds : p.in_ds;
    c_ip    = ip_in;
    if (ip_routed) begin
      c_ip[2][31:24] = ttl_dec;
      c_ip[2][15:0]  = 16'h0000;      // checksum field, regenerated in cycle 2
      if (lib.ds_replace) c_ip[0][23:18] = lib.ds;
    end
    c_shim = {lib.label, lab_in && !lib.ds_replace ? shim_in[11:9] : lib.exp, 1'b1, ttl_dec};
    c_l2   = '0;
    c_l2n  = 2'd0;
    unique case (lib.out_encap)
      ENC_IPOA: begin
        c_l2[0] = 32'hAAAA_0300;
        c_l2[1] = lab_out ? 32'h0000_8847 : 32'h0000_0800;
        c_l2n   = 2'd2;
      end
      ENC_PPP: begin
        c_l2[0] = lab_out ? 32'hFF03_0281 : 32'hFF03_0021;
        c_l2n   = 2'd1;
      end
      default: c_l2n = 2'd0;          // MPLS (shim only) and null
    endcase
  end

  // ---- cycle 3: assembly
  logic [3:0]  body_first, cw, nhead;
  always_comb begin
    out_d = '0;
    cw    = chunk_words(r.q.p.h.len);
    out_d.rx_port = r.q.p.h.port;
    out_d.pl_nw   = payload_words(r.q.p.h.len);
    out_d.ds      = ds_out;
    body_first    = '0;
    nhead         = '0;
    if (is_exc) begin
      for (int k = 0; k < HDR_WORDS; k++) out_d.w[k] = r.q.p.h.w[k];
      out_d.hdr_nw  = cw;
      out_d.len     = r.q.p.h.len;
      out_d.tx_port = EXC_PORT;
      out_d.exc     = 1'b1;
    end else begin
      body_first = 4'(r.q.p.ipw);
      nhead      = 4'(l2n) + 4'(shim_out);
      for (int k = 0; k < OUT_WORDS; k++) begin
        if (k < int'(l2n))
          out_d.w[k] = l2_new[k[0]];
        else if (shim_out && k == int'(l2n))
          out_d.w[k] = shim_new;
        else if (k - int'(nhead) < 5)
          out_d.w[k] = (k - int'(nhead) == 2) ? {ip_new[2][31:16], csum}
                                               : ip_new[3'(k - int'(nhead))];
        else if (k - int'(nhead) + int'(body_first) < HDR_WORDS)
          out_d.w[k] = r.q.p.h.w[3'(k - int'(nhead) + int'(body_first))];
      end
      out_d.hdr_nw  = cw - body_first + nhead;
      out_d.len     = r.q.p.h.len - 16'({body_first, 2'b00}) + 16'({nhead, 2'b00});
      out_d.tx_port = r.lib.tx_port;
      out_d.exc     = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      unique case (cnt)
        2'd0:    if (in_valid || exc_valid) cnt <= 2'd1;
        2'd3:    if (out_ready)             cnt <= 2'd0;
        default: cnt <= cnt + 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cnt == 2'd0) begin
      if (in_valid) begin
        r      <= in_r;
        is_exc <= 1'b0;
      end else if (exc_valid) begin
        r       <= '0;
        r.q.p   <= exc_p;
        is_exc  <= 1'b1;
      end
    end
    if (cnt == 2'd1) begin
      ip_new   <= c_ip;
      shim_new <= c_shim;
      l2_new   <= c_l2;
      l2n      <= c_l2n;
      shim_out <= lab_out;
      routed   <= ip_routed;
      ds_out   <= is_exc ? p.in_ds : c_ds;
    end
    if (cnt == 2'd2) begin
      csum <= routed ? ~ip_sum(ip_new) : ip_new[2][15:0];
    end
  end

endmodule
