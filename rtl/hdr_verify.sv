// hdr_verify: phase 1 of the lookup pipeline, header analysis and verification.
//
// Takes one header chunk and, in three clock cycles (3T, as the document
// budgets for this phase, set by the checksum check), produces the analysed
// header:
//   cycle 1  packet type analysis from the VC's encapsulation and the first
//            words: IPOA (RFC 2684 LLC/SNAP), PPP, MPLS or null
//            encapsulation; ATMARP and PPP control protocols are marked as
//            control packets; the position of the MPLS shim and IPv4 header
//            is found.
//   cycle 2  field extraction and the one's-complement sum of the IPv4
//            header.
//   cycle 3  TTL, version, option and checksum verdicts (evaluated side by
//            side), choice of the CAM key: destination address for IPv4
//            (longest prefix match) or the top label for MPLS (exact match).
//            The result is registered and offered from the next cycle on,
//            which is the lookup's arrival-check cycle.
// Packets that are control or fail a check leave with kind K_CTRL / K_ERR
// and a reason; the top sends those to the control/error packet path, past
// the lookup. The output is held until the next phase takes it (out_ready),
// and a new header is only taken when the unit is empty, so a header waits
// here while phase 2 is busy, as in the document's pipeline chart.
// The document lists the checks and the 3T time; the encodings recognised,
// the rule "TTL <= 1 fails", "IHL != 5 is an option packet" and "label stack
// deeper than one goes to the control path" are this design's choices.
module hdr_verify
  import fwd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  hdr_rec_t in_hdr,
  output logic     out_valid,
  input  logic     out_ready,
  output p1_t      out_p
);
  hdr_rec_t    h;
  logic [2:0]  cnt;       // 0 idle, 1..3 working, 4 result offered
  logic        busy;
  // cycle-1 results
  logic [1:0]  l2w;
  logic        is_mpls, is_ctrl;
  logic [2:0]  ipw;
  // cycle-2 results
  logic [4:0][31:0] ip;
  logic [31:0] shim;
  logic [15:0] sum;

  assign in_ready  = !busy;
  assign out_valid = busy && (cnt == 3'd4);

  // cycle-1 combinational analysis
  logic [1:0] a_l2w;
  logic       a_mpls, a_ctrl;
  always_comb begin
    a_l2w  = 2'd0;
    a_mpls = 1'b0;
    a_ctrl = 1'b0;
    unique case (h.encap)
      ENC_IPOA: begin
        a_l2w = 2'd2;
        if (h.w[0] != 32'hAAAA_0300 || h.w[1][31:16] != 16'h0000) a_ctrl = 1'b1;
        else if (h.w[1][15:0] == 16'h0800) a_mpls = 1'b0;
        else if (h.w[1][15:0] == 16'h8847) a_mpls = 1'b1;
        else a_ctrl = 1'b1;                         // ATMARP (0806) and others
      end
      ENC_PPP: begin
        a_l2w = 2'd1;
        if (h.w[0][31:16] != 16'hFF03)        a_ctrl = 1'b1;
        else if (h.w[0][15:0] == 16'h0021)    a_mpls = 1'b0;
        else if (h.w[0][15:0] == 16'h0281)    a_mpls = 1'b1;
        else                                  a_ctrl = 1'b1;   // LCP, NCP, ...
      end
      ENC_MPLS: a_mpls = 1'b1;
      default:  a_mpls = 1'b0;                  // ENC_NULL
    endcase
  end

  // cycle-2 combinational extraction
  logic [4:0][31:0] x_ip;
  always_comb begin
    for (int k = 0; k < 5; k++) x_ip[k] = h.w[3'(ipw) + 3'(k)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy <= 1'b1;
        cnt  <= 3'd1;
      end
    end else if (cnt != 3'd4) begin
      cnt <= cnt + 1'b1;
    end else if (out_ready) begin
      busy <= 1'b0;
      cnt  <= '0;
    end
  end

  // cycle-3 verdicts, registered into out_p and held there while phase 2
  // is busy
  p1_t v;

  always_ff @(posedge clk) begin
    if (!busy && in_valid) h <= in_hdr;
    if (busy && cnt == 3'd1) begin
      l2w     <= a_l2w;
      is_mpls <= a_mpls;
      is_ctrl <= a_ctrl;
      ipw     <= 3'(a_l2w) + 3'(a_mpls);
    end
    if (busy && cnt == 3'd2) begin
      ip   <= x_ip;
      shim <= h.w[l2w];
      sum  <= ip_sum(x_ip);
    end
    if (busy && cnt == 3'd3) out_p <= v;
  end

  always_comb begin
    v       = '0;
    v.h     = h;
    v.l2w   = l2w;
    v.ipw   = ipw;
    v.in_ds = ip[0][23:18];
    v.exc   = X_NONE;
    if (is_ctrl) begin
      v.kind  = K_CTRL;
      v.exc   = X_CTRL;
      v.in_ds = 6'd0;
    end else if (is_mpls) begin
      v.kind = K_MPLS;
      v.key  = {44'd0, shim[31:12]};
      if (!shim[8])                v.exc = X_OPTION;
      else if (shim[7:0] <= 8'd1)  v.exc = X_TTL;
    end else begin
      v.kind = K_IPV4;
      v.key  = {32'd0, ip[4]};
      if (ip[0][31:28] != 4'd4)        v.exc = X_VERSION;
      else if (ip[0][27:24] != 4'd5)   v.exc = X_OPTION;
      else if (sum != 16'hFFFF)        v.exc = X_CHECKSUM;
      else if (ip[2][31:24] <= 8'd1)   v.exc = X_TTL;
    end
    if (v.exc != X_NONE && !is_ctrl) v.kind = K_ERR;
  end

endmodule
