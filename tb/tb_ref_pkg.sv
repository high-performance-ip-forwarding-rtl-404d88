// tb_ref_pkg: frame builder and reference forwarding model for testbenches.
//
// Works on byte queues, independently of the RTL's word-level datapath:
// builds IPv4 / MPLS frames in the four encapsulations, computes the IPv4
// checksum byte-wise, and predicts the frame the forwarding engine must send
// (or that it must go unmodified to the exception port) from a route list,
// a label list and label information entries held here.
package tb_ref_pkg;
  import fwd_pkg::*;

  typedef byte unsigned bq_t[$];
  typedef logic [31:0]  wq_t[$];

  // routes: longest prefix wins; labels: exact
  typedef struct { logic [31:0] addr; int plen; int index; } route_t;
  route_t       routes[$];
  int           labels[int];     // label -> CAM index
  logic [63:0]  lib[int];        // CAM index -> entry

  function automatic int csum16(bq_t b, int off, int n);
    int s = 0;
    for (int i = 0; i < n; i += 2) s += {b[off+i], b[off+i+1]};
    while (s > 16'hFFFF) s = (s & 16'hFFFF) + (s >> 16);
    return s;
  endfunction

  function automatic bq_t ip_hdr(logic [31:0] src, logic [31:0] dst, int ttl, int tos,
                                 int tot, bit bad_sum = 0, int ver = 4);
    bq_t b;
    int  c;
    b = '{8'((ver << 4) | 5), 8'(tos), 8'(tot >> 8), 8'(tot), 8'h12, 8'h34, 8'h40, 8'h00,
          8'(ttl), 8'd6, 8'h00, 8'h00,
          src[31:24], src[23:16], src[15:8], src[7:0],
          dst[31:24], dst[23:16], dst[15:8], dst[7:0]};
    c = ~csum16(b, 0, 20) & 16'hFFFF;
    if (bad_sum) c = c ^ 16'h0100;
    b[10] = 8'(c >> 8);
    b[11] = 8'(c);
    return b;
  endfunction

  function automatic bq_t l2_hdr(int encap, bit mpls, bit ctrl = 0);
    bq_t b;
    case (encap)
      0: b = '{8'hAA, 8'hAA, 8'h03, 8'h00, 8'h00, 8'h00,
               ctrl ? 8'h08 : (mpls ? 8'h88 : 8'h08), ctrl ? 8'h06 : (mpls ? 8'h47 : 8'h00)};
      1: b = '{8'hFF, 8'h03, ctrl ? 8'hC0 : (mpls ? 8'h02 : 8'h00), ctrl ? 8'h21 : (mpls ? 8'h81 : 8'h21)};
      default: b = {};
    endcase
    return b;
  endfunction

  function automatic bq_t shim(int label, int exp, int s, int ttl);
    logic [31:0] v = {20'(label), 3'(exp), 1'(s), 8'(ttl)};
    return '{v[31:24], v[23:16], v[15:8], v[7:0]};
  endfunction

  function automatic bq_t payload(int n, int seed);
    bq_t b;
    for (int i = 0; i < n; i++) b.push_back(8'(seed * 7 + i * 13));
    return b;
  endfunction

  function automatic wq_t to_words(bq_t b);
    wq_t w;
    for (int i = 0; i < b.size(); i += 4) begin
      logic [31:0] v = '0;
      for (int k = 0; k < 4; k++) if (i + k < b.size()) v[31-8*k -: 8] = b[i+k];
      w.push_back(v);
    end
    return w;
  endfunction

  // Reference forwarding. Returns 1 and the expected frame/port if the frame
  // is forwarded normally, 0 if it must go unmodified to the exception port.
  function automatic bit ref_forward(bq_t f, int encap, output bq_t o, output int port,
                                     output int prio);
    int  l2n, ipo, ety, idx;
    bit  mpls, ctrl;
    logic [31:0] dst, sh;
    logic [63:0] e;
    int  best;
    int  op, oenc, tport, dsr, ds, exp_, hop, lbl, ttl, nttl, ds_in;
    bq_t ip, rest;
    o = f; port = 0; prio = 3;
    mpls = 0; ctrl = 0; l2n = 0;
    case (encap)
      0: begin
        l2n = 8;
        ety = {f[6], f[7]};
        if (!(f[0] == 8'hAA && f[1] == 8'hAA && f[2] == 8'h03 && f[3] == 0 && f[4] == 0 && f[5] == 0)) ctrl = 1;
        else if (ety == 16'h8847) mpls = 1;
        else if (ety != 16'h0800) ctrl = 1;
      end
      1: begin
        l2n = 4;
        if (!(f[0] == 8'hFF && f[1] == 8'h03)) ctrl = 1;
        else if ({f[2], f[3]} == 16'h0281) mpls = 1;
        else if ({f[2], f[3]} != 16'h0021) ctrl = 1;
      end
      2: mpls = 1;
      default: ;
    endcase
    if (ctrl) return 0;
    ipo = l2n + (mpls ? 4 : 0);
    for (int i = 0; i < 20; i++) ip.push_back(f[ipo+i]);
    for (int i = ipo + 20; i < f.size() && i < HDR_BYTES; i++) rest.push_back(f[i]);
    ds_in = ip[1] >> 2;
    if (mpls) begin
      sh = {f[l2n], f[l2n+1], f[l2n+2], f[l2n+3]};
      if (sh[8] == 0 || sh[7:0] <= 1) return 0;
      if (!labels.exists(int'(sh[31:12]))) return 0;
      idx = labels[int'(sh[31:12])];
      ttl = sh[7:0];
    end else begin
      if (ip[0] != 8'h45) return 0;
      if (csum16(ip, 0, 20) != 16'hFFFF) return 0;
      if (ip[8] <= 1) return 0;
      dst = {ip[16], ip[17], ip[18], ip[19]};
      best = -1; idx = -1;
      foreach (routes[r]) begin
        logic [31:0] m = (routes[r].plen == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> routes[r].plen);
        if (((dst ^ routes[r].addr) & m) == 0 && routes[r].plen > best) begin
          best = routes[r].plen; idx = routes[r].index;
        end
      end
      if (idx < 0) return 0;
      ttl = ip[8];
    end
    e = lib[idx];
    oenc = e[63:62]; tport = e[61:60]; op = e[59:58]; dsr = e[57]; ds = e[56:51];
    exp_ = e[50:48]; hop = e[47:44]; lbl = e[39:20];
    nttl = (ttl > hop) ? ttl - hop : 0;
    o = {};
    o = l2_hdr(oenc, op == 1 || op == 2);
    if (op == 1 || op == 2) o = {o, shim(lbl, (mpls && !dsr) ? int'(sh[11:9]) : exp_, 1, nttl)};
    if (!(mpls && op == 2)) begin
      int c;
      ip[8] = 8'(nttl);
      if (dsr) ip[1] = 8'((ds << 2) | (ip[1] & 3));
      ip[10] = 0; ip[11] = 0;
      c = ~csum16(ip, 0, 20) & 16'hFFFF;
      ip[10] = 8'(c >> 8); ip[11] = 8'(c);
    end
    o = {o, ip, rest};
    for (int i = HDR_BYTES; i < f.size(); i++) o.push_back(f[i]);
    port = tport;
    prio = ds_to_prio(6'(dsr ? ds : ds_in));
    return 1;
  endfunction

endpackage
