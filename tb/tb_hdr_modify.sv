// tb_hdr_modify: phase 4. For every incoming encapsulation, outgoing
// encapsulation and label operation it builds a frame, the phase-1 view of
// it and a label information entry, and compares the outgoing header,
// frame length, payload word count, port and DS with tb_ref_pkg's
// byte-level prediction. Also checks the exception path (header passed
// unchanged to the exception port), the 3-clock phase time and that normal
// packets are taken before waiting exceptions.
module tb_hdr_modify;
  import fwd_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, exc_valid = 0, exc_ready, out_valid, out_ready = 1;
  p3_t in_r;
  p1_t exc_p;
  out_desc_t out_d;
  int checks = 0, failures = 0;

  hdr_modify #(.EXC_PORT(2'd3)) dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic p1_t view(bq_t f, int encap, bit mpls);
    p1_t p = '0;
    wq_t w = to_words(f);
    int l2 = (encap == 0) ? 2 : (encap == 1) ? 1 : 0;
    for (int i = 0; i < HDR_WORDS; i++) p.h.w[i] = (i < w.size()) ? w[i] : 32'd0;
    p.h.len = 16'(f.size()); p.h.encap = encap_e'(encap); p.h.port = 2'd2;
    p.kind = mpls ? K_MPLS : K_IPV4;
    p.l2w = 2'(l2);
    p.ipw = 3'(l2 + (mpls ? 1 : 0));
    p.in_ds = f[l2 * 4 + (mpls ? 4 : 0) + 1][7:2];
    return p;
  endfunction

  task automatic one(int encap, bit mpls, int oenc, int op, int dsr, int pl);
    bq_t f, o;
    int port, prio, t;
    wq_t ow;
    logic [63:0] e;
    lib_t l;
    f = mpls ? {l2_hdr(encap, 1), shim(321, 6, 1, 33), ip_hdr(7, 32'h0A000001, 50, 8'h48, 20 + pl), payload(pl, 3)}
             : {l2_hdr(encap, 0), ip_hdr(7, 32'h0A000001, 50, 8'h48, 20 + pl), payload(pl, 3)};
    l = '0; l.out_encap = encap_e'(oenc); l.tx_port = 2'(op); l.op = lblop_e'(op);
    l.ds_replace = 1'(dsr); l.ds = 6'd34; l.exp = 3'd2; l.hop = 4'd3; l.label = 20'hABCDE;
    e = 64'(l);
    routes = {}; labels.delete(); lib.delete();
    begin route_t r; r.addr = 32'h0A000001; r.plen = 32; r.index = 1; routes.push_back(r); end
    labels[321] = 1; lib[1] = e;
    void'(ref_forward(f, encap, o, port, prio));
    ow = to_words(o);
    @(negedge clk);
    in_r = '0; in_r.q.p = view(f, encap, mpls); in_r.q.index = 1; in_r.lib = l;
    in_valid = 1;
    @(negedge clk); in_valid = 0;
    t = 1;
    while (!out_valid) begin @(negedge clk); t++; end
    chk(t == 3, $sformatf("result in cycle %0d", t));
    chk(int'(out_d.pl_nw) == int'(payload_words(16'(f.size()))), "payload words");
    chk(int'(out_d.hdr_nw) == ow.size() - int'(out_d.pl_nw), $sformatf("header words %0d expected %0d", out_d.hdr_nw, ow.size() - int'(out_d.pl_nw)));
    chk(int'(out_d.len) == o.size(), $sformatf("length %0d expected %0d", out_d.len, o.size()));
    chk(int'(out_d.tx_port) == port && !out_d.exc && int'(out_d.rx_port) == 2, "ports");
    chk(ds_to_prio(out_d.ds) == 2'(prio), "DS");
    for (int i = 0; i < out_d.hdr_nw && i < ow.size(); i++)
      chk(out_d.w[i] == ow[i], $sformatf("enc %0d mpls %0d oenc %0d op %0d word %0d: %h expected %h",
                                         encap, mpls, oenc, op, i, out_d.w[i], ow[i]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int enc = 0; enc < 4; enc++)
      for (int oenc = 0; oenc < 4; oenc++)
        for (int dsr = 0; dsr < 2; dsr++) begin
          if (enc != 2) begin
            if (oenc != 2) one(enc, 0, oenc, 0, dsr, 10 + enc);     // IP -> IP
            one(enc, 0, oenc, 1, dsr, 3);                          // push
          end
          if (enc != 3) begin
            one(enc, 1, oenc, 2, dsr, 40);                         // swap
            if (oenc != 2) one(enc, 1, oenc, 3, dsr, 0);           // pop
          end
        end
    // exception passes unchanged; a normal packet offered at the same time goes first
    @(negedge clk);
    exc_p = '0;
    for (int i = 0; i < HDR_WORDS; i++) exc_p.h.w[i] = 32'h1111_0000 + 32'(i);
    exc_p.h.len = 16'd90; exc_p.h.port = 2'd1; exc_p.kind = K_CTRL; exc_p.exc = X_CTRL;
    exc_valid = 1; in_valid = 1;
    @(negedge clk);
    chk(!exc_ready || !exc_valid, "exception taken before normal packet");
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    chk(!out_d.exc, "normal packet not first");
    @(negedge clk);
    while (!exc_ready) @(negedge clk);
    @(negedge clk); exc_valid = 0;
    while (!out_valid) @(negedge clk);
    chk(out_d.exc && out_d.tx_port == 2'd3 && out_d.hdr_nw == 4'd8 && out_d.len == 16'd90 &&
        out_d.pl_nw == 16'd15 && out_d.rx_port == 2'd1, "exception descriptor");
    for (int i = 0; i < HDR_WORDS; i++) chk(out_d.w[i] == 32'h1111_0000 + 32'(i), "exception header changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
