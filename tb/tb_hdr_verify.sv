// tb_hdr_verify: phase 1. Feeds header chunks of every encapsulation and
// every failure kind, compares kind, reason, CAM key and incoming DS with
// the values the frame was built with, checks that the result appears
// 3 clocks after the header is taken (offered in the 4th) and that it is
// held while the next phase is not ready.
module tb_hdr_verify;
  import fwd_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  hdr_rec_t in_hdr;
  p1_t out_p;
  int checks = 0, failures = 0;

  hdr_verify dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(bq_t f, int encap, kind_e k, exc_e x, logic [63:0] key, int ds, int hold);
    wq_t w = to_words(f);
    int t;
    @(negedge clk);
    in_hdr = '0;
    for (int i = 0; i < HDR_WORDS; i++) in_hdr.w[i] = (i < w.size()) ? w[i] : 32'd0;
    in_hdr.len = 16'(f.size()); in_hdr.encap = encap_e'(encap); in_hdr.port = 2'd1;
    in_valid = 1;
    @(posedge clk);
    chk(in_ready, "not ready when idle");
    @(negedge clk); in_valid = 0;
    t = 1;
    while (!out_valid) begin @(negedge clk); t++; end
    chk(t == 4, $sformatf("result offered in cycle %0d, expected 4", t));
    repeat (hold) begin
      @(negedge clk);
      chk(out_valid && !in_ready, "result not held while waiting");
    end
    chk(out_p.kind == k && out_p.exc == x, $sformatf("kind %0d exc %0d, expected %0d %0d", out_p.kind, out_p.exc, k, x));
    if (x == X_NONE) chk(out_p.key == key, $sformatf("key %h expected %h", out_p.key, key));
    if (k != K_CTRL) chk(out_p.in_ds == 6'(ds), "incoming DS wrong");
    chk(out_p.h.w == in_hdr.w && out_p.h.port == 2'd1, "header not carried");
    out_ready = 1;
    @(negedge clk); out_ready = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t ip = ip_hdr(32'h01020304, 32'hC0A80101, 64, 8'hB8, 40);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run({l2_hdr(0, 0), ip, payload(20, 1)}, 0, K_IPV4, X_NONE, 64'hC0A80101, 46, 0);
    run({l2_hdr(1, 0), ip, payload(20, 1)}, 1, K_IPV4, X_NONE, 64'hC0A80101, 46, 3);
    run({ip, payload(20, 1)}, 3, K_IPV4, X_NONE, 64'hC0A80101, 46, 0);
    run({shim(777, 1, 1, 9), ip}, 2, K_MPLS, X_NONE, 64'd777, 46, 0);
    run({l2_hdr(0, 1), shim(12345, 1, 1, 9), ip}, 0, K_MPLS, X_NONE, 64'd12345, 46, 2);
    run({l2_hdr(1, 1), shim(99, 1, 1, 9), ip}, 1, K_MPLS, X_NONE, 64'd99, 46, 0);
    run({l2_hdr(0, 0, 1), payload(28, 2)}, 0, K_CTRL, X_CTRL, 0, 0, 0);
    run({l2_hdr(1, 0, 1), payload(28, 2)}, 1, K_CTRL, X_CTRL, 0, 0, 0);
    run({ip_hdr(1, 2, 64, 0, 40, 1), payload(12, 3)}, 3, K_ERR, X_CHECKSUM, 0, 0, 0);
    run({ip_hdr(1, 2, 1, 0, 40), payload(12, 3)}, 3, K_ERR, X_TTL, 0, 0, 0);
    run({ip_hdr(1, 2, 64, 0, 40, 0, 6), payload(12, 3)}, 3, K_ERR, X_VERSION, 0, 0, 0);
    run({shim(5, 0, 0, 9), ip}, 2, K_ERR, X_OPTION, 0, 46, 0);
    run({shim(5, 0, 1, 1), ip}, 2, K_ERR, X_TTL, 0, 46, 0);
    begin
      bq_t o = ip; o[0] = 8'h46;       // IHL 6: options
      run({o, payload(12, 3)}, 3, K_ERR, X_OPTION, 0, 46, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
