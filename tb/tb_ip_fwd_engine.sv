// tb_ip_fwd_engine: end-to-end test of the forwarding engine.
//
// Loads routes, labels and label information through the host port, then
// has the four Rx SAR models deliver a mix of frames: IPv4 in all four
// encapsulations, label swap / push / pop, control packets (ATMARP, PPP
// LCP), headers failing each check, lookup misses, short frames and long
// low-priority frames overtaken by EF traffic. Every frame that leaves a Tx
// SAR is compared with tb_ref_pkg's byte-level prediction. An isolated
// packet's header latency (phase 1 entry to queue write) must be 20 clocks
// (50 ns + 15T), and every looked-up header must spend 8 clocks in phase 2.
// Each mechanism - control/error path, lookup miss, LPM and exact-match
// lookups, a fetch held back by a full header queue, preemption and resume,
// a paused payload transfer and the early payload request - is counted and
// must occur at least once. Runs the engine with its default parameters.
module tb_ip_fwd_engine;
  import fwd_pkg::*;
  import tb_ref_pkg::*;

  localparam int EXC_BASE = 1 << 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0] rx_arrived, rx_avl, rx_en_n, rx_sel_pl, tx_avl, tx_en_n;
  logic [31:0] rx_hdr_data, rx_pl_data, tx_data;
  logic [15:0] rx_hdr_len;
  logic [1:0]  rx_hdr_encap, cam_op;
  logic        tx_sop, tx_eop;
  logic [PORT_W-1:0] tx_src;
  logic cam_req, cam_done, cam_hit;
  logic [CAM_IDX_W-1:0] cam_addr, cam_index;
  logic [63:0] cam_data;
  logic host_valid = 0, host_ready;
  logic [1:0] host_cmd = 0;
  logic [CAM_IDX_W-1:0] host_index = 0;
  logic [31:0] host_addr = 0;
  logic [5:0] host_plen = 0;
  logic [63:0] host_data = 0;

  ip_fwd_engine dut (.*);
  cam_model #(.EXACT_BASE(EXC_BASE)) u_cam (.clk, .cam_req, .cam_op, .cam_addr, .cam_data,
                                            .cam_done, .cam_hit, .cam_index);
  rx_sar_model #(.PL_LAT(2), .STALL_PCT(10)) u_rx (.*);
  tx_sar_model #(.STALL_PCT(30)) u_tx (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected frames per source SAR, in order
  wq_t exp_w   [NPORTS][$];
  int  exp_port[NPORTS][$];

  task automatic host_wr(int cmd, int idx, logic [31:0] a, int plen, logic [63:0] d);
    @(negedge clk);
    host_valid = 1; host_cmd = 2'(cmd); host_index = CAM_IDX_W'(idx);
    host_addr = a; host_plen = 6'(plen); host_data = d;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  function automatic logic [63:0] lib_e(int enc, int port, int op, int dsr, int ds, int exp_,
                                         int hop, int label);
    lib_t e = '0;
    e.out_encap = encap_e'(enc); e.tx_port = 2'(port); e.op = lblop_e'(op);
    e.ds_replace = 1'(dsr); e.ds = 6'(ds); e.exp = 3'(exp_); e.hop = 4'(hop);
    e.label = 20'(label);
    return 64'(e);
  endfunction

  task automatic add_route(logic [31:0] a, int plen, int idx);
    route_t r;
    r.addr = a; r.plen = plen; r.index = idx;
    routes.push_back(r);
    host_wr(0, idx, a, plen, 0);
  endtask
  task automatic add_label(int label, int idx);
    labels[label] = idx;
    host_wr(1, idx, 0, 0, 64'(label));
  endtask
  task automatic add_lib(int idx, logic [63:0] e);
    lib[idx] = e;
    host_wr(2, idx, 0, 0, e);
  endtask

  // send a frame from SAR s and record what must come out
  task automatic send(int s, int encap, bq_t f);
    bq_t o; int port, prio;
    if (ref_forward(f, encap, o, port, prio)) begin
      exp_w[s].push_back(to_words(o)); exp_port[s].push_back(port);
    end else begin
      exp_w[s].push_back(to_words(f)); exp_port[s].push_back(0);
    end
    u_rx.add_frame(s, to_words(f), f.size(), encap);
  endtask

  function automatic bq_t ipv4(int encap, logic [31:0] dst, int ttl, int tos, int pl,
                               int seed, bit bad = 0, int ver = 4);
    return {l2_hdr(encap, 0), ip_hdr(32'h0A0A_0001 + seed, dst, ttl, tos, 20 + pl, bad, ver),
            payload(pl, seed)};
  endfunction
  function automatic bq_t mpls(int encap, int label, int ttl, int s, int pl, int seed);
    return {l2_hdr(encap, 1), shim(label, 2, s, ttl),
            ip_hdr(32'h0B0B_0001, 32'h0101_0101, 64, 8'h20, 20 + pl), payload(pl, seed)};
  endfunction

  function automatic bit exp_empty();
    for (int s = 0; s < NPORTS; s++) if (exp_w[s].size() != 0) return 0;
    return 1;
  endfunction

  // ---------------- mechanism counters
  int n_exc = 0, n_miss = 0, n_lpm = 0, n_exact = 0, n_p1wait = 0, n_hqhold = 0;
  int n_preempt = 0, n_resume = 0, n_prefetch = 0;
  int t_p1 = -1, t_oq = -1, cyc = 0, t_p2 = 0, p2_min = 1000, p2_max = 0;
  bit p2_seen = 0;
  int idx_out[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_exc.push) n_exc++;
    if (dut.u_p2.miss_valid && dut.u_p2.miss_ready) n_miss++;
    if (cam_req && cam_op == 2'(CAM_LPM)) n_lpm++;
    if (cam_req && cam_op == 2'(CAM_EXACT)) n_exact++;
    if (dut.u_p1.out_valid && !dut.u_p1.out_ready) n_p1wait++;
    if (|(rx_arrived & dut.hq_full)) n_hqhold++;
    if (dut.u_sched.ev_preempt) n_preempt++;
    if (dut.u_sched.ev_resume) n_resume++;
    if (|(rx_sel_pl & ~rx_avl) && dut.u_sched.mode == 2'd1) n_prefetch++;
    if (dut.u_p1.in_valid && dut.u_p1.in_ready && t_p1 < 0) t_p1 = cyc;
    if (|dut.oq_push && t_oq < 0) t_oq = cyc;
    if (dut.u_p2.out_valid && dut.u_p2.out_ready) idx_out.push_back(cyc);
    if (dut.u_p2.in_valid && dut.u_p2.in_ready) t_p2 = cyc;
    if (dut.u_p2.out_valid && !p2_seen) begin
      p2_seen = 1;
      if (cyc - t_p2 + 1 < p2_min) p2_min = cyc - t_p2 + 1;
      if (cyc - t_p2 + 1 > p2_max) p2_max = cyc - t_p2 + 1;
    end
    if (!dut.u_p2.out_valid) p2_seen = 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int s = 0; s < NPORTS; s++) $display("SAR %0d: %0d frames outstanding", s, exp_w[s].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // routes: longer masks at lower (higher-priority) indices
    add_route(32'hC0A8_0100, 24, 3);
    add_route(32'h0A01_0000, 16, 5);
    add_route(32'h0A00_0000, 8, 10);
    add_label(100, EXC_BASE + 1);
    add_label(200, EXC_BASE + 2);
    add_lib(3,  lib_e(0, 1, 0, 1, 46, 0, 1, 0));        // IPOA, port 1, EF
    add_lib(5,  lib_e(1, 2, 1, 0, 0, 5, 1, 300));       // PPP, push 300
    add_lib(10, lib_e(3, 3, 0, 1, 0, 0, 1, 0));         // null, best effort
    add_lib(EXC_BASE + 1, lib_e(2, 2, 2, 0, 0, 3, 1, 400));  // swap to 400
    add_lib(EXC_BASE + 2, lib_e(0, 1, 3, 1, 26, 0, 2, 0));   // pop, AF31

    // ---- 1. isolated packet: latency
    send(0, 3, ipv4(3, 32'hC0A8_0105, 64, 0, 40, 1));
    wait (t_oq >= 0);
    check(t_oq - t_p1 == 20, $sformatf("header latency %0d clocks, expected 20", t_oq - t_p1));
    wait (u_tx.done_w.size() == 1);

    // ---- 2. one of each kind, on all ports
    send(0, 0, ipv4(0, 32'hC0A8_0107, 64, 0, 100, 2));
    send(1, 1, ipv4(1, 32'h0A01_0203, 30, 8'h60, 12, 3));
    send(2, 3, ipv4(3, 32'h0A09_0909, 5, 0, 3, 4));          // short frame
    send(3, 2, mpls(2, 100, 40, 1, 60, 5));
    send(0, 0, mpls(0, 200, 40, 1, 20, 6));
    send(1, 1, mpls(1, 100, 40, 1, 0, 7));
    send(2, 0, {l2_hdr(0, 0, 1), payload(28, 8)});           // ATMARP
    send(3, 1, {l2_hdr(1, 0, 1), payload(16, 9)});           // PPP LCP
    send(0, 3, ipv4(3, 32'hC0A8_0101, 64, 0, 8, 10, 1));     // bad checksum
    send(1, 3, ipv4(3, 32'hC0A8_0101, 1, 0, 8, 11));         // TTL expired
    send(2, 3, ipv4(3, 32'hC0A8_0101, 64, 0, 8, 12, 0, 6));  // version 6
    send(3, 3, ipv4(3, 32'h0808_0808, 64, 0, 8, 13));        // no route
    send(0, 2, mpls(2, 555, 40, 1, 8, 14));                  // unknown label
    send(1, 2, mpls(2, 100, 40, 0, 8, 15));                  // deeper stack
    // ---- 3. long best-effort frames overtaken by EF frames
    for (int k = 0; k < 3; k++) begin
      send(2, 3, ipv4(3, 32'h0A05_0505, 64, 0, 400, 20 + k));
      send(3, 3, ipv4(3, 32'h0A06_0606, 64, 0, 400, 30 + k));
      send(0, 0, ipv4(0, 32'hC0A8_01AA, 64, 0, 16, 40 + k));
      send(1, 1, ipv4(1, 32'h0A01_0505, 64, 8'hB8, 200, 50 + k));
    end
    // ---- 4. a burst of short headers to load the pipeline
    for (int k = 0; k < 16; k++) send(k % 4, 3, ipv4(3, 32'hC0A8_0100 + k, 64, 0, 0, 60 + k));

    got = 0;
    while (u_rx.pending() != 0 || u_tx.done_w.size() != got || !exp_empty()) begin
      @(posedge clk);
      while (u_tx.done_w.size() > got) begin
        int s;
        wq_t e;
        int p;
        s = u_tx.done_src[got];
        if (exp_w[s].size() == 0) check(0, $sformatf("unexpected frame from SAR %0d", s));
        else begin
          e = exp_w[s].pop_front();
          p = exp_port[s].pop_front();
          check(u_tx.done_port[got] == p,
                $sformatf("frame %0d from SAR %0d: port %0d expected %0d", got, s, u_tx.done_port[got], p));
          check(u_tx.done_w[got] == e,
                $sformatf("frame %0d from SAR %0d: %0d words, expected %0d, contents differ",
                          got, s, u_tx.done_w[got].size(), e.size()));
        end
        got++;
      end
      if (cyc > 150000) break;
    end

    repeat (20) @(posedge clk);
    for (int s = 0; s < NPORTS; s++) check(exp_w[s].size() == 0, $sformatf("SAR %0d frames missing", s));

    // ---- rate: every hit spends exactly 8 clocks in phase 2 (arrival
    // check to index fetch), and hits leave phase 2 at least 8 clocks apart
    begin
      int mind;
      mind = 1000;
      for (int i = 1; i < idx_out.size(); i++)
        if (idx_out[i] - idx_out[i-1] < mind) mind = idx_out[i] - idx_out[i-1];
      check(mind >= 8, $sformatf("minimum lookup interval %0d clocks, expected >= 8", mind));
      check(p2_min == 8 && p2_max == 8, $sformatf("phase 2 took %0d..%0d clocks, expected 8", p2_min, p2_max));
    end

    $display("frames=%0d exc=%0d miss=%0d lpm=%0d exact=%0d p1wait=%0d hqhold=%0d preempt=%0d resume=%0d prefetch=%0d plpause=%0d interleave=%0d",
             got, n_exc, n_miss, n_lpm, n_exact, n_p1wait, n_hqhold, n_preempt, n_resume,
             n_prefetch, u_rx.pl_pauses, u_tx.interleaved);
    check(n_exc > 0, "control/error path never used");
    check(n_miss > 0, "no lookup miss");
    check(n_lpm > 0, "no LPM lookup");
    check(n_exact > 0, "no exact-match lookup");
    check(n_hqhold > 0, "no fetch held by a full header queue");
    check(n_preempt > 0, "no preemption");
    check(n_resume > 0, "no resumed packet");
    check(n_prefetch > 0, "payload never requested before the header end");
    check(u_rx.pl_pauses > 0, "payload transfer never paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
