// tb_line_rate: sustained forwarding rate of the engine with default
// parameters, for the load of four 622 Mbit/s ports.
//
// Every Rx SAR is kept full of minimum-size (40-byte) IPv4 packets, routed
// over the longest-prefix table, and the Tx SARs never stall. The test
// measures the packets forwarded per clock once the pipeline is full and
// compares the rate with what 4 x 622.08 Mbit/s of 40-byte packets needs
// (7.78 Mpackets/s = one packet per 12.86 clocks at 100 MHz). A second run
// uses 576-byte packets and checks the output bus carries at least
// 2.49 Gbit/s of IP traffic. Every frame is compared with the reference
// model, as in the end-to-end test.
module tb_line_rate;
  import fwd_pkg::*;
  import tb_ref_pkg::*;

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
  logic host_valid, host_ready;
  logic [1:0] host_cmd;
  logic [CAM_IDX_W-1:0] host_index;
  logic [31:0] host_addr;
  logic [5:0] host_plen;
  logic [63:0] host_data;

  ip_fwd_engine dut (.*);
  cam_model u_cam (.clk, .cam_req, .cam_op, .cam_addr, .cam_data, .cam_done, .cam_hit, .cam_index);
  rx_sar_model #(.PL_LAT(2), .STALL_PCT(0)) u_rx (.*);
  tx_sar_model #(.STALL_PCT(0)) u_tx (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  wq_t exp_w [NPORTS][$];
  int  exp_port [NPORTS][$];
  int  got = 0, cyc = 0;

  task automatic host_wr(int cmd, int idx, logic [31:0] a, int plen, logic [63:0] d);
    @(negedge clk);
    host_valid = 1; host_cmd = 2'(cmd); host_index = CAM_IDX_W'(idx);
    host_addr = a; host_plen = 6'(plen); host_data = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  task automatic add_route(logic [31:0] a, int plen, int idx, int port);
    route_t r;
    lib_t e;
    r.addr = a; r.plen = plen; r.index = idx;
    routes.push_back(r);
    host_wr(0, idx, a, plen, 0);
    e = '0;
    e.out_encap = ENC_NULL; e.tx_port = 2'(port); e.op = OP_IP; e.hop = 4'd1;
    lib[idx] = 64'(e);
    host_wr(2, idx, 0, 0, 64'(e));
  endtask

  task automatic send(int s, int pl, int seed);
    bq_t f, o;
    int port, prio;
    f = {ip_hdr(32'h0A0A_0001 + seed, 32'h0A00_0000 + 32'(seed << 8), 64, 0, 20 + pl), payload(pl, seed)};
    void'(ref_forward(f, 3, o, port, prio));
    exp_w[s].push_back(to_words(o)); exp_port[s].push_back(port);
    u_rx.add_frame(s, to_words(f), f.size(), 3);
  endtask

  // compare what has come out so far
  task automatic drain();
    while (u_tx.done_w.size() > got) begin
      int s;
      wq_t e;
      int p;
      s = u_tx.done_src[got];
      if (exp_w[s].size() == 0) check(0, "unexpected frame");
      else begin
        e = exp_w[s].pop_front();
        p = exp_port[s].pop_front();
        check(u_tx.done_port[got] == p && u_tx.done_w[got] == e, $sformatf("frame %0d differs", got));
      end
      got++;
    end
  endtask

  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run n packets of pl payload bytes per SAR; returns clocks between the
  // 8th and the last frame out
  task automatic run(int n, int pl, output int clocks, output int frames);
    int g0, t0;
    for (int k = 0; k < n; k++) for (int s = 0; s < NPORTS; s++) send(s, pl, s * 1000 + k);
    g0 = got;
    while (u_tx.done_w.size() < g0 + 8) @(posedge clk);
    t0 = cyc;
    drain();
    while (u_tx.done_w.size() < g0 + n * NPORTS) begin @(posedge clk); drain(); end
    clocks = cyc - t0;
    frames = n * NPORTS - 8;
    drain();
  endtask

  initial begin
    int clocks, frames;
    real cpp, mpps, gbps;
    host_valid = 0; host_cmd = 0; host_index = 0; host_addr = 0; host_plen = 0; host_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPORTS; p++) add_route(32'h0A00_0000 + 32'(p << 14), 18, 10 + p, p);
    add_route(32'h0A00_0000, 8, 20, 0);

    // minimum-size packets: 20-byte IP header + 20 bytes
    run(64, 20, clocks, frames);
    cpp  = real'(clocks) / real'(frames);
    mpps = 100.0 / cpp;
    $display("40-byte packets: %0d frames in %0d clocks, %.2f clocks/packet, %.2f Mpps", frames, clocks, cpp, mpps);
    check(cpp <= 12.86, $sformatf("%.2f clocks per 40-byte packet, 4 x 622 Mbit/s needs <= 12.86", cpp));
    // 576-byte packets
    run(16, 556, clocks, frames);
    gbps = real'(frames) * 576.0 * 8.0 / (real'(clocks) * 10.0);
    $display("576-byte packets: %0d frames in %0d clocks, %.2f Gbit/s", frames, clocks, gbps);
    check(gbps >= 2.49, $sformatf("%.2f Gbit/s of 576-byte packets, 4 x 622 Mbit/s needs 2.49", gbps));
    repeat (20) @(posedge clk);
    for (int s = 0; s < NPORTS; s++) check(exp_w[s].size() == 0, $sformatf("SAR %0d frames missing", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
