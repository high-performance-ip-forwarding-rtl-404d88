// tb_header_fetcher: round-robin header fetch from four Rx SAR models.
// The header queues and the payload-done signals are modelled by the
// testbench. Checks
//  - every header chunk reaches the right queue with its words in order,
//    its frame length, encapsulation and source port,
//  - a SAR is never fetched from while its header queue is full, while the
//    payload of its previous packet is unsent, or while nothing has arrived,
//  - with all SARs ready the fetch order is 0,1,2,3,0,... and one header
//    takes 10 cycles (status check, 8 words, transition),
//  - with only one SAR ready the others are skipped at 2 cycles each,
//  - random SAR stalls, queue back-pressure and payload delays.
module tb_header_fetcher;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPORTS-1:0] rx_arrived, rx_avl, rx_en_n, rx_sel_pl, pl_done, hq_full, hq_push, pl_busy;
  logic [31:0] rx_hdr_data, rx_pl_data;
  logic [15:0] rx_hdr_len;
  logic [1:0]  rx_hdr_encap;
  hdr_rec_t hq_din;
  int checks = 0, failures = 0;

  rx_sar_model #(.PL_LAT(2), .STALL_PCT(15)) u_rx (.*);
  assign rx_sel_pl = '0;
  header_fetcher dut (
    .clk, .rst_n, .rx_arrived, .rx_avl, .rx_en_n, .hdr_data(rx_hdr_data),
    .hdr_len(rx_hdr_len), .hdr_encap(encap_e'(rx_hdr_encap)), .pl_done,
    .hq_full, .hq_push, .hq_din, .pl_busy
  );

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  typedef logic [HDR_WORDS-1:0][31:0] w8_t;
  w8_t exp_w [NPORTS][$];
  int  exp_len [NPORTS][$];
  int  exp_enc [NPORTS][$];

  // header queues (depth 1) and payload state
  int  occ [NPORTS];
  bit  busy [NPORTS];
  int  pop_dly [NPORTS];
  int  pl_dly [NPORTS];
  int  hold_pct = 50;
  int  got = 0;
  int  push_t[$];
  int  push_p[$];
  int  cyc = 0;
  always_comb for (int p = 0; p < NPORTS; p++) hq_full[p] = (occ[p] != 0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int p = 0; p < NPORTS; p++) begin
      if (rx_avl[p]) begin
        chk(!busy[p] && occ[p] == 0, $sformatf("fetching from blocked SAR %0d", p));
        chk(rx_arrived[p] || dut.cnt != 0, $sformatf("fetching from idle SAR %0d", p));
      end
      chk(pl_busy[p] == busy[p], $sformatf("pl_busy %0d", p));
      if (hq_push[p]) begin
        chk(exp_w[p].size() != 0, "unexpected header");
        if (exp_w[p].size() != 0) begin
          w8_t w;
          int  l, e;
          w = exp_w[p].pop_front(); l = exp_len[p].pop_front(); e = exp_enc[p].pop_front();
          for (int i = 0; i < HDR_WORDS; i++)
            chk(hq_din.w[i] == w[i], $sformatf("port %0d word %0d %h/%h", p, i, hq_din.w[i], w[i]));
          chk(hq_din.len == 16'(l) && hq_din.encap == encap_e'(e) && hq_din.port == 2'(p),
              $sformatf("port %0d sideband", p));
        end
        got++;
        push_t.push_back(cyc); push_p.push_back(p);
      end
    end
    // queue side, one clock later
    for (int p = 0; p < NPORTS; p++) begin
      if (occ[p] != 0) begin
        if (pop_dly[p] == 0) occ[p] <= 0; else pop_dly[p]--;
      end
      if (hq_push[p]) begin
        occ[p] <= 1; busy[p] = 1;
        pop_dly[p] = ($urandom_range(99) < hold_pct) ? $urandom_range(30) : 0;
        pl_dly[p]  = ($urandom_range(99) < hold_pct) ? $urandom_range(60) : 0;
      end else if (busy[p]) begin
        if (pl_dly[p] == 0) busy[p] = 0; else pl_dly[p]--;
      end
    end
  end
  always_comb for (int p = 0; p < NPORTS; p++) pl_done[p] = busy[p] && pl_dly[p] == 0 && !hq_push[p];

  task automatic add(int p);
    logic [31:0] w[$];
    w8_t e;
    int len, enc;
    len = $urandom_range(20, HDR_BYTES);
    enc = $urandom_range(3);
    w = {};
    e = '0;
    for (int i = 0; i < (len + 3) / 4; i++) begin
      e[i] = $urandom;
      w.push_back(e[i]);
    end
    u_rx.add_frame(p, w, len, enc);
    exp_w[p].push_back(e); exp_len[p].push_back(len); exp_enc[p].push_back(enc);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin occ[p] = 0; busy[p] = 0; pop_dly[p] = 0; pl_dly[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. all SARs ready, no stalls anywhere: strict rotation, 10 cycles each
    u_rx.stall_pct = 0;
    hold_pct = 0;
    for (int k = 0; k < 3; k++) for (int p = 0; p < NPORTS; p++) add(p);
    wait (got == 12);
    for (int i = 0; i < 12; i++) chk(push_p[i] == (push_p[0] + i) % NPORTS, $sformatf("fetch %0d from SAR %0d", i, push_p[i]));
    for (int i = 1; i < 12; i++) chk(push_t[i] - push_t[i-1] == 10, $sformatf("fetch interval %0d", push_t[i] - push_t[i-1]));
    // 2. only SAR 2 has packets: three skips of 2 cycles between fetches
    push_t = {}; push_p = {};
    repeat (20) @(posedge clk);
    for (int k = 0; k < 4; k++) add(2);
    wait (got == 16);
    for (int i = 1; i < 4; i++) chk(push_t[i] - push_t[i-1] == 16, $sformatf("single-SAR interval %0d", push_t[i] - push_t[i-1]));
    // 3. random traffic with SAR stalls, queue hold and slow payloads
    u_rx.stall_pct = 15;
    hold_pct = 60;
    for (int k = 0; k < 200; k++) add($urandom_range(NPORTS - 1));
    wait (got == 216);
    repeat (100) @(posedge clk);
    for (int p = 0; p < NPORTS; p++) chk(exp_w[p].size() == 0, $sformatf("SAR %0d headers left", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
