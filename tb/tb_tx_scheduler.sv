// tb_tx_scheduler: transmit scheduler with preemption, driven by queue
// models and a randomly stalling transmit path. Checks
//  - strict priority order when packets of several priorities wait,
//  - preemption of a long low-priority packet by a high-priority one when
//    more than THRESH words remain, the raise of the preempted packet's
//    priority by one, and its resumption from the next word,
//  - no preemption when THRESH or fewer words remain,
//  - that every packet's words arrive complete and in order (header words,
//    then payload), tx_sop/tx_eop framing, one pl_done per packet,
//  - the payload request raised PREFETCH header words before the header end.
module tb_tx_scheduler;
  import fwd_pkg::*;
  localparam int THRESH = 8, PREFETCH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPRIO-1:0] oq_empty, oq_pop;
  out_desc_t [NPRIO-1:0] oq_dout;
  logic [1:0] mode;
  logic [PORT_W-1:0] tx_port, rx_port, tx_src;
  logic [31:0] hdr_word;
  logic xfer, tx_sop, tx_eop, ev_preempt, ev_resume;
  logic [NPORTS-1:0] rx_pl_sel, pl_done;
  int checks = 0, failures = 0;

  tx_scheduler #(.THRESH(THRESH), .PREFETCH(PREFETCH)) dut (.*);

  out_desc_t q [NPRIO][$];
  always_comb begin
    for (int l = 0; l < NPRIO; l++) begin
      oq_empty[l] = (q[l].size() == 0);
      oq_dout[l]  = (q[l].size() != 0) ? q[l][0] : '0;
    end
  end
  logic rdy = 1;
  assign xfer = (mode != 2'd0) && rdy;

  logic [31:0] got [NPORTS][$];
  int order[$];           // rx ports in order of completion
  int done_cnt[NPORTS];
  int n_pre = 0, n_res = 0, n_pref = 0, cyc = 0;
  int stall_pct = 20;

  function automatic string ostr();
    string r;
    r = "";
    foreach (order[i]) r = {r, $sformatf("%0d", order[i])};
    return r;
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int l = 0; l < NPRIO; l++) if (oq_pop[l]) void'(q[l].pop_front());
    if (ev_preempt) n_pre++;
    if (ev_resume)  n_res++;
    if (xfer) begin
      if (tx_sop) chk(got[tx_src].size() == 0, "sop in the middle of a packet");
      got[tx_src].push_back(mode == 2'd1 ? hdr_word : 32'hFEED_0000 + 32'(got[tx_src].size()));
      if (tx_eop) order.push_back(int'(tx_src));
    end
    for (int p = 0; p < NPORTS; p++) if (pl_done[p]) done_cnt[p]++;
    if (mode == 2'd1 && rx_pl_sel != 0) begin
      n_pref++;
      chk(int'(dut.act.d.hdr_nw) - int'(dut.act.hdr_pos) <= PREFETCH, "payload requested too early");
    end
    rdy <= ($urandom_range(99) >= stall_pct);
  end

  function automatic out_desc_t mk(int rx, int tx, int hw, int pw, int ds);
    out_desc_t d = '0;
    for (int i = 0; i < hw; i++) d.w[i] = 32'(rx << 24 | i);
    d.hdr_nw = 4'(hw); d.pl_nw = 16'(pw); d.rx_port = 2'(rx); d.tx_port = 2'(tx); d.ds = 6'(ds);
    return d;
  endfunction

  task automatic expect_pkt(int rx, int hw, int pw);
    chk(got[rx].size() == hw + pw, $sformatf("port %0d: %0d words, expected %0d", rx, got[rx].size(), hw + pw));
    for (int i = 0; i < got[rx].size(); i++)
      chk(got[rx][i] == ((i < hw) ? 32'(rx << 24 | i) : 32'hFEED_0000 + 32'(i)), $sformatf("port %0d word %0d", rx, i));
    got[rx] = {};
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
    // 1. priority order: all four queued at once, short packets (no preemption)
    stall_pct = 0;
    @(negedge clk);
    q[0].push_back(mk(0, 1, 6, 2, 0));
    q[1].push_back(mk(1, 2, 6, 2, 8));
    q[3].push_back(mk(3, 0, 6, 2, 46));
    q[2].push_back(mk(2, 3, 6, 2, 24));
    wait (order.size() == 4);
    chk(ostr() == "3210", {"service order ", ostr()});
    for (int p = 0; p < 4; p++) expect_pkt(p, 6, 2);
    chk(n_pre == 0, "preempted short packets");
    // 2. long best-effort packet preempted by an EF packet
    stall_pct = 20;
    order = {};
    @(negedge clk);
    q[0].push_back(mk(0, 1, 8, 60, 0));
    repeat (20) @(negedge clk);
    q[3].push_back(mk(3, 1, 6, 4, 46));
    wait (order.size() == 2);
    chk(n_pre == 1 && n_res == 1, $sformatf("preempt %0d resume %0d", n_pre, n_res));
    chk(ostr() == "30", "EF packet did not overtake");
    chk(dut.susp[1].valid == 0, "slot not freed");
    expect_pkt(3, 6, 4);
    expect_pkt(0, 8, 60);
    // 3. preempted packet raised to priority 1 is served before a queued
    // priority-1 packet that arrives while it is suspended
    order = {};
    @(negedge clk);
    q[0].push_back(mk(0, 2, 8, 50, 0));
    repeat (15) @(negedge clk);
    q[2].push_back(mk(2, 2, 8, 30, 24));
    @(negedge clk);
    wait (n_pre == 2);
    @(negedge clk);
    chk(dut.susp[1].valid && dut.susp[1].prio == 2'd1 && !dut.susp[0].valid, "priority not raised by one");
    q[1].push_back(mk(1, 3, 6, 3, 8));
    wait (order.size() == 3);
    chk(ostr() == "201", {"order after preemption ", ostr()});
    expect_pkt(2, 8, 30); expect_pkt(0, 8, 50); expect_pkt(1, 6, 3);
    // 4. no preemption near the end of a packet
    order = {};
    n_pre = 0;
    stall_pct = 0;
    @(negedge clk);
    q[0].push_back(mk(0, 1, 8, THRESH + 3, 0));
    wait (dut.act.valid && dut.act.pl_left == 16'(THRESH - 1));
    @(negedge clk);
    q[3].push_back(mk(3, 1, 4, 0, 46));
    wait (order.size() == 2);
    chk(n_pre == 0 && ostr() == "03", "preempted with few words left");
    expect_pkt(0, 8, THRESH + 3); expect_pkt(3, 4, 0);
    repeat (3) @(negedge clk);
    chk(done_cnt[0] == 4 && done_cnt[1] == 2 && done_cnt[2] == 2 && done_cnt[3] == 3,
        $sformatf("pl_done counts %0d %0d %0d %0d", done_cnt[0], done_cnt[1], done_cnt[2], done_cnt[3]));
    chk(n_pref > 0, "payload never requested early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
