// tb_fwd_mgr: forwarding engine manager.
// Random host commands are issued while the lookup controller and the label
// information fetch use the shared ports at random. Checks
//  - a route becomes one CAM write at its index with the ternary word
//    {addr&mask, mask&~addr}, and that word matches exactly the keys that
//    agree with the address on the prefix bits,
//  - a label becomes one CAM write of the zero-extended label,
//  - a label information entry becomes two SRAM writes, high word at
//    {index,0} and low word at {index,1},
//  - a no-op command writes nothing,
//  - the lookup controller's request, op and key reach the CAM unchanged and
//    no write is issued while it uses the port; label fetch reads reach the
//    SRAM unchanged and no write happens in the same cycle.
module tb_fwd_mgr;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_valid, host_ready;
  logic [1:0] host_cmd;
  logic [CAM_IDX_W-1:0] host_index, cam_addr;
  logic [31:0] host_addr, sram_wdata;
  logic [5:0] host_plen;
  logic [63:0] host_data, lk_key, cam_data;
  logic lk_req, lk_busy, cam_req, lf_rd, sram_rd, sram_wr;
  cam_op_e lk_op, cam_op;
  logic [LIB_ADDR_W-1:0] lf_addr, sram_addr;
  int checks = 0, failures = 0;

  fwd_mgr dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  // expected writes
  typedef struct packed { logic [CAM_IDX_W-1:0] a; logic [63:0] d; } camw_t;
  typedef struct packed { logic [LIB_ADDR_W-1:0] a; logic [31:0] d; } srw_t;
  camw_t exp_cam[$];
  srw_t  exp_sr[$];
  int    n_cam = 0, n_sr = 0, n_blocked = 0;
  int    lk_pct = 40, lf_pct = 40;

  always @(posedge clk) if (rst_n) begin
    if (lk_req || lk_busy) begin
      chk(cam_req == lk_req && cam_op == lk_op && cam_data == lk_key, "lookup request altered");
      if (dut.st == 2'd1) n_blocked++;
    end else if (cam_req) begin
      chk(cam_op == CAM_WRITE, "manager issued a non-write");
      chk(exp_cam.size() != 0, "unexpected CAM write");
      if (exp_cam.size() != 0) begin
        camw_t e;
        e = exp_cam.pop_front();
        chk(cam_addr == e.a && cam_data == e.d, $sformatf("CAM write %h:%h expected %h:%h", cam_addr, cam_data, e.a, e.d));
      end
      n_cam++;
    end
    if (lf_rd) begin
      chk(sram_rd && !sram_wr && sram_addr == lf_addr, "label fetch read altered");
    end else begin
      chk(!sram_rd, "spurious read");
      if (sram_wr) begin
        chk(exp_sr.size() != 0, "unexpected SRAM write");
        if (exp_sr.size() != 0) begin
          srw_t e;
          e = exp_sr.pop_front();
          chk(sram_addr == e.a && sram_wdata == e.d, $sformatf("SRAM write %h:%h expected %h:%h", sram_addr, sram_wdata, e.a, e.d));
        end
        n_sr++;
      end
    end
  end

  // lookup controller and label fetch traffic
  always @(negedge clk) begin
    lk_req  <= ($urandom_range(99) < lk_pct);
    lk_busy <= ($urandom_range(99) < lk_pct);
    lk_op   <= cam_op_e'($urandom_range(1));
    lk_key  <= {$urandom, $urandom};
    lf_rd   <= ($urandom_range(99) < lf_pct);
    lf_addr <= LIB_ADDR_W'($urandom);
  end

  function automatic bit tmatch(logic [63:0] e, logic [31:0] k);
    return ((e[63:32] & ~k) == 0) && ((e[31:0] & k) == 0);
  endfunction

  task automatic cmd(logic [1:0] c);
    logic [31:0] a, m;
    logic [5:0] pl;
    logic [63:0] d;
    logic [CAM_IDX_W-1:0] ix;
    a = $urandom; pl = 6'($urandom_range(32)); d = {$urandom, $urandom}; ix = CAM_IDX_W'($urandom);
    m = (pl == 0) ? 32'd0 : ~(32'hFFFF_FFFF >> pl);
    // inputs change on the falling edge, away from the sampling edge
    @(negedge clk);
    host_valid = 1; host_cmd = c; host_index = ix; host_addr = a; host_plen = pl; host_data = d;
    case (c)
      2'd0: begin
        logic [63:0] w;
        w = {a & m, m & ~a};
        exp_cam.push_back({ix, w});
        // the stored word matches a key iff the key agrees on the prefix
        for (int t = 0; t < 8; t++) begin
          logic [31:0] k;
          k = (t < 4) ? (a ^ (32'd1 << $urandom_range(31))) : $urandom;
          chk(tmatch(w, k) == (((k ^ a) & m) == 0), "ternary word match");
        end
        chk(tmatch(w, a), "route does not match its own address");
      end
      2'd1: exp_cam.push_back({ix, {44'd0, d[19:0]}});
      2'd2: begin
        exp_sr.push_back({ix, 1'b0, d[63:32]});
        exp_sr.push_back({ix, 1'b1, d[31:0]});
      end
      default: ;
    endcase
    // accepted at the first rising edge with host_ready high
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_valid = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nc;
  initial begin
    host_valid = 0; host_cmd = 0; host_index = 0; host_addr = 0; host_plen = 0; host_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // idle ports: one write cycle per CAM command, two per SRAM entry
    lk_pct = 0; lf_pct = 0;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 4; c++) cmd(2'(c));
    repeat (5) @(posedge clk);
    chk(exp_cam.size() == 0 && exp_sr.size() == 0 && n_cam == 2 && n_sr == 2, "idle-port writes");
    // shared ports under load
    lk_pct = 40; lf_pct = 40;
    nc = 0;
    for (int i = 0; i < 3000; i++) cmd(2'($urandom_range(3)));
    lk_pct = 0; lf_pct = 0;
    repeat (10) @(posedge clk);
    chk(exp_cam.size() == 0 && exp_sr.size() == 0, "writes lost");
    chk(n_blocked > 0, "never waited for the lookup controller");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
