// tb_lookup_ctrl: phase 2 with the behavioural CAM. Loads a few routes and
// labels straight into the CAM, offers headers back to back and checks the
// index returned (longest prefix wins, exact label match), the miss path,
// that each header spends exactly 8 clocks in the phase (1T + 1T + 50 ns +
// 1T) and that consecutive hits leave 8 clocks apart when the input never
// runs dry.
module tb_lookup_ctrl;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  p1_t in_p;
  logic cam_req, cam_done, cam_hit, cam_busy;
  cam_op_e cam_op;
  logic [63:0] cam_key;
  logic [CAM_IDX_W-1:0] cam_index;
  logic out_valid, out_ready = 1, miss_valid, miss_ready = 1;
  p2_t out_q;
  p1_t miss_p;
  int checks = 0, failures = 0;

  // CAM writes come from the testbench on a second request port
  logic wr_req = 0;
  logic [CAM_IDX_W-1:0] wr_addr = 0;
  logic [63:0] wr_data = 0;

  lookup_ctrl dut (.*);
  cam_model #(.EXACT_BASE(100)) u_cam (
    .clk, .cam_req (cam_req | wr_req), .cam_op (wr_req ? 2'(CAM_WRITE) : 2'(cam_op)),
    .cam_addr (wr_addr), .cam_data (wr_req ? wr_data : cam_key),
    .cam_done, .cam_hit, .cam_index);

  task automatic cam_wr(int a, logic [63:0] d);
    @(negedge clk); wr_req = 1; wr_addr = CAM_IDX_W'(a); wr_data = d;
    @(negedge clk); wr_req = 0;
  endtask

  // expected results, in order
  int exp_idx[$];     // -1 = miss
  int t_in[$];
  int t_out[$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) t_in.push_back(cyc);
    if ((out_valid && out_ready) || (miss_valid && miss_ready)) begin
      int e;
      e = exp_idx.pop_front();
      checks++;
      if (out_valid && int'(out_q.index) != e) begin
        failures++; $display("index %0d expected %0d", out_q.index, e);
      end
      if (miss_valid && (e != -1 || miss_p.exc != X_NOROUTE)) begin
        failures++; $display("miss, expected %0d", e);
      end
      checks++;
      if (cyc - t_in[0] + 1 != 8) begin
        failures++; $display("phase 2 took %0d clocks", cyc - t_in[0] + 1);
      end
      void'(t_in.pop_front());
      if (out_valid) t_out.push_back(cyc);
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(bit mpls, logic [31:0] k, int e);
    in_p = '0;
    in_p.kind = mpls ? K_MPLS : K_IPV4;
    in_p.key  = {32'd0, k};
    exp_idx.push_back(e);
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cam_wr(1, tcam_encode(32'h0A01_0200, prefix_mask(24)));
    cam_wr(2, tcam_encode(32'h0A01_0000, prefix_mask(16)));
    cam_wr(3, tcam_encode(32'h0A00_0000, prefix_mask(8)));
    cam_wr(100, 64'd42);
    cam_wr(101, 64'd43);
    @(negedge clk);
    fork
      begin
        offer(0, 32'h0A01_0203, 1);
        offer(0, 32'h0A01_0303, 2);
        offer(0, 32'h0A7F_0001, 3);
        offer(1, 32'd43, 101);
        offer(0, 32'h0B00_0001, -1);
        offer(1, 32'd42, 100);
        offer(1, 32'd44, -1);
        offer(0, 32'h0A01_02FF, 1);
      end
    join
    repeat (20) @(posedge clk);
    checks++;
    if (exp_idx.size() != 0) begin failures++; $display("results missing"); end
    for (int i = 1; i < t_out.size(); i++) begin
      checks++;
      if (t_out[i] - t_out[i-1] < 8) begin failures++; $display("hits %0d apart", t_out[i] - t_out[i-1]); end
    end
    checks++;
    if (t_out.size() < 2 || t_out[1] - t_out[0] != 8) begin
      failures++; $display("back-to-back hits not 8 clocks apart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
