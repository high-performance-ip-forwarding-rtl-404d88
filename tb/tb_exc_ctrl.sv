// tb_exc_ctrl: control/error packet queue. Offers packets on both inputs,
// sometimes in the same cycle, with a randomly stalling consumer; checks
// that none is lost or duplicated, that input b wins a tie, that order is
// kept and that the queue never accepts beyond its depth.
module tb_exc_ctrl;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_valid = 0, a_ready, b_valid = 0, b_ready, out_valid, out_ready = 0;
  p1_t a_p, b_p, out_p;
  int checks = 0, failures = 0;
  int exp_q[$];
  int na = 0, nb = 0, ties = 0;

  exc_ctrl #(.DEPTH(2)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) exp_q.push_back(int'(b_p.key));
    else if (a_valid && a_ready) exp_q.push_back(int'(a_p.key));
    if (a_valid && b_valid && b_ready) begin
      ties++; checks++;
      if (a_ready) begin failures++; $display("a accepted with b"); end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_p.key) != exp_q[0]) begin
        failures++; $display("out %0d unexpected", out_p.key);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    checks++;
    if (int'(dut.u_q.count) > 2) begin failures++; $display("overfilled"); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (!a_valid || a_ready) begin
        a_valid = ($urandom_range(99) < 40); a_p = '0; a_p.key = 64'(1000 + na); na++;
      end
      if (!b_valid || b_ready) begin
        b_valid = ($urandom_range(99) < 30); b_p = '0; b_p.key = 64'(5000 + nb); nb++;
      end
      out_ready = ($urandom_range(99) < 50);
      @(posedge clk);
      #1;
      if (a_valid && a_ready) a_valid = 0;
      if (b_valid && b_ready) b_valid = 0;
    end
    $display("ties=%0d", ties);
    checks++;
    if (ties == 0) begin failures++; $display("no tie happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
