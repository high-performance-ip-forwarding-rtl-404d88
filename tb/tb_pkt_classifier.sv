// tb_pkt_classifier: phase 5. Sends descriptors with every DS code point
// and exception descriptors, checks the queue each is written to against
// the class-selector rule, that the write comes 2 clocks after the
// descriptor is taken, and that a full queue holds the write back.
module tb_pkt_classifier;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  out_desc_t in_d, oq_din;
  logic [NPRIO-1:0] oq_full = '0, oq_push;
  int checks = 0, failures = 0;

  pkt_classifier dut (.*);

  function automatic int ref_prio(int ds, bit exc);
    if (exc) return 3;
    if (ds >= 40) return 3;   // class selector 5, 6, 7
    if (ds >= 24) return 2;   // 3, 4
    if (ds >= 8)  return 1;   // 1, 2
    return 0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 72; i++) begin
      int ds, t, q;
      bit exc, blk;
      ds = i % 64; exc = (i >= 64); blk = (i % 5 == 0);
      q = ref_prio(ds, exc);
      @(negedge clk);
      in_d = '0; in_d.ds = 6'(ds); in_d.exc = exc; in_d.len = 16'(i);
      in_valid = 1;
      if (blk) oq_full[q] = 1;
      @(negedge clk); in_valid = 0;
      t = 1;
      while (oq_push == 0 && t < 10) begin
        @(negedge clk); t++;
        if (blk && t == 2) begin
          // held back by the full queue, written as soon as there is room
          checks++;
          if (oq_push != 0) begin failures++; $display("wrote into a full queue"); end
          oq_full = '0;
          #1;
          t = 3;
        end
      end
      checks++;
      if (t != (blk ? 3 : 2) || oq_push != NPRIO'(1 << q) || oq_din.len != 16'(i)) begin
        failures++; $display("ds %0d exc %0d: push %b in cycle %0d, expected queue %0d", ds, exc, oq_push, t, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
