// tb_sync_fifo: random push/pop against a queue reference; checks order,
// full/empty flags and the occupancy count of a 4-deep FIFO.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  logic [15:0] din = 0, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [15:0] ref_q[$];

  sync_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (ref_q.size() == 0) || full != (ref_q.size() == 4) || int'(count) != ref_q.size()) begin
        failures++; $display("flags wrong at %0d: count %0d ref %0d", i, count, ref_q.size());
      end
      if (ref_q.size() != 0) begin
        checks++;
        if (dout != ref_q[0]) begin failures++; $display("data %h expected %h", dout, ref_q[0]); end
      end
      push = ($urandom_range(99) < 55);
      pop  = ($urandom_range(99) < 45);
      din  = 16'($urandom);
      @(posedge clk);
      if (pop && ref_q.size() != 0) void'(ref_q.pop_front());
      if (push && !full) ref_q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
