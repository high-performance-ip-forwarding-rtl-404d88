// tb_lib_sram: writes a pattern to a reduced label information SRAM and
// reads it back, checking the one-cycle read latency.
module tb_lib_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd = 0, wr = 0;
  logic [9:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  lib_sram #(.AW(10)) dut (.*);

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); wr = 1; addr = 10'(a); wdata = pat(a);
    end
    @(negedge clk); wr = 0;
    for (int a = 1023; a >= 0; a -= 3) begin
      @(negedge clk); rd = 1; addr = 10'(a);
      @(negedge clk); rd = 0;
      checks++;
      if (rdata != pat(a)) begin failures++; $display("addr %0d: %h expected %h", a, rdata, pat(a)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
