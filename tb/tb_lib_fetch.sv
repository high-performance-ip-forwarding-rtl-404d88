// tb_lib_fetch: phase 3 against a reduced label information SRAM holding a
// known pattern. Checks the 8-byte entry assembled from the two 32-bit
// reads, the index carried along, the 4-clock phase time and that the
// output is held while the next phase is busy.
module tb_lib_fetch;
  import fwd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  p2_t in_q;
  p3_t out_r;
  logic sram_rd, sram_wr = 0;
  logic [LIB_ADDR_W-1:0] sram_addr, waddr = 0;
  logic [31:0] sram_rdata, wdata = 0;
  int checks = 0, failures = 0;

  lib_fetch dut (.*);
  lib_sram #(.AW(LIB_ADDR_W)) u_sram (.clk, .rd (sram_rd), .wr (sram_wr),
    .addr (sram_wr ? waddr : sram_addr), .wdata, .rdata (sram_rdata));

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h0101_0101 + 32'hA5A5_0000;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idxs[4] = '{0, 7, 1000, 131071};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (idxs[i]) for (int k = 0; k < 2; k++) begin
      @(negedge clk); sram_wr = 1; waddr = LIB_ADDR_W'(idxs[i] * 2 + k); wdata = pat(idxs[i] * 2 + k);
    end
    @(negedge clk); sram_wr = 0;
    foreach (idxs[i]) begin
      int t;
      @(negedge clk);
      in_q = '0; in_q.index = CAM_IDX_W'(idxs[i]); in_q.p.key = 64'(i + 5);
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      t = 1;
      while (!out_valid) begin @(negedge clk); t++; end
      checks++;
      if (t != 4) begin failures++; $display("entry offered in cycle %0d, expected 4", t); end
      repeat (i) begin
        @(negedge clk);
        checks++;
        if (!out_valid || in_ready) begin failures++; $display("not held"); end
      end
      checks++;
      if (out_r.lib != lib_t'({pat(idxs[i] * 2), pat(idxs[i] * 2 + 1)}) ||
          out_r.q.index != CAM_IDX_W'(idxs[i]) || out_r.q.p.key != 64'(i + 5)) begin
        failures++; $display("entry %0d wrong: %h", idxs[i], out_r.lib);
      end
      out_ready = 1;
      @(negedge clk); out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
