// lib_fetch: phase 3 of the lookup pipeline, label information fetch.
//
// With the CAM index from phase 2 it reads the 8-byte label information
// entry from the 32-bit wide label information SRAM in two accesses: word
// address {index, 0} holds bits 63:32 and {index, 1} bits 31:0. The SRAM
// answers one cycle after the address. Cycle by cycle after the index is
// taken: 1 address of the high word, 2 address of the low word and capture
// of the high word, 3 capture of the low word, 4 entry offered to header
// modification - 4T in all, as in the document's processing-time table (its
// prose says 3T for "control and fetching"; the table's 4T is the one that
// adds up to its 15T total and is followed here). The output is held until
// the next phase takes it; a new index is only taken when the unit is empty.
module lib_fetch
  import fwd_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  p2_t                    in_q,
  // label information SRAM read port
  output logic                   sram_rd,
  output logic [LIB_ADDR_W-1:0]  sram_addr,
  input  logic [31:0]            sram_rdata,
  // to header modification
  output logic                   out_valid,
  input  logic                   out_ready,
  output p3_t                    out_r
);
  logic [2:0]  cnt;   // 0 idle, 1..4 working, output valid at 4
  p2_t         q;
  logic [31:0] hi, lo;

  assign in_ready  = (cnt == 3'd0);
  assign out_valid = (cnt == 3'd4);
  assign sram_rd   = (cnt == 3'd1) || (cnt == 3'd2);
  assign sram_addr = {q.index, (cnt == 3'd2)};

  always_comb begin
    out_r     = '0;
    out_r.q   = q;
    out_r.lib = lib_t'({hi, lo});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      unique case (cnt)
        3'd0:    if (in_valid)  cnt <= 3'd1;
        3'd4:    if (out_ready) cnt <= 3'd0;
        default: cnt <= cnt + 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cnt == 3'd0 && in_valid) q <= in_q;
    if (cnt == 3'd2) hi <= sram_rdata;
    if (cnt == 3'd3) lo <= sram_rdata;
  end

endmodule
