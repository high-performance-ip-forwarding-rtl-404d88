// lib_sram: label information table.
//
// A single-port synchronous SRAM, 32 bits wide, one write or one read per
// cycle; read data appear on rdata the cycle after rd is asserted with the
// address. The default depth of 2^18 words holds one 8-byte entry (two
// words) for each of the 128K entries of the routing coprocessor, as the
// document sizes the forwarding table; the document gives the 32-bit width
// and the 8-byte entry. The contents are written by the forwarding engine
// manager; nothing is cleared at reset.
module lib_sram #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr)      mem[addr] <= wdata;
    else if (rd) rdata     <= mem[addr];
  end

endmodule
