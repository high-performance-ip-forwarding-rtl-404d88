// pkt_mux: packet multiplexor for cut-through transmission.
//
// Puts either a word of the modified header (mode M_HDR) or a word of the
// remaining payload coming from the Rx SAR over the payload path (mode M_PL)
// onto the Tx packet path. The payload is never stored: in payload mode the
// Tx SAR's enable is passed back as the payload path's "available" to the
// selected Rx SAR, and the Rx SAR's data-valid is passed on as the Tx
// path's "available" to the selected Tx SAR, so a word moves from Rx SAR to
// Tx SAR in the cycle both masters are ready. Handshake rules on both
// UTOPIA ports: a word moves in a cycle where the slave's avl is high and
// the master's active-low en_n is low; the masters' en_n must not depend on
// avl in the same cycle. Purely combinational; xfer reports a moved word.
// Cut-through from the Rx payload path is the document's; the exact
// handshake pairing is this design's.
module pkt_mux
  import fwd_pkg::*;
(
  input  logic [1:0]         mode,      // 0 idle, 1 header word, 2 payload
  input  logic [PORT_W-1:0]  tx_port,
  input  logic [PORT_W-1:0]  rx_port,
  input  logic [31:0]        hdr_word,
  // Tx packet path (slave side)
  output logic [NPORTS-1:0]  tx_avl,
  input  logic [NPORTS-1:0]  tx_en_n,
  output logic [31:0]        tx_data,
  // Rx payload path (slave side)
  output logic [NPORTS-1:0]  rx_pl_avl,
  input  logic [NPORTS-1:0]  rx_en_n,
  input  logic [31:0]        rx_pl_data,
  output logic               xfer
);
  localparam logic [1:0] M_HDR = 2'd1;
  localparam logic [1:0] M_PL  = 2'd2;

  logic word_valid;

  always_comb begin
    word_valid = (mode == M_HDR) || ((mode == M_PL) && !rx_en_n[rx_port]);
    tx_avl     = '0;
    rx_pl_avl  = '0;
    tx_avl[tx_port] = word_valid;
    if (mode == M_PL) rx_pl_avl[rx_port] = !tx_en_n[tx_port];
    tx_data = (mode == M_PL) ? rx_pl_data : hdr_word;
    xfer    = word_valid && !tx_en_n[tx_port];
  end

endmodule
