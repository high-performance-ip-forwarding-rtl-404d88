// tb_pkt_mux: exhaustive check of the multiplexor's steering for every
// mode, port pair and handshake combination against a direct statement of
// the rule.
module tb_pkt_mux;
  import fwd_pkg::*;
  logic [1:0] mode;
  logic [PORT_W-1:0] tx_port, rx_port;
  logic [31:0] hdr_word = 32'hAAAA_5555, rx_pl_data = 32'h1234_0000, tx_data;
  logic [NPORTS-1:0] tx_avl, tx_en_n, rx_pl_avl, rx_en_n;
  logic xfer;
  int checks = 0, failures = 0;

  pkt_mux dut (.*);

  initial begin
    for (int m = 0; m < 3; m++)
      for (int t = 0; t < NPORTS; t++)
        for (int r = 0; r < NPORTS; r++)
          for (int te = 0; te < 16; te++)
            for (int re = 0; re < 16; re++) begin
              logic v;
              logic [NPORTS-1:0] ea, er;
              mode = 2'(m); tx_port = 2'(t); rx_port = 2'(r);
              tx_en_n = 4'(te); rx_en_n = 4'(re);
              #1;
              v  = (m == 1) || (m == 2 && !rx_en_n[r]);
              ea = '0; ea[t] = v;
              er = '0; if (m == 2) er[r] = !tx_en_n[t];
              checks++;
              if (tx_avl != ea || rx_pl_avl != er || xfer != (v && !tx_en_n[t]) ||
                  (v && tx_data != ((m == 2) ? rx_pl_data : hdr_word))) begin
                failures++;
                if (failures < 10) $display("mode %0d tx %0d rx %0d te %b re %b wrong", m, t, r, tx_en_n, rx_en_n);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
