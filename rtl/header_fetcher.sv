// header_fetcher: round-robin fetch of packet headers from the Rx SARs.
//
// The Rx SARs are UTOPIA masters and share one header path to the lookup
// controller, which is the slave. The fetcher visits the SARs in turn. For
// the SAR under examination it checks, in one "status check" cycle, that
//   - the header it fetched last has been serviced (its header queue is not
//     full),
//   - a packet has arrived in the SAR (rx_arrived), and
//   - the payload path of that SAR is free (the payload of its previous
//     packet has been sent, signalled by pl_done).
// If all three hold it enters "header fetch": it asserts rx_avl for that SAR
// with the selection control on the header path (rx_sel_pl = 0) and takes a
// header word in every cycle the SAR drives rx_en_n low. A header chunk is
// HDR_WORDS words; frame length and encapsulation travel on the shared bus
// with the first word. When the chunk is complete it is pushed into the
// SAR's header queue. Both outcomes then pass through one "transition to the
// next SAR" cycle. The three states and their conditions follow the
// document's arbitration diagram; the one-cycle status check and transition
// states, the fixed chunk length and the meaning of "payload in sending
// state" (payload path of the SAR is not holding an unsent payload) are this
// design's reading.
//
// Timing: a fetch occupies 1 + HDR_WORDS + 1 cycles when the SAR sends a word
// every cycle; a skipped SAR costs 2 cycles.
module header_fetcher
  import fwd_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // Rx SAR status and UTOPIA header-path control
  input  logic [NPORTS-1:0]     rx_arrived,
  output logic [NPORTS-1:0]     rx_avl,
  input  logic [NPORTS-1:0]     rx_en_n,
  input  logic [31:0]           hdr_data,
  input  logic [15:0]           hdr_len,
  input  encap_e                hdr_encap,
  // payload of the SAR's fetched packet has been fully sent
  input  logic [NPORTS-1:0]     pl_done,
  // header queues
  input  logic [NPORTS-1:0]     hq_full,
  output logic [NPORTS-1:0]     hq_push,
  output hdr_rec_t              hq_din,
  // status for observation
  output logic [NPORTS-1:0]     pl_busy
);
  typedef enum logic [1:0] {S_CHECK, S_FETCH, S_NEXT} state_e;

  localparam int unsigned CNT_W = $clog2(HDR_WORDS + 1);

  state_e            state;
  logic [PORT_W-1:0] cur;
  logic [CNT_W-1:0]  cnt;
  hdr_rec_t          rec;
  logic              take;

  assign take = (state == S_FETCH) && !rx_en_n[cur];

  always_comb begin
    rx_avl = '0;
    if (state == S_FETCH) rx_avl[cur] = 1'b1;
  end

  always_comb begin
    hq_din = rec;
    for (int i = 0; i < HDR_WORDS - 1; i++) hq_din.w[i] = rec.w[i+1];
    hq_din.w[HDR_WORDS-1] = hdr_data;
    if (cnt == '0) begin
      hq_din.len   = hdr_len;
      hq_din.encap = hdr_encap;
    end
    hq_din.port = cur;
    hq_push = '0;
    if (take && cnt == CNT_W'(HDR_WORDS - 1)) hq_push[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CHECK;
      cur     <= '0;
      cnt     <= '0;
      pl_busy <= '0;
      rec     <= '0;
    end else begin
      pl_busy <= pl_busy & ~pl_done;
      unique case (state)
        S_CHECK: begin
          cnt <= '0;
          if (!hq_full[cur] && rx_arrived[cur] && !pl_busy[cur]) state <= S_FETCH;
          else                                                   state <= S_NEXT;
        end
        S_FETCH: begin
          if (take) begin
            // words shift towards index 0 so that w[0] is the first word
            for (int i = 0; i < HDR_WORDS - 1; i++) rec.w[i] <= rec.w[i+1];
            rec.w[HDR_WORDS-1] <= hdr_data;
            if (cnt == '0) begin
              rec.len   <= hdr_len;
              rec.encap <= hdr_encap;
            end
            if (cnt == CNT_W'(HDR_WORDS - 1)) begin
              pl_busy[cur] <= 1'b1;
              state        <= S_NEXT;
            end
            cnt <= cnt + 1'b1;
          end
        end
        default: begin
          cur   <= cur + 1'b1;
          state <= S_CHECK;
        end
      endcase
    end
  end

endmodule
