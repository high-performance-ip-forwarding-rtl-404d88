// rx_sar_model: behavioural model of the four receiving SAR controllers.
//
// Not synthesizable. Each SAR holds a queue of reassembled frames, loaded by
// the testbench with add_frame(). For the frame at the head of its queue a
// SAR raises rx_arrived until the header chunk (HDR_WORDS words, zero
// padded) has been fetched over the shared header path. When the
// lookup controller selects the payload path (rx_sel_pl) the SAR starts
// offering the remaining words PL_LAT cycles later. A SAR offers a word by
// driving its rx_en_n low, from registered state only, and moves on when
// rx_avl is high in the same cycle; with STALL_PCT > 0 it randomly holds
// back. The SAR path selectors put the SAR on the header bus whose rx_avl is
// raised on the header path.
module rx_sar_model
  import fwd_pkg::*;
#(
  parameter int unsigned PL_LAT    = 2,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [NPORTS-1:0]  rx_arrived,
  input  logic [NPORTS-1:0]  rx_avl,
  output logic [NPORTS-1:0]  rx_en_n,
  input  logic [NPORTS-1:0]  rx_sel_pl,
  output logic [31:0]        rx_hdr_data,
  output logic [15:0]        rx_hdr_len,
  output logic [1:0]         rx_hdr_encap,
  output logic [31:0]        rx_pl_data
);
  typedef struct {
    logic [31:0] w[$];
    int          len;
    int          encap;
  } frame_t;

  frame_t q [NPORTS][$];
  // frame at the head of each SAR, copied out of the queue
  localparam int MAXW = 1024;
  logic [31:0] cw     [NPORTS][MAXW];
  int     clen   [NPORTS];
  int     cenc   [NPORTS];
  int     pltot  [NPORTS];
  bit     loaded [NPORTS];
  int     hpos   [NPORTS];
  int     ppos   [NPORTS];
  bit     hdone  [NPORTS];
  int     lat    [NPORTS];
  bit     stall  [NPORTS];
  int     hdr_words_moved = 0;
  int     pl_words_moved  = 0;
  int     pl_pauses       = 0;   // cycles a started payload was held by rx_avl low
  int     stall_pct       = int'(STALL_PCT);  // may be changed at run time

  function automatic void add_frame(int port, logic [31:0] w[$], int len, int encap);
    frame_t f;
    f.w = w; f.len = len; f.encap = encap;
    q[port].push_back(f);
  endfunction

  function automatic int pending();
    int n = 0;
    for (int s = 0; s < NPORTS; s++) n += q[s].size() + (loaded[s] ? 1 : 0);
    return n;
  endfunction

  // outputs are recomputed whenever the state or the slave's signals change
  event upd;
  always @(upd or rx_avl or rx_sel_pl) begin
    for (int s = 0; s < NPORTS; s++) begin
      rx_arrived[s] = loaded[s] && !hdone[s];
      rx_en_n[s]    = 1'b1;
      if (loaded[s] && !stall[s]) begin
        if (!rx_sel_pl[s] && !hdone[s]) rx_en_n[s] = 1'b0;
        else if (rx_sel_pl[s] && hdone[s] && lat[s] == 0 && ppos[s] < pltot[s]) rx_en_n[s] = 1'b0;
      end
    end
    rx_hdr_data  = '0;
    rx_hdr_len   = '0;
    rx_hdr_encap = '0;
    rx_pl_data   = '0;
    for (int s = 0; s < NPORTS; s++) begin
      if (loaded[s]) begin
        if (rx_avl[s] && !rx_sel_pl[s] && !hdone[s]) begin
          rx_hdr_data  = cw[s][hpos[s]];
          rx_hdr_len   = 16'(clen[s]);
          rx_hdr_encap = 2'(cenc[s]);
        end
        if (rx_sel_pl[s] && hdone[s] && ppos[s] < pltot[s])
          rx_pl_data = cw[s][int'(HDR_WORDS) + ppos[s]];
      end
    end
  end

  // The handshake is sampled at the clock edge; the model's own state, and
  // with it its outputs, change one time unit later, after the lookup
  // controller's flip-flops have taken the same edge.
  logic [NPORTS-1:0] avl_s, en_s, sel_s;
  always @(posedge clk) begin
    avl_s = rx_avl; en_s = rx_en_n; sel_s = rx_sel_pl;
    #1;
    if (!rst_n) begin
      for (int s = 0; s < NPORTS; s++) begin
        hpos[s] = 0; ppos[s] = 0; hdone[s] = 0; lat[s] = 0; stall[s] = 0; loaded[s] = 0;
      end
    end else begin
      for (int s = 0; s < NPORTS; s++) begin
        if (loaded[s]) begin
          if (avl_s[s] && !en_s[s]) begin
            if (!hdone[s]) begin
              hdr_words_moved++;
              hpos[s]++;
              if (hpos[s] == int'(HDR_WORDS)) begin
                hdone[s] = 1;
                lat[s]   = int'(PL_LAT);
                if (pltot[s] == 0) begin
                  loaded[s] = 0; hpos[s] = 0; hdone[s] = 0;
                end
              end
            end else begin
              pl_words_moved++;
              ppos[s]++;
              if (ppos[s] == pltot[s]) begin
                loaded[s] = 0; hpos[s] = 0; ppos[s] = 0; hdone[s] = 0;
              end
            end
          end else if (hdone[s] && sel_s[s] && !en_s[s] && !avl_s[s] && ppos[s] > 0) begin
            pl_pauses++;
          end
          if (hdone[s]) begin
            if (sel_s[s]) begin
              if (lat[s] > 0) lat[s]--;
            end else begin
              lat[s] = int'(PL_LAT);
            end
          end
        end
        if (!loaded[s] && q[s].size() != 0) begin
          frame_t f;
          f = q[s].pop_front();
          for (int i = 0; i < MAXW; i++) cw[s][i] = (i < f.w.size()) ? f.w[i] : 32'd0;
          clen[s]  = f.len;
          cenc[s]  = f.encap;
          pltot[s] = ((f.len + 3) / 4 > int'(HDR_WORDS)) ? (f.len + 3) / 4 - int'(HDR_WORDS) : 0;
          loaded[s] = 1;
        end
        stall[s] = ($urandom_range(99) < stall_pct);
      end
    end
    -> upd;
  end

endmodule
