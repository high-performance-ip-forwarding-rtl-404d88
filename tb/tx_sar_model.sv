// tx_sar_model: behavioural model of the four transmitting SAR controllers.
//
// Not synthesizable. Each Tx SAR accepts words by driving its tx_en_n low
// (from registered state only, randomly held high STALL_PCT percent of the
// cycles, or all the time while hold is set); a word moves when tx_avl is also high. Words are collected per
// (Tx SAR, source Rx SAR) so that frames interleaved by preemption are
// reassembled; a frame is complete at tx_eop and is appended to the
// done_* queues for the testbench to check.
module tx_sar_model
  import fwd_pkg::*;
#(
  parameter int unsigned STALL_PCT = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NPORTS-1:0]  tx_avl,
  output logic [NPORTS-1:0]  tx_en_n,
  input  logic [31:0]        tx_data,
  input  logic               tx_sop,
  input  logic               tx_eop,
  input  logic [PORT_W-1:0]  tx_src
);
  typedef logic [31:0] wq_t[$];

  wq_t  part [NPORTS][NPORTS];
  wq_t  done_w [$];
  int   done_port [$];
  int   done_src  [$];
  int   done_time [$];
  int   cyc = 0;
  int   interleaved = 0;    // sop seen while another frame was open on this port
  int   words = 0;
  bit   stall [NPORTS];
  bit   hold = 0;         // testbench can stop all Tx SARs

  event upd;
  always @(upd) begin
    for (int p = 0; p < NPORTS; p++) tx_en_n[p] = stall[p];
  end

  // sampled at the clock edge, own state updated one time unit later
  logic [NPORTS-1:0] avl_s, en_s;
  logic [31:0]       data_s;
  logic              sop_s, eop_s;
  logic [PORT_W-1:0] src_s;
  always @(posedge clk) begin
    avl_s = tx_avl; en_s = tx_en_n; data_s = tx_data; sop_s = tx_sop; eop_s = tx_eop;
    src_s = tx_src;
    #1;
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) stall[p] = 0;
    end else begin
      cyc++;
      for (int p = 0; p < NPORTS; p++) begin
        if (avl_s[p] && !en_s[p]) begin
          words++;
          if (sop_s) begin
            for (int s = 0; s < NPORTS; s++) if (part[p][s].size() != 0) interleaved++;
            part[p][src_s] = {};
          end
          part[p][src_s].push_back(data_s);
          if (eop_s) begin
            done_w.push_back(part[p][src_s]);
            done_port.push_back(p);
            done_src.push_back(int'(src_s));
            done_time.push_back(cyc);
            part[p][src_s] = {};
          end
        end
        stall[p] = hold || ($urandom_range(99) < STALL_PCT);
      end
    end
    -> upd;
  end

endmodule
