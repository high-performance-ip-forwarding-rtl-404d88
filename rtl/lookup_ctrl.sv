// lookup_ctrl: phase 2 of the lookup pipeline, hardware lookup control.
//
// Drives the CAM-based routing coprocessor through the state sequence of the
// document's lookup state diagram:
//   ARRIVAL  validated header arrival check (1T). Waits here while no
//            header is offered; takes one when it arrives.
//   EXTRACT  address extraction (1T): forms the 64-bit search key and the
//            compare instruction - longest prefix match on the destination
//            address for IPv4, exact match on the label for MPLS.
//   COMPARE  cam_req is raised for one cycle with the key and instruction;
//            the coprocessor answers with cam_done (and cam_hit, cam_index)
//            after its fixed search time, 50 ns = 5 clocks at 100 MHz.
//            A miss returns to ARRIVAL and hands the header to the
//            control/error path (miss_valid) with reason X_NOROUTE.
//   INDEX    index fetch (1T): the CAM index is offered to the label
//            information fetch (out_valid) and held until it is taken.
// A header therefore occupies this phase for 1 + 1 + 5 + 1 = 8 clocks, the
// document's "50 ns + 3T", which sets the pipeline's rate of one packet per
// 80 ns (12.5 Mpackets/s). The states and their times are the document's;
// the CAM handshake (a request pulse, a done pulse) is this design's.
module lookup_ctrl
  import fwd_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // validated header from phase 1
  input  logic                  in_valid,
  output logic                  in_ready,
  input  p1_t                   in_p,
  // routing coprocessor compare port
  output logic                  cam_req,
  output cam_op_e               cam_op,
  output logic [63:0]           cam_key,
  input  logic                  cam_done,
  input  logic                  cam_hit,
  input  logic [CAM_IDX_W-1:0]  cam_index,
  output logic                  cam_busy,    // a compare is being prepared or in flight
  // to label information fetch
  output logic                  out_valid,
  input  logic                  out_ready,
  output p2_t                   out_q,
  // lookup miss to the control/error path
  output logic                  miss_valid,
  input  logic                  miss_ready,
  output p1_t                   miss_p
);
  typedef enum logic [2:0] {S_ARRIVAL, S_EXTRACT, S_COMPARE, S_INDEX, S_MISS} state_e;

  state_e                state;
  p1_t                   p;
  logic                  req_sent;
  logic [CAM_IDX_W-1:0]  idx;

  assign in_ready   = (state == S_ARRIVAL);
  assign cam_req    = (state == S_COMPARE) && !req_sent;
  assign cam_busy   = (state == S_EXTRACT) || (state == S_COMPARE);
  assign out_valid  = (state == S_INDEX);
  assign miss_valid = (state == S_MISS);

  always_comb begin
    out_q       = '0;
    out_q.p     = p;
    out_q.index = idx;
    miss_p      = p;
    miss_p.kind = K_ERR;
    miss_p.exc  = X_NOROUTE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_ARRIVAL;
      req_sent <= 1'b0;
      cam_op   <= CAM_LPM;
      cam_key  <= '0;
    end else begin
      unique case (state)
        S_ARRIVAL: if (in_valid) state <= S_EXTRACT;
        S_EXTRACT: begin
          cam_op   <= (p.kind == K_MPLS) ? CAM_EXACT : CAM_LPM;
          cam_key  <= p.key;
          req_sent <= 1'b0;
          state    <= S_COMPARE;
        end
        S_COMPARE: begin
          req_sent <= 1'b1;
          if (cam_done) state <= cam_hit ? S_INDEX : S_MISS;
        end
        S_INDEX:  if (out_ready)  state <= S_ARRIVAL;
        default:  if (miss_ready) state <= S_ARRIVAL;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_ARRIVAL && in_valid) p <= in_p;
    if (state == S_COMPARE && cam_done) idx <= cam_index;
  end

endmodule
