// cam_model: behavioural model of the CAM-based routing coprocessor.
//
// Not synthesizable; stands in for the external search device in
// testbenches. Entries are 64-bit words written with CAM_WRITE at an index
// and kept in an associative array, so the full 128K-entry index space costs
// only what is written. Indices below EXACT_BASE form the longest-prefix
// list: an entry {A&M, M&~A} matches key k when every bit stored as 1 in the
// upper half is 1 in k and every bit stored as 1 in the lower half is 0 in
// k; the lowest matching index wins (entries are stored in mask order).
// Indices from EXACT_BASE up form the exact-match list (64-bit equality).
// A compare request is answered, with cam_done for one cycle, SEARCH_CYCLES
// cycles after the request cycle counted inclusively (5 cycles = 50 ns at
// 100 MHz), whatever the list size: a deterministic search time.
module cam_model
  import fwd_pkg::*;
#(
  parameter int unsigned SEARCH_CYCLES = 5,
  parameter int unsigned EXACT_BASE    = 1 << 16
) (
  input  logic                  clk,
  input  logic                  cam_req,
  input  logic [1:0]            cam_op,
  input  logic [CAM_IDX_W-1:0]  cam_addr,
  input  logic [63:0]           cam_data,
  output logic                  cam_done,
  output logic                  cam_hit,
  output logic [CAM_IDX_W-1:0]  cam_index
);
  logic [63:0] ent [int];
  int          cnt = 0;
  int          searches = 0;

  assign cam_done = (cnt == 1);

  function automatic bit tmatch(logic [63:0] e, logic [31:0] k);
    return ((e[63:32] & ~k) == 0) && ((e[31:0] & k) == 0) && (e != 0);
  endfunction

  always @(posedge clk) begin
    if (cnt > 0) cnt <= cnt - 1;
    if (cam_req && cam_op == 2'(CAM_WRITE)) begin
      ent[int'(cam_addr)] = cam_data;
    end else if (cam_req) begin
      bit found;
      found = 0;
      searches++;
      foreach (ent[i]) begin
        if (!found) begin
          if (cam_op == 2'(CAM_LPM) && i < int'(EXACT_BASE) && tmatch(ent[i], cam_data[31:0]))
            found = 1;
          if (cam_op == 2'(CAM_EXACT) && i >= int'(EXACT_BASE) && ent[i] == cam_data)
            found = 1;
          if (found) cam_index <= CAM_IDX_W'(i);
        end
      end
      cam_hit <= found;
      cnt     <= int'(SEARCH_CYCLES) - 1;
    end
  end

endmodule
