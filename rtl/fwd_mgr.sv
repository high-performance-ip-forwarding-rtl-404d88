// fwd_mgr: forwarding engine manager.
//
// Receives forwarding information from the routing control processor, one
// command at a time on a valid/ready port, and stores it:
//   CMD_ROUTE  an IPv4 route (address, prefix length) at a given CAM index.
//              The address and mask are stored as one ternary-encoded 64-bit
//              word: upper half address AND mask, lower half mask AND NOT
//              address, so that don't-care bits store (0,0). The routing
//              control processor chooses the index; routes with longer masks
//              must sit at higher-priority (lower) indices.
//   CMD_LABEL  an incoming MPLS label for exact match at a given CAM index,
//              stored as the label zero-extended to 64 bits.
//   CMD_LIB    an 8-byte label information entry for a CAM index, written
//              to the 32-bit label information SRAM as two words (high word
//              at {index,0}, low word at {index,1}).
// The manager shares the CAM port with the lookup controller and the SRAM
// port with the label information fetch; the lookup pipeline always has
// priority, and the manager writes only in cycles the pipeline leaves the
// port idle. A CAM write takes one cycle, an SRAM entry two.
// The encoding and the mask ordering are the document's; the command format
// and the port sharing are this design's.
module fwd_mgr
  import fwd_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // routing control processor
  input  logic                   host_valid,
  output logic                   host_ready,
  input  logic [1:0]             host_cmd,
  input  logic [CAM_IDX_W-1:0]   host_index,
  input  logic [31:0]            host_addr,
  input  logic [5:0]             host_plen,
  input  logic [63:0]            host_data,
  // lookup controller's CAM compare port
  input  logic                   lk_req,
  input  cam_op_e                lk_op,
  input  logic [63:0]            lk_key,
  input  logic                   lk_busy,
  // routing coprocessor port
  output logic                   cam_req,
  output cam_op_e                cam_op,
  output logic [CAM_IDX_W-1:0]   cam_addr,
  output logic [63:0]            cam_data,
  // label information fetch read port
  input  logic                   lf_rd,
  input  logic [LIB_ADDR_W-1:0]  lf_addr,
  // label information SRAM port
  output logic                   sram_rd,
  output logic                   sram_wr,
  output logic [LIB_ADDR_W-1:0]  sram_addr,
  output logic [31:0]            sram_wdata
);
  localparam logic [1:0] CMD_ROUTE = 2'd0;
  localparam logic [1:0] CMD_LABEL = 2'd1;
  localparam logic [1:0] CMD_LIB   = 2'd2;

  typedef enum logic [1:0] {M_IDLE, M_CAM, M_LIB_HI, M_LIB_LO} mstate_e;

  mstate_e               st;
  logic [CAM_IDX_W-1:0]  idx;
  logic [63:0]           word;

  assign host_ready = (st == M_IDLE);

  always_comb begin
    // CAM port: lookup compare first
    if (lk_req || lk_busy) begin
      cam_req  = lk_req;
      cam_op   = lk_op;
      cam_addr = '0;
      cam_data = lk_key;
    end else begin
      cam_req  = (st == M_CAM);
      cam_op   = CAM_WRITE;
      cam_addr = idx;
      cam_data = word;
    end
    // SRAM port: label fetch reads first
    sram_rd    = lf_rd;
    sram_wr    = !lf_rd && ((st == M_LIB_HI) || (st == M_LIB_LO));
    sram_addr  = lf_rd ? lf_addr : {idx, (st == M_LIB_LO)};
    sram_wdata = (st == M_LIB_LO) ? word[31:0] : word[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= M_IDLE;
      idx  <= '0;
      word <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (host_valid) begin
          idx <= host_index;
          unique case (host_cmd)
            CMD_ROUTE: begin
              word <= tcam_encode(host_addr, prefix_mask(host_plen));
              st   <= M_CAM;
            end
            CMD_LABEL: begin
              word <= {44'd0, host_data[19:0]};
              st   <= M_CAM;
            end
            CMD_LIB: begin
              word <= host_data;
              st   <= M_LIB_HI;
            end
            default: st <= M_IDLE;        // code 3: no operation
          endcase
        end
        M_CAM:    if (!(lk_req || lk_busy)) st <= M_IDLE;
        M_LIB_HI: if (!lf_rd) st <= M_LIB_LO;
        default:  if (!lf_rd) st <= M_IDLE;
      endcase
    end
  end

endmodule
