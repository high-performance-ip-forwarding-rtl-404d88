// exc_ctrl: control/error packet control.
//
// Packets that must not be looked up - control protocol packets (ATMARP, PPP
// control) and headers that failed verification in phase 1, plus headers for
// which the lookup in phase 2 found no entry - skip the lookup and label
// fetch phases and go straight to header modification. This block queues
// them in a small FIFO (DEPTH entries) so that phases 1 and 2 are not held
// up by a busy header modification unit. Input a comes from phase 1,
// input b from phase 2; b wins when both offer a packet in the same cycle.
// Handshakes are valid/ready; an entry pushed in one cycle is visible at the
// output in the next. The bypass path is the document's; the queue, its
// depth and the handling of lookup misses on this path are this design's.
module exc_ctrl
  import fwd_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  input  p1_t  a_p,
  input  logic b_valid,
  output logic b_ready,
  input  p1_t  b_p,
  output logic out_valid,
  input  logic out_ready,
  output p1_t  out_p
);
  logic full, empty;
  logic push;
  p1_t  din;

  assign b_ready = !full;
  assign a_ready = !full && !b_valid;
  assign push    = (b_valid || a_valid) && !full;
  assign din     = b_valid ? b_p : a_p;
  assign out_valid = !empty;

  sync_fifo #(.T(p1_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push, .din,
    .pop   (out_valid && out_ready),
    .dout  (out_p),
    .full, .empty,
    .count ()
  );

endmodule
