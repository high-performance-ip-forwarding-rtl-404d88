// rr_select: round-robin choice among N requesters.
//
// Serves the per-SAR packet header queues in turn: grant is the first
// requester at or after the rotating pointer, valid says whether any
// requests. When the chosen entry is taken (take), the pointer moves to the
// requester after the one granted, so every queue is served within N turns.
// Combinational choice, pointer updated at the clock edge.
module rr_select #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 take,
  output logic                 valid,
  output logic [$clog2(N)-1:0] grant
);
  localparam int unsigned W = $clog2(N);

  logic [W-1:0] ptr;

  always_comb begin
    valid = 1'b0;
    grant = ptr;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[W'((int'(ptr) + k) % N)]) begin
        valid = 1'b1;
        grant = W'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= '0;
    else if (take && valid)  ptr <= (grant == W'(N - 1)) ? '0 : grant + 1'b1;
  end

endmodule
