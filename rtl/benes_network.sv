// benes_network: P-port Benes network of 2*log2(P)-1 stages, P/2 bufferless
// routers per stage (56 routers for P = 16).
//
// Wiring: the ports are lines 0..P-1. Stage s pairs the lines that differ only
// in bit b(s), with b = d-1, d-2, .., 1, 0, 1, .., d-1 (d = log2 P): a
// Butterfly followed by its mirror image sharing the middle stage. The two
// halves of the lines below the first and last stages form two Benes networks
// of half the size, the usual recursive structure, so every permutation can be
// routed without conflict and there are several paths per source/destination
// pair. Router input/output 0 is the line with bit b(s) clear.
//
// Routing is street-sign: a packet enters with a (2d-1)-bit route, one output
// port per stage, leading bit first, computed off line for the interleaving
// law (for instance with the looping algorithm). Each stage consumes one bit;
// packets leave with the PLW-bit rest. Latency is exactly 2d-1 cycles. The
// network has no buffers: inputs must be scheduled so that the packets
// entering in one cycle have distinct destinations (time-division access,
// see benes_ni_tx).
//
// Follows the published network: 2*log2(P)-1 stages as two Butterflies back to
// back, bufferless routers, street-sign routes and time-division access. Own
// choice: the exact line-pairing order of the stages.
module benes_network #(
  parameter int P   = 16,
  parameter int PLW = 18,
  localparam int D  = $clog2(P),
  localparam int NS = 2 * D - 1,
  localparam int IW = NS + PLW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [P-1:0]   in_valid,
  input  logic [IW-1:0]  in_pkt  [P],
  output logic [P-1:0]   out_valid,
  output logic [PLW-1:0] out_pkt [P],
  output logic           collision
);

  logic [P-1:0]  v  [NS+1];
  logic [IW-1:0] pk [NS+1][P];
  logic [NS-1:0] st_col;

  assign v[0]  = in_valid;
  assign pk[0] = in_pkt;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int B   = (s < D) ? (D - 1 - s) : (s - D + 1);
    localparam int RW  = NS - s;
    localparam int SIW = RW + PLW;
    localparam int SOW = RW - 1 + PLW;
    logic [P/2-1:0] r_col;

    for (genvar r = 0; r < P / 2; r++) begin : g_router
      localparam int L0 = ((r >> B) << (B + 1)) | (r & ((1 << B) - 1));
      localparam int L1 = L0 | (1 << B);
      logic [SIW-1:0] ip [2];
      logic [SOW-1:0] op [2];
      logic [1:0]     ov;

      assign ip[0] = pk[s][L0][SIW-1:0];
      assign ip[1] = pk[s][L1][SIW-1:0];

      benes_router #(.RW(RW), .PLW(PLW)) u_router (
        .clk, .rst,
        .in_valid ({v[s][L1], v[s][L0]}),
        .in_pkt   (ip),
        .out_valid(ov),
        .out_pkt  (op),
        .collision(r_col[r])
      );

      assign v[s+1][L0]  = ov[0];
      assign v[s+1][L1]  = ov[1];
      assign pk[s+1][L0] = IW'(op[0]);
      assign pk[s+1][L1] = IW'(op[1]);
    end

    assign st_col[s] = |r_col;
  end

  assign collision = |st_col;
  assign out_valid = v[NS];
  for (genvar l = 0; l < P; l++) begin : g_out
    assign out_pkt[l] = pk[NS][l][PLW-1:0];
  end

endmodule
