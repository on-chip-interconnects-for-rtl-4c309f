// bfly_network: P-port Butterfly network of log2(P) stages with P/2 routers
// each (32 routers for P = 16).
//
// Wiring: the P ports are lines 0..P-1. Stage s (s = 0..d-1, d = log2 P)
// pairs the lines that differ only in bit b = d-1-s; router input/output 0 is
// the line with that bit 0, input/output 1 the line with it set. A packet
// enters with its destination port as a d-bit tag, most significant bit
// first; each stage uses and drops the leading bit, which sets line bit b to
// the destination's bit b. After the last stage the line number equals the
// destination, so any permutation can be carried, and there is exactly one
// path per source/destination pair. Packets leave with only the PLW-bit rest
// (memory address and extrinsic value).
//
// Router FIFOs in stage s hold 2^s packets, the depth for the case where all
// packets entering a router want the same output. Each stage costs two
// cycles (FIFO write, output register), so a packet written into the first
// stage at one clock edge leaves the last stage's register 2d-1 edges later
// when it meets no conflict, one more per cycle lost in arbitration. Packets from one source
// to one destination stay in order.
//
// Follows the published network: log2(P) stages of 2x2 routers, destination-tag
// routing and FIFO depth 2^i in stage i. Own choices: the line-pairing order
// and the conflict/overflow status outputs.
module bfly_network #(
  parameter int P   = 16,
  parameter int PLW = 18,
  localparam int D  = $clog2(P),
  localparam int IW = D + PLW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [P-1:0]   in_valid,
  input  logic [IW-1:0]  in_pkt  [P],
  output logic [P-1:0]   out_valid,
  output logic [PLW-1:0] out_pkt [P],
  output logic [D-1:0]   conflict,   // any router of stage s had a conflict
  output logic           overflow
);

  // Stage s input lines carry D-s tag bits; the widest width is used for
  // storage and the unused upper bits are zero.
  logic [P-1:0]  v   [D+1];
  logic [IW-1:0] pk  [D+1][P];
  logic [D-1:0]  st_ovf;

  assign v[0]  = in_valid;
  assign pk[0] = in_pkt;

  for (genvar s = 0; s < D; s++) begin : g_stage
    localparam int B   = D - 1 - s;
    localparam int RW  = D - s;
    localparam int SIW = RW + PLW;
    localparam int SOW = RW - 1 + PLW;
    logic [P/2-1:0] r_conf, r_ovf;

    for (genvar r = 0; r < P / 2; r++) begin : g_router
      // line with bit B clear: insert a 0 at bit position B of r
      localparam int L0 = ((r >> B) << (B + 1)) | (r & ((1 << B) - 1));
      localparam int L1 = L0 | (1 << B);
      logic [SIW-1:0] ip [2];
      logic [SOW-1:0] op [2];
      logic [1:0]     ov;

      assign ip[0] = pk[s][L0][SIW-1:0];
      assign ip[1] = pk[s][L1][SIW-1:0];

      bfly_router #(.RW(RW), .PLW(PLW), .DEPTH(1 << s)) u_router (
        .clk, .rst,
        .in_valid ({v[s][L1], v[s][L0]}),
        .in_pkt   (ip),
        .out_valid(ov),
        .out_pkt  (op),
        .conflict (r_conf[r]),
        .overflow (r_ovf[r])
      );

      assign v[s+1][L0]  = ov[0];
      assign v[s+1][L1]  = ov[1];
      assign pk[s+1][L0] = IW'(op[0]);
      assign pk[s+1][L1] = IW'(op[1]);
    end

    assign conflict[s] = |r_conf;
    assign st_ovf[s]   = |r_ovf;
  end

  assign overflow  = |st_ovf;
  assign out_valid = v[D];
  for (genvar l = 0; l < P; l++) begin : g_out
    assign out_pkt[l] = pk[D][l][PLW-1:0];
  end

endmodule
