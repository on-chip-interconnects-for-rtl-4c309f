// bfly_link: one direction of the Butterfly-based interleaver of a
// multiprocessor turbo decoder: the transmit interfaces of the P_SISO SISOs of
// one component decoder, a 2*P_SISO-port Butterfly network, and the receive
// interfaces with the top/bottom extrinsic memories of the P_SISO SISOs of the
// other component decoder. A complete decoder uses two links, one per
// direction (interleaving and deinterleaving).
//
// Lanes: SISO s drives lanes 2s and 2s+1 (two values per cycle at most).
// Memories: memory 2s is the top memory of destination SISO s (sub-block
// offsets 0..HALF-1), memory 2s+1 its bottom memory (offsets HALF..SUB-1),
// SUB = ceil(N/P_SISO), HALF = ceil(SUB/2). A value enters the transmit
// interface register, crosses log2(2*P_SISO) router stages (plus any cycles
// lost to conflicts) and is written one cycle after leaving the network.
//
// Follows the published interleaver: 8 SISOs with two packets each into a
// 16-port Butterfly and top/bottom memories per destination SISO, one network
// per direction. Own choices: the lane and memory numbering and the clear input.
module bfly_link #(
  parameter int N      = 5114,
  parameter int P_SISO = 8,
  parameter int EW     = 8,
  localparam int NP    = 2 * P_SISO,
  localparam int GW    = $clog2(N),
  localparam int SUB   = (N + P_SISO - 1) / P_SISO,
  localparam int HALF  = (SUB + 1) / 2,
  localparam int AW    = $clog2(SUB + 1),
  localparam int DW    = $clog2(NP),
  localparam int MW    = $clog2(HALF),
  localparam int CW    = $clog2(HALF + 1) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [NP-1:0] siso_valid,
  input  logic [GW-1:0] siso_pos    [NP],
  input  logic [EW-1:0] siso_lambda [NP],
  input  logic [MW-1:0] rd_addr     [NP],
  output logic [EW-1:0] rd_data     [NP],
  output logic [CW-1:0] recv_count  [NP],
  output logic [DW-1:0] conflict,
  output logic          overflow,
  output logic          misroute
);

  localparam int PKW = DW + AW + EW;

  logic [NP-1:0]      n_in_valid, n_out_valid, rx_oor;
  logic [PKW-1:0]     n_in_pkt  [NP];
  logic [AW+EW-1:0]   n_out_pkt [NP];

  for (genvar s = 0; s < P_SISO; s++) begin : g_tx
    logic [GW-1:0]  pos [2];
    logic [EW-1:0]  lam [2];
    logic [PKW-1:0] pk  [2];
    assign pos[0] = siso_pos[2*s];
    assign pos[1] = siso_pos[2*s+1];
    assign lam[0] = siso_lambda[2*s];
    assign lam[1] = siso_lambda[2*s+1];

    bfly_ni_tx #(.N(N), .P_SISO(P_SISO), .EW(EW)) u_ni_tx (
      .clk, .rst,
      .siso_valid (siso_valid[2*s+1 -: 2]),
      .siso_pos   (pos),
      .siso_lambda(lam),
      .pkt_valid  (n_in_valid[2*s+1 -: 2]),
      .pkt        (pk)
    );
    assign n_in_pkt[2*s]   = pk[0];
    assign n_in_pkt[2*s+1] = pk[1];
  end

  bfly_network #(.P(NP), .PLW(AW + EW)) u_net (
    .clk, .rst,
    .in_valid (n_in_valid),
    .in_pkt   (n_in_pkt),
    .out_valid(n_out_valid),
    .out_pkt  (n_out_pkt),
    .conflict,
    .overflow
  );

  for (genvar m = 0; m < NP; m++) begin : g_rx
    ni_rx_mem #(.DEPTH(HALF), .BASE((m % 2) * HALF), .AW(AW), .EW(EW)) u_ni_rx (
      .clk, .rst, .clear,
      .pkt_valid   (n_out_valid[m]),
      .pkt         (n_out_pkt[m]),
      .rd_addr     (rd_addr[m]),
      .rd_data     (rd_data[m]),
      .recv_count  (recv_count[m]),
      .out_of_range(rx_oor[m])
    );
  end

  assign misroute = |rx_oor;

endmodule
