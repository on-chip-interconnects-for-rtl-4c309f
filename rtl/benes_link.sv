// benes_link: one direction of the Benes-based interleaver: 2*P_SISO TDMA
// transmit interfaces (two lanes per SISO of one component decoder), a
// 2*P_SISO-port Benes network and the receive interfaces with the top/bottom
// extrinsic memories of the other component decoder's SISOs.
//
// Lane and memory numbering, address field and memory split are those of
// bfly_link. Each lane's schedule table (time slot and street-sign route of
// every packet it sends) is written through cfg_* with cfg_lane selecting the
// lane. A value leaves its transmit interface in its slot (registered), takes
// 2*log2(2*P_SISO)-1 cycles through the network and is written one cycle
// later.
//
// Follows the published TDMA Benes interleaver. Own choices: the per-lane
// schedule tables and their configuration port, the lane and memory numbering,
// and clearing the receive counters with frame_start.
//
// Lint note: the per-lane sent counters are left open; the receive counters
// already show progress.
module benes_link #(
  parameter int N      = 5114,
  parameter int P_SISO = 8,
  parameter int EW     = 8,
  parameter int SW     = 12,
  localparam int NP    = 2 * P_SISO,
  localparam int GW    = $clog2(N),
  localparam int SUB   = (N + P_SISO - 1) / P_SISO,
  localparam int HALF  = (SUB + 1) / 2,
  localparam int AW    = $clog2(SUB + 1),
  localparam int DW    = $clog2(NP),
  localparam int NS    = 2 * DW - 1,
  localparam int MW    = $clog2(HALF),
  localparam int CW    = $clog2(HALF + 1) + 1,
  localparam int TDEPTH = HALF,
  localparam int TW    = $clog2(TDEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame_start,
  input  logic [NP-1:0] siso_valid,
  input  logic [GW-1:0] siso_pos    [NP],
  input  logic [EW-1:0] siso_lambda [NP],
  input  logic          cfg_we,
  input  logic [DW-1:0] cfg_lane,
  input  logic [TW-1:0] cfg_addr,
  input  logic [SW-1:0] cfg_slot,
  input  logic [NS-1:0] cfg_route,
  input  logic [MW-1:0] rd_addr     [NP],
  output logic [EW-1:0] rd_data     [NP],
  output logic [CW-1:0] recv_count  [NP],
  output logic          collision,
  output logic          late,
  output logic          overflow,
  output logic          misroute
);

  localparam int PKW = NS + AW + EW;

  logic [NP-1:0]    n_in_valid, n_out_valid, rx_oor, tx_late, tx_ovf;
  logic [PKW-1:0]   n_in_pkt  [NP];
  logic [AW+EW-1:0] n_out_pkt [NP];

  for (genvar l = 0; l < NP; l++) begin : g_tx
    benes_ni_tx #(.N(N), .P_SISO(P_SISO), .EW(EW), .NS(NS), .TDEPTH(TDEPTH),
                  .SW(SW)) u_ni_tx (
      .clk, .rst, .frame_start,
      .siso_valid (siso_valid[l]),
      .siso_pos   (siso_pos[l]),
      .siso_lambda(siso_lambda[l]),
      .cfg_we     (cfg_we && cfg_lane == DW'(l)),
      .cfg_addr, .cfg_slot, .cfg_route,
      .pkt_valid  (n_in_valid[l]),
      .pkt        (n_in_pkt[l]),
      .sent_count (),
      .late       (tx_late[l]),
      .overflow   (tx_ovf[l])
    );
  end

  benes_network #(.P(NP), .PLW(AW + EW)) u_net (
    .clk, .rst,
    .in_valid (n_in_valid),
    .in_pkt   (n_in_pkt),
    .out_valid(n_out_valid),
    .out_pkt  (n_out_pkt),
    .collision
  );

  for (genvar m = 0; m < NP; m++) begin : g_rx
    ni_rx_mem #(.DEPTH(HALF), .BASE((m % 2) * HALF), .AW(AW), .EW(EW)) u_ni_rx (
      .clk, .rst,
      .clear       (frame_start),
      .pkt_valid   (n_out_valid[m]),
      .pkt         (n_out_pkt[m]),
      .rd_addr     (rd_addr[m]),
      .rd_data     (rd_data[m]),
      .recv_count  (recv_count[m]),
      .out_of_range(rx_oor[m])
    );
  end

  assign late     = |tx_late;
  assign overflow = |tx_ovf;
  assign misroute = |rx_oor;

endmodule
