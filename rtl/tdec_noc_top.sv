// tdec_noc_top: the three on-chip interconnects for a 16-processor turbo
// decoder, side by side. They are alternatives, not parts of one data path;
// each has its own ports, and the SISO processors that would drive them are
// outside (their outputs and memory read ports are the top's ports).
//
//  bfly_*   Butterfly interleaver: two bfly_link instances, index 0 carrying
//           values from component decoder 0 (SISOs 0..7) to component
//           decoder 1 (SISOs 8..15), index 1 the way back. 16-port networks
//           with FIFO routers, destination-tag routing.
//  benes_*  Benes interleaver: two benes_link instances, same directions;
//           bufferless routers, street-sign routes and time slots loaded
//           through benes_cfg_*.
//  dn_*     Direct network: 16 nodes on the generalized Kautz graph of degree
//           4, partially precalculated nodes, SSP routing, longest-FIFO-first
//           serving, delay-colliding-message contention handling. Each node
//           holds its SISO's extrinsic memory and the identifier/location
//           memories loaded through dn_cfg_*.
//
// All three run on clk with a synchronous active-high reset. A frame
// (half iteration) starts with the *_frame_start / bfly_clear pulses, which
// clear the receive counters (and, for Benes and the direct network, the
// time-slot and send counters).
//
// Follows the published comparison of Butterfly, Benes and Kautz networks at a
// parallelism of 16. Own choices: putting all three in one top with separate
// ports, and the direct network's PP nodes with longest-FIFO-first SSP routing
// in place of the adaptive scheme used for the published Kautz figures.
module tdec_noc_top
  import noc_pkg::*;
#(
  parameter int N      = 5114,
  parameter int P_SISO = 8,
  parameter int EW     = 8,
  parameter int SW     = 12,
  parameter topo_e      DN_TOPO   = TOPO_KAUTZ,
  parameter int         DN_P      = 16,
  parameter int         DN_D      = 4,
  parameter node_arch_e DN_ARCH   = ARCH_PP,
  parameter policy_e    DN_POLICY = POL_FL,
  parameter int         DN_FIFO_DEPTH = 64,
  localparam int NP    = 2 * P_SISO,
  localparam int GW    = $clog2(N),
  localparam int SUB   = (N + P_SISO - 1) / P_SISO,
  localparam int HALF  = (SUB + 1) / 2,
  localparam int DW    = $clog2(NP),
  localparam int NS    = 2 * DW - 1,
  localparam int MW    = $clog2(HALF),
  localparam int CW    = $clog2(HALF + 1) + 1,
  localparam int TW    = $clog2(HALF),
  localparam int KW    = $clog2(DN_P),
  localparam int DN_LOC = (N + DN_P - 1) / DN_P,
  localparam int LW    = $clog2(DN_LOC)
) (
  input  logic          clk,
  input  logic          rst,
  // ---------------- Butterfly interleaver, [dir]: 0 = CD0->CD1, 1 = CD1->CD0
  input  logic          bfly_clear,
  input  logic [NP-1:0] bfly_siso_valid  [2],
  input  logic [GW-1:0] bfly_siso_pos    [2][NP],
  input  logic [EW-1:0] bfly_siso_lambda [2][NP],
  input  logic [MW-1:0] bfly_rd_addr     [2][NP],
  output logic [EW-1:0] bfly_rd_data     [2][NP],
  output logic [CW-1:0] bfly_recv_count  [2][NP],
  output logic [DW-1:0] bfly_conflict    [2],
  output logic [1:0]    bfly_overflow,
  output logic [1:0]    bfly_misroute,
  // ---------------- Benes interleaver
  input  logic          benes_frame_start,
  input  logic [NP-1:0] benes_siso_valid  [2],
  input  logic [GW-1:0] benes_siso_pos    [2][NP],
  input  logic [EW-1:0] benes_siso_lambda [2][NP],
  input  logic [1:0]    benes_cfg_we,
  input  logic [DW-1:0] benes_cfg_lane,
  input  logic [TW-1:0] benes_cfg_addr,
  input  logic [SW-1:0] benes_cfg_slot,
  input  logic [NS-1:0] benes_cfg_route,
  input  logic [MW-1:0] benes_rd_addr     [2][NP],
  output logic [EW-1:0] benes_rd_data     [2][NP],
  output logic [CW-1:0] benes_recv_count  [2][NP],
  output logic [1:0]    benes_collision,
  output logic [1:0]    benes_late,
  output logic [1:0]    benes_overflow,
  output logic [1:0]    benes_misroute,
  // ---------------- direct network
  input  logic              dn_frame_start,
  input  logic [DN_P-1:0]   dn_pe_valid,
  input  logic [EW-1:0]     dn_pe_lambda [DN_P],
  input  logic [LW-1:0]     dn_mem_raddr [DN_P],
  output logic [EW-1:0]     dn_mem_rdata [DN_P],
  input  logic              dn_cfg_we,
  input  logic [KW-1:0]     dn_cfg_node,
  input  logic              dn_cfg_sel,
  input  logic [LW-1:0]     dn_cfg_addr,
  input  logic [KW-1:0]     dn_cfg_k,
  input  logic [LW-1:0]     dn_cfg_loc,
  output logic [LW:0]       dn_sent_count [DN_P],
  output logic [LW:0]       dn_recv_count [DN_P],
  output logic [DN_P-1:0]   dn_stall,
  output logic [DN_P-1:0]   dn_overflow
);

  for (genvar dir = 0; dir < 2; dir++) begin : g_dir
    bfly_link #(.N(N), .P_SISO(P_SISO), .EW(EW)) u_bfly (
      .clk, .rst,
      .clear      (bfly_clear),
      .siso_valid (bfly_siso_valid[dir]),
      .siso_pos   (bfly_siso_pos[dir]),
      .siso_lambda(bfly_siso_lambda[dir]),
      .rd_addr    (bfly_rd_addr[dir]),
      .rd_data    (bfly_rd_data[dir]),
      .recv_count (bfly_recv_count[dir]),
      .conflict   (bfly_conflict[dir]),
      .overflow   (bfly_overflow[dir]),
      .misroute   (bfly_misroute[dir])
    );

    benes_link #(.N(N), .P_SISO(P_SISO), .EW(EW), .SW(SW)) u_benes (
      .clk, .rst,
      .frame_start(benes_frame_start),
      .siso_valid (benes_siso_valid[dir]),
      .siso_pos   (benes_siso_pos[dir]),
      .siso_lambda(benes_siso_lambda[dir]),
      .cfg_we     (benes_cfg_we[dir]),
      .cfg_lane   (benes_cfg_lane),
      .cfg_addr   (benes_cfg_addr),
      .cfg_slot   (benes_cfg_slot),
      .cfg_route  (benes_cfg_route),
      .rd_addr    (benes_rd_addr[dir]),
      .rd_data    (benes_rd_data[dir]),
      .recv_count (benes_recv_count[dir]),
      .collision  (benes_collision[dir]),
      .late       (benes_late[dir]),
      .overflow   (benes_overflow[dir]),
      .misroute   (benes_misroute[dir])
    );
  end

  dn_network #(
    .TOPO(DN_TOPO), .P(DN_P), .D(DN_D), .ARCH(DN_ARCH), .POLICY(DN_POLICY),
    .N(N), .EW(EW), .FIFO_DEPTH(DN_FIFO_DEPTH)
  ) u_dn (
    .clk, .rst,
    .frame_start(dn_frame_start),
    .pe_valid   (dn_pe_valid),
    .pe_lambda  (dn_pe_lambda),
    .mem_raddr  (dn_mem_raddr),
    .mem_rdata  (dn_mem_rdata),
    .cfg_we     (dn_cfg_we),
    .cfg_node   (dn_cfg_node),
    .cfg_sel    (dn_cfg_sel),
    .cfg_addr   (dn_cfg_addr),
    .cfg_k      (dn_cfg_k),
    .cfg_loc    (dn_cfg_loc),
    .sent_count (dn_sent_count),
    .recv_count (dn_recv_count),
    .stall      (dn_stall),
    .overflow   (dn_overflow)
  );

endmodule
