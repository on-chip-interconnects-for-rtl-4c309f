// dn_network: direct interconnect for a P-processor turbo decoder. P dn_node
// instances are wired point to point as one of the graphs of noc_pkg (ring,
// toroidal mesh, generalized de Bruijn, generalized Kautz); each node has D
// outgoing and D incoming links plus one port to its own processing element.
//
// The default is the generalized Kautz graph with D = 4 and P = 16, the
// direct-network configuration with the best throughput per area among those
// evaluated, built with partially precalculated (PP) nodes, SSP routing,
// longest-FIFO-first serving and delay-colliding-message contention handling.
// The node architecture and serving policy are parameters; all nodes share
// them.
//
// Interface: per node, a SISO output lambda (pe_valid/pe_lambda) and a read
// port into that node's extrinsic memory (mem_raddr/mem_rdata). The identifier
// and location memories of node cfg_node are written through cfg_*. A link is
// one register stage (the sender's output register) into the receiver's input
// FIFO; there is no backpressure.
//
// Follows the published direct network: equal-degree graphs, Kautz D = 4 and
// P = 16 as the default configuration, FA/PP nodes, SSP with RR or FL, DCM.
// Own choices: the default FIFO depth of 64 and the shared configuration port
// with a node select. Not provided: the all-precalculated node with adaptive
// shortest-path routing, send-colliding-message handling and the honeycomb graph.
module dn_network
  import noc_pkg::*;
#(
  parameter topo_e      TOPO       = TOPO_KAUTZ,
  parameter int         P          = 16,
  parameter int         D          = 4,
  parameter node_arch_e ARCH       = ARCH_PP,
  parameter policy_e    POLICY     = POL_FL,
  parameter int         N          = 5114,
  parameter int         EW         = 8,
  parameter int         FIFO_DEPTH = 64,
  localparam int KW        = (P > 1) ? $clog2(P) : 1,
  localparam int LOC_DEPTH = (N + P - 1) / P,
  localparam int LW        = (LOC_DEPTH > 1) ? $clog2(LOC_DEPTH) : 1,
  localparam int PKT_W     = KW + EW + ((ARCH == ARCH_FA) ? LW : 0)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame_start,
  input  logic [P-1:0]  pe_valid,
  input  logic [EW-1:0] pe_lambda  [P],
  input  logic [LW-1:0] mem_raddr  [P],
  output logic [EW-1:0] mem_rdata  [P],
  input  logic          cfg_we,
  input  logic [KW-1:0] cfg_node,
  input  logic          cfg_sel,
  input  logic [LW-1:0] cfg_addr,
  input  logic [KW-1:0] cfg_k,
  input  logic [LW-1:0] cfg_loc,
  output logic [LW:0]   sent_count [P],
  output logic [LW:0]   recv_count [P],
  output logic [P-1:0]  stall,
  output logic [P-1:0]  overflow
);

  logic [D-1:0]     out_valid [P];
  logic [PKT_W-1:0] out_data  [P][D];
  logic [D-1:0]     in_valid  [P];
  logic [PKT_W-1:0] in_data   [P][D];

  for (genvar j = 0; j < P; j++) begin : g_node
    for (genvar q = 0; q < D; q++) begin : g_in
      localparam int SRC  = in_src_node(TOPO, P, D, j, q);
      localparam int LINK = in_src_link(TOPO, P, D, j, q);
      assign in_valid[j][q] = out_valid[SRC][LINK];
      assign in_data[j][q]  = out_data[SRC][LINK];
    end

    dn_node #(
      .TOPO(TOPO), .P(P), .D(D), .NODE_ID(j), .ARCH(ARCH), .POLICY(POLICY),
      .N(N), .EW(EW), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_node (
      .clk, .rst, .frame_start,
      .lnk_in_valid (in_valid[j]),
      .lnk_in_data  (in_data[j]),
      .lnk_out_valid(out_valid[j]),
      .lnk_out_data (out_data[j]),
      .pe_valid     (pe_valid[j]),
      .pe_lambda    (pe_lambda[j]),
      .mem_raddr    (mem_raddr[j]),
      .mem_rdata    (mem_rdata[j]),
      .cfg_we       (cfg_we && cfg_node == KW'(j)),
      .cfg_sel, .cfg_addr, .cfg_k, .cfg_loc,
      .sent_count   (sent_count[j]),
      .recv_count   (recv_count[j]),
      .stall        (stall[j]),
      .overflow     (overflow[j])
    );
  end

endmodule
