// dn_node: one node of the direct network, a routing element (RE) plus the
// memories that sit between the RE and the processing element (PE, the SISO
// decoder, which is outside this module).
//
// RE: M = D+1 input FIFOs feed an MxM crossbar whose outputs are registered.
// Ports 0..D-1 are network links, port D (= M-1) is the PE. Every cycle the
// routing algorithm (RA) looks at the head packet of each FIFO, maps its
// destination node k to an output port with a single-shortest-path (SSP) table
// computed at elaboration from the topology (noc_pkg::ssp_port), and serves
// the FIFOs in priority order: round robin (POL_RR, the order rotates by one
// every cycle) or longest FIFO first (POL_FL, ties broken by the round-robin
// order). A head whose output port is already taken this cycle stays in its
// FIFO (delay colliding message, DCM) and is retried next cycle. Granted heads
// are popped and loaded into the output registers, so one hop costs one FIFO
// write plus one register stage. There is no flow control between nodes: the
// FIFOs must be deep enough for the traffic, and an overflow is flagged.
//
// Memories (depth LOC_DEPTH = ceil(N/P) words each, register arrays):
//   IM  identifier memory, k(i,j): destination node of the j-th extrinsic value
//       this node sends;
//   LM  location memory. ARCH_FA: t(i,j), location at the destination, read on
//       send and carried in the packet. ARCH_PP: t'(i,j), location of the j-th
//       value this node receives, read on receive; the packet then holds only
//       k and lambda;
//   MEM extrinsic memory, written with the received lambda' at its location and
//       read by the SISO through mem_raddr/mem_rdata (combinational read).
// IM and LM are filled through the cfg_* port (their contents are computed off
// line from the interleaving law). frame_start clears the send and receive
// counters j.
//
// Interface timing: pe_valid/pe_lambda is one extrinsic value from the SISO,
// accepted every cycle it is high (the injection rate r is how often the SISO
// raises it). lnk_out_* of a node drive lnk_in_* of the neighbour directly.
// A packet reaching its destination RE is written into MEM two cycles after it
// is granted the PE port (output register, then the write).
//
// Follows the description: input queuing, MxM crossbar, output registers, port
// M-1 to the PE, IM/LM/MEM roles, FA and PP packet contents, SSP with RR and
// FL, DCM. Own choices: FIFO depth, the tie-breaking rule of FL, the lowest
// link index as the single shortest path, the configuration port and
// synchronous active-high reset.
//
// Lint note: the FIFOs' full flags are collected but unused; overflow is
// reported instead.
module dn_node
  import noc_pkg::*;
#(
  parameter topo_e      TOPO       = TOPO_KAUTZ,
  parameter int         P          = 16,
  parameter int         D          = 4,
  parameter int         NODE_ID    = 0,
  parameter node_arch_e ARCH       = ARCH_PP,
  parameter policy_e    POLICY     = POL_FL,
  parameter int         N          = 5114,
  parameter int         EW         = 8,
  parameter int         FIFO_DEPTH = 64,
  localparam int M         = D + 1,
  localparam int KW        = (P > 1) ? $clog2(P) : 1,
  localparam int LOC_DEPTH = (N + P - 1) / P,
  localparam int LW        = (LOC_DEPTH > 1) ? $clog2(LOC_DEPTH) : 1,
  localparam int PKT_W     = KW + EW + ((ARCH == ARCH_FA) ? LW : 0),
  localparam int PW        = $clog2(M),
  localparam int CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             frame_start,
  // network links
  input  logic [D-1:0]     lnk_in_valid,
  input  logic [PKT_W-1:0] lnk_in_data  [D],
  output logic [D-1:0]     lnk_out_valid,
  output logic [PKT_W-1:0] lnk_out_data [D],
  // PE (SISO) side
  input  logic             pe_valid,
  input  logic [EW-1:0]    pe_lambda,
  input  logic [LW-1:0]    mem_raddr,
  output logic [EW-1:0]    mem_rdata,
  // IM / LM load port: cfg_sel 0 = IM, 1 = LM
  input  logic             cfg_we,
  input  logic             cfg_sel,
  input  logic [LW-1:0]    cfg_addr,
  input  logic [KW-1:0]    cfg_k,
  input  logic [LW-1:0]    cfg_loc,
  // status
  output logic [LW:0]      sent_count,
  output logic [LW:0]      recv_count,
  output logic             stall,
  output logic             overflow
);

  // ---------------------------------------------------------------- memories
  logic [KW-1:0] im  [LOC_DEPTH];
  logic [LW-1:0] lm  [LOC_DEPTH];
  logic [EW-1:0] mem [LOC_DEPTH];

  always_ff @(posedge clk) begin
    if (cfg_we && !cfg_sel) im[cfg_addr] <= cfg_k;
    if (cfg_we &&  cfg_sel) lm[cfg_addr] <= cfg_loc;
  end

  assign mem_rdata = mem[mem_raddr];

  // ---------------------------------------------------------- PE injection
  logic [PKT_W-1:0] pe_pkt;
  logic [LW-1:0]    sidx;
  assign sidx = sent_count[LW-1:0];

  if (ARCH == ARCH_FA) begin : g_fa_pkt
    assign pe_pkt = {im[sidx], lm[sidx], pe_lambda};
  end else begin : g_pp_pkt
    assign pe_pkt = {im[sidx], pe_lambda};
  end

  // ------------------------------------------------------------ input FIFOs
  logic [M-1:0]     f_wr, f_rd, f_empty, f_full, f_ovf;
  logic [PKT_W-1:0] f_wdata [M];
  logic [PKT_W-1:0] f_head  [M];
  logic [CW-1:0]    f_cnt   [M];

  for (genvar m = 0; m < M; m++) begin : g_fifo
    if (m < D) begin : g_link
      assign f_wr[m]    = lnk_in_valid[m];
      assign f_wdata[m] = lnk_in_data[m];
    end else begin : g_pe
      assign f_wr[m]    = pe_valid;
      assign f_wdata[m] = pe_pkt;
    end
    noc_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en   (f_wr[m]),
      .wr_data (f_wdata[m]),
      .rd_en   (f_rd[m]),
      .rd_data (f_head[m]),
      .empty   (f_empty[m]),
      .full    (f_full[m]),
      .count   (f_cnt[m]),
      .overflow(f_ovf[m])
    );
  end

  assign overflow = |f_ovf;

  // ------------------------------------------------- routing table (SSP)
  logic [PW-1:0] rtab [P];
  for (genvar t = 0; t < P; t++) begin : g_rtab
    assign rtab[t] = PW'(ssp_port(TOPO, P, D, NODE_ID, t));
  end

  // ------------------------------------------------------ routing algorithm
  logic [PW-1:0] rr_ptr;
  logic [PW-1:0] req_port [M];
  logic [PW-1:0] rr_rank  [M];
  logic [PW-1:0] rank     [M];
  logic [M-1:0]  grant;

  always_comb begin
    for (int m = 0; m < M; m++) begin
      req_port[m] = rtab[f_head[m][PKT_W-1 -: KW]];
      rr_rank[m]  = PW'((m + M - int'(rr_ptr)) % M);
    end
    for (int m = 0; m < M; m++) begin
      if (POLICY == POL_RR) begin
        rank[m] = rr_rank[m];
      end else begin
        rank[m] = '0;
        for (int n = 0; n < M; n++)
          if (n != m && (f_cnt[n] > f_cnt[m] ||
                         (f_cnt[n] == f_cnt[m] && rr_rank[n] < rr_rank[m])))
            rank[m] = rank[m] + 1'b1;
      end
    end
    // A head wins its output port unless a higher-priority head wants it too.
    for (int m = 0; m < M; m++) begin
      grant[m] = !f_empty[m];
      for (int n = 0; n < M; n++)
        if (n != m && !f_empty[n] && req_port[n] == req_port[m] && rank[n] < rank[m])
          grant[m] = 1'b0;
    end
  end

  assign f_rd  = grant;
  assign stall = |(~f_empty & ~grant);

  // --------------------------------------------- crossbar + output registers
  logic [M-1:0]     o_valid;
  logic [PKT_W-1:0] o_data [M];

  always_ff @(posedge clk) begin
    if (rst) begin
      o_valid <= '0;
      rr_ptr  <= '0;
    end else begin
      rr_ptr <= (rr_ptr == PW'(M - 1)) ? '0 : rr_ptr + 1'b1;
      for (int q = 0; q < M; q++) begin
        o_valid[q] <= 1'b0;
        for (int m = 0; m < M; m++)
          if (grant[m] && req_port[m] == PW'(q)) o_valid[q] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < M; q++)
      for (int m = 0; m < M; m++)
        if (grant[m] && req_port[m] == PW'(q)) o_data[q] <= f_head[m];
  end

  assign lnk_out_valid = o_valid[D-1:0];
  for (genvar q = 0; q < D; q++) begin : g_out
    assign lnk_out_data[q] = o_data[q];
  end

  // -------------------------------------------- delivery into MEM (port D)
  logic [LW-1:0] rx_loc;
  logic [LW-1:0] ridx;
  assign ridx = recv_count[LW-1:0];

  if (ARCH == ARCH_FA) begin : g_fa_loc
    assign rx_loc = o_data[D][EW +: LW];
  end else begin : g_pp_loc
    assign rx_loc = lm[ridx];
  end

  always_ff @(posedge clk) begin
    if (o_valid[D]) mem[rx_loc] <= o_data[D][EW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || frame_start) begin
      sent_count <= '0;
      recv_count <= '0;
    end else begin
      if (pe_valid)   sent_count <= sent_count + 1'b1;
      if (o_valid[D]) recv_count <= recv_count + 1'b1;
    end
  end

  // Each output port is granted to at most one FIFO per cycle.
  for (genvar q = 0; q < M; q++) begin : g_chk
    logic [M-1:0] winners;
    always_comb
      for (int m = 0; m < M; m++) winners[m] = grant[m] && req_port[m] == PW'(q);
    assert property (@(posedge clk) disable iff (rst) $onehot0(winners))
      else $error("dn_node: output port %0d granted twice", q);
  end

endmodule
