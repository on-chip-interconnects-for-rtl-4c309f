// tb_tdec_noc_top: end-to-end test of the three interconnects at full size
// (N = 5114 HSDPA block, 8+8 SISOs for the multistage networks, 16 nodes on
// the Kautz graph for the direct network), top parameters at their defaults.
//
// For each direction of the Butterfly and of the Benes interleaver one block
// of link_tb_pkg traffic is sent (Butterfly at r = 0.2, Benes at r = 1 with a
// time-slot schedule and looping-algorithm routes computed here) and every
// memory word is compared with the value sent to it. The direct network
// carries one half iteration of a random interleaver at r = 1 with the
// partially precalculated nodes (location memories loaded with 0,1,2,.. so
// words fill in arrival order; each node's multiset of values is compared).
//
// Mechanisms counted, each must happen at least once: Butterfly router
// conflicts (packets queued in FIFOs), Butterfly deliveries, Benes slot
// deliveries (a full permutation of packets entering in one cycle), direct
// network DCM stalls, direct network deliveries over more than one hop and
// to the local node. Never allowed: FIFO overflow, Benes collision, late
// Benes value, misrouted packet. Cycle counts per block are printed.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_tdec_noc_top;
  import noc_pkg::*;
  import link_tb_pkg::*;
  import benes_tb_pkg::*;

  localparam int N = 5114, EW = 8, NP = 16, SW = 12;
  localparam int GW = $clog2(N), MW = 9, CW = 10, DW = 4, NS = 7, TW = 9;
  localparam int P = 16, D = 4, KW = 4, S = (N + P - 1) / P, LW = $clog2(S);
  localparam int NPOS = S * P;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ DUT ports
  logic          bfly_clear;
  logic [NP-1:0] bfly_siso_valid [2];
  logic [GW-1:0] bfly_siso_pos [2][NP];
  logic [EW-1:0] bfly_siso_lambda [2][NP];
  logic [MW-1:0] bfly_rd_addr [2][NP];
  logic [EW-1:0] bfly_rd_data [2][NP];
  logic [CW-1:0] bfly_recv_count [2][NP];
  logic [DW-1:0] bfly_conflict [2];
  logic [1:0]    bfly_overflow, bfly_misroute;

  logic          benes_frame_start;
  logic [NP-1:0] benes_siso_valid [2];
  logic [GW-1:0] benes_siso_pos [2][NP];
  logic [EW-1:0] benes_siso_lambda [2][NP];
  logic [1:0]    benes_cfg_we;
  logic [DW-1:0] benes_cfg_lane;
  logic [TW-1:0] benes_cfg_addr;
  logic [SW-1:0] benes_cfg_slot;
  logic [NS-1:0] benes_cfg_route;
  logic [MW-1:0] benes_rd_addr [2][NP];
  logic [EW-1:0] benes_rd_data [2][NP];
  logic [CW-1:0] benes_recv_count [2][NP];
  logic [1:0]    benes_collision, benes_late, benes_overflow, benes_misroute;

  logic          dn_frame_start;
  logic [P-1:0]  dn_pe_valid;
  logic [EW-1:0] dn_pe_lambda [P];
  logic [LW-1:0] dn_mem_raddr [P];
  logic [EW-1:0] dn_mem_rdata [P];
  logic          dn_cfg_we, dn_cfg_sel;
  logic [KW-1:0] dn_cfg_node, dn_cfg_k;
  logic [LW-1:0] dn_cfg_addr, dn_cfg_loc;
  logic [LW:0]   dn_sent_count [P], dn_recv_count [P];
  logic [P-1:0]  dn_stall, dn_overflow;

  tdec_noc_top dut (.*);

  // ------------------------------------------------------ event counters
  int n_bfly_conflict = 0, n_benes_coll = 0, n_dn_stall = 0;
  int n_bfly_deliv = 0, n_benes_deliv = 0, n_dn_multihop = 0, n_dn_local = 0;
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < 2; d++) begin
      if (bfly_conflict[d] != '0) n_bfly_conflict++;
      if (benes_collision[d]) n_benes_coll++;
    end
    if (dn_stall != '0) n_dn_stall++;
  end

  // --------------------------------------------------------- Butterfly
  task automatic check_mem(bit benes, int d, output int bad);
    bad = 0;
    for (int l = 0; l < NP; l++)
      for (int t = 0; t < lt_cnt[l]; t++) begin
        int g, m;
        logic [EW-1:0] v;
        g = lt_dst[l][t];
        m = 2 * (g / LT_SUB) + ((g % LT_SUB) >= LT_HALF ? 1 : 0);
        if (benes) benes_rd_addr[d][m] = MW'((g % LT_SUB) - (m % 2) * LT_HALF);
        else       bfly_rd_addr[d][m]  = MW'((g % LT_SUB) - (m % 2) * LT_HALF);
        #1;
        v = benes ? benes_rd_data[d][m] : bfly_rd_data[d][m];
        checks++;
        if (v != lt_val[l][t]) begin
          failures++; bad++;
          if (bad < 5) $display("%s dir %0d position %0d: got %h expected %h",
                                benes ? "benes" : "bfly", d, g, v, lt_val[l][t]);
        end
      end
    @(negedge clk);
  endtask

  task automatic run_bfly(int d);
    int t0, done, bad;
    make_link_traffic();
    @(negedge clk);
    bfly_clear = 1;
    @(negedge clk);
    bfly_clear = 0;
    t0 = cyc;
    for (int t = 0; t < LT_T; t++) begin
      for (int l = 0; l < NP; l++) begin
        bfly_siso_valid[d][l]  = (t < lt_cnt[l]);
        bfly_siso_pos[d][l]    = GW'(lt_dst[l][t] < 0 ? 0 : lt_dst[l][t]);
        bfly_siso_lambda[d][l] = lt_val[l][t];
      end
      @(negedge clk);
      bfly_siso_valid[d] = '0;
      repeat (4) @(negedge clk);
    end
    done = 0;
    while (!done && cyc - t0 < 4000) begin
      done = 1;
      for (int m = 0; m < NP; m++) if (int'(bfly_recv_count[d][m]) != lt_cnt[m]) done = 0;
      @(negedge clk);
    end
    checks++;
    if (!done) begin failures++; $display("bfly dir %0d: block incomplete", d); end
    $display("bfly  dir %0d: block delivered in %0d cycles", d, cyc - t0);
    check_mem(0, d, bad);
    if (bad == 0) n_bfly_deliv++;
  endtask

  // ------------------------------------------------------------- Benes
  task automatic run_benes(int d);
    int perm [], routes [];
    int t0, bad, full_steps;
    perm = new[NP];
    make_link_traffic();
    full_steps = 0;
    for (int t = 0; t < LT_T; t++) begin
      int act;
      act = 0;
      for (int l = 0; l < NP; l++) begin
        perm[l] = lt_perm[t][l];
        if (t < lt_cnt[l]) act++;
      end
      if (act == NP) full_steps++;
      benes_routes(DW, perm, routes);
      for (int l = 0; l < NP; l++) begin
        @(negedge clk);
        benes_cfg_we = 2'(1 << d); benes_cfg_lane = DW'(l); benes_cfg_addr = TW'(t);
        benes_cfg_slot = SW'(t + 1); benes_cfg_route = NS'(routes[l]);
      end
    end
    @(negedge clk);
    benes_cfg_we = '0;
    benes_frame_start = 1;
    @(negedge clk);
    benes_frame_start = 0;
    t0 = cyc;
    for (int t = 0; t < LT_T; t++) begin
      for (int l = 0; l < NP; l++) begin
        benes_siso_valid[d][l]  = (t < lt_cnt[l]);
        benes_siso_pos[d][l]    = GW'(lt_dst[l][t] < 0 ? 0 : lt_dst[l][t]);
        benes_siso_lambda[d][l] = lt_val[l][t];
      end
      @(negedge clk);
    end
    benes_siso_valid[d] = '0;
    repeat (2 * DW - 1 + 2) @(negedge clk);
    for (int m = 0; m < NP; m++) begin
      checks++;
      if (int'(benes_recv_count[d][m]) != lt_cnt[m]) begin
        failures++;
        $display("benes dir %0d memory %0d: %0d of %0d in time", d, m, benes_recv_count[d][m], lt_cnt[m]);
      end
    end
    $display("benes dir %0d: block delivered in %0d cycles", d, cyc - t0);
    check_mem(1, d, bad);
    if (bad == 0) n_benes_deliv += full_steps;
  endtask

  // ---------------------------------------------------- direct network
  int pi_tab [NPOS];
  logic [EW-1:0] lam [NPOS];

  task automatic dn_cfg(int node, bit sel, int addr, int k, int loc);
    @(negedge clk);
    dn_cfg_we = 1; dn_cfg_node = KW'(node); dn_cfg_sel = sel;
    dn_cfg_addr = LW'(addr); dn_cfg_k = KW'(k); dn_cfg_loc = LW'(loc);
  endtask

  task automatic run_dn();
    int t0, done;
    int expcnt [P][256];
    int gotcnt [P][256];
    for (int x = 0; x < NPOS; x++) pi_tab[x] = x;
    for (int x = NPOS - 1; x > 0; x--) begin
      int y, tmp;
      y = $urandom_range(x, 0);
      tmp = pi_tab[x]; pi_tab[x] = pi_tab[y]; pi_tab[y] = tmp;
    end
    for (int x = 0; x < NPOS; x++) begin
      lam[x] = EW'($urandom);
      if (pi_tab[x] / S == x / S) n_dn_local++;
      else n_dn_multihop++;
    end
    for (int i = 0; i < P; i++)
      for (int j = 0; j < S; j++) begin
        dn_cfg(i, 0, j, pi_tab[i * S + j] / S, 0);
        dn_cfg(i, 1, j, 0, j);
      end
    @(negedge clk);
    dn_cfg_we = 0;
    dn_frame_start = 1;
    @(negedge clk);
    dn_frame_start = 0;
    t0 = cyc;
    for (int j = 0; j < S; j++) begin
      for (int i = 0; i < P; i++) begin
        dn_pe_valid[i]  = 1;
        dn_pe_lambda[i] = lam[i * S + j];
      end
      @(negedge clk);
    end
    dn_pe_valid = '0;
    done = 0;
    while (!done && cyc - t0 < 20000) begin
      done = 1;
      for (int i = 0; i < P; i++) if (int'(dn_recv_count[i]) != S) done = 0;
      @(negedge clk);
    end
    checks++;
    if (!done) begin failures++; $display("direct network: block incomplete"); end
    $display("direct network: block of %0d values delivered in %0d cycles", NPOS, cyc - t0);
    for (int i = 0; i < P; i++)
      for (int v = 0; v < 256; v++) begin expcnt[i][v] = 0; gotcnt[i][v] = 0; end
    for (int x = 0; x < NPOS; x++) expcnt[pi_tab[x] / S][lam[x]]++;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < S; j++) begin
        dn_mem_raddr[i] = LW'(j);
        #1;
        gotcnt[i][dn_mem_rdata[i]]++;
      end
    @(negedge clk);
    for (int i = 0; i < P; i++) begin
      checks++;
      if (gotcnt[i] != expcnt[i]) begin
        failures++;
        $display("direct network node %0d received the wrong values", i);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  ^ never happened"); end
  endtask

  // --------------------------------------------------------------- main
  initial begin
    bfly_clear = 0; benes_frame_start = 0; benes_cfg_we = '0; dn_frame_start = 0;
    dn_pe_valid = '0; dn_cfg_we = 0; dn_cfg_sel = 0;
    benes_cfg_lane = '0; benes_cfg_addr = '0; benes_cfg_slot = '0; benes_cfg_route = '0;
    dn_cfg_node = '0; dn_cfg_k = '0; dn_cfg_addr = '0; dn_cfg_loc = '0;
    for (int d = 0; d < 2; d++) begin
      bfly_siso_valid[d] = '0; benes_siso_valid[d] = '0;
      for (int l = 0; l < NP; l++) begin
        bfly_siso_pos[d][l] = '0; bfly_siso_lambda[d][l] = '0; bfly_rd_addr[d][l] = '0;
        benes_siso_pos[d][l] = '0; benes_siso_lambda[d][l] = '0; benes_rd_addr[d][l] = '0;
      end
    end
    for (int i = 0; i < P; i++) begin dn_pe_lambda[i] = '0; dn_mem_raddr[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;

    for (int d = 0; d < 2; d++) run_bfly(d);
    for (int d = 0; d < 2; d++) run_benes(d);
    run_dn();

    checks++;
    if (bfly_overflow != '0 || bfly_misroute != '0 || benes_late != '0 ||
        benes_overflow != '0 || benes_misroute != '0 || dn_overflow != '0 ||
        n_benes_coll != 0) begin
      failures++;
      $display("error flags: bfly ovf %b mis %b, benes late %b ovf %b mis %b coll %0d, dn ovf %h",
               bfly_overflow, bfly_misroute, benes_late, benes_overflow, benes_misroute,
               n_benes_coll, dn_overflow);
    end
    $display("mechanisms:");
    need("butterfly conflict cycles", n_bfly_conflict);
    need("butterfly blocks delivered", n_bfly_deliv);
    need("benes full-permutation slots", n_benes_deliv);
    need("direct network DCM stall cycles", n_dn_stall);
    need("direct network multi-hop values", n_dn_multihop);
    need("direct network local values", n_dn_local);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
