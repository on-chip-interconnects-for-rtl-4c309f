// tb_dn_network: self-checking test of the direct network, generalized Kautz
// D = 4, P = 16, N = 5114 (one HSDPA-sized block).
//
// Two networks run side by side on the same traffic: one with fully adaptive
// (FA) nodes and round-robin serving, one with partially precalculated (PP)
// nodes and longest-FIFO-first serving. The traffic is one half iteration of a
// turbo decoder: node i owns natural-order positions x = i*S .. i*S+S-1
// (S = ceil(N/P)) and sends the extrinsic value of x to its interleaved
// position pi(x), that is node pi(x)/S, location pi(x)%S. pi is a random
// permutation. The expected memory contents are computed here from pi alone.
//
// Checks:
//  1. Isolated messages: the value is in memory 2 + 2*h clock edges after the
//     edge that accepts it from the PE (3 + 2*h cycles counting that one),
//     h being the hop distance found by a breadth-first search of the
//     Kautz graph written in this testbench.
//  2. Full block at injection rate r = 1 and r = 1/3: every memory word in the
//     FA network holds the value sent to it; in the PP network (location
//     memory loaded with 0,1,2,.. so words fill in arrival order) every node
//     received exactly the multiset of values addressed to it. No FIFO
//     overflows, every node sees contention at least once (DCM stalls).
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_dn_network;
  import noc_pkg::*;

  localparam int P  = 16;
  localparam int D  = 4;
  localparam int N  = 5114;
  localparam int EW = 8;
  localparam int KW = $clog2(P);
  localparam int S  = (N + P - 1) / P;
  localparam int LW = $clog2(S);
  localparam int NP = S * P;   // positions including padding of the last node
  localparam int FD = 64;      // input FIFO depth

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          frame_start;
  logic [P-1:0]  pe_valid;
  logic [EW-1:0] pe_lambda [P];
  logic [LW-1:0] mem_raddr [P];
  logic [EW-1:0] rdata_fa [P], rdata_pp [P];
  logic          cfg_we_fa, cfg_we_pp, cfg_sel;
  logic [KW-1:0] cfg_node, cfg_k;
  logic [LW-1:0] cfg_addr, cfg_loc;
  logic [LW:0]   sent_fa [P], recv_fa [P], sent_pp [P], recv_pp [P];
  logic [P-1:0]  stall_fa, stall_pp, ovf_fa, ovf_pp;

  dn_network #(.TOPO(TOPO_KAUTZ), .P(P), .D(D), .ARCH(ARCH_FA), .POLICY(POL_RR),
               .N(N), .EW(EW), .FIFO_DEPTH(FD)) u_fa (
    .clk, .rst, .frame_start, .pe_valid, .pe_lambda, .mem_raddr,
    .mem_rdata(rdata_fa), .cfg_we(cfg_we_fa), .cfg_node, .cfg_sel, .cfg_addr, .cfg_k, .cfg_loc,
    .sent_count(sent_fa), .recv_count(recv_fa), .stall(stall_fa), .overflow(ovf_fa));

  dn_network #(.TOPO(TOPO_KAUTZ), .P(P), .D(D), .ARCH(ARCH_PP), .POLICY(POL_FL),
               .N(N), .EW(EW), .FIFO_DEPTH(FD)) u_pp (
    .clk, .rst, .frame_start, .pe_valid, .pe_lambda, .mem_raddr,
    .mem_rdata(rdata_pp), .cfg_we(cfg_we_pp), .cfg_node, .cfg_sel, .cfg_addr, .cfg_k, .cfg_loc,
    .sent_count(sent_pp), .recv_count(recv_pp), .stall(stall_pp), .overflow(ovf_pp));

  // ------------------------------------------------ reference Kautz graph
  int dist_tab [P][P];

  function automatic int kautz_next(int i, int k);  // k = 1..D
    int v;
    v = (-i * D - k) % P;
    if (v < 0) v += P;
    return v;
  endfunction

  task automatic build_dist();
    int frontier [$];
    for (int s = 0; s < P; s++) begin
      for (int t = 0; t < P; t++) dist_tab[s][t] = -1;
      dist_tab[s][s] = 0;
      frontier = {s};
      while (frontier.size() > 0) begin
        int u;
        u = frontier.pop_front();
        for (int k = 1; k <= D; k++) begin
          int v;
          v = kautz_next(u, k);
          if (dist_tab[s][v] < 0) begin
            dist_tab[s][v] = dist_tab[s][u] + 1;
            frontier.push_back(v);
          end
        end
      end
    end
  endtask

  // ---------------------------------------------------------- traffic
  int pi_tab [NP];
  logic [EW-1:0] lam [NP];

  task automatic make_perm();
    for (int x = 0; x < NP; x++) pi_tab[x] = x;
    for (int x = NP - 1; x > 0; x--) begin
      int y, t;
      y = $urandom_range(x, 0);
      t = pi_tab[x]; pi_tab[x] = pi_tab[y]; pi_tab[y] = t;
    end
    for (int x = 0; x < NP; x++) lam[x] = EW'($urandom);
  endtask

  // which: bit 0 writes the FA network, bit 1 the PP network
  task automatic cfg_write(bit [1:0] which, int node, bit sel, int addr, int k, int loc);
    @(negedge clk);
    cfg_we_fa = which[0]; cfg_we_pp = which[1];
    cfg_node = KW'(node); cfg_sel = sel;
    cfg_addr = LW'(addr); cfg_k = KW'(k); cfg_loc = LW'(loc);
    @(negedge clk);
    cfg_we_fa = 0; cfg_we_pp = 0;
  endtask

  // IM k(i,j) in both networks. LM: t(i,j) (sender side) in the FA network;
  // in the PP network the receiver-side sequence 0,1,2,.. so that its memory
  // fills in arrival order.
  task automatic load_tables();
    for (int i = 0; i < P; i++)
      for (int j = 0; j < S; j++) begin
        int x;
        x = i * S + j;
        cfg_write(2'b11, i, 0, j, pi_tab[x] / S, 0);
        cfg_write(2'b01, i, 1, j, 0, pi_tab[x] % S);
        cfg_write(2'b10, i, 1, j, 0, j);
      end
  endtask

  // Inject the whole block, one value per node every PERIOD cycles.
  task automatic run_block(int period, output int cycles);
    int t0, done;
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    t0 = cyc;
    for (int j = 0; j < S; j++) begin
      for (int i = 0; i < P; i++) begin
        pe_valid[i]  = 1;
        pe_lambda[i] = lam[i * S + j];
      end
      @(negedge clk);
      pe_valid = '0;
      repeat (period - 1) @(negedge clk);
    end
    done = 0;
    while (!done && cyc - t0 < 20000) begin
      done = 1;
      for (int i = 0; i < P; i++)
        if (int'(recv_fa[i]) != S || int'(recv_pp[i]) != S) done = 0;
      @(negedge clk);
    end
    cycles = cyc - t0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int stall_seen_fa [P], stall_seen_pp [P];
  always @(posedge clk)
    for (int i = 0; i < P; i++) begin
      if (stall_fa[i]) stall_seen_fa[i]++;
      if (stall_pp[i]) stall_seen_pp[i]++;
    end

  task automatic check_block(string tag);
    int expcnt [P][256];
    int gotcnt [P][256];
    int bad;
    for (int i = 0; i < P; i++)
      for (int v = 0; v < 256; v++) begin expcnt[i][v] = 0; gotcnt[i][v] = 0; end
    for (int x = 0; x < NP; x++) expcnt[pi_tab[x] / S][lam[x]]++;
    // FA: exact location check
    bad = 0;
    for (int x = 0; x < NP; x++) begin
      mem_raddr[pi_tab[x] / S] = LW'(pi_tab[x] % S);
      #1;
      checks++;
      if (rdata_fa[pi_tab[x] / S] !== lam[x]) begin
        failures++; bad++;
        if (bad < 5) $display("%s FA mismatch pos %0d: got %0h exp %0h", tag,
                              pi_tab[x], rdata_fa[pi_tab[x] / S], lam[x]);
      end
    end
    // PP: the memory of node i holds its arrivals in order; compare the
    // multiset of values with the one addressed to node i.
    for (int i = 0; i < P; i++)
      for (int j = 0; j < S; j++) begin
        mem_raddr[i] = LW'(j);
        #1;
        gotcnt[i][rdata_pp[i]]++;
      end
    for (int i = 0; i < P; i++) begin
      checks++;
      if (gotcnt[i] != expcnt[i]) begin
        failures++;
        $display("%s PP node %0d received the wrong set of values", tag, i);
      end
    end
  endtask

  // -------------------------------------------------------------- main
  initial begin
    int cycles, t0, node, dst, h, exp_lat;
    frame_start = 0; pe_valid = '0; cfg_we_fa = 0; cfg_we_pp = 0; cfg_sel = 0;
    cfg_node = '0; cfg_addr = '0; cfg_k = '0; cfg_loc = '0;
    for (int i = 0; i < P; i++) begin pe_lambda[i] = '0; mem_raddr[i] = '0; end
    build_dist();
    repeat (3) @(negedge clk);
    rst = 0;

    // 1. isolated-message latency
    for (int n = 0; n < 24; n++) begin
      node = $urandom_range(P - 1, 0);
      dst  = $urandom_range(P - 1, 0);
      h    = dist_tab[node][dst];
      cfg_write(2'b11, node, 0, 0, dst, 0);
      cfg_write(2'b11, node, 1, 0, 0, 0);
      @(negedge clk);
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      pe_valid[node] = 1;
      pe_lambda[node] = EW'(n);
      t0 = cyc;
      @(negedge clk);
      pe_valid = '0;
      while (int'(recv_fa[dst]) == 0 && cyc - t0 < 200) @(negedge clk);
      exp_lat = 3 + 2 * h;
      checks++;
      if (cyc - t0 != exp_lat) begin
        failures++;
        $display("latency %0d->%0d (h=%0d): got %0d exp %0d", node, dst, h, cyc - t0, exp_lat);
      end
      repeat (2 * P) @(negedge clk);
    end

    // 2. full blocks
    make_perm();
    load_tables();
    run_block(1, cycles);
    $display("r=1   : block of N=%0d delivered in %0d cycles", NP, cycles);
    check_block("r=1");

    make_perm();
    load_tables();
    run_block(3, cycles);
    $display("r=1/3 : block of N=%0d delivered in %0d cycles", NP, cycles);
    check_block("r=1/3");
    // The NOC adds latency on top of N/(rP) injection cycles, never less.
    checks++;
    if (cycles < 3 * S) begin
      failures++;
      $display("block finished faster than injection allows");
    end

    checks++;
    if (ovf_fa != '0 || ovf_pp != '0) begin
      failures++;
      $display("FIFO overflow");
    end
    for (int i = 0; i < P; i++) begin
      checks++;
      if (stall_seen_fa[i] == 0 || stall_seen_pp[i] == 0) begin
        failures++;
        $display("node %0d never saw a DCM stall", i);
      end
    end
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
