// tb_dn_node: self-checking test of one direct-network node (generalized
// Kautz graph, P = 16, D = 4), two instances on the same random traffic:
//   u_rr  node 5, fully adaptive packets, round-robin serving
//   u_fl  node 9, partially precalculated packets, longest-FIFO-first serving
// Packets are pushed into the four link inputs and the PE input at random.
// The expected output link of every packet comes from a breadth-first search
// of the Kautz graph done here (lowest link index on a shortest path; the PE
// port for packets addressed to the node itself). Checks:
//  - every packet leaves once, on the expected port, unchanged;
//  - packets for the node itself end up in its extrinsic memory (FA: at the
//    location the packet carries; PP: in arrival order, the location memory
//    holding 0,1,2,..);
//  - the serving rule: when two non-empty FIFOs want one output, FL grants
//    the fuller one, RR the first one in an order rotating every cycle;
//  - an isolated packet leaves 2 cycles after it is written (FIFO, register);
//  - contention (a stalled head) happened.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_dn_node;
  import noc_pkg::*;

  localparam int P = 16, D = 4, M = D + 1, EW = 8, N = 5114;
  localparam int S = (N + P - 1) / P;
  localparam int LW = $clog2(S), KW = $clog2(P);
  localparam int W_FA = KW + LW + EW, W_PP = KW + EW;
  localparam int ID_RR = 5, ID_FL = 9;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [D-1:0]    in_v;
  logic [W_FA-1:0] in_fa [D];
  logic [W_PP-1:0] in_pp [D];
  logic [D-1:0]    ov_rr, ov_fl;
  logic [W_FA-1:0] od_rr [D];
  logic [W_PP-1:0] od_fl [D];
  logic            pe_v;
  logic [EW-1:0]   pe_l;
  logic [LW-1:0]   raddr;
  logic [EW-1:0]   rd_rr, rd_fl;
  logic            cfg_we_rr, cfg_we_fl, cfg_sel;
  logic [LW-1:0]   cfg_addr, cfg_loc;
  logic [KW-1:0]   cfg_k;
  logic [LW:0]     sent_rr, recv_rr, sent_fl, recv_fl;
  logic            stall_rr, stall_fl, ovf_rr, ovf_fl;
  logic            fs = 0;

  dn_node #(.TOPO(TOPO_KAUTZ), .P(P), .D(D), .NODE_ID(ID_RR), .ARCH(ARCH_FA),
            .POLICY(POL_RR), .N(N), .EW(EW), .FIFO_DEPTH(16)) u_rr (
    .clk, .rst, .frame_start(fs), .lnk_in_valid(in_v), .lnk_in_data(in_fa),
    .lnk_out_valid(ov_rr), .lnk_out_data(od_rr), .pe_valid(pe_v), .pe_lambda(pe_l),
    .mem_raddr(raddr), .mem_rdata(rd_rr), .cfg_we(cfg_we_rr), .cfg_sel, .cfg_addr,
    .cfg_k, .cfg_loc, .sent_count(sent_rr), .recv_count(recv_rr), .stall(stall_rr),
    .overflow(ovf_rr));

  dn_node #(.TOPO(TOPO_KAUTZ), .P(P), .D(D), .NODE_ID(ID_FL), .ARCH(ARCH_PP),
            .POLICY(POL_FL), .N(N), .EW(EW), .FIFO_DEPTH(16)) u_fl (
    .clk, .rst, .frame_start(fs), .lnk_in_valid(in_v), .lnk_in_data(in_pp),
    .lnk_out_valid(ov_fl), .lnk_out_data(od_fl), .pe_valid(pe_v), .pe_lambda(pe_l),
    .mem_raddr(raddr), .mem_rdata(rd_fl), .cfg_we(cfg_we_fl), .cfg_sel, .cfg_addr,
    .cfg_k, .cfg_loc, .sent_count(sent_fl), .recv_count(recv_fl), .stall(stall_fl),
    .overflow(ovf_fl));

  // ------------------------------------------------- reference routing
  int hops [P][P];
  function automatic int knext(int i, int k);  // link k = 0..D-1
    int v;
    v = (-i * D - (k + 1)) % P;
    if (v < 0) v += P;
    return v;
  endfunction
  task automatic build();
    int fr [$];
    for (int s = 0; s < P; s++) begin
      for (int t = 0; t < P; t++) hops[s][t] = -1;
      hops[s][s] = 0;
      fr = {s};
      while (fr.size() > 0) begin
        int u;
        u = fr.pop_front();
        for (int k = 0; k < D; k++)
          if (hops[s][knext(u, k)] < 0) begin
            hops[s][knext(u, k)] = hops[s][u] + 1;
            fr.push_back(knext(u, k));
          end
      end
    end
  endtask
  // distance from a to b is hops[a][b]
  function automatic int exp_port(int self, int dst);
    if (dst == self) return D;
    for (int k = 0; k < D; k++)
      if (hops[knext(self, k)][dst] == hops[self][dst] - 1) return k;
    return -1;
  endfunction

  // --------------------------------------------------------- scoreboards
  logic [W_FA-1:0] exp_rr [M][$];
  logic [W_PP-1:0] exp_fl [M][$];
  logic [EW-1:0]   self_fl [$];      // values the FL node must keep
  logic [EW-1:0]   self_rr_mem [S];
  bit              self_rr_used [S];

  task automatic take_rr(int q, logic [W_FA-1:0] pk);
    int idx [$];
    checks++;
    idx = exp_rr[q].find_first_index(x) with (x == pk);
    if (idx.size() == 0) begin
      failures++;
      $display("RR node: unexpected packet %h on port %0d", pk, q);
    end else exp_rr[q].delete(idx[0]);
  endtask
  task automatic take_fl(int q, logic [W_PP-1:0] pk);
    int idx [$];
    checks++;
    idx = exp_fl[q].find_first_index(x) with (x == pk);
    if (idx.size() == 0) begin
      failures++;
      $display("FL node: unexpected packet %h on port %0d", pk, q);
    end else exp_fl[q].delete(idx[0]);
  endtask

  always @(negedge clk) if (!rst)
    for (int q = 0; q < D; q++) begin
      if (ov_rr[q]) take_rr(q, od_rr[q]);
      if (ov_fl[q]) take_fl(q, od_fl[q]);
    end

  // --------------------------------------------------- serving-rule checks
  int rr_ptr_model = 0, stalls = 0, rule_checks = 0;
  always @(posedge clk) begin
    if (rst) rr_ptr_model <= 0;
    else     rr_ptr_model <= (rr_ptr_model + 1) % M;
  end

  always @(negedge clk) if (!rst) begin
    for (int m = 0; m < M; m++)
      for (int n = 0; n < M; n++) if (m != n) begin
        // FL instance
        if (!u_fl.f_empty[m] && !u_fl.f_empty[n] &&
            exp_port(ID_FL, int'(u_fl.f_head[m][W_PP-1 -: KW])) ==
            exp_port(ID_FL, int'(u_fl.f_head[n][W_PP-1 -: KW])) &&
            u_fl.f_rd[m] && !u_fl.f_rd[n]) begin
          rule_checks++; checks++;
          if (u_fl.f_cnt[m] < u_fl.f_cnt[n]) begin
            failures++;
            $display("FL served a shorter FIFO (%0d < %0d)", u_fl.f_cnt[m], u_fl.f_cnt[n]);
          end
        end
        // RR instance
        if (!u_rr.f_empty[m] && !u_rr.f_empty[n] &&
            exp_port(ID_RR, int'(u_rr.f_head[m][W_FA-1 -: KW])) ==
            exp_port(ID_RR, int'(u_rr.f_head[n][W_FA-1 -: KW])) &&
            u_rr.f_rd[m] && !u_rr.f_rd[n]) begin
          rule_checks++; checks++;
          if ((m - rr_ptr_model + M) % M > (n - rr_ptr_model + M) % M) begin
            failures++;
            $display("RR order violated");
          end
        end
      end
    if (stall_rr) stalls++;
  end

  // -------------------------------------------------------------- driver
  int pid = 0;
  task automatic drive_cycle(real prob);
    for (int q = 0; q < D; q++) begin
      int dst;
      logic [EW-1:0] lam;
      logic [LW-1:0] loc;
      in_v[q] = ($urandom_range(999, 0) < int'(prob * 1000));
      dst = $urandom_range(P - 1, 0);
      lam = EW'(pid);
      loc = LW'($urandom_range(S - 1, 0));
      pid++;
      in_fa[q] = {KW'(dst), loc, lam};
      in_pp[q] = {KW'(dst), lam};
      if (in_v[q]) begin
        // avoid reusing a memory word of the RR node while a value is pending
        if (dst == ID_RR) begin
          while (self_rr_used[loc]) loc = LW'($urandom_range(S - 1, 0));
          in_fa[q] = {KW'(dst), loc, lam};
          self_rr_used[loc] = 1;
          self_rr_mem[loc]  = lam;
        end
        exp_rr[exp_port(ID_RR, dst)].push_back(in_fa[q]);
        exp_fl[exp_port(ID_FL, dst)].push_back(in_pp[q]);
        if (dst == ID_FL) self_fl.push_back(lam);
      end
    end
  endtask

  task automatic cfg(bit to_rr, bit sel, int addr, int k, int loc);
    @(negedge clk);
    cfg_we_rr = to_rr; cfg_we_fl = !to_rr; cfg_sel = sel;
    cfg_addr = LW'(addr); cfg_k = KW'(k); cfg_loc = LW'(loc);
    @(negedge clk);
    cfg_we_rr = 0; cfg_we_fl = 0;
  endtask

  initial begin
    int t0;
    logic [EW-1:0] got [$];
    in_v = '0; pe_v = 0; pe_l = '0; raddr = '0;
    cfg_we_rr = 0; cfg_we_fl = 0; cfg_sel = 0; cfg_addr = '0; cfg_k = '0; cfg_loc = '0;
    for (int q = 0; q < D; q++) begin in_fa[q] = '0; in_pp[q] = '0; end
    build();
    for (int a = 0; a < S; a++) self_rr_used[a] = 0;
    // IM of both nodes sends PE values to node 0; FL node's LM = 0,1,2,..
    for (int j = 0; j < S; j++) begin
      cfg(1, 0, j, 0, 0); cfg(1, 1, j, 0, 0);
      cfg(0, 0, j, 0, 0); cfg(0, 1, j, 0, j);
    end
    rst = 0;
    @(negedge clk);

    // isolated packet latency: written at edge e, leaves the output register
    // after edge e+1
    in_v[2] = 1;
    in_fa[2] = {KW'(3), LW'(0), 8'hA5};
    in_pp[2] = {KW'(3), 8'hA5};
    exp_rr[exp_port(ID_RR, 3)].push_back(in_fa[2]);
    exp_fl[exp_port(ID_FL, 3)].push_back(in_pp[2]);
    @(negedge clk);
    in_v = '0;
    t0 = 0;
    while (ov_rr == '0) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != 1 || ov_fl == '0) begin
      failures++;
      $display("isolated hop took %0d extra cycles", t0);
    end
    repeat (3) @(negedge clk);

    // random traffic, PE injecting too (its packets go to node 0)
    // at most one PE value every 10 cycles and about 220 values addressed to
    // the FL node, so neither the send nor the receive index passes S = 320
    for (int n = 0; n < 2500; n++) begin
      drive_cycle(n < 1250 ? 0.25 : 0.45);
      pe_v = (n % 10 == 0);
      pe_l = EW'(1000 + n);
      if (pe_v) begin
        logic [W_FA-1:0] pf;
        pf = {KW'(0), LW'(0), pe_l};
        exp_rr[exp_port(ID_RR, 0)].push_back(pf);
        exp_fl[exp_port(ID_FL, 0)].push_back({KW'(0), pe_l});
      end
      @(negedge clk);
      in_v = '0; pe_v = 0;
      // release words of the RR memory once its value is delivered
      if (n % 50 == 49) begin
        repeat (40) @(negedge clk);
        for (int a = 0; a < S; a++) if (self_rr_used[a]) begin
          raddr = LW'(a);
          #1;
          checks++;
          if (rd_rr !== self_rr_mem[a]) begin
            failures++;
            $display("RR memory word %0d: got %h exp %h", a, rd_rr, self_rr_mem[a]);
          end
          self_rr_used[a] = 0;
        end
        @(negedge clk);
      end
    end
    repeat (60) @(negedge clk);

    for (int q = 0; q < D; q++) begin
      checks++;
      if (exp_rr[q].size() != 0 || exp_fl[q].size() != 0) begin
        failures++;
        $display("port %0d: %0d/%0d packets never left", q, exp_rr[q].size(), exp_fl[q].size());
      end
    end
    // FL node memory: arrival order, compare as multisets
    checks++;
    if (int'(recv_fl) != self_fl.size()) begin
      failures++;
      $display("FL node received %0d own packets, expected %0d", recv_fl, self_fl.size());
    end
    for (int j = 0; j < self_fl.size(); j++) begin
      raddr = LW'(j);
      #1;
      got.push_back(rd_fl);
    end
    got.sort();
    self_fl.sort();
    checks++;
    if (got != self_fl) begin failures++; $display("FL node memory contents differ"); end
    checks++;
    if (ovf_rr || ovf_fl) begin failures++; $display("FIFO overflow"); end
    checks++;
    if (stalls == 0 || rule_checks == 0) begin
      failures++;
      $display("no contention exercised");
    end
    $display("stall cycles %0d, serving-rule checks %0d", stalls, rule_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
