// tb_bfly_network: self-checking test of the 16-port Butterfly network.
//  - Isolated packets from random sources to random destinations arrive on
//    the destination port 2*log2(P)-1 = 7 cycles after the edge that writes
//    them into the first stage.
//  - Worst case of the FIFO sizing: all 16 inputs send one packet to the same
//    output in the same cycle. All must arrive, one per cycle, without a FIFO
//    overflow.
//  - Interleaver traffic: 200 random permutations injected at rate r = 0.2
//    (one packet per input every 5 cycles): every packet arrives once, at its
//    destination, unchanged, in order per source/destination pair.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_bfly_network;
  localparam int P = 16, PLW = 12, D = 4, IW = D + PLW;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [P-1:0]   iv, ov;
  logic [IW-1:0]  ip [P];
  logic [PLW-1:0] op [P];
  logic [D-1:0]   conflict;
  logic           overflow;

  bfly_network #(.P(P), .PLW(PLW)) dut (
    .clk, .rst, .in_valid(iv), .in_pkt(ip), .out_valid(ov), .out_pkt(op),
    .conflict, .overflow);

  logic [PLW-1:0] exp_q [P][P][$];   // [src][dst]
  int n_conf = 0, arrivals = 0;

  always @(negedge clk) if (!rst) begin
    if (conflict != '0) n_conf++;
    for (int o = 0; o < P; o++) if (ov[o]) begin
      bit ok;
      ok = 0;
      checks++;
      arrivals++;
      for (int s = 0; s < P && !ok; s++)
        if (exp_q[s][o].size() > 0 && exp_q[s][o][0] == op[o]) begin
          void'(exp_q[s][o].pop_front());
          ok = 1;
        end
      if (!ok) begin
        failures++;
        $display("port %0d: unexpected packet %h", o, op[o]);
      end
    end
  end

  int uid = 0;
  task automatic send(int s, int d);
    logic [PLW-1:0] pl;
    pl = PLW'(uid);
    uid++;
    iv[s] = 1;
    ip[s] = {D'(d), pl};
    exp_q[s][d].push_back(pl);
  endtask

  initial begin
    int t, s, d, a0;
    int perm [P];
    iv = '0;
    for (int i = 0; i < P; i++) ip[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);

    for (int n = 0; n < 20; n++) begin
      s = $urandom_range(P - 1, 0);
      d = $urandom_range(P - 1, 0);
      send(s, d);
      @(negedge clk);
      iv = '0;
      t = 0;
      while (ov == '0 && t < 20) begin @(negedge clk); t++; end
      checks++;
      if (t != 2 * D - 1 || !ov[d]) begin
        failures++;
        $display("isolated %0d->%0d: %0d cycles", s, d, t);
      end
      repeat (3) @(negedge clk);
    end

    // all inputs to output 5 at once
    a0 = arrivals;
    for (int i = 0; i < P; i++) send(i, 5);
    @(negedge clk);
    iv = '0;
    repeat (40) @(negedge clk);
    checks++;
    if (arrivals - a0 != P || overflow) begin
      failures++;
      $display("hot spot: %0d of %0d arrived, overflow %b", arrivals - a0, P, overflow);
    end

    // permutations at r = 0.2
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < P; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < P; i++) send(i, perm[i]);
      @(negedge clk);
      iv = '0;
      repeat (4) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    for (int i = 0; i < P; i++)
      for (int o = 0; o < P; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) begin
          failures++;
          $display("%0d packets %0d->%0d lost", exp_q[i][o].size(), i, o);
        end
      end
    checks++;
    if (overflow || n_conf == 0) begin
      failures++;
      $display("overflow %b conflicts %0d", overflow, n_conf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
