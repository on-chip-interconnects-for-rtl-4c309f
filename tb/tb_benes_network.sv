// tb_benes_network: self-checking test of the 16-port Benes network.
// Each round sends one packet per input for a random permutation (or, every
// fourth round, a partial permutation with some inputs idle), with street-sign
// routes from the looping algorithm of benes_tb_pkg. Checks: every packet
// leaves exactly 2*log2(P)-1 = 7 cycles after it is presented, on its
// destination port, unchanged; rounds are sent back to back (one per cycle),
// so the network must carry a full permutation every cycle; no router ever
// reports a collision.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_benes_network;
  import benes_tb_pkg::*;
  localparam int P = 16, PLW = 12, D = 4, NS = 2 * D - 1, IW = NS + PLW;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [P-1:0]   iv, ov;
  logic [IW-1:0]  ip [P];
  logic [PLW-1:0] op [P];
  logic           collision;

  benes_network #(.P(P), .PLW(PLW)) dut (
    .clk, .rst, .in_valid(iv), .in_pkt(ip), .out_valid(ov), .out_pkt(op), .collision);

  // expected arrivals keyed by cycle
  logic [PLW-1:0] exp_pl [int][P];
  bit             exp_v  [int][P];
  int cyc = 0, n_col = 0, got = 0, sent = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (!rst) begin
    if (collision) n_col++;
    for (int o = 0; o < P; o++) begin
      bit e;
      e = exp_v.exists(cyc) ? exp_v[cyc][o] : 1'b0;
      if (ov[o] || e) begin
        checks++;
        if (!(ov[o] && e && op[o] == exp_pl[cyc][o])) begin
          failures++;
          $display("cycle %0d port %0d: valid %b expected %b data %h", cyc, o, ov[o], e, op[o]);
        end
        if (ov[o]) got++;
      end
    end
  end

  initial begin
    int perm [], routes [];
    int uid = 0;
    perm = new[P];
    iv = '0;
    for (int i = 0; i < P; i++) ip[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int r = 0; r < 300; r++) begin
      for (int i = 0; i < P; i++) perm[i] = i;
      for (int i = P - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i, 0);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      benes_routes(D, perm, routes);
      for (int i = 0; i < P; i++) begin
        logic [PLW-1:0] pl;
        pl = PLW'(uid++);
        iv[i] = (r % 4 != 3) || ($urandom_range(1, 0) == 1);
        ip[i] = {NS'(routes[i]), pl};
        if (iv[i]) begin
          exp_v[cyc + 2 * D - 1][perm[i]]  = 1'b1;
          exp_pl[cyc + 2 * D - 1][perm[i]] = pl;
          sent++;
        end
      end
      @(negedge clk);
    end
    iv = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (got != sent || n_col != 0) begin
      failures++;
      $display("sent %0d received %0d collisions %0d", sent, got, n_col);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
