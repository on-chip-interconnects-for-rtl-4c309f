// tb_bfly_router: self-checking test of the 2x2 Butterfly router (2 tag bits,
// 8-bit rest, FIFO depth 4).
//  - Isolated packet: leaves on the port named by its leading tag bit, with
//    that bit dropped, one cycle after the edge that writes it.
//  - Directed conflict: both inputs send three packets to output 0 in three
//    consecutive cycles; round-robin serving must interleave them
//    a0 b0 a1 b1 a2 b2.
//  - Random traffic at moderate load: every packet leaves once, on the right
//    port, unchanged, and packets from one input to one output keep their
//    order. Conflicts must have occurred; no FIFO may overflow.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_bfly_router;
  localparam int RW = 2, PLW = 8, IW = RW + PLW, OW = RW - 1 + PLW;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]    iv, ov;
  logic [IW-1:0] ip [2];
  logic [OW-1:0] op [2];
  logic          conflict, overflow;

  bfly_router #(.RW(RW), .PLW(PLW), .DEPTH(4)) dut (
    .clk, .rst, .in_valid(iv), .in_pkt(ip), .out_valid(ov), .out_pkt(op),
    .conflict, .overflow);

  logic [OW-1:0] exp_q [2][2][$];   // [input][output]
  logic [OW-1:0] seen [$];
  int n_conf = 0;

  always @(negedge clk) if (!rst) begin
    if (conflict) n_conf++;
    for (int o = 0; o < 2; o++) if (ov[o]) begin
      checks++;
      seen.push_back(op[o]);
      if (exp_q[0][o].size() > 0 && exp_q[0][o][0] == op[o]) void'(exp_q[0][o].pop_front());
      else if (exp_q[1][o].size() > 0 && exp_q[1][o][0] == op[o]) void'(exp_q[1][o].pop_front());
      else begin
        failures++;
        $display("output %0d: unexpected or out-of-order packet %h", o, op[o]);
      end
    end
  end

  task automatic send(int i, int tag, logic [PLW-1:0] pl);
    iv[i] = 1;
    ip[i] = {RW'(tag), pl};
    exp_q[i][tag >> (RW - 1)].push_back(OW'({RW'(tag), pl}));
  endtask

  initial begin
    int t;
    iv = '0; ip[0] = '0; ip[1] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // isolated packet
    send(1, 2'b10, 8'h3C);
    @(negedge clk);
    iv = '0;
    t = 0;
    while (ov == '0 && t < 10) begin @(negedge clk); t++; end
    checks++;
    if (t != 1 || ov != 2'b10 || op[1] != OW'({1'b0, 8'h3C})) begin
      failures++;
      $display("isolated packet: %0d cycles, ov %b, pkt %h", t, ov, op[1]);
    end
    repeat (3) @(negedge clk);
    // directed conflict
    seen.delete();
    for (int k = 0; k < 3; k++) begin
      send(0, 2'b00, 8'hA0 + 8'(k));
      send(1, 2'b01, 8'hB0 + 8'(k));
      @(negedge clk);
    end
    iv = '0;
    repeat (10) @(negedge clk);
    checks++;
    if (seen.size() != 6 || seen[0][7:0] != 8'hA0 || seen[1][7:0] != 8'hB0 ||
        seen[2][7:0] != 8'hA1 || seen[3][7:0] != 8'hB1 ||
        seen[4][7:0] != 8'hA2 || seen[5][7:0] != 8'hB2) begin
      failures++;
      $display("round-robin order wrong");
      foreach (seen[k]) $display("  %h", seen[k]);
    end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 2; i++)
        if ($urandom_range(99, 0) < 40) send(i, $urandom_range(3, 0), PLW'($urandom));
      @(negedge clk);
      iv = '0;
    end
    repeat (20) @(negedge clk);
    for (int i = 0; i < 2; i++)
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) begin
          failures++;
          $display("%0d packets from %0d to %0d lost", exp_q[i][o].size(), i, o);
        end
      end
    checks++;
    if (overflow || n_conf == 0) begin
      failures++;
      $display("overflow %b, conflicts %0d", overflow, n_conf);
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
