// tb_benes_router: self-checking test of the bufferless 2x2 Benes router
// (3 route bits). Random packets on both inputs every cycle with distinct
// leading route bits (as the schedule guarantees): each leaves one cycle
// later on the port named by its leading bit, with that bit dropped. Idle
// inputs leave the outputs idle. The collision flag must stay low.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_benes_router;
  localparam int RW = 3, PLW = 8, IW = RW + PLW, OW = RW - 1 + PLW;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]    iv, ov;
  logic [IW-1:0] ip [2];
  logic [OW-1:0] op [2];
  logic          collision;

  benes_router #(.RW(RW), .PLW(PLW)) dut (
    .clk, .rst, .in_valid(iv), .in_pkt(ip), .out_valid(ov), .out_pkt(op), .collision);

  initial begin
    logic [1:0]    ev;
    logic [OW-1:0] ep [2];
    iv = '0; ip[0] = '0; ip[1] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      bit swap;
      swap = $urandom_range(1, 0);
      for (int i = 0; i < 2; i++) begin
        iv[i] = ($urandom_range(3, 0) != 0);
        ip[i] = {1'(i) ^ swap, (RW - 1)'($urandom), PLW'($urandom)};
      end
      ev = '0;
      for (int i = 0; i < 2; i++)
        if (iv[i]) begin
          ev[ip[i][IW-1]] = 1'b1;
          ep[ip[i][IW-1]] = ip[i][OW-1:0];
        end
      @(negedge clk);
      checks++;
      if (ov != ev || (ev[0] && op[0] != ep[0]) || (ev[1] && op[1] != ep[1]) || collision) begin
        failures++;
        $display("cycle %0d: valid %b expected %b", n, ov, ev);
      end
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
