// tb_bfly_ni_tx: self-checking test of the Butterfly transmit interface for
// N = 5114 and 8 SISOs (sub-block 640, halves of 320). Random positions on
// both lanes, plus the corner positions 0, 319, 320, 639, 640 and N-1; the
// packet one cycle later must be {port, offset, value} with port = 2*(g/640)
// + (g%640 >= 320) and offset = g%640, computed here by plain arithmetic.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_bfly_ni_tx;
  localparam int N = 5114, PS = 8, EW = 8;
  localparam int GW = $clog2(N), SUB = 640, HALF = 320, AW = 10, DW = 4;
  localparam int PKW = DW + AW + EW;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]     sv, pv;
  logic [GW-1:0]  pos [2];
  logic [EW-1:0]  lam [2];
  logic [PKW-1:0] pk  [2];

  bfly_ni_tx #(.N(N), .P_SISO(PS), .EW(EW)) dut (
    .clk, .rst, .siso_valid(sv), .siso_pos(pos), .siso_lambda(lam),
    .pkt_valid(pv), .pkt(pk));

  initial begin
    int corner [6] = '{0, 319, 320, 639, 640, N - 1};
    int g [2];
    logic [1:0] v;
    sv = '0; pos[0] = '0; pos[1] = '0; lam[0] = '0; lam[1] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      for (int l = 0; l < 2; l++) begin
        g[l] = (n < 6) ? corner[n] : $urandom_range(N - 1, 0);
        v[l] = (n < 6) ? 1'b1 : 1'($urandom_range(1, 0));
        sv[l] = v[l];
        pos[l] = GW'(g[l]);
        lam[l] = EW'($urandom);
      end
      @(negedge clk);
      for (int l = 0; l < 2; l++) begin
        int port, off;
        off  = g[l] % SUB;
        port = 2 * (g[l] / SUB) + ((off >= HALF) ? 1 : 0);
        checks++;
        if (pv[l] != v[l] || (v[l] && pk[l] != {DW'(port), AW'(off), lam[l]})) begin
          failures++;
          $display("lane %0d g %0d: got %h expected port %0d off %0d", l, g[l], pk[l], port, off);
        end
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
