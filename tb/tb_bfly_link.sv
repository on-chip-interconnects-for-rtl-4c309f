// tb_bfly_link: self-checking test of one direction of the Butterfly
// interleaver at full size (N = 5114, 8 SISOs, 16-port network).
//
// The whole block of link_tb_pkg traffic is sent, one step (one value on every
// active lane) every fifth cycle, r = 0.2. Each step is a permutation of
// memories, but the Butterfly is blocking, so packets still meet in routers.
// Checks: every memory word holds the value sent to it (address = position
// offset in the sub-block, top/bottom memory by the half), every memory
// received exactly its share, router conflicts were seen, no FIFO overflow, no
// packet reached a memory it does not belong to. A second block repeats this
// after clear.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_bfly_link;
  import link_tb_pkg::*;
  localparam int N = 5114, PS = 8, EW = 8, NP = 16;
  localparam int GW = $clog2(N), MW = 9, CW = 10, DW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          clear, ovf, mis;
  logic [NP-1:0] sv;
  logic [GW-1:0] pos [NP];
  logic [EW-1:0] lam [NP];
  logic [MW-1:0] ra  [NP];
  logic [EW-1:0] rd  [NP];
  logic [CW-1:0] rc  [NP];
  logic [DW-1:0] conf;

  bfly_link #(.N(N), .P_SISO(PS), .EW(EW)) dut (
    .clk, .rst, .clear, .siso_valid(sv), .siso_pos(pos), .siso_lambda(lam),
    .rd_addr(ra), .rd_data(rd), .recv_count(rc), .conflict(conf),
    .overflow(ovf), .misroute(mis));

  int conf_cycles = 0;
  always @(posedge clk) if (conf != '0) conf_cycles++;

  task automatic run_block(int period);
    make_link_traffic();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int t = 0; t < LT_T; t++) begin
      for (int l = 0; l < NP; l++) begin
        sv[l]  = (t < lt_cnt[l]);
        pos[l] = GW'(lt_dst[l][t] < 0 ? 0 : lt_dst[l][t]);
        lam[l] = lt_val[l][t];
      end
      @(negedge clk);
      sv = '0;
      repeat (period - 1) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    for (int l = 0; l < NP; l++)
      for (int t = 0; t < lt_cnt[l]; t++) begin
        int g, m;
        g = lt_dst[l][t];
        m = 2 * (g / LT_SUB) + ((g % LT_SUB) >= LT_HALF ? 1 : 0);
        ra[m] = MW'((g % LT_SUB) - (m % 2) * LT_HALF);
        #1;
        checks++;
        if (rd[m] != lt_val[l][t]) begin
          failures++;
          if (failures < 10) $display("position %0d: got %h expected %h", g, rd[m], lt_val[l][t]);
        end
      end
    @(negedge clk);
    for (int m = 0; m < NP; m++) begin
      checks++;
      if (int'(rc[m]) != lt_cnt[m]) begin
        failures++;
        $display("memory %0d received %0d of %0d", m, rc[m], lt_cnt[m]);
      end
    end
    checks++;
    if (ovf || mis) begin failures++; $display("overflow %b misroute %b", ovf, mis); end
  endtask

  initial begin
    clear = 0; sv = '0;
    for (int l = 0; l < NP; l++) begin pos[l] = '0; lam[l] = '0; ra[l] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    run_block(5);
    run_block(5);
    checks++;
    if (conf_cycles == 0) begin failures++; $display("no router conflict ever happened"); end
    $display("router conflicts in %0d cycles", conf_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
