// tb_benes_link: self-checking test of one direction of the Benes
// interleaver at full size (N = 5114, 8 SISOs, 16-port network, 7 stages).
//
// Traffic from link_tb_pkg: in step t every active lane sends one value and
// the lanes' destinations form a permutation of the memories. The schedule is
// computed here: the packet of step t of every lane gets time slot t + 1, and
// the routes of the step are produced by the looping algorithm of
// benes_tb_pkg. Values are handed over in cycle t, so the network carries a
// full permutation every cycle (r = 1). Checks: every memory word holds the
// value sent to it, every memory received its share, no two packets ever met
// in a router, no value was late, no packet reached a wrong memory, and every
// memory is complete 2*4-1 + 2 cycles after the last slot (fixed latency of
// the bufferless network). Two frames are run.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_benes_link;
  import link_tb_pkg::*;
  import benes_tb_pkg::*;
  localparam int N = 5114, PS = 8, EW = 8, NP = 16, SW = 12;
  localparam int GW = $clog2(N), MW = 9, CW = 10, DW = 4, NS = 7, TW = 9;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          fs, we, coll, late, ovf, mis;
  logic [NP-1:0] sv;
  logic [GW-1:0] pos [NP];
  logic [EW-1:0] lam [NP];
  logic [DW-1:0] cl;
  logic [TW-1:0] ca;
  logic [SW-1:0] cs;
  logic [NS-1:0] cr;
  logic [MW-1:0] ra  [NP];
  logic [EW-1:0] rd  [NP];
  logic [CW-1:0] rc  [NP];

  benes_link #(.N(N), .P_SISO(PS), .EW(EW), .SW(SW)) dut (
    .clk, .rst, .frame_start(fs), .siso_valid(sv), .siso_pos(pos), .siso_lambda(lam),
    .cfg_we(we), .cfg_lane(cl), .cfg_addr(ca), .cfg_slot(cs), .cfg_route(cr),
    .rd_addr(ra), .rd_data(rd), .recv_count(rc), .collision(coll), .late(late),
    .overflow(ovf), .misroute(mis));

  int coll_cycles = 0;
  always @(posedge clk) if (!rst && coll) coll_cycles++;

  task automatic run_frame();
    int perm [], routes [];
    int c0, done, tdone;
    perm = new[NP];
    make_link_traffic();
    for (int t = 0; t < LT_T; t++) begin
      for (int l = 0; l < NP; l++) perm[l] = lt_perm[t][l];
      benes_routes(DW, perm, routes);
      for (int l = 0; l < NP; l++) begin
        @(negedge clk);
        we = 1; cl = DW'(l); ca = TW'(t); cs = SW'(t + 1); cr = NS'(routes[l]);
      end
    end
    @(negedge clk);
    we = 0;
    fs = 1;
    @(negedge clk);
    fs = 0;
    for (int t = 0; t < LT_T; t++) begin
      for (int l = 0; l < NP; l++) begin
        sv[l]  = (t < lt_cnt[l]);
        pos[l] = GW'(lt_dst[l][t] < 0 ? 0 : lt_dst[l][t]);
        lam[l] = lt_val[l][t];
      end
      @(negedge clk);
    end
    sv = '0;
    // all data must be in memory 2*4-1 + 2 cycles after the last slot
    repeat (2 * DW - 1 + 2) @(negedge clk);
    for (int m = 0; m < NP; m++) begin
      checks++;
      if (int'(rc[m]) != lt_cnt[m]) begin
        failures++;
        $display("memory %0d received %0d of %0d in time", m, rc[m], lt_cnt[m]);
      end
    end
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
    checks++;
    if (coll || late || ovf || mis || coll_cycles != 0) begin
      failures++;
      $display("collision %0d late %b overflow %b misroute %b", coll_cycles, late, ovf, mis);
    end
  endtask

  initial begin
    fs = 0; we = 0; sv = '0; cl = '0; ca = '0; cs = '0; cr = '0;
    for (int l = 0; l < NP; l++) begin pos[l] = '0; lam[l] = '0; ra[l] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    run_frame();
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
