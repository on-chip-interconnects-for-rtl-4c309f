// tb_benes_ni_tx: self-checking test of the TDMA transmit interface of the
// Benes network (N = 5114, 8 SISOs, 7 route bits, table of 320 entries).
//
// For each frame a schedule of 100 packets with increasing random slots and
// random routes is loaded. Packet j is handed over by the SISO in cycle
// arr[j]. The reference model: packet j leaves the queue in cycle
// max(slot[j], arr[j] + 1, previous send + 1) and is on the output one cycle
// later as {route[j], position % 640, value}. Frame 1 delivers every value
// before its slot (late must stay low); frame 2 delivers some after their
// slot (late must rise). The output is compared every cycle.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_benes_ni_tx;
  localparam int N = 5114, PS = 8, EW = 8, NS = 7, TDEPTH = 320, SW = 12;
  localparam int GW = $clog2(N), SUB = 640, AW = 10, TW = 9;
  localparam int PKW = NS + AW + EW;
  localparam int NPK = 100;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           fs, sv, we, pv, late, ovf;
  logic [GW-1:0]  pos;
  logic [EW-1:0]  lam;
  logic [TW-1:0]  ca;
  logic [SW-1:0]  cs;
  logic [NS-1:0]  cr;
  logic [PKW-1:0] pk;
  logic [TW:0]    sent;

  benes_ni_tx #(.N(N), .P_SISO(PS), .EW(EW), .NS(NS), .TDEPTH(TDEPTH), .SW(SW)) dut (
    .clk, .rst, .frame_start(fs), .siso_valid(sv), .siso_pos(pos), .siso_lambda(lam),
    .cfg_we(we), .cfg_addr(ca), .cfg_slot(cs), .cfg_route(cr),
    .pkt_valid(pv), .pkt(pk), .sent_count(sent), .late(late), .overflow(ovf));

  int slot [NPK], arr [NPK], snd [NPK], g [NPK];
  logic [NS-1:0] route [NPK];
  logic [EW-1:0] val [NPK];

  task automatic run_frame(bit allow_late);
    int c, last, nxt_arr, nxt_out;
    bit exp_late;
    // schedule
    c = 3;
    for (int j = 0; j < NPK; j++) begin
      c += allow_late ? $urandom_range(8, 6) : $urandom_range(3, 1);
      slot[j]  = c;
      route[j] = NS'($urandom);
      g[j]     = $urandom_range(N - 1, 0);
      val[j]   = EW'($urandom);
      arr[j]   = allow_late ? slot[j] + $urandom_range(5, 0) - 3 : slot[j] - 1 - $urandom_range(1, 0);
    end
    for (int j = 1; j < NPK; j++) if (arr[j] <= arr[j-1]) arr[j] = arr[j-1] + 1;
    last = -1;
    exp_late = 0;
    for (int j = 0; j < NPK; j++) begin
      snd[j] = slot[j];
      if (arr[j] + 1 > snd[j]) snd[j] = arr[j] + 1;
      if (last + 1 > snd[j]) snd[j] = last + 1;
      last = snd[j];
      if (snd[j] != slot[j]) exp_late = 1;
    end
    for (int j = 0; j < NPK; j++) begin
      @(negedge clk);
      we = 1; ca = TW'(j); cs = SW'(slot[j]); cr = route[j];
    end
    @(negedge clk);
    we = 0;
    fs = 1;
    @(negedge clk);
    fs = 0;
    // now in cycle 0 of the frame
    nxt_arr = 0;
    nxt_out = 0;
    for (int cyc = 0; cyc < slot[NPK-1] + 20; cyc++) begin
      sv = 0;
      if (nxt_arr < NPK && arr[nxt_arr] == cyc) begin
        sv = 1; pos = GW'(g[nxt_arr]); lam = val[nxt_arr];
        nxt_arr++;
      end
      checks++;
      if (nxt_out < NPK && snd[nxt_out] + 1 == cyc) begin
        if (!pv || pk != {route[nxt_out], AW'(g[nxt_out] % SUB), val[nxt_out]}) begin
          failures++;
          $display("cycle %0d packet %0d: valid %b got %h", cyc, nxt_out, pv, pk);
        end
        nxt_out++;
      end else if (pv) begin
        failures++;
        $display("cycle %0d: unexpected packet", cyc);
      end
      @(negedge clk);
    end
    sv = 0;
    checks++;
    if (int'(sent) != NPK || late != exp_late || ovf) begin
      failures++;
      $display("end of frame: sent %0d late %b (exp %b) ovf %b", sent, late, exp_late, ovf);
    end
  endtask

  initial begin
    fs = 0; sv = 0; we = 0; pos = '0; lam = '0; ca = '0; cs = '0; cr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 6; f++) run_frame(f % 2 == 1);
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
