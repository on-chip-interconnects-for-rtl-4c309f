// tb_ni_rx_mem: self-checking test of the receive interface and extrinsic
// memory, set up as a bottom memory (DEPTH 320 starting at offset 320).
// Random in-range packets are written and the memory contents compared with a
// model array; the receive counter must count them; clear resets it; a packet
// outside 320..639 must raise out_of_range and change no word.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_ni_rx_mem;
  localparam int DEPTH = 320, BASE = 320, AW = 10, EW = 8, MW = 9;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              clear, pv, oor;
  logic [AW+EW-1:0]  pkt;
  logic [MW-1:0]     ra;
  logic [EW-1:0]     rd;
  logic [$clog2(DEPTH+1):0] cnt;

  ni_rx_mem #(.DEPTH(DEPTH), .BASE(BASE), .AW(AW), .EW(EW)) dut (
    .clk, .rst, .clear, .pkt_valid(pv), .pkt, .rd_addr(ra), .rd_data(rd),
    .recv_count(cnt), .out_of_range(oor));

  logic [EW-1:0] model [DEPTH];

  initial begin
    int n_wr;
    clear = 0; pv = 0; pkt = '0; ra = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // fill every word first, then random overwrites
    n_wr = 0;
    for (int n = 0; n < DEPTH + 200; n++) begin
      int a;
      a = (n < DEPTH) ? n : $urandom_range(DEPTH - 1, 0);
      pv = 1;
      pkt = {AW'(a + BASE), EW'($urandom)};
      model[a] = pkt[EW-1:0];
      n_wr++;
      @(negedge clk);
      pv = 0;
      if (n % 3 == 0) @(negedge clk);
    end
    checks++;
    if (int'(cnt) != (n_wr & ((1 << ($clog2(DEPTH+1)+1)) - 1)) || oor) begin
      failures++;
      $display("count %0d expected %0d, oor %b", cnt, n_wr, oor);
    end
    for (int a = 0; a < DEPTH; a++) begin
      ra = MW'(a);
      #1;
      checks++;
      if (rd != model[a]) begin failures++; $display("word %0d: %h vs %h", a, rd, model[a]); end
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (cnt != '0) begin failures++; $display("clear did not reset the count"); end
    // out-of-range packet (a top-half offset)
    pv = 1;
    pkt = {AW'(5), 8'hEE};
    @(negedge clk);
    pv = 0;
    @(negedge clk);
    checks++;
    if (!oor) begin failures++; $display("out_of_range not raised"); end
    for (int a = 0; a < DEPTH; a++) begin
      ra = MW'(a);
      #1;
      checks++;
      if (rd != model[a]) begin failures++; $display("word %0d changed", a); end
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
