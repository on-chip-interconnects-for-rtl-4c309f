// tb_noc_fifo: random pushes and pops on a depth-1 and a depth-5 FIFO,
// compared every cycle with a queue model: head data, empty, full and count,
// including simultaneous push and pop on a full FIFO. No write is ever made
// into a full FIFO without a pop, so overflow must stay low.
//
// The sizes (N = 5114, 16 ports or nodes) follow the published decoder setup;
// the stimulus, the reference model and the pass criteria are this
// testbench's own.
module tb_noc_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 12;

  logic [1:0]   wr, rd, empty, full, ovf;
  logic [W-1:0] wd [2], q [2];
  logic [2:0]   cnt5;
  logic [0:0]   cnt1;

  noc_fifo #(.WIDTH(W), .DEPTH(1)) u1 (.clk, .rst, .wr_en(wr[0]), .wr_data(wd[0]),
    .rd_en(rd[0]), .rd_data(q[0]), .empty(empty[0]), .full(full[0]), .count(cnt1),
    .overflow(ovf[0]));
  noc_fifo #(.WIDTH(W), .DEPTH(5)) u5 (.clk, .rst, .wr_en(wr[1]), .wr_data(wd[1]),
    .rd_en(rd[1]), .rd_data(q[1]), .empty(empty[1]), .full(full[1]), .count(cnt5),
    .overflow(ovf[1]));

  logic [W-1:0] model [2][$];
  int depth [2] = '{1, 5};

  task automatic check(int f, int c);
    checks++;
    if (empty[f] != (model[f].size() == 0) || full[f] != (model[f].size() == depth[f]) ||
        c != model[f].size() || (model[f].size() > 0 && q[f] != model[f][0])) begin
      failures++;
      $display("fifo%0d mismatch: size %0d count %0d empty %b full %b", f,
               model[f].size(), c, empty[f], full[f]);
    end
  endtask

  initial begin
    wr = '0; rd = '0; wd[0] = '0; wd[1] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(0, int'(cnt1));
      check(1, int'(cnt5));
      for (int f = 0; f < 2; f++) begin
        rd[f] = ($urandom_range(2, 0) == 0) ? 1'b0 : 1'b1;
        if (n > 2000) rd[f] = ($urandom_range(3, 0) == 0);   // fill up
        wr[f] = $urandom_range(1, 0);
        if (model[f].size() == depth[f] && !(rd[f])) wr[f] = 0;
        wd[f] = W'($urandom);
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) begin
        if (rd[f] && model[f].size() > 0) void'(model[f].pop_front());
        if (wr[f]) model[f].push_back(wd[f]);
      end
    end
    checks++;
    if (ovf != 2'b00) begin failures++; $display("unexpected overflow"); end
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
