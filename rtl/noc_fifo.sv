// noc_fifo: synchronous first-word-fall-through FIFO, the input queue of the
// Butterfly routers and of the direct-network routing elements.
//
// The head entry is visible on rd_data whenever empty is low; rd_en pops it at
// the clock edge. A write and a read in the same cycle are both accepted, also
// when the FIFO is full, so a depth of 1 still passes one packet per cycle.
// The interconnects have no flow control, so a write into a full FIFO that is
// not read in the same cycle is lost; it raises the sticky overflow flag and
// fires an assertion. count is the occupancy, used by the longest-FIFO-first
// serving policy. Storage is a register array addressed by wrapping pointers;
// depth may be any value from 1 up. Reset is synchronous and active high.
//
// Follows the published routers: input queuing with FIFOs and an occupancy
// value for longest-first serving. Own choices: first-word-fall-through
// behaviour, push-while-full-and-popping, the overflow flag and assertion.
module noc_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4,
  localparam int CW = $clog2(DEPTH + 1),
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_rd, do_wr;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign rd_data = mem[rptr];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) begin
        mem[wptr] <= wr_data;
        wptr      <= inc(wptr);
      end
      if (do_rd) rptr <= inc(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
      if (wr_en && !do_wr) overflow <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(wr_en && full && !rd_en))
    else $error("noc_fifo: write into a full FIFO, packet lost");

endmodule
