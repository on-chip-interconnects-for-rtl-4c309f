// bfly_router: 2-input, 2-output router of the Butterfly network.
//
// Each input has a FIFO that holds packets which lose arbitration. The head
// packet of each FIFO carries its remaining destination-tag bits in the RW
// most significant bits; the most significant one selects the output port
// (0 or 1) and is dropped, so the outgoing packet is one bit narrower. When
// both heads want the same output, a round-robin pointer decides: the input
// that was served in the last conflict has the lower priority next time. The
// winner is popped, the loser stays in its FIFO and retries next cycle. Both
// outputs are registered (packet and valid), so a router adds one cycle when
// there is no conflict.
//
// The FIFO depth is a parameter; in the network it is 2^i for stage i, the
// worst case in which every packet entering the router heads for one output.
// There is no backpressure between stages; an overflow is flagged.
//
// Follows the description: input FIFOs, destination-tag routing by one bit of
// the destination per stage, round-robin serving, switch matrix, registered
// valid outputs. Own choices: the 4-bit priority signal drawn between FIFO and
// arbiter is not used (the arbiter is plain round robin), registered packet
// outputs and synchronous active-high reset.
//
// Lint note: the FIFOs' full and count outputs are left open on purpose; the
// router needs only empty, and overflow is reported separately.
module bfly_router #(
  parameter int RW    = 4,    // destination-tag bits still in the packet
  parameter int PLW   = 18,   // rest of the packet: address and extrinsic value
  parameter int DEPTH = 1,
  localparam int IW = RW + PLW,
  localparam int OW = RW - 1 + PLW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    in_valid,
  input  logic [IW-1:0] in_pkt  [2],
  output logic [1:0]    out_valid,
  output logic [OW-1:0] out_pkt [2],
  output logic          conflict,   // both heads wanted one output this cycle
  output logic          overflow
);

  logic [1:0]    f_empty, f_rd, f_ovf;
  logic [IW-1:0] head [2];

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    noc_fifo #(.WIDTH(IW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en   (in_valid[i]),
      .wr_data (in_pkt[i]),
      .rd_en   (f_rd[i]),
      .rd_data (head[i]),
      .empty   (f_empty[i]),
      .full    (),
      .count   (),
      .overflow(f_ovf[i])
    );
  end

  assign overflow = |f_ovf;

  logic [1:0] want;   // output port requested by each head
  logic       rr;     // input with priority in the next conflict
  assign want[0] = head[0][IW-1];
  assign want[1] = head[1][IW-1];

  always_comb begin
    conflict = !f_empty[0] && !f_empty[1] && (want[0] == want[1]);
    f_rd     = ~f_empty;
    if (conflict) f_rd = rr ? 2'b10 : 2'b01;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr        <= 1'b0;
      out_valid <= '0;
    end else begin
      if (conflict) rr <= ~rr;
      out_valid <= '0;
      for (int i = 0; i < 2; i++)
        if (f_rd[i]) out_valid[want[i]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++)
      if (f_rd[i]) out_pkt[want[i]] <= head[i][OW-1:0];
  end

endmodule
