// benes_router: bufferless 2-input, 2-output router of the Benes network.
//
// Each input packet and its valid bit are captured in an input register. The
// packet carries street-sign routing: its RW most significant bits name the
// output port to take at this and every later stage, leading bit first. The
// router switches each registered packet to the output its leading bit names
// and drops that bit, so the outgoing packet is one bit narrower. Outputs are
// driven straight from the switch, giving one cycle per stage.
//
// There is no arbitration and no queue: the network relies on time-division
// scheduling at its inputs and on off-line path computation, so two packets
// never ask for one output. If they do, output 0's packet is taken from input
// 0, collision is raised for that cycle and an assertion fires.
//
// Follows the description: input registers, registered valid bits, a routing
// block driven by the route field, 2x2 switch matrix, street-sign routing,
// packet narrowing by one route bit per stage. Own choices: the collision
// flag and synchronous active-high reset of the valid registers.
module benes_router #(
  parameter int RW  = 7,    // street-sign bits still in the packet
  parameter int PLW = 18,
  localparam int IW = RW + PLW,
  localparam int OW = RW - 1 + PLW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    in_valid,
  input  logic [IW-1:0] in_pkt  [2],
  output logic [1:0]    out_valid,
  output logic [OW-1:0] out_pkt [2],
  output logic          collision
);

  logic [1:0]    v_q;
  logic [IW-1:0] p_q [2];

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= in_valid;
    p_q <= in_pkt;
  end

  logic [1:0] sel;   // output port chosen by each input
  assign sel[0] = p_q[0][IW-1];
  assign sel[1] = p_q[1][IW-1];

  always_comb begin
    collision = v_q[0] && v_q[1] && (sel[0] == sel[1]);
    out_valid = '0;
    out_pkt[0] = p_q[0][OW-1:0];
    out_pkt[1] = p_q[1][OW-1:0];
    for (int i = 1; i >= 0; i--)
      if (v_q[i]) begin
        out_valid[sel[i]] = 1'b1;
        out_pkt[sel[i]]   = p_q[i][OW-1:0];
      end
  end

  assert property (@(posedge clk) disable iff (rst) !collision)
    else $error("benes_router: two packets routed to one output");

endmodule
