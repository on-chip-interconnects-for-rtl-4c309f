// ni_rx_mem: receive network interface plus the extrinsic information memory
// it fills (MEM_t or MEM_b of a SISO in the indirect networks).
//
// A packet leaving the network is {offset (AW bits), extrinsic value (EW
// bits)}; the offset is the position inside the destination SISO's sub-block.
// This memory holds the DEPTH positions starting at BASE, so the value is
// written to word offset - BASE at the clock edge after the packet arrives.
// The SISO reads its extrinsic values through rd_addr/rd_data
// (combinational read). recv_count counts the packets written since
// clear, and out_of_range flags a packet whose offset falls outside the
// memory (a mis-routed packet).
//
// Follows the description: the network interface writes the extrinsic value at
// the destination memory address carried by the packet. Own choices: the
// memory organisation and the counters.
//
// Lint note: with BASE = 0 the lower range comparison is always true, which a
// linter reports as a constant comparison; it is kept so one module serves
// both top and bottom memories.
module ni_rx_mem #(
  parameter int DEPTH = 320,
  parameter int BASE  = 0,
  parameter int AW    = 10,
  parameter int EW    = 8,
  localparam int MW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1) + 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             pkt_valid,
  input  logic [AW+EW-1:0] pkt,
  input  logic [MW-1:0]    rd_addr,
  output logic [EW-1:0]    rd_data,
  output logic [CW-1:0]    recv_count,
  output logic             out_of_range
);

  logic [EW-1:0] mem [DEPTH];
  logic [AW-1:0] addr;
  logic [AW:0]   local_addr;
  logic          in_range;

  assign addr       = pkt[AW+EW-1:EW];
  assign local_addr = {1'b0, addr} - (AW + 1)'(BASE);
  assign in_range   = ({1'b0, addr} >= (AW + 1)'(BASE)) &&
                      (local_addr < (AW + 1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (pkt_valid && in_range) mem[MW'(local_addr)] <= pkt[EW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      recv_count   <= '0;
      out_of_range <= 1'b0;
    end else if (pkt_valid) begin
      recv_count <= recv_count + 1'b1;
      if (!in_range) out_of_range <= 1'b1;
    end
  end

  assign rd_data = mem[rd_addr];

endmodule
