// bfly_ni_tx: transmit network interface between one SISO and the Butterfly
// network.
//
// With the butterfly decoding scheme a SISO produces up to two extrinsic
// values per cycle (one from each end of its window), so the interface has two
// lanes, each feeding its own network input port. For each value the SISO
// gives the interleaved (or deinterleaved) position g in the other component
// decoder's frame of N symbols. The interface splits g into the destination
// SISO, g / SUB, and the offset in that SISO's sub-block, g % SUB, with
// SUB = ceil(N / P_SISO). Each destination SISO owns two extrinsic memories:
// the top one (network port 2*siso) for offsets below HALF = ceil(SUB/2) and
// the bottom one (port 2*siso+1) for the rest. The packet is
// {destination port (d = log2(2*P_SISO) bits), offset (AW bits), value}, with
// AW = floor(log2(SUB)) + 1, registered before it enters the network: one
// cycle of latency, one packet per lane per cycle.
//
// Follows the description: destination-port tag and destination memory
// address in the header, their widths, two packets per SISO. Own choices: the
// split of a sub-block into top and bottom halves and the port numbering.
module bfly_ni_tx #(
  parameter int N      = 5114,
  parameter int P_SISO = 8,
  parameter int EW     = 8,
  localparam int GW    = $clog2(N),
  localparam int SUB   = (N + P_SISO - 1) / P_SISO,
  localparam int HALF  = (SUB + 1) / 2,
  localparam int AW    = $clog2(SUB + 1),
  localparam int DW    = $clog2(2 * P_SISO),
  localparam int PKW   = DW + AW + EW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [1:0]     siso_valid,
  input  logic [GW-1:0]  siso_pos    [2],
  input  logic [EW-1:0]  siso_lambda [2],
  output logic [1:0]     pkt_valid,
  output logic [PKW-1:0] pkt         [2]
);

  for (genvar l = 0; l < 2; l++) begin : g_lane
    logic [GW-1:0] sub_idx, offset;
    logic [DW-1:0] port;
    assign sub_idx = siso_pos[l] / GW'(SUB);
    assign offset  = siso_pos[l] - sub_idx * GW'(SUB);
    assign port    = DW'({sub_idx, (offset >= GW'(HALF))});

    always_ff @(posedge clk) begin
      if (rst) pkt_valid[l] <= 1'b0;
      else     pkt_valid[l] <= siso_valid[l];
      pkt[l] <= {port, AW'(offset), siso_lambda[l]};
    end
  end

endmodule
