// benes_ni_tx: transmit network interface of the Benes network, one lane (one
// network input port), implementing time-division multiple access.
//
// Paths through the bufferless Benes network and the cycle in which each
// packet may enter it are computed off line for the interleaving law and
// loaded into a schedule table through cfg_*: entry j holds the time slot
// (cycle number counted from frame_start) and the (2d-1)-bit street-sign
// route of the j-th packet this lane sends. Slots are chosen so that the
// packets entering in one slot have distinct destinations. The SISO hands
// over extrinsic values with their position g in the other component
// decoder's frame; they wait in a queue of QDEPTH entries. The address field
// is the offset of g in its destination SISO's sub-block, g % SUB with
// SUB = ceil(N / P_SISO), as in the Butterfly interface. The head of the queue
// is sent, registered, in the cycle its slot comes up; if the SISO delivers
// it later than that, it is sent as soon as it arrives and the sticky late
// flag is raised.
//
// Follows the description: per-packet time slot, precomputed street-sign
// route carried in the header. Own choices: the schedule table, the queue and
// its depth, the slot counter and the late flag.
//
// Lint note: the queue's full and count outputs are left open on purpose, and
// the upper bits of the internal offset are zero by construction (offset < SUB).
module benes_ni_tx #(
  parameter int N      = 5114,
  parameter int P_SISO = 8,
  parameter int EW     = 8,
  parameter int NS     = 7,      // route bits: 2*log2(2*P_SISO)-1
  parameter int TDEPTH = 320,    // packets per lane and frame
  parameter int SW     = 12,     // slot counter width
  parameter int QDEPTH = 16,
  localparam int GW    = $clog2(N),
  localparam int SUB   = (N + P_SISO - 1) / P_SISO,
  localparam int AW    = $clog2(SUB + 1),
  localparam int TW    = (TDEPTH > 1) ? $clog2(TDEPTH) : 1,
  localparam int PKW   = NS + AW + EW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           frame_start,
  input  logic           siso_valid,
  input  logic [GW-1:0]  siso_pos,
  input  logic [EW-1:0]  siso_lambda,
  input  logic           cfg_we,
  input  logic [TW-1:0]  cfg_addr,
  input  logic [SW-1:0]  cfg_slot,
  input  logic [NS-1:0]  cfg_route,
  output logic           pkt_valid,
  output logic [PKW-1:0] pkt,
  output logic [TW:0]    sent_count,
  output logic           late,
  output logic           overflow
);

  logic [SW-1:0] slot_mem  [TDEPTH];
  logic [NS-1:0] route_mem [TDEPTH];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      slot_mem[cfg_addr]  <= cfg_slot;
      route_mem[cfg_addr] <= cfg_route;
    end
  end

  // offset of the position in its destination sub-block
  logic [GW-1:0] sub_idx, offset;
  assign sub_idx = siso_pos / GW'(SUB);
  assign offset  = siso_pos - sub_idx * GW'(SUB);

  logic             q_empty, q_rd;
  logic [AW+EW-1:0] q_head;

  noc_fifo #(.WIDTH(AW + EW), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst,
    .wr_en   (siso_valid),
    .wr_data ({AW'(offset), siso_lambda}),
    .rd_en   (q_rd),
    .rd_data (q_head),
    .empty   (q_empty),
    .full    (),
    .count   (),
    .overflow(overflow)
  );

  logic [SW-1:0] slot_cnt;
  logic [TW-1:0] j;
  logic [SW-1:0] head_slot;
  assign j         = sent_count[TW-1:0];
  assign head_slot = slot_mem[j];
  assign q_rd      = !q_empty && (head_slot <= slot_cnt) &&
                     (int'(sent_count) < TDEPTH);

  always_ff @(posedge clk) begin
    if (rst || frame_start) begin
      slot_cnt   <= '0;
      sent_count <= '0;
      pkt_valid  <= 1'b0;
      late       <= 1'b0;
    end else begin
      slot_cnt  <= slot_cnt + 1'b1;
      pkt_valid <= q_rd;
      if (q_rd) begin
        sent_count <= sent_count + 1'b1;
        if (head_slot != slot_cnt) late <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (q_rd) pkt <= {route_mem[j], q_head};
  end

endmodule
