// evt_buffer: second-level buffer holding the events accepted by L0.
//
// Each L0-accepted event ({bcid, hits}) is stored at the address given by its
// 8-bit L0ID, so a PR or LP request, which names the event by its L0ID, reads
// it back directly. With one word per L0ID value (256 words) an event stays
// readable until 256 further L0s have arrived. Addressing by L0ID follows the
// ABCStar description (PR and LP carry the event's L0ID); the depth is this
// design's choice, set by the 8-bit L0ID of the packet header.
//
// Timing: a write takes place at the rising BC edge where we is high. Reads
// are synchronous: rd_en high at edge t gives rd_data and rd_valid after edge t.
module evt_buffer
  import abc_pkg::*;
#(
  parameter int unsigned W     = BCID_W + NSTRIPS,
  parameter int unsigned DEPTH = 2**L0ID_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic                     rd_valid,
  output logic [W-1:0]             rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
