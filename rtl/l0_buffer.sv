// l0_buffer: first-level buffer, a fixed-latency pipeline of every BC's hits.
//
// Each BC the input register output (hits and their BCID) is written into a
// circular memory of DEPTH words at the write pointer, which then advances.
// When an L0 trigger arrives, the word written LATENCY BCs earlier is read and,
// one BC later, handed to the EvtBuffer (evt_we/evt_data). This is the
// behaviour described for ABCStar: at every L0, one event of the L0Buffer is
// written into the EvtBuffer, with a fixed L0 latency. The depth (512) and the
// 9-bit programmable latency are this design's choice; LATENCY must be in
// 1..DEPTH-1.
//
// Timing: an L0 sampled at rising edge t selects the word written at edge
// t-latency; evt_we is high for the one BC after edge t.
module l0_buffer
  import abc_pkg::*;
#(
  parameter int unsigned N     = NSTRIPS,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,        // BC
  input  logic                     rst_n,
  input  logic                     clr,        // soft reset: restart the pointer
  input  logic [N-1:0]             hits_in,
  input  logic [BCID_W-1:0]        bcid_in,
  input  logic [$clog2(DEPTH)-1:0] latency,
  input  logic                     l0,
  output logic                     evt_we,
  output logic [BCID_W+N-1:0]      evt_data    // {bcid, hits}
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [BCID_W+N-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] rd_addr;

  assign rd_addr = wr_ptr - latency;

  // Storage: no reset, every word is rewritten once per DEPTH BCs.
  always_ff @(posedge clk) begin
    mem[wr_ptr] <= {bcid_in, hits_in};
    if (l0) evt_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      evt_we <= 1'b0;
    end else begin
      wr_ptr <= clr ? '0 : wr_ptr + 1'b1;
      evt_we <= l0;
    end
  end

  // An L0 always produces exactly one EvtBuffer write, on the next BC.
  L0_Pipeline_ass: assert property (@(posedge clk) disable iff (!rst_n) l0 |=> evt_we);
  latency_range_ass: assert property (@(posedge clk) disable iff (!rst_n) l0 |-> latency != '0);

endmodule
