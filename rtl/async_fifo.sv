// async_fifo: dual-clock FIFO carrying words from a write clock domain to a
// read clock domain.
//
// Classic gray-code design: each side keeps a binary pointer one bit wider
// than the address, passes its gray-coded copy through two flip-flops into the
// other domain, and compares pointers there for full (write side) and empty
// (read side). The read port is first-word fall-through: rd_data shows the
// oldest word whenever empty is low, and rd_en removes it. In this chip it
// carries packets from the 40 MHz BC domain to the 160 MHz readout domain; the
// FIFO itself is this design's choice, the description only gives the two
// clocks. Each side has its own asynchronous reset; both must be applied
// together.
module async_fifo #(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 2          // 2**AW words
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_next = wbin + (AW+1)'(wr_en && !full);
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);

  // Full: the write pointer is one lap ahead (two top gray bits inverted).
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_next;
      wgray <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_next;
      rgray <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  no_overflow_ass: assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !full);

endmodule
