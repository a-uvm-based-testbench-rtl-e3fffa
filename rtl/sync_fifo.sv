// sync_fifo: single-clock first-word-fall-through FIFO.
//
// rd_data shows the oldest word whenever empty is low; rd_en removes it.
// A write when full is ignored (the word is dropped). clr empties the FIFO.
module sync_fifo #(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 4        // 2**AW words
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp == {~rp[AW], rp[AW-1:0]});
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

endmodule
