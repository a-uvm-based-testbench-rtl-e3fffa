// reset_sync: asynchronous assertion, synchronous release of an active-low
// reset. rst_out_n falls with rst_in_n and rises on the second rising clock
// edge after rst_in_n has risen.
module reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);

  logic meta;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      meta <= 1'b0; rst_out_n <= 1'b0;
    end else begin
      meta <= 1'b1; rst_out_n <= meta;
    end
  end

endmodule
