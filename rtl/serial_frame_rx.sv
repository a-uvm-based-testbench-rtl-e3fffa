// serial_frame_rx: receives fixed-length frames from a one-bit-per-BC stream.
//
// The line idles at 0. A 1 is the start bit; the next LEN-1 bits, MSB first,
// are the frame's payload. When the last payload bit has been taken, valid is
// high for one BC with the payload; the receiver then waits for the next start
// bit. clr (the serial input reset) abandons a frame in progress. The framing
// is this design's choice: the ABCStar description gives only which clock edge
// each stream uses.
module serial_frame_rx #(
  parameter int unsigned LEN = 9     // start bit included
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               bit_in,   // one bit per BC
  output logic               valid,
  output logic [LEN-2:0]     payload
);

  logic [$clog2(LEN)-1:0] cnt;    // payload bits still to come
  logic [LEN-3:0]         shreg;   // payload bits received so far

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; shreg <= '0; valid <= 1'b0; payload <= '0;
    end else if (clr) begin
      cnt <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (cnt == '0) begin
        if (bit_in) cnt <= ($clog2(LEN))'(LEN-1);
      end else begin
        shreg <= {shreg[LEN-4:0], bit_in};
        cnt   <= cnt - 1'b1;
        if (cnt == 1) begin
          valid   <= 1'b1;
          payload <= {shreg[LEN-3:0], bit_in};
        end
      end
    end
  end

endmodule
