// cluster_finder: turns the 256 strip hits of one event into 12-bit clusters.
//
// An event (its hits and its header tag) is taken when in_valid and in_ready
// are both high. While the event is held, the finder presents one cluster per
// BC: the lowest-numbered hit strip gives the 8-bit address, the hits of the
// three strips above it give a 3-bit pattern, and those four strips are then
// cleared. The cluster's last bit is set on the final cluster of the event.
// An event without hits yields the single word NO_CLUSTER. The description of
// ABCStar gives the 256-bit input, the 12-bit cluster and the 40 MHz rate; the
// cluster layout and the search order are this design's own.
//
// Timing: clusters leave on a valid/ready handshake, at most one per BC; the
// first cluster is valid the BC after the event is taken. in_ready is high
// only while no event is held, so back-to-back events are one BC apart.
module cluster_finder
  import abc_pkg::*;
#(
  parameter int unsigned N = NSTRIPS
) (
  input  logic          clk,        // BC
  input  logic          rst_n,
  input  logic          clr,        // soft reset: drop the event held
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  in_hits,
  input  evt_tag_t      in_tag,
  output logic          out_valid,
  input  logic          out_ready,
  output cluster_t      out_clus,
  output evt_tag_t      out_tag
);

  logic         busy;
  logic [N-1:0] work;
  logic [7:0]   first;
  logic         found;
  logic [N-1:0] remaining;

  // Lowest hit strip
  always_comb begin
    first = '0;
    found = 1'b0;
    for (int i = N-1; i >= 0; i--) begin
      if (work[i]) begin
        first = 8'(i);
        found = 1'b1;
      end
    end
  end

  // Cluster word and the hits left after it
  always_comb begin
    out_clus  = NO_CLUSTER;
    remaining = work;
    for (int k = 0; k < 4; k++) begin
      if (int'(first) + k < N) remaining[int'(first) + k] = 1'b0;
    end
    if (found) begin
      out_clus.addr = first;
      for (int k = 1; k < 4; k++)
        out_clus.next[k-1] = (int'(first) + k < N) ? work[int'(first) + k] : 1'b0;
      out_clus.last = (remaining == '0);
    end
  end

  assign in_ready  = !busy;
  assign out_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      work    <= '0;
      out_tag <= '{typ: TYP_PR, l0id: '0, bcid: '0};
    end else if (clr) begin
      busy <= 1'b0;
      work <= '0;
    end else if (in_valid && in_ready) begin
      busy    <= 1'b1;
      work    <= in_hits;
      out_tag <= in_tag;
    end else if (out_valid && out_ready) begin
      work <= remaining;
      if (out_clus.last) busy <= 1'b0;
    end
  end

  // After the last cluster of an event nothing is presented until the next event.
  cluster_last_ass: assert property (@(posedge clk) disable iff (!rst_n || clr)
    (out_valid && out_ready && out_clus.last) |=> !out_valid);

endmodule
