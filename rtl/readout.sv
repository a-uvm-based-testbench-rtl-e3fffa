// readout: packs clusters into packets and sends them on the serial output.
//
// Packet format (MSB first on data_out):
//   start bits (3) | TYP (4) | L0ID (8) | BCID (4) | 1 to 4 clusters (12 each) | trailer (1)
// The field widths and the 160 Mb/s serial rate are those of ABCStar; the
// start value 3'b110, the trailer 0 and the idle level 0 are this design's.
// A receiver knows where a packet ends from the clusters: it ends after a
// cluster with its last bit set or after the fourth cluster; an event with
// more than four clusters takes several packets with the same header.
// A register read-back is sent as a packet with TYP_REG, the register address
// in the L0ID field, BCID 0 and three words {4'b0, data[31:0]}.
//
// Structure: the packet builder runs on the BC clock and collects up to four
// clusters, or takes a register read-back when no packet is in progress (the
// read-back goes first). Finished packets cross into the RCLK domain through
// a four-deep dual-clock FIFO. The serializer sends one bit per RCLK cycle and
// leaves one idle bit between packets. When the FIFO is full the builder, and
// through clus_ready the cluster finder, waits.
module readout
  import abc_pkg::*;
(
  // BC domain
  input  logic              bc_clk,
  input  logic              bc_rst_n,
  input  logic              clr,          // soft reset of the packet builder
  input  logic              clus_valid,
  output logic              clus_ready,
  input  cluster_t          clus,
  input  evt_tag_t          clus_tag,
  input  logic              reg_valid,
  output logic              reg_ready,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [REG_DW-1:0] reg_data,
  // readout domain
  input  logic              rclk,         // 160 MHz
  input  logic              rclk_rst_n,
  output logic              data_out
);

  localparam int unsigned PW = $bits(packet_t);

  // ---------------- packet builder (BC) ----------------
  packet_t     pkt;
  logic        pkt_pending;
  logic [1:0]  count;
  logic        fifo_full;
  logic        take_reg, take_clus;

  assign reg_ready  = !pkt_pending && (count == 2'd0);
  assign take_reg   = reg_valid && reg_ready;
  assign clus_ready = !pkt_pending && !(count == 2'd0 && reg_valid);
  assign take_clus  = clus_valid && clus_ready;

  always_ff @(posedge bc_clk or negedge bc_rst_n) begin
    if (!bc_rst_n) begin
      pkt         <= '0;
      pkt_pending <= 1'b0;
      count       <= '0;
    end else if (clr) begin
      pkt_pending <= 1'b0;
      count       <= '0;
    end else begin
      if (pkt_pending && !fifo_full) begin
        pkt_pending <= 1'b0;
      end
      if (take_reg) begin
        pkt.tag      <= '{typ: TYP_REG, l0id: reg_addr, bcid: '0};
        pkt.nclus_m1 <= 2'd2;
        pkt.payload  <= {4'b0, reg_data, 12'b0};
        pkt_pending  <= 1'b1;
      end else if (take_clus) begin
        if (count == 2'd0) begin
          pkt.tag     <= clus_tag;
          pkt.payload <= '0;
        end
        pkt.payload[(int'(MAX_CLUS)-1-int'(count))*CLUS_W +: CLUS_W] <= clus;
        pkt.nclus_m1 <= count;
        if (clus.last || count == 2'(MAX_CLUS-1)) begin
          pkt_pending <= 1'b1;
          count       <= '0;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  // ---------------- clock crossing ----------------
  packet_t q_pkt;
  logic    q_empty, q_pop;

  async_fifo #(.W(PW), .AW(2)) u_fifo (
    .wclk   (bc_clk),
    .wrst_n (bc_rst_n),
    .wr_en  (pkt_pending && !fifo_full),
    .wr_data(pkt),
    .full   (fifo_full),
    .rclk   (rclk),
    .rrst_n (rclk_rst_n),
    .rd_en  (q_pop),
    .rd_data(q_pkt),
    .empty  (q_empty)
  );

  // ---------------- serializer (RCLK) ----------------
  logic [PKT_MAX_BITS-1:0] shreg;
  logic [6:0]              bits_left;

  assign q_pop = q_empty ? 1'b0 : (bits_left == '0);

  always_ff @(posedge rclk or negedge rclk_rst_n) begin
    if (!rclk_rst_n) begin
      shreg     <= '0;
      bits_left <= '0;
      data_out  <= 1'b0;
    end else if (bits_left != '0) begin
      data_out  <= shreg[PKT_MAX_BITS-1];
      shreg     <= shreg << 1;
      bits_left <= bits_left - 1'b1;
    end else begin
      data_out <= 1'b0;
      if (q_pop) begin
        // Left-aligned: header, the used cluster words, trailer, then zeros.
        shreg <= {START_BITS, q_pkt.tag, q_pkt.payload, 1'b0}
                 | ({{(PKT_MAX_BITS-1){1'b0}}, TRAILER}
                    << ((MAX_CLUS-1-int'(q_pkt.nclus_m1))*CLUS_W));
        // The words beyond nclus are zero in the payload, so the trailer
        // lands right after the last used word.
        bits_left <= 7'(3 + TYP_W + L0ID_W + BCID_W + 1 + (int'(q_pkt.nclus_m1)+1)*CLUS_W);
      end
    end
  end

endmodule
