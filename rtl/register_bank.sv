// register_bank: the internal configuration registers of the chip.
//
// Registers are written and read by commands (see command_decoder). The map is
// this design's own; the description of ABCStar only says that internal
// registers, including the mask register, are configured by commands:
//   0x00 CFG   [1:0] edge detection mode, [3:2] input register working mode
//   0x01 LAT   [8:0] L0 latency in BCs
//   0x10-0x17 MASK  mask bits, word k holds strips 32k+31..32k (1 = enabled)
// Unmapped addresses read as 0 and ignore writes.
// Reset values: LEVEL mode, data taking, latency 128, every strip enabled.
//
// Timing: a write takes effect at the rising BC edge of wr_en; rd_data is
// combinational from rd_addr.
module register_bank
  import abc_pkg::*;
#(
  parameter int unsigned LAT_W       = 9,
  parameter int unsigned LAT_DEFAULT = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [REG_AW-1:0]   wr_addr,
  input  logic [REG_DW-1:0]   wr_data,
  input  logic [REG_AW-1:0]   rd_addr,
  output logic [REG_DW-1:0]   rd_data,
  output edge_mode_e          edge_mode,
  output work_mode_e          work_mode,
  output logic [LAT_W-1:0]    latency,
  output logic [NSTRIPS-1:0]  maskbits
);

  logic [3:0] cfg;

  assign edge_mode = edge_mode_e'(cfg[1:0]);
  assign work_mode = work_mode_e'(cfg[3:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= {WM_DATA, EDGE_LEVEL};
      latency  <= LAT_W'(LAT_DEFAULT);
      maskbits <= '1;
    end else if (wr_en) begin
      if (wr_addr == ADDR_CFG) cfg <= wr_data[3:0];
      if (wr_addr == ADDR_LAT) latency <= wr_data[LAT_W-1:0];
      for (int k = 0; k < MASK_WORDS; k++)
        if (wr_addr == ADDR_MASK + REG_AW'(k)) maskbits[k*REG_DW +: REG_DW] <= wr_data;
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr == ADDR_CFG) rd_data = REG_DW'(cfg);
    if (rd_addr == ADDR_LAT) rd_data = REG_DW'(latency);
    for (int k = 0; k < MASK_WORDS; k++)
      if (rd_addr == ADDR_MASK + REG_AW'(k)) rd_data = maskbits[k*REG_DW +: REG_DW];
  end

endmodule
