// abcstar_top: digital part of the ABCStar strip readout chip.
//
// 256 discriminator outputs enter every 40 MHz bunch crossing (BC). The input
// register masks them and applies the selected edge detection; the L0Buffer
// keeps every BC for a fixed L0 latency; each L0 trigger copies one BC into
// the EvtBuffer under the next L0ID; each PR or LP request reads one event back
// by its L0ID, the cluster finder turns its hits into 12-bit clusters, and the
// readout sends them as packets at 160 Mb/s on DataOut. The command decoder
// takes triggers and commands from the L0_CMD and LP_PR lines; the register
// bank holds the mask, the modes and the latency; top logic keeps the BCID and
// L0ID counters and sequences the reads. The block chain and the port list are
// those of ABCStar; block internals not given by its description are this
// design's own (see each module).
//
// Clocks: BC for everything but the serializer, RCLK (160 MHz) for the
// serializer; the two need not be phase related. Reset: RSTB and powerUpRstb
// (both active low) reset the whole chip, asynchronously asserted and
// released on each clock; the soft-reset command resets pointers, queues and
// counters. The front end is outside this module: stripdata are its outputs.
module abcstar_top
  import abc_pkg::*;
#(
  parameter int unsigned L0_DEPTH = 512
) (
  input  logic                RCLK,
  input  logic                BC,
  input  logic                RSTB,
  input  logic                powerUpRstb,
  input  logic                abcup,
  input  logic [CHIPID_W-1:0] chipID,
  input  logic                L0_CMD,
  input  logic                LP_PR,
  input  logic [NSTRIPS-1:0]  stripdata,
  output logic                DataOut,
  output logic [15:0]         dropped_requests
);

  localparam int unsigned LAT_W = $clog2(L0_DEPTH);
  localparam int unsigned EW    = BCID_W + NSTRIPS;

  logic rst_any_n, bc_rst_n, rclk_rst_n;
  assign rst_any_n = RSTB & powerUpRstb;

  reset_sync u_bc_rst   (.clk(BC),   .rst_in_n(rst_any_n), .rst_out_n(bc_rst_n));
  reset_sync u_rclk_rst (.clk(RCLK), .rst_in_n(rst_any_n), .rst_out_n(rclk_rst_n));

  // command decoder
  logic l0, pr_valid, lp_valid, reg_wr, reg_rd, soft_rst, cnt_rst, test_pulse;
  logic [L0ID_W-1:0] pr_l0id, lp_l0id;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata, reg_rdata;

  command_decoder u_cmd (
    .clk(BC), .rst_n(bc_rst_n), .abcup, .chip_id(chipID),
    .l0_cmd(L0_CMD), .lp_pr(LP_PR),
    .l0, .pr_valid, .pr_l0id, .lp_valid, .lp_l0id,
    .reg_wr, .reg_rd, .reg_addr, .reg_data(reg_wdata),
    .soft_rst, .cnt_rst, .test_pulse);

  // registers
  edge_mode_e         edge_mode;
  work_mode_e         work_mode;
  logic [LAT_W-1:0]   latency;
  logic [NSTRIPS-1:0] maskbits;

  register_bank #(.LAT_W(LAT_W)) u_regs (
    .clk(BC), .rst_n(bc_rst_n),
    .wr_en(reg_wr), .wr_addr(reg_addr), .wr_data(reg_wdata),
    .rd_addr(reg_addr), .rd_data(reg_rdata),
    .edge_mode, .work_mode, .latency, .maskbits);

  // top logic
  logic [BCID_W-1:0] bcid;
  logic [L0ID_W-1:0] l0id;
  logic              evt_we, evt_rd_en, evt_rd_valid;
  logic [L0ID_W-1:0] evt_rd_addr;
  logic [EW-1:0]     evt_wdata, evt_rdata;
  logic              cf_in_valid, cf_in_ready;
  logic [NSTRIPS-1:0] cf_in_hits;
  evt_tag_t          cf_in_tag;
  logic              rb_valid, rb_ready;
  logic [REG_AW-1:0] rb_addr;
  logic [REG_DW-1:0] rb_data;

  top_logic u_top (
    .clk(BC), .rst_n(bc_rst_n), .soft_rst, .cnt_rst, .bcid,
    .evt_we, .l0id,
    .pr_valid, .pr_l0id, .lp_valid, .lp_l0id,
    .evt_rd_en, .evt_rd_addr, .evt_rd_valid, .evt_rd_data(evt_rdata),
    .cf_valid(cf_in_valid), .cf_ready(cf_in_ready), .cf_hits(cf_in_hits), .cf_tag(cf_in_tag),
    .reg_rd, .reg_rd_addr(reg_addr), .reg_rd_data(reg_rdata),
    .rb_valid, .rb_ready, .rb_addr, .rb_data,
    .dropped(dropped_requests));

  // data path
  logic [NSTRIPS-1:0] inreg_hits;
  logic [BCID_W-1:0]  inreg_bcid;

  input_register u_inreg (
    .clk(BC), .rst_n(bc_rst_n), .stripdata, .maskbits, .edge_mode, .work_mode,
    .test_pulse, .bcid, .hits_out(inreg_hits), .bcid_out(inreg_bcid));

  l0_buffer #(.DEPTH(L0_DEPTH)) u_l0buf (
    .clk(BC), .rst_n(bc_rst_n), .clr(soft_rst),
    .hits_in(inreg_hits), .bcid_in(inreg_bcid), .latency, .l0,
    .evt_we, .evt_data(evt_wdata));

  evt_buffer u_evtbuf (
    .clk(BC), .rst_n(bc_rst_n),
    .we(evt_we), .wr_addr(l0id), .wr_data(evt_wdata),
    .rd_en(evt_rd_en), .rd_addr(evt_rd_addr), .rd_valid(evt_rd_valid), .rd_data(evt_rdata));

  logic     clus_valid, clus_ready;
  cluster_t clus;
  evt_tag_t clus_tag;

  cluster_finder u_cf (
    .clk(BC), .rst_n(bc_rst_n), .clr(soft_rst),
    .in_valid(cf_in_valid), .in_ready(cf_in_ready), .in_hits(cf_in_hits), .in_tag(cf_in_tag),
    .out_valid(clus_valid), .out_ready(clus_ready), .out_clus(clus), .out_tag(clus_tag));

  readout u_ro (
    .bc_clk(BC), .bc_rst_n(bc_rst_n), .clr(soft_rst),
    .clus_valid, .clus_ready, .clus, .clus_tag,
    .reg_valid(rb_valid), .reg_ready(rb_ready), .reg_addr(rb_addr), .reg_data(rb_data),
    .rclk(RCLK), .rclk_rst_n, .data_out(DataOut));

endmodule
