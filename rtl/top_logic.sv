// top_logic: chip-level control between the buffers, the cluster finder and
// the readout.
//
// It keeps the BCID counter (4 bits, one count per BC) and the L0ID counter
// (8 bits, one count per event written into the EvtBuffer, whose address it
// gives). PR and LP requests, each naming an event by its L0ID, wait in two
// 16-deep queues. A sequencer takes one request at a time, PR before LP, reads
// the event from the EvtBuffer and hands hits and header (TYP, L0ID, BCID) to
// the cluster finder. A register read command is held in a one-word slot until
// the readout sends it. The description of ABCStar names this block and says
// that each PR or LP reads one event out of the EvtBuffer into the cluster
// finder; the counters' widths come from the packet header, and the queues,
// their depth, the PR-first order and the dropping of requests that arrive
// with a full queue (counted in dropped) are this design's choices.
//
// Timing: a request waiting at the head of a queue reaches the cluster finder
// input two BCs after the sequencer takes it (EvtBuffer read, then load).
// The event word itself (hits and BCID) is wired from the EvtBuffer read port
// straight to the cluster finder input; this block adds the valid strobe and
// the TYP and L0ID of the header.
module top_logic
  import abc_pkg::*;
#(
  parameter int unsigned N = NSTRIPS
) (
  input  logic                clk,          // BC
  input  logic                rst_n,
  input  logic                soft_rst,
  input  logic                cnt_rst,
  output logic [BCID_W-1:0]   bcid,
  // EvtBuffer write side
  input  logic                evt_we,
  output logic [L0ID_W-1:0]   l0id,
  // requests
  input  logic                pr_valid,
  input  logic [L0ID_W-1:0]   pr_l0id,
  input  logic                lp_valid,
  input  logic [L0ID_W-1:0]   lp_l0id,
  // EvtBuffer read side
  output logic                evt_rd_en,
  output logic [L0ID_W-1:0]   evt_rd_addr,
  input  logic                evt_rd_valid,
  input  logic [BCID_W+N-1:0] evt_rd_data,
  // cluster finder
  output logic                cf_valid,
  input  logic                cf_ready,
  output logic [N-1:0]        cf_hits,
  output evt_tag_t            cf_tag,
  // register read-back
  input  logic                reg_rd,
  input  logic [REG_AW-1:0]   reg_rd_addr,
  input  logic [REG_DW-1:0]   reg_rd_data,
  output logic                rb_valid,
  input  logic                rb_ready,
  output logic [REG_AW-1:0]   rb_addr,
  output logic [REG_DW-1:0]   rb_data,
  output logic [15:0]         dropped
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LOAD} state_e;
  state_e state;

  logic [L0ID_W-1:0] prq_data, lpq_data;
  logic prq_empty, prq_full, lpq_empty, lpq_full;
  logic prq_pop, lpq_pop;
  typ_e cur_typ;
  logic [L0ID_W-1:0] cur_l0id;

  sync_fifo #(.W(L0ID_W), .AW(4)) u_prq (
    .clk, .rst_n, .clr(soft_rst), .wr_en(pr_valid), .wr_data(pr_l0id),
    .rd_en(prq_pop), .rd_data(prq_data), .empty(prq_empty), .full(prq_full));
  sync_fifo #(.W(L0ID_W), .AW(4)) u_lpq (
    .clk, .rst_n, .clr(soft_rst), .wr_en(lp_valid), .wr_data(lp_l0id),
    .rd_en(lpq_pop), .rd_data(lpq_data), .empty(lpq_empty), .full(lpq_full));

  assign prq_pop     = (state == S_IDLE) && !prq_empty;
  assign lpq_pop     = (state == S_IDLE) && prq_empty && !lpq_empty;
  assign evt_rd_en   = prq_pop || lpq_pop;
  assign evt_rd_addr = prq_pop ? prq_data : lpq_data;

  assign cf_valid = (state == S_LOAD);
  assign cf_hits  = evt_rd_data[N-1:0];
  assign cf_tag   = '{typ: cur_typ, l0id: cur_l0id, bcid: evt_rd_data[BCID_W+N-1 -: BCID_W]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_typ  <= TYP_PR;
      cur_l0id <= '0;
      bcid     <= '0;
      l0id     <= '0;
      rb_valid <= 1'b0;
      rb_addr  <= '0;
      rb_data  <= '0;
      dropped  <= '0;
    end else begin
      // counters
      bcid <= (soft_rst || cnt_rst) ? '0 : bcid + 1'b1;
      if (soft_rst || cnt_rst) l0id <= '0;
      else if (evt_we)         l0id <= l0id + 1'b1;
      if ((pr_valid && prq_full) || (lp_valid && lpq_full)) dropped <= dropped + 1'b1;

      // read sequencer
      if (soft_rst) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (evt_rd_en) begin
            state    <= S_READ;
            cur_typ  <= prq_pop ? TYP_PR : TYP_LP;
            cur_l0id <= evt_rd_addr;
          end
          S_READ: if (evt_rd_valid) state <= S_LOAD;
          S_LOAD: if (cf_ready) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end

      // register read-back slot
      // (a read arriving while the slot is still full is dropped)
      if (soft_rst) begin
        rb_valid <= 1'b0;
      end else if (reg_rd && (!rb_valid || rb_ready)) begin
        rb_valid <= 1'b1;
        rb_addr  <= reg_rd_addr;
        rb_data  <= reg_rd_data;
      end else if (rb_valid && rb_ready) begin
        rb_valid <= 1'b0;
      end
    end
  end

endmodule
