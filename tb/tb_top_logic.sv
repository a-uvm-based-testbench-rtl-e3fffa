// tb_top_logic: checks the BCID and L0ID counters (with counter reset), the
// order in which PR and LP requests are served (PR first, each queue in
// arrival order), the EvtBuffer read and the hand-over of hits and header to
// the cluster finder, the register read-back slot, and the count of requests
// dropped by a full queue. The EvtBuffer is modelled here: the word at
// address a is a fixed function of a.
module tb_top_logic;
  import abc_pkg::*;

  localparam int N = NSTRIPS;
  logic clk = 0, rst_n = 0, soft_rst = 0, cnt_rst = 0;
  logic [BCID_W-1:0] bcid;
  logic evt_we = 0;
  logic [L0ID_W-1:0] l0id;
  logic pr_valid = 0, lp_valid = 0;
  logic [L0ID_W-1:0] pr_l0id = '0, lp_l0id = '0;
  logic evt_rd_en, evt_rd_valid;
  logic [L0ID_W-1:0] evt_rd_addr;
  logic [BCID_W+N-1:0] evt_rd_data;
  logic cf_valid, cf_ready;
  logic [N-1:0] cf_hits;
  evt_tag_t cf_tag;
  logic reg_rd = 0;
  logic [REG_AW-1:0] reg_rd_addr = '0, rb_addr;
  logic [REG_DW-1:0] reg_rd_data = '0, rb_data;
  logic rb_valid, rb_ready;
  logic [15:0] dropped;
  int checks = 0, failures = 0, n_pr = 0, n_lp = 0, n_prio = 0, n_rb = 0;

  top_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BCID_W+N-1:0] evt_word(logic [7:0] a);
    return {a[3:0] ^ 4'h9, {(N/8){a}}};
  endfunction

  // EvtBuffer model
  always @(posedge clk) begin
    evt_rd_valid <= rst_n && evt_rd_en;
    if (evt_rd_en) evt_rd_data <= evt_word(evt_rd_addr);
  end

  logic [7:0] prq [$], lpq [$];
  logic [7:0] cur_addr;
  typ_e cur_typ;
  logic [3:0] m_bcid;
  logic [7:0] m_l0id;
  logic [7:0] rb_a; logic [31:0] rb_d; bit rb_pend = 0;
  int n_cf = 0;

  // scoreboard, sampled just before each rising edge
  int prq_n0, lpq_n0;
  always @(posedge clk) if (rst_n) begin
    prq_n0 = prq.size();
    lpq_n0 = lpq.size();
    checks++;
    if (bcid !== m_bcid || l0id !== m_l0id) begin failures++; $display("cnt %0d %0d %0d %0d", bcid, m_bcid, l0id, m_l0id); end
    if (evt_rd_en) begin
      checks++;
      if (prq.size() > 0) begin
        if (lpq.size() > 0) n_prio++;
        cur_typ = TYP_PR; cur_addr = prq.pop_front(); n_pr++;
      end else if (lpq.size() > 0) begin
        cur_typ = TYP_LP; cur_addr = lpq.pop_front(); n_lp++;
      end else begin failures++; $display("rd without req"); end
      if (evt_rd_addr !== cur_addr) begin failures++; $display("addr"); end
    end
    if (cf_valid && cf_ready) begin
      checks++; n_cf++;
      if (cf_hits !== evt_word(cur_addr)[N-1:0] || cf_tag.typ !== cur_typ ||
          cf_tag.l0id !== cur_addr || cf_tag.bcid !== evt_word(cur_addr)[BCID_W+N-1 -: BCID_W]) begin failures++; $display("cf"); end
    end
    if (rb_valid && rb_ready) begin
      checks++; n_rb++;
      if (!rb_pend || rb_addr !== rb_a || rb_data !== rb_d) begin failures++; $display("rb"); end
      rb_pend = 0;
    end
    // model updates for this edge
    m_bcid = cnt_rst ? '0 : m_bcid + 1'b1;
    if (cnt_rst) m_l0id = '0; else if (evt_we) m_l0id++;
    if (pr_valid && prq_n0 < 16) prq.push_back(pr_l0id);
    if (lp_valid && lpq_n0 < 16) lpq.push_back(lp_l0id);
    if (reg_rd && !rb_pend) begin rb_pend = 1; rb_a = reg_rd_addr; rb_d = reg_rd_data; end
  end

  initial begin
    cf_ready = 0; rb_ready = 0;
    m_bcid = '0; m_l0id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      evt_we   = $urandom_range(0, 9) == 0;
      cnt_rst  = $urandom_range(0, 999) == 0;
      // a burst of requests at one point overflows the PR queue
      pr_valid = (cyc >= 5000 && cyc < 5030) || $urandom_range(0, 29) == 0;
      pr_l0id  = 8'($urandom);
      lp_valid = $urandom_range(0, 29) == 0;
      lp_l0id  = 8'($urandom);
      cf_ready = $urandom_range(0, 3) != 0;
      reg_rd   = $urandom_range(0, 99) == 0;
      reg_rd_addr = 8'($urandom);
      reg_rd_data = $urandom;
      rb_ready = $urandom_range(0, 1);
    end
    @(negedge clk);
    pr_valid = 0; lp_valid = 0; reg_rd = 0;
    checks++;
    if (dropped == 0) failures++;
    checks++;
    if (n_pr == 0 || n_lp == 0 || n_prio == 0 || n_rb == 0 || n_cf == 0) failures++;
    $display("PR %0d, LP %0d, PR served ahead of a waiting LP %0d, read-backs %0d, dropped %0d",
             n_pr, n_lp, n_prio, n_rb, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
