// tb_command_decoder: drives random L0s, PR and LP frames and command frames
// (for this chip, for another chip and broadcast) on the two lines at once and
// checks every decoded pulse and its fields, in order. An L0 presented for the
// falling edge of BC n must appear on l0 in BC n+1.
module tb_command_decoder;
  import abc_pkg::*;

  logic clk = 0, rst_n = 0, abcup = 0;
  logic [CHIPID_W-1:0] chip_id = 4'h5;
  logic l0_cmd, lp_pr;
  logic l0, pr_valid, lp_valid, reg_wr, reg_rd, soft_rst, cnt_rst, test_pulse;
  logic [L0ID_W-1:0] pr_l0id, lp_l0id;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_data;
  int checks = 0, failures = 0;

  command_decoder dut (.*);
  abc_line_driver #(.QUARTER(5)) drv (.BC(clk), .L0_CMD(l0_cmd), .LP_PR(lp_pr));

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { cmd_op_e op; logic [7:0] addr; logic [31:0] data; } cmd_t;
  logic [7:0] pr_exp [$], lp_exp [$];
  cmd_t cmd_exp [$];
  int n_l0 = 0, n_cmd = 0, n_pr = 0, n_lp = 0;

  // monitor
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (l0) begin
        checks++; n_l0++;
        if (drv.l0_sent.size() == 0 || drv.l0_sent[0] != drv.bc_count - 1) begin failures++; $display("L0 at %0d sent %0d", drv.bc_count, drv.l0_sent[0]); end
        if (drv.l0_sent.size() != 0) void'(drv.l0_sent.pop_front());
      end
      if (pr_valid) begin
        checks++; n_pr++;
        if (pr_exp.size() == 0 || pr_exp.pop_front() !== pr_l0id) begin failures++; $display("PR"); end
      end
      if (lp_valid) begin
        checks++; n_lp++;
        if (lp_exp.size() == 0 || lp_exp.pop_front() !== lp_l0id) failures++;
      end
      if (reg_wr | reg_rd | soft_rst | cnt_rst | test_pulse) begin
        cmd_t e;
        checks++; n_cmd++;
        if (cmd_exp.size() == 0) begin failures++; $display("unexpected cmd"); end
        else begin
          e = cmd_exp.pop_front();
          if (!((e.op == OP_WRITE) == reg_wr && (e.op == OP_READ) == reg_rd &&
                (e.op == OP_SOFTRST) == soft_rst && (e.op == OP_CNTRST) == cnt_rst &&
                (e.op == OP_PULSE) == test_pulse && $onehot({reg_wr, reg_rd, soft_rst, cnt_rst, test_pulse}))) begin failures++; $display("op %s wr%b rd%b sr%b cr%b tp%b", e.op.name(), reg_wr, reg_rd, soft_rst, cnt_rst, test_pulse); end
          if ((e.op == OP_WRITE || e.op == OP_READ) && reg_addr !== e.addr) begin failures++; $display("addr"); end
          if (e.op == OP_WRITE && reg_data !== e.data) begin failures++; $display("data"); end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      automatic logic [7:0] id = 8'($urandom);
      automatic cmd_op_e op = cmd_op_e'($urandom_range(0, 4));
      automatic int who = $urandom_range(0, 2);     // 0 me, 1 other chip, 2 broadcast
      automatic logic [3:0] cid = (who == 0) ? chip_id : (who == 2) ? 4'hF : 4'($urandom);
      automatic logic [7:0] a = 8'($urandom);
      automatic logic [31:0] d = $urandom;
      while (who == 1 && (cid == chip_id || cid == CHIPID_BROADCAST)) cid = 4'($urandom);
      drv.send_l0($urandom_range(0, 30));
      if ($urandom_range(0, 1)) begin drv.send_pr(id); pr_exp.push_back(id); end
      if ($urandom_range(0, 1)) begin drv.send_lp(~id); lp_exp.push_back(~id); end
      if ($urandom_range(0, 2) == 0) begin
        drv.send_cmd(op, cid, a, d);
        if (who != 1) cmd_exp.push_back('{op, a, d});
      end
      while (drv.cmd_q.size() > 60 || drv.l0_q.size() > 40) @(posedge clk);
    end
    while (drv.busy()) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (pr_exp.size() || lp_exp.size() || cmd_exp.size() || drv.l0_sent.size()) failures++;
    $display("L0 %0d, PR %0d, LP %0d, commands %0d", n_l0, n_pr, n_lp, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
