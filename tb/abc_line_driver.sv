// abc_line_driver: testbench driver for the two ABCStar trigger/command lines.
//
// Bits queued by the tasks are sent one per BC on each of the four streams:
// L0_CMD carries L0 for the falling BC edge and CMD for the rising edge, LP_PR
// carries PR for the falling edge and LP for the rising edge. Each line is
// changed a quarter period after the opposite edge so it is stable when
// sampled. l0_sent records the BC count at which each L0 bit was presented.
module abc_line_driver
  import abc_pkg::*;
#(
  parameter int QUARTER = 5          // a quarter of the BC period
) (
  input  logic BC,
  output logic L0_CMD,
  output logic LP_PR
);

  bit l0_q [$], cmd_q [$], lp_q [$], pr_q [$];
  longint bc_count = 0;
  longint l0_sent [$];

  initial begin L0_CMD = 0; LP_PR = 0; end

  function automatic bit pop(ref bit q [$]);
    if (q.size() == 0) return 1'b0;
    return q.pop_front();
  endfunction

  always @(posedge BC) begin
    bc_count++;
    #(QUARTER);
    L0_CMD = pop(l0_q);       // sampled on the falling edge
    if (L0_CMD) l0_sent.push_back(bc_count);
    LP_PR  = pop(pr_q);
  end
  always @(negedge BC) begin
    #(QUARTER);
    L0_CMD = pop(cmd_q);      // sampled on the next rising edge
    LP_PR  = pop(lp_q);
  end

  // Queue an L0 after 'gap' idle BCs on the L0 stream.
  task automatic send_l0(input int gap = 0);
    repeat (gap) l0_q.push_back(1'b0);
    l0_q.push_back(1'b1);
  endtask

  task automatic send_pr(input logic [L0ID_W-1:0] id);
    pr_q.push_back(1'b1);
    for (int i = L0ID_W-1; i >= 0; i--) pr_q.push_back(id[i]);
  endtask

  task automatic send_lp(input logic [L0ID_W-1:0] id);
    lp_q.push_back(1'b1);
    for (int i = L0ID_W-1; i >= 0; i--) lp_q.push_back(id[i]);
  endtask

  task automatic send_cmd(input cmd_op_e op, input logic [CHIPID_W-1:0] id,
                          input logic [REG_AW-1:0] addr, input logic [REG_DW-1:0] data);
    logic [CMD_FRAME_BITS-1:0] f = {1'b1, op, id, addr, data};
    for (int i = CMD_FRAME_BITS-1; i >= 0; i--) cmd_q.push_back(f[i]);
  endtask

  task automatic idle_l0(input int n);
    repeat (n) l0_q.push_back(1'b0);
  endtask

  function automatic bit busy();
    return l0_q.size() != 0 || cmd_q.size() != 0 || lp_q.size() != 0 || pr_q.size() != 0;
  endfunction

endmodule
