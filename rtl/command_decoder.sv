// command_decoder: turns the two trigger/command lines into internal pulses.
//
// Each line carries two bit streams, one per BC clock edge, as in the ABCStar
// port list: L0_CMD gives the L0 trigger on the falling edge and the command
// stream (CMD) on the rising edge; LP_PR gives LP on the rising edge and PR on
// the falling edge. Falling-edge samples are retimed to the next rising edge,
// so all outputs are on the rising BC edge.
//   L0  : a 1 is one L0 trigger.
//   PR, LP : frames of a start bit and the 8-bit L0ID of the requested event.
//   CMD : 48-bit frames {1, op[2:0], chip_id[3:0], addr[7:0], data[31:0]}.
//         A frame is executed when chip_id matches the chipID pins or is the
//         broadcast value 4'hF. Operations: register write, register read,
//         soft reset, BCID/L0ID counter reset, digital test pulse.
// The frame formats and opcodes are this design's choice; the description
// names the commands' purposes (chip reset, register writing and reading).
// abcup, the serial input reset, clears the frame receivers while high.
//
// Timing: an L0 sampled at the falling edge in BC n gives l0 high in BC n+1
// (after rising edge n+1). A frame's pulse follows its last bit by one BC.
module command_decoder
  import abc_pkg::*;
(
  input  logic                clk,          // BC
  input  logic                rst_n,
  input  logic                abcup,
  input  logic [CHIPID_W-1:0] chip_id,
  input  logic                l0_cmd,       // L0_CMD pin
  input  logic                lp_pr,        // LP_PR pin
  output logic                l0,
  output logic                pr_valid,
  output logic [L0ID_W-1:0]   pr_l0id,
  output logic                lp_valid,
  output logic [L0ID_W-1:0]   lp_l0id,
  output logic                reg_wr,
  output logic                reg_rd,
  output logic [REG_AW-1:0]   reg_addr,
  output logic [REG_DW-1:0]   reg_data,
  output logic                soft_rst,
  output logic                cnt_rst,
  output logic                test_pulse
);

  logic l0_fall, pr_fall;     // falling-edge samples
  logic cmd_valid;
  logic [CMD_FRAME_BITS-2:0] cmd;
  cmd_op_e            op;
  logic [CHIPID_W-1:0] frame_id;
  logic               for_me;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l0_fall <= 1'b0; pr_fall <= 1'b0;
    end else begin
      l0_fall <= l0_cmd;
      pr_fall <= lp_pr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l0 <= 1'b0;
    else        l0 <= l0_fall;
  end

  serial_frame_rx #(.LEN(TRIG_FRAME_BITS)) u_pr (
    .clk, .rst_n, .clr(abcup), .bit_in(pr_fall), .valid(pr_valid), .payload(pr_l0id));
  serial_frame_rx #(.LEN(TRIG_FRAME_BITS)) u_lp (
    .clk, .rst_n, .clr(abcup), .bit_in(lp_pr),   .valid(lp_valid), .payload(lp_l0id));
  serial_frame_rx #(.LEN(CMD_FRAME_BITS)) u_cmd (
    .clk, .rst_n, .clr(abcup), .bit_in(l0_cmd),  .valid(cmd_valid), .payload(cmd));

  assign op       = cmd_op_e'(cmd[CMD_FRAME_BITS-2 -: 3]);
  assign frame_id = cmd[REG_AW+REG_DW +: CHIPID_W];
  assign for_me   = cmd_valid && (frame_id == chip_id || frame_id == CHIPID_BROADCAST);
  assign reg_addr = cmd[REG_DW +: REG_AW];
  assign reg_data = cmd[REG_DW-1:0];
  assign reg_wr     = for_me && op == OP_WRITE;
  assign reg_rd     = for_me && op == OP_READ;
  assign soft_rst   = for_me && op == OP_SOFTRST;
  assign cnt_rst    = for_me && op == OP_CNTRST;
  assign test_pulse = for_me && op == OP_PULSE;

endmodule
