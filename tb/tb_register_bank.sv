// tb_register_bank: reset values, then random writes to mapped and unmapped
// addresses with read-back of every address, all against a model register map.
module tb_register_bank;
  import abc_pkg::*;

  logic clk = 0, rst_n = 0, wr_en;
  logic [REG_AW-1:0] wr_addr, rd_addr;
  logic [REG_DW-1:0] wr_data, rd_data;
  edge_mode_e edge_mode;
  work_mode_e work_mode;
  logic [8:0] latency;
  logic [NSTRIPS-1:0] maskbits;
  int checks = 0, failures = 0;

  register_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] m_cfg;
  logic [8:0] m_lat;
  logic [NSTRIPS-1:0] m_mask;

  function automatic logic [31:0] model_read(logic [7:0] a);
    if (a == ADDR_CFG) return 32'(m_cfg);
    if (a == ADDR_LAT) return 32'(m_lat);
    if (a >= ADDR_MASK && a < ADDR_MASK + 8) return m_mask[(a - ADDR_MASK)*32 +: 32];
    return '0;
  endfunction

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_cfg = {WM_DATA, EDGE_LEVEL}; m_lat = 9'd128; m_mask = '1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(0, 1) ? $urandom_range(0, 1) : $urandom_range(16, 23));
      wr_data = $urandom;
      rd_addr = ($urandom_range(0, 4) == 0) ? 8'($urandom) : 8'($urandom_range(0, 1) ? $urandom_range(0, 1) : $urandom_range(16, 23));
      #1;
      checks++;
      if (rd_data !== model_read(rd_addr)) failures++;
      @(posedge clk);
      if (wr_en) begin
        if (wr_addr == ADDR_CFG) m_cfg = wr_data[3:0];
        if (wr_addr == ADDR_LAT) m_lat = wr_data[8:0];
        if (wr_addr >= ADDR_MASK && wr_addr < ADDR_MASK + 8) m_mask[(wr_addr - ADDR_MASK)*32 +: 32] = wr_data;
      end
      #1;
      checks++;
      if (edge_mode !== m_cfg[1:0] || work_mode !== m_cfg[3:2] || latency !== m_lat || maskbits !== m_mask) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
