// tb_evt_buffer: random writes by L0ID and random reads of written addresses,
// checked against a model array; rd_valid must follow rd_en by one BC.
module tb_evt_buffer;
  import abc_pkg::*;

  localparam int W = BCID_W + NSTRIPS;
  logic clk = 0, rst_n = 0;
  logic we, rd_en, rd_valid;
  logic [L0ID_W-1:0] wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  evt_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [256];
  bit written [256];
  logic [W-1:0] expect_q;
  logic expect_v;

  initial begin
    we = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wr_addr = 8'($urandom);
      for (int k = 0; k < W; k += 32) wr_data[k +: 32] = $urandom;
      rd_addr = 8'($urandom);
      rd_en = written[rd_addr] && (rd_addr != wr_addr || !we) && $urandom_range(0, 1);
      expect_v = rd_en;
      expect_q = model[rd_addr];
      @(posedge clk);
      if (we) begin model[wr_addr] = wr_data; written[wr_addr] = 1; end
      #1;
      checks++;
      if (rd_valid !== expect_v) failures++;
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
