// tb_readout: feeds events of 1 to 10 clusters (and empty events) plus
// random register read-backs into the readout and decodes the serial output
// bit by bit on RCLK. Each decoded packet is compared field by field with the
// packets expected from the input: start bits 110, header, clusters split
// four per packet, trailer 0. The input side runs faster than the 160 Mb/s
// output can drain, so back-pressure through the FIFO must occur. RCLK runs
// at four times BC with a phase offset.
module tb_readout;
  import abc_pkg::*;

  logic bc_clk = 0, rclk = 0, bc_rst_n = 0, rclk_rst_n = 0, clr = 0;
  logic clus_valid, clus_ready, reg_valid, reg_ready, data_out;
  cluster_t clus;
  evt_tag_t clus_tag;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_data;
  int checks = 0, failures = 0, n_backpressure = 0, n_reg = 0, n_split = 0;

  readout dut (.*);

  always #20 bc_clk = ~bc_clk;
  initial begin #3; forever #5 rclk = ~rclk; end

  typedef struct {
    evt_tag_t tag;
    int       n;
    logic [11:0] w [4];
  } exp_pkt_t;
  exp_pkt_t data_q [$], reg_q [$];

  initial begin
    repeat (400000) @(posedge bc_clk);
    failures++;
    $display("watchdog: %0d data, %0d register packets not seen", data_q.size(), reg_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge bc_clk) if (bc_rst_n && dut.fifo_full && dut.pkt_pending) n_backpressure++;

  // ---------------- stimulus ----------------
  int n_events = 400;
  bit stim_done = 0;

  initial begin : clusters
    cluster_t c [$];
    exp_pkt_t p;
    clus_valid = 0; clus = '0; clus_tag = '0;
    repeat (4) @(posedge bc_clk);
    bc_rst_n = 1; rclk_rst_n = 1;
    repeat (4) @(posedge bc_clk);
    for (int ev = 0; ev < n_events; ev++) begin
      automatic int n = (ev % 7 == 0) ? 0 : $urandom_range(1, 10);
      automatic evt_tag_t tag = '{typ: ($urandom_range(0,1) ? TYP_PR : TYP_LP), l0id: 8'(ev), bcid: 4'($urandom)};
      c.delete();
      if (n == 0) c.push_back(NO_CLUSTER);
      for (int i = 0; i < n; i++) c.push_back('{last: (i == n-1), addr: 8'($urandom), next: 3'($urandom)});
      if (c.size() > 4) n_split++;
      for (int i = 0; i < c.size(); i += 4) begin
        p.tag = tag;
        p.n = (c.size() - i > 4) ? 4 : c.size() - i;
        for (int k = 0; k < p.n; k++) p.w[k] = c[i+k];
        data_q.push_back(p);
      end
      foreach (c[i]) begin
        @(negedge bc_clk);
        while ($urandom_range(0, 3) == 0) @(negedge bc_clk);
        clus_valid = 1; clus = c[i]; clus_tag = tag;
        do @(posedge bc_clk); while (!clus_ready);
        @(negedge bc_clk);
        clus_valid = 0;
      end
      if (ev % 50 == 49 && ev != n_events-1) repeat (200) @(negedge bc_clk);   // let the output drain now and then
    end
    stim_done = 1;
  end

  initial begin : regs
    exp_pkt_t p;
    reg_valid = 0; reg_addr = '0; reg_data = '0;
    repeat (10) @(posedge bc_clk);
    for (int r = 0; r < 60; r++) begin
      repeat ($urandom_range(20, 200)) @(negedge bc_clk);
      reg_valid = 1; reg_addr = 8'($urandom); reg_data = $urandom;
      p.tag = '{typ: TYP_REG, l0id: reg_addr, bcid: '0};
      p.n = 3;
      {p.w[0], p.w[1], p.w[2]} = {4'b0, reg_data};
      reg_q.push_back(p);
      do @(posedge bc_clk); while (!reg_ready);
      @(negedge bc_clk);
      reg_valid = 0;
    end
  end

  // ---------------- serial receiver ----------------

  task automatic rx_bits(input int n, output logic [31:0] v);
    v = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge rclk); #1;
      v = {v[30:0], data_out};
    end
  endtask

  initial begin : receiver
    logic [31:0] v;
    logic [2:0] start;
    evt_tag_t tag;
    logic [11:0] w [4];
    int n;
    exp_pkt_t e;
    @(posedge rclk_rst_n);
    forever begin
      // wait for the first start bit
      do begin @(posedge rclk); #1; end while (data_out == 1'b0);
      rx_bits(2, v); start = {1'b1, v[1:0]};
      rx_bits(16, v); tag = v[15:0];
      n = 0;
      if (tag.typ == TYP_REG) begin
        for (int k = 0; k < 3; k++) begin rx_bits(12, v); w[k] = v[11:0]; end
        n = 3;
      end else begin
        do begin rx_bits(12, v); w[n] = v[11:0]; n++; end while (n < 4 && !w[n-1][11]);
      end
      rx_bits(1, v);
      checks++;
      if (start != START_BITS || v[0] != TRAILER) failures++;
      if (tag.typ == TYP_REG) begin
        n_reg++;
        if (reg_q.size() == 0) begin failures++; continue; end
        e = reg_q.pop_front();
      end else begin
        if (data_q.size() == 0) begin failures++; continue; end
        e = data_q.pop_front();
      end
      checks++;
      if (e.tag !== tag || e.n != n) begin
        failures++;
        if (failures < 5) $display("header/length mismatch: got %h/%0d exp %h/%0d", tag, n, e.tag, e.n);
      end
      for (int k = 0; k < n && k < e.n; k++) begin
        checks++;
        if (w[k] !== e.w[k]) failures++;
      end
      if (stim_done && data_q.size() == 0 && reg_q.size() == 0) begin
        checks++;
        if (n_backpressure == 0) begin failures++; $display("FIFO never filled"); end
        checks++;
        if (n_split == 0) failures++;
        $display("register packets %0d, BCs of back-pressure %0d, split events %0d", n_reg, n_backpressure, n_split);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
