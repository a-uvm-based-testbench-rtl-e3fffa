// tb_input_register: self-checking test of the mask and edge detection stage.
// Random strip data (a few hits per BC), random mask words, and every edge
// detection and working mode in turn. A reference model keeps the masked
// source of the last three BCs and predicts hits_out and bcid_out each BC.
module tb_input_register;
  import abc_pkg::*;

  localparam int N = NSTRIPS;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] stripdata, maskbits, hits_out;
  edge_mode_e edge_mode;
  work_mode_e work_mode;
  logic test_pulse;
  logic [BCID_W-1:0] bcid, bcid_out;
  int checks = 0, failures = 0;
  int mode_seen [4];

  input_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] sparse_hits();
    logic [N-1:0] v = '0;
    int n = $urandom_range(0, 5);
    for (int i = 0; i < n; i++) v[$urandom_range(0, N-1)] = 1'b1;
    return v;
  endfunction

  logic [N-1:0] m [$];          // masked source per BC
  logic [BCID_W-1:0] bc_hist [$];
  logic [N-1:0] src, exp_hits;

  initial begin
    stripdata = '0; maskbits = '1; edge_mode = EDGE_LEVEL; work_mode = WM_DATA;
    test_pulse = 0; bcid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin m.push_back('0); bc_hist.push_back('0); end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc % 40 == 0) edge_mode = edge_mode_e'(cyc / 40 % 4);
      if (cyc % 160 == 0) work_mode = (cyc < 1600) ? WM_DATA : work_mode_e'(cyc / 160 % 4);
      if (cyc % 100 == 0) begin
        for (int w = 0; w < N/32; w++) maskbits[w*32 +: 32] = $urandom | $urandom;
      end
      stripdata  = ($urandom_range(0, 3) == 0) ? '0 : sparse_hits();
      test_pulse = ($urandom_range(0, 7) == 0);
      bcid = bcid + 1'b1;
      unique case (work_mode)
        WM_DATA:  src = stripdata;
        WM_BCID:  src = {(N/BCID_W){bcid}};
        WM_MASK:  src = maskbits;
        WM_PULSE: src = {N{test_pulse}};
      endcase
      unique case (edge_mode)   // hits_out after this edge uses the previous three samples
        EDGE_HIT:   exp_hits = m[$-2] | m[$-1] | m[$];
        EDGE_LEVEL: exp_hits = m[$-1];
        EDGE_EDGE:  exp_hits = ~m[$-2] & m[$-1];
        EDGE_CLEAR: exp_hits = '0;
      endcase
      @(posedge clk);
      m.push_back(src & maskbits);
      bc_hist.push_back(bcid);
      #1;
      checks++;
      if (hits_out !== exp_hits) begin
        failures++;
        if (failures < 5) $display("cycle %0d mode %s: hits mismatch", cyc, edge_mode.name());
      end
      if (hits_out != '0) mode_seen[edge_mode]++;
      checks++;
      if (bcid_out !== bc_hist[$-2]) failures++;
    end
    // every data-producing mode must have produced hits
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (mode_seen[k] == 0) begin failures++; $display("mode %0d never produced hits", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
