// tb_l0_buffer: checks that each L0 delivers, one BC later, exactly the
// hits and BCID written LATENCY BCs before the L0, for several latencies up to
// the maximum, and that evt_we follows every L0 and nothing else.
module tb_l0_buffer;
  import abc_pkg::*;

  localparam int N = NSTRIPS;
  localparam int DEPTH = 512;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [N-1:0] hits_in;
  logic [BCID_W-1:0] bcid_in;
  logic [$clog2(DEPTH)-1:0] latency;
  logic l0, evt_we;
  logic [BCID_W+N-1:0] evt_data;
  int checks = 0, failures = 0, n_l0 = 0;

  l0_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BCID_W+N-1:0] hist [$];
  logic [BCID_W+N-1:0] w;
  int lat_list [5] = '{1, 7, 128, 300, 511};

  initial begin
    hits_in = '0; bcid_in = '0; latency = 9'd1; l0 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 5; ph++) begin
      latency = 9'(lat_list[ph]);
      for (int cyc = 0; cyc < 2000; cyc++) begin
        @(negedge clk);
        for (int k = 0; k < N/32; k++) w[k*32 +: 32] = $urandom;
        w[BCID_W+N-1 -: BCID_W] = 4'($urandom);
        {bcid_in, hits_in} = w;
        l0 = (cyc > lat_list[ph]) && ($urandom_range(0, 9) == 0);
        @(posedge clk);
        hist.push_back(w);
        #1;
        checks++;
        if (evt_we !== l0) failures++;
        if (l0) begin
          n_l0++;
          checks++;
          if (evt_data !== hist[$ - lat_list[ph]]) begin
            failures++;
            if (failures < 5) $display("latency %0d: wrong event", lat_list[ph]);
          end
        end
      end
    end
    checks++;
    if (n_l0 < 100) failures++;
    $display("L0 triggers: %0d", n_l0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
