// tb_cluster_finder: random events (empty, sparse, dense, strips at both ends)
// against a reference cluster list computed here. With out_ready held high
// the finder must give one cluster per BC; with random out_ready it must hold
// the cluster until it is taken. The header tag must travel with the clusters.
module tb_cluster_finder;
  import abc_pkg::*;

  localparam int N = NSTRIPS;
  logic clk = 0, rst_n = 0, clr = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0] in_hits;
  evt_tag_t in_tag, out_tag;
  cluster_t out_clus;
  int checks = 0, failures = 0, n_empty = 0, n_multi = 0;

  cluster_finder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: scan upward, each cluster covers the hit strip and three above.
  function automatic void ref_clusters(input logic [N-1:0] h, ref cluster_t q[$]);
    cluster_t c;
    q.delete();
    for (int i = 0; i < N; i++) begin
      if (h[i]) begin
        c.addr = 8'(i);
        for (int k = 1; k < 4; k++) c.next[k-1] = (i + k < N) ? h[i+k] : 1'b0;
        c.last = 1'b0;
        q.push_back(c);
        i += 3;
      end
    end
    if (q.size() == 0) q.push_back(NO_CLUSTER);
    else q[$].last = 1'b1;
  endfunction

  cluster_t exp_q [$];
  logic [N-1:0] h;

  initial begin
    in_valid = 0; out_ready = 0; in_hits = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 600; ev++) begin
      automatic int kind = ev % 5;
      int nh;
      automatic bit stall = ev >= 300;
      int t0, t_last;
      h = '0;
      nh = (kind == 0) ? 0 : (kind == 1) ? $urandom_range(1, 6) : (kind == 2) ? $urandom_range(20, 80) : $urandom_range(1, 12);
      for (int i = 0; i < nh; i++) h[$urandom_range(0, N-1)] = 1'b1;
      if (kind == 3) h[N-1 -: 3] = 3'($urandom);
      if (kind == 4) h[0] = 1'b1;
      ref_clusters(h, exp_q);
      if (h == '0) n_empty++;
      if (exp_q.size() > 4) n_multi++;
      @(negedge clk);
      in_valid = 1; in_hits = h;
      in_tag = '{typ: (ev % 2) ? TYP_LP : TYP_PR, l0id: 8'(ev), bcid: 4'(ev)};
      out_ready = 1;
      @(posedge clk); #1;
      checks++;
      if (!(in_ready == 0 && out_valid == 1)) failures++;   // event taken
      t0 = $time;
      @(negedge clk);
      in_valid = 0;
      while (exp_q.size() > 0) begin
        out_ready = stall ? $urandom_range(0, 1) : 1;
        @(posedge clk);
        if (out_ready) begin
          checks++;
          if (!out_valid || out_clus !== exp_q[0] || out_tag.l0id !== 8'(ev)) begin
            failures++;
            if (failures < 5) $display("ev %0d: got %h exp %h", ev, out_clus, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
        #1;
        t_last = $time;
        @(negedge clk);
      end
      out_ready = 0;
      // one cluster per BC when never stalled
      if (!stall) begin
        cluster_t tmp [$];
        ref_clusters(h, tmp);
        checks++;
        if ((t_last - t0) / 10 != tmp.size()) begin
          failures++;
          $display("ev %0d: %0d clusters took %0d BCs", ev, tmp.size(), (t_last - t0) / 10);
        end
      end
      checks++;
      if (out_valid || !in_ready) failures++;   // idle after the last cluster
    end
    checks++;
    if (n_empty == 0 || n_multi == 0) failures++;
    $display("empty events %0d, events of more than 4 clusters %0d", n_empty, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
