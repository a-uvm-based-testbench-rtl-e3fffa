// abcstar_env: end-to-end environment around the ABCStar digital part at its
// default size (256 strips, 512-deep L0Buffer, 256-event EvtBuffer), shared
// by the chip-level testbenches. It counts checks and failures and raises
// done when its test is over; the testbench that holds it prints the result.
//
// Stimulus enters only through the chip pins: strip hits every BC, L0
// triggers, PR and LP requests for accepted events, and register commands on
// the command stream. Tests run in phases; between phases the triggers stop,
// the output drains and the configuration changes.
//
// A reference model follows each BC's hits through mask, edge detection and
// the L0 latency, keeps the event of every L0 under its L0ID, computes its
// clusters and packets when it is requested, and compares every packet
// decoded from DataOut field by field. The BCID counter and the test pulse
// are taken from inside the chip (they have their own block tests) so that
// the BCID field and the pulse mode can be predicted.
//
// TEST selects the run:
//   0  full feature sweep: every edge mode, working mode, mask change,
//      latencies 50..511, counter and soft reset, test pulses, register
//      reads; L0 with probability 1/40 per BC, events of up to ~50 hit strips;
//      each mechanism of the design is counted and one never exercised fails.
//   1  edge detection modes LEVEL, HIT and EDGE in turn, long runs each.
//   2  mask bits rewritten by command between eight runs of 100 events.
//   3  trigger mix: 8800 L0s, about 11000 packets.
// Tests 1-3 follow the trigger statistics of the ABCStar verification runs:
// fewer than six hit strips per BC, L0 intervals drawn around a mean of 40
// BCs, an LP for every event and a PR for one in ten, each after a delay
// drawn around 480 BCs. They also check channel coverage: every one of the
// 256 channels must be seen hit at the point the test is about.
module abcstar_env
  import abc_pkg::*;
#(
  parameter int TEST = 0          // 0 full feature sweep, 1 edge modes, 2 mask bits, 3 trigger mix
) (
  output int checks = 0,
  output int failures = 0,
  output bit done = 1'b0
);

  localparam int N = NSTRIPS;
  localparam int BC_HALF = 20;                  // 40 MHz scaled to a 40-unit period
  localparam logic [3:0] MY_ID = 4'h6;

  logic RCLK = 0, BC = 0, RSTB = 0, powerUpRstb = 0, abcup = 0;
  logic [3:0] chipID = MY_ID;
  logic L0_CMD, LP_PR, DataOut;
  logic [N-1:0] stripdata = '0;
  logic [15:0] dropped_requests;

  abcstar_top dut (.*);
  abc_line_driver #(.QUARTER(BC_HALF/2)) drv (.BC, .L0_CMD, .LP_PR);

  always #(BC_HALF) BC = ~BC;
  initial begin #2; forever #5 RCLK = ~RCLK; end   // 160 MHz, not phase aligned

  // ---------------- model state ----------------
  edge_mode_e   m_edge = EDGE_LEVEL;
  work_mode_e   m_work = WM_DATA;
  logic [N-1:0] m_mask = '1;
  int           m_lat  = 128;
  logic [7:0]   m_l0id = 0;

  int bcn = 0;                                 // rising BC edges so far
  int last_pulse = -1;                         // edge whose source sample held the last test pulse
  logic [N-1:0] msk_hist [int];                // masked source per edge
  logic [3:0]   bcid_hist [int];

  logic [N-1:0] ev_hits [256];
  logic [3:0]   ev_bcid [256];

  typedef struct { logic [15:0] tag; int n; logic [11:0] w [4]; } pkt_t;
  pkt_t exp_pkts [int][$];                     // key {typ, l0id}
  int n_expected = 0;

  // mechanism counters
  int n_l0, n_pr, n_lp, n_wr, n_rd, n_split, n_empty, n_bp, n_prio, n_masked;
  int n_edge [4], n_work [4], n_pulse, n_softrst, n_cntrst, n_pkts;

  always @(posedge BC) begin
    logic [N-1:0] src;
    bcn++;
    bcid_hist[bcn] = dut.u_top.bcid;
    unique case (m_work)
      WM_DATA:  src = stripdata;
      WM_BCID:  src = {(N/4){dut.u_top.bcid}};
      WM_MASK:  src = m_mask;
      WM_PULSE: src = {N{dut.u_cmd.test_pulse}};
    endcase
    if (dut.u_cmd.test_pulse) begin n_pulse++; last_pulse = bcn; end
    if (m_work == WM_DATA && (stripdata & ~m_mask) != '0) n_masked++;
    msk_hist[bcn] = src & m_mask;
    if (dut.u_ro.fifo_full && dut.u_ro.pkt_pending) n_bp++;
    if (dut.u_top.prq_pop && !dut.u_top.lpq_empty) n_prio++;
  end

  function automatic logic [N-1:0] detect(int k);
    logic [N-1:0] a = msk_hist.exists(k-1) ? msk_hist[k-1] : '0;
    logic [N-1:0] b = msk_hist.exists(k)   ? msk_hist[k]   : '0;
    logic [N-1:0] c = msk_hist.exists(k+1) ? msk_hist[k+1] : '0;
    unique case (m_edge)
      EDGE_HIT:   return a | b | c;
      EDGE_LEVEL: return b;
      EDGE_EDGE:  return ~a & b;
      EDGE_CLEAR: return '0;
    endcase
  endfunction

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

  function automatic void expect_event(typ_e typ, logic [7:0] id);
    cluster_t c [$];
    pkt_t p;
    ref_clusters(ev_hits[id], c);
    if (c.size() > 4) n_split++;
    if (c[0] == NO_CLUSTER) n_empty++;
    for (int i = 0; i < c.size(); i += 4) begin
      p.tag = {typ, id, ev_bcid[id]};
      p.n = (c.size() - i > 4) ? 4 : c.size() - i;
      for (int k = 0; k < p.n; k++) p.w[k] = c[i+k];
      exp_pkts[{typ, id}].push_back(p);
      n_expected++;
    end
  endfunction

  // ---------------- register commands ----------------
  function automatic logic [31:0] reg_value(logic [7:0] a);
    if (a == ADDR_CFG) return {28'b0, m_work, m_edge};
    if (a == ADDR_LAT) return 32'(m_lat);
    if (a >= ADDR_MASK && a < ADDR_MASK + 8) return m_mask[(a - ADDR_MASK)*32 +: 32];
    return '0;
  endfunction

  task automatic wait_cmd_done();
    while (drv.cmd_q.size() != 0) @(posedge BC);
    repeat (4) @(posedge BC);
  endtask

  task automatic reg_write(logic [7:0] a, logic [31:0] d);
    drv.send_cmd(OP_WRITE, ($urandom_range(0, 1) ? MY_ID : CHIPID_BROADCAST), a, d);
    // a frame for another chip in between must be ignored
    drv.send_cmd(OP_WRITE, MY_ID ^ 4'h1, a, ~d);
    wait_cmd_done();
    n_wr++;
  endtask

  task automatic reg_read(logic [7:0] a);
    pkt_t p;
    p.tag = {TYP_REG, a, 4'h0};
    p.n = 3;
    {p.w[0], p.w[1], p.w[2]} = {4'b0, reg_value(a)};
    exp_pkts[{TYP_REG, a}].push_back(p);
    n_expected++;
    drv.send_cmd(OP_READ, MY_ID, a, '0);
    wait_cmd_done();
    n_rd++;
  endtask

  // new_mask: 0 keep, 1 most strips on, 2 few strips on (for the test modes,
  // whose events would otherwise hold a hit on nearly every strip), 3 the
  // complement of the current mask
  task automatic configure(edge_mode_e e, work_mode_e w, int lat, int new_mask);
    if (new_mask != 0) begin
      for (int k = 0; k < 8; k++) begin
        logic [31:0] v = (new_mask == 1) ? ($urandom | $urandom | $urandom) :
                         (new_mask == 2) ? ($urandom & $urandom & $urandom) : ~m_mask[k*32 +: 32];
        reg_write(ADDR_MASK + 8'(k), v);
        m_mask[k*32 +: 32] = v;
      end
    end
    reg_write(ADDR_LAT, 32'(lat));
    m_lat = lat;
    reg_write(ADDR_CFG, {28'b0, w, e});
    m_edge = e; m_work = w;
    reg_read(ADDR_CFG);
    reg_read(ADDR_LAT);
    reg_read(ADDR_MASK + 8'($urandom_range(0, 7)));
    repeat (lat + 10) @(posedge BC);          // the pipeline now holds only new-configuration BCs
  endtask

  // ---------------- strip hits ----------------
  always @(negedge BC) begin
    automatic logic [N-1:0] v = '0;
    automatic int n = ($urandom_range(0, 49) == 0) ? $urandom_range(10, 25) : $urandom_range(0, 5);
    if (TEST != 0) n = $urandom_range(0, 5);
    for (int i = 0; i < n; i++) begin
      automatic int s = $urandom_range(0, N-1);
      v[s] = 1'b1;
      if (TEST == 0 && $urandom_range(0, 2) == 0 && s < N-1) v[s+1] = 1'b1;
    end
    stripdata = v;
  end

  // ---------------- triggers ----------------
  typedef struct { int due; typ_e typ; logic [7:0] id; } req_t;
  req_t reqs [$];
  bit   trig_on = 0;

  // Count of successes in 20*mean trials of probability 1/20: a binomial
  // draw close to a Poisson distribution of the given mean.
  function automatic int poisson(int mean);
    int s = 0;
    for (int i = 0; i < 20*mean; i++) if ($urandom_range(0, 19) == 0) s++;
    return (s < 1) ? 1 : s;
  endfunction

  int next_l0 = 0;                             // BC of the next L0 (workload tests)
  longint lat_sum = 0;                         // request delays after their L0 (workload tests)
  int n_req_sent = 0, first_l0 = -1, last_l0 = 0;
  int l0_bc [256];

  function automatic int poisson_like(int mean, int spread);
    int s = 0;
    for (int i = 0; i < 4; i++) s += $urandom_range(0, spread);
    return mean - 2*spread + s;
  endfunction

  // L0 decision at each falling edge after rising edge e: the driver presents
  // it for the falling edge of BC e+1, and the L0Buffer then takes the word
  // whose middle input-register sample was taken at edge e - latency.
  always @(negedge BC) begin
    automatic bit fire = 1'b0;
    if (trig_on && drv.l0_q.size() == 0)
      fire = (TEST == 0) ? ($urandom_range(0, 39) == 0) : (bcn >= next_l0);
    if (fire) begin
      automatic int k = bcn - m_lat;
      ev_hits[m_l0id] = detect(k);
      ev_bcid[m_l0id] = bcid_hist.exists(k) ? bcid_hist[k] : 4'h0;
      drv.send_l0(0);
      n_l0++;
      n_edge[m_edge]++;
      n_work[m_work]++;
      if (TEST == 0) begin
        if ($urandom_range(0, 9) == 0)
          reqs.push_back('{due: bcn + poisson_like(480, 25), typ: TYP_PR, id: m_l0id});
        else if ($urandom_range(0, 9) != 0)
          reqs.push_back('{due: bcn + poisson_like(480, 25), typ: TYP_LP, id: m_l0id});
      end else begin
        // every event is read by LP, one in ten also by PR
        next_l0 = bcn + poisson(40);
        if (first_l0 < 0) first_l0 = bcn;
        last_l0 = bcn;
        l0_bc[m_l0id] = bcn;
        reqs.push_back('{due: bcn + poisson(480), typ: TYP_LP, id: m_l0id});
        if ($urandom_range(0, 9) == 0)
          reqs.push_back('{due: bcn + poisson(480), typ: TYP_PR, id: m_l0id});
      end
      m_l0id++;
    end
  end

  // Requests whose time has come go out on their stream when it is free.
  always @(negedge BC) begin
    for (int i = 0; i < reqs.size(); i++) begin
      if (reqs[i].due <= bcn) begin
        if (reqs[i].typ == TYP_PR && drv.pr_q.size() == 0) begin
          expect_event(TYP_PR, reqs[i].id); drv.send_pr(reqs[i].id); n_pr++;
          lat_sum += bcn - l0_bc[reqs[i].id]; n_req_sent++;
          reqs.delete(i); break;
        end
        if (reqs[i].typ == TYP_LP && drv.lp_q.size() == 0) begin
          expect_event(TYP_LP, reqs[i].id); drv.send_lp(reqs[i].id); n_lp++;
          lat_sum += bcn - l0_bc[reqs[i].id]; n_req_sent++;
          reqs.delete(i); break;
        end
      end
    end
  end

  // ---------------- serial receiver ----------------
  task automatic rx_bits(input int n, output logic [31:0] v);
    v = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge RCLK); #1;
      v = {v[30:0], DataOut};
    end
  endtask

  initial begin : receiver
    logic [31:0] v;
    logic [2:0] start;
    logic [15:0] tag;
    logic [11:0] w [4];
    int n;
    pkt_t e;
    forever begin
      do begin @(posedge RCLK); #1; end while (DataOut == 1'b0);
      rx_bits(2, v); start = {1'b1, v[1:0]};
      rx_bits(16, v); tag = v[15:0];
      n = 0;
      if (tag[15:12] == TYP_REG) begin
        for (int k = 0; k < 3; k++) begin rx_bits(12, v); w[k] = v[11:0]; end
        n = 3;
      end else begin
        do begin rx_bits(12, v); w[n] = v[11:0]; n++; end while (n < 4 && !w[n-1][11]);
      end
      rx_bits(1, v);
      n_pkts++;
      checks++;
      if (start != START_BITS || v[0] != TRAILER) failures++;
      checks++;
      if (!exp_pkts.exists(tag[15:4]) || exp_pkts[tag[15:4]].size() == 0) begin
        failures++;
        $display("unexpected packet %h", tag);
        continue;
      end
      e = exp_pkts[tag[15:4]].pop_front();
      n_expected--;
      if (e.tag !== tag || e.n != n) begin
        failures++;
        if (failures < 6) $display("packet %h: got %0d words, expected tag %h and %0d words", tag, n, e.tag, e.n);
        continue;
      end
      for (int k = 0; k < n; k++) begin
        checks++;
        if (w[k] !== e.w[k]) begin
          failures++;
          if (failures < 6) $display("packet %h word %0d: got %h expected %h", tag, k, w[k], e.w[k]);
        end
      end
    end
  end

  // ---------------- phases ----------------
  task automatic run_triggers(int n_events);
    int target = n_l0 + n_events;
    trig_on = 1;
    while (n_l0 < target) @(posedge BC);
    trig_on = 0;
    while (reqs.size() != 0 || drv.busy()) @(posedge BC);
    for (int t = 0; t < 20000 && n_expected != 0; t++) @(posedge BC);
    repeat (50) @(posedge BC);
    checks++;
    if (n_expected != 0) begin
      failures++;
      $display("%0d packets missing at the end of a phase", n_expected);
      foreach (exp_pkts[k]) if (exp_pkts[k].size()) $display("  key %h: %0d packets, first tag %h", k, exp_pkts[k].size(), exp_pkts[k][0].tag);
    end
  endtask

  task automatic counter_reset(cmd_op_e op);
    drv.send_cmd(op, MY_ID, '0, '0);
    wait_cmd_done();
    m_l0id = 0;
    if (op == OP_SOFTRST) n_softrst++; else n_cntrst++;
    repeat (m_lat + 10) @(posedge BC);
  endtask

  // ---------------- channel coverage (workload tests) ----------------
  // Which of the 256 channels were seen hit: at the input register output
  // per edge mode (InReg_out_cov), at the masked input, passed by its mask
  // bit (maskbits_cov) or blocked, and in the events the EvtBuffer hands to
  // the cluster finder (buf_out_cov).
  bit InReg_out_cov [4][N];
  bit maskbits_cov [N], cov_block [N], buf_out_cov [N];
  int mode_bcs [4];                            // BCs run with triggers on, per edge mode

  always @(posedge BC) begin
    if (trig_on) begin
      mode_bcs[m_edge]++;
      for (int i = 0; i < N; i++) begin
        if (dut.u_inreg.hits_out[i]) InReg_out_cov[m_edge][i] = 1'b1;
        if (m_work == WM_DATA && stripdata[i]) begin
          if (m_mask[i]) maskbits_cov[i] = 1'b1; else cov_block[i] = 1'b1;
        end
      end
    end
    if (dut.u_cf.in_valid && dut.u_cf.in_ready)
      for (int i = 0; i < N; i++) if (dut.u_cf.in_hits[i]) buf_out_cov[i] = 1'b1;
  end

  task automatic check_cover(string what, bit c [N], bit want);
    int missing = 0;
    for (int i = 0; i < N; i++) if (c[i] != want) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("%s: %0d of %0d channels never covered", what, missing, N);
    end else $display("%s: all %0d channels covered", what, N);
  endtask

  // ---------------- phases ----------------
  task automatic start_chip();
    repeat (5) @(posedge BC);
    RSTB = 1; powerUpRstb = 1;
    repeat (5) @(posedge BC);
    abcup = 1; @(posedge BC); abcup = 0;
    repeat (140) @(posedge BC);
  endtask

  task automatic full_sweep();
    int n_events = 60;
    int counts [string];
    reg_read(ADDR_LAT);                                    // reset value
    run_triggers(n_events);                                // LEVEL, data, all strips on
    configure(EDGE_EDGE, WM_DATA, 200, 1);  run_triggers(n_events);
    configure(EDGE_HIT, WM_DATA, 300, 0);   run_triggers(n_events);
    configure(EDGE_CLEAR, WM_DATA, 50, 0);  run_triggers(n_events / 4);
    configure(EDGE_LEVEL, WM_BCID, 100, 2); run_triggers(n_events / 2);
    configure(EDGE_LEVEL, WM_MASK, 100, 2); run_triggers(n_events / 4);
    counter_reset(OP_CNTRST);
    configure(EDGE_LEVEL, WM_DATA, 511, 1); run_triggers(n_events);
    counter_reset(OP_SOFTRST);
    // pulse test: an L0 timed to pick the BC of each test pulse
    configure(EDGE_LEVEL, WM_PULSE, 150, 1);
    for (int p = 0; p < 5; p++) begin
      automatic int seen = last_pulse;
      drv.send_cmd(OP_PULSE, MY_ID, '0, '0);
      while (last_pulse == seen) @(negedge BC);
      while (bcn < last_pulse + m_lat) @(negedge BC);
      ev_hits[m_l0id] = detect(bcn - m_lat);
      ev_bcid[m_l0id] = bcid_hist[bcn - m_lat];
      checks++;
      if (ev_hits[m_l0id] != m_mask) begin failures++; $display("test pulse event is not the mask"); end
      drv.send_l0(0); n_l0++; n_work[WM_PULSE]++; n_edge[EDGE_LEVEL]++;
      reqs.push_back('{due: bcn + 20, typ: TYP_PR, id: m_l0id});
      m_l0id++;
      repeat (200) @(posedge BC);
    end
    run_triggers(0);
    // every mechanism must have happened
    counts["L0"] = n_l0; counts["PR"] = n_pr; counts["LP"] = n_lp;
    counts["register write"] = n_wr; counts["register read"] = n_rd;
    counts["masked hit"] = n_masked; counts["event over 4 clusters"] = n_split;
    counts["event without clusters"] = n_empty; counts["readout back-pressure"] = n_bp;
    counts["PR ahead of LP"] = n_prio; counts["test pulse"] = n_pulse;
    counts["soft reset"] = n_softrst; counts["counter reset"] = n_cntrst;
    counts["HIT mode"] = n_edge[EDGE_HIT]; counts["LEVEL mode"] = n_edge[EDGE_LEVEL];
    counts["EDGE mode"] = n_edge[EDGE_EDGE]; counts["CLEAR mode"] = n_edge[EDGE_CLEAR];
    counts["BCID test mode"] = n_work[WM_BCID]; counts["mask test mode"] = n_work[WM_MASK];
    counts["pulse test mode"] = n_work[WM_PULSE];
    foreach (counts[s]) begin
      checks++;
      $display("%-24s %0d", s, counts[s]);
      if (counts[s] == 0) begin failures++; $display("  never happened"); end
    end
  endtask

  // Edge detection workload: the three counting modes in turn, each for a
  // long run, with fewer than six hit strips per BC: two rounds of LEVEL for
  // 250 events, HIT for 125 and EDGE for 125, 1000 L0s in all.
  task automatic edge_modes();
    edge_mode_e order [3] = '{EDGE_LEVEL, EDGE_HIT, EDGE_EDGE};
    int events [3] = '{250, 125, 125};
    for (int r = 0; r < 2; r++)
      for (int m = 0; m < 3; m++) begin
        configure(order[m], WM_DATA, 128, 0);
        run_triggers(events[m]);
      end
    $display("BCs per mode: LEVEL %0d, HIT %0d, EDGE %0d",
             mode_bcs[EDGE_LEVEL], mode_bcs[EDGE_HIT], mode_bcs[EDGE_EDGE]);
    checks++;
    if (mode_bcs[EDGE_LEVEL] < 18000 || mode_bcs[EDGE_HIT] < 9000 || mode_bcs[EDGE_EDGE] < 9000) begin
      failures++; $display("a mode ran too short");
    end
    check_cover("input register output, HIT mode", InReg_out_cov[EDGE_HIT], 1'b1);
    check_cover("input register output, LEVEL mode", InReg_out_cov[EDGE_LEVEL], 1'b1);
    check_cover("input register output, EDGE mode", InReg_out_cov[EDGE_EDGE], 1'b1);
    check_cover("events read from the EvtBuffer", buf_out_cov, 1'b1);
  endtask

  // Mask workload: new mask bits written by command between runs, a random
  // mostly-on set followed by its complement, so that every channel must be
  // seen both passed and blocked.
  task automatic mask_bits();
    for (int r = 0; r < 8; r++) begin
      configure(EDGE_LEVEL, WM_DATA, 128, (r % 2 == 0) ? 1 : 3);
      run_triggers(100);
    end
    check_cover("hits passed by the mask", maskbits_cov, 1'b1);
    check_cover("hits blocked by the mask", cov_block, 1'b1);
  endtask

  // Trigger mix workload: L0 intervals of mean 40 BCs, LP for every event
  // and PR for one in ten, each after a delay of mean 480 BCs.
  task automatic trigger_mix();
    real l0_mean, req_mean;
    run_triggers(8800);
    l0_mean = real'(last_l0 - first_l0) / real'(n_l0 - 1);
    req_mean = real'(lat_sum) / real'(n_req_sent);
    $display("L0 %0d, LP %0d, PR %0d; mean L0 interval %.1f BCs, mean request delay %.1f BCs",
             n_l0, n_lp, n_pr, l0_mean, req_mean);
    checks++;
    if (l0_mean < 38.0 || l0_mean > 43.0) begin failures++; $display("L0 interval off its mean"); end
    checks++;
    if (req_mean < 470.0 || req_mean > 500.0) begin failures++; $display("request delay off its mean"); end
    checks++;
    if (n_lp != n_l0 || n_pr < n_l0 / 20 || n_pr > n_l0 / 5) begin failures++; $display("request counts wrong"); end
    check_cover("events read from the EvtBuffer", buf_out_cov, 1'b1);
  endtask

  initial begin
    start_chip();
    unique case (TEST)
      1:       edge_modes();
      2:       mask_bits();
      3:       trigger_mix();
      default: full_sweep();
    endcase
    checks++;
    if (dropped_requests != 0) begin failures++; $display("%0d requests dropped", dropped_requests); end
    $display("packets received %0d", n_pkts);
    done = 1'b1;
  end
endmodule
