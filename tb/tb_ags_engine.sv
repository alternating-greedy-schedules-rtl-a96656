// tb_ags_engine: checks the AGS engine against an independent model of the
// alternating greedy algorithm.
//
// Two engines run side by side. Engine 0 has the narrow range [-10, 10] and sums
// the 20-value worked example whose reordered sum is
//   (7) - (5+9) + (4+6) - (4+4+3) + (9+6) - (4+7) + (4+7+2) - (7+2+3) + (8+5) = 10;
// the exact order of adds, the result and the cycle count (one add per cycle)
// are checked. Engine 1 has the default 12-bit range and sums random lists whose
// entries arrive over time (so the engine must wait), checking the order of adds
// and the result against the model, and that a final sum out of range ends with
// clipped set. The test bench keeps the P and N lists as queues and drives the
// list heads with non-blocking assignments, like a registered buffer.
module tb_ags_engine;
  localparam int unsigned PP_W = ags_pkg::PP_W;
  localparam int unsigned ACC_W = ags_pkg::ACC_W;

  logic clk = 0, rst_n = 0;
  logic start [2];
  logic signed [ACC_W-1:0] z0 [2];
  logic signed [PP_W-1:0] p_head [2], n_head [2], step_val [2];
  logic p_empty [2], n_empty [2], inputs_done [2];
  logic pop_p [2], pop_n [2], busy [2], done [2], clipped [2];
  logic step_valid [2], step_neg [2], stall [2], in_neg [2];
  logic signed [ACC_W-1:0] result [2];

  int checks = 0, failures = 0;
  int n_stall = 0, n_flip = 0, n_clip_runs = 0, n_runs = 0;
  longint cyc = 0;

  ags_engine #(.ACC_MAX(10), .ACC_MIN(-10)) dut0 (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .z0(z0[0]),
    .p_head(p_head[0]), .p_empty(p_empty[0]), .n_head(n_head[0]), .n_empty(n_empty[0]),
    .inputs_done(inputs_done[0]), .pop_p(pop_p[0]), .pop_n(pop_n[0]), .busy(busy[0]),
    .done(done[0]), .result(result[0]), .clipped(clipped[0]), .step_valid(step_valid[0]),
    .step_neg(step_neg[0]), .step_val(step_val[0]), .stall(stall[0]), .in_neg_list(in_neg[0]));
  ags_engine dut1 (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .z0(z0[1]),
    .p_head(p_head[1]), .p_empty(p_empty[1]), .n_head(n_head[1]), .n_empty(n_empty[1]),
    .inputs_done(inputs_done[1]), .pop_p(pop_p[1]), .pop_n(pop_n[1]), .busy(busy[1]),
    .done(done[1]), .result(result[1]), .clipped(clipped[1]), .step_valid(step_valid[1]),
    .step_neg(step_neg[1]), .step_val(step_val[1]), .stall(stall[1]), .in_neg_list(in_neg[1]));

  always #5 clk = ~clk;

  // list model: values waiting to arrive (with arrival cycle), and the two lists
  int     src_val [2][$];
  longint src_at  [2][$];
  int     pq [2][$];
  int     nq [2][$];
  bit     feed_done [2];
  int     got [2][$];       // order of adds seen
  bit     prev_neg [2];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < 2; c++) begin
      if (step_valid[c]) begin
        got[c].push_back(int'(step_val[c]));
        if (got[c].size() > 1 && step_neg[c] != prev_neg[c]) n_flip++;
        prev_neg[c] = step_neg[c];
      end
      if (stall[c]) n_stall++;
      if (pop_p[c]) void'(pq[c].pop_front());
      if (pop_n[c]) void'(nq[c].pop_front());
      while (src_val[c].size() > 0 && src_at[c][0] <= cyc) begin
        int v;
        v = src_val[c].pop_front();
        void'(src_at[c].pop_front());
        if (v > 0) pq[c].push_back(v);
        if (v < 0) nq[c].push_back(v);
      end
      p_empty[c]     <= (pq[c].size() == 0);
      n_empty[c]     <= (nq[c].size() == 0);
      p_head[c]      <= (pq[c].size() > 0) ? PP_W'(pq[c][0]) : '0;
      n_head[c]      <= (nq[c].size() > 0) ? PP_W'(nq[c][0]) : '0;
      inputs_done[c] <= feed_done[c] && (src_val[c].size() == 0);
    end
  end

  // Independent model of the algorithm on the complete list; returns the order.
  function automatic void model(input int x[$], input int z_init, input int hi, input int lo,
                                output int order[$], output int z);
    int p[$], n[$];
    int ip = 0, in_ = 0;
    foreach (x[i]) begin
      if (x[i] > 0) p.push_back(x[i]);
      if (x[i] < 0) n.push_back(x[i]);
    end
    z = z_init;
    order.delete();
    while (ip < p.size() || in_ < n.size()) begin
      while (ip < p.size()) begin
        if (z + p[ip] > hi) break;
        z += p[ip]; order.push_back(p[ip]); ip++;
      end
      while (in_ < n.size()) begin
        if (z + n[in_] < lo) break;
        z += n[in_]; order.push_back(n[in_]); in_++;
      end
    end
  endfunction

  // Run one dot product on engine c. gap: largest random arrival delay step.
  task automatic run(input int c, input int x[$], input int z_init, input int gap,
                     input bit expect_clip, output longint lat);
    longint t0, t;
    int hi = (c == 0) ? 10 : (1 <<< (ACC_W-1)) - 1;
    int lo = (c == 0) ? -10 : -(1 <<< (ACC_W-1));
    int order[$], zm, total = z_init;
    @(negedge clk);
    got[c].delete();
    feed_done[c] = 0;
    t = cyc;
    foreach (x[i]) begin
      t += (gap == 0) ? 0 : $urandom_range(0, gap);
      src_val[c].push_back(x[i]);
      src_at[c].push_back(t);
      total += x[i];
    end
    feed_done[c] = 1;
    if (gap == 0) repeat (2) @(negedge clk);  // lists fully loaded before start
    z0[c] = ACC_W'(z_init);
    start[c] = 1;
    t0 = cyc;
    @(negedge clk);
    start[c] = 0;
    while (!done[c]) begin
      @(negedge clk);
      if (cyc - t0 > 5000) break;
    end
    lat = cyc - t0;
    n_runs++;
    checks++;
    if (!done[c]) begin failures++; $display("engine %0d did not finish", c); return; end
    if (expect_clip) begin
      n_clip_runs++;
      checks++;
      if (!clipped[c]) begin failures++; $display("persistent overflow not flagged (sum %0d)", total); end
      return;
    end
    model(x, z_init, hi, lo, order, zm);
    checks++;
    if (int'(result[c]) != total || zm != total) begin
      failures++;
      $display("engine %0d: result %0d, model %0d, exact %0d", c, result[c], zm, total);
    end
    checks++;
    if (clipped[c]) begin failures++; $display("engine %0d: clipped without overflow", c); end
    checks++;
    if (got[c].size() != order.size()) begin
      failures++;
      $display("engine %0d: %0d adds, model %0d", c, got[c].size(), order.size());
    end else begin
      foreach (order[i]) if (got[c][i] != order[i]) begin
        failures++;
        $display("engine %0d: add %0d was %0d, model %0d", c, i, got[c][i], order[i]);
        break;
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig[$] = '{7, -5, -9, 4, 6, -4, -4, -3, 9, 6, -4, -7, 4, 7, 2, -7, -2, -3, 8, 5};
    int fig_order[$] = '{7, -5, -9, 4, 6, -4, -4, -3, 9, 6, -4, -7, 4, 7, 2, -7, -2, -3, 8, 5};
    longint lat;
    for (int c = 0; c < 2; c++) begin
      start[c] = 0; z0[c] = '0; feed_done[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // worked example, lists complete before the start
    run(0, fig, 0, 0, 0, lat);
    checks++;
    if (int'(result[0]) != 10) begin failures++; $display("worked example gave %0d", result[0]); end
    // the order printed in the worked example: P, N N, P P, N N N, P P, N N,
    // P P P, N N N, P P
    checks++;
    if (got[0] != fig_order) begin failures++; $display("worked example: order of adds differs"); end
    // one add per cycle: 20 adds, then one cycle to see both lists used up and
    // one to register done
    checks++;
    if (lat != 22) begin failures++; $display("worked example took %0d cycles, expected 22", lat); end

    // random lists on the 12-bit engine, arriving over time
    for (int r = 0; r < 300; r++) begin
      int x[$];
      int len;
      int total, z_init;
      bit clip;
      len = $urandom_range(1, 200);
      do begin
        x.delete();
        z_init = $urandom_range(0, 4095) - 2048;
        total = z_init;
        for (int i = 0; i < len; i++) begin
          int v;
          v = int'($urandom_range(0, 2048)) - 1024;   // 5x7-bit product range
          if ($urandom_range(0, 3) == 0) v = 0;
          x.push_back(v);
          total += v;
        end
        clip = (total > 2047) || (total < -2048);
      end while (clip && (r % 10 != 0));
      run(1, x, z_init, (r % 3 == 0) ? 0 : 3, clip, lat);
    end

    checks++;
    if (n_stall == 0 || n_flip == 0 || n_clip_runs == 0) begin
      failures++;
      $display("mechanism not exercised: stall %0d flip %0d clip %0d", n_stall, n_flip, n_clip_runs);
    end
    $display("runs %0d, list switches %0d, stall cycles %0d, clipped runs %0d",
             n_runs, n_flip, n_stall, n_clip_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
