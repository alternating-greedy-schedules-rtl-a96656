// tb_ags_latency: cycle cost of AGS against accumulator width, on a layer-like
// workload.
//
// The same 64 sparse dot products (32 of length 960 and 32 of length 320, the
// shapes of 1x1 convolutions in a MobileNetV2-style network, 90 % zero weights of magnitude up to 7,
// 5-bit weights, 7-bit activations) are streamed at full rate into four copies of
// the unit with 12-, 13-, 14- and 16-bit accumulators. Each copy's results are
// checked against exact integer sums (where the sum fits that width). The total
// cycle counts are compared with the 8-MAC/cycle baseline (one cycle per chunk):
// a narrower accumulator overflows earlier and more often, so its cycle count
// must not be lower than that of a wider one, and none may beat the baseline.
module tb_ags_latency;
  import ags_pkg::*;
  localparam int NW = 4;
  localparam int WIDTHS[NW] = '{12, 13, 14, 16};
  localparam int N_DOTS = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [W_W-1:0] cw [$][LANES];
  logic signed [A_W-1:0] cx [$][LANES];
  bit   clast [$];
  int   totals [$];
  longint n_chunks = 0;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint finish_cyc [NW] = '{default: 0};
  int     n_ags [NW] = '{default: 0};
  int     n_res [NW] = '{default: 0};

  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < NW; g++) begin : g_unit
    localparam int AW = WIDTHS[g];
    logic in_valid, in_ready, in_last;
    logic signed [W_W-1:0] in_w [LANES];
    logic signed [A_W-1:0] in_x [LANES];
    logic out_valid, out_used_ags, out_clipped;
    logic signed [AW-1:0] out_sum;
    logic busy, step, step_neg, stall;
    logic [$clog2(MAX_K + 1):0] backlog;
    int idx = 0;

    ags_dot_unit #(.ACC_W(AW)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_w(in_w), .in_x(in_x), .in_last(in_last), .out_valid(out_valid),
      .out_sum(out_sum), .out_used_ags(out_used_ags), .out_clipped(out_clipped),
      .ags_busy(busy), .ags_step(step), .ags_step_neg(step_neg), .ags_stall(stall),
      .ags_backlog(backlog));

    // full-rate driver: present chunk idx; advance when accepted
    always_comb begin
      in_valid = rst_n && (idx < n_chunks);
      for (int l = 0; l < int'(LANES); l++) begin
        in_w[l] = (idx < n_chunks) ? cw[idx][l] : '0;
        in_x[l] = (idx < n_chunks) ? cx[idx][l] : '0;
      end
      in_last = (idx < n_chunks) ? clast[idx] : 1'b0;
    end

    always @(posedge clk) begin
      if (in_valid && in_ready) idx <= idx + 1;
      if (rst_n && out_valid) begin
        int t, hi;
        t = totals[n_res[g]];
        hi = (1 <<< (AW - 1)) - 1;
        if (out_used_ags) n_ags[g]++;
        if (t <= hi && t >= -hi - 1) begin
          checks++;
          if (int'(out_sum) != t || out_clipped) begin
            failures++;
            $display("%0d-bit: dot %0d gave %0d, expected %0d", AW, n_res[g], out_sum, t);
          end
        end
        n_res[g]++;
        if (n_res[g] == N_DOTS) finish_cyc[g] = cyc;
      end
    end
  end

  task automatic make_dot(input int k);
    int nch, tot;
    logic signed [W_W-1:0] w [LANES];
    logic signed [A_W-1:0] x [LANES];
    nch = (k + int'(LANES) - 1) / int'(LANES);
    tot = 0;
    for (int c = 0; c < nch; c++) begin
      for (int l = 0; l < int'(LANES); l++) begin
        int wi, xi;
        wi = 0;
        xi = int'($urandom_range(0, 127)) - 64;
        if (c * int'(LANES) + l < k && $urandom_range(0, 9) == 0)
          wi = int'($urandom_range(0, 14)) - 7;
        w[l] = W_W'(wi);
        x[l] = A_W'(xi);
        tot += wi * xi;
      end
      cw.push_back(w);
      cx.push_back(x);
      clast.push_back(c == nch - 1);
    end
    totals.push_back(tot);
    n_chunks += nch;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint start_cyc;
    for (int i = 0; i < N_DOTS; i++) make_dot((i % 2 == 0) ? 960 : 320);
    repeat (3) @(negedge clk);
    rst_n = 1;
    start_cyc = cyc;
    wait (n_res[0] == N_DOTS && n_res[1] == N_DOTS && n_res[2] == N_DOTS && n_res[3] == N_DOTS);
    @(negedge clk);
    $display("baseline (8 MAC/cycle): %0d cycles", n_chunks);
    for (int g = 0; g < NW; g++) begin
      longint c;
      c = finish_cyc[g] - start_cyc;
      $display("%0d-bit accumulator: %0d cycles (%0d.%02dx baseline), %0d of %0d dot products used AGS",
               WIDTHS[g], c, c / n_chunks, (c * 100 / n_chunks) % 100, n_ags[g], N_DOTS);
      checks++;
      if (c < n_chunks) begin failures++; $display("faster than the baseline"); end
      if (g > 0) begin
        checks++;
        if (c > finish_cyc[g-1] - start_cyc) begin
          failures++;
          $display("%0d-bit slower than %0d-bit", WIDTHS[g], WIDTHS[g-1]);
        end
      end
    end
    checks++;
    if (n_ags[0] == 0) begin failures++; $display("AGS never used at 12 bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
