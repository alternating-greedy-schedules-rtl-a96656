// tb_ags_dot_unit: end-to-end test of the AGS dot-product unit at its default
// parameters (8 lanes, 5-bit weights, 7-bit activations, 12-bit accumulator,
// lists for 4608-term dot products).
//
// A stream of dot products with N:M-style sparse weights is sent through the
// valid/ready input with random gaps, back to back. Lengths cover the shapes of
// the evaluated networks: 9 (3x3 depthwise), 64..960 (1x1 convolutions), 1280
// (classifier) and 4608 (3x3x512). For each result the test bench checks:
//   * the sum against exact integer arithmetic when it fits the accumulator,
//     and out_clipped (with the result in range) when it does not;
//   * out_used_ags against a model of the fast path (chunk sums added to a
//     12-bit running sum until one would leave the range);
//   * timing: a fast-path result comes one cycle after the last chunk, and an
//     AGS result exactly (nonzero products from the overflowing chunk on) +
//     (engine wait cycles) + 3 cycles after the overflowing chunk, i.e. one add
//     per cycle;
//   * that the fast path never refuses input (8 products per cycle).
// It also counts how often each mechanism occurred (fast-only dot products, the
// switch to AGS, P->N and N->P list changes, engine waits, input back-pressure,
// clipping of a persistent overflow) and fails if one never did.
module tb_ags_dot_unit;
  import ags_pkg::*;
  localparam int HI = (1 <<< (ACC_W - 1)) - 1;
  localparam int LO = -(1 <<< (ACC_W - 1));
  localparam int N_DOTS = 60;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic signed [W_W-1:0] in_w [LANES];
  logic signed [A_W-1:0] in_x [LANES];
  logic out_valid, out_used_ags, out_clipped;
  logic signed [ACC_W-1:0] out_sum;
  logic ags_busy, ags_step, ags_step_neg, ags_stall;
  logic [$clog2(MAX_K + 1):0] ags_backlog;

  ags_dot_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int  total;       // exact sum
    bit  fits;        // total within the accumulator range
    bit  use_ags;     // fast path model overflows
    int  ovf_chunk;   // first overflowing chunk
    int  nnz_rem;     // nonzero products from that chunk on
    int  nchunks;
  } exp_t;

  // chunk stream
  logic signed [W_W-1:0] cw [$][LANES];
  logic signed [A_W-1:0] cx [$][LANES];
  bit   clast [$];
  exp_t expq [$];

  int checks = 0, failures = 0;
  int n_fast = 0, n_ags = 0, n_pn = 0, n_np = 0, n_stall = 0, n_bp = 0, n_clip = 0;
  int n_done = 0, n_fast_refuse = 0;
  longint cyc = 0;

  // per dot product bookkeeping in the monitor
  int     chunk_idx = 0;
  longint ovf_accept_cyc = 0, last_accept_cyc = 0;
  int     stall_since_ovf = 0;
  bit     prev_step_neg = 0, have_prev_step = 0;

  task automatic make_dot(input int k, input int wmax, input int dens);
    exp_t e;
    int nch, acc, s, cs;
    logic signed [W_W-1:0] w [LANES];
    logic signed [A_W-1:0] x [LANES];
    int prods[$];
    nch = (k + int'(LANES) - 1) / int'(LANES);
    e.total = 0; e.use_ags = 0; e.ovf_chunk = -1; e.nnz_rem = 0; e.nchunks = nch;
    acc = 0;
    for (int c = 0; c < nch; c++) begin
      cs = 0;
      for (int l = 0; l < int'(LANES); l++) begin
        int wi, xi;
        wi = 0;
        xi = int'($urandom_range(0, 127)) - 64;
        if (c * int'(LANES) + l < k && int'($urandom_range(0, 99)) < dens)
          wi = int'($urandom_range(0, 2 * wmax)) - wmax;
        w[l] = W_W'(wi);
        x[l] = A_W'(xi);
        prods.push_back(wi * xi);
        cs += wi * xi;
      end
      cw.push_back(w);
      cx.push_back(x);
      clast.push_back(c == nch - 1);
      if (!e.use_ags) begin
        s = acc + cs;
        if (s > HI || s < LO) begin
          e.use_ags = 1;
          e.ovf_chunk = c;
        end else acc = s;
      end
      e.total += cs;
    end
    if (e.use_ags)
      for (int i = e.ovf_chunk * int'(LANES); i < prods.size(); i++)
        if (prods[i] != 0) e.nnz_rem++;
    e.fits = (e.total <= HI) && (e.total >= LO);
    expq.push_back(e);
  endtask

  // driver: present chunks with random gaps; a chunk stays until accepted
  bit acc_flag = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && acc_flag) begin
        void'(cw.pop_front()); void'(cx.pop_front()); void'(clast.pop_front());
      end
      if (!in_valid || acc_flag) begin
        if (cw.size() > 0 && $urandom_range(0, 9) < 8) begin
          in_valid = 1;
          in_w = cw[0];
          in_x = cx[0];
          in_last = clast[0];
        end else begin
          in_valid = 0;
          in_last = 0;
        end
      end
      acc_flag = 0;
    end
  end

  // monitor
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      acc_flag = in_valid && in_ready;
      if (in_valid && !in_ready) n_bp++;
      if (in_valid && in_ready) begin
        if (expq.size() > 0 && expq[0].use_ags && chunk_idx == expq[0].ovf_chunk) begin
          ovf_accept_cyc = cyc;
          stall_since_ovf = 0;
        end
        if (in_last) begin
          last_accept_cyc = cyc;
          chunk_idx = 0;
        end else chunk_idx++;
      end
      if (in_valid && !in_ready && !ags_busy && !dut.u_engine.done) n_fast_refuse++;
      if (ags_stall) begin n_stall++; stall_since_ovf++; end
      if (ags_step) begin
        if (have_prev_step && prev_step_neg != ags_step_neg) begin
          if (ags_step_neg) n_pn++; else n_np++;
        end
        prev_step_neg = ags_step_neg;
        have_prev_step = 1;
      end
      if (out_valid) begin
        exp_t e;
        longint lat;
        have_prev_step = 0;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected result");
        end else begin
          e = expq.pop_front();
          n_done++;
          checks++;
          if (out_used_ags != e.use_ags) begin
            failures++;
            $display("dot %0d: used_ags %0b expected %0b", n_done, out_used_ags, e.use_ags);
          end
          checks++;
          if (e.fits) begin
            if (int'(out_sum) != e.total || out_clipped) begin
              failures++;
              $display("dot %0d: sum %0d clipped %0b expected %0d", n_done, out_sum, out_clipped, e.total);
            end
          end else begin
            n_clip++;
            if (!out_clipped) begin
              failures++;
              $display("dot %0d: persistent overflow (sum %0d) not flagged", n_done, e.total);
            end
          end
          checks++;
          if (e.use_ags) begin
            n_ags++;
            lat = cyc - ovf_accept_cyc;
            if (lat != longint'(e.nnz_rem + stall_since_ovf + 3)) begin
              failures++;
              $display("dot %0d: AGS latency %0d, expected %0d adds + %0d waits + 3",
                       n_done, lat, e.nnz_rem, stall_since_ovf);
            end
          end else begin
            n_fast++;
            lat = cyc - last_accept_cyc;
            if (lat != 1) begin
              failures++;
              $display("dot %0d: fast-path latency %0d, expected 1", n_done, lat);
            end
          end
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ks[6] = '{9, 64, 320, 960, 1280, 4608};
    for (int l = 0; l < int'(LANES); l++) begin in_w[l] = '0; in_x[l] = '0; end
    for (int i = 0; i < N_DOTS; i++) begin
      int k, wmax, dens;
      k = ks[i % 6];
      case ((i / 6) % 5)
        0: begin wmax = 15; dens = 20; end   // 80% sparse, full-range weights
        1: begin wmax = 3;  dens = 10; end   // 90% sparse, small weights
        2: begin wmax = 1;  dens = 5;  end   // 95% sparse
        3: begin wmax = 2;  dens = 15; end
        default: begin wmax = 8; dens = 10; end
      endcase
      if (k == 9) begin wmax = 15; dens = 100; end
      make_dot(k, wmax, dens);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_done == N_DOTS);
    repeat (3) @(negedge clk);
    checks++;
    if (n_fast_refuse != 0) begin failures++; $display("fast path refused input %0d times", n_fast_refuse); end
    checks++;
    if (n_fast == 0 || n_ags == 0 || n_pn == 0 || n_np == 0 || n_stall == 0 || n_bp == 0 || n_clip == 0) begin
      failures++;
      $display("mechanism never exercised");
    end
    $display("dot products %0d: fast path only %0d, AGS %0d (clipped %0d); list changes P->N %0d N->P %0d; engine waits %0d; back-pressure cycles %0d",
             n_done, n_fast, n_ags, n_clip, n_pn, n_np, n_stall, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
