// ags_engine: sequential Alternating Greedy Schedule (AGS) summation.
//
// Sums the entries of a positive list P and a negative list N into a narrow
// accumulator z without a transient overflow. It adds from P while z + P[head]
// stays <= ACC_MAX; when the next positive would overflow (or P is used up) it
// turns to N and adds while z + N[head] stays >= ACC_MIN; then back to P, and so
// on until both lists are used up. While adding positives only a positive can
// overflow z and vice versa, so z never leaves [ACC_MIN, ACC_MAX] as long as the
// final sum fits (no persistent overflow).
//
// Timing: start loads z with z0 (the running sum so far) and begins in the P
// list. Each following cycle performs at most one add. Turning to the other list
// costs no cycle: when the head of the current list does not fit, the head of
// the other list is examined and added in the same cycle. The lists may still be
// filling while the engine runs: a list only counts as used up when it is empty
// and inputs_done is set; an empty list that may still grow makes the engine
// wait (stall). This keeps the order of adds exactly that of the sequential
// algorithm run on the complete lists. When both lists are used up, done pulses
// for one cycle and result holds the sum. Reset is synchronous and active low.
//
// Persistent overflow: the algorithm assumes the final sum fits. If it does not,
// at some point no head can be added without overflow while the other list
// cannot help; the engine then adds the current head with saturation to
// ACC_MAX/ACC_MIN and sets clipped, so it always terminates. The same happens if
// both heads are blocked at once, which is impossible when every partial product
// fits the accumulator range (PP_W <= ACC_W). This clipping rule is this design's
// choice; the rest follows the algorithm.
module ags_engine #(
  parameter int unsigned PP_W    = ags_pkg::PP_W,
  parameter int unsigned ACC_W   = ags_pkg::ACC_W,
  parameter int          ACC_MAX = ags_pkg::acc_max(ACC_W),
  parameter int          ACC_MIN = ags_pkg::acc_min(ACC_W),
  localparam int unsigned EW     = ((PP_W > ACC_W) ? PP_W : ACC_W) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,       // load z0, begin (ignored while busy)
  input  logic signed [ACC_W-1:0] z0,
  input  logic signed [PP_W-1:0]  p_head,      // oldest unused positive
  input  logic                    p_empty,
  input  logic signed [PP_W-1:0]  n_head,      // oldest unused negative
  input  logic                    n_empty,
  input  logic                    inputs_done, // no more entries will arrive
  output logic                    pop_p,
  output logic                    pop_n,
  output logic                    busy,
  output logic                    done,        // one-cycle pulse, result valid
  output logic signed [ACC_W-1:0] result,
  output logic                    clipped,     // a persistent overflow was clipped
  // observation of each cycle's action
  output logic                    step_valid,  // an add happens this cycle
  output logic                    step_neg,    // ... from the N list
  output logic signed [PP_W-1:0]  step_val,    // ... of this value
  output logic                    stall,       // busy, no add, not finishing
  output logic                    in_neg_list  // currently adding from N
);
  logic signed [ACC_W-1:0] z;
  logic                    neg_mode;

  logic signed [EW-1:0] p_sum, n_sum;
  logic p_fits, n_fits, p_avail, n_avail, p_fin, n_fin;
  logic cur_avail, cur_fits, cur_fin, oth_avail, oth_fits, oth_fin;
  logic take_cur, take_oth, sat, flip, finish;
  logic signed [PP_W-1:0] cur_head, oth_head;

  always_comb begin
    p_sum   = EW'(z) + EW'(p_head);
    n_sum   = EW'(z) + EW'(n_head);
    p_fits  = (p_sum <= EW'(ACC_MAX));
    n_fits  = (n_sum >= EW'(ACC_MIN));
    p_avail = !p_empty;
    n_avail = !n_empty;
    p_fin   = p_empty && inputs_done;
    n_fin   = n_empty && inputs_done;

    cur_avail = neg_mode ? n_avail : p_avail;
    cur_fits  = neg_mode ? n_fits  : p_fits;
    cur_fin   = neg_mode ? n_fin   : p_fin;
    cur_head  = neg_mode ? n_head  : p_head;
    oth_avail = neg_mode ? p_avail : n_avail;
    oth_fits  = neg_mode ? p_fits  : n_fits;
    oth_fin   = neg_mode ? p_fin   : n_fin;
    oth_head  = neg_mode ? p_head  : n_head;

    take_cur = 1'b0;
    take_oth = 1'b0;
    sat      = 1'b0;
    flip     = 1'b0;
    finish   = 1'b0;
    if (busy) begin
      if (cur_avail && cur_fits) begin
        take_cur = 1'b1;                      // greedy: keep the same sign
      end else if (cur_fin && oth_fin) begin
        finish = 1'b1;                        // both lists used up
      end else if (cur_fin) begin
        flip = 1'b1;                          // current list used up
        if (oth_avail) begin
          take_oth = 1'b1;
          sat      = !oth_fits;               // persistent overflow
        end
      end else if (cur_avail) begin           // next value would overflow
        if (oth_avail && oth_fits) begin
          flip     = 1'b1;
          take_oth = 1'b1;
        end else if (oth_avail || oth_fin) begin
          take_cur = 1'b1;                    // no way round: clip
          sat      = 1'b1;
        end else begin
          flip = 1'b1;                        // wait for the other list
        end
      end
      // else: current list empty but still filling: wait
    end

    pop_p       = (take_cur && !neg_mode) || (take_oth && neg_mode);
    pop_n       = (take_cur && neg_mode) || (take_oth && !neg_mode);
    step_valid  = take_cur || take_oth;
    step_neg    = pop_n;
    step_val    = take_cur ? cur_head : oth_head;
    stall       = busy && !step_valid && !finish;
    in_neg_list = neg_mode;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z        <= '0;
      neg_mode <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      clipped  <= 1'b0;
    end else begin
      done <= finish;
      if (!busy) begin
        if (start) begin
          z        <= z0;
          neg_mode <= 1'b0;
          busy     <= 1'b1;
          clipped  <= 1'b0;
        end
      end else begin
        if (flip) neg_mode <= !neg_mode;
        if (finish) busy <= 1'b0;
        if (step_valid) begin
          if (!sat) begin
            z <= step_neg ? ACC_W'(n_sum) : ACC_W'(p_sum);
          end else begin
            z       <= step_neg ? ACC_W'(ACC_MIN) : ACC_W'(ACC_MAX);
            clipped <= 1'b1;
          end
        end
      end
    end
  end

  assign result = z;

  // z must stay within the accumulator range at all times.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (int'(z) <= ACC_MAX) && (int'(z) >= ACC_MIN));
endmodule
