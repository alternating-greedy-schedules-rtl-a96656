// ags_dot_unit: dot-product accumulation unit with a narrow accumulator that
// avoids transient overflow by Alternating Greedy Scheduling (AGS).
//
// A dot product arrives as a stream of chunks of LANES weight/activation pairs,
// one chunk per accepted cycle, the last one marked by in_last (pad a short last
// chunk with zero weights). simd_mul forms the LANES partial products.
//
// Fast path (state FAST): simd_reduce adds the chunk to the ACC_W-bit running
// sum, LANES multiply-accumulates per cycle. As long as the running sum stays in
// range nothing else happens, and the result appears one cycle after the last
// chunk is accepted.
//
// AGS path (state AGS): the first time adding a chunk would push the running sum
// out of range, that chunk is not added. Instead the AGS engine is started with
// the running sum so far, and that chunk and every later chunk of the dot product
// are split by sign (sign_splitter, one chunk per cycle) into the two pp_list
// buffers. The engine adds them one per cycle in alternating greedy order while
// the lists are still filling, so it never overflows unless the final sum itself
// does (then it clips and out_clipped is set). Input is accepted at full rate
// until in_last; the unit then stops accepting (in_ready low) until the engine has
// emptied both lists and the result has been delivered.
//
// Interface: valid/ready on the input (a chunk moves when in_valid && in_ready);
// out_valid is a one-cycle pulse with out_sum, out_used_ags (the AGS path was
// taken) and out_clipped (the final sum did not fit and was saturated). Reset is
// synchronous and active low.
//
// From the design: 8 lanes, 5-bit weights, 7-bit activations, 12-bit accumulator,
// fast path first and AGS only after an overflow, one add per cycle in the AGS
// engine, a one-cycle sign split. This design's own choices: the valid/ready
// stream and in_last framing, a full-width adder tree inside a chunk, letting the
// engine run while its lists fill, list buffers sized for a whole dot product
// (MAX_K), and clipping on persistent overflow. The multiply, reduce and
// overflow test form one combinational path ahead of the accumulator register.
module ags_dot_unit #(
  parameter int unsigned LANES   = ags_pkg::LANES,
  parameter int unsigned W_W     = ags_pkg::W_W,
  parameter int unsigned A_W     = ags_pkg::A_W,
  parameter int unsigned ACC_W   = ags_pkg::ACC_W,
  parameter int unsigned MAX_K   = ags_pkg::MAX_K,
  parameter int          ACC_MAX = ags_pkg::acc_max(ACC_W),
  parameter int          ACC_MIN = ags_pkg::acc_min(ACC_W),
  localparam int unsigned PP_W   = W_W + A_W,
  localparam int unsigned CNT_W  = $clog2(LANES + 1),
  localparam int unsigned PTR_W  = $clog2(MAX_K + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // operand stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [W_W-1:0]   in_w [LANES],
  input  logic signed [A_W-1:0]   in_x [LANES],
  input  logic                    in_last,
  // result
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_sum,
  output logic                    out_used_ags,
  output logic                    out_clipped,
  // status and observation of the AGS engine
  output logic                    ags_busy,
  output logic                    ags_step,     // the engine adds this cycle
  output logic                    ags_step_neg, // ... a value from the N list
  output logic                    ags_stall,    // the engine waits for input
  output logic        [PTR_W:0]   ags_backlog   // entries waiting in both lists
);
  typedef enum logic [0:0] {S_FAST, S_AGS} state_t;
  state_t state;

  logic signed [ACC_W-1:0] acc;
  logic                    inputs_done;

  // multipliers and fast-path reduction
  logic signed [PP_W-1:0] pp [LANES];
  logic signed [ACC_W-1:0] fast_sum;
  logic                    fast_ovf;

  simd_mul #(.LANES(LANES), .W_W(W_W), .A_W(A_W)) u_mul (
    .w(in_w), .x(in_x), .pp(pp)
  );

  simd_reduce #(.LANES(LANES), .PP_W(PP_W), .ACC_W(ACC_W),
                .ACC_MAX(ACC_MAX), .ACC_MIN(ACC_MIN)) u_reduce (
    .pp(pp), .acc(acc), .sum_out(fast_sum), .ovf(fast_ovf)
  );

  // sign split and the two lists
  logic signed [PP_W-1:0]  pos [LANES];
  logic signed [PP_W-1:0]  neg [LANES];
  logic [CNT_W-1:0]        pos_cnt, neg_cnt;

  sign_splitter #(.LANES(LANES), .PP_W(PP_W)) u_split (
    .pp(pp), .pos(pos), .pos_cnt(pos_cnt), .neg(neg), .neg_cnt(neg_cnt)
  );

  logic accept, to_lists, list_clear;
  logic pop_p, pop_n, p_empty, n_empty, p_room, n_room;
  logic signed [PP_W-1:0] p_head, n_head;
  logic [PTR_W-1:0] p_count, n_count;

  pp_list #(.DEPTH(MAX_K), .LANES(LANES), .PP_W(PP_W)) u_plist (
    .clk(clk), .rst_n(rst_n), .clear(list_clear),
    .push_cnt(to_lists ? pos_cnt : '0), .push_data(pos),
    .pop(pop_p), .head(p_head), .empty(p_empty), .room(p_room), .count(p_count)
  );

  pp_list #(.DEPTH(MAX_K), .LANES(LANES), .PP_W(PP_W)) u_nlist (
    .clk(clk), .rst_n(rst_n), .clear(list_clear),
    .push_cnt(to_lists ? neg_cnt : '0), .push_data(neg),
    .pop(pop_n), .head(n_head), .empty(n_empty), .room(n_room), .count(n_count)
  );

  // AGS engine
  logic eng_start, eng_done, eng_clipped;
  logic signed [ACC_W-1:0] eng_result;
  logic signed [PP_W-1:0]  step_val;     // observed in simulation only
  logic                    in_neg_list;  // observed in simulation only

  ags_engine #(.PP_W(PP_W), .ACC_W(ACC_W), .ACC_MAX(ACC_MAX), .ACC_MIN(ACC_MIN)) u_engine (
    .clk(clk), .rst_n(rst_n), .start(eng_start), .z0(acc),
    .p_head(p_head), .p_empty(p_empty), .n_head(n_head), .n_empty(n_empty),
    .inputs_done(inputs_done), .pop_p(pop_p), .pop_n(pop_n),
    .busy(ags_busy), .done(eng_done), .result(eng_result), .clipped(eng_clipped),
    .step_valid(ags_step), .step_neg(ags_step_neg), .step_val(step_val),
    .stall(ags_stall), .in_neg_list(in_neg_list)
  );

  assign ags_backlog = (PTR_W+1)'(p_count) + (PTR_W+1)'(n_count);

  // control
  always_comb begin
    in_ready   = (state == S_FAST) ||
                 ((state == S_AGS) && !inputs_done && p_room && n_room);
    accept     = in_valid && in_ready;
    eng_start  = accept && (state == S_FAST) && fast_ovf;
    to_lists   = accept && ((state == S_AGS) || fast_ovf);
    list_clear = eng_done;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_FAST;
      acc          <= '0;
      inputs_done  <= 1'b0;
      out_valid    <= 1'b0;
      out_sum      <= '0;
      out_used_ags <= 1'b0;
      out_clipped  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_FAST: begin
          if (accept) begin
            if (!fast_ovf) begin
              if (in_last) begin
                out_valid    <= 1'b1;
                out_sum      <= fast_sum;
                out_used_ags <= 1'b0;
                out_clipped  <= 1'b0;
                acc          <= '0;
              end else begin
                acc <= fast_sum;
              end
            end else begin
              state       <= S_AGS;
              inputs_done <= in_last;
              acc         <= '0;
            end
          end
        end
        S_AGS: begin
          if (accept && in_last) inputs_done <= 1'b1;
          if (eng_done) begin
            out_valid    <= 1'b1;
            out_sum      <= eng_result;
            out_used_ags <= 1'b1;
            out_clipped  <= eng_clipped;
            inputs_done  <= 1'b0;
            state        <= S_FAST;
          end
        end
        default: state <= S_FAST;
      endcase
    end
  end

  // The engine is idle whenever a new dot product may start on the fast path.
  a_engine_idle_in_fast: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FAST) |-> !ags_busy);
endmodule
