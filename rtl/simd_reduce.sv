// simd_reduce: one step of the SIMD fast path.
//
// Adds the LANES partial products of one cycle to the running sum held in the
// narrow accumulator and reports whether the new running sum leaves the
// accumulator range [ACC_MIN, ACC_MAX]. The LANES products are first reduced in
// an adder tree that is wide enough never to overflow (SUM_W bits); only the
// running sum is narrow. When ovf is set the caller must not write sum_out back:
// it hands the running sum and the partial products to the AGS engine instead.
// Purely combinational.
// Summing on the fast path until the running sum would overflow follows the
// design; the full-width adder tree and the exact overflow test are this
// design's own choices. ACC_MAX/ACC_MIN default to the two's-complement limits of
// ACC_W and can be narrowed, e.g. to replay small worked examples.
module simd_reduce #(
  parameter int unsigned LANES   = ags_pkg::LANES,
  parameter int unsigned PP_W    = ags_pkg::PP_W,
  parameter int unsigned ACC_W   = ags_pkg::ACC_W,
  parameter int          ACC_MAX = ags_pkg::acc_max(ACC_W),
  parameter int          ACC_MIN = ags_pkg::acc_min(ACC_W),
  localparam int unsigned SUM_W  = ((PP_W + $clog2(LANES) > ACC_W) ?
                                    PP_W + $clog2(LANES) : ACC_W) + 2
) (
  input  logic signed [PP_W-1:0]  pp  [LANES],
  input  logic signed [ACC_W-1:0] acc,      // running sum before this step
  output logic signed [ACC_W-1:0] sum_out,  // running sum after this step
  output logic                    ovf       // sum_out is out of range
);
  logic signed [SUM_W-1:0] chunk_sum;  // sum of the LANES products
  logic signed [SUM_W-1:0] wide;

  always_comb begin
    chunk_sum = '0;
    for (int i = 0; i < int'(LANES); i++) begin
      chunk_sum = chunk_sum + SUM_W'(pp[i]);
    end
    wide    = SUM_W'(acc) + chunk_sum;
    ovf     = (wide > SUM_W'(ACC_MAX)) || (wide < SUM_W'(ACC_MIN));
    sum_out = wide[ACC_W-1:0];
  end
endmodule
