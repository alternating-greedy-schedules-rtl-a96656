// sign_splitter: splits one cycle's partial products into a positive and a
// negative list.
//
// Each of the LANES inputs goes to the positive list if it is > 0 and to the
// negative list if it is < 0; zeros go nowhere (they never change the sum, and
// N:M-pruned weights make them common). Both outputs are compacted: the kept
// values occupy entries 0..cnt-1 in their original lane order, so they can be
// appended to a list buffer at consecutive addresses. The position of each value
// is the number of same-sign values in lower lanes (a prefix count).
// Purely combinational: the whole split takes one cycle.
// The split rule follows the algorithm; compaction by prefix count is this
// design's choice. Unused output entries are driven to zero.
module sign_splitter #(
  parameter int unsigned LANES = ags_pkg::LANES,
  parameter int unsigned PP_W  = ags_pkg::PP_W,
  localparam int unsigned CNT_W = $clog2(LANES + 1)
) (
  input  logic signed [PP_W-1:0]  pp      [LANES],
  output logic signed [PP_W-1:0]  pos     [LANES],
  output logic        [CNT_W-1:0] pos_cnt,
  output logic signed [PP_W-1:0]  neg     [LANES],
  output logic        [CNT_W-1:0] neg_cnt
);
  int np, nn;  // running prefix counts

  always_comb begin
    np = 0;
    nn = 0;
    for (int i = 0; i < int'(LANES); i++) begin
      pos[i] = '0;
      neg[i] = '0;
    end
    for (int i = 0; i < int'(LANES); i++) begin
      if (pp[i] > 0) begin
        pos[np] = pp[i];
        np      = np + 1;
      end else if (pp[i] < 0) begin
        neg[nn] = pp[i];
        nn      = nn + 1;
      end
    end
    pos_cnt = CNT_W'(np);
    neg_cnt = CNT_W'(nn);
  end
endmodule
