// tb_sign_splitter: checks that sign_splitter puts the positive and the negative
// partial products, in lane order and compacted, into its two outputs and drops
// zeros, against a queue model.
module tb_sign_splitter;
  localparam int unsigned LANES = ags_pkg::LANES;
  localparam int unsigned PP_W = ags_pkg::PP_W;
  localparam int unsigned CNT_W = $clog2(LANES + 1);

  logic signed [PP_W-1:0] pp [LANES], pos [LANES], neg [LANES];
  logic [CNT_W-1:0] pos_cnt, neg_cnt;
  int checks = 0, failures = 0;

  sign_splitter dut (.pp(pp), .pos(pos), .pos_cnt(pos_cnt), .neg(neg), .neg_cnt(neg_cnt));

  task automatic check_one();
    int pq[$], nq[$];
    #1;
    for (int i = 0; i < int'(LANES); i++) begin
      if (pp[i] > 0) pq.push_back(int'(pp[i]));
      if (pp[i] < 0) nq.push_back(int'(pp[i]));
    end
    checks++;
    if (int'(pos_cnt) != pq.size() || int'(neg_cnt) != nq.size()) begin
      failures++;
      $display("counts %0d/%0d expected %0d/%0d", pos_cnt, neg_cnt, pq.size(), nq.size());
      return;
    end
    foreach (pq[k]) begin
      checks++;
      if (int'(pos[k]) != pq[k]) begin failures++; $display("pos[%0d]=%0d expected %0d", k, pos[k], pq[k]); end
    end
    foreach (nq[k]) begin
      checks++;
      if (int'(neg[k]) != nq[k]) begin failures++; $display("neg[%0d]=%0d expected %0d", k, neg[k], nq[k]); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all positive, all negative, all zero
    for (int i = 0; i < int'(LANES); i++) pp[i] = PP_W'(i + 1);
    check_one();
    for (int i = 0; i < int'(LANES); i++) pp[i] = PP_W'(-(i + 1));
    check_one();
    for (int i = 0; i < int'(LANES); i++) pp[i] = '0;
    check_one();
    repeat (3000) begin
      for (int i = 0; i < int'(LANES); i++) begin
        case ($urandom_range(0, 2))
          0: pp[i] = '0;
          1: pp[i] = PP_W'($urandom_range(1, 1024));
          default: pp[i] = PP_W'(-int'($urandom_range(1, 1024)));
        endcase
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
