// tb_simd_reduce: checks one fast-path step (chunk sum added to the running
// sum, overflow flag) against an integer model, at the default 12-bit range and
// at a narrow [-10, 10] range.
module tb_simd_reduce;
  localparam int unsigned LANES = ags_pkg::LANES;
  localparam int unsigned PP_W = ags_pkg::PP_W;
  localparam int unsigned ACC_W = ags_pkg::ACC_W;

  logic signed [PP_W-1:0]  pp [LANES];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] sum_a, sum_b;
  logic ovf_a, ovf_b;
  int checks = 0, failures = 0, n_ovf = 0;

  simd_reduce dut_a (.pp(pp), .acc(acc), .sum_out(sum_a), .ovf(ovf_a));
  simd_reduce #(.ACC_MAX(10), .ACC_MIN(-10)) dut_b (.pp(pp), .acc(acc), .sum_out(sum_b), .ovf(ovf_b));

  task automatic check_one();
    int s, lo, hi;
    bit eo;
    #1;
    s = int'(acc);
    for (int i = 0; i < int'(LANES); i++) s += int'(pp[i]);
    hi = (1 <<< (ACC_W-1)) - 1;
    lo = -(1 <<< (ACC_W-1));
    eo = (s > hi) || (s < lo);
    n_ovf += int'(eo);
    checks++;
    if (ovf_a != eo) begin
      failures++;
      $display("ovf %0b expected %0b for sum %0d", ovf_a, eo, s);
    end
    if (!eo) begin
      checks++;
      if (int'(sum_a) != s) begin
        failures++;
        $display("sum %0d expected %0d", sum_a, s);
      end
    end
    eo = (s > 10) || (s < -10);
    checks++;
    if (ovf_b != eo) begin
      failures++;
      $display("narrow: ovf %0b expected %0b for sum %0d", ovf_b, eo, s);
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
    // exact boundaries: running sum ends on the largest/smallest value and one past
    for (int d = -1; d <= 1; d++) begin
      for (int i = 0; i < int'(LANES); i++) pp[i] = '0;
      acc = ACC_W'(2000); pp[0] = PP_W'(47 + d); check_one();
      acc = ACC_W'(-2000); pp[3] = PP_W'(-48 + d); pp[0] = '0; check_one();
    end
    repeat (5000) begin
      int sh;
      sh = $urandom_range(0, 3);
      acc = ACC_W'($urandom);
      for (int i = 0; i < int'(LANES); i++) pp[i] = PP_W'($signed(PP_W'($urandom)) >>> sh);
      check_one();
    end
    for (int i = 0; i < 20; i++) begin
      acc = ACC_W'($urandom_range(0, 20) - 10);
      for (int j = 0; j < int'(LANES); j++) pp[j] = PP_W'($urandom_range(0, 6) - 3);
      check_one();
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("no overflow case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
