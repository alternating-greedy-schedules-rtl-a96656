// tb_simd_mul: checks the LANES pairwise signed products of simd_mul against
// integer multiplication, for the operand extremes and for random operands.
module tb_simd_mul;
  localparam int unsigned LANES = ags_pkg::LANES;
  localparam int unsigned W_W = ags_pkg::W_W;
  localparam int unsigned A_W = ags_pkg::A_W;
  localparam int unsigned PP_W = W_W + A_W;

  logic signed [W_W-1:0]  w  [LANES];
  logic signed [A_W-1:0]  x  [LANES];
  logic signed [PP_W-1:0] pp [LANES];
  int checks = 0, failures = 0;

  simd_mul dut (.w(w), .x(x), .pp(pp));

  task automatic check_all();
    #1;
    for (int i = 0; i < int'(LANES); i++) begin
      int expv = int'(w[i]) * int'(x[i]);
      checks++;
      if (int'(pp[i]) != expv) begin
        failures++;
        $display("lane %0d: %0d * %0d gave %0d, expected %0d", i, w[i], x[i], pp[i], expv);
      end
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
    // extremes: every combination of min/max operands
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < int'(LANES); i++) begin
        w[i] = (c[0]) ? W_W'(-(1 <<< (W_W-1))) : W_W'((1 <<< (W_W-1)) - 1);
        x[i] = (c[1]) ? A_W'(-(1 <<< (A_W-1))) : A_W'((1 <<< (A_W-1)) - 1);
      end
      check_all();
    end
    repeat (2000) begin
      for (int i = 0; i < int'(LANES); i++) begin
        w[i] = W_W'($urandom);
        x[i] = A_W'($urandom);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
