// tb_pp_list: drives random multi-entry pushes, single pops and clears into a
// small pp_list and checks head, empty, count and room against a queue model.
module tb_pp_list;
  localparam int unsigned LANES = ags_pkg::LANES;
  localparam int unsigned PP_W = ags_pkg::PP_W;
  localparam int unsigned DEPTH = 40;
  localparam int unsigned CNT_W = $clog2(LANES + 1);
  localparam int unsigned PTR_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, clear = 0, pop = 0;
  logic [CNT_W-1:0] push_cnt = '0;
  logic signed [PP_W-1:0] push_data [LANES];
  logic signed [PP_W-1:0] head;
  logic empty, room;
  logic [PTR_W-1:0] count;
  int checks = 0, failures = 0, n_clear = 0, n_full = 0;
  int q[$];
  int wr_total = 0;  // entries written since the last clear

  pp_list #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .push_cnt(push_cnt),
    .push_data(push_data), .pop(pop), .head(head), .empty(empty), .room(room), .count(count));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(LANES); i++) push_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      // compare state with the model
      checks++;
      if (empty != (q.size() == 0) || int'(count) != q.size() ||
          room != (wr_total + int'(LANES) <= int'(DEPTH))) begin
        failures++;
        $display("state: empty=%0b count=%0d room=%0b, model size %0d written %0d",
                 empty, count, room, q.size(), wr_total);
      end
      if (q.size() > 0) begin
        checks++;
        if (int'(head) != q[0]) begin failures++; $display("head %0d expected %0d", head, q[0]); end
      end
      // next stimulus
      clear = ($urandom_range(0, 99) == 0) || (!room && q.size() == 0);
      pop = (q.size() > 0) && ($urandom_range(0, 1) == 1);
      push_cnt = room ? CNT_W'($urandom_range(0, LANES)) : '0;
      for (int i = 0; i < int'(LANES); i++) push_data[i] = PP_W'($urandom);
      if (!room) n_full++;
      @(posedge clk);
      #1;
      if (clear) begin
        q.delete();
        wr_total = 0;
        n_clear++;
      end else begin
        if (pop) void'(q.pop_front());
        for (int i = 0; i < int'(push_cnt); i++) q.push_back(int'(push_data[i]));
        wr_total += int'(push_cnt);
      end
    end
    checks++;
    if (n_clear == 0 || n_full == 0) begin failures++; $display("clear or full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
