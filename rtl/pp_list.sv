// pp_list: buffer for one sign list (P or N) of a dot product.
//
// Holds, in arrival order, the partial products of one sign that the AGS engine
// has still to add. Up to LANES compacted entries (from sign_splitter) are
// appended per cycle at consecutive addresses; the engine reads the oldest entry
// (head) and removes at most one per cycle (pop). Storage is a DEPTH-entry array
// with a write and a read pointer that only move forward; clear resets both
// pointers between dot products, so a dot product may hold up to DEPTH entries
// of one sign. Writes and pops take effect at the next clock edge; head, empty
// and room are read from the registered state. Reset (synchronous, active low)
// clears the pointers; the array itself is not reset, since an entry is only read
// after it has been written.
// A list per sign comes from the algorithm; sizing it for a whole dot product
// (DEPTH = MAX_K) and the push/pop interface are this design's choices.
module pp_list #(
  parameter int unsigned DEPTH = ags_pkg::MAX_K,
  parameter int unsigned LANES = ags_pkg::LANES,
  parameter int unsigned PP_W  = ags_pkg::PP_W,
  localparam int unsigned CNT_W = $clog2(LANES + 1),
  localparam int unsigned PTR_W = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,     // empty the list (has priority)
  input  logic        [CNT_W-1:0] push_cnt,  // number of valid push_data entries
  input  logic signed [PP_W-1:0]  push_data [LANES],
  input  logic                    pop,       // remove the head entry
  output logic signed [PP_W-1:0]  head,
  output logic                    empty,
  output logic                    room,      // LANES more entries fit
  output logic        [PTR_W-1:0] count
);
  logic signed [PP_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      wr_ptr <= wr_ptr + PTR_W'(push_cnt);
      if (pop) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear) begin
      for (int i = 0; i < int'(LANES); i++) begin
        if (i < int'(push_cnt) && int'(wr_ptr) + i < int'(DEPTH)) begin
          mem[int'(wr_ptr) + i] <= push_data[i];
        end
      end
    end
  end

  assign empty = (rd_ptr == wr_ptr);
  assign count = wr_ptr - rd_ptr;
  assign room  = (int'(wr_ptr) + int'(LANES) <= int'(DEPTH));
  assign head  = mem[rd_ptr < PTR_W'(DEPTH) ? rd_ptr : '0];

  // Handshake rules: never pop an empty list, never push past its end.
  property p_no_pop_empty;
    @(posedge clk) disable iff (!rst_n) (pop && !clear) |-> !empty;
  endproperty
  a_no_pop_empty: assert property (p_no_pop_empty);
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n)
      (!clear) |-> (int'(wr_ptr) + int'(push_cnt) <= int'(DEPTH));
  endproperty
  a_no_overrun: assert property (p_no_overrun);
endmodule
