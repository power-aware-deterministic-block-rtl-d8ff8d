// sws_way_select: the way-selecting structure of the SWS cache.
//
// Holds, for every set and every way, a 4-bit mini-tag (the low-order four
// bits of the block's tag) and a valid bit, and compares the four entries of
// the indexed set with the mini-tag of the requested address in parallel.
// match[w] is 1 when way w is valid and its mini-tag equals the request's.
// The allocation rule of the cache keeps the valid mini-tags of a set
// distinct, so match has at most one bit set; an assertion checks this.
//
// Interface: rd_index/rd_minitag give a combinational lookup (match and the
// set's valid bits, used by the victim select). The write port stores a
// mini-tag into one way (wr_way one-hot) at the rising clock edge and marks
// it valid. Reset clears all valid bits.
//
// Mini-tag array plus one comparator per way follows the document; storing
// the valid bit next to the mini-tag is this design's choice (an empty way
// must not match).
module sws_way_select #(
  parameter int unsigned SETS   = 128,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned MINI_W = 4,
  parameter int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [IDX_W-1:0]  rd_index,
  input  logic [MINI_W-1:0] rd_minitag,
  output logic [WAYS-1:0]   match,
  output logic [WAYS-1:0]   set_valid,
  // update on refill
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_index,
  input  logic [WAYS-1:0]   wr_way,
  input  logic [MINI_W-1:0] wr_minitag
);

  logic [MINI_W-1:0] minitag_q [SETS][WAYS];
  logic [WAYS-1:0]   valid_q   [SETS];

  always_comb begin
    set_valid = valid_q[rd_index];
    for (int unsigned w = 0; w < WAYS; w++)
      match[w] = set_valid[w] && (minitag_q[rd_index][w] == rd_minitag);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (wr_en) begin
      for (int unsigned w = 0; w < WAYS; w++)
        if (wr_way[w]) valid_q[wr_index][w] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int unsigned w = 0; w < WAYS; w++)
        if (wr_way[w]) minitag_q[wr_index][w] <= wr_minitag;
  end

  // At most one way of a set may match (the mini-tags of a set are distinct).
  always_ff @(posedge clk) begin
    if (rst_n)
      assert ((match & (match - 1'b1)) == '0)
        else $error("sws_way_select: more than one way matches mini-tag %h in set %0d",
                    rd_minitag, rd_index);
  end

endmodule
