// sws_tag_array: tag array and tag comparator of the SWS cache.
//
// Stores the full tag, a valid bit and a dirty bit for every way of every set.
// Like the data array, it is read only in the ways named by way_en, which the
// cache drives with the one-hot result of the mini-tag comparison, so a lookup
// reads and compares a single tag instead of four. The comparator then
// confirms the access: hit is 1 when exactly the enabled way is valid and its
// tag equals cmp_tag. A load whose data was already read out is abandoned when
// hit stays low (a miss).
//
// Interface: index, way_en (one-hot or zero) and cmp_tag give the
// combinational outputs rd_tag/rd_valid/rd_dirty/hit of the enabled way (zero
// when none). The write port stores tag and dirty bit into one way at the
// rising clock edge and marks it valid. Reset clears all valid and dirty bits.
//
// Reading only the selected way and checking the tag after the data is read
// follow the document; valid/dirty bits and the write-back support are this
// design's choices.
module sws_tag_array #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20,
  parameter int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // read and compare
  input  logic [IDX_W-1:0] index,
  input  logic [WAYS-1:0]  way_en,
  input  logic [TAG_W-1:0] cmp_tag,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid,
  output logic             rd_dirty,
  output logic             hit,
  // write
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_index,
  input  logic [WAYS-1:0]  wr_way,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             wr_dirty
);

  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];

  // Only the enabled way drives the sense outputs.
  always_comb begin
    rd_tag   = '0;
    rd_valid = 1'b0;
    rd_dirty = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (way_en[w]) begin
        rd_tag   = rd_tag   | tag_q[index][w];
        rd_valid = rd_valid | valid_q[index][w];
        rd_dirty = rd_dirty | dirty_q[index][w];
      end
    end
    hit = (way_en != '0) && rd_valid && (rd_tag == cmp_tag);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
      end
    end else if (wr_en) begin
      for (int unsigned w = 0; w < WAYS; w++)
        if (wr_way[w]) begin
          valid_q[wr_index][w] <= 1'b1;
          dirty_q[wr_index][w] <= wr_dirty;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int unsigned w = 0; w < WAYS; w++)
        if (wr_way[w]) tag_q[wr_index][w] <= wr_tag;
  end

endmodule
