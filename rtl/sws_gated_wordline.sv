// sws_gated_wordline: wordline gating between the index decoder and the
// data array of the SWS cache.
//
// Every way of the data array has its own copy of each wordline. The copy for
// way w is the decoder wordline ANDed with way w's comparator hit signal from
// the way-selecting structure, so only the way whose mini-tag matched (at most
// one, because the allocation keeps the mini-tags of a set distinct) has a
// wordline raised; the other ways' bitlines and sense amplifiers stay idle.
// Combinational. way_active[w] tells whether way w has any wordline raised.
module sws_gated_wordline #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = 4
) (
  input  logic [SETS-1:0]           wordline,   // from the index decoder
  input  logic [WAYS-1:0]           way_hit,    // comparator hit signals
  output logic [WAYS-1:0][SETS-1:0] gated_wl,   // wordline per way
  output logic [WAYS-1:0]           way_active
);

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      gated_wl[w]   = wordline & {SETS{way_hit[w]}};
      way_active[w] = |gated_wl[w];
    end
  end

endmodule
