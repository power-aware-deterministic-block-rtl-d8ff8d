// sws_index_decoder: index decoder of the SWS cache arrays.
//
// Turns the index field of the address into a one-hot wordline vector, one
// line per set. All wordlines stay low when en is low. Purely combinational.
// The cache drives the data-array wordlines from this decoder through the
// gated-wordline stage; the decoder itself is a plain binary-to-one-hot
// decoder, which is all the design asks of it.
module sws_index_decoder #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic             en,
  input  logic [IDX_W-1:0] index,
  output logic [SETS-1:0]  wordline
);

  always_comb begin
    wordline = '0;
    for (int unsigned r = 0; r < SETS; r++)
      if (en && index == IDX_W'(r)) wordline[r] = 1'b1;
  end

endmodule
