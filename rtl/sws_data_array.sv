// sws_data_array: data array of the SWS cache.
//
// WAYS banks of SETS lines of LINE_BYTES bytes. Each bank is driven by its own
// wordline vector from the gated-wordline stage. A bank with no wordline raised
// is neither read nor written. The read outputs of the banks are OR-combined,
// the model of bitlines that only the one enabled bank drives, so there is no
// way multiplexer on the read path. Reads are combinational; writes happen at
// the rising clock edge in the bank and row whose wordline is raised, for the
// bytes whose bit in wbe is set.
//
// Interface: gated_wl (one-hot rows per way, at most one way active), we,
// wbe (one bit per byte of the line), wdata, rdata (zero when no way is
// enabled). The bank contents are not reset.
//
// That only the selected way is activated follows the document; the
// one-hot-row to row-number encoding inside each bank stands for the bank's
// wordline drivers, a modelling choice of this design.
module sws_data_array #(
  parameter int unsigned SETS       = 128,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned IDX_W      = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned LINE_W     = 8 * LINE_BYTES
) (
  input  logic                      clk,
  input  logic [WAYS-1:0][SETS-1:0] gated_wl,
  input  logic                      we,
  input  logic [LINE_BYTES-1:0]     wbe,
  input  logic [LINE_W-1:0]         wdata,
  output logic [LINE_W-1:0]         rdata
);

  logic [WAYS-1:0]             bank_en;
  logic [WAYS-1:0][IDX_W-1:0]  bank_row;
  logic [WAYS-1:0][LINE_W-1:0] bank_rd;

  // Row number of the raised wordline of each bank (rows are one-hot).
  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      bank_en[w]  = |gated_wl[w];
      bank_row[w] = '0;
      for (int unsigned r = 0; r < SETS; r++)
        if (gated_wl[w][r]) bank_row[w] = bank_row[w] | IDX_W'(r);
    end
  end

  // One storage bank per way; a bank that is not enabled drives zero.
  for (genvar w = 0; w < WAYS; w++) begin : g_bank
    logic [LINE_W-1:0] mem [SETS];

    assign bank_rd[w] = bank_en[w] ? mem[bank_row[w]] : '0;

    always_ff @(posedge clk) begin
      if (we && bank_en[w])
        for (int unsigned b = 0; b < LINE_BYTES; b++)
          if (wbe[b]) mem[bank_row[w]][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  // The enabled bank alone drives the output lines.
  always_comb begin
    rdata = '0;
    for (int unsigned w = 0; w < WAYS; w++) rdata = rdata | bank_rd[w];
  end

endmodule
