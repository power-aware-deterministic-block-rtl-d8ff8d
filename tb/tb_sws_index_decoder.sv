// tb_sws_index_decoder: exhaustive test of the index decoder at its default
// size (128 sets): every index with the enable high must raise exactly its own
// wordline, and with the enable low no wordline may rise.
module tb_sws_index_decoder;
  localparam int unsigned SETS = 128;
  localparam int unsigned IDX_W = $clog2(SETS);

  logic             en;
  logic [IDX_W-1:0] index;
  logic [SETS-1:0]  wordline;
  int checks = 0, failures = 0;

  sws_index_decoder dut (.*);

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < SETS; i++) begin
        logic [SETS-1:0] exp;
        en = e[0]; index = IDX_W'(i);
        #1;
        exp = '0;
        if (e == 1) exp[i] = 1'b1;
        checks++;
        if (wordline !== exp) begin
          failures++;
          $display("FAIL: en=%0d index=%0d wordline=%h", e, i, wordline);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
