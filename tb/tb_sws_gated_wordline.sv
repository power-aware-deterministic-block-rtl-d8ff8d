// tb_sws_gated_wordline: random test of the wordline gating at its default
// size. For one-hot decoder wordlines and random hit vectors, way w must carry
// the wordline exactly when its hit signal is high, and way_active must
// report it.
module tb_sws_gated_wordline;
  localparam int unsigned SETS = 128;
  localparam int unsigned WAYS = 4;

  logic [SETS-1:0]           wordline;
  logic [WAYS-1:0]           way_hit;
  logic [WAYS-1:0][SETS-1:0] gated_wl;
  logic [WAYS-1:0]           way_active;
  int checks = 0, failures = 0;

  sws_gated_wordline dut (.*);

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = $urandom_range(0, SETS - 1);
      wordline = '0;
      if (n % 7 != 0) wordline[r] = 1'b1;
      way_hit = WAYS'($urandom);
      #1;
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) begin
          if (s != r && !(n % 7 == 0)) continue;
          checks++;
          if (gated_wl[w][s] !== (wordline[s] && way_hit[w])) begin
            failures++;
            $display("FAIL: way %0d row %0d hit=%b wl=%b got %b", w, s, way_hit[w], wordline[s], gated_wl[w][s]);
          end
        end
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (way_active[w] !== (way_hit[w] && (n % 7 != 0))) begin
          failures++;
          $display("FAIL: way_active[%0d]=%b", w, way_active[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
