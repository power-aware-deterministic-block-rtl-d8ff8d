// tb_sws_way_select: random test of the mini-tag array and its comparators at
// the default size (128 sets, 4 ways, 4-bit mini-tags). A reference array is
// updated like the cache does it (a new mini-tag goes into the way that
// already holds it, else into a random way), so the mini-tags of a set stay
// distinct. Random lookups then compare match and the set's valid bits.
module tb_sws_way_select;
  localparam int unsigned SETS = 128, WAYS = 4, MINI_W = 4;
  localparam int unsigned IDX_W = $clog2(SETS);

  logic              clk = 1'b0, rst_n;
  logic [IDX_W-1:0]  rd_index, wr_index;
  logic [MINI_W-1:0] rd_minitag, wr_minitag;
  logic [WAYS-1:0]   match, set_valid, wr_way;
  logic              wr_en;
  int checks = 0, failures = 0;

  logic              m_v [SETS][WAYS];
  logic [MINI_W-1:0] m_t [SETS][WAYS];

  always #5 clk = ~clk;
  sws_way_select dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic lookup(input int s, input logic [MINI_W-1:0] t);
    logic [WAYS-1:0] em, ev;
    rd_index = IDX_W'(s); rd_minitag = t;
    #1;
    for (int w = 0; w < WAYS; w++) begin
      ev[w] = m_v[s][w];
      em[w] = m_v[s][w] && m_t[s][w] == t;
    end
    checks++;
    if (match !== em || set_valid !== ev) begin
      failures++;
      $display("FAIL: set %0d tag %h match %b exp %b valid %b exp %b", s, t, match, em, set_valid, ev);
    end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_v[s][w] = 0;
    rst_n = 0; wr_en = 0; wr_index = '0; wr_way = '0; wr_minitag = '0;
    rd_index = '0; rd_minitag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset nothing matches
    for (int s = 0; s < SETS; s++) lookup(s, MINI_W'(s));
    for (int n = 0; n < 6000; n++) begin
      int s, w;
      logic [MINI_W-1:0] t;
      @(negedge clk);
      s = (n % 3 == 0) ? $urandom_range(0, SETS - 1) : $urandom_range(0, 3);
      t = MINI_W'($urandom);
      lookup(s, t);
      if ($urandom % 2 == 0) begin
        w = $urandom_range(0, WAYS - 1);
        for (int k = 0; k < WAYS; k++) if (m_v[s][k] && m_t[s][k] == t) w = k;
        wr_en = 1; wr_index = IDX_W'(s); wr_way = WAYS'(1) << w; wr_minitag = t;
        @(posedge clk);
        m_v[s][w] = 1; m_t[s][w] = t;
        #1 wr_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
