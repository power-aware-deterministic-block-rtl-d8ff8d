// tb_sws_tag_array: random test of the tag array and its comparator at the
// default size (128 sets, 4 ways, 20-bit tags). Random writes update a
// reference copy; random reads with one way or no way enabled compare the
// valid, dirty and tag outputs and the hit result.
module tb_sws_tag_array;
  localparam int unsigned SETS = 128, WAYS = 4, TAG_W = 20;
  localparam int unsigned IDX_W = $clog2(SETS);

  logic             clk = 1'b0, rst_n;
  logic [IDX_W-1:0] index, wr_index;
  logic [WAYS-1:0]  way_en, wr_way;
  logic [TAG_W-1:0] cmp_tag, rd_tag, wr_tag;
  logic             rd_valid, rd_dirty, hit, wr_en, wr_dirty;
  int checks = 0, failures = 0;

  logic             m_v [SETS][WAYS];
  logic             m_d [SETS][WAYS];
  logic [TAG_W-1:0] m_t [SETS][WAYS];

  always #5 clk = ~clk;
  sws_tag_array dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_read(input int s, input int w, input logic [TAG_W-1:0] t);
    bit ev, ed, eh;
    index = IDX_W'(s); way_en = (w < 0) ? '0 : WAYS'(1) << w; cmp_tag = t;
    #1;
    ev = (w >= 0) && m_v[s][w];
    ed = ev && m_d[s][w];
    eh = ev && m_t[s][w] == t;
    checks++;
    if (rd_valid !== ev || rd_dirty !== ed || hit !== eh || (ev && rd_tag !== m_t[s][w])) begin
      failures++;
      $display("FAIL: set %0d way %0d: v=%b/%b d=%b/%b hit=%b/%b", s, w, rd_valid, ev, rd_dirty, ed, hit, eh);
    end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin m_v[s][w] = 0; m_d[s][w] = 0; end
    rst_n = 0; wr_en = 0; wr_index = '0; wr_way = '0; wr_tag = '0; wr_dirty = 0;
    index = '0; way_en = '0; cmp_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int s, w;
      logic [TAG_W-1:0] t;
      @(negedge clk);
      s = (n % 3 == 0) ? $urandom_range(0, SETS - 1) : $urandom_range(0, 3);
      w = $urandom_range(0, WAYS);          // WAYS means no way enabled
      t = {1'($urandom), (TAG_W-4)'(0), 3'($urandom)};
      check_read(s, (w == WAYS) ? -1 : w, t);
      if ($urandom % 2 == 0) begin
        w = $urandom_range(0, WAYS - 1);
        wr_en = 1; wr_index = IDX_W'(s); wr_way = WAYS'(1) << w;
        wr_tag = {1'($urandom), (TAG_W-4)'(0), 3'($urandom)}; wr_dirty = 1'($urandom);
        @(posedge clk);
        m_v[s][w] = 1; m_d[s][w] = wr_dirty; m_t[s][w] = wr_tag;
        #1 wr_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
