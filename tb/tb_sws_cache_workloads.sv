// tb_sws_cache_workloads: miss-rate and energy comparison of the SWS cache
// against a conventional 4-way cache on synthetic access patterns.
//
// The cache runs at its default size (16 KB, 4 ways, 32-byte lines,
// round-robin) with a 22-cycle memory. Each load or store is sent to the
// cache and also to two reference models kept in the testbench: one of the SWS
// allocation rule (must agree with the cache on every hit and miss) and one of
// a conventional 4-way cache with the same round-robin policy but no mini-tag
// rule. Patterns:
//   stream   - sequential reads over 64 KB
//   vec16k   - c[i] = a[i] + b[i], arrays 16 KB apart (tags differ by 4)
//   vec64k   - the same with arrays 64 KB apart (equal mini-tags: they must
//              share one way of each set, so the SWS cache thrashes)
//   table    - random reads in an 8 KB table (fits in the cache)
//   random   - random loads and stores over 64 KB
// For each pattern it prints both miss counts and an energy estimate:
// hit energy 1.0 for the conventional cache and 0.41 for the SWS cache (one
// way instead of four), miss handling 50 times a conventional access.
module tb_sws_cache_workloads;
  import sws_pkg::*;

  localparam int unsigned SETS = 128, WAYS = 4, TAG_W = 20, LAT = 22;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        cpu_req_valid, cpu_req_ready, cpu_req_we;
  logic [31:0] cpu_req_addr, cpu_req_wdata, cpu_rsp_rdata;
  logic [3:0]  cpu_req_be;
  logic        cpu_rsp_valid;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [26:0] mem_req_addr;
  logic [255:0] mem_req_wdata, mem_rsp_rdata;
  logic [3:0]  data_way_en, tag_way_en;
  sws_events_t events;

  always #5 clk = ~clk;

  sws_cache dut (.*);

  sws_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr  (mem_req_addr),  .req_wdata (mem_req_wdata),
    .rsp_valid (mem_rsp_valid), .rsp_rdata (mem_rsp_rdata)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Two cache models: index 0 = SWS rule, 1 = conventional.
  logic             m_v   [2][SETS][WAYS];
  logic [TAG_W-1:0] m_tag [2][SETS][WAYS];
  int unsigned      m_rr  [2][SETS];

  // Returns 1 on a hit; on a miss allocates like the given model.
  function automatic bit model_access(input int k, input logic [31:0] a);
    logic [6:0]       s;
    logic [TAG_W-1:0] t;
    int v, inv;
    s = a[11:5];
    t = a[31:12];
    for (int w = 0; w < WAYS; w++) if (m_v[k][s][w] && m_tag[k][s][w] == t) return 1'b1;
    v = -1; inv = -1;
    if (k == 0)
      for (int w = 0; w < WAYS; w++) if (m_v[k][s][w] && m_tag[k][s][w][3:0] == t[3:0]) v = w;
    for (int w = WAYS - 1; w >= 0; w--) if (!m_v[k][s][w]) inv = w;
    if (v < 0 && inv >= 0) v = inv;
    if (v < 0) begin
      v = int'(m_rr[k][s]);
      m_rr[k][s] = (m_rr[k][s] + 1) % WAYS;
    end
    m_v[k][s][v] = 1'b1;
    m_tag[k][s][v] = t;
    return 1'b0;
  endfunction

  int n_acc, n_miss_sws, n_miss_conv, n_ref_miss;

  task automatic access(input bit we, input logic [31:0] a);
    bit dut_hit, sws_hit, conv_hit;
    cpu_req_valid = 1'b1;
    cpu_req_we    = we;
    cpu_req_addr  = {a[31:2], 2'b00};
    cpu_req_wdata = $urandom;
    cpu_req_be    = we ? 4'hF : 4'h0;
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    dut_hit = events.hit;
    @(posedge clk);
    @(negedge clk);
    cpu_req_valid = 1'b0;
    while (!cpu_rsp_valid) @(negedge clk);
    sws_hit  = model_access(0, a);
    conv_hit = model_access(1, a);
    check(dut_hit == sws_hit, $sformatf("addr %h: cache hit=%0d, SWS model hit=%0d", a, dut_hit, sws_hit));
    n_acc++;
    if (!dut_hit) n_miss_sws++;
    if (!conv_hit) n_miss_conv++;
  endtask

  task automatic start(input string name);
    n_acc = 0; n_miss_sws = 0; n_miss_conv = 0;
  endtask

  task automatic report(input string name);
    real e_conv, e_sws;
    e_conv = real'(n_acc) * 1.0  + real'(n_miss_conv) * 50.0;
    e_sws  = real'(n_acc) * 0.41 + real'(n_miss_sws)  * 50.0;
    $display("%-7s accesses=%6d  misses SWS=%5d conventional=%5d  miss rate SWS=%6.3f%% conv=%6.3f%%  energy SWS/conv=%5.3f",
             name, n_acc, n_miss_sws, n_miss_conv,
             100.0 * real'(n_miss_sws) / real'(n_acc), 100.0 * real'(n_miss_conv) / real'(n_acc),
             e_sws / e_conv);
  endtask

  initial begin
    for (int k = 0; k < 2; k++)
      for (int s = 0; s < SETS; s++) begin
        m_rr[k][s] = 0;
        for (int w = 0; w < WAYS; w++) begin m_v[k][s][w] = 1'b0; m_tag[k][s][w] = '0; end
      end
    rst_n = 1'b0; cpu_req_valid = 1'b0; cpu_req_we = 1'b0;
    cpu_req_addr = '0; cpu_req_wdata = '0; cpu_req_be = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    start("stream");
    for (int unsigned i = 0; i < 65536; i += 4) access(1'b0, 32'h0010_0000 + i);
    report("stream");
    check(n_miss_sws == n_miss_conv, "stream: SWS and conventional should both miss once per line");

    start("vec16k");
    for (int r = 0; r < 2; r++)
      for (int unsigned i = 0; i < 4096; i += 4) begin
        access(1'b0, 32'h0020_0000 + i);
        access(1'b0, 32'h0020_4000 + i);
        access(1'b1, 32'h0020_8000 + i);
      end
    report("vec16k");
    check(n_miss_sws == n_miss_conv, "vec16k: distinct mini-tags should cost no extra misses");

    start("vec64k");
    for (int r = 0; r < 2; r++)
      for (int unsigned i = 0; i < 4096; i += 4) begin
        access(1'b0, 32'h0040_0000 + i);
        access(1'b0, 32'h0041_0000 + i);
        access(1'b1, 32'h0042_0000 + i);
      end
    report("vec64k");
    check(n_miss_sws > n_miss_conv, "vec64k: equal mini-tags should make the SWS cache miss more");

    start("table");
    for (int n = 0; n < 6000; n++) access(1'b0, 32'h0060_0000 + ($urandom % 8192));
    report("table");
    check(n_miss_sws == n_miss_conv, "table: an 8 KB table fits either way");

    start("random");
    for (int n = 0; n < 6000; n++) access(($urandom % 4) == 0, 32'h0080_0000 + ($urandom % 65536));
    report("random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
