// sws_cache_checker: stimulus and reference model for the SWS cache
// testbenches.
//
// Issues one request at a time to the cache (a new one in the cycle its
// predecessor's response is seen, so hits run back to back) and predicts every
// outcome with its own model of the cache: per set and way a valid bit, dirty
// bit and tag; the allocation rule (victim = the way whose 4-bit mini-tag
// matches, else the first empty way, else the round-robin pointer of the set);
// and a word-level shadow copy of memory for the load data. It checks hit or
// miss, the victim kind and write-back reported by the cache, the load data,
// the latency (1 cycle for a hit, LAT+4 for a miss when EXACT_LAT is set), and
// every cycle that at most one data way and one tag way are activated and that
// a hit activates exactly one. With CHECK_RR clear (random replacement) the
// victim of a policy choice is taken from the way written by the refill. It
// counts how often each mechanism happened and fails one that never did, then
// prints the TB_RESULT line and ends the simulation.
module sws_cache_checker
  import sws_pkg::*;
#(
  parameter int unsigned N_RANDOM  = 4000,
  parameter int unsigned LAT       = 22,
  parameter bit          CHECK_RR  = 1'b1,
  parameter bit          EXACT_LAT = 1'b1,
  parameter int unsigned SETS      = 128,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned TAG_W     = 20
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        cpu_req_valid,
  input  logic        cpu_req_ready,
  output logic        cpu_req_we,
  output logic [31:0] cpu_req_addr,
  output logic [31:0] cpu_req_wdata,
  output logic [3:0]  cpu_req_be,
  input  logic        cpu_rsp_valid,
  input  logic [31:0] cpu_rsp_rdata,
  input  logic        mem_rsp_valid,
  input  logic [WAYS-1:0] data_way_en,
  input  logic [WAYS-1:0] tag_way_en,
  input  sws_events_t events
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned OFF_W = 5;

  int checks = 0, failures = 0;

  // reference model
  logic             m_v   [SETS][WAYS];
  logic             m_d   [SETS][WAYS];
  logic [TAG_W-1:0] m_tag [SETS][WAYS];
  int unsigned      m_rr  [SETS];
  logic [31:0]      shadow [logic [29:0]];

  // mechanism counters
  int n_load_hit, n_store_hit, n_load_miss, n_store_miss;
  int n_v_minitag, n_v_invalid, n_v_policy, n_writeback, n_stall_cycles;
  int n_b2b_hits, n_accesses, n_data_way_acts;
  logic [WAYS-1:0] refill_way;

  function automatic int onehot_idx(input logic [WAYS-1:0] v);
    for (int i = 0; i < WAYS; i++) if (v[i]) return i;
    return -1;
  endfunction

  function automatic int popc(input logic [WAYS-1:0] v);
    int n = 0;
    for (int i = 0; i < WAYS; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Per-cycle checks on way activation; remember the way a refill writes.
  always @(negedge clk) begin
    if (rst_n) begin
      check(popc(data_way_en) <= 1, "more than one data way active");
      check(popc(tag_way_en) <= 1, "more than one tag way active");
      if (events.hit) check(popc(data_way_en) == 1, "hit without exactly one data way");
      if (mem_rsp_valid) refill_way = data_way_en;
      if (events.hit || events.miss) n_data_way_acts += popc(data_way_en);
      if (!cpu_req_ready) n_stall_cycles++;
    end
  end

  logic [31:0] next_addr;
  bit          next_we;
  logic [31:0] next_wdata;
  logic [3:0]  next_be;
  bit          prev_was_hit;

  // Issue the prepared request (at a negedge) and follow it to its response.
  task automatic run_req();
    logic [IDX_W-1:0] idx;
    logic [TAG_W-1:0] tag;
    int hw, vw, lat, expv;
    bit exp_hit, exp_wb;
    logic [31:0] exp_data, old;
    sws_events_t ev;

    cpu_req_valid = 1'b1;
    cpu_req_we    = next_we;
    cpu_req_addr  = next_addr;
    cpu_req_wdata = next_wdata;
    cpu_req_be    = next_be;
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    ev = events;
    n_accesses++;

    idx = next_addr[OFF_W +: IDX_W];
    tag = next_addr[31 -: TAG_W];
    hw = -1;
    for (int w = 0; w < WAYS; w++) if (m_v[idx][w] && m_tag[idx][w] == tag) hw = w;
    exp_hit = (hw >= 0);
    check(ev.hit == exp_hit && ev.miss == !exp_hit,
          $sformatf("hit/miss addr=%h exp_hit=%0d got hit=%0d miss=%0d", next_addr, exp_hit, ev.hit, ev.miss));

    expv = -1;
    exp_wb = 1'b0;
    if (!exp_hit) begin
      int mt = -1, inv = -1;
      for (int w = 0; w < WAYS; w++) begin
        if (m_v[idx][w] && m_tag[idx][w][3:0] == tag[3:0]) mt = w;
        if (!m_v[idx][w] && inv < 0) inv = w;
      end
      if (mt >= 0) begin
        expv = mt; n_v_minitag++;
        check(ev.victim_minitag, $sformatf("expected mini-tag victim addr=%h", next_addr));
      end else if (inv >= 0) begin
        expv = inv; n_v_invalid++;
        check(ev.victim_invalid, $sformatf("expected empty-way victim addr=%h", next_addr));
      end else begin
        expv = CHECK_RR ? int'(m_rr[idx]) : -1; n_v_policy++;
        check(ev.victim_policy, $sformatf("expected policy victim addr=%h", next_addr));
      end
      if (next_we) n_store_miss++; else n_load_miss++;
    end else begin
      if (next_we) n_store_hit++; else n_load_hit++;
      if (prev_was_hit) n_b2b_hits++;
    end

    // accept edge, then wait for the response
    @(posedge clk);
    refill_way = '0;
    @(negedge clk);
    cpu_req_valid = 1'b0;
    lat = 1;
    while (!cpu_rsp_valid && lat < 1000) begin
      if (events.writeback) exp_wb = 1'b1;
      @(negedge clk); lat++;
    end

    if (!exp_hit) begin
      vw = onehot_idx(refill_way);
      if (expv < 0) begin
        expv = vw;
        check(vw >= 0, "no refill way seen");
      end else begin
        check(vw == expv, $sformatf("victim way exp %0d got %0d addr=%h", expv, vw, next_addr));
      end
      if (expv >= 0) begin
        check(exp_wb == (m_v[idx][expv] && m_d[idx][expv]),
              $sformatf("write-back exp %0d got %0d", m_v[idx][expv] && m_d[idx][expv], exp_wb));
        if (exp_wb) n_writeback++;
        if (ev.victim_policy) m_rr[idx] = (m_rr[idx] + 1) % WAYS;
        m_v[idx][expv] = 1'b1; m_d[idx][expv] = 1'b0; m_tag[idx][expv] = tag;
        hw = expv;
      end
    end
    if (EXACT_LAT || exp_hit)
      check(lat == (exp_hit ? 1 : int'(LAT) + 4),
            $sformatf("latency exp %0d got %0d (hit=%0d)", exp_hit ? 1 : LAT + 4, lat, exp_hit));
    else
      check(lat >= int'(LAT) + 4, $sformatf("miss latency %0d too short", lat));

    old = shadow.exists(next_addr[31:2]) ? shadow[next_addr[31:2]]
                                         : tb_sws_pkg::init_word({2'b00, next_addr[31:2]});
    if (next_we) begin
      for (int b = 0; b < 4; b++) if (next_be[b]) old[8*b +: 8] = next_wdata[8*b +: 8];
      shadow[next_addr[31:2]] = old;
      if (hw >= 0) m_d[idx][hw] = 1'b1;
    end else begin
      exp_data = old;
      check(cpu_rsp_rdata == exp_data,
            $sformatf("load %h exp %h got %h", next_addr, exp_data, cpu_rsp_rdata));
    end
    prev_was_hit = exp_hit;
  endtask

  function automatic logic [31:0] mk_addr(input int unsigned tag, input int unsigned idx,
                                          input int unsigned word);
    return (32'(tag) << (OFF_W + IDX_W)) | (32'(idx) << OFF_W) | (32'(word) << 2);
  endfunction

  task automatic req(input bit we, input logic [31:0] a);
    next_we = we; next_addr = a; next_wdata = $urandom; next_be = we ? 4'($urandom_range(1, 15)) : 4'h0;
    run_req();
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) begin m_v[s][w] = 0; m_d[s][w] = 0; m_tag[s][w] = '0; end
    end
    {n_load_hit, n_store_hit, n_load_miss, n_store_miss} = '0;
    {n_v_minitag, n_v_invalid, n_v_policy, n_writeback, n_stall_cycles} = '0;
    {n_b2b_hits, n_accesses, n_data_way_acts} = '0;
    prev_was_hit  = 1'b0;
    rst_n         = 1'b0;
    cpu_req_valid = 1'b0;
    cpu_req_we    = 1'b0;
    cpu_req_addr  = '0;
    cpu_req_wdata = '0;
    cpu_req_be    = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Directed: fill set 5 with mini-tags 1..4, then force each victim kind.
    req(0, mk_addr(32'h001, 5, 0));   // empty-way victims
    req(0, mk_addr(32'h002, 5, 1));
    req(0, mk_addr(32'h003, 5, 2));
    req(0, mk_addr(32'h004, 5, 3));
    req(0, mk_addr(32'h001, 5, 4));   // hits
    req(1, mk_addr(32'h002, 5, 5));   // store hit: line becomes dirty
    req(0, mk_addr(32'h011, 5, 0));   // mini-tag 1 matches: replaces 0x001
    req(0, mk_addr(32'h012, 5, 5));   // mini-tag 2 matches dirty 0x002: write-back
    req(0, mk_addr(32'h002, 5, 5));   // the stored data comes back from memory
    req(0, mk_addr(32'h025, 5, 0));   // no mini-tag 5: policy victim
    req(1, mk_addr(32'h036, 5, 7));   // store miss, policy victim

    // Working set that fits (distinct mini-tags per set): mostly hits.
    for (int unsigned i = 0; i < 600; i++)
      req(($urandom % 4) == 0, mk_addr(32'h100 + $urandom_range(0, 3), 16 + $urandom_range(0, 7),
                                     $urandom_range(0, 7)));

    // Random: few sets and a small tag range so mini-tags collide often.
    for (int unsigned i = 0; i < N_RANDOM; i++) begin
      int unsigned t, s;
      t = (i % 2 == 0) ? $urandom_range(0, 19) : $urandom_range(0, 47);
      s = ($urandom % 8 == 0) ? $urandom_range(0, SETS - 1) : $urandom_range(0, 3);
      req(($urandom % 5) < 2, mk_addr(t, s, $urandom_range(0, 7)));
    end

    $display("accesses=%0d load_hit=%0d store_hit=%0d load_miss=%0d store_miss=%0d",
             n_accesses, n_load_hit, n_store_hit, n_load_miss, n_store_miss);
    $display("victim: minitag=%0d empty=%0d policy=%0d  writebacks=%0d  stall_cycles=%0d  back_to_back_hits=%0d",
             n_v_minitag, n_v_invalid, n_v_policy, n_writeback, n_stall_cycles, n_b2b_hits);
    $display("data ways read on first lookups=%0d (a cache reading all ways would read %0d)",
             n_data_way_acts, WAYS * n_accesses);
    check(n_load_hit > 0,   "no load hit happened");
    check(n_store_hit > 0,  "no store hit happened");
    check(n_load_miss > 0,  "no load miss happened");
    check(n_store_miss > 0, "no store miss happened");
    check(n_v_minitag > 0,  "no mini-tag victim happened");
    check(n_v_invalid > 0,  "no empty-way victim happened");
    check(n_v_policy > 0,   "no policy victim happened");
    check(n_writeback > 0,  "no write-back happened");
    check(n_stall_cycles > 0, "no stall happened");
    check(n_b2b_hits > 0,   "no back-to-back hits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
