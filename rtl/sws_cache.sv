// sws_cache: single-way-selective (SWS) set-associative data cache.
//
// A 4-way set-associative cache (16 KB, 32-byte lines, 128 sets by default)
// that reads only one way of its data and tag arrays per access. Next to the
// usual arrays it keeps a 4-bit mini-tag (the low four tag bits) of every
// block. A lookup compares the four mini-tags of the indexed set with the
// request's; the one matching way gets the data wordline through the gated
// wordline stage, and only that way's tag is read and compared to confirm the
// hit. This works because the block allocation never lets two blocks of a set
// share a mini-tag: on a miss, a block whose mini-tag matches the missing
// address is the one evicted; only when none matches does a normal policy
// (round-robin, or random) choose. The way-select result is therefore exact,
// never a prediction: a hit costs the energy of one way and no extra cycle.
//
// Interface
//   CPU side: valid/ready request (address, store flag, 32-bit data, byte
//   enables). Every accepted request gets one cpu_rsp_valid pulse (loads carry
//   cpu_rsp_rdata). cpu_req_ready is low while a miss is being handled.
//   Memory side: line-wide requests (mem_req_*) with valid/ready; a read is
//   answered by one mem_rsp_valid pulse carrying the line. Write-backs are
//   posted: complete once accepted.
//   data_way_en / tag_way_en show which ways were activated in each cycle,
//   and events gives one-cycle pulses for hit, miss, victim kind, write-back.
//
// Timing
//   Hit: request accepted in cycle 0, response in cycle 1; one request per
//   cycle. Miss: IDLE -> EVICT (write back the victim if dirty) -> REFILL
//   (send the line read) -> WAIT (refill written into the victim way) ->
//   REPLAY (the request is looked up again, now hits) -> response. With a
//   clean victim and a memory that accepts at once and answers L cycles later
//   the response comes L + 4 cycles after the request was accepted (a hit: 1).
//
// Follows the document: geometry, mini-tag array and comparators, gated
// wordlines, single-way tag check, the allocation rule, round-robin/random
// replacement. This design's choices: 32-bit addresses and words, write-back
// with write-allocate, filling empty ways first, the line-wide memory port,
// the replay after a refill and the resulting cycle counts.
module sws_cache
  import sws_pkg::*;
#(
  parameter int unsigned ADDR_W      = DEF_ADDR_W,
  parameter int unsigned CACHE_BYTES = DEF_CACHE_BYTES,
  parameter int unsigned LINE_BYTES  = DEF_LINE_BYTES,
  parameter int unsigned WAYS        = DEF_WAYS,
  parameter int unsigned MINI_W      = DEF_MINI_W,
  parameter repl_e       REPL        = REPL_RR,
  // derived
  parameter int unsigned SETS   = CACHE_BYTES / (LINE_BYTES * WAYS),
  parameter int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned OFF_W  = $clog2(LINE_BYTES),
  parameter int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W,
  parameter int unsigned LINE_W = 8 * LINE_BYTES,
  parameter int unsigned LADDR_W = ADDR_W - OFF_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // CPU (load/store unit) side
  input  logic               cpu_req_valid,
  output logic               cpu_req_ready,
  input  logic               cpu_req_we,
  input  logic [ADDR_W-1:0]  cpu_req_addr,
  input  logic [31:0]        cpu_req_wdata,
  input  logic [3:0]         cpu_req_be,
  output logic               cpu_rsp_valid,
  output logic [31:0]        cpu_rsp_rdata,
  // lower-level memory side
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [LADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0]  mem_req_wdata,
  input  logic               mem_rsp_valid,
  input  logic [LINE_W-1:0]  mem_rsp_rdata,
  // activity and events
  output logic [WAYS-1:0]    data_way_en,
  output logic [WAYS-1:0]    tag_way_en,
  output sws_events_t        events
);

  localparam int unsigned WPL = LINE_BYTES / 4;           // words per line
  localparam int unsigned WOFF_W = (WPL > 1) ? $clog2(WPL) : 1;

  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [31:0]       wdata;
    logic [3:0]        be;
  } req_t;

  typedef enum logic [2:0] {
    S_IDLE, S_EVICT, S_REFILL, S_WAIT, S_REPLAY
  } state_e;

  state_e          state_q;
  req_t            req_q, lk;
  logic [WAYS-1:0] victim_q;
  logic            victim_policy_q;

  // ---------------------------------------------------------------- lookup
  logic              lookup;
  logic [IDX_W-1:0]  lk_index;
  logic [TAG_W-1:0]  lk_tag;
  logic [MINI_W-1:0] lk_minitag;
  logic [WOFF_W-1:0] lk_word;

  always_comb begin
    lk       = (state_q == S_IDLE)
               ? '{we: cpu_req_we, addr: cpu_req_addr, wdata: cpu_req_wdata, be: cpu_req_be}
               : req_q;
    lookup   = ((state_q == S_IDLE) && cpu_req_valid) || (state_q == S_REPLAY);
    lk_index = lk.addr[OFF_W +: IDX_W];
    lk_tag   = lk.addr[ADDR_W-1 -: TAG_W];
    lk_minitag = lk_tag[MINI_W-1:0];
    lk_word  = (WPL > 1) ? lk.addr[2 +: WOFF_W] : '0;
  end

  // ------------------------------------------------- way-selecting structure
  logic [WAYS-1:0] ws_match, ws_valid;
  logic            refill_wr;

  sws_way_select #(.SETS(SETS), .WAYS(WAYS), .MINI_W(MINI_W)) u_way_select (
    .clk, .rst_n,
    .rd_index   (lk_index),
    .rd_minitag (lk_minitag),
    .match      (ws_match),
    .set_valid  (ws_valid),
    .wr_en      (refill_wr),
    .wr_index   (lk_index),
    .wr_way     (victim_q),
    .wr_minitag (lk_minitag)
  );

  // ----------------------------------------------------------- victim select
  logic [WAYS-1:0] vs_victim;
  logic            vs_minitag, vs_invalid, vs_policy;

  sws_victim_select #(.SETS(SETS), .WAYS(WAYS), .REPL(REPL)) u_victim_select (
    .clk, .rst_n,
    .index         (lk_index),
    .minitag_match (ws_match),
    .set_valid     (ws_valid),
    .victim        (vs_victim),
    .from_minitag  (vs_minitag),
    .from_invalid  (vs_invalid),
    .from_policy   (vs_policy),
    .advance       (refill_wr && victim_policy_q),
    .advance_index (lk_index)
  );

  // Ways to activate this cycle: the mini-tag winner on a lookup, the victim
  // while it is examined/written back and when the refill line is written.
  logic [WAYS-1:0] sel_way;
  always_comb begin
    unique case (state_q)
      S_IDLE, S_REPLAY: sel_way = lookup ? ws_match : '0;
      S_EVICT:          sel_way = victim_q;
      S_WAIT:           sel_way = mem_rsp_valid ? victim_q : '0;
      default:          sel_way = '0;
    endcase
  end

  // ------------------------------------------- decoder and gated wordline
  logic [SETS-1:0]           wordline;
  logic [WAYS-1:0][SETS-1:0] gated_wl;
  logic [WAYS-1:0]           way_active;

  sws_index_decoder #(.SETS(SETS)) u_decoder (
    .en       (sel_way != '0),
    .index    (lk_index),
    .wordline (wordline)
  );

  sws_gated_wordline #(.SETS(SETS), .WAYS(WAYS)) u_gated_wl (
    .wordline   (wordline),
    .way_hit    (sel_way),
    .gated_wl   (gated_wl),
    .way_active (way_active)
  );

  // --------------------------------------------------------------- tag array
  logic [TAG_W-1:0] ta_tag;
  logic             ta_valid, ta_dirty, ta_hit;
  logic             store_hit, tag_wr;

  sws_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tag_array (
    .clk, .rst_n,
    .index    (lk_index),
    .way_en   (sel_way),
    .cmp_tag  (lk_tag),
    .rd_tag   (ta_tag),
    .rd_valid (ta_valid),
    .rd_dirty (ta_dirty),
    .hit      (ta_hit),
    .wr_en    (tag_wr),
    .wr_index (lk_index),
    .wr_way   (sel_way),
    .wr_tag   (lk_tag),
    .wr_dirty (store_hit)
  );

  logic lookup_hit;
  assign lookup_hit = lookup && ta_hit;
  assign store_hit  = lookup_hit && lk.we;
  assign refill_wr  = (state_q == S_WAIT) && mem_rsp_valid;
  assign tag_wr     = store_hit || refill_wr;

  // -------------------------------------------------------------- data array
  logic [LINE_W-1:0]     da_rdata, da_wdata;
  logic [LINE_BYTES-1:0] da_wbe;

  always_comb begin
    if (refill_wr) begin
      da_wdata = mem_rsp_rdata;
      da_wbe   = '1;
    end else begin
      da_wdata = {WPL{lk.wdata}};
      da_wbe   = LINE_BYTES'(lk.be) << (4 * lk_word);
    end
  end

  sws_data_array #(.SETS(SETS), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_data_array (
    .clk,
    .gated_wl (gated_wl),
    .we       (store_hit || refill_wr),
    .wbe      (da_wbe),
    .wdata    (da_wdata),
    .rdata    (da_rdata)
  );

  // ------------------------------------------------------------ memory port
  logic victim_dirty;
  assign victim_dirty = (state_q == S_EVICT) && ta_valid && ta_dirty;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {lk_tag, lk_index};
    mem_req_wdata = da_rdata;
    if (victim_dirty) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
      mem_req_addr  = {ta_tag, lk_index};
    end else if (state_q == S_REFILL) begin
      mem_req_valid = 1'b1;
    end
  end

  // -------------------------------------------------------------- controller
  assign cpu_req_ready = (state_q == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q         <= S_IDLE;
      victim_q        <= '0;
      victim_policy_q <= 1'b0;
      req_q           <= '0;
      cpu_rsp_valid   <= 1'b0;
      cpu_rsp_rdata   <= '0;
    end else begin
      cpu_rsp_valid <= lookup_hit;
      if (lookup_hit) cpu_rsp_rdata <= da_rdata[32*lk_word +: 32];
      unique case (state_q)
        S_IDLE: if (cpu_req_valid && !ta_hit) begin
          req_q           <= lk;
          victim_q        <= vs_victim;
          victim_policy_q <= vs_policy;
          state_q         <= S_EVICT;
        end
        S_EVICT:  if (!victim_dirty || mem_req_ready) state_q <= S_REFILL;
        S_REFILL: if (mem_req_ready) state_q <= S_WAIT;
        S_WAIT:   if (mem_rsp_valid) state_q <= S_REPLAY;
        S_REPLAY: state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ activity, events
  assign data_way_en = way_active;
  assign tag_way_en  = sel_way;

  always_comb begin
    events                = '0;
    events.hit            = (state_q == S_IDLE) && lookup_hit;
    events.miss           = (state_q == S_IDLE) && cpu_req_valid && !ta_hit;
    events.victim_minitag = events.miss && vs_minitag;
    events.victim_invalid = events.miss && vs_invalid;
    events.victim_policy  = events.miss && vs_policy;
    events.writeback      = victim_dirty && mem_req_ready;
  end

  // The replayed request must hit, and no more than one way may be active.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (state_q != S_REPLAY || ta_hit)
        else $error("sws_cache: replay after refill missed");
      assert ((way_active & (way_active - 1'b1)) == '0)
        else $error("sws_cache: more than one data way activated");
    end
  end

endmodule
