// tb_sws_victim_select: test of the power-aware victim choice. A round-robin
// instance (128 sets) is checked against a reference model for random
// mini-tag match and valid vectors: a matching way wins, else the first empty
// way, else the set's round-robin pointer, which moves on only when advanced.
// A random-policy instance is checked for the same two rules, for a one-hot
// victim, and for choosing every way at some point when the policy decides.
module tb_sws_victim_select;
  import sws_pkg::*;
  localparam int unsigned SETS = 128, WAYS = 4;
  localparam int unsigned IDX_W = $clog2(SETS);

  logic             clk = 1'b0, rst_n;
  logic [IDX_W-1:0] index, advance_index;
  logic [WAYS-1:0]  minitag_match, set_valid;
  logic [WAYS-1:0]  victim, r_victim;
  logic             from_minitag, from_invalid, from_policy;
  logic             r_minitag, r_invalid, r_policy;
  logic             advance;
  int checks = 0, failures = 0;
  int unsigned m_rr [SETS];
  logic [WAYS-1:0] seen_random;

  always #5 clk = ~clk;

  sws_victim_select dut (.*);

  sws_victim_select #(.REPL(REPL_RANDOM)) dut_rnd (
    .clk, .rst_n, .index, .minitag_match, .set_valid,
    .victim (r_victim), .from_minitag (r_minitag), .from_invalid (r_invalid),
    .from_policy (r_policy), .advance, .advance_index
  );

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) m_rr[s] = 0;
    seen_random = '0;
    rst_n = 0; advance = 0; advance_index = '0; index = '0; minitag_match = '0; set_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int s, mw, inv;
      logic [WAYS-1:0] ev;
      bit em, ei, ep;
      @(negedge clk);
      s = (n % 4 == 0) ? $urandom_range(0, SETS - 1) : $urandom_range(0, 2);
      index = IDX_W'(s);
      set_valid = ($urandom % 3 == 0) ? WAYS'($urandom) : '1;
      mw = $urandom_range(0, 2 * WAYS - 1);          // >= WAYS: no match
      minitag_match = (mw < WAYS && set_valid[mw]) ? WAYS'(1) << mw : '0;
      #1;
      inv = -1;
      for (int w = WAYS - 1; w >= 0; w--) if (!set_valid[w]) inv = w;
      em = (minitag_match != 0);
      ei = !em && inv >= 0;
      ep = !em && !ei;
      ev = em ? minitag_match : ei ? WAYS'(1) << inv : WAYS'(1) << m_rr[s];
      chk(victim == ev && from_minitag == em && from_invalid == ei && from_policy == ep,
          $sformatf("RR set %0d match %b valid %b: victim %b exp %b", s, minitag_match, set_valid, victim, ev));
      chk(r_minitag == em && r_invalid == ei && r_policy == ep && (r_victim & (r_victim - 1'b1)) == 0
          && r_victim != 0 && (ep || r_victim == ev),
          $sformatf("random set %0d: victim %b", s, r_victim));
      if (ep) seen_random |= r_victim;
      if (ep && ($urandom % 4 != 0)) begin
        advance = 1; advance_index = IDX_W'(s);
        @(posedge clk);
        m_rr[s] = (m_rr[s] + 1) % WAYS;
        #1 advance = 0;
      end
    end
    chk(seen_random == '1, $sformatf("random policy used only ways %b", seen_random));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
