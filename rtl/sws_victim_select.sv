// sws_victim_select: power-aware victim selection of the SWS cache.
//
// On a miss the new block must not share its mini-tag with another block of
// the set, so the choice is, in this order:
//   1. the way whose valid mini-tag equals the missing address's mini-tag
//      (at most one exists): that block is evicted and replaced;
//   2. otherwise the lowest-numbered empty way;
//   3. otherwise the conventional policy: a round-robin pointer per set
//      (REPL_RR) or a free-running 16-bit LFSR (REPL_RANDOM).
// The selection is combinational from minitag_match and set_valid of the
// indexed set. from_policy says that case 3 applied; pulsing advance (with
// advance_index) at the rising edge then moves that set's round-robin pointer
// on. The LFSR steps every cycle. Reset clears the pointers and seeds the LFSR.
//
// Rule 1 and the round-robin/random policies follow the document; filling
// empty ways first and the LFSR polynomial (x^16+x^14+x^13+x^11+1) are this
// design's choices.
module sws_victim_select
  import sws_pkg::*;
#(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4,
  parameter repl_e       REPL  = REPL_RR,
  parameter int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] index,
  input  logic [WAYS-1:0]  minitag_match,
  input  logic [WAYS-1:0]  set_valid,
  output logic [WAYS-1:0]  victim,        // one-hot
  output logic             from_minitag,
  output logic             from_invalid,
  output logic             from_policy,
  input  logic             advance,
  input  logic [IDX_W-1:0] advance_index
);

  logic [WAY_W-1:0] rr_q [SETS];
  logic [15:0]      lfsr_q;
  logic [WAY_W-1:0] policy_way;
  logic             found_invalid;
  logic [WAYS-1:0]  first_invalid;

  always_comb begin
    policy_way = (REPL == REPL_RANDOM) ? lfsr_q[WAY_W-1:0] : rr_q[index];

    first_invalid = '0;
    found_invalid = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!set_valid[w] && !found_invalid) begin
        first_invalid[w] = 1'b1;
        found_invalid    = 1'b1;
      end

    from_minitag = (minitag_match != '0);
    from_invalid = !from_minitag && found_invalid;
    from_policy  = !from_minitag && !found_invalid;

    if (from_minitag)      victim = minitag_match;
    else if (found_invalid) victim = first_invalid;
    else                    victim = WAYS'(1) << policy_way;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) rr_q[s] <= '0;
      lfsr_q <= 16'hACE1;
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      if (advance) rr_q[advance_index] <= (rr_q[advance_index] == WAY_W'(WAYS - 1))
                                          ? '0 : rr_q[advance_index] + 1'b1;
    end
  end

endmodule
