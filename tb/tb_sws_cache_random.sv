// tb_sws_cache_random: end-to-end test of the SWS cache with random
// replacement and a memory whose ready drops at random. The victim of a policy
// choice cannot be predicted, so the checker takes it from the way the refill
// writes; it still checks the mini-tag and empty-way rules, the write-backs,
// the load data, the single-way activation and the hit latency.
module tb_sws_cache_random;
  import sws_pkg::*;

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

  sws_cache #(.REPL(REPL_RANDOM)) dut (.*);

  sws_mem_model #(.LAT(22), .STALLS(1'b1)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr  (mem_req_addr),  .req_wdata (mem_req_wdata),
    .rsp_valid (mem_rsp_valid), .rsp_rdata (mem_rsp_rdata)
  );

  sws_cache_checker #(.N_RANDOM(4000), .LAT(22), .CHECK_RR(1'b0), .EXACT_LAT(1'b0)) u_chk (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_chk.checks, u_chk.failures + 1);
    $finish;
  end

endmodule
