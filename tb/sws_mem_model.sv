// sws_mem_model: behavioural model of the lower-level memory for the SWS
// cache testbenches (not synthesizable, not part of the design).
//
// Line-wide port. A read accepted at a clock edge is answered with one
// rsp_valid pulse, sampled by the cache LAT edges later (LAT = 22 cycles of
// main-memory latency, given as 13+3+3+3). Writes are taken at once. While a
// read is outstanding the port is not ready. With STALLS set, ready also
// drops at random to exercise the cache's handshake. Unwritten words read as
// tb_sws_pkg::init_word(address).
module sws_mem_model #(
  parameter int unsigned LAT     = 22,
  parameter int unsigned LINE_W  = 256,
  parameter int unsigned LADDR_W = 27,
  parameter bit          STALLS  = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_we,
  input  logic [LADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0]  req_wdata,
  output logic               rsp_valid,
  output logic [LINE_W-1:0]  rsp_rdata
);

  localparam int unsigned WPL = LINE_W / 32;

  logic [LINE_W-1:0]  mem [logic [LADDR_W-1:0]];
  logic               busy;
  int unsigned        cnt;
  logic [LADDR_W-1:0] raddr;
  logic               stall;
  int unsigned        reads, writes;

  function automatic logic [LINE_W-1:0] read_line(input logic [LADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    if (mem.exists(a)) return mem[a];
    for (int unsigned i = 0; i < WPL; i++)
      l[32*i +: 32] = tb_sws_pkg::init_word(32'((a * WPL) + i));
    return l;
  endfunction

  assign req_ready = !busy && !stall;
  assign rsp_valid = busy && (cnt == 0);
  assign rsp_rdata = rsp_valid ? read_line(raddr) : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= 0;
      stall  <= 1'b0;
      reads  <= 0;
      writes <= 0;
    end else begin
      stall <= STALLS && (($urandom % 4) == 0);
      if (busy) begin
        if (cnt == 0) busy <= 1'b0;
        else          cnt  <= cnt - 1;
      end
      if (req_valid && req_ready) begin
        if (req_we) begin
          mem[req_addr] = req_wdata;
          writes <= writes + 1;
        end else begin
          busy  <= 1'b1;
          cnt   <= LAT - 1;
          raddr <= req_addr;
          reads <= reads + 1;
        end
      end
    end
  end

endmodule
