// tb_sws_data_array: random test of the data array at the default size
// (4 ways x 128 lines x 32 bytes). Every line is first written in full, then
// random byte-masked writes and reads are issued through one-hot per-way
// wordlines and the read data is compared with a reference copy. A read with
// no way enabled must return zero, and a write must touch only the enabled way.
module tb_sws_data_array;
  localparam int unsigned SETS = 128, WAYS = 4, LINE_BYTES = 32;
  localparam int unsigned LINE_W = 8 * LINE_BYTES;

  logic                      clk = 1'b0;
  logic [WAYS-1:0][SETS-1:0] gated_wl;
  logic                      we;
  logic [LINE_BYTES-1:0]     wbe;
  logic [LINE_W-1:0]         wdata, rdata;
  int checks = 0, failures = 0;

  logic [LINE_W-1:0] ref_mem [WAYS][SETS];

  always #5 clk = ~clk;
  sws_data_array dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  task automatic select(input int w, input int r);
    gated_wl = '0;
    if (w >= 0) gated_wl[w][r] = 1'b1;
  endtask

  task automatic write(input int w, input int r, input logic [LINE_BYTES-1:0] be,
                       input logic [LINE_W-1:0] d);
    @(negedge clk);
    select(w, r); we = 1; wbe = be; wdata = d;
    @(posedge clk);
    for (int b = 0; b < LINE_BYTES; b++) if (be[b]) ref_mem[w][r][8*b +: 8] = d[8*b +: 8];
    #1 we = 0;
  endtask

  task automatic read(input int w, input int r);
    @(negedge clk);
    select(w, r); we = 0;
    #1;
    checks++;
    if (rdata !== (w < 0 ? '0 : ref_mem[w][r])) begin
      failures++;
      $display("FAIL: read way %0d row %0d", w, r);
    end
  endtask

  initial begin
    we = 0; wbe = '0; wdata = '0; gated_wl = '0;
    for (int w = 0; w < WAYS; w++)
      for (int r = 0; r < SETS; r++) write(w, r, '1, rnd_line());
    for (int w = 0; w < WAYS; w++)
      for (int r = 0; r < SETS; r++) read(w, r);
    for (int n = 0; n < 6000; n++) begin
      int w, r;
      w = $urandom_range(0, WAYS - 1);
      r = (n % 2) ? $urandom_range(0, 7) : $urandom_range(0, SETS - 1);
      case ($urandom % 3)
        0: write(w, r, LINE_BYTES'($urandom), rnd_line());
        1: read(w, r);
        default: read(-1, r);
      endcase
    end
    // every way and row once more: writes must not have leaked into other ways
    for (int w = 0; w < WAYS; w++)
      for (int r = 0; r < SETS; r++) read(w, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
