// frame_memory_tb: self-checking test of the Common Cache storage.
//
// Writes bytes, halfwords and words at random addresses, keeps its own
// byte-wide big-endian copy, and reads them back with random sizes. Checks
// the timing the bus relies on: a store completes (ready) in its second
// cycle with hold raised in that cycle; a load completes in its first cycle
// and its data arrive with rvalid exactly one cycle later.
module frame_memory_tb;
  import tam_pkg::*;
  localparam int unsigned MB = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, we = 1'b0, ready, hold, rvalid;
  acc_size_e size = SZ_WORD;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [MB];

  frame_memory #(.MEM_BYTES(MB)) dut (
    .clk, .rst_n, .valid_i(valid), .we_i(we), .size_i(size), .addr_i(addr),
    .wdata_i(wdata), .ready_o(ready), .hold_o(hold), .rdata_o(rdata), .rvalid_o(rvalid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned nbytes(acc_size_e s);
    return s == SZ_BYTE ? 1 : s == SZ_HALF ? 2 : 4;
  endfunction

  task automatic store(input logic [ADDR_W-1:0] a, input acc_size_e s, input logic [31:0] d);
    int unsigned n = nbytes(s);
    @(negedge clk);
    valid = 1'b1; we = 1'b1; addr = a; size = s; wdata = d;
    #1 check(!ready, "store must not complete in its first cycle");
    @(negedge clk);
    #1 check(ready && hold, "store completes in its second cycle, under hold");
    for (int k = 0; k < n; k++) model[(a + k) % MB] = d[8*(n-1-k) +: 8];
    @(negedge clk);
    valid = 1'b0; we = 1'b0;
  endtask

  task automatic load_check(input logic [ADDR_W-1:0] a, input acc_size_e s);
    int unsigned n = nbytes(s);
    logic [31:0] exp = '0;
    for (int k = 0; k < n; k++) exp = (exp << 8) | 32'(model[(a + k) % MB]);
    @(negedge clk);
    valid = 1'b1; we = 1'b0; addr = a; size = s;
    #1 check(ready, "load completes in its first cycle");
    @(negedge clk);
    valid = 1'b0;
    #1 check(rvalid, "load data one cycle after the load");
    check(rdata == exp, $sformatf("load %0d bytes at %0d: got %h expected %h", n, a, rdata, exp));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < MB; a += 4) store(a, SZ_WORD, $urandom);
    for (int i = 0; i < 300; i++) begin
      automatic acc_size_e s = acc_size_e'($urandom % 3);
      automatic logic [ADDR_W-1:0] a = ($urandom % (MB / 4)) * 4 + (s == SZ_BYTE ? $urandom % 4 : s == SZ_HALF ? ($urandom % 2) * 2 : 0);
      if ($urandom % 2) store(a, s, $urandom);
      else              load_check(a, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
