// slock_ctrl_tb: self-checking test of SLOCK and latch L.
//
// Runs random lds-start / zero / stb-done events and compares SLOCK and the
// latched address each cycle with a reference: SLOCK rises the cycle after
// the lds begins its bus access and latch L holds that lds's address;
// SLOCK falls after the zero bit is set or the store-back completes; the
// latched address does not change until the next lds.
module slock_ctrl_tb;
  import tam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lds = 1'b0, zero = 1'b0, stbd = 1'b0, slock;
  logic [ADDR_W-1:0] addr = '0, laddr;
  int checks = 0, failures = 0;
  logic ref_lock;
  logic [ADDR_W-1:0] ref_addr;

  slock_ctrl dut (.clk, .rst_n, .lds_start_i(lds), .addr_i(addr), .zero_i(zero),
                  .stb_done_i(stbd), .slock_o(slock), .lock_addr_o(laddr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_lock = 1'b0; ref_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (slock !== ref_lock || (ref_lock && laddr !== ref_addr)) begin
        failures++;
        $display("cycle %0d: slock=%b L=%h expected %b %h", i, slock, laddr, ref_lock, ref_addr);
      end
      lds  = ($urandom % 5) == 0;
      zero = ($urandom % 6) == 0;
      stbd = ($urandom % 6) == 0;
      addr = $urandom;
      if (lds) begin ref_lock = 1'b1; ref_addr = addr; end
      else if (zero || stbd) ref_lock = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
