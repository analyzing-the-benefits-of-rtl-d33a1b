// wait_ctrl_tb: self-checking test of WAIT, the HOLD stall and the fp copy.
//
// Directed: cmp fp,ifp sets WAIT one cycle later, `next` clears it; HOLD or
// a HOLD being set in this very cycle stalls the Inlet-processor, and a
// cmp fp,ifp during the stall does not set WAIT. The cmp result says
// "running frame" only when ifp equals a valid fp copy; setting HOLD
// invalidates the copy and a SWAP's fp load makes it valid again. Then
// random cycles against a reference of the same rules.
module wait_ctrl_tb;
  import tam_pkg::*;
  logic fpl = 0, plcv, fpv;
  logic [ADDR_W-1:0] fp = '0, ifp = '0;
  logic m_plcv, m_fpv;
  logic [ADDR_W-1:0] m_fp;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pc = 0, nx = 0, hold = 0, hset = 0, waitl, stall;
  int checks = 0, failures = 0;
  logic m_wait;

  wait_ctrl dut (.clk, .rst_n, .post_cmp_i(pc), .ifp_i(ifp), .next_i(nx), .fp_load_i(fpl), .fp_i(fp),
                 .post_lcv_o(plcv), .fp_valid_o(fpv), .hold_i(hold), .hold_set_i(hset),
                 .wait_o(waitl), .stall_o(stall));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!waitl && !stall && !fpv, "reset state");
    fpl = 1; fp = 32'h0000_0400; @(negedge clk); fpl = 0;
    check(fpv, "fp copy loaded");
    ifp = 32'h0000_0400;
    pc = 1; #1; check(!waitl, "WAIT not yet set in the cmp cycle");
    @(negedge clk); pc = 0;
    check(waitl && plcv, "WAIT set after cmp fp,ifp; message for the running frame");
    repeat (2) @(negedge clk);
    check(waitl, "WAIT held through the POST");
    nx = 1; @(negedge clk); nx = 0;
    check(!waitl, "next clears WAIT");
    hset = 1; pc = 1; #1;
    check(stall, "stall while HOLD is being set");
    @(negedge clk); hset = 0; hold = 1;
    check(!waitl && stall, "cmp in the HOLD-set cycle does not set WAIT");
    check(!fpv, "setting HOLD invalidates the fp copy");
    @(negedge clk);
    check(!waitl && stall, "HOLD stalls the Inlet-processor");
    fpl = 1; fp = 32'h0000_0600; @(negedge clk); fpl = 0;
    hold = 0; @(negedge clk); pc = 0;
    check(waitl && !stall && fpv && !plcv, "cmp proceeds once HOLD drops; old frame's message goes to the RCV");
    nx = 1; @(negedge clk); nx = 0;
    m_wait = waitl; m_plcv = plcv; m_fpv = fpv; m_fp = 32'h0000_0600;
    for (int i = 0; i < 500; i++) begin
      fpl = $urandom % 8 == 0; fp = 32'($urandom % 4) * 32'h200; ifp = 32'($urandom % 4) * 32'h200;
      pc = $urandom % 3 == 0; nx = $urandom % 3 == 0; hold = !m_wait && ($urandom % 4 == 0); hset = !m_wait && ($urandom % 6 == 0);
      #1;
      check(stall == (hold || hset), "random: stall");
      if (!(hold || hset) && pc) begin m_wait = 1'b1; m_plcv = m_fpv && (m_fp == ifp); end
      else if (!(hold || hset) && nx) m_wait = 1'b0;
      if (hset) m_fpv = 1'b0;
      else if (fpl) begin m_fp = fp; m_fpv = 1'b1; end
      @(negedge clk);
      check(waitl == m_wait && plcv == m_plcv && fpv == m_fpv, "random: WAIT, cmp result, fp valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
