// cdbp_unit_tb: self-checking test of the cdbp / r_ntp / r_ltp logic.
//
// Directed cases, each worked out by hand from the rules of cdbp:
//   count zero                -> jump to thr_addr, no pop, r_ntp unchanged;
//   count not zero, LCV not   -> jump to r_ntp, INCLCV; one cycle later a
//   empty, still not empty       pop request, and the loaded value lands in
//   after the pop                r_ntp;
//   same, LCV empty after     -> one cycle later r_ltp moves into r_ntp;
//   the pop
//   count not zero, r_ntp is  -> jump to the leave-thread, no INCLCV, even
//   the leave-thread             with STEM = 0 (a thread posted meanwhile);
//   std via lcv               -> DECLCV.
// Followed by random cycles checked against the same rules.
module cdbp_unit_tb;
  import tam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cdbp = 0, cz = 0, stem = 0, stdl = 0, nwr = 0, lwr = 0;
  logic [TP_W-1:0] thr = '0, nwd = '0, lwd = '0;
  logic jump, inc, dec, pop, lmove;
  logic [TP_W-1:0] target, ntp, ltp;
  int checks = 0, failures = 0;

  cdbp_unit dut (.clk, .rst_n, .cdbp_i(cdbp), .count_zero_i(cz), .thr_addr_i(thr), .stem_i(stem),
      .std_lcv_i(stdl), .ntp_wr_i(nwr), .ntp_wdata_i(nwd), .ltp_wr_i(lwr), .ltp_wdata_i(lwd),
      .jump_o(jump), .target_o(target), .inclcv_o(inc), .declcv_o(dec), .pop_o(pop),
      .ltp_move_o(lmove), .r_ntp_o(ntp), .r_ltp_o(ltp));

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

  task automatic idle();
    cdbp = 0; cz = 0; stem = 0; stdl = 0; nwr = 0; lwr = 0;
  endtask

  logic [TP_W-1:0] m_ntp, m_ltp;
  logic m_popped;
  logic [TP_W-1:0] m_ntp_old, m_ltp_old;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // set r_ltp = 16'h0F00 and r_ntp = 16'h0100
    @(negedge clk); idle(); lwr = 1; lwd = 16'h0F00; nwr = 1; nwd = 16'h0100;
    @(negedge clk); idle();
    check(ltp == 16'h0F00 && ntp == 16'h0100, "register writes");
    // successful synchronization: branch to the forked thread
    cdbp = 1; cz = 1; thr = 16'h0240; #1;
    check(jump && target == 16'h0240 && !inc, "count zero -> thr_addr");
    @(negedge clk); idle();
    check(ntp == 16'h0100 && !pop && !lmove, "r_ntp kept after a successful FORK");
    // failed synchronization, LCV keeps entries after the pop
    cdbp = 1; cz = 0; stem = 0; #1;
    check(jump && target == 16'h0100 && inc && !dec && !pop, "count not zero -> r_ntp, INCLCV");
    @(negedge clk); idle(); stem = 0; #1;
    check(pop && !lmove, "pop requested in the next stage");
    nwr = 1; nwd = 16'h0180;   // the pop load returns
    @(negedge clk); idle();
    check(ntp == 16'h0180 && !pop, "popped thread in r_ntp");
    // failed synchronization, the pop empties the LCV
    cdbp = 1; cz = 0; stem = 0; #1;
    check(target == 16'h0180 && inc, "pop of the last entry");
    @(negedge clk); idle(); stem = 1; #1;
    check(lmove && !pop, "LCV emptied -> ltp move");
    @(negedge clk); idle();
    check(ntp == 16'h0F00, "leave-thread pointer in r_ntp");
    // r_ntp holds the leave-thread and an inlet has posted (STEM = 0):
    // jump to the leave-thread without popping
    cdbp = 1; cz = 0; stem = 0; #1;
    check(jump && target == 16'h0F00 && !inc, "empty LCV -> leave-thread, no INCLCV");
    @(negedge clk); idle(); stem = 1; #1;
    check(!lmove && !pop, "no refill without a pop");
    @(negedge clk); idle();
    // std via lcv
    stdl = 1; #1;
    check(dec && !inc, "std via lcv -> DECLCV");
    @(negedge clk); idle();
    // random
    m_ntp = ntp; m_ltp = ltp; m_popped = 1'b0;
    for (int i = 0; i < 500; i++) begin
      cdbp = $urandom % 2; cz = $urandom % 2; stem = $urandom % 2; stdl = !cdbp && ($urandom % 2);
      thr = $urandom; nwr = $urandom % 2; nwd = $urandom; lwr = $urandom % 4 == 0; lwd = $urandom;
      #1;
      check(target == (cz ? thr : m_ntp), "random: target");
      check(inc == (cdbp && !cz && m_ntp != m_ltp) && dec == stdl, "random: lines");
      check(lmove == (m_popped && stem) && pop == (m_popped && !stem), "random: refill");
      m_ntp_old = m_ntp; m_ltp_old = m_ltp;
      if (m_popped && stem) m_ntp = m_ltp;
      else if (nwr) m_ntp = nwd;
      if (lwr) m_ltp = lwd;
      m_popped = cdbp && !cz && m_ntp_old != m_ltp_old;
      @(negedge clk);
      check(ntp == m_ntp && ltp == m_ltp, "random: registers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
