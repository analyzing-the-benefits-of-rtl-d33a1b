// cbs_unit_tb: self-checking test of cbs and HOLD (the four cases of the
// CHECK condition table).
//
// Builds cbs instruction words from the SPARC format-2 fields (op = 0,
// op2 = 5, annul bit, 22-bit displacement) and checks, for all STEM / WAIT
// combinations: case 1/2 branch taken, delay slot kept; case 3 HOLD set,
// not taken, delay slot annulled with cbs,a; case 4 stall for as long as
// WAIT stays high, then case 1 or 3. HOLD stays set until a cdbp. Other
// instructions (Bicc, op2 = 2; a format-3 word) must not act as cbs.
module cbs_unit_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v = 0, stem = 0, waitl = 0, cdbp = 0;
  logic [31:0] inst = '0, disp;
  logic is_cbs, taken, annul, hset, stall, hold;
  int checks = 0, failures = 0;

  cbs_unit dut (.clk, .rst_n, .ex_valid_i(v), .ex_inst_i(inst), .stem_i(stem), .wait_i(waitl),
      .cdbp_i(cdbp), .is_cbs_o(is_cbs), .taken_o(taken), .annul_o(annul), .hold_set_o(hset),
      .stall_o(stall), .disp_o(disp), .hold_o(hold));

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

  function automatic logic [31:0] cbs_word(bit a, int disp22);
    return {2'b00, a, 4'b0000, 3'd5, 22'(disp22)};
  endfunction

  int stall_cycles;
  logic m_hold, e_cbs;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // not a cbs: Bicc (op2 = 2) and a format-3 instruction
    v = 1; inst = {2'b00, 1'b0, 4'b1000, 3'd2, 22'd8}; stem = 1; #1;
    check(!is_cbs && !taken && !hset && !stall, "Bicc is not cbs");
    inst = {2'b10, 30'h0140_0005}; #1;
    check(!is_cbs, "format-3 word is not cbs");
    // case 1: STEM=0, WAIT=0
    inst = cbs_word(1, -3); stem = 0; waitl = 0; #1;
    check(is_cbs && taken && !annul && !hset && !stall, "case 1");
    check(disp == 32'hFFFF_FFF4, "displacement -3 words");
    // case 2: STEM=0, WAIT=1
    waitl = 1; #1;
    check(taken && !annul && !hset && !stall, "case 2");
    @(negedge clk);
    check(!hold, "no HOLD after case 1/2");
    // case 4 for five cycles, then WAIT drops -> case 3
    stem = 1; waitl = 1; stall_cycles = 0;
    for (int i = 0; i < 5; i++) begin
      #1; if (stall && !taken && !hset) stall_cycles++;
      @(negedge clk);
    end
    check(stall_cycles == 5 && !hold, "case 4 stalls while WAIT, no HOLD");
    waitl = 0; #1;
    check(hset && !taken && annul && !stall, "case 3: HOLD set, annulled delay slot");
    @(negedge clk); v = 0;
    check(hold, "HOLD set");
    repeat (3) @(negedge clk);
    check(hold, "HOLD stays until cdbp");
    cdbp = 1; @(negedge clk); cdbp = 0;
    check(!hold, "cdbp clears HOLD");
    // cbs without the annul bit in case 3: delay slot not annulled
    v = 1; inst = cbs_word(0, 5); stem = 1; waitl = 0; #1;
    check(hset && !annul && disp == 32'd20, "case 3 without annul");
    @(negedge clk); v = 0; cdbp = 1; @(negedge clk); cdbp = 0;
    check(!hold, "HOLD cleared again");
    // random instruction words and line values against the decision table
    m_hold = hold;
    for (int i = 0; i < 1000; i++) begin
      automatic bit mk_cbs = $urandom % 2;
      v = $urandom % 4 != 0; stem = $urandom % 2; waitl = $urandom % 2; cdbp = $urandom % 5 == 0;
      inst = mk_cbs ? cbs_word($urandom % 2, int'($urandom % (1 << 22))) : $urandom;
      #1;
      e_cbs = v && inst[31:30] == 2'b00 && inst[24:22] == 3'd5;
      check(is_cbs == e_cbs, "random: decode");
      check(taken == (e_cbs && !stem) && hset == (e_cbs && stem && !waitl) && stall == (e_cbs && stem && waitl),
            "random: decision table");
      check(annul == (e_cbs && inst[29] && stem && !waitl), "random: annul");
      check(disp == {{8{inst[21]}}, inst[21:0], 2'b00}, "random: displacement");
      if (e_cbs && stem && !waitl) m_hold = 1'b1;
      else if (cdbp) m_hold = 1'b0;
      @(negedge clk);
      check(hold == m_hold, "random: HOLD");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
