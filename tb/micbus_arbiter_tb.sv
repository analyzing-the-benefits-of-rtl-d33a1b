// micbus_arbiter_tb: self-checking test of the MICBus arbiter.
//
// Drives random request and hold patterns and compares the grant in every
// cycle with a reference written here from the rules: a hold after a grant
// keeps the previous owner; otherwise a tie goes to the requester that was
// not granted last; a lone request is granted at once. Also checks the
// fairness rate directly: with both processors requesting all the time and
// no hold, each gets exactly half of the cycles.
module micbus_arbiter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] req = '0, gnt;
  logic hold = 1'b0;
  int checks = 0, failures = 0;

  micbus_arbiter dut (.clk, .rst_n, .req_i(req), .hold_i(hold), .gnt_o(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic ref_last, ref_owner, ref_busy;
  logic [1:0] exp_gnt;
  int gcount [2];

  function automatic logic [1:0] expect_gnt(logic [1:0] r, logic h, logic last, logic owner, logic busy);
    if (h && busy) return owner ? 2'b10 : 2'b01;
    if (r == 2'b11) return last ? 2'b01 : 2'b10;
    return r;
  endfunction

  initial begin
    ref_last = 1'b1; ref_owner = 1'b0; ref_busy = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random phase
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req  = 2'($urandom);
      hold = ($urandom % 4) == 0;
      #1;
      exp_gnt = expect_gnt(req, hold, ref_last, ref_owner, ref_busy);
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        $display("cycle %0d: req=%b hold=%b gnt=%b expected %b", i, req, hold, gnt, exp_gnt);
      end
      @(posedge clk);
      ref_busy = |exp_gnt;
      if (|exp_gnt) begin ref_last = exp_gnt[1]; ref_owner = exp_gnt[1]; end
    end
    // fairness: both request continuously for 100 cycles
    gcount[0] = 0; gcount[1] = 0;
    @(negedge clk); req = 2'b11; hold = 1'b0;
    for (int i = 0; i < 100; i++) begin
      #1;
      if (gnt[0]) gcount[0]++;
      if (gnt[1]) gcount[1]++;
      @(negedge clk);
    end
    checks++;
    if (gcount[0] != 50 || gcount[1] != 50) begin
      failures++;
      $display("fairness: main %0d inlet %0d of 100", gcount[0], gcount[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
