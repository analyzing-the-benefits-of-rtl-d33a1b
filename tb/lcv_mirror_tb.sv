// lcv_mirror_tb: self-checking test of the Inlet-processor's lcv copy.
//
// Plays the Main-processor: keeps its own lcv as a plain integer, and in
// random cycles pushes (DECLCV), pops (INCLCV, only when its own view says
// the LCV is not empty), lets the Inlet-processor push at the bottom, or
// loads both pointers for a new frame. Every cycle the copy must equal the
// Main-processor's lcv, lcvend must count the bottom pushes, and STEM must
// be exactly lcv = lcvend, valid the cycle after each update.
module lcv_mirror_tb;
  import tam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic inc = 1'b0, dec = 1'b0, einc = 1'b0, load = 1'b0, stem;
  logic [LCV_W-1:0] llcv = '0, lend = '0, lcv, lcvend;
  int checks = 0, failures = 0;
  int main_lcv, ref_end, stem_seen;

  lcv_mirror #(.STEP(2)) dut (.clk, .rst_n, .inclcv_i(inc), .declcv_i(dec), .lcvend_inc_i(einc),
      .load_i(load), .load_lcv_i(llcv), .load_lcvend_i(lend), .lcv_o(lcv), .lcvend_o(lcvend), .stem_o(stem));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    main_lcv = 0; ref_end = 0; stem_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (lcv != LCV_W'(main_lcv) || lcvend != LCV_W'(ref_end) || stem != (main_lcv == ref_end)) begin
        failures++;
        $display("cycle %0d: copy %0d end %0d stem %b; main lcv %0d end %0d", i, lcv, lcvend, stem, main_lcv, ref_end);
      end
      if (stem) stem_seen++;
      inc = 1'b0; dec = 1'b0; einc = 1'b0; load = 1'b0;
      case ($urandom % 10)
        0, 1, 2: if (main_lcv != ref_end) begin inc = 1'b1; main_lcv += 2; end
        3, 4:    begin dec = 1'b1; main_lcv -= 2; end
        5, 6:    begin einc = 1'b1; ref_end += 2; end
        7:       if ($urandom % 10 == 0) begin
                   load = 1'b1;
                   main_lcv = 1024 + 2 * ($urandom % 64);
                   ref_end  = main_lcv + 2 * ($urandom % 4);
                   llcv = LCV_W'(main_lcv); lend = LCV_W'(ref_end);
                 end
        default: ;
      endcase
      if (!load && einc && dec) ; // both allowed in one cycle
    end
    checks++;
    if (stem_seen == 0) begin failures++; $display("LCV never became empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
