// lcv_mirror: the Inlet-processor's copy of lcv, its lcvend and STEM.
//
// The local continuation vector (LCV) is kept as a queue-stack: the
// Main-processor pushes and pops thread pointers at the top (pointer lcv,
// a Main-processor register) while the Inlet-processor, posting threads from
// inlets, pushes at the bottom (pointer lcvend, an Inlet-processor register).
// The stack is empty when lcv = lcvend. So that the Inlet-processor can see
// this without a bus between the two processors, it keeps an identical copy
// of lcv that only the Main-processor changes, through the control lines
// INCLCV (cdbp popped a thread) and DECLCV (std pushed one). A 16-bit adder
// steps the copy in the same cycle the Main-processor's own lcv changes.
// STEM (stack empty) = (lcv copy == lcvend) goes back to the Main-processor.
//
// Layout assumed here: thread pointers are halfwords (they are popped with
// lduh), so STEP = 2 bytes; the live entries occupy [lcv, lcvend): the top
// is at lcv, a Main-processor push writes lcv-2 and lowers lcv, a pop reads
// lcv and raises it, an Inlet-processor push writes lcvend and raises it.
//
// Timing: all inputs are sampled at the clock edge closing the execute
// cycle in which they are asserted; stem_o is combinational from the
// registers, so it is valid in the cycle after an lcv update (the stage
// after execute). load_i (both pointers set, when a frame becomes running)
// is this design's addition; the document leaves frame switching to SWAP.
module lcv_mirror
  import tam_pkg::*;
#(
  parameter int unsigned STEP = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inclcv_i,       // from the Main-processor
  input  logic             declcv_i,       // from the Main-processor
  input  logic             lcvend_inc_i,   // Inlet-processor pushed at the bottom
  input  logic             load_i,
  input  logic [LCV_W-1:0] load_lcv_i,
  input  logic [LCV_W-1:0] load_lcvend_i,
  output logic [LCV_W-1:0] lcv_o,
  output logic [LCV_W-1:0] lcvend_o,
  output logic             stem_o
);

  logic [LCV_W-1:0] step_v;

  // The 16-bit incrementer/decrementer of the lcv copy.
  always_comb begin
    step_v = '0;
    if (inclcv_i)      step_v = LCV_W'(STEP);
    else if (declcv_i) step_v = -LCV_W'(STEP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcv_o    <= '0;
      lcvend_o <= '0;
    end else if (load_i) begin
      lcv_o    <= load_lcv_i;
      lcvend_o <= load_lcvend_i;
    end else begin
      lcv_o <= lcv_o + step_v;
      if (lcvend_inc_i) lcvend_o <= lcvend_o + LCV_W'(STEP);
    end
  end

  assign stem_o = (lcv_o == lcvend_o);

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(inclcv_i && declcv_i));
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   (inclcv_i && !load_i) |-> !stem_o);

endmodule
