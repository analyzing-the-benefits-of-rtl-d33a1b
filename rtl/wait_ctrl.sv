// wait_ctrl: the Inlet-processor's side of the POST/SWAP handshake: WAIT,
// the stall on HOLD, and the Inlet-processor's copy of fp.
//
// A POST from an inlet must not interleave with a SWAP of the
// Main-processor. The critical part of a POST starts with cmp fp,ifp: is
// the message for the frame that is running now (fp, kept in both
// processors) or for another one (then the thread goes to that frame's
// remote continuation vector, RCV, instead of the LCV)? That cmp sets WAIT,
// and WAIT stays set until the inlet's closing `next` instruction, after the
// thread has been pushed on the LCV or RCV or the frame has been enqueued.
// Conversely, while the Main-processor holds HOLD (it has committed to a
// SWAP) the Inlet-processor is stalled, and the fp copy is invalid: setting
// HOLD invalidates it, and the SWAP loads the new frame's fp (fp_load_i).
//
// Timing: post_cmp_i and next_i are high in the execute cycle of those
// instructions; WAIT and post_lcv_o (the cmp result: 1 = the message is for
// the running frame, post to the LCV) change at the following clock edge.
// stall_o is combinational and also covers the cycle in which the
// Main-processor's cbs is setting HOLD (hold_set_i): a cmp fp,ifp in that
// cycle is stalled and does not set WAIT, so HOLD and WAIT are never both
// set. That tie-break, and the explicit valid bit on the fp copy, are this
// design's choices; the document does not discuss the same-cycle case.
module wait_ctrl
  import tam_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              post_cmp_i,   // cmp fp,ifp of a POST in execute
  input  logic [ADDR_W-1:0] ifp_i,        // frame the message is for
  input  logic              next_i,       // `next` (end of the inlet) in execute
  input  logic              hold_i,       // HOLD from the Main-processor
  input  logic              hold_set_i,   // cbs is setting HOLD this cycle
  input  logic              fp_load_i,    // SWAP installs a new running frame
  input  logic [ADDR_W-1:0] fp_i,
  output logic              wait_o,
  output logic              post_lcv_o,   // last cmp: message for the running frame
  output logic              fp_valid_o,
  output logic              stall_o       // Inlet-processor pipeline must stall
);

  logic [ADDR_W-1:0] fp_q;

  assign stall_o = hold_i || hold_set_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_o     <= 1'b0;
      post_lcv_o <= 1'b0;
    end else if (!stall_o && post_cmp_i) begin
      wait_o     <= 1'b1;
      post_lcv_o <= fp_valid_o && (fp_q == ifp_i);
    end else if (!stall_o && next_i) begin
      wait_o     <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_q       <= '0;
      fp_valid_o <= 1'b0;
    end else if (hold_set_i) begin
      fp_valid_o <= 1'b0;
    end else if (fp_load_i) begin
      fp_q       <= fp_i;
      fp_valid_o <= 1'b1;
    end
  end

  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(wait_o && hold_i));

endmodule
