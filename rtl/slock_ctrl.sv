// slock_ctrl: SLOCK flag and address latch L of one processor.
//
// A FORK on the Main-processor and a POST on the Inlet-processor both
// decrement an entry counter in the frame with a load / subtract / store
// sequence. To make that read-modify-write atomic between the two
// processors, the load is done with a new instruction, lds (load
// synchronization counter). When an lds begins its bus access, the counter
// address is captured in the edge-triggered latch L and SLOCK is set. SLOCK
// stays set until the sequence ends: either the decremented count is zero
// (the zero bit is set; nothing is stored back) or the store-back stb
// completes. The compare logic (sync_compare) uses SLOCK and L to stall the
// other processor's lds to the same counter meanwhile.
//
// Timing: lds_start_i is high in the cycle the lds is accepted on the MICBus;
// SLOCK and L take effect from the next clock edge. zero_i or stb_done_i
// clears SLOCK at the next edge. A new lds_start_i wins over a clear in the
// same cycle. In the document SLOCK is raised slightly after the address so
// that L can capture it; here both are registered at the same edge, which
// gives the same order.
module slock_ctrl
  import tam_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lds_start_i,  // lds accepted on the MICBus this cycle
  input  logic [ADDR_W-1:0] addr_i,       // its counter address
  input  logic              zero_i,       // subcc set the zero bit: count reached 0
  input  logic              stb_done_i,   // store-back of the counter completed
  output logic              slock_o,
  output logic [ADDR_W-1:0] lock_addr_o   // contents of latch L
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slock_o     <= 1'b0;
      lock_addr_o <= '0;
    end else if (lds_start_i) begin
      slock_o     <= 1'b1;
      lock_addr_o <= addr_i;
    end else if (zero_i || stb_done_i) begin
      slock_o     <= 1'b0;
    end
  end

endmodule
