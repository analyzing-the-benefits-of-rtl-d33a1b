// cdbp_unit: next-thread logic of the Main-processor (cdbp, std, r_ntp,
// r_ltp) and the INCLCV / DECLCV control lines.
//
// TAM threads end by jumping to the next enabled thread. To make that cheap
// the thread pointer on top of the LCV (the entry at lcv) is kept in
// register r_ntp, and the instruction cdbp (conditional double branch and
// pop) ends a synchronizing FORK or a STOP: if the decremented entry count
// is zero it jumps to the forked thread (thr_addr); otherwise it jumps to
// r_ntp and pops: lcv moves past that entry (INCLCV) and r_ntp is refilled.
// The leave-thread pointer, which must run last in a quantum, is not kept
// in the LCV but in register r_ltp. In the stage after the pop, STEM says
// whether the pop emptied the LCV: if so r_ltp is moved into r_ntp
// (ltp_move_o); if not, the processor's load path fetches the new top,
// halfword [lcv], into r_ntp (pop_o requests it; the data return on
// ntp_wr_i / ntp_wdata_i, the port also used by CHECK's delay-slot lduh and
// by a push, which makes the pushed pointer the new r_ntp).
//
// Control lines to the Inlet-processor, both asserted in the execute cycle:
//   INCLCV = cdbp, count not zero, and r_ntp is not the leave-thread pointer
//   DECLCV = a std (store thread pointer with decrement) addressed via lcv
// The document defines INCLCV as cdbp with a non-zero count; the extra term
// is this design's. Once the LCV ran empty r_ntp holds the leave-thread
// pointer, which is not an LCV entry: jumping to it must not move lcv, even
// if an inlet has meanwhile posted a thread at lcvend (STEM = 0 again). That
// thread is then picked up by CHECK in the leave-thread. Gating on STEM
// instead would pop, and lose, such a thread.
//
// Timing: jump_o, target_o, INCLCV and DECLCV are combinational in execute;
// pop_o and ltp_move_o are valid in the following cycle; r_ntp / r_ltp
// change at clock edges.
module cdbp_unit
  import tam_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cdbp_i,        // cdbp in execute
  input  logic            count_zero_i,  // zero bit from the entry-count subcc
  input  logic [TP_W-1:0] thr_addr_i,    // thread forked by this FORK
  input  logic            stem_i,        // LCV empty (from lcv_mirror)
  input  logic            std_lcv_i,     // std addressed via lcv in execute
  input  logic            ntp_wr_i,      // load result / pushed pointer for r_ntp
  input  logic [TP_W-1:0] ntp_wdata_i,
  input  logic            ltp_wr_i,      // set the leave-thread pointer
  input  logic [TP_W-1:0] ltp_wdata_i,
  output logic            jump_o,        // cdbp transfers control
  output logic [TP_W-1:0] target_o,
  output logic            inclcv_o,
  output logic            declcv_o,
  output logic            pop_o,         // stage after a pop: load [lcv] into r_ntp
  output logic            ltp_move_o,    // stage after a pop: r_ltp moves into r_ntp
  output logic [TP_W-1:0] r_ntp_o,
  output logic [TP_W-1:0] r_ltp_o
);

  logic popped_q;   // an INCLCV happened in the previous cycle

  assign jump_o     = cdbp_i;
  assign target_o   = count_zero_i ? thr_addr_i : r_ntp_o;
  assign inclcv_o   = cdbp_i && !count_zero_i && (r_ntp_o != r_ltp_o);
  assign declcv_o   = std_lcv_i;
  assign ltp_move_o = popped_q && stem_i;
  assign pop_o      = popped_q && !stem_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      popped_q <= 1'b0;
      r_ntp_o  <= '0;
      r_ltp_o  <= '0;
    end else begin
      popped_q <= inclcv_o;
      if (ltp_wr_i)      r_ltp_o <= ltp_wdata_i;
      if (ltp_move_o)    r_ntp_o <= r_ltp_o;
      else if (ntp_wr_i) r_ntp_o <= ntp_wdata_i;
    end
  end

  a_no_inc_dec: assert property (@(posedge clk) disable iff (!rst_n) !(inclcv_o && declcv_o));

endmodule
