// cbs_unit: cbs (conditional branch and stall) and the HOLD flag of the
// Main-processor.
//
// When the LCV runs empty the Main-processor reaches the leave-thread, whose
// SWAP switches to another frame. An inlet may be posting a thread to this
// very frame at that moment, so the first instruction of the leave-thread,
// cbs (the TL0 CHECK), looks at two lines from the Inlet-processor:
// STEM (LCV empty) and WAIT (an inlet is inside the critical part of a
// POST), and acts as follows:
//   STEM=0          : the LCV has a newly posted thread: branch to the STOP
//                     code; the delay slot (lduh [lcv], r_ntp) pops it.
//   STEM=1, WAIT=0  : no post pending: set HOLD (stalls the Inlet-processor,
//                     the frame is terminated irreversibly) and fall through
//                     into the rest of the leave-thread and its SWAP.
//   STEM=1, WAIT=1  : stall the Main-processor until WAIT drops, then decide
//                     again.
// HOLD is cleared by the cdbp that ends the SWAP (clearing it at any other
// cdbp is harmless since it is then already 0).
//
// cbs is a SPARC format-2 instruction with op = 0 and op2 = 5; like Bicc it
// carries an annul bit (inst[29]) and a 22-bit word displacement. With
// cbs,a the delay slot is annulled when the branch is not taken. The branch
// target adder is the processor's own; this unit supplies the sign-extended
// byte displacement. Timing: decisions are combinational in the execute
// cycle; HOLD is a register set/cleared at the clock edge.
module cbs_unit
  import tam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ex_valid_i,   // an instruction is in execute
  input  logic [31:0] ex_inst_i,
  input  logic        stem_i,
  input  logic        wait_i,
  input  logic        cdbp_i,       // cdbp in execute: clears HOLD
  output logic        is_cbs_o,
  output logic        taken_o,      // Table 1 cases 1 and 2
  output logic        annul_o,      // delay slot annulled
  output logic        hold_set_o,   // case 3, this cycle
  output logic        stall_o,      // case 4
  output logic [31:0] disp_o,       // branch displacement in bytes
  output logic        hold_o        // HOLD line to the Inlet-processor
);

  assign is_cbs_o   = ex_valid_i && (ex_inst_i[31:30] == SPARC_OP_FMT2)
                                 && (ex_inst_i[24:22] == SPARC_OP2_CBS);
  assign taken_o    = is_cbs_o && !stem_i;
  assign hold_set_o = is_cbs_o && stem_i && !wait_i;
  assign stall_o    = is_cbs_o && stem_i && wait_i;
  assign annul_o    = is_cbs_o && ex_inst_i[29] && !taken_o && !stall_o;
  assign disp_o     = {{8{ex_inst_i[21]}}, ex_inst_i[21:0], 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          hold_o <= 1'b0;
    else if (hold_set_o) hold_o <= 1'b1;
    else if (cdbp_i)     hold_o <= 1'b0;
  end

  a_cases: assert property (@(posedge clk) disable iff (!rst_n)
                            $onehot0({taken_o, hold_set_o, stall_o}));

endmodule
