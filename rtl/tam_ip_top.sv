// tam_ip_top: Main-processor / Inlet-processor interface for TAM.
//
// A Threaded Abstract Machine (TAM) program runs its threads on a stock
// SPARC (the Main-processor) while a second, dedicated processor (the
// Inlet-processor) runs the inlets that receive messages. Threads and
// inlets share two kinds of state in the activation frame: entry counters
// (decremented by FORK and POST) and the local continuation vector LCV
// (pushed by FORK and POST, popped by STOP, emptied before SWAP). This
// module is the hardware that keeps those accesses atomic:
//   * micbus_arbiter + micbus + frame_memory: the shared MICBus to the
//     Common Cache, equal priority for both processors;
//   * slock_ctrl (one per processor) + sync_compare: SLOCK, latch L and
//     the comparator that stall an lds to an entry counter the other
//     processor is in the middle of decrementing;
//   * lcv_mirror: the Inlet-processor's copy of lcv (kept in step by INCLCV
//     and DECLCV), its lcvend, and STEM (LCV empty);
//   * cdbp_unit: r_ntp / r_ltp and the cdbp/std logic that drives INCLCV and
//     DECLCV;
//   * cbs_unit and wait_ctrl: the CHECK handshake (STEM, WAIT, HOLD) that
//     keeps a SWAP from overtaking a POST, and the Inlet-processor's copy of
//     fp that decides whether a POST goes to the LCV or to an RCV.
// The two processors themselves, the Inlet Cache, the network interface and
// the MBus / Main Memory are outside; their signals are this module's ports.
//
// Bus protocol: each processor holds its request (micbus_req_t) until
// *_ready_o is high at a clock edge; load data return one cycle later with
// *_rvalid_o. An lds whose counter is locked by the other processor is kept
// off the bus (*_lds_stall_o) until that processor clears SLOCK. While HOLD
// is set the Inlet-processor is stalled (inlet_stall_o) and its requests are
// kept off the bus. An access that completes counts as the lds start
// (lds = 1) or, for a store, as the end of the counter sequence (stb done).
module tam_ip_top
  import tam_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned LCV_STEP  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // MICBus, Main-processor side
  input  micbus_req_t       main_req_i,
  output logic              main_ready_o,
  output logic              main_rvalid_o,
  output logic              main_lds_stall_o,
  input  logic              main_zero_i,      // its subcc set the zero bit
  // MICBus, Inlet-processor side
  input  micbus_req_t       inlet_req_i,
  output logic              inlet_ready_o,
  output logic              inlet_rvalid_o,
  output logic              inlet_lds_stall_o,
  input  logic              inlet_zero_i,
  output logic [DATA_W-1:0] rdata_o,
  output logic [1:0]        micbus_gnt_o,     // current MICBus grant
  output logic              store_hold_o,     // MICBus held for a store's 2nd cycle
  output logic [1:0]        sync_ok_o,        // SYNC_OK of each processor
  // Main-processor execute stage
  input  logic              ex_valid_i,
  input  logic [31:0]       ex_inst_i,
  input  logic              cdbp_i,
  input  logic              count_zero_i,
  input  logic [TP_W-1:0]   thr_addr_i,
  input  logic              std_lcv_i,
  input  logic              ntp_wr_i,
  input  logic [TP_W-1:0]   ntp_wdata_i,
  input  logic              ltp_wr_i,
  input  logic [TP_W-1:0]   ltp_wdata_i,
  output logic              jump_o,
  output logic [TP_W-1:0]   target_o,
  output logic              pop_o,
  output logic              ltp_move_o,
  output logic [TP_W-1:0]   r_ntp_o,
  output logic [TP_W-1:0]   r_ltp_o,
  output logic              inclcv_o,
  output logic              declcv_o,
  output logic              cbs_valid_o,      // a cbs is in execute
  output logic              cbs_taken_o,
  output logic              cbs_annul_o,
  output logic              cbs_stall_o,
  output logic [31:0]       cbs_disp_o,
  output logic              hold_o,
  // Inlet-processor execute stage
  input  logic              post_cmp_i,
  input  logic [ADDR_W-1:0] ifp_i,            // frame of the message at cmp fp,ifp
  input  logic              fp_load_i,        // SWAP: new running frame
  input  logic [ADDR_W-1:0] fp_i,
  output logic              post_lcv_o,       // cmp fp,ifp result: post to the LCV
  output logic              fp_valid_o,
  input  logic              next_i,
  input  logic              lcvend_inc_i,
  input  logic              lcv_load_i,
  input  logic [LCV_W-1:0]  lcv_load_val_i,
  input  logic [LCV_W-1:0]  lcvend_load_val_i,
  output logic              wait_o,
  output logic              inlet_stall_o,
  output logic              stem_o,
  output logic [LCV_W-1:0]  lcv_copy_o,
  output logic [LCV_W-1:0]  lcvend_o
);

  micbus_req_t       m_req [2];
  logic [1:0]        req_gated, gnt, ready, rvalid;
  logic              slock [2];
  logic [ADDR_W-1:0] lock_addr [2];
  logic              lds_req [2];
  logic [ADDR_W-1:0] lds_addr [2];
  logic [1:0]        cmp, sync_ok, lds_stall;  // cmp is implied by sync_ok; kept for probing
  logic              zero_bit [2];
  logic              hold_set;

  logic              s_valid, s_we, s_ready, s_hold, s_rvalid;
  acc_size_e         s_size;
  logic [ADDR_W-1:0] s_addr;
  logic [DATA_W-1:0] s_wdata, s_rdata;

  assign m_req[P_MAIN]  = main_req_i;
  assign m_req[P_INLET] = inlet_req_i;
  assign zero_bit[P_MAIN]  = main_zero_i;
  assign zero_bit[P_INLET] = inlet_zero_i;

  // ---------------------------------------------------------------- counters
  for (genvar p = 0; p < 2; p++) begin : g_proc
    assign lds_req[p]  = m_req[p].req && m_req[p].lds && !m_req[p].we;
    assign lds_addr[p] = m_req[p].addr;

    slock_ctrl u_slock (
      .clk, .rst_n,
      .lds_start_i (ready[p] && m_req[p].lds && !m_req[p].we),
      .addr_i      (m_req[p].addr),
      .zero_i      (zero_bit[p]),
      .stb_done_i  (ready[p] && m_req[p].we),
      .slock_o     (slock[p]),
      .lock_addr_o (lock_addr[p])
    );
  end

  sync_compare u_cmp (
    .lds_req_i   (lds_req),
    .addr_i      (lds_addr),
    .slock_i     (slock),
    .lock_addr_i (lock_addr),
    .cmp_o       (cmp),
    .sync_ok_o   (sync_ok),
    .stall_o     (lds_stall)
  );

  // ---------------------------------------------------------------- MICBus
  assign req_gated[P_MAIN]  = main_req_i.req  && !lds_stall[P_MAIN];
  assign req_gated[P_INLET] = inlet_req_i.req && !lds_stall[P_INLET] && !inlet_stall_o;

  micbus_arbiter u_arb (
    .clk, .rst_n,
    .req_i  (req_gated),
    .hold_i (s_hold),
    .gnt_o  (gnt)
  );

  micbus u_bus (
    .clk, .rst_n,
    .m_req_i    (m_req),
    .gnt_i      (gnt),
    .ready_o    (ready),
    .rvalid_o   (rvalid),
    .rdata_o    (rdata_o),
    .s_valid_o  (s_valid),
    .s_we_o     (s_we),
    .s_size_o   (s_size),
    .s_addr_o   (s_addr),
    .s_wdata_o  (s_wdata),
    .s_ready_i  (s_ready),
    .s_rdata_i  (s_rdata),
    .s_rvalid_i (s_rvalid)
  );

  frame_memory #(.MEM_BYTES(MEM_BYTES)) u_common_cache (
    .clk, .rst_n,
    .valid_i  (s_valid),
    .we_i     (s_we),
    .size_i   (s_size),
    .addr_i   (s_addr),
    .wdata_i  (s_wdata),
    .ready_o  (s_ready),
    .hold_o   (s_hold),
    .rdata_o  (s_rdata),
    .rvalid_o (s_rvalid)
  );

  assign micbus_gnt_o      = gnt;
  assign store_hold_o      = s_hold;
  assign sync_ok_o         = sync_ok;
  assign main_ready_o      = ready[P_MAIN];
  assign inlet_ready_o     = ready[P_INLET];
  assign main_rvalid_o     = rvalid[P_MAIN];
  assign inlet_rvalid_o    = rvalid[P_INLET];
  assign main_lds_stall_o  = lds_stall[P_MAIN];
  assign inlet_lds_stall_o = lds_stall[P_INLET];

  // ---------------------------------------------------------------- LCV
  lcv_mirror #(.STEP(LCV_STEP)) u_lcv (
    .clk, .rst_n,
    .inclcv_i      (inclcv_o),
    .declcv_i      (declcv_o),
    .lcvend_inc_i  (lcvend_inc_i),
    .load_i        (lcv_load_i),
    .load_lcv_i    (lcv_load_val_i),
    .load_lcvend_i (lcvend_load_val_i),
    .lcv_o         (lcv_copy_o),
    .lcvend_o      (lcvend_o),
    .stem_o        (stem_o)
  );

  cdbp_unit u_cdbp (
    .clk, .rst_n,
    .cdbp_i       (cdbp_i),
    .count_zero_i (count_zero_i),
    .thr_addr_i   (thr_addr_i),
    .stem_i       (stem_o),
    .std_lcv_i    (std_lcv_i),
    .ntp_wr_i     (ntp_wr_i),
    .ntp_wdata_i  (ntp_wdata_i),
    .ltp_wr_i     (ltp_wr_i),
    .ltp_wdata_i  (ltp_wdata_i),
    .jump_o       (jump_o),
    .target_o     (target_o),
    .inclcv_o     (inclcv_o),
    .declcv_o     (declcv_o),
    .pop_o        (pop_o),
    .ltp_move_o   (ltp_move_o),
    .r_ntp_o      (r_ntp_o),
    .r_ltp_o      (r_ltp_o)
  );

  // ---------------------------------------------------------------- CHECK
  cbs_unit u_cbs (
    .clk, .rst_n,
    .ex_valid_i (ex_valid_i),
    .ex_inst_i  (ex_inst_i),
    .stem_i     (stem_o),
    .wait_i     (wait_o),
    .cdbp_i     (cdbp_i),
    .is_cbs_o   (cbs_valid_o),
    .taken_o    (cbs_taken_o),
    .annul_o    (cbs_annul_o),
    .hold_set_o (hold_set),
    .stall_o    (cbs_stall_o),
    .disp_o     (cbs_disp_o),
    .hold_o     (hold_o)
  );

  wait_ctrl u_wait (
    .clk, .rst_n,
    .post_cmp_i (post_cmp_i),
    .ifp_i      (ifp_i),
    .next_i     (next_i),
    .fp_load_i  (fp_load_i),
    .fp_i       (fp_i),
    .post_lcv_o (post_lcv_o),
    .fp_valid_o (fp_valid_o),
    .hold_i     (hold_o),
    .hold_set_i (hold_set),
    .wait_o     (wait_o),
    .stall_o    (inlet_stall_o)
  );

  // Atomicity of the entry counters: never both SLOCKs on one address.
  a_one_lock: assert property (@(posedge clk) disable iff (!rst_n)
      !(slock[0] && slock[1] && lock_addr[0] == lock_addr[1]));

endmodule
