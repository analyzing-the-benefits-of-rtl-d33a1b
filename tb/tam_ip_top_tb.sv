// tam_ip_top_tb: end-to-end test of the Main-processor / Inlet-processor
// interface, at the design's default parameters.
//
// The two processors are modelled here at the level of their bus requests
// and execute-stage strobes; the interface logic is the real RTL.
//
// Phase 1, bus costs: a FORK-style counter update (lds, subcc, stb) must
//   hold the MICBus for one cycle for the lds and two for the stb; when the
//   count reaches zero only the lds cycle is used.
// Phase 2, counter atomicity: both processors decrement one shared entry
//   counter many times, with random gaps and with the Main-processor also
//   fetching instructions over the same bus. Every decrement must see a
//   distinct value (no lost update) and exactly one must reach zero.
// Phase 3, LCV and CHECK/SWAP: the Main-processor runs threads, pushes
//   threads on top of the LCV (std / DECLCV) and pops them with cdbp
//   (INCLCV), while the Inlet-processor posts threads at the bottom (lcvend)
//   inside WAIT-protected POST sections. When the LCV runs empty the
//   Main-processor runs the leave-thread: CHECK (cbs) either pops a freshly
//   posted thread, stalls while a POST is in progress, or sets HOLD and
//   swaps to a new frame, during which the Inlet-processor is stalled.
//   Every thread posted to the running frame or pushed by a FORK must run
//   exactly once; the Inlet-processor's lcv copy must match the
//   Main-processor's lcv at every thread start; a cdbp with an empty LCV
//   must go to the leave-thread.
// Each mechanism (bus contention, two-cycle store, counter stall, count
// reaching zero, INCLCV, DECLCV, bottom push, r_ltp move, pop refill,
// CHECK cases 1 to 4, Inlet-processor stalled by HOLD) is counted and must
// occur at least once.
module tam_ip_top_tb;
  import tam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT signals
  micbus_req_t main_req, inlet_req;
  logic main_ready, main_rvalid, main_lds_stall, main_zero;
  logic inlet_ready, inlet_rvalid, inlet_lds_stall, inlet_zero;
  logic [DATA_W-1:0] rdata;
  logic ex_valid, cdbp, count_zero, std_lcv, ntp_wr, ltp_wr;
  logic [31:0] ex_inst;
  logic [TP_W-1:0] thr_addr, ntp_wdata, ltp_wdata;
  logic jump, pop, ltp_move, inclcv, declcv, cbs_taken, cbs_annul, cbs_stall, hold;
  logic [TP_W-1:0] target, r_ntp, r_ltp;
  logic cbs_valid;
  logic [31:0] cbs_disp;
  logic post_cmp, next_i, lcvend_inc, lcv_load;
  logic [LCV_W-1:0] lcv_load_val, lcvend_load_val, lcv_copy, lcvend;
  logic waitl, inlet_stall, stem, store_hold;
  logic fp_load, post_lcv, fp_valid;
  logic [31:0] fp_val, ifp;
  logic [1:0] gnt, sync_ok;

  tam_ip_top dut (
    .clk, .rst_n,
    .main_req_i(main_req), .main_ready_o(main_ready), .main_rvalid_o(main_rvalid),
    .main_lds_stall_o(main_lds_stall), .main_zero_i(main_zero),
    .inlet_req_i(inlet_req), .inlet_ready_o(inlet_ready), .inlet_rvalid_o(inlet_rvalid),
    .inlet_lds_stall_o(inlet_lds_stall), .inlet_zero_i(inlet_zero), .rdata_o(rdata),
    .micbus_gnt_o(gnt), .store_hold_o(store_hold), .sync_ok_o(sync_ok),
    .ex_valid_i(ex_valid), .ex_inst_i(ex_inst), .cdbp_i(cdbp), .count_zero_i(count_zero),
    .thr_addr_i(thr_addr), .std_lcv_i(std_lcv), .ntp_wr_i(ntp_wr), .ntp_wdata_i(ntp_wdata),
    .ltp_wr_i(ltp_wr), .ltp_wdata_i(ltp_wdata), .jump_o(jump), .target_o(target), .pop_o(pop),
    .ltp_move_o(ltp_move), .r_ntp_o(r_ntp), .r_ltp_o(r_ltp), .cbs_valid_o(cbs_valid), .inclcv_o(inclcv), .declcv_o(declcv),
    .cbs_taken_o(cbs_taken), .cbs_annul_o(cbs_annul), .cbs_stall_o(cbs_stall),
    .cbs_disp_o(cbs_disp), .hold_o(hold),
    .post_cmp_i(post_cmp), .ifp_i(ifp), .fp_load_i(fp_load), .fp_i(fp_val),
    .post_lcv_o(post_lcv), .fp_valid_o(fp_valid), .next_i(next_i), .lcvend_inc_i(lcvend_inc), .lcv_load_i(lcv_load),
    .lcv_load_val_i(lcv_load_val), .lcvend_load_val_i(lcvend_load_val),
    .wait_o(waitl), .inlet_stall_o(inlet_stall), .stem_o(stem), .lcv_copy_o(lcv_copy),
    .lcvend_o(lcvend)
  );

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int n_contention = 0, n_store_hold = 0, n_sync_stall = 0, n_zero = 0;
  int n_inclcv = 0, n_declcv = 0, n_bottom_push = 0, n_ltp_move = 0, n_pop = 0;
  int n_case1 = 0, n_case2 = 0, n_case3 = 0, n_case4 = 0, n_hold_stall = 0, n_swap = 0;
  int main_gnt_cycles = 0, n_sync_ok = 0, n_stale_fp = 0, inlet_gnt_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (main_req.req && inlet_req.req && !main_lds_stall && !inlet_lds_stall && !inlet_stall)
      n_contention++;
    if (store_hold) n_store_hold++;
    if (main_lds_stall || inlet_lds_stall) n_sync_stall++;
    if (inclcv) n_inclcv++;
    if (declcv) n_declcv++;
    if (lcvend_inc) n_bottom_push++;
    if (ltp_move) n_ltp_move++;
    if (pop) n_pop++;
    if (cbs_stall) n_case4++;
    if (inlet_stall && (inlet_req.req || post_cmp)) n_hold_stall++;
    if (gnt[P_MAIN]) main_gnt_cycles++;
    if (gnt[P_INLET]) inlet_gnt_cycles++;
    if (sync_ok != 2'b00) n_sync_ok++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus models
  // Convention: requests and strobes are driven right after a falling edge
  // and outputs are sampled 2 time units later.
  task automatic m_bus(input bit we, input bit lds, input acc_size_e sz, input logic [31:0] a,
                       input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    main_req = '{req: 1'b1, we: we, lds: lds, size: sz, addr: a, wdata: d};
    forever begin
      #2;
      if (main_ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 main_req.req = 1'b0;
    q = '0;
    if (!we) begin
      @(negedge clk);
      #2;
      check(main_rvalid, "Main-processor load data valid one cycle after the load");
      q = rdata;
    end
  endtask

  task automatic i_bus(input bit we, input bit lds, input acc_size_e sz, input logic [31:0] a,
                       input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    inlet_req = '{req: 1'b1, we: we, lds: lds, size: sz, addr: a, wdata: d};
    forever begin
      #2;
      if (inlet_ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 inlet_req.req = 1'b0;
    q = '0;
    if (!we) begin
      @(negedge clk);
      #2;
      check(inlet_rvalid, "Inlet-processor load data valid one cycle after the load");
      q = rdata;
    end
  endtask

  // Decrement an entry counter: lds, subcc, then stb or (count zero) nothing.
  task automatic m_count(input logic [31:0] a, output int val);
    logic [31:0] q;
    m_bus(1'b0, 1'b1, SZ_BYTE, a, '0, q);
    val = int'(q[7:0]) - 1;
    if (val == 0) begin
      @(negedge clk); main_zero = 1'b1; @(negedge clk); main_zero = 1'b0;
    end else begin
      m_bus(1'b1, 1'b0, SZ_BYTE, a, 32'(val), q);
    end
  endtask

  task automatic i_count(input logic [31:0] a, output int val);
    logic [31:0] q;
    i_bus(1'b0, 1'b1, SZ_BYTE, a, '0, q);
    val = int'(q[7:0]) - 1;
    if (val == 0) begin
      @(negedge clk); inlet_zero = 1'b1; @(negedge clk); inlet_zero = 1'b0;
    end else begin
      i_bus(1'b1, 1'b0, SZ_BYTE, a, 32'(val), q);
    end
  endtask

  // ------------------------------------------------------------ phase 2 data
  localparam int N_EACH = 30;
  int seen [$];

  // ------------------------------------------------------------ phase 3 state
  localparam logic [31:0] CBS_A_STOP = {2'b00, 1'b1, 4'b1000, 3'd5, 22'h3FFFF0}; // cbs,a stop
  int unsigned m_lcv;              // the Main-processor's own lcv
  int cur_frame;                   // frame the Main-processor is running
  logic [TP_W-1:0] cur_ltp;
  int enabled [int];               // threads expected to run: id -> times run
  int n_expected = 0, n_run = 0, n_to_rcv = 0;
  int next_main_id = 'h1000, next_inlet_id = 'h3000;
  bit inlet_done = 1'b0, main_done = 1'b0;
  int main_push_budget;

  function automatic logic [31:0] frame_fp(int f);
    return 32'h0001_0000 + 32'(f) * 32'h100;      // distinct per frame
  endfunction

  function automatic int unsigned frame_base(int f);
    return 'h400 + (f % 5) * 'h200;
  endfunction

  task automatic pulse_ntp(input logic [TP_W-1:0] v);
    @(negedge clk); ntp_wr = 1'b1; ntp_wdata = v;
    @(negedge clk); ntp_wr = 1'b0;
  endtask

  // FORK push: std the pointer just above the top and make it the new r_ntp.
  task automatic m_push(input logic [TP_W-1:0] t);
    logic [31:0] q;
    m_bus(1'b1, 1'b0, SZ_HALF, m_lcv - 2, 32'(t), q);
    enabled[int'(t)] = 0; n_expected++;
    @(negedge clk); std_lcv = 1'b1; ntp_wr = 1'b1; ntp_wdata = t;
    #2 check(declcv, "std via lcv raises DECLCV");
    @(negedge clk); std_lcv = 1'b0; ntp_wr = 1'b0;
    m_lcv -= 2;
  endtask

  // STOP / failed synchronization: cdbp with a non-zero count.
  task automatic m_cdbp(output logic [TP_W-1:0] t);
    logic [31:0] q;
    bit was_empty, did_inc, want_pop, want_move;
    @(negedge clk); cdbp = 1'b1; count_zero = 1'b0;
    #2; t = target; was_empty = stem; did_inc = inclcv;
    check(jump && t == r_ntp, "cdbp jumps to r_ntp");
    check(did_inc == (t != cur_ltp), "INCLCV exactly when r_ntp is not the leave-thread");
    if (was_empty) check(t == cur_ltp, "empty LCV: cdbp goes to the leave-thread");
    @(negedge clk); cdbp = 1'b0;
    if (did_inc) begin
      m_lcv += 2;
      #2; want_pop = pop; want_move = ltp_move;
      check(want_pop != want_move, "after a pop: exactly one of refill and ltp move");
      if (want_pop) begin
        m_bus(1'b0, 1'b0, SZ_HALF, m_lcv, '0, q);
        pulse_ntp(q[15:0]);
      end else begin
        @(negedge clk);
        check(r_ntp == cur_ltp, "ltp moved into r_ntp");
      end
    end
  endtask

  // SWAP to the next frame, whose continuation vector already holds two threads.
  task automatic m_swap();
    logic [31:0] q;
    int unsigned b;
    cur_frame++;
    n_swap++;
    b = frame_base(cur_frame);
    repeat (3) begin
      @(negedge clk);
      #2 check(inlet_stall && hold, "Inlet-processor held during SWAP");
    end
    for (int k = 0; k < 2; k++) begin
      m_bus(1'b1, 1'b0, SZ_HALF, b + 2 * k, 32'(next_main_id), q);
      enabled[next_main_id] = 0; n_expected++; next_main_id++;
    end
    cur_ltp = 16'h0F00 + 16'(cur_frame);
    @(negedge clk);
    lcv_load = 1'b1; lcv_load_val = LCV_W'(b); lcvend_load_val = LCV_W'(b + 4);
    ltp_wr = 1'b1; ltp_wdata = cur_ltp;
    check(!fp_valid, "fp copy invalid during SWAP");
    fp_load = 1'b1; fp_val = frame_fp(cur_frame);
    @(negedge clk); lcv_load = 1'b0; ltp_wr = 1'b0; fp_load = 1'b0;
    m_lcv = b;
    m_bus(1'b0, 1'b0, SZ_HALF, b, '0, q);
    pulse_ntp(q[15:0]);
  endtask

  // Leave-thread: CHECK, then either back to STOP or SWAP. Returns 1 when
  // the leave-thread terminated the frame and the test has nothing left.
  task automatic m_leave(output bit finished);
    logic [31:0] q;
    bit decided = 1'b0;
    finished = 1'b0;
    while (!decided) begin
      @(negedge clk); ex_valid = 1'b1; ex_inst = CBS_A_STOP;
      #2;
      check(cbs_valid && r_ltp == cur_ltp, "cbs decoded in the leave-thread");
      if (cbs_taken) begin
        if (waitl) n_case2++; else n_case1++;
        check(!cbs_annul && !hold, "CHECK taken keeps its delay slot");
        @(negedge clk); ex_valid = 1'b0;
        m_bus(1'b0, 1'b0, SZ_HALF, m_lcv, '0, q);     // delay slot: lduh [lcv], r_ntp
        pulse_ntp(q[15:0]);
        decided = 1'b1;
      end else if (!cbs_stall) begin
        n_case3++;
        check(cbs_annul && stem && !waitl, "CHECK case 3: LCV empty, no POST, annulled slot");
        @(negedge clk); ex_valid = 1'b0;
        #2 check(hold, "HOLD set by CHECK case 3");
        decided = 1'b1;
        if (inlet_done && main_push_budget == 0) begin
          finished = 1'b1;
          @(negedge clk); cdbp = 1'b1; count_zero = 1'b1; thr_addr = '0;
          @(negedge clk); cdbp = 1'b0; count_zero = 1'b0;
          #2 check(!hold, "cdbp clears HOLD");
        end else begin
          logic [TP_W-1:0] t;
          m_swap();
          m_cdbp(t);                                    // cdbp at the end of SWAP
          #2 check(!hold, "cdbp at the end of SWAP clears HOLD");
          run_thread(t);
        end
      end
      // else case 4: stalled, try again next cycle
    end
    ex_valid = 1'b0;
  endtask

  task automatic run_thread(input logic [TP_W-1:0] t);
    logic [31:0] q;
    check(enabled.exists(int'(t)), $sformatf("thread %h was enabled", t));
    if (enabled.exists(int'(t))) begin
      check(enabled[int'(t)] == 0, $sformatf("thread %h runs only once", t));
      enabled[int'(t)]++;
    end
    n_run++;
    check(lcv_copy == LCV_W'(m_lcv), "Inlet-processor lcv copy matches the Main-processor's lcv");
    repeat ($urandom % 4) m_bus(1'b0, 1'b0, SZ_WORD, 32'h0080 + 4 * ($urandom % 16), '0, q);
    while (main_push_budget > 0 && ($urandom % 3 == 0)) begin
      main_push_budget--;
      m_push(16'(next_main_id));
      next_main_id++;
    end
  endtask

  task automatic main_lcv_loop();
    logic [TP_W-1:0] t;
    bit fin;
    fin = 1'b0;
    while (!fin) begin
      m_cdbp(t);
      if (t == cur_ltp) m_leave(fin);
      else run_thread(t);
    end
  endtask

  // POST: WAIT-protected section; to the running frame it pushes at lcvend.
  // aim_running: the message names the frame running when the inlet starts;
  // whether it still is by the time of cmp fp,ifp is the hardware's call.
  task automatic i_post(input int body, input int tail, input bit aim_running);
    logic [31:0] q;
    logic [TP_W-1:0] t;
    bit to_running;
    int aimed;
    t = 16'(next_inlet_id);
    next_inlet_id++;
    aimed = aim_running ? cur_frame : 1000 + int'(t);
    ifp = frame_fp(aimed);
    forever begin                       // cmp fp,ifp, retried while stalled
      @(negedge clk); post_cmp = 1'b1;
      #2;
      if (!inlet_stall) break;
    end
    @(negedge clk); post_cmp = 1'b0;
    #2 check(waitl, "WAIT set by cmp fp,ifp");
    to_running = post_lcv;
    check(to_running == (aimed == cur_frame), "cmp fp,ifp finds the running frame");
    if (aim_running && !to_running) n_stale_fp++;
    repeat (body) @(negedge clk);
    if (to_running) begin
      i_bus(1'b1, 1'b0, SZ_HALF, 32'(lcvend), 32'(t), q);
      enabled[int'(t)] = 0; n_expected++;
      @(negedge clk); lcvend_inc = 1'b1;
      @(negedge clk); lcvend_inc = 1'b0;
    end else begin
      i_bus(1'b1, 1'b0, SZ_HALF, 32'h0F80 + 2 * (n_to_rcv % 32), 32'(t), q);
      n_to_rcv++;
    end
    repeat (tail) @(negedge clk);
    @(negedge clk); next_i = 1'b1;
    @(negedge clk); next_i = 1'b0;
    #2 check(!waitl, "next clears WAIT");
  endtask

  // ------------------------------------------------------------ main flow
  initial begin : main_flow
    logic [31:0] q;
    int v, g0;
    main_req = '0; inlet_req = '0; main_zero = 0; inlet_zero = 0;
    ex_valid = 0; ex_inst = '0; cdbp = 0; count_zero = 0; thr_addr = '0; std_lcv = 0;
    ntp_wr = 0; ntp_wdata = '0; ltp_wr = 0; ltp_wdata = '0;
    fp_load = 0; fp_val = '0; ifp = '0;
    post_cmp = 0; next_i = 0; lcvend_inc = 0; lcv_load = 0; lcv_load_val = '0; lcvend_load_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- phase 1: bus occupancy of one counter update
    m_bus(1'b1, 1'b0, SZ_BYTE, 32'h104, 32'd5, q);
    m_bus(1'b1, 1'b0, SZ_BYTE, 32'h105, 32'd1, q);
    @(negedge clk); g0 = main_gnt_cycles;
    m_count(32'h104, v);
    check(v == 4, "counter 5 -> 4");
    check(main_gnt_cycles - g0 == 3, $sformatf("lds + stb hold the MICBus 1 + 2 cycles (saw %0d)", main_gnt_cycles - g0));
    @(negedge clk); g0 = main_gnt_cycles;
    m_count(32'h105, v);
    check(v == 0 && main_gnt_cycles - g0 == 1, "count reaching zero: only the lds cycle");
    n_zero += (v == 0);
    m_bus(1'b0, 1'b0, SZ_BYTE, 32'h104, '0, q);
    check(q[7:0] == 8'd4, "stored-back count");

    // ---- phase 2: both processors decrement one counter
    m_bus(1'b1, 1'b0, SZ_BYTE, 32'h100, 32'(2 * N_EACH), q);
    fork
      begin
        for (int i = 0; i < N_EACH; i++) begin
          int val;
          m_count(32'h100, val);
          seen.push_back(val);
          repeat ($urandom % 3) m_bus(1'b0, 1'b0, SZ_WORD, 32'h0040 + 4 * ($urandom % 8), '0, q);
        end
      end
      begin
        for (int i = 0; i < N_EACH; i++) begin
          int val;
          logic [31:0] qi;
          i_count(32'h100, val);
          seen.push_back(val);
          repeat ($urandom % 2) i_bus(1'b0, 1'b0, SZ_WORD, 32'h0060, '0, qi);
        end
      end
    join
    seen.sort();
    check(seen.size() == 2 * N_EACH, "all decrements done");
    for (int i = 0; i < seen.size(); i++) begin
      checks++;
      if (seen[i] != i) begin
        failures++;
        if (failures < 20) $display("FAIL: decrement %0d saw %0d (lost update)", i, seen[i]);
      end
    end
    foreach (seen[i]) if (seen[i] == 0) n_zero++;

    // ---- phase 3: LCV, CHECK and SWAP
    cur_frame = 0;
    cur_ltp = 16'h0F00;
    m_lcv = frame_base(0);
    @(negedge clk);
    lcv_load = 1'b1; lcv_load_val = LCV_W'(m_lcv); lcvend_load_val = LCV_W'(m_lcv);
    ltp_wr = 1'b1; ltp_wdata = cur_ltp; ntp_wr = 1'b1; ntp_wdata = cur_ltp;
    fp_load = 1'b1; fp_val = frame_fp(0);
    @(negedge clk); lcv_load = 1'b0; ltp_wr = 1'b0; ntp_wr = 1'b0; fp_load = 1'b0;
    #2 check(stem, "new frame: LCV empty");

    // 3a: directed CHECK case 4 then case 1: a POST is under way when the
    // leave-thread checks.
    fork
      begin
        logic [TP_W-1:0] t;
        repeat (3) @(negedge clk);                 // let the POST start first
        m_cdbp(t);
        check(t == cur_ltp, "empty LCV leads to the leave-thread");
        @(negedge clk); ex_valid = 1'b1; ex_inst = CBS_A_STOP;
        #2 check(cbs_stall, "CHECK stalls while WAIT (case 4)");
        @(negedge clk); ex_valid = 1'b0;
      end
      i_post(12, 0, 1'b1);
    join
    main_push_budget = 0;
    begin
      bit fin;
      m_leave(fin);                                // now case 1: the posted thread
    end
    // 3b: directed case 2: the thread is on the LCV but WAIT is still set.
    begin
      logic [TP_W-1:0] t;
      bit fin;
      m_cdbp(t); run_thread(t);                    // the thread posted in 3a
      m_cdbp(t);
      check(t == cur_ltp, "LCV empty again");
      fork
        i_post(0, 25, 1'b1);
        begin
          repeat (10) @(negedge clk);
          check(waitl && !stem, "POST pushed, WAIT still set");
          m_leave(fin);
        end
      join
      m_cdbp(t); run_thread(t);
      // 3b': directed case 1: the POST is complete before CHECK.
      m_cdbp(t);
      check(t == cur_ltp, "LCV empty once more");
      g0 = inlet_gnt_cycles;
      i_post(0, 0, 1'b1);
      check(inlet_gnt_cycles - g0 == 2, $sformatf("POST to the running frame holds the MICBus 2 cycles (saw %0d)", inlet_gnt_cycles - g0));
      m_leave(fin);
      m_cdbp(t); run_thread(t);
    end
    // 3c: random run with SWAPs; the Inlet-processor keeps posting.
    main_push_budget = 60;
    fork
      main_lcv_loop();
      begin
        for (int i = 0; i < 60; i++) begin
          repeat ($urandom % 12) @(negedge clk);
          i_post($urandom % 7, $urandom % 3, ($urandom % 5) != 0);
        end
        inlet_done = 1'b1;
      end
    join

    // ---- results
    check(n_run == n_expected, $sformatf("every enabled thread ran (%0d of %0d)", n_run, n_expected));
    foreach (enabled[k]) check(enabled[k] == 1, $sformatf("thread %h ran once", k));
    check(n_contention > 0, "mechanism: MICBus contention");
    check(n_store_hold > 0, "mechanism: two-cycle store");
    check(n_sync_stall > 0 && n_sync_ok > 0, "mechanism: SYNC_OK and lds stalled on a locked counter");
    check(n_zero > 0, "mechanism: count reached zero");
    check(n_inclcv > 0 && n_declcv > 0 && n_bottom_push > 0, "mechanism: INCLCV, DECLCV, bottom push");
    check(n_ltp_move > 0 && n_pop > 0, "mechanism: r_ltp move and pop refill");
    check(n_case1 > 0 && n_case2 > 0 && n_case3 > 0 && n_case4 > 0, "mechanism: CHECK cases 1-4");
    check(n_hold_stall > 0 && n_swap > 0, "mechanism: Inlet-processor held during SWAP");
    $display("contention=%0d store_hold=%0d sync_stall=%0d zero=%0d inclcv=%0d declcv=%0d bottom_push=%0d",
             n_contention, n_store_hold, n_sync_stall, n_zero, n_inclcv, n_declcv, n_bottom_push);
    $display("posts whose frame was swapped out before cmp fp,ifp: %0d", n_stale_fp);
    $display("ltp_move=%0d pop=%0d case1=%0d case2=%0d case3=%0d case4=%0d hold_stall=%0d swaps=%0d threads=%0d rcv_posts=%0d",
             n_ltp_move, n_pop, n_case1, n_case2, n_case3, n_case4, n_hold_stall, n_swap, n_run, n_to_rcv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
