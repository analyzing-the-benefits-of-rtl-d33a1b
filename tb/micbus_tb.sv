// micbus_tb: self-checking test of the MICBus multiplexer.
//
// Drives random requests from both processors, a random grant and random
// Common Cache responses. Checks that the Common Cache sees exactly the
// granted processor's request, that ready reaches only the granted
// processor, and that the load data valid one cycle after a load is routed
// to the processor that issued that load.
module micbus_tb;
  import tam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  micbus_req_t m_req [2];
  logic [1:0] gnt = '0, ready, rvalid;
  logic [DATA_W-1:0] rdata, s_wdata, s_rdata = '0;
  logic s_valid, s_we, s_ready = 1'b0, s_rvalid = 1'b0;
  acc_size_e s_size;
  logic [ADDR_W-1:0] s_addr;
  int checks = 0, failures = 0;

  micbus dut (.clk, .rst_n, .m_req_i(m_req), .gnt_i(gnt), .ready_o(ready), .rvalid_o(rvalid),
              .rdata_o(rdata), .s_valid_o(s_valid), .s_we_o(s_we), .s_size_o(s_size),
              .s_addr_o(s_addr), .s_wdata_o(s_wdata), .s_ready_i(s_ready), .s_rdata_i(s_rdata),
              .s_rvalid_i(s_rvalid));

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

  int last_reader;   // -1: no load last cycle
  initial begin
    m_req[0] = '0; m_req[1] = '0;
    last_reader = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        m_req[p].req   = $urandom % 2;
        m_req[p].we    = $urandom % 2;
        m_req[p].lds   = 1'b0;
        m_req[p].size  = acc_size_e'($urandom % 3);
        m_req[p].addr  = $urandom;
        m_req[p].wdata = $urandom;
      end
      case ($urandom % 3)
        0: gnt = 2'b00;
        1: gnt = 2'b01;
        default: gnt = 2'b10;
      endcase
      s_ready  = $urandom % 2;
      s_rvalid = (last_reader >= 0);
      s_rdata  = $urandom;
      #1;
      if (gnt == 2'b00) check(!s_valid && ready == 2'b00, "idle bus");
      else begin
        automatic int g = gnt[1] ? 1 : 0;
        check(s_valid == m_req[g].req && s_we == m_req[g].we && s_addr == m_req[g].addr &&
              s_wdata == m_req[g].wdata && s_size == m_req[g].size, "granted request forwarded");
        check(ready[g] == s_ready && ready[1-g] == 1'b0, "ready to the granted processor only");
      end
      if (last_reader >= 0)
        check(rvalid[last_reader] && !rvalid[1-last_reader] && rdata == s_rdata, "load data routed to its issuer");
      else
        check(rvalid == 2'b00, "no rvalid without a load");
      last_reader = (gnt != 2'b00 && s_valid && !s_we) ? (gnt[1] ? 1 : 0) : -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
