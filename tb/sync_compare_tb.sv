// sync_compare_tb: self-checking test of the entry-counter compare logic.
//
// Exhaustive over the control bits and random over addresses (half of the
// cases with equal addresses): CMP is address equality with the other
// processor's latch L, SYNC_OK additionally needs the other's SLOCK, and a
// processor stalls only when it presents an lds and its SYNC_OK is set.
module sync_compare_tb;
  import tam_pkg::*;
  logic              lds_req [2];
  logic [ADDR_W-1:0] addr [2];
  logic              slock [2];
  logic [ADDR_W-1:0] laddr [2];
  logic [1:0] cmp, sok, stall;
  int checks = 0, failures = 0;

  sync_compare dut (.lds_req_i(lds_req), .addr_i(addr), .slock_i(slock), .lock_addr_i(laddr),
                    .cmp_o(cmp), .sync_ok_o(sok), .stall_o(stall));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic logic [3:0] c = 4'(i);
      lds_req[0] = c[0]; lds_req[1] = c[1]; slock[0] = c[2]; slock[1] = c[3];
      laddr[0] = $urandom; laddr[1] = $urandom;
      addr[0] = ($urandom % 2) ? laddr[1] : $urandom;
      addr[1] = ($urandom % 2) ? laddr[0] : $urandom;
      #1;
      for (int p = 0; p < 2; p++) begin
        automatic bit e_cmp = (addr[p] == laddr[1-p]);
        automatic bit e_ok  = e_cmp && slock[1-p];
        automatic bit e_st  = e_ok && lds_req[p];
        checks++;
        if (cmp[p] !== e_cmp || sok[p] !== e_ok || stall[p] !== e_st) begin
          failures++;
          $display("p=%0d: cmp=%b sync_ok=%b stall=%b expected %b %b %b", p, cmp[p], sok[p], stall[p], e_cmp, e_ok, e_st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
