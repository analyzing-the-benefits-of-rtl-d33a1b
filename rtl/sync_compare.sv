// sync_compare: Compare Logic for atomic access to entry counters.
//
// For each processor the comparator checks whether the counter address of
// an lds it is about to start equals the address held in the other
// processor's latch L (CMP). SYNC_OK is CMP gated by the other processor's
// SLOCK: it is set only when both processors want the same counter while the
// other one is inside its load/decrement/store sequence. The processor that
// is just beginning its bus access then stalls until the other one clears
// SLOCK. When the addresses differ, CMP and SYNC_OK stay 0 and the only cost
// is ordinary bus contention, settled by the arbiter.
//
// Purely combinational. Index 0 is the Main-processor, 1 the
// Inlet-processor. stall_o[p] is meant to remove processor p's request from
// arbitration in the same cycle. Only lds accesses are checked, as in the
// document.
module sync_compare
  import tam_pkg::*;
(
  input  logic              lds_req_i   [2],  // processor p presents an lds
  input  logic [ADDR_W-1:0] addr_i      [2],  // its address
  input  logic              slock_i     [2],
  input  logic [ADDR_W-1:0] lock_addr_i [2],  // latch L of each processor
  output logic [1:0]        cmp_o,
  output logic [1:0]        sync_ok_o,
  output logic [1:0]        stall_o
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      cmp_o[p]     = (addr_i[p] == lock_addr_i[1-p]);
      sync_ok_o[p] = cmp_o[p] && slock_i[1-p];
      stall_o[p]   = lds_req_i[p] && sync_ok_o[p];
    end
  end

endmodule
