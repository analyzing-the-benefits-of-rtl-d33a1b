// frame_memory: the Common Cache as seen from the MICBus.
//
// The Common Cache holds the thread instructions and the activation frames,
// and with them the entry (synchronization) counters and the local
// continuation vector (LCV) that both processors update. This module is the
// storage behind the MICBus: a byte-addressed, big-endian array with byte,
// halfword and word accesses. Misses, line refills and the MBus to Main
// Memory are not modelled: every access hits.
//
// Timing, chosen so that the bus occupancy matches the costs the design
// quotes (one bus cycle for the load of an lds, two for the store of an stb):
//   * a load is accepted in the cycle it is presented (ready_o = 1); its data
//     appear on rdata_o with rvalid_o one cycle later;
//   * a store takes two bus cycles: in the first ready_o = 0 and hold_o is
//     raised for the next cycle so the arbiter keeps the grant; in the
//     second ready_o = 1 and the array is written at the clock edge.
// MEM_BYTES has no value in the document; 4096 bytes is enough for a few
// frames and their LCVs.
module frame_memory
  import tam_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,   // a granted request is on the bus
  input  logic              we_i,
  input  acc_size_e         size_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              ready_o,   // the access completes at this clock edge
  output logic              hold_o,    // second cycle of a store: keep the grant
  output logic [DATA_W-1:0] rdata_o,   // load data, right-aligned
  output logic              rvalid_o
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0]    mem [MEM_BYTES];
  logic          wr_pending_q;
  logic [AW-1:0] a;

  assign a       = addr_i[AW-1:0];
  assign hold_o  = wr_pending_q;
  assign ready_o = valid_i && (!we_i || wr_pending_q);

  function automatic logic [7:0] rd(input logic [AW-1:0] ad);
    return mem[ad];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pending_q <= 1'b0;
      rvalid_o     <= 1'b0;
      rdata_o      <= '0;
    end else begin
      rvalid_o     <= valid_i && !we_i;
      wr_pending_q <= valid_i && we_i && !wr_pending_q;
      if (valid_i && !we_i) begin
        unique case (size_i)
          SZ_BYTE: rdata_o <= {24'd0, rd(a)};
          SZ_HALF: rdata_o <= {16'd0, rd(a), rd(a + AW'(1))};
          default: rdata_o <= {rd(a), rd(a + AW'(1)), rd(a + AW'(2)), rd(a + AW'(3))};
        endcase
      end
    end
  end

  // The array itself has no reset; a testbench loads it before use.
  always_ff @(posedge clk) begin
    if (valid_i && we_i && wr_pending_q) begin
      unique case (size_i)
        SZ_BYTE: mem[a] <= wdata_i[7:0];
        SZ_HALF: begin
          mem[a]          <= wdata_i[15:8];
          mem[a + AW'(1)] <= wdata_i[7:0];
        end
        default: begin
          mem[a]          <= wdata_i[31:24];
          mem[a + AW'(1)] <= wdata_i[23:16];
          mem[a + AW'(2)] <= wdata_i[15:8];
          mem[a + AW'(3)] <= wdata_i[7:0];
        end
      endcase
    end
  end

endmodule
