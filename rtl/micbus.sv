// micbus: the MICBus (Main-processor / Inlet-processor / Cache Bus).
//
// Both processors reach the Common Cache over this one bus. The bus takes
// the one-hot grant from micbus_arbiter, forwards the granted processor's
// request to the Common Cache and returns to each processor whether its
// access completed (ready_o) and, one cycle after a load completed, the load
// data with rvalid_o raised only for the processor that issued the load.
// A request that is stalled by the synchronization-counter compare logic is
// removed from arbitration by the top level before it reaches this bus.
//
// The document names the bus and what it connects; the multiplexing and the
// handshake (hold a request until ready, data one cycle after a load) are
// this design's own.
module micbus
  import tam_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  micbus_req_t       m_req_i [2],   // [0] Main-processor, [1] Inlet-processor
  input  logic [1:0]        gnt_i,
  output logic [1:0]        ready_o,
  output logic [1:0]        rvalid_o,
  output logic [DATA_W-1:0] rdata_o,
  // Common Cache side
  output logic              s_valid_o,
  output logic              s_we_o,
  output acc_size_e         s_size_o,
  output logic [ADDR_W-1:0] s_addr_o,
  output logic [DATA_W-1:0] s_wdata_o,
  input  logic              s_ready_i,
  input  logic [DATA_W-1:0] s_rdata_i,
  input  logic              s_rvalid_i
);

  micbus_req_t sel;
  logic        rd_owner_q;

  always_comb begin
    sel = gnt_i[1] ? m_req_i[1] : m_req_i[0];
  end

  assign s_valid_o = |gnt_i && sel.req;
  assign s_we_o    = sel.we;
  assign s_size_o  = sel.size;
  assign s_addr_o  = sel.addr;
  assign s_wdata_o = sel.wdata;

  assign ready_o[0] = gnt_i[0] && s_ready_i;
  assign ready_o[1] = gnt_i[1] && s_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_owner_q <= 1'b0;
    else if (s_valid_o && !sel.we) rd_owner_q <= gnt_i[1];
  end

  assign rdata_o     = s_rdata_i;
  assign rvalid_o[0] = s_rvalid_i && !rd_owner_q;
  assign rvalid_o[1] = s_rvalid_i && rd_owner_q;

endmodule
