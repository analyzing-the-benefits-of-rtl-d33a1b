// micbus_arbiter: Bus Arbiter of the MICBus.
//
// Two processors share the MICBus: requester 0 is the Main-processor, which
// fetches its thread instructions and frame data over it, and requester 1 is
// the Inlet-processor, which uses it only for frame data. The arbiter gives
// both the same priority, as the design requires: when both request in the
// same cycle, the one that was not granted last wins (round robin over two).
//
// Interface and timing: gnt_o is combinational from req_i and the state, so
// a lone request is granted in the cycle it is raised. A grant lasts one
// cycle unless the bus reports hold_i (the Common Cache needs the same
// requester for a further cycle, e.g. the second data cycle of a store); the
// grant then stays with the same requester regardless of requests. The
// round-robin order and the hold input are this design's choices; the
// document only asks for equal priority.
module micbus_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req_i,    // bit 0 Main-processor, bit 1 Inlet-processor
  input  logic       hold_i,   // keep the current grant for one more cycle
  output logic [1:0] gnt_o     // one-hot or zero
);

  logic last_q;    // requester granted most recently
  logic owner_q;   // requester that holds the bus while hold_i
  logic busy_q;    // a grant was given last cycle (hold_i only counts then)

  always_comb begin
    gnt_o = 2'b00;
    if (hold_i && busy_q) begin
      gnt_o[owner_q] = 1'b1;
    end else if (req_i == 2'b11) begin
      gnt_o[~last_q] = 1'b1;
    end else begin
      gnt_o = req_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q  <= 1'b1;     // Main-processor wins the first tie
      owner_q <= 1'b0;
      busy_q  <= 1'b0;
    end else begin
      busy_q <= |gnt_o;
      if (|gnt_o) begin
        last_q  <= gnt_o[1];
        owner_q <= gnt_o[1];
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_o));
  a_hold:   assert property (@(posedge clk) disable iff (!rst_n)
                             (hold_i && busy_q) |-> gnt_o[owner_q]);

endmodule
