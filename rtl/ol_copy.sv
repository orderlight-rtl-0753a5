// ol_copy: copy FSM at a divergence point of the memory pipe.
//
// The incoming packet comes with a destination mask worked out by the parent from the
// packet (for a request: the one sub-path it belongs to; for an OrderLight packet: every
// sub-path its channel and memory-group use). The FSM offers the packet to every output in
// the mask. Outputs that accept are marked done; the FSM stays in COPY, offering the
// packet to the outputs still missing, until every output in the mask has taken it, and
// only then accepts the next input packet. So each output receives packets in input
// order, and an OrderLight packet lands on every relevant sub-path ahead of all later
// requests. The replication rule follows the design; the partial-acceptance bookkeeping is
// this implementation's.
//
// Interface: valid/ready input with in_mask; NOUT valid/ready outputs sharing out_req.
// out_req is the input packet unchanged (a copy carries the same fields), so its bits are
// wires from in_req; only the valid/ready control is logic.
// Timing: combinational; a packet whose outputs are all ready passes in its arrival cycle.
// ol_copied pulses when an OrderLight packet has been delivered to all its outputs.
module ol_copy
  import ol_pkg::*;
#(
  parameter int NOUT = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  mem_req_t        in_req,
  input  logic [NOUT-1:0] in_mask,
  output logic            out_valid [NOUT],
  input  logic            out_ready [NOUT],
  output mem_req_t        out_req,
  output logic            ol_copied
);
  typedef enum logic { S_IDLE, S_COPY } state_e;
  state_e          state;
  logic [NOUT-1:0] done, fire, left;

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out_valid[o] = in_valid && in_mask[o] && !done[o];
      fire[o]      = out_valid[o] && out_ready[o];
    end
    left = in_mask & ~done & ~fire;
  end

  assign out_req   = in_req;
  assign in_ready  = (left == '0);
  assign ol_copied = in_valid && in_ready && in_req.kind == PK_OL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= '0;
    end else if (in_valid) begin
      if (left == '0) begin
        state <= S_IDLE;
        done  <= '0;
      end else begin
        state <= S_COPY;
        done  <= done | fire;
      end
    end
  end

  // Once copying has started the input must hold its packet.
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_COPY) |-> in_valid);
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (in_mask != '0));
endmodule
