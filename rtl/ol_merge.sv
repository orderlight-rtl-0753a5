// ol_merge: merge FSM at a convergence point of the memory pipe.
//
// NIN sub-paths converge into one. In S_FWD the FSM forwards requests from the path heads
// with a rotating priority. A path whose head is an OrderLight copy is held: nothing behind
// the copy may proceed. For an OrderLight head, in_mask tells which paths received copies
// (the parent computes it from the packet exactly as the copy FSM did). When every one of
// those paths shows a copy of the same packet (same channel, group and packet number) at
// its head, the FSM pops all the copies together and emits one
// merged packet (state S_MERGE for that cycle, which forwards nothing else). Paths outside
// the mask keep flowing meanwhile. The hold-until-all-copies rule follows the design; the
// rotating priority is this implementation's choice.
//
// Interface: NIN valid/ready inputs, one valid/ready output. Timing: combinational
// forwarding, one packet per cycle. ol_merged pulses when a merged packet leaves;
// ol_hold is high while some path is held at an OrderLight copy.
module ol_merge
  import ol_pkg::*;
#(
  parameter int NIN = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid [NIN],
  output logic           in_ready [NIN],
  input  mem_req_t       in_req   [NIN],
  input  logic [NIN-1:0] in_mask  [NIN],
  output logic           out_valid,
  input  logic           out_ready,
  output mem_req_t       out_req,
  output logic           ol_merged,
  output logic           ol_hold
);
  localparam int IW = (NIN > 1) ? $clog2(NIN) : 1;

  typedef enum logic { S_FWD, S_MERGE } state_e;
  state_e state;

  logic [NIN-1:0] ol_head;
  logic           merge_ok;
  logic [IW-1:0]  merge_idx;
  logic           fwd_ok;
  logic [IW-1:0]  fwd_idx;
  logic [IW-1:0]  rr;

  // Copies of one OrderLight packet agree on channel, group and packet number.
  function automatic logic same_packet(mem_req_t a, mem_req_t b);
    return a.ch == b.ch && a.grp == b.grp && a.payload == b.payload;
  endfunction

  always_comb begin
    for (int i = 0; i < NIN; i++) ol_head[i] = in_valid[i] && in_req[i].kind == PK_OL;
    merge_ok  = 1'b0;
    merge_idx = '0;
    for (int i = NIN - 1; i >= 0; i--) begin
      automatic logic all_here;
      all_here = ol_head[i];
      for (int j = 0; j < NIN; j++)
        if (in_mask[i][j] && !(ol_head[j] && same_packet(in_req[j], in_req[i])))
          all_here = 1'b0;
      if (all_here) begin
        merge_ok  = 1'b1;
        merge_idx = IW'(i);
      end
    end
    fwd_ok  = 1'b0;
    fwd_idx = '0;
    for (int k = NIN - 1; k >= 0; k--) begin
      automatic int i;
      i = (int'(rr) + k) % NIN;
      if (in_valid[i] && !ol_head[i]) begin
        fwd_ok  = 1'b1;
        fwd_idx = IW'(i);
      end
    end
  end

  always_comb begin
    state     = merge_ok ? S_MERGE : S_FWD;
    out_valid = merge_ok || fwd_ok;
    out_req   = merge_ok ? in_req[merge_idx] : in_req[fwd_idx];
    for (int i = 0; i < NIN; i++) begin
      if (state == S_MERGE) in_ready[i] = out_ready && in_mask[merge_idx][i];
      else                  in_ready[i] = out_ready && fwd_ok && (fwd_idx == IW'(i));
    end
  end

  assign ol_merged = merge_ok && out_ready;
  assign ol_hold   = (ol_head != '0) && !merge_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (!merge_ok && fwd_ok && out_ready)
      rr <= (fwd_idx == IW'(NIN - 1)) ? '0 : fwd_idx + 1'b1;
  end

  // A merged packet is always emitted from a path that holds a copy of it.
  assert property (@(posedge clk) disable iff (!rst_n)
    merge_ok |-> (in_mask[merge_idx][merge_idx] && ol_head[merge_idx]));
endmodule
