// ldst_unit: LDST queue of an SM with the PIM bypass of the L1 data cache.
//
// Requests from the operand collector enter an in-order LDST queue. At its head, host
// loads and stores are sent to the L1 data cache port, while PIM requests and OrderLight
// packets bypass the L1 (they behave as non-temporal accesses) and go to the
// interconnect port. Because PIM requests and OrderLight packets share this single
// in-order queue, their relative order is kept. Requests that miss in the L1 come back on
// the l1_miss port and are merged onto the interconnect port; when both the queue head and
// an L1 miss want the interconnect, they take turns. The bypass follows the design; the
// queue depth, the alternating merge and the separate L1-miss port are this
// implementation's choices (the L1 itself is outside this module).
//
// Interface: valid/ready on every port. Timing: a request entering in cycle t can leave
// in cycle t+1.
module ldst_unit
  import ol_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  mem_req_t in_req,
  output logic     l1_valid,
  input  logic     l1_ready,
  output mem_req_t l1_req,
  input  logic     l1_miss_valid,
  output logic     l1_miss_ready,
  input  mem_req_t l1_miss_req,
  output logic     icnt_valid,
  input  logic     icnt_ready,
  output mem_req_t icnt_req
);
  logic     hd_valid, hd_ready, hd_bypass;
  mem_req_t hd;
  logic     miss_turn;

  sync_fifo #(.WIDTH(REQ_W), .DEPTH(DEPTH)) u_ldst_q (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_req),
    .out_valid(hd_valid), .out_ready(hd_ready), .out_data(hd),
    .count()
  );

  assign hd_bypass = (hd.kind == PK_PIM) || (hd.kind == PK_OL);

  // interconnect port: queue head (bypass) or L1 miss
  logic pick_miss;
  assign pick_miss = l1_miss_valid && (!(hd_valid && hd_bypass) || miss_turn);

  assign icnt_valid    = pick_miss ? 1'b1 : (hd_valid && hd_bypass);
  assign icnt_req      = pick_miss ? l1_miss_req : hd;
  assign l1_miss_ready = pick_miss && icnt_ready;

  assign l1_valid = hd_valid && !hd_bypass;
  assign l1_req   = hd;
  assign hd_ready = hd_bypass ? (icnt_ready && !pick_miss) : l1_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_turn <= 1'b0;
    else if (icnt_valid && icnt_ready && l1_miss_valid && hd_valid && hd_bypass)
      miss_turn <= !pick_miss;
  end
endmodule
