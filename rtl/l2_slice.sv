// l2_slice: request path through the L2 slice of one memory channel.
//
// The slice has NSUB sub-partitions, each with an interconnect-to-L2 queue and an
// L2-to-DRAM queue. Requests are spread over the sub-partitions by bank (bank mod NSUB),
// so the slice is a divergence point followed by a convergence point:
//   ol_copy -> NSUB x (icnt-to-L2 queue -> L2-to-DRAM queue) -> ol_merge -> delay queue
// The copy FSM sends a request to its sub-partition and replicates an OrderLight packet on
// every sub-partition that the banks of its memory-group map to; the merge FSM holds each
// sub-partition at its copy until all copies have arrived. PIM requests and OrderLight
// packets do not touch the cache: they move from the interconnect-to-L2 queue straight to
// the L2-to-DRAM queue. The L2 cache arrays are not part of this module; host requests are
// passed on as if they missed. The final delay queue models the latency from the L2 to the
// DRAM scheduler. Queue sizes and latency are those of the evaluated system; the
// bank-interleaved sub-partition mapping is this implementation's choice.
//
// Interface: valid/ready in and out. Timing: at least LATENCY+1 cycles plus two queue
// hops from input to output, one request per cycle.
module l2_slice
  import ol_pkg::*;
#(
  parameter int NSUB    = 2,
  parameter int QDEPTH  = 64,
  parameter int LATENCY = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  mem_req_t in_req,
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req,
  output logic     ol_copied,
  output logic     ol_merged,
  output logic     ol_hold
);
  function automatic logic [NSUB-1:0] route(mem_req_t r);
    logic [15:0] m;
    if (r.kind == PK_OL) m = subp_mask_of_grp(r.grp, NSUB);
    else                 m = 16'(1) << subp_of_bank(r.bank, NSUB);
    return m[NSUB-1:0];
  endfunction

  logic     c_valid [NSUB];
  logic     c_ready [NSUB];
  mem_req_t c_req;

  ol_copy #(.NOUT(NSUB)) u_copy (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_req, .in_mask(route(in_req)),
    .out_valid(c_valid), .out_ready(c_ready), .out_req(c_req),
    .ol_copied
  );

  logic           m_valid [NSUB];
  logic           m_ready [NSUB];
  mem_req_t       m_req   [NSUB];
  logic [NSUB-1:0] m_mask [NSUB];

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    logic     q_valid, q_ready;
    mem_req_t q_req;
    // interconnect-to-L2 queue
    sync_fifo #(.WIDTH(REQ_W), .DEPTH(QDEPTH)) u_icnt_l2_q (
      .clk, .rst_n,
      .in_valid(c_valid[s]), .in_ready(c_ready[s]), .in_data(c_req),
      .out_valid(q_valid), .out_ready(q_ready), .out_data(q_req),
      .count()
    );
    // L2-to-DRAM queue (cache bypass for PIM requests)
    sync_fifo #(.WIDTH(REQ_W), .DEPTH(QDEPTH)) u_l2_dram_q (
      .clk, .rst_n,
      .in_valid(q_valid), .in_ready(q_ready), .in_data(q_req),
      .out_valid(m_valid[s]), .out_ready(m_ready[s]), .out_data(m_req[s]),
      .count()
    );
    assign m_mask[s] = route(m_req[s]);
  end

  logic     j_valid, j_ready;
  mem_req_t j_req;

  ol_merge #(.NIN(NSUB)) u_merge (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ready(m_ready), .in_req(m_req), .in_mask(m_mask),
    .out_valid(j_valid), .out_ready(j_ready), .out_req(j_req),
    .ol_merged, .ol_hold
  );

  delay_queue #(.WIDTH(REQ_W), .DEPTH(QDEPTH), .LATENCY(LATENCY)) u_to_dram (
    .clk, .rst_n,
    .in_valid(j_valid), .in_ready(j_ready), .in_data(j_req),
    .out_valid, .out_ready, .out_data(out_req)
  );
endmodule
