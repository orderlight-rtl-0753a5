// icnt: interconnection network from the SMs to the L2 slices.
//
// NSRC source ports (SMs) and NDST destination ports (one L2 slice per memory channel;
// a request goes to port ch mod NDST). Each source has a small input queue; each
// destination has a round-robin arbiter over the sources whose queue head targets it,
// followed by a delay queue that holds every request for LATENCY cycles. All requests from
// one source to one destination follow one FIFO path, so the relative order of PIM
// requests and OrderLight packets from an SM to a channel is kept, which is what the
// OrderLight scheme needs from the network. The crossbar structure, the arbitration and
// the input-queue depth are this implementation's choices; the latency is the
// interconnect-to-L2 latency of the evaluated system.
//
// Interface: valid/ready per port. Timing: a request is delivered at the earliest
// LATENCY+1 cycles after it entered, one request per destination per cycle.
module icnt
  import ol_pkg::*;
#(
  parameter int NSRC     = 8,
  parameter int NDST     = 16,
  parameter int IN_DEPTH = 4,
  parameter int DEPTH    = 64,
  parameter int LATENCY  = 120
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     src_valid [NSRC],
  output logic     src_ready [NSRC],
  input  mem_req_t src_req   [NSRC],
  output logic     dst_valid [NDST],
  input  logic     dst_ready [NDST],
  output mem_req_t dst_req   [NDST]
);
  localparam int SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  logic     hv [NSRC];
  logic     hr [NSRC];
  mem_req_t hd [NSRC];

  for (genvar s = 0; s < NSRC; s++) begin : g_in
    sync_fifo #(.WIDTH(REQ_W), .DEPTH(IN_DEPTH)) u_inq (
      .clk, .rst_n,
      .in_valid(src_valid[s]), .in_ready(src_ready[s]), .in_data(src_req[s]),
      .out_valid(hv[s]), .out_ready(hr[s]), .out_data(hd[s]),
      .count()
    );
  end

  logic          arb_valid [NDST];
  logic          arb_ready [NDST];
  mem_req_t      arb_req   [NDST];
  logic [SW-1:0] arb_src   [NDST];
  logic [SW-1:0] rr        [NDST];

  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      arb_valid[d] = 1'b0;
      arb_src[d]   = '0;
      for (int k = NSRC - 1; k >= 0; k--) begin
        automatic int s;
        s = (int'(rr[d]) + k) % NSRC;
        if (hv[s] && (int'(hd[s].ch) % NDST) == d) begin
          arb_valid[d] = 1'b1;
          arb_src[d]   = SW'(s);
        end
      end
      arb_req[d] = hd[arb_src[d]];
    end
    for (int s = 0; s < NSRC; s++) begin
      hr[s] = 1'b0;
      for (int d = 0; d < NDST; d++)
        if (arb_valid[d] && arb_ready[d] && int'(arb_src[d]) == s) hr[s] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDST; d++) rr[d] <= '0;
    end else begin
      for (int d = 0; d < NDST; d++)
        if (arb_valid[d] && arb_ready[d])
          rr[d] <= (arb_src[d] == SW'(NSRC - 1)) ? '0 : arb_src[d] + 1'b1;
    end
  end

  for (genvar d = 0; d < NDST; d++) begin : g_out
    delay_queue #(.WIDTH(REQ_W), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_link (
      .clk, .rst_n,
      .in_valid(arb_valid[d]), .in_ready(arb_ready[d]), .in_data(arb_req[d]),
      .out_valid(dst_valid[d]), .out_ready(dst_ready[d]), .out_data(dst_req[d])
    );
  end
endmodule
