// mem_ctrl: memory controller of one channel with OrderLight support.
//
// Requests from the L2 slice are split into separate read and write queues. Because
// these two queues are diverging paths, the controller uses the copy-and-merge scheme:
//   ol_copy -> {read queue, write queue} -> ol_merge -> mc_scheduler -> dram_cmd_sched
// An OrderLight packet is copied into both queues and the two copies are merged at the
// scheduler stage, so no request behind the packet in either queue reaches the scheduler
// before the packet. The scheduler then holds later requests of the packet's
// memory-group until all earlier ones have been scheduled into the per-bank command
// queues, and the command scheduler issues DRAM commands under the HBM timing rules.
// The structure follows the design; queue sizes are those of the evaluated system.
//
// Interface: valid/ready request input; DRAM command output (one command per cycle at
// most). Status: OrderLight statistics and the packet-number sanity flag.
module mem_ctrl
  import ol_pkg::*;
#(
  parameter int              NBANK    = 16,
  parameter int              QDEPTH   = 64,
  parameter int              NWIN     = 16,
  parameter int              CQ_DEPTH = 8,
  parameter logic [CH_W-1:0] CH_ID    = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  mem_req_t    in_req,
  output logic        cmd_valid,
  output dram_cmd_t   cmd,
  output logic        ol_copied,
  output logic        ol_merged,
  output logic        ol_block,
  output logic        row_switch,
  output logic        seq_err,
  output logic [31:0] ol_count
);
  function automatic logic [1:0] route(mem_req_t r);
    if (r.kind == PK_OL) return 2'b11;
    return is_write(r) ? 2'b10 : 2'b01;   // bit 0: read queue, bit 1: write queue
  endfunction

  logic     c_valid [2];
  logic     c_ready [2];
  mem_req_t c_req;

  ol_copy #(.NOUT(2)) u_copy (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_req, .in_mask(route(in_req)),
    .out_valid(c_valid), .out_ready(c_ready), .out_req(c_req),
    .ol_copied
  );

  logic       q_valid [2];
  logic       q_ready [2];
  mem_req_t   q_req   [2];
  logic [1:0] q_mask  [2];

  for (genvar i = 0; i < 2; i++) begin : g_rwq
    sync_fifo #(.WIDTH(REQ_W), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .in_valid(c_valid[i]), .in_ready(c_ready[i]), .in_data(c_req),
      .out_valid(q_valid[i]), .out_ready(q_ready[i]), .out_data(q_req[i]),
      .count()
    );
    assign q_mask[i] = route(q_req[i]);
  end

  logic     s_valid, s_ready;
  mem_req_t s_req;

  ol_merge #(.NIN(2)) u_merge (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_req(q_req), .in_mask(q_mask),
    .out_valid(s_valid), .out_ready(s_ready), .out_req(s_req),
    .ol_merged, .ol_hold()
  );

  logic     bank_ready [NBANK];
  logic     d_valid;
  mem_req_t d_req;

  mc_scheduler #(.NWIN(NWIN), .NBANK(NBANK), .CH_ID(CH_ID)) u_sched (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_req(s_req),
    .bank_ready, .out_valid(d_valid), .out_req(d_req),
    .ol_block, .seq_err, .ol_count
  );

  dram_cmd_sched #(.NBANK(NBANK), .CQ_DEPTH(CQ_DEPTH)) u_cmd (
    .clk, .rst_n,
    .in_valid(d_valid), .in_req(d_req),
    .bank_ready, .cmd_valid, .cmd, .row_switch
  );
endmodule
