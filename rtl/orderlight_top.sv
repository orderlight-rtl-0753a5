// orderlight_top: GPU-to-HBM memory pipe with OrderLight ordering for fine-grained PIM.
//
// NSM streaming multiprocessors issue host memory instructions, PIM instructions and
// OrderLight instructions. Each SM has an operand collector (with the OrderLight issue
// gate) and an LDST unit (PIM bypass of the L1). An interconnect carries requests to NCH
// memory channels; each channel has an L2 slice (NSUB sub-partitions, copy-and-merge of
// OrderLight packets), a memory controller (read/write queues with copy-and-merge, the
// OrderLight-aware FR-FCFS scheduler, per-bank command queues and the DRAM command
// scheduler), and NBANK PIM compute units, one per bank, next to the DRAM arrays.
//
//   SM[i]: operand_collector -> ldst_unit --+--> icnt --> ch[c]: l2_slice -> mem_ctrl --> DRAM cmd
//                                 L1 port <-+                              pim_unit[b] <-+
//
// The DRAM arrays, the L1 data caches and the L2 cache arrays are outside: each SM's L1
// port (l1_*) and the L1-miss return (l1_miss_*) are ports, and each channel exposes its
// DRAM command bus, the read data bus into the PIM units (dram_rdata, valid T_CL cycles
// after a RD) and the PIM store data bus (dram_wvalid/dram_wdata, T_WL cycles after a WR).
// Host store data is the command's payload word. Read data for host loads is not returned
// to the SMs.
//
// Defaults: 8 SMs (the number the evaluation uses to run PIM kernels for 16 channels),
// 16 HBM channels of 16 banks, 2 L2 sub-partitions, TS of 1/2 row buffer per PIM unit,
// queue sizes and latencies of the evaluated GPU. Everything runs on one clock.
// Status outputs count the OrderLight mechanisms per SM or channel.
module orderlight_top
  import ol_pkg::*;
#(
  parameter int NSM      = 8,
  parameter int NCH      = 16,
  parameter int NBANK    = 16,
  parameter int NSUB     = 2,
  parameter int NTS      = 32,
  parameter int NCU      = 4,
  parameter int REG_W    = 8,
  parameter int LDST_Q   = 8,
  parameter int QDEPTH   = 64,
  parameter int NWIN     = 16,
  parameter int CQ_DEPTH = 8,
  parameter int ICNT_LAT = 120,
  parameter int L2_LAT   = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction issue, per SM
  input  logic              inst_valid    [NSM],
  output logic              inst_ready    [NSM],
  input  mem_req_t          inst          [NSM],
  input  logic [1:0]        inst_nsrc     [NSM],
  input  logic [REG_W-1:0]  inst_regs     [NSM][3],
  // L1 data cache port and L1-miss return, per SM
  output logic              l1_valid      [NSM],
  input  logic              l1_ready      [NSM],
  output mem_req_t          l1_req        [NSM],
  input  logic              l1_miss_valid [NSM],
  output logic              l1_miss_ready [NSM],
  input  mem_req_t          l1_miss_req   [NSM],
  // DRAM side, per channel
  output logic              dram_cmd_valid [NCH],
  output dram_cmd_t         dram_cmd       [NCH],
  input  logic [DATA_W-1:0] dram_rdata     [NCH],
  output logic              dram_wvalid    [NCH],
  output logic [DATA_W-1:0] dram_wdata     [NCH],
  // status
  output logic              ol_wait        [NSM],
  output logic              l2_ol_copied   [NCH],
  output logic              l2_ol_merged   [NCH],
  output logic              l2_ol_hold     [NCH],
  output logic              mc_ol_copied   [NCH],
  output logic              mc_ol_merged   [NCH],
  output logic              mc_ol_block    [NCH],
  output logic              row_switch     [NCH],
  output logic              seq_err        [NCH],
  output logic [31:0]       ol_count       [NCH]
);
  // ---- SMs ----
  logic     oc_valid [NSM];
  logic     oc_ready [NSM];
  mem_req_t oc_req   [NSM];
  logic     sm_valid [NSM];
  logic     sm_ready [NSM];
  mem_req_t sm_req   [NSM];

  for (genvar s = 0; s < NSM; s++) begin : g_sm
    operand_collector #(.NCU(NCU), .REG_W(REG_W)) u_oc (
      .clk, .rst_n,
      .inst_valid(inst_valid[s]), .inst_ready(inst_ready[s]), .inst(inst[s]),
      .inst_nsrc(inst_nsrc[s]), .inst_regs(inst_regs[s]),
      .out_valid(oc_valid[s]), .out_ready(oc_ready[s]), .out(oc_req[s]),
      .ol_wait(ol_wait[s])
    );
    ldst_unit #(.DEPTH(LDST_Q)) u_ldst (
      .clk, .rst_n,
      .in_valid(oc_valid[s]), .in_ready(oc_ready[s]), .in_req(oc_req[s]),
      .l1_valid(l1_valid[s]), .l1_ready(l1_ready[s]), .l1_req(l1_req[s]),
      .l1_miss_valid(l1_miss_valid[s]), .l1_miss_ready(l1_miss_ready[s]),
      .l1_miss_req(l1_miss_req[s]),
      .icnt_valid(sm_valid[s]), .icnt_ready(sm_ready[s]), .icnt_req(sm_req[s])
    );
  end

  // ---- interconnect ----
  logic     ch_valid [NCH];
  logic     ch_ready [NCH];
  mem_req_t ch_req   [NCH];

  icnt #(.NSRC(NSM), .NDST(NCH), .DEPTH(QDEPTH), .LATENCY(ICNT_LAT)) u_icnt (
    .clk, .rst_n,
    .src_valid(sm_valid), .src_ready(sm_ready), .src_req(sm_req),
    .dst_valid(ch_valid), .dst_ready(ch_ready), .dst_req(ch_req)
  );

  // ---- channels ----
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic     mc_valid, mc_ready;
    mem_req_t mc_req;

    l2_slice #(.NSUB(NSUB), .QDEPTH(QDEPTH), .LATENCY(L2_LAT)) u_l2 (
      .clk, .rst_n,
      .in_valid(ch_valid[c]), .in_ready(ch_ready[c]), .in_req(ch_req[c]),
      .out_valid(mc_valid), .out_ready(mc_ready), .out_req(mc_req),
      .ol_copied(l2_ol_copied[c]), .ol_merged(l2_ol_merged[c]), .ol_hold(l2_ol_hold[c])
    );

    mem_ctrl #(.NBANK(NBANK), .QDEPTH(QDEPTH), .NWIN(NWIN), .CQ_DEPTH(CQ_DEPTH),
               .CH_ID(CH_W'(c))) u_mc (
      .clk, .rst_n,
      .in_valid(mc_valid), .in_ready(mc_ready), .in_req(mc_req),
      .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]),
      .ol_copied(mc_ol_copied[c]), .ol_merged(mc_ol_merged[c]), .ol_block(mc_ol_block[c]),
      .row_switch(row_switch[c]), .seq_err(seq_err[c]), .ol_count(ol_count[c])
    );

    logic              pv [NBANK];
    logic [DATA_W-1:0] pd [NBANK];
    for (genvar b = 0; b < NBANK; b++) begin : g_pim
      pim_unit #(.BANK_ID(b), .NTS(NTS)) u_pim (
        .clk, .rst_n,
        .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]), .dram_rdata(dram_rdata[c]),
        .wvalid(pv[b]), .wdata(pd[b]), .busy()
      );
    end

    always_comb begin
      dram_wvalid[c] = 1'b0;
      dram_wdata[c]  = '0;
      for (int b = 0; b < NBANK; b++)
        if (pv[b]) begin
          dram_wvalid[c] = 1'b1;
          dram_wdata[c]  = pd[b];
        end
    end
  end
endmodule
