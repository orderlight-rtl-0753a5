// operand_collector: memory-instruction operand collector of an SM, with the OrderLight
// issue gate.
//
// A memory instruction from the issue stage is allocated one of NCU collector units. The
// unit then reads its register operands from a register file of NRB banks; each bank
// serves one read per cycle and the banks are arbitrated with a rotating priority over the
// units, so operand collection, and therefore issue to the LDST queue, can happen out of
// program order. A unit whose operands are all collected issues its request to the output
// (the LDST queue); among ready units the same rotating priority picks one per cycle.
// Only the timing of operand collection is modelled: the request's address, operation and
// payload arrive with the instruction.
//
// OrderLight: one counter per (channel, memory-group) holds the number of PIM requests
// sitting in collector units. It is incremented when a PIM request is allocated a unit and
// decremented when the request issues. An OrderLight instruction needs no collector unit:
// it waits at the issue stage, stalling the instructions behind it, until the counter of
// its channel and memory-group reads zero, and then goes straight to the output, taking
// priority over unit issue in that cycle. This gate and its counters follow the design;
// NCU, NRB, the register-to-bank mapping (reg mod NRB) and the arbitration are this
// implementation's choices.
//
// Interface: inst_* is a valid/ready input (one instruction per cycle, up to 3 source
// registers); out_* is a valid/ready output. Timing: an instruction with no register
// operands can issue the cycle after allocation; each operand adds at least one cycle.
// ol_wait is high in every cycle an OrderLight instruction is held at the gate.
module operand_collector
  import ol_pkg::*;
#(
  parameter int NCU   = 4,
  parameter int NRB   = 4,
  parameter int REG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inst_valid,
  output logic             inst_ready,
  input  mem_req_t         inst,
  input  logic [1:0]       inst_nsrc,
  input  logic [REG_W-1:0] inst_regs [3],
  output logic             out_valid,
  input  logic             out_ready,
  output mem_req_t         out,
  output logic             ol_wait
);
  localparam int CNT_W = $clog2(NCU + 1);
  localparam int NCTR  = 1 << (CH_W + GRP_W);
  localparam int CUW   = (NCU > 1) ? $clog2(NCU) : 1;

  logic             cu_valid [NCU];
  mem_req_t         cu_req   [NCU];
  logic [2:0]       cu_need  [NCU];
  logic [REG_W-1:0] cu_reg   [NCU][3];
  logic [CNT_W-1:0] pim_cnt  [NCTR];
  logic [CUW-1:0]   rr;

  // ---- allocation ----
  logic           have_free;
  logic [CUW-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = NCU - 1; i >= 0; i--)
      if (!cu_valid[i]) begin
        have_free = 1'b1;
        free_idx  = CUW'(i);
      end
  end

  logic [CH_W+GRP_W-1:0] inst_ctr;
  logic                  inst_is_ol, ol_go, alloc;
  assign inst_ctr   = {inst.ch, inst.grp};
  assign inst_is_ol = (inst.kind == PK_OL);
  assign ol_go      = inst_valid && inst_is_ol && (pim_cnt[inst_ctr] == '0) && out_ready;
  assign alloc      = inst_valid && !inst_is_ol && have_free;
  assign inst_ready = inst_is_ol ? ol_go : have_free;
  assign ol_wait    = inst_valid && inst_is_ol && !ol_go;

  // ---- register bank arbitration: one read per bank per cycle ----
  logic [2:0] grant [NCU];
  always_comb begin
    automatic logic [NRB-1:0] busy;
    busy = '0;
    for (int i = 0; i < NCU; i++) grant[i] = '0;
    for (int k = 0; k < NCU; k++) begin
      automatic int c;
      c = (int'(rr) + k) % NCU;
      for (int s = 0; s < 3; s++) begin
        automatic int b;
        b = int'(cu_reg[c][s]) % NRB;
        if (cu_valid[c] && cu_need[c][s] && !grant[c][0] && !grant[c][1] && !grant[c][2]
            && !busy[b]) begin
          grant[c][s] = 1'b1;
          busy[b]     = 1'b1;
        end
      end
    end
  end

  // ---- issue of a unit whose operands are collected ----
  logic           disp;
  logic [CUW-1:0] disp_idx;
  always_comb begin
    disp     = 1'b0;
    disp_idx = '0;
    for (int k = NCU - 1; k >= 0; k--) begin
      automatic int c;
      c = (int'(rr) + k) % NCU;
      if (cu_valid[c] && cu_need[c] == '0) begin
        disp     = 1'b1;
        disp_idx = CUW'(c);
      end
    end
  end

  logic disp_fire;
  always_comb begin
    if (inst_valid && inst_is_ol && pim_cnt[inst_ctr] == '0) begin
      out_valid = 1'b1;
      out       = inst;
    end else begin
      out_valid = disp;
      out       = cu_req[disp_idx];
    end
  end
  assign disp_fire = disp && out_ready && !(inst_valid && inst_is_ol && pim_cnt[inst_ctr] == '0);

  logic [CH_W+GRP_W-1:0] disp_ctr;
  logic                  inc_pim, dec_pim;
  assign disp_ctr = {cu_req[disp_idx].ch, cu_req[disp_idx].grp};
  assign inc_pim  = alloc && inst.kind == PK_PIM;
  assign dec_pim  = disp_fire && cu_req[disp_idx].kind == PK_PIM;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int i = 0; i < NCU; i++) begin
        cu_valid[i] <= 1'b0;
        cu_need[i]  <= '0;
      end
      for (int j = 0; j < NCTR; j++) pim_cnt[j] <= '0;
    end else begin
      rr <= (rr == CUW'(NCU - 1)) ? '0 : rr + 1'b1;
      for (int i = 0; i < NCU; i++) cu_need[i] <= cu_need[i] & ~grant[i];
      if (disp_fire) cu_valid[disp_idx] <= 1'b0;
      if (alloc) begin
        cu_valid[free_idx] <= 1'b1;
        cu_need[free_idx]  <= (inst_nsrc == 2'd0) ? 3'b000 :
                              (inst_nsrc == 2'd1) ? 3'b001 :
                              (inst_nsrc == 2'd2) ? 3'b011 : 3'b111;
      end
      if (inc_pim && dec_pim && inst_ctr == disp_ctr) begin
        // same counter up and down: unchanged
      end else begin
        if (inc_pim) pim_cnt[inst_ctr] <= pim_cnt[inst_ctr] + 1'b1;
        if (dec_pim) pim_cnt[disp_ctr] <= pim_cnt[disp_ctr] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      cu_req[free_idx] <= inst;
      cu_reg[free_idx] <= inst_regs;
    end
  end

  // An OrderLight packet never overtakes a PIM request of its channel and group.
  assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && out_ready && out.kind == PK_OL) |-> pim_cnt[{out.ch, out.grp}] == '0);
endmodule
