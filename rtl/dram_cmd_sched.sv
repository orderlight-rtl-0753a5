// dram_cmd_sched: per-bank command queues and the DRAM command scheduler of a channel.
//
// Requests scheduled by mc_scheduler enter the command queue of their bank (CQ_DEPTH
// entries each, in order). Every cycle the command scheduler looks at the head of each
// bank queue and works out the DRAM command it needs under an open-page policy: ACT when
// the bank is closed, PRE when another row is open, RD or WR when the right row is open.
// It then issues at most one command per cycle on the channel: column commands before
// activates before precharges, and among banks of the same class a rotating priority.
// A command is legal only when these HBM timing constraints hold (cycles):
//   ACT->RD tRCD, ACT->WR tRCDW, ACT->PRE tRAS, PRE->ACT tRP, ACT->ACT (any bank) tRRD,
//   col->col same bank tCCDL, col->col any bank tCCD, RD->PRE tRTP, WR->PRE tWTP,
//   RD->WR on the channel tRTW, WR->RD on the channel tWL + tCDLR.
// tRCDW, tRAS, tRP, tRRD, tCCD, tCCDL, tWTP, tCDLR, tWL and tCL are the values of the
// evaluated HBM system; tRCD for reads, tRTP and tRTW are this implementation's choices
// (tRTW = tCL - tWL + 1 lets read data return before the next write's data). Writing
// eight column writes to a row, then opening another row of the same bank, takes
// tRCDW + 7*tCCDL + tWTP + tRP = 9 + 14 + 9 + 12 = 44 cycles from ACT to ACT.
// The column-to-column rule uses the bank itself for the "long" case: bank groups are not
// modelled.
//
// Interface: in_valid/in_req is accepted whenever bank_ready[in_req.bank] is high (the
// caller only offers requests to ready banks). cmd_valid/cmd is the command issued this
// cycle; the DRAM takes every command.
module dram_cmd_sched
  import ol_pkg::*;
#(
  parameter int NBANK    = 16,
  parameter int CQ_DEPTH = 8,
  parameter int T_CCD    = 1,
  parameter int T_CCDL   = 2,
  parameter int T_RRD    = 3,
  parameter int T_RCD    = 12,
  parameter int T_RCDW   = 9,
  parameter int T_RAS    = 28,
  parameter int T_RP     = 12,
  parameter int T_CL     = 12,
  parameter int T_WL     = 2,
  parameter int T_CDLR   = 3,
  parameter int T_WTP    = 9,
  parameter int T_RTP    = 3,
  parameter int T_RTW    = T_CL - T_WL + 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  mem_req_t  in_req,
  output logic      bank_ready [NBANK],
  output logic      cmd_valid,
  output dram_cmd_t cmd,
  output logic      row_switch
);
  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;

  logic [31:0] now;

  logic     hv   [NBANK];
  logic     hpop [NBANK];
  mem_req_t hd   [NBANK];

  for (genvar b = 0; b < NBANK; b++) begin : g_cq
    logic in_b;
    assign in_b = in_valid && (int'(in_req.bank) == b);
    sync_fifo #(.WIDTH(REQ_W), .DEPTH(CQ_DEPTH)) u_cq (
      .clk, .rst_n,
      .in_valid(in_b), .in_ready(bank_ready[b]), .in_data(in_req),
      .out_valid(hv[b]), .out_ready(hpop[b]), .out_data(hd[b]),
      .count()
    );
  end

  // bank state and earliest-issue times
  logic              open_r  [NBANK];
  logic [ROW_W-1:0]  row_r   [NBANK];
  logic [31:0]       n_act   [NBANK];
  logic [31:0]       n_pre   [NBANK];
  logic [31:0]       n_rd    [NBANK];
  logic [31:0]       n_wr    [NBANK];
  logic [31:0]       n_act_ch, n_col_ch, n_rd_ch, n_wr_ch;
  logic [BW-1:0]     rr;

  // legality of each bank's next command
  logic can_col [NBANK];
  logic can_act [NBANK];
  logic can_pre [NBANK];
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      automatic logic wr;
      wr = is_write(hd[b]);
      can_act[b] = hv[b] && !open_r[b] && now >= n_act[b] && now >= n_act_ch;
      can_pre[b] = hv[b] && open_r[b] && row_r[b] != hd[b].row && now >= n_pre[b];
      can_col[b] = hv[b] && open_r[b] && row_r[b] == hd[b].row && now >= n_col_ch &&
                   (wr ? (now >= n_wr[b] && now >= n_wr_ch) : (now >= n_rd[b] && now >= n_rd_ch));
    end
  end

  // pick one command: column > activate > precharge, rotating over banks
  logic          sel;
  logic [BW-1:0] sel_b;
  dram_cmd_e     sel_c;
  always_comb begin
    sel   = 1'b0;
    sel_b = '0;
    sel_c = DC_PRE;
    for (int k = NBANK - 1; k >= 0; k--) begin
      automatic int b;
      b = (int'(rr) + k) % NBANK;
      if (can_pre[b]) begin sel = 1'b1; sel_b = BW'(b); sel_c = DC_PRE; end
    end
    for (int k = NBANK - 1; k >= 0; k--) begin
      automatic int b;
      b = (int'(rr) + k) % NBANK;
      if (can_act[b]) begin sel = 1'b1; sel_b = BW'(b); sel_c = DC_ACT; end
    end
    for (int k = NBANK - 1; k >= 0; k--) begin
      automatic int b;
      b = (int'(rr) + k) % NBANK;
      if (can_col[b]) begin
        sel = 1'b1; sel_b = BW'(b);
        sel_c = is_write(hd[b]) ? DC_WR : DC_RD;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++)
      hpop[b] = sel && (sel_c == DC_RD || sel_c == DC_WR) && (sel_b == BW'(b));
    cmd_valid   = sel;
    cmd.cmd     = sel_c;
    cmd.pim     = hd[sel_b].kind == PK_PIM;
    cmd.op      = hd[sel_b].op;
    cmd.bank    = BANK_W'(sel_b);
    cmd.row     = hd[sel_b].row;
    cmd.col     = hd[sel_b].col;
    cmd.tsi     = hd[sel_b].tsi;
    cmd.payload = hd[sel_b].payload;
  end

  assign row_switch = sel && sel_c == DC_PRE;

  function automatic logic [31:0] max32(logic [31:0] a, logic [31:0] b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now      <= '0;
      rr       <= '0;
      n_act_ch <= '0;
      n_col_ch <= '0;
      n_rd_ch  <= '0;
      n_wr_ch  <= '0;
      for (int b = 0; b < NBANK; b++) begin
        open_r[b] <= 1'b0;
        row_r[b]  <= '0;
        n_act[b]  <= '0;
        n_pre[b]  <= '0;
        n_rd[b]   <= '0;
        n_wr[b]   <= '0;
      end
    end else begin
      now <= now + 1;
      if (sel) begin
        rr <= (sel_b == BW'(NBANK - 1)) ? '0 : sel_b + 1'b1;
        unique case (sel_c)
          DC_ACT: begin
            open_r[sel_b] <= 1'b1;
            row_r[sel_b]  <= hd[sel_b].row;
            n_rd[sel_b]   <= now + T_RCD;
            n_wr[sel_b]   <= now + T_RCDW;
            n_pre[sel_b]  <= now + T_RAS;
            n_act_ch      <= now + T_RRD;
          end
          DC_PRE: begin
            open_r[sel_b] <= 1'b0;
            n_act[sel_b]  <= now + T_RP;
          end
          DC_RD: begin
            n_rd[sel_b]  <= max32(n_rd[sel_b], now + T_CCDL);
            n_wr[sel_b]  <= max32(n_wr[sel_b], now + T_CCDL);
            n_pre[sel_b] <= max32(n_pre[sel_b], now + T_RTP);
            n_col_ch     <= now + T_CCD;
            n_wr_ch      <= max32(n_wr_ch, now + T_RTW);
          end
          DC_WR: begin
            n_rd[sel_b]  <= max32(n_rd[sel_b], now + T_CCDL);
            n_wr[sel_b]  <= max32(n_wr[sel_b], now + T_CCDL);
            n_pre[sel_b] <= max32(n_pre[sel_b], now + T_WTP);
            n_col_ch     <= now + T_CCD;
            n_rd_ch      <= max32(n_rd_ch, now + T_WL + T_CDLR);
          end
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> bank_ready[in_req.bank]);
endmodule
