// mc_scheduler: FR-FCFS request scheduler of a memory controller, with OrderLight
// enforcement per memory-group.
//
// The scheduler takes requests and OrderLight packets, one per cycle, from the merged
// read/write queue stream into a window of NWIN entries, and each cycle schedules one
// window entry into the command queue of its bank. Selection is first-ready FCFS: among
// eligible entries whose bank queue has room, a request to the row last scheduled to its
// bank (a row hit) beats one that is not, and the oldest wins among equals.
//
// OrderLight: every memory-group g has a request counter cnt[g] and an OrderLight flag.
// cnt[g] counts requests of g taken into the window and not yet scheduled. An OrderLight
// packet for g sets flag[g] (and is not stored). While flag[g] is set, every newly taken
// request of g is marked blocked and is not scheduled; these are counted in wcnt[g]
// instead. When cnt[g] reaches zero, i.e. all requests that preceded the packet have been
// scheduled, the flag is cleared, the blocked requests become eligible and cnt[g] takes
// over their count. Requests of other groups are never held. A second OrderLight packet
// for g that arrives while flag[g] is still set waits at the input. The counter/flag rule
// follows the design; the blocked-entry bookkeeping (wcnt, stalling a second packet), the
// window size and the age stamps are this implementation's choices.
//
// Sanity checks and statistics: the 32-bit packet number of each OrderLight packet must
// equal the previous number of its group plus one (the first must be 0), and its channel
// must be CH_ID; a mismatch sets seq_err (sticky). ol_count counts OrderLight packets.
//
// Interface: valid/ready input; output out_valid/out_req is taken by the command
// scheduler in the same cycle (the scheduler only offers entries whose bank_ready is set).
// Timing: a request taken in cycle t can be scheduled in cycle t+1.
module mc_scheduler
  import ol_pkg::*;
#(
  parameter int              NWIN  = 16,
  parameter int              NBANK = 16,
  parameter logic [CH_W-1:0] CH_ID = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  mem_req_t    in_req,
  input  logic        bank_ready [NBANK],
  output logic        out_valid,
  output mem_req_t    out_req,
  output logic        ol_block,
  output logic        seq_err,
  output logic [31:0] ol_count
);
  localparam int NGRP = 1 << GRP_W;
  localparam int WW   = (NWIN > 1) ? $clog2(NWIN) : 1;
  localparam int CW   = $clog2(NWIN + 1);
  localparam int SW   = 16;

  logic           e_v   [NWIN];
  logic           e_blk [NWIN];
  mem_req_t       e_req [NWIN];
  logic [SW-1:0]  e_age [NWIN];
  logic [SW-1:0]  stamp;

  logic [CW-1:0]     cnt   [NGRP];
  logic [CW-1:0]     wcnt  [NGRP];
  logic              flag  [NGRP];
  logic [PAY_W-1:0]  exp_n [NGRP];
  logic              lr_v  [NBANK];
  logic [ROW_W-1:0]  lr    [NBANK];

  // ---- input side ----
  logic          have_free;
  logic [WW-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = NWIN - 1; i >= 0; i--)
      if (!e_v[i]) begin
        have_free = 1'b1;
        free_idx  = WW'(i);
      end
  end

  logic in_is_ol, acc_ol, acc_req;
  assign in_is_ol = (in_req.kind == PK_OL);
  assign in_ready = in_is_ol ? !flag[in_req.grp] : have_free;
  assign acc_ol   = in_valid && in_ready && in_is_ol;
  assign acc_req  = in_valid && in_ready && !in_is_ol;

  logic clear [NGRP];
  always_comb
    for (int g = 0; g < NGRP; g++) clear[g] = flag[g] && (cnt[g] == '0);

  assign ol_block = acc_req && flag[in_req.grp] && !clear[in_req.grp];

  // ---- FR-FCFS pick ----
  logic          pick;
  logic [WW-1:0] pick_idx;
  always_comb begin
    automatic logic best_hit;
    automatic logic [SW-1:0] best_age;
    pick     = 1'b0;
    pick_idx = '0;
    best_hit = 1'b0;
    best_age = '0;
    for (int i = 0; i < NWIN; i++) begin
      automatic logic hit;
      hit = lr_v[e_req[i].bank] && (lr[e_req[i].bank] == e_req[i].row);
      if (e_v[i] && !e_blk[i] && bank_ready[e_req[i].bank]) begin
        if (!pick || (hit && !best_hit) ||
            (hit == best_hit && $signed(e_age[i] - best_age) < 0)) begin
          pick     = 1'b1;
          pick_idx = WW'(i);
          best_hit = hit;
          best_age = e_age[i];
        end
      end
    end
  end

  assign out_valid = pick;
  assign out_req   = e_req[pick_idx];

  logic [GRP_W-1:0] pick_grp;
  assign pick_grp = e_req[pick_idx].grp;

  // ---- state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stamp    <= '0;
      seq_err  <= 1'b0;
      ol_count <= '0;
      for (int i = 0; i < NWIN; i++) begin
        e_v[i]   <= 1'b0;
        e_blk[i] <= 1'b0;
      end
      for (int g = 0; g < NGRP; g++) begin
        cnt[g]   <= '0;
        wcnt[g]  <= '0;
        flag[g]  <= 1'b0;
        exp_n[g] <= '0;
      end
      for (int b = 0; b < NBANK; b++) begin
        lr_v[b] <= 1'b0;
        lr[b]   <= '0;
      end
    end else begin
      // scheduled entry leaves the window
      if (pick) begin
        e_v[pick_idx]            <= 1'b0;
        lr_v[e_req[pick_idx].bank] <= 1'b1;
        lr[e_req[pick_idx].bank]   <= e_req[pick_idx].row;
      end
      // per-group counters and flags
      for (int g = 0; g < NGRP; g++) begin
        automatic logic inc, dec;
        inc = acc_req && (in_req.grp == GRP_W'(g));
        dec = pick && (pick_grp == GRP_W'(g));
        if (clear[g]) begin
          flag[g] <= 1'b0;
          cnt[g]  <= wcnt[g] + CW'(inc);
          wcnt[g] <= '0;
        end else if (flag[g]) begin
          cnt[g]  <= cnt[g] - CW'(dec);
          wcnt[g] <= wcnt[g] + CW'(inc);
        end else begin
          cnt[g]  <= cnt[g] + CW'(inc) - CW'(dec);
          if (acc_ol && in_req.grp == GRP_W'(g)) flag[g] <= 1'b1;
        end
      end
      for (int i = 0; i < NWIN; i++)
        if (e_v[i] && e_blk[i] && clear[e_req[i].grp]) e_blk[i] <= 1'b0;
      // take a request into the window
      if (acc_req) begin
        e_v[free_idx]   <= 1'b1;
        e_blk[free_idx] <= flag[in_req.grp] && !clear[in_req.grp];
        stamp           <= stamp + 1'b1;
      end
      // OrderLight packet: sanity check and statistics
      if (acc_ol) begin
        ol_count <= ol_count + 1'b1;
        exp_n[in_req.grp] <= in_req.payload + 1'b1;
        if (in_req.payload != exp_n[in_req.grp] || in_req.ch != CH_ID) seq_err <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (acc_req) begin
      e_req[free_idx] <= in_req;
      e_age[free_idx] <= stamp;
    end
  end

  // A blocked request is never scheduled, and a group's flag is only set while its
  // previous packet has been resolved.
  assert property (@(posedge clk) disable iff (!rst_n) pick |-> !e_blk[pick_idx]);
  assert property (@(posedge clk) disable iff (!rst_n) pick |-> bank_ready[e_req[pick_idx].bank]);
endmodule
