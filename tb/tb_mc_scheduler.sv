// tb_mc_scheduler: random requests over four memory-groups interleaved with OrderLight
// packets for groups 0 and 1, under random bank back-pressure. The checker tracks, per
// group, how many requests of each OrderLight epoch are still unscheduled, and fails if a
// request is scheduled while an older epoch of its group still has requests. It counts
// requests of other groups scheduled while a group is held (must happen), and blocked
// arrivals (ol_block, must happen). Then a directed row-hit case checks first-ready
// ordering (row hit A, then C to the same row, ahead of older miss B), and a packet with
// a wrong packet number must set seq_err.
module tb_mc_scheduler;
  import ol_pkg::*;
  localparam int NBANK = 16, NGRP = 4, NPKT = 800;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, ol_block, seq_err;
  logic [31:0] ol_count;
  mem_req_t in_req, out_req;
  logic bank_ready [NBANK];
  logic force_block0 = 0;
  int checks = 0, failures = 0;
  int epoch_in [NGRP];            // OrderLight packets of each group seen at the input
  int pend [NGRP][int];           // group -> epoch -> unscheduled requests
  int epoch_of [int];
  int n_sched = 0, n_req = 0, n_ol = 0, other_pass = 0, n_block = 0;
  int order_log [$];

  always #5 clk = ~clk;

  mc_scheduler #(.NWIN(8), .NBANK(NBANK), .CH_ID(4'd2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_req, .bank_ready, .out_valid, .out_req,
    .ol_block, .seq_err, .ol_count);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int b = 0; b < NBANK; b++) bank_ready[b] = (b == 0 && force_block0) ? 1'b0 : ($urandom_range(0, 2) != 0);

  function automatic logic holding(int g);
    int n;
    n = 0;
    foreach (pend[g][e]) if (pend[g][e] > 0) n++;
    return n > 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ol_block) n_block++;
    if (out_valid) begin
      int id, g, e;
      id = int'(out_req.payload);
      g  = int'(out_req.grp);
      e  = epoch_of[id];
      checks++;
      n_sched++;
      order_log.push_back(id);
      foreach (pend[g][k]) if (k < e && pend[g][k] > 0) begin
        failures++;
        $display("request %0d (group %0d epoch %0d) passed an OrderLight", id, g, e);
      end
      for (int h = 0; h < NGRP; h++) if (h != g && holding(h)) begin other_pass++; break; end
      pend[g][e]--;
    end
  end

  task automatic send(mem_req_t r);
    @(negedge clk);
    in_valid = 1; in_req = r;
    if (r.kind == PK_OL) begin epoch_in[r.grp]++; n_ol++; end
    else begin
      epoch_of[int'(r.payload)] = epoch_in[r.grp];
      if (!pend[r.grp].exists(epoch_in[r.grp])) pend[r.grp][epoch_in[r.grp]] = 0;
      pend[r.grp][epoch_in[r.grp]]++;
      n_req++;
    end
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  initial begin
    int id;
    in_valid = 0; in_req = '0;
    for (int g = 0; g < NGRP; g++) epoch_in[g] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    id = 0;
    for (int i = 0; i < NPKT; i++) begin
      if ($urandom_range(0, 7) == 0) begin
        int g;
        g = $urandom_range(0, 1);
        send(mk_ol(2, g, 32'(epoch_in[g]), 0));
      end else begin
        send(mk_req(PK_PIM, OP_LOAD, 2, $urandom_range(0, NBANK - 1), $urandom_range(0, 3), 0, 0, 32'(id), 0));
        id++;
      end
    end
    while (n_sched < n_req) @(posedge clk);
    checks++;
    if (ol_count != 32'(n_ol) || seq_err) failures++;
    checks++;
    if (other_pass == 0 || n_block == 0) failures++;
    $display("requests=%0d ol=%0d other-group-pass=%0d blocked=%0d", n_req, n_ol, other_pass, n_block);
    // ---- first-ready: row hits first ----
    send(mk_req(PK_LD, OP_LOAD, 2, 0, 7, 0, 0, 32'(9000), 0));   // opens row 7 of bank 0
    while (n_sched < n_req) @(posedge clk);
    force_block0 = 1;
    @(negedge clk);
    send(mk_req(PK_LD, OP_LOAD, 2, 0, 7, 1, 0, 32'(9001), 0));   // A: hit
    send(mk_req(PK_LD, OP_LOAD, 2, 0, 8, 0, 0, 32'(9002), 0));   // B: miss, older than C
    send(mk_req(PK_LD, OP_LOAD, 2, 0, 7, 2, 0, 32'(9003), 0));   // C: hit
    force_block0 = 0;
    while (n_sched < n_req) @(posedge clk);
    checks++;
    if (order_log[$-2] != 9001 || order_log[$-1] != 9003 || order_log[$] != 9002) begin
      failures++;
      $display("FR-FCFS order %0d %0d %0d", order_log[$-2], order_log[$-1], order_log[$]);
    end
    // ---- sanity check: wrong packet number ----
    send(mk_ol(2, 1, 32'(epoch_in[1] + 5), 0));
    repeat (2) @(posedge clk);
    checks++;
    if (!seq_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
