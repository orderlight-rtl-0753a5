// tb_ol_merge: the testbench plays the copy side: it splits a random packet stream over
// NIN paths (OrderLight packets copied to a random set of paths) and feeds the paths with
// random gaps. At the output every OrderLight packet must appear exactly once, in the order of its
// copies on every path it used,
// and each request must be preceded by exactly the OrderLight packets that preceded it on
// its path. Paths not named by a held packet must keep flowing (counted).
module tb_ol_merge;
  import ol_pkg::*;
  localparam int NIN = 3, NPKT = 400;
  logic clk = 0, rst_n = 0;
  logic           in_valid [NIN];
  logic           in_ready [NIN];
  mem_req_t       in_req   [NIN];
  logic [NIN-1:0] in_mask  [NIN];
  logic out_valid, out_ready, ol_merged, ol_hold;
  mem_req_t out_req;
  int checks = 0, failures = 0;

  mem_req_t       pq [NIN][$];
  logic [NIN-1:0] mq [NIN][$];
  logic [NIN-1:0] ol_mask_of [int];
  int ol_before [int];     // request id -> OLs on its path before it
  int next_ol = 0, ols_out = 0, pass_while_hold = 0, n_req = 0, n_req_out = 0;
  int path_of [int];
  int ol_pos [int][NIN];   // OrderLight id -> its position among the copies on each path
  int ol_out_cnt [NIN];

  always #5 clk = ~clk;

  ol_merge #(.NIN(NIN)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_req, .in_mask,
                              .out_valid, .out_ready, .out_req, .ol_merged, .ol_hold);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 4) != 0);
    for (int p = 0; p < NIN; p++) begin
      in_valid[p] = rst_n && pq[p].size() > 0 && ($urandom_range(0, 3) != 0 || pq[p][0].kind == PK_OL);
      in_req[p]   = (pq[p].size() > 0) ? pq[p][0] : '0;
      in_mask[p]  = (mq[p].size() > 0) ? mq[p][0] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_req.kind == PK_OL) begin
        for (int p = 0; p < NIN; p++)
          if (ol_mask_of[int'(out_req.payload)][p]) begin
            if (ol_out_cnt[p] != ol_pos[int'(out_req.payload)][p]) begin
              failures++;
              $display("OrderLight %0d out of order on path %0d", out_req.payload, p);
            end
            ol_out_cnt[p]++;
          end
        ols_out++;
      end else begin
        int id;
        id = int'(out_req.payload);
        n_req_out++;
        if (ol_out_cnt[path_of[id]] != ol_before[id]) begin
          failures++;
          $display("request %0d passed an OrderLight on its path", id);
        end
        if (ol_hold) pass_while_hold++;
      end
    end
    for (int p = 0; p < NIN; p++)
      if (in_valid[p] && in_ready[p]) begin
        void'(pq[p].pop_front());
        void'(mq[p].pop_front());
      end
  end

  initial begin
    int ol_cnt [NIN];
    for (int p = 0; p < NIN; p++) begin ol_cnt[p] = 0; ol_out_cnt[p] = 0; end
    for (int i = 0; i < NPKT; i++) begin
      if ($urandom_range(0, 4) == 0) begin
        logic [NIN-1:0] m;
        mem_req_t o;
        m = NIN'($urandom_range(1, (1 << NIN) - 1));
        o = mk_ol(0, 0, 32'(next_ol), 0);
        ol_mask_of[next_ol] = m;
        next_ol++;
        for (int p = 0; p < NIN; p++) ol_pos[next_ol - 1][p] = ol_cnt[p];
        for (int p = 0; p < NIN; p++) if (m[p]) begin pq[p].push_back(o); mq[p].push_back(m); ol_cnt[p]++; end
      end else begin
        int p;
        p = $urandom_range(0, NIN - 1);
        path_of[1000 + i]  = p;
        ol_before[1000 + i] = ol_cnt[p];
        n_req++;
        pq[p].push_back(mk_req(PK_PIM, OP_LOAD, 0, p, 0, 0, 0, 32'(1000 + i), 0));
        mq[p].push_back(NIN'(1) << p);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pq[0].size() + pq[1].size() + pq[2].size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (ols_out != next_ol || n_req_out != n_req) failures++;
    checks++;
    if (pass_while_hold == 0) failures++;
    $display("merged=%0d requests=%0d passed-while-held=%0d", ols_out, n_req_out, pass_while_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
