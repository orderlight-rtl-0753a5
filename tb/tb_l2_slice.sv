// tb_l2_slice: random PIM requests and OrderLight packets (random memory-groups) pass an
// L2 slice with 8 sub-partitions, so that an OrderLight packet is copied to the 4
// sub-partitions its group's banks use, not to all. Checks: every packet leaves exactly
// once; no request overtakes, or is overtaken by, an OrderLight packet whose sub-partition
// set contains the request's sub-partition; OrderLight packets of one group stay in order;
// the latency is at least LATENCY+1. Copies, merges and held merges must all happen.
module tb_l2_slice;
  import ol_pkg::*;
  localparam int NSUB = 8, LAT = 6, NPKT = 600;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, ol_copied, ol_merged, ol_hold;
  mem_req_t in_req, out_req;
  int checks = 0, failures = 0, cyc = 0;
  int n_copy = 0, n_merge = 0, n_hold = 0, n_out = 0, n_partial = 0;
  int t_in [int];
  int ol_seen_in [NSUB];     // OrderLight copies on each sub-partition so far (input side)
  int ol_seen_out [NSUB];    // same, output side
  int req_before [int];      // request id -> ol_seen_in of its sub-partition at input
  int next_ol_num [16];
  int exp_ol_num [16];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  l2_slice #(.NSUB(NSUB), .QDEPTH(4), .LATENCY(LAT)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_req, .out_valid, .out_ready, .out_req,
    .ol_copied, .ol_merged, .ol_hold);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (ol_copied) n_copy++;
    if (ol_merged) n_merge++;
    if (ol_hold) n_hold++;
    if (out_valid && out_ready) begin
      checks++;
      n_out++;
      if (out_req.kind == PK_OL) begin
        logic [15:0] m;
        m = subp_mask_of_grp(out_req.grp, NSUB);
        if (int'(out_req.payload) != exp_ol_num[out_req.grp]) failures++;
        exp_ol_num[out_req.grp]++;
        for (int s = 0; s < NSUB; s++) if (m[s]) ol_seen_out[s]++;
        if (cyc - t_in[10000 * (int'(out_req.grp) + 1) + int'(out_req.payload)] < LAT + 1) failures++;
      end else begin
        int id, s;
        id = int'(out_req.payload);
        s  = int'(subp_of_bank(out_req.bank, NSUB));
        if (ol_seen_out[s] != req_before[id]) begin
          failures++;
          $display("request %0d crossed an OrderLight packet on sub-partition %0d", id, s);
        end
        if (cyc - t_in[id] < LAT + 1) failures++;
      end
    end
  end

  initial begin
    int n_ol;
    n_ol = 0;
    for (int s = 0; s < NSUB; s++) begin ol_seen_in[s] = 0; ol_seen_out[s] = 0; end
    for (int g = 0; g < 16; g++) begin next_ol_num[g] = 0; exp_ol_num[g] = 0; end
    in_valid = 0; in_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPKT; i++) begin
      mem_req_t r;
      int key;
      if ($urandom_range(0, 4) == 0) begin
        int g;
        logic [15:0] m;
        g = $urandom_range(0, 3);
        r = mk_ol(0, g, 32'(next_ol_num[g]), 0);
        key = 10000 * (g + 1) + next_ol_num[g];
        next_ol_num[g]++;
        m = subp_mask_of_grp(GRP_W'(g), NSUB);
        if ($countones(m[NSUB-1:0]) < NSUB) n_partial++;
        for (int s = 0; s < NSUB; s++) if (m[s]) ol_seen_in[s]++;
        n_ol++;
      end else begin
        int b;
        b = $urandom_range(0, 15);
        r = mk_req(PK_PIM, OP_LOAD, 0, b, 0, 0, 0, 32'(i), 0);
        key = i;
        req_before[i] = ol_seen_in[subp_of_bank(BANK_W'(b), NSUB)];
      end
      @(negedge clk);
      in_valid = 1; in_req = r;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t_in[key] = cyc;
      #1;
    end
    @(negedge clk);
    in_valid = 0;
    while (n_out < NPKT) @(posedge clk);
    checks++;
    if (n_copy != n_ol || n_merge != n_ol || n_hold == 0 || n_partial == 0) failures++;
    $display("ol=%0d copied=%0d merged=%0d hold-cycles=%0d", n_ol, n_copy, n_merge, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
