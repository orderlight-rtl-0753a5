// tb_icnt: three sources send random requests to two destinations under random
// back-pressure. Checks: every request arrives at destination ch mod NDST, requests of one
// source to one destination arrive in order, and none arrives earlier than LATENCY+1
// cycles after it entered the network (the first one of an idle network exactly then).
module tb_icnt;
  import ol_pkg::*;
  localparam int NSRC = 3, NDST = 2, LAT = 10, PER = 150;
  logic clk = 0, rst_n = 0;
  logic sv [NSRC];
  logic sr [NSRC];
  mem_req_t sq [NSRC];
  logic dv [NDST];
  logic dr [NDST];
  mem_req_t dq [NDST];
  int checks = 0, failures = 0, cyc = 0;
  int t_in [int];
  int exp_q [NSRC][NDST][$];
  int got = 0, min_lat = 1 << 30;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  icnt #(.NSRC(NSRC), .NDST(NDST), .IN_DEPTH(2), .DEPTH(16), .LATENCY(LAT)) dut (
    .clk, .rst_n, .src_valid(sv), .src_ready(sr), .src_req(sq),
    .dst_valid(dv), .dst_ready(dr), .dst_req(dq));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) for (int d = 0; d < NDST; d++) dr[d] = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NDST; d++)
      if (dv[d] && dr[d]) begin
        int id, s;
        id = int'(dq[d].payload);
        s  = int'(dq[d].src);
        checks++;
        got++;
        if (int'(dq[d].ch) % NDST != d) failures++;
        if (exp_q[s][d].size() == 0 || exp_q[s][d][0] != id) begin
          failures++;
          $display("out of order: src %0d dst %0d id %0d", s, d, id);
        end else void'(exp_q[s][d].pop_front());
        if (cyc - t_in[id] < LAT + 1) failures++;
        if (cyc - t_in[id] < min_lat) min_lat = cyc - t_in[id];
      end
  end

  for (genvar s = 0; s < NSRC; s++) begin : g_src
    initial begin
      sv[s] = 0; sq[s] = '0;
      wait (rst_n);
      for (int i = 0; i < PER; i++) begin
        int ch, id;
        ch = $urandom_range(0, 15);
        id = s * 1000 + i;
        @(negedge clk);
        sv[s] = 1;
        sq[s] = mk_req(PK_PIM, OP_LOAD, ch, 0, 0, 0, 0, 32'(id), s);
        exp_q[s][ch % NDST].push_back(id);
        @(posedge clk);
        while (!sr[s]) @(posedge clk);
        t_in[id] = cyc;
        #1;
        if ($urandom_range(0, 1) == 0) begin @(negedge clk); sv[s] = 0; end
      end
      @(negedge clk);
      sv[s] = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < NSRC * PER) @(posedge clk);
    checks++;
    if (min_lat != LAT + 1) failures++;
    $display("min latency %0d", min_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
