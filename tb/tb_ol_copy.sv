// tb_ol_copy: random packets with random destination masks go through the copy FSM while
// the outputs accept at random. Each output must receive exactly the packets whose mask
// includes it, in input order, and every OrderLight packet must be counted once.
module tb_ol_copy;
  import ol_pkg::*;
  localparam int NOUT = 3, NPKT = 400;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, ol_copied;
  mem_req_t in_req, out_req;
  logic [NOUT-1:0] in_mask;
  logic out_valid [NOUT];
  logic out_ready [NOUT];
  int checks = 0, failures = 0;

  mem_req_t        pkt  [NPKT];
  logic [NOUT-1:0] msk  [NPKT];
  int exp_q [NOUT][$];
  int n_ol = 0, n_ol_seen = 0, n_multi = 0;

  always #5 clk = ~clk;

  ol_copy #(.NOUT(NOUT)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_req, .in_mask,
                               .out_valid, .out_ready, .out_req, .ol_copied);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) for (int o = 0; o < NOUT; o++) out_ready[o] = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NOUT; o++)
      if (out_valid[o] && out_ready[o]) begin
        checks++;
        if (exp_q[o].size() == 0 || out_req.payload != pkt[exp_q[o][0]].payload) begin
          failures++;
          $display("output %0d got packet %0d out of order", o, out_req.payload);
        end else void'(exp_q[o].pop_front());
      end
    if (ol_copied) n_ol_seen++;
  end

  initial begin
    in_valid = 0; in_req = '0; in_mask = '0;
    for (int i = 0; i < NPKT; i++) begin
      logic ol;
      ol = ($urandom_range(0, 3) == 0);
      pkt[i] = ol ? mk_ol(0, 0, 32'(i), 0)
                  : mk_req(PK_PIM, OP_LOAD, 0, 0, 0, 0, 0, 32'(i), 0);
      msk[i] = ol ? NOUT'($urandom_range(1, (1 << NOUT) - 1)) : NOUT'(1) << $urandom_range(0, NOUT - 1);
      if (ol) n_ol++;
      if (ol && $countones(msk[i]) > 1) n_multi++;
      for (int o = 0; o < NOUT; o++) if (msk[i][o]) exp_q[o].push_back(i);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPKT; i++) begin
      @(negedge clk);
      in_valid = 1; in_req = pkt[i]; in_mask = msk[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    for (int o = 0; o < NOUT; o++) begin checks++; if (exp_q[o].size() != 0) failures++; end
    checks++;
    if (n_ol_seen != n_ol || n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
