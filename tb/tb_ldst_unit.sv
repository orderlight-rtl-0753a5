// tb_ldst_unit: a random mix of host, PIM and OrderLight requests enters the LDST queue
// while L1 misses arrive on the side port. PIM/OrderLight requests must reach the
// interconnect port in their input order, host requests the L1 port in theirs, and every
// L1 miss must be forwarded to the interconnect in order. Cycles where both sources
// competed for the interconnect are counted and must occur.
module tb_ldst_unit;
  import ol_pkg::*;
  localparam int NPKT = 500;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, l1_valid, l1_ready, mv, mr, iv, ir;
  mem_req_t in_req, l1_req, mreq, ireq;
  int checks = 0, failures = 0;
  int exp_byp [$];
  int exp_l1 [$];
  int exp_miss [$];
  int contended = 0;

  always #5 clk = ~clk;

  ldst_unit #(.DEPTH(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_req,
    .l1_valid, .l1_ready, .l1_req, .l1_miss_valid(mv), .l1_miss_ready(mr), .l1_miss_req(mreq),
    .icnt_valid(iv), .icnt_ready(ir), .icnt_req(ireq));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int miss_id = 0;
  always @(negedge clk) begin
    l1_ready = ($urandom_range(0, 2) != 0);
    ir       = ($urandom_range(0, 3) != 0);
    if (!mv && rst_n && miss_id < 200 && $urandom_range(0, 2) == 0) begin
      mv   = 1;
      mreq = mk_req(PK_LD, OP_LOAD, 0, 0, 0, 0, 0, 32'(5000 + miss_id), 0);
      exp_miss.push_back(5000 + miss_id);
      miss_id++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (iv && ir) begin
      checks++;
      if (ireq.kind == PK_LD && ireq.payload >= 5000) begin
        if (exp_miss.size() == 0 || exp_miss[0] != int'(ireq.payload)) failures++;
        else void'(exp_miss.pop_front());
      end else begin
        if (exp_byp.size() == 0 || exp_byp[0] != int'(ireq.payload)) failures++;
        else void'(exp_byp.pop_front());
      end
    end
    if (l1_valid && l1_ready) begin
      checks++;
      if (exp_l1.size() == 0 || exp_l1[0] != int'(l1_req.payload)) failures++;
      else void'(exp_l1.pop_front());
    end
    if (mv && mr) mv <= 0;
    if (mv && iv && ireq.payload < 5000 && !mr) contended++;
    if (mv && mr && dut.hd_valid && dut.hd_bypass) contended++;
  end

  initial begin
    in_valid = 0; in_req = '0; mv = 0; mreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPKT; i++) begin
      pkt_kind_e k;
      k = pkt_kind_e'($urandom_range(0, 3));
      @(negedge clk);
      in_valid = 1;
      in_req   = (k == PK_OL) ? mk_ol(0, 0, 32'(i), 0) : mk_req(k, OP_LOAD, 0, 0, 0, 0, 0, 32'(i), 0);
      if (k == PK_PIM || k == PK_OL) exp_byp.push_back(i); else exp_l1.push_back(i);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (exp_byp.size() + exp_l1.size() + exp_miss.size() != 0) failures++;
    checks++;
    if (contended == 0) failures++;
    $display("contended=%0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
