// tb_operand_collector: a random instruction stream (PIM requests to two channels and two
// memory-groups, host loads, OrderLight instructions) with random register operands
// enters the operand collector while the LDST side accepts at random. Checks: every
// instruction leaves exactly once; an OrderLight packet leaves only after every earlier
// PIM request of its channel and group; nothing leaves ahead of an earlier OrderLight
// packet. Out-of-order issue (bank conflicts) and OrderLight waiting must both occur.
module tb_operand_collector;
  import ol_pkg::*;
  localparam int NINST = 600;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready, out_valid, out_ready, ol_wait;
  mem_req_t inst, out;
  logic [1:0] nsrc;
  logic [7:0] regs [3];
  int checks = 0, failures = 0;
  logic done [NINST];
  mem_req_t prog [NINST];
  int n_out = 0, max_out = -1, n_reorder = 0, n_wait = 0;

  always #5 clk = ~clk;

  operand_collector #(.NCU(4), .NRB(4), .REG_W(8)) dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .inst_nsrc(nsrc), .inst_regs(regs),
    .out_valid, .out_ready, .out, .ol_wait);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if (ol_wait) n_wait++;
    if (out_valid && out_ready) begin
      int id;
      id = int'(out.payload) & 32'hffff;
      checks++;
      if (done[id]) failures++;
      for (int j = 0; j < id; j++) begin
        if (prog[j].kind == PK_OL && !done[j]) begin
          failures++;
          $display("instruction %0d left ahead of OrderLight %0d", id, j);
        end
        if (out.kind == PK_OL && prog[j].kind == PK_PIM && !done[j] &&
            prog[j].ch == out.ch && prog[j].grp == out.grp) begin
          failures++;
          $display("OrderLight %0d overtook PIM request %0d", id, j);
        end
      end
      done[id] = 1;
      if (id < max_out) n_reorder++;
      if (id > max_out) max_out = id;
      n_out++;
    end
  end

  initial begin
    inst_valid = 0; inst = '0; nsrc = 0;
    for (int r = 0; r < 3; r++) regs[r] = 0;
    for (int i = 0; i < NINST; i++) begin
      int k;
      done[i] = 0;
      k = $urandom_range(0, 9);
      if (k == 0)      prog[i] = mk_ol($urandom_range(0, 1), $urandom_range(0, 1), 32'(i), 0);
      else if (k == 1) prog[i] = mk_req(PK_LD, OP_LOAD, 0, 0, 0, 0, 0, 32'(i), 0);
      else             prog[i] = mk_req(PK_PIM, OP_ADD, $urandom_range(0, 1), 4 * $urandom_range(0, 1), 0, 0, 0, 32'(i), 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NINST; i++) begin
      @(negedge clk);
      inst_valid = 1;
      inst = prog[i];
      nsrc = 2'($urandom_range(0, 3));
      for (int r = 0; r < 3; r++) regs[r] = 8'($urandom_range(0, 255));
      @(posedge clk);
      while (!inst_ready) @(posedge clk);
      #1;
      inst_valid = 0;
    end
    while (n_out < NINST) @(posedge clk);
    checks++;
    if (n_reorder == 0 || n_wait == 0) failures++;
    $display("reordered=%0d ol-wait-cycles=%0d", n_reorder, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
