// tb_dram_cmd_sched: two parts.
// 1. The row-switch example of the design: eight column writes to one row of a bank, then
//    a write to another row of that bank. The testbench checks the exact command times:
//    WR at ACT+9 (tRCDW), WRs 2 cycles apart (tCCDL), PRE at last WR+9 (tWTP), and the
//    next ACT at PRE+12 (tRP): 44 cycles from ACT to ACT.
// 2. Random reads and writes over all banks and a few rows. An independent checker
//    verifies every timing rule for every command pair and that each bank's column
//    commands follow that bank's request order; all requests must be served.
module tb_dram_cmd_sched;
  import ol_pkg::*;
  localparam int NBANK = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, cmd_valid, row_switch;
  mem_req_t in_req;
  logic bank_ready [NBANK];
  dram_cmd_t cmd;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dram_cmd_sched #(.NBANK(NBANK), .CQ_DEPTH(8)) dut (
    .clk, .rst_n, .in_valid, .in_req, .bank_ready, .cmd_valid, .cmd, .row_switch);

  // command log
  int t_act [NBANK], t_pre [NBANK], t_rd [NBANK], t_wr [NBANK];
  int t_act_any, t_col_any, t_rd_any, t_wr_any;
  int log_t [$];
  dram_cmd_e log_c [$];
  int col_q [NBANK][$];
  int served = 0;

  task automatic viol(string what);
    failures++;
    if (failures < 10) $display("timing violation %s at %0d", what, cyc);
  endtask

  always @(posedge clk) if (rst_n && cmd_valid) begin
    int b;
    b = int'(cmd.bank);
    log_t.push_back(cyc);
    log_c.push_back(cmd.cmd);
    checks++;
    case (cmd.cmd)
      DC_ACT: begin
        if (cyc - t_pre[b] < 12 || cyc - t_act_any < 3) viol("ACT");
        t_act[b] = cyc; t_act_any = cyc;
      end
      DC_PRE: begin
        if (cyc - t_act[b] < 28 || cyc - t_wr[b] < 9 || cyc - t_rd[b] < 3) viol("PRE");
        t_pre[b] = cyc;
      end
      DC_RD: begin
        if (cyc - t_act[b] < 12 || cyc - t_col_any < 1 || cyc - t_rd[b] < 2 || cyc - t_wr[b] < 2 ||
            cyc - t_wr_any < 2 + 3) viol("RD");
        t_rd[b] = cyc; t_rd_any = cyc; t_col_any = cyc;
      end
      DC_WR: begin
        if (cyc - t_act[b] < 9 || cyc - t_col_any < 1 || cyc - t_rd[b] < 2 || cyc - t_wr[b] < 2 ||
            cyc - t_rd_any < 12 - 2 + 1) viol("WR");
        t_wr[b] = cyc; t_wr_any = cyc; t_col_any = cyc;
      end
    endcase
    if (cmd.cmd == DC_RD || cmd.cmd == DC_WR) begin
      served++;
      if (col_q[b].size() == 0 || col_q[b][0] != int'(cmd.payload)) viol("bank order");
      else void'(col_q[b].pop_front());
    end
  end

  task automatic send(mem_req_t r);
    @(negedge clk);
    while (!bank_ready[r.bank]) @(negedge clk);
    in_valid = 1; in_req = r;
    col_q[r.bank].push_back(int'(r.payload));
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    in_valid = 0; in_req = '0;
    for (int b = 0; b < NBANK; b++) begin t_act[b] = -1000; t_pre[b] = -1000; t_rd[b] = -1000; t_wr[b] = -1000; end
    t_act_any = -1000; t_col_any = -1000; t_rd_any = -1000; t_wr_any = -1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- part 1: the 44-cycle row switch ----
    for (int i = 0; i < 8; i++) send(mk_req(PK_PIM, OP_STORE, 0, 0, 5, i, i, 32'(i), 0));
    send(mk_req(PK_PIM, OP_STORE, 0, 0, 9, 0, 0, 32'(8), 0));
    while (served < 9) @(posedge clk);
    checks++;
    if (log_c.size() != 12) failures++;
    else begin
      int t0;
      t0 = log_t[0];
      if (log_c[0] != DC_ACT) failures++;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (log_c[1 + i] != DC_WR || log_t[1 + i] - t0 != 9 + 2 * i) failures++;
      end
      checks++;
      if (log_c[9] != DC_PRE || log_t[9] - t0 != 32) failures++;
      checks++;
      if (log_c[10] != DC_ACT || log_t[10] - t0 != 44) failures++;
      $display("row switch: ACT to ACT = %0d cycles", log_t[10] - t0);
    end
    // ---- part 2: random traffic ----
    n = 0;
    for (int i = 0; i < 600; i++) begin
      mem_req_t r;
      int b;
      b = $urandom_range(0, NBANK - 1);
      r = mk_req($urandom_range(0, 1) ? PK_PIM : PK_LD, $urandom_range(0, 1) ? OP_STORE : OP_LOAD,
                 0, b, $urandom_range(0, 2), $urandom_range(0, 63), 0, 32'(100 + i), 0);
      send(r);
      n++;
    end
    while (served < 9 + n) @(posedge clk);
    checks++;
    $display("served=%0d", served);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
