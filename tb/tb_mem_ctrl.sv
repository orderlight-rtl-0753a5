// tb_mem_ctrl: random host/PIM reads and writes and OrderLight packets enter a memory
// controller. Reads and writes travel through separate queues, so the OrderLight packets
// must be copied into both and merged. Observed at the DRAM command bus: every request's
// column command appears exactly once, and within a bank no column command of a group
// appears while an older OrderLight epoch of that group still has unserved requests in
// that bank (per-bank command queues keep the scheduled order). Copy, merge and blocking
// must each have happened; packet numbers must pass the sanity check.
module tb_mem_ctrl;
  import ol_pkg::*;
  localparam int NBANK = 16, NPKT = 700;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, cmd_valid, ol_copied, ol_merged, ol_block, row_switch, seq_err;
  logic [31:0] ol_count;
  mem_req_t in_req;
  dram_cmd_t cmd;
  int checks = 0, failures = 0;
  int epoch_in [16];
  int pend [16][NBANK][int];
  int epoch_of [int];
  int n_req = 0, n_ol = 0, served = 0, n_copy = 0, n_merge = 0, n_block = 0, n_sw = 0;

  always #5 clk = ~clk;

  mem_ctrl #(.NBANK(NBANK), .QDEPTH(8), .NWIN(8), .CQ_DEPTH(4), .CH_ID(4'd1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_req, .cmd_valid, .cmd,
    .ol_copied, .ol_merged, .ol_block, .row_switch, .seq_err, .ol_count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ol_copied) n_copy++;
    if (ol_merged) n_merge++;
    if (ol_block) n_block++;
    if (row_switch) n_sw++;
    if (cmd_valid && (cmd.cmd == DC_RD || cmd.cmd == DC_WR)) begin
      int id, g, b, e;
      id = int'(cmd.payload);
      b  = int'(cmd.bank);
      g  = int'(grp_of_bank(cmd.bank));
      checks++;
      if (!epoch_of.exists(id)) begin failures++; $display("unknown request %0d", id); end
      else begin
        e = epoch_of[id];
        foreach (pend[g][b][k]) if (k < e && pend[g][b][k] > 0) begin
          failures++;
          $display("request %0d in bank %0d passed an OrderLight", id, b);
        end
        pend[g][b][e]--;
        epoch_of.delete(id);
        served++;
      end
      if ((cmd.cmd == DC_WR) != (cmd.col[0] == 1'b1)) failures++;   // col[0] marks writes
    end
  end

  initial begin
    in_valid = 0; in_req = '0;
    for (int g = 0; g < 16; g++) epoch_in[g] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPKT; i++) begin
      mem_req_t r;
      if ($urandom_range(0, 5) == 0) begin
        int g;
        g = $urandom_range(0, 3);
        r = mk_ol(1, g, 32'(epoch_in[g]), 0);
        epoch_in[g]++;
        n_ol++;
      end else begin
        int b, wr;
        b  = $urandom_range(0, NBANK - 1);
        wr = $urandom_range(0, 1);
        r = mk_req($urandom_range(0, 1) ? PK_PIM : (wr ? PK_ST : PK_LD), wr ? OP_STORE : OP_LOAD,
                   1, b, $urandom_range(0, 3), 2 * $urandom_range(0, 20) + wr, 0, 32'(i), 0);
        epoch_of[i] = epoch_in[r.grp];
        if (!pend[r.grp][b].exists(epoch_in[r.grp])) pend[r.grp][b][epoch_in[r.grp]] = 0;
        pend[r.grp][b][epoch_in[r.grp]]++;
        n_req++;
      end
      @(negedge clk);
      in_valid = 1; in_req = r;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      in_valid = 0;
    end
    while (served < n_req) @(posedge clk);
    checks++;
    if (n_copy != n_ol || n_merge != n_ol || ol_count != 32'(n_ol) || seq_err) failures++;
    checks++;
    if (n_block == 0 || n_sw == 0) failures++;
    $display("requests=%0d ol=%0d blocked=%0d row-switches=%0d", n_req, n_ol, n_block, n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
