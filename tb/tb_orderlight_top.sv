// tb_orderlight_top: end-to-end run of the vector_add PIM kernel, c[i] = a[i] + b[i].
//
// Each SM runs one PIM warp that owns one memory channel. Per tile of N columns it issues
// N PIM loads of a (DRAM -> TS), an OrderLight instruction, N fetch-and-add commands on b,
// an OrderLight instruction, N PIM stores of c (TS -> DRAM) and a final OrderLight
// instruction; the columns alternate between two banks of memory-group 0, each with its own
// PIM unit. Host loads and stores to memory-group 2 are mixed in; they go through the L1
// port, which this testbench loops back as always-missing. Behavioural HBM channel models
// execute the commands. At the end every c column must equal a + b lane by lane, host
// stores must be in DRAM, the DRAM protocol must be clean and the packet numbers in order.
// Each OrderLight mechanism must have happened at least once: the operand-collector gate,
// the L2 copy/merge (and a held merge), the read/write-queue copy/merge, scheduler
// blocking, and row switches. Parameters can be overridden by the FULL define-free
// variant in tb_orderlight_full, which runs the top at its defaults.
module tb_orderlight_top;
  import ol_pkg::*;
  localparam int NSM = 2, NCH = 2, NBANK = 16, NTS = 8, N = 8, TILES = 3, REG_W = 8;
  localparam int ROW_A = 10, ROW_B = 20, ROW_C = 30;

  logic clk = 0, rst_n = 0;
  logic              inst_valid    [NSM];
  logic              inst_ready    [NSM];
  mem_req_t          inst          [NSM];
  logic [1:0]        inst_nsrc     [NSM];
  logic [REG_W-1:0]  inst_regs     [NSM][3];
  logic              l1_valid      [NSM];
  logic              l1_ready      [NSM];
  mem_req_t          l1_req        [NSM];
  logic              l1_miss_valid [NSM];
  logic              l1_miss_ready [NSM];
  mem_req_t          l1_miss_req   [NSM];
  logic              dram_cmd_valid [NCH];
  dram_cmd_t         dram_cmd       [NCH];
  logic [DATA_W-1:0] dram_rdata     [NCH];
  logic              dram_wvalid    [NCH];
  logic [DATA_W-1:0] dram_wdata     [NCH];
  logic              ol_wait        [NSM];
  logic              l2_ol_copied   [NCH];
  logic              l2_ol_merged   [NCH];
  logic              l2_ol_hold     [NCH];
  logic              mc_ol_copied   [NCH];
  logic              mc_ol_merged   [NCH];
  logic              mc_ol_block    [NCH];
  logic              row_switch     [NCH];
  logic              seq_err        [NCH];
  logic [31:0]       ol_count       [NCH];
  int                dram_err       [NCH];

  int checks = 0, failures = 0, cyc = 0;
  int n_wait = 0, n_l2c = 0, n_l2m = 0, n_l2h = 0, n_mcc = 0, n_mcm = 0, n_blk = 0, n_sw = 0;
  int n_l1 = 0;
  int sm_done = 0;
  bit check_go = 0;
  bit ch_done [NCH];
  int ch_checks [NCH];
  int ch_fail [NCH];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  orderlight_top #(.NSM(NSM), .NCH(NCH), .NBANK(NBANK), .NSUB(2), .NTS(NTS), .REG_W(REG_W),
                   .QDEPTH(16), .NWIN(8), .CQ_DEPTH(4), .ICNT_LAT(20), .L2_LAT(10)) dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_hbm
    hbm_channel_model #(.NBANK(NBANK)) u_hbm (
      .clk, .rst_n, .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]),
      .wvalid(dram_wvalid[c]), .wdata(dram_wdata[c]), .rdata(dram_rdata[c]),
      .errors(dram_err[c]));

    // end-of-run check of this channel's memory
    initial begin
      ch_done[c] = 0; ch_checks[c] = 0; ch_fail[c] = 0;
      wait (check_go);
      for (int t = 0; t < TILES; t++)
        for (int i = 0; i < N; i++) begin
          int b, col;
          logic [DATA_W-1:0] got, expv;
          b    = i % 2;
          col  = t * N + i;
          got  = u_hbm.peek(b, ROW_C, col);
          expv = add_lanes(u_hbm.peek(b, ROW_A, col), u_hbm.peek(b, ROW_B, col));
          ch_checks[c]++;
          if (got != expv) begin
            ch_fail[c]++;
            if (ch_fail[c] < 4) $display("ch %0d bank %0d col %0d: c != a + b", c, b, col);
          end
        end
      if (c < NSM) begin
        for (int t = 0; t < TILES; t++) begin
          ch_checks[c]++;
          if (u_hbm.peek(8 + t, 5, t) != {LANES{32'(1000 * c + t)}}) ch_fail[c]++;
        end
      end
      ch_checks[c]++;
      if (dram_err[c] != 0 || seq_err[c] || ol_count[c] != 32'((c < NSM) ? 3 * TILES : 0)) begin
        ch_fail[c]++;
        $display("ch %0d: dram errors %0d seq_err %0d ol_count %0d", c, dram_err[c], seq_err[c], ol_count[c]);
      end
      ch_done[c] = 1;
    end
  end

  // L1 stand-in: every access misses and is forwarded to the interconnect.
  for (genvar s = 0; s < NSM; s++) begin : g_l1
    mem_req_t q [$];
    assign l1_ready[s] = 1'b1;
    always @(negedge clk) begin
      l1_miss_valid[s] = q.size() > 0;
      l1_miss_req[s]   = (q.size() > 0) ? q[0] : '0;
    end
    always @(posedge clk) begin
      if (l1_miss_valid[s] && l1_miss_ready[s]) void'(q.pop_front());
      if (rst_n && l1_valid[s] && l1_ready[s]) begin q.push_back(l1_req[s]); n_l1++; end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSM; s++) if (ol_wait[s]) n_wait++;
    for (int c = 0; c < NCH; c++) begin
      if (l2_ol_copied[c]) n_l2c++;
      if (l2_ol_merged[c]) n_l2m++;
      if (l2_ol_hold[c])   n_l2h++;
      if (mc_ol_copied[c]) n_mcc++;
      if (mc_ol_merged[c]) n_mcm++;
      if (mc_ol_block[c])  n_blk++;
      if (row_switch[c])   n_sw++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] add_lanes(logic [DATA_W-1:0] x, logic [DATA_W-1:0] y);
    logic [DATA_W-1:0] r;
    for (int l = 0; l < LANES; l++) r[l*LANE_W +: LANE_W] = x[l*LANE_W +: LANE_W] + y[l*LANE_W +: LANE_W];
    return r;
  endfunction

  for (genvar s = 0; s < NSM; s++) begin : g_warp
    int ol_num = 0;
    task automatic put(mem_req_t r);
      @(negedge clk);
      inst_valid[s] = 1;
      inst[s]       = r;
      inst_nsrc[s]  = 2'($urandom_range(0, 3));
      for (int k = 0; k < 3; k++) inst_regs[s][k] = REG_W'($urandom_range(0, 255));
      @(posedge clk);
      while (!inst_ready[s]) @(posedge clk);
      #1;
      inst_valid[s] = 0;
    endtask
    task automatic ol();
      put(mk_ol(s, 0, 32'(ol_num), s));
      ol_num++;
    endtask
    initial begin
      inst_valid[s] = 0; inst[s] = '0; inst_nsrc[s] = 0;
      for (int k = 0; k < 3; k++) inst_regs[s][k] = '0;
      wait (rst_n);
      for (int t = 0; t < TILES; t++) begin
        for (int i = 0; i < N; i++)
          put(mk_req(PK_PIM, OP_LOAD, s, i % 2, ROW_A, t * N + i, i, 0, s));
        put(mk_req(PK_ST, OP_STORE, s, 8 + t, 5, t, 0, 32'(1000 * s + t), s));
        ol();
        for (int i = 0; i < N; i++)
          put(mk_req(PK_PIM, OP_ADD, s, i % 2, ROW_B, t * N + i, i, 0, s));
        put(mk_req(PK_LD, OP_LOAD, s, 9, 6, t, 0, 0, s));
        ol();
        for (int i = 0; i < N; i++)
          put(mk_req(PK_PIM, OP_STORE, s, i % 2, ROW_C, t * N + i, i, 0, s));
        ol();
      end
      sm_done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sm_done == NSM);
    // drain: wait until no DRAM command for a while
    begin
      int idle;
      idle = 0;
      while (idle < 400) begin
        @(posedge clk);
        idle++;
        for (int c = 0; c < NCH; c++) if (dram_cmd_valid[c]) idle = 0;
      end
    end
    check_go = 1;
    for (int c = 0; c < NCH; c++) begin
      wait (ch_done[c]);
      checks   += ch_checks[c];
      failures += ch_fail[c];
    end
    $display("cycles=%0d ol-wait=%0d l2-copy=%0d l2-merge=%0d l2-held=%0d mc-copy=%0d mc-merge=%0d blocked=%0d row-switch=%0d l1=%0d",
             cyc, n_wait, n_l2c, n_l2m, n_l2h, n_mcc, n_mcm, n_blk, n_sw, n_l1);
    checks++; if (n_wait == 0) begin failures++; $display("operand-collector gate never waited"); end
    checks++; if (n_l2c == 0 || n_l2m == 0) begin failures++; $display("no L2 copy/merge"); end
    checks++; if (n_l2h == 0) begin failures++; $display("no held L2 merge"); end
    checks++; if (n_mcc == 0 || n_mcm == 0) begin failures++; $display("no R/W queue copy/merge"); end
    checks++; if (n_blk == 0) begin failures++; $display("scheduler never blocked"); end
    checks++; if (n_sw == 0) begin failures++; $display("no row switch"); end
    checks++; if (n_l1 != NSM * TILES * 2) begin failures++; $display("L1 bypass wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
