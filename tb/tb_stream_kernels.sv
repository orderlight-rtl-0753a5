// tb_stream_kernels: the stream kernels Copy, Scale, Daxpy and Triad run end to end on a
// reduced orderlight_top (one SM, one channel), one after the other.
//
// Each kernel is a tile of N columns, alternating between banks 0 and 1 of memory-group 0,
// written as the host PIM kernel would issue it, with an OrderLight instruction between
// dependent phases:
//   Copy   c = a            : N x load a -> TS, OL, N x store TS -> c
//   Scale  c = s * a        : N x multiply a by s -> TS, OL, N x store
//   Daxpy  c = b + s * a    : N x load b, OL, N x multiply-add a, OL, N x store
//   Triad  c = a + s * b    : N x load a, OL, N x multiply-add b, OL, N x store
// Each kernel writes its own result row. A behavioural HBM channel executes the commands.
// At the end every result column is compared lane by lane with the value computed here
// from the source rows, the DRAM protocol must be clean and the packet numbers in order.
// The kernels' formulas are those of the stream benchmark; the tile size, rows and the
// scalar values are this testbench's own.
module tb_stream_kernels;
  import ol_pkg::*;
  localparam int NSM = 1, NCH = 1, NBANK = 16, NTS = 8, N = 8, REG_W = 8, NK = 4;
  localparam int ROW_A = 10, ROW_B = 20, ROW_C = 30;
  localparam logic [31:0] SCALAR [NK] = '{32'd1, 32'd3, 32'd7, 32'd5};

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
  int                dram_err;

  int checks = 0, failures = 0, ol_num = 0, n_ol = 0;

  always #5 clk = ~clk;

  orderlight_top #(.NSM(NSM), .NCH(NCH), .NBANK(NBANK), .NSUB(2), .NTS(NTS), .REG_W(REG_W),
                   .QDEPTH(16), .NWIN(8), .CQ_DEPTH(4), .ICNT_LAT(20), .L2_LAT(10)) dut (.*);

  hbm_channel_model #(.NBANK(NBANK)) u_hbm (
    .clk, .rst_n, .cmd_valid(dram_cmd_valid[0]), .cmd(dram_cmd[0]),
    .wvalid(dram_wvalid[0]), .wdata(dram_wdata[0]), .rdata(dram_rdata[0]), .errors(dram_err));

  // no host traffic in this test: the L1 port is never used
  assign l1_ready[0]      = 1'b1;
  assign l1_miss_valid[0] = 1'b0;
  assign l1_miss_req[0]   = '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] lanes_axpy(logic [DATA_W-1:0] x, logic [DATA_W-1:0] y,
                                                   logic [31:0] s);
    // per lane: x + s * y
    logic [DATA_W-1:0] r;
    for (int l = 0; l < LANES; l++)
      r[l*LANE_W +: LANE_W] = x[l*LANE_W +: LANE_W] + s * y[l*LANE_W +: LANE_W];
    return r;
  endfunction

  task automatic put(mem_req_t r);
    @(negedge clk);
    inst_valid[0] = 1;
    inst[0]       = r;
    inst_nsrc[0]  = 2'($urandom_range(0, 3));
    for (int k = 0; k < 3; k++) inst_regs[0][k] = REG_W'($urandom_range(0, 255));
    @(posedge clk);
    while (!inst_ready[0]) @(posedge clk);
    #1;
    inst_valid[0] = 0;
  endtask

  task automatic ol();
    put(mk_ol(0, 0, 32'(ol_num), 0));
    ol_num++;
  endtask

  task automatic phase(pim_op_e op, int row, int k);
    for (int i = 0; i < N; i++)
      put(mk_req(PK_PIM, op, 0, i % 2, row, k * N + i, i, SCALAR[k], 0));
  endtask

  initial begin
    inst_valid[0] = 0; inst[0] = '0; inst_nsrc[0] = 0;
    for (int k = 0; k < 3; k++) inst_regs[0][k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Copy
    phase(OP_LOAD, ROW_A, 0);  ol();
    phase(OP_STORE, ROW_C, 0); ol();
    // Scale
    phase(OP_MUL, ROW_A, 1);   ol();
    phase(OP_STORE, ROW_C, 1); ol();
    // Daxpy: c = b + s * a
    phase(OP_LOAD, ROW_B, 2);  ol();
    phase(OP_MAC, ROW_A, 2);   ol();
    phase(OP_STORE, ROW_C, 2); ol();
    // Triad: c = a + s * b
    phase(OP_LOAD, ROW_A, 3);  ol();
    phase(OP_MAC, ROW_B, 3);   ol();
    phase(OP_STORE, ROW_C, 3); ol();
    // drain
    begin
      int idle;
      idle = 0;
      while (idle < 400) begin
        @(posedge clk);
        idle++;
        if (dram_cmd_valid[0]) idle = 0;
      end
    end
    for (int k = 0; k < NK; k++)
      for (int i = 0; i < N; i++) begin
        int b, col;
        logic [DATA_W-1:0] a, bb, expv, got;
        b   = i % 2;
        col = k * N + i;
        a   = u_hbm.peek(b, ROW_A, col);
        bb  = u_hbm.peek(b, ROW_B, col);
        case (k)
          0:       expv = a;
          1:       expv = lanes_axpy('0, a, SCALAR[k]);
          2:       expv = lanes_axpy(bb, a, SCALAR[k]);
          default: expv = lanes_axpy(a, bb, SCALAR[k]);
        endcase
        got = u_hbm.peek(b, ROW_C, col);
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 5) $display("kernel %0d bank %0d col %0d wrong", k, b, col);
        end
      end
    checks++;
    if (dram_err != 0 || seq_err[0] || ol_count[0] != 32'(ol_num)) begin
      failures++;
      $display("dram errors %0d seq_err %0d ol_count %0d of %0d", dram_err, seq_err[0], ol_count[0], ol_num);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
