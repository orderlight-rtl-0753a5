// tb_pim_unit: runs fine-grained PIM command sequences (load, fetch-and-add, store;
// fetch-and-multiply-add; fetch-and-scale) through one PIM unit. The testbench plays the
// DRAM: it returns read data T_CL cycles after each RD and checks the store data, and its
// cycle, T_WL cycles after each WR. Commands to another bank and host commands must leave
// the unit's TS untouched.
module tb_pim_unit;
  import ol_pkg::*;
  localparam int BANK = 3, CL = 12, WL = 2, N = 8;
  logic clk = 0, rst_n = 0;
  logic cmd_valid;
  dram_cmd_t cmd;
  logic [DATA_W-1:0] rdata, wdata;
  logic wvalid, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [DATA_W-1:0] rq [int];   // read data due at a cycle
  logic [DATA_W-1:0] wexp [int]; // expected store data at a cycle

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pim_unit #(.BANK_ID(BANK), .NTS(32), .T_CL(CL), .T_WL(WL)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .dram_rdata(rdata), .wvalid, .wdata, .busy);

  always @(negedge clk) rdata = rq.exists(cyc) ? rq[cyc] : {DATA_W{1'b1}};

  // check the store data bus every cycle
  always @(negedge clk) if (rst_n) begin
    if (wexp.exists(cyc)) begin
      checks++;
      if (!wvalid || wdata != wexp[cyc]) begin
        failures++;
        $display("store mismatch at %0d valid=%0d", cyc, wvalid);
      end
    end else if (wvalid) begin
      failures++;
      $display("unexpected store data at %0d", cyc);
    end
  end

  function automatic logic [DATA_W-1:0] vec(int seed);
    logic [DATA_W-1:0] v;
    for (int l = 0; l < LANES; l++) v[l*LANE_W +: LANE_W] = LANE_W'(seed * 131 + l * 17 + 5);
    return v;
  endfunction

  function automatic logic [DATA_W-1:0] lanewise(logic [DATA_W-1:0] x, logic [DATA_W-1:0] y,
                                                  int unsigned s, int mode);
    logic [DATA_W-1:0] r;
    for (int l = 0; l < LANES; l++) begin
      logic [31:0] xa, yb;
      xa = x[l*LANE_W +: LANE_W];
      yb = y[l*LANE_W +: LANE_W];
      case (mode)
        0: r[l*LANE_W +: LANE_W] = xa + yb;
        1: r[l*LANE_W +: LANE_W] = xa + s * yb;
        default: r[l*LANE_W +: LANE_W] = s * yb;
      endcase
    end
    return r;
  endfunction

  task automatic issue(dram_cmd_e c, logic pim, pim_op_e op, int bank, int tsi,
                       logic [31:0] pay, logic [DATA_W-1:0] d);
    @(negedge clk);
    cmd_valid   = 1;
    cmd         = '0;
    cmd.cmd     = c;
    cmd.pim     = pim;
    cmd.op      = op;
    cmd.bank    = BANK_W'(bank);
    cmd.tsi     = TSI_W'(tsi);
    cmd.payload = pay;
    if (c == DC_RD) rq[cyc + CL] = d;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  logic [DATA_W-1:0] ts_ref [N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // vector add: c = a + b
    for (int i = 0; i < N; i++) begin issue(DC_RD, 1, OP_LOAD, BANK, i, 0, vec(i)); ts_ref[i] = vec(i); end
    // noise: other bank, host read
    issue(DC_RD, 1, OP_LOAD, BANK + 1, 0, 0, vec(99));
    issue(DC_RD, 0, OP_LOAD, BANK, 1, 0, vec(98));
    for (int i = 0; i < N; i++) begin
      issue(DC_RD, 1, OP_ADD, BANK, i, 0, vec(100 + i));
      ts_ref[i] = lanewise(ts_ref[i], vec(100 + i), 0, 0);
    end
    repeat (CL + 2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wexp[cyc + 1 + WL] = ts_ref[i];
      issue(DC_WR, 1, OP_STORE, BANK, i, 0, '0);
    end
    // daxpy-like: TS += s * x, then store
    for (int i = 0; i < N; i++) begin
      issue(DC_RD, 1, OP_MAC, BANK, i, 32'd7 + i, vec(200 + i));
      ts_ref[i] = lanewise(ts_ref[i], vec(200 + i), 7 + i, 1);
    end
    // scale into entries N..N+1
    issue(DC_RD, 1, OP_MUL, BANK, N, 32'd3, vec(300));
    repeat (CL + 2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wexp[cyc + 1 + WL] = ts_ref[i];
      issue(DC_WR, 1, OP_STORE, BANK, i, 0, '0);
    end
    wexp[cyc + 1 + WL] = lanewise('0, vec(300), 3, 2);
    issue(DC_WR, 1, OP_STORE, BANK, N, 0, '0);
    // a store on another bank is not ours
    issue(DC_WR, 1, OP_STORE, BANK + 2, 0, 0, '0);
    repeat (10) @(negedge clk);
    checks++;
    if (busy) failures++;
    checks++;
    if (wexp.num() != 2 * N + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
