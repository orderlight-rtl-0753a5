// pim_unit: generic PIM compute unit placed at one DRAM bank.
//
// The unit watches the channel's DRAM command bus and acts on column commands to its own
// bank that carry a PIM operation. It holds a temporary storage (pim_ts) and a SIMD ALU
// (simd_alu) whose operand-a mux selects either the bank's read data or a TS entry; the
// ALU result goes either back into the TS or out to the DRAM as write data:
//   RD with OP_LOAD        : TS[tsi] = DRAM                (PIM_Load)
//   RD with OP_ADD/MUL/MAC : TS[tsi] = ALU(DRAM, TS[tsi])  (fetch-and-op, e.g. PIM_Add)
//   WR with OP_STORE       : DRAM    = TS[tsi]             (PIM_Store)
// Read data arrives T_CL cycles after the RD command; a small pipeline carries the
// operation, TS index and scalar along so the result is written into TS in that cycle.
// Store data is read from TS and driven T_WL cycles after the WR command, together with
// wvalid. The command set and the datapath follow the generic PIM unit of the design;
// the command encoding, the latency alignment and the single ALU shared by compute and
// store (the command scheduler never lets read data and write data meet in one cycle)
// are this implementation's.
module pim_unit
  import ol_pkg::*;
#(
  parameter int                BANK_ID = 0,
  parameter int                NTS     = 32,
  parameter int                T_CL    = 12,
  parameter int                T_WL    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  dram_cmd_t         cmd,
  input  logic [DATA_W-1:0] dram_rdata,
  output logic              wvalid,
  output logic [DATA_W-1:0] wdata,
  output logic              busy
);
  typedef struct packed {
    logic              v;
    pim_op_e           op;
    logic [TSI_W-1:0]  tsi;
    logic [PAY_W-1:0]  scalar;
  } stage_t;

  stage_t rd_pipe [T_CL];
  stage_t wr_pipe [T_WL];
  stage_t rd_new, wr_new, rd_out, wr_out;

  logic mine;
  assign mine = cmd_valid && cmd.pim && int'(cmd.bank) == BANK_ID;

  always_comb begin
    rd_new        = '0;
    rd_new.v      = mine && cmd.cmd == DC_RD;
    rd_new.op     = cmd.op;
    rd_new.tsi    = cmd.tsi;
    rd_new.scalar = cmd.payload;
    wr_new        = rd_new;
    wr_new.v      = mine && cmd.cmd == DC_WR;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < T_CL; i++) rd_pipe[i] <= '0;
      for (int i = 0; i < T_WL; i++) wr_pipe[i] <= '0;
    end else begin
      rd_pipe[0] <= rd_new;
      for (int i = 1; i < T_CL; i++) rd_pipe[i] <= rd_pipe[i-1];
      wr_pipe[0] <= wr_new;
      for (int i = 1; i < T_WL; i++) wr_pipe[i] <= wr_pipe[i-1];
    end
  end

  assign rd_out = rd_pipe[T_CL-1];
  assign wr_out = wr_pipe[T_WL-1];

  logic [DATA_W-1:0] ts_a, ts_b, alu_a, alu_y;
  pim_op_e           alu_op;

  // operand-a mux: DRAM data for compute commands, TS for stores
  assign alu_a  = wr_out.v ? ts_b : dram_rdata;
  assign alu_op = wr_out.v ? OP_STORE : rd_out.op;

  simd_alu u_alu (
    .op(alu_op), .a(alu_a), .b(ts_a), .scalar(rd_out.scalar), .y(alu_y)
  );

  pim_ts #(.NTS(NTS)) u_ts (
    .clk,
    .we(rd_out.v), .waddr(rd_out.tsi), .wdata(alu_y),
    .raddr_a(rd_out.tsi), .rdata_a(ts_a),
    .raddr_b(wr_out.tsi), .rdata_b(ts_b)
  );

  assign wvalid = wr_out.v;
  assign wdata  = alu_y;

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < T_CL; i++) busy |= rd_pipe[i].v;
    for (int i = 0; i < T_WL; i++) busy |= wr_pipe[i].v;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(rd_out.v && wr_out.v));
endmodule
