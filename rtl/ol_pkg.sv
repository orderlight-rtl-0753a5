// ol_pkg: types and constants shared by the OrderLight memory pipe.
//
// Every stage of the pipe, from the SM's operand collector to the PIM units next to
// the DRAM banks, moves one request format, mem_req_t. A request is either a host
// load/store, a fine-grained PIM instruction, or an OrderLight packet; the 2-bit
// packet ID tells them apart. The OrderLight packet fields (2b packet ID, 4b channel
// ID, 4b memory-group ID, 32b packet number) follow the packet layout of the design;
// the packet number travels in the 32-bit payload field. The row, column, TS index
// and operation fields, the packet ID encoding and the bank-to-group mapping are
// choices of this implementation.
package ol_pkg;

  // Field widths
  localparam int CH_W     = 4;   // channel ID (16 HBM channels)
  localparam int GRP_W    = 4;   // memory-group ID
  localparam int BANK_W   = 4;   // 16 banks per channel
  localparam int ROW_W    = 14;  // DRAM row address
  localparam int COL_W    = 6;   // 2 KB row buffer / 32 B column access = 64 columns
  localparam int TSI_W    = 5;   // TS entry index (up to 32 entries of 32 B = 1/2 row buffer)
  localparam int PAY_W    = 32;  // scalar operand, store word or OrderLight packet number
  localparam int SRC_W    = 7;   // issuing SM (up to 128)
  localparam int DATA_W   = 256; // one column access: 32 B DRAM bus width
  localparam int LANE_W   = 32;  // SIMD lane width
  localparam int LANES    = DATA_W / LANE_W;

  // Banks per memory-group: a memory-group is a contiguous set of banks.
  localparam int GRP_BANKS = 4;

  typedef enum logic [1:0] {
    PK_LD  = 2'b00,  // host load
    PK_ST  = 2'b01,  // host store
    PK_PIM = 2'b10,  // fine-grained PIM instruction
    PK_OL  = 2'b11   // OrderLight packet
  } pkt_kind_e;

  typedef enum logic [2:0] {
    OP_LOAD  = 3'd0, // TS[i] = DRAM
    OP_ADD   = 3'd1, // TS[i] = TS[i] + DRAM          (fetch-and-add)
    OP_MUL   = 3'd2, // TS[i] = scalar * DRAM         (fetch-and-scale)
    OP_MAC   = 3'd3, // TS[i] = TS[i] + scalar * DRAM (fetch-and-multiply-add)
    OP_STORE = 3'd4  // DRAM = TS[i]
  } pim_op_e;

  typedef struct packed {
    pkt_kind_e          kind;
    pim_op_e            op;
    logic [CH_W-1:0]    ch;
    logic [GRP_W-1:0]   grp;
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
    logic [TSI_W-1:0]   tsi;
    logic [PAY_W-1:0]   payload;
    logic [SRC_W-1:0]   src;
  } mem_req_t;

  localparam int REQ_W = $bits(mem_req_t);

  // DRAM commands driven by a channel's command scheduler
  typedef enum logic [1:0] {
    DC_ACT = 2'd0,
    DC_PRE = 2'd1,
    DC_RD  = 2'd2,
    DC_WR  = 2'd3
  } dram_cmd_e;

  typedef struct packed {
    dram_cmd_e          cmd;
    logic               pim;     // column command carries a PIM operation
    pim_op_e            op;
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
    logic [TSI_W-1:0]   tsi;
    logic [PAY_W-1:0]   payload;
  } dram_cmd_t;

  function automatic logic [GRP_W-1:0] grp_of_bank(logic [BANK_W-1:0] bank);
    return GRP_W'(bank / BANK_W'(GRP_BANKS));
  endfunction

  // A request reads DRAM unless it is a host store or a PIM store.
  function automatic logic is_write(mem_req_t r);
    return (r.kind == PK_ST) || (r.kind == PK_PIM && r.op == OP_STORE);
  endfunction

  // L2 sub-partition of a bank: banks are interleaved over the sub-partitions.
  function automatic int unsigned subp_of_bank(logic [BANK_W-1:0] bank, int unsigned nsub);
    return int'(bank) % nsub;
  endfunction

  // Sub-partitions used by a memory-group: the ones its banks map to.
  function automatic logic [15:0] subp_mask_of_grp(logic [GRP_W-1:0] grp, int unsigned nsub);
    logic [15:0] m;
    m = '0;
    for (int b = 0; b < GRP_BANKS; b++)
      m[(int'(grp) * GRP_BANKS + b) % nsub] = 1'b1;
    return m;
  endfunction

  // Request constructors, used by the testbenches.
  function automatic mem_req_t mk_req(pkt_kind_e kind, pim_op_e op, int ch, int bank, int row,
                                      int col, int tsi, logic [PAY_W-1:0] payload, int src);
    mem_req_t r;
    r.kind    = kind;
    r.op      = op;
    r.ch      = CH_W'(ch);
    r.bank    = BANK_W'(bank);
    r.grp     = grp_of_bank(BANK_W'(bank));
    r.row     = ROW_W'(row);
    r.col     = COL_W'(col);
    r.tsi     = TSI_W'(tsi);
    r.payload = payload;
    r.src     = SRC_W'(src);
    return r;
  endfunction

  function automatic mem_req_t mk_ol(int ch, int grp, logic [PAY_W-1:0] pkt_num, int src);
    mem_req_t r;
    r         = '0;
    r.kind    = PK_OL;
    r.ch      = CH_W'(ch);
    r.grp     = GRP_W'(grp);
    r.payload = pkt_num;
    r.src     = SRC_W'(src);
    return r;
  endfunction

endpackage
