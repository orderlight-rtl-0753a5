// hbm_channel_model: behavioural model of one HBM channel's DRAM arrays (testbench only).
//
// Not synthesizable logic: a sparse memory (associative array keyed by bank/row/column)
// that executes the commands of a channel's command bus. It checks the basic protocol
// (ACT to a closed bank, RD/WR/PRE to an open bank, column commands to the open row) and
// counts violations in errors. A RD returns the column's 32 bytes on rdata T_CL cycles
// later. A host WR stores the command's payload word replicated over the lanes at once;
// a PIM WR stores the PIM unit's write data, which arrives T_WL cycles after the command.
// Unwritten columns read as init_word(), so a testbench can compute expected values.
module hbm_channel_model
  import ol_pkg::*;
#(
  parameter int NBANK = 16,
  parameter int T_CL  = 12,
  parameter int T_WL  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  dram_cmd_t         cmd,
  input  logic              wvalid,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output int                errors
);
  logic [DATA_W-1:0] mem [int];
  logic              open_r [NBANK];
  logic [ROW_W-1:0]  row_r  [NBANK];
  logic [DATA_W-1:0] rpipe  [T_CL];
  int                wkey   [T_WL];
  logic              wpend  [T_WL];

  function automatic int key(int bank, int row, int col);
    return (bank << 24) | (row << 8) | col;
  endfunction

  function automatic logic [DATA_W-1:0] init_word(int bank, int row, int col);
    logic [DATA_W-1:0] w;
    for (int l = 0; l < LANES; l++)
      w[l*LANE_W +: LANE_W] = LANE_W'((bank * 7 + row * 1000 + col * 10 + l) * 3 + 1);
    return w;
  endfunction

  function automatic logic [DATA_W-1:0] peek(int bank, int row, int col);
    int k;
    k = key(bank, row, col);
    if (mem.exists(k)) return mem[k];
    return init_word(bank, row, col);
  endfunction

  assign rdata = rpipe[T_CL-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      errors <= 0;
      for (int b = 0; b < NBANK; b++) begin
        open_r[b] <= 1'b0;
        row_r[b]  <= '0;
      end
      for (int i = 0; i < T_CL; i++) rpipe[i] <= '0;
      for (int i = 0; i < T_WL; i++) begin
        wpend[i] <= 1'b0;
        wkey[i]  <= 0;
      end
    end else begin
      for (int i = 1; i < T_CL; i++) rpipe[i] <= rpipe[i-1];
      rpipe[0] <= '0;
      for (int i = 1; i < T_WL; i++) begin
        wpend[i] <= wpend[i-1];
        wkey[i]  <= wkey[i-1];
      end
      wpend[0] <= 1'b0;
      if (wpend[T_WL-1]) begin
        if (!wvalid) errors <= errors + 1;
        mem[wkey[T_WL-1]] = wdata;
      end else if (wvalid) errors <= errors + 1;
      if (cmd_valid) begin
        case (cmd.cmd)
          DC_ACT: begin
            if (open_r[cmd.bank]) errors <= errors + 1;
            open_r[cmd.bank] <= 1'b1;
            row_r[cmd.bank]  <= cmd.row;
          end
          DC_PRE: begin
            if (!open_r[cmd.bank]) errors <= errors + 1;
            open_r[cmd.bank] <= 1'b0;
          end
          default: begin
            if (!open_r[cmd.bank] || row_r[cmd.bank] != cmd.row) errors <= errors + 1;
            if (cmd.cmd == DC_RD) begin
              rpipe[0] <= peek(int'(cmd.bank), int'(cmd.row), int'(cmd.col));
            end else if (cmd.pim) begin
              wpend[0] <= 1'b1;
              wkey[0]  <= key(int'(cmd.bank), int'(cmd.row), int'(cmd.col));
            end else begin
              mem[key(int'(cmd.bank), int'(cmd.row), int'(cmd.col))] = {LANES{cmd.payload}};
            end
          end
        endcase
      end
    end
  end
endmodule
