// pim_ts: temporary storage (TS) of a PIM compute unit.
//
// NTS entries of one column access (32 bytes) each, holding operands read from DRAM and
// results waiting to be stored. The default, 32 entries = 1 KB, is half of a 2 KB row
// buffer, the largest TS size of the evaluation (1/16, 1/8, 1/4 and 1/2 of the row buffer
// were studied). One synchronous write port and two combinational read ports: port a feeds
// the ALU's TS operand for compute commands, port b supplies data for PIM stores. The port
// count is this implementation's choice, sized so that a result write and a store read
// can happen in the same cycle.
module pim_ts
  import ol_pkg::*;
#(
  parameter int NTS = 32
) (
  input  logic              clk,
  input  logic              we,
  input  logic [TSI_W-1:0]  waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [TSI_W-1:0]  raddr_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic [TSI_W-1:0]  raddr_b,
  output logic [DATA_W-1:0] rdata_b
);
  logic [DATA_W-1:0] mem [NTS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

  initial assert (NTS <= (1 << TSI_W));
endmodule
