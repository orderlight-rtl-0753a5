// simd_alu: SIMD ALU of a PIM compute unit.
//
// LANES independent 32-bit integer lanes operate on one 32-byte column access. Operand a
// is the value chosen by the unit's input mux (DRAM data or a TS entry), operand b a TS
// entry, and scalar a 32-bit value broadcast to all lanes. Per lane (wrapping arithmetic):
//   OP_LOAD, OP_STORE : y = a            (move DRAM->TS or TS->DRAM)
//   OP_ADD            : y = b + a
//   OP_MUL            : y = scalar * a
//   OP_MAC            : y = b + scalar * a
// These operations cover the stream kernels of the evaluation (copy, scale, add, daxpy,
// triad); the lane width and the integer arithmetic are this implementation's choices.
// Purely combinational.
module simd_alu
  import ol_pkg::*;
(
  input  pim_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [LANE_W-1:0] scalar,
  output logic [DATA_W-1:0] y
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [LANE_W-1:0] la, lb, prod;
      la   = a[l*LANE_W +: LANE_W];
      lb   = b[l*LANE_W +: LANE_W];
      prod = scalar * la;
      unique case (op)
        OP_ADD:  y[l*LANE_W +: LANE_W] = lb + la;
        OP_MUL:  y[l*LANE_W +: LANE_W] = prod;
        OP_MAC:  y[l*LANE_W +: LANE_W] = lb + prod;
        default: y[l*LANE_W +: LANE_W] = la;
      endcase
    end
  end
endmodule
