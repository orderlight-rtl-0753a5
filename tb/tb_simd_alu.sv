// tb_simd_alu: random self-check of the SIMD ALU against a per-lane reference.
module tb_simd_alu;
  import ol_pkg::*;
  pim_op_e           op;
  logic [DATA_W-1:0] a, b, y;
  logic [LANE_W-1:0] s;
  int checks = 0, failures = 0;

  simd_alu dut (.op, .a, .b, .scalar(s), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int l = 0; l < LANES; l++) begin
        a[l*LANE_W +: LANE_W] = $urandom;
        b[l*LANE_W +: LANE_W] = $urandom;
      end
      s  = $urandom;
      op = pim_op_e'($urandom_range(0, 4));
      #1;
      for (int l = 0; l < LANES; l++) begin
        longint unsigned la, lb, ls, e;
        la = a[l*LANE_W +: LANE_W];
        lb = b[l*LANE_W +: LANE_W];
        ls = s;
        case (op)
          OP_ADD:  e = la + lb;
          OP_MUL:  e = la * ls;
          OP_MAC:  e = lb + la * ls;
          default: e = la;
        endcase
        checks++;
        if (y[l*LANE_W +: LANE_W] != e[31:0]) begin
          failures++;
          if (failures < 5) $display("mismatch op=%0d lane=%0d got=%h exp=%h", op, l, y[l*LANE_W +: LANE_W], e[31:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
