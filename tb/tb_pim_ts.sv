// tb_pim_ts: writes random entries into the temporary storage and checks both read ports
// against a reference array.
module tb_pim_ts;
  import ol_pkg::*;
  localparam int NTS = 32;
  logic clk = 0, we;
  logic [TSI_W-1:0]  waddr, ra, rb;
  logic [DATA_W-1:0] wdata, da, db;
  logic [DATA_W-1:0] ref_m [NTS];
  logic              ref_v [NTS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pim_ts #(.NTS(NTS)) dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da),
                           .raddr_b(rb), .rdata_b(db));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NTS; i++) ref_v[i] = 0;
    we = 0; waddr = 0; wdata = '0; ra = 0; rb = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = TSI_W'($urandom_range(0, NTS - 1));
      for (int l = 0; l < LANES; l++) wdata[l*LANE_W +: LANE_W] = $urandom;
      ra = TSI_W'($urandom_range(0, NTS - 1));
      rb = TSI_W'($urandom_range(0, NTS - 1));
      #1;
      if (ref_v[ra]) begin checks++; if (da != ref_m[ra]) failures++; end
      if (ref_v[rb]) begin checks++; if (db != ref_m[rb]) failures++; end
      @(posedge clk);
      if (we) begin ref_m[waddr] = wdata; ref_v[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
