// tb_bw_multiplier: checks the combinational Baugh-Wooley multiplier against
// the simulator's signed multiplication. The 8-bit instance is run over all
// 65536 operand pairs; the 32-bit (default) instance on corner operands
// (zero, +-1, the most negative and most positive values) and one million
// random pairs.
module tb_bw_multiplier;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [31:0] x32, y32;
  logic [63:0] p32;
  int checks = 0, failures = 0;

  bw_multiplier #(.N(8)) dut8  (.x(x8),  .y(y8),  .p(p8));
  bw_multiplier          dut32 (.x(x32), .y(y32), .p(p32));

  initial begin : watchdog
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] tx, input logic [31:0] ty);
    logic signed [63:0] exp;
    x32 = tx; y32 = ty;
    #1;
    exp = 64'($signed(tx)) * 64'($signed(ty));
    checks++;
    if (p32 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL32 %0d * %0d -> %0d (expected %0d)", $signed(tx), $signed(ty), $signed(p32), exp);
    end
  endtask

  initial begin
    logic [31:0] corner [6];
    logic signed [15:0] e8;
    corner = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h8000_0001};
    x32 = '0; y32 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        e8 = 16'($signed(x8)) * 16'($signed(y8));
        checks++;
        if (p8 !== e8) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d -> %0d (expected %0d)", $signed(x8), $signed(y8), $signed(p8), e8);
        end
      end
    foreach (corner[i]) foreach (corner[j]) check32(corner[i], corner[j]);
    for (int n = 0; n < 1000000; n++) check32($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
