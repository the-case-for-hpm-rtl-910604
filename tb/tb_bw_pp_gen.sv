// tb_bw_pp_gen: checks the Baugh-Wooley partial-product array. For the
// arrangement to be right, the weighted sum of all partial-product bits plus
// 2^N plus 2^(2N-1), taken modulo 2^(2N), must equal the signed product.
// Each bit is also compared with its expected AND / NAND value. An 8-bit
// instance is run exhaustively, a 32-bit one on random and corner operands.
module tb_bw_pp_gen;
  logic [7:0]             x8, y8;
  logic [7:0][7:0]        pp8;
  logic [31:0]            x32, y32;
  logic [31:0][31:0]      pp32;
  int checks = 0, failures = 0;

  bw_pp_gen #(.N(8))  dut8  (.x(x8),  .y(y8),  .pp(pp8));
  bw_pp_gen #(.N(32)) dut32 (.x(x32), .y(y32), .pp(pp32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8();
    logic [15:0] acc;
    logic signed [15:0] prod;
    int bad;
    acc = 16'(1 << 8) + 16'(1 << 15);
    bad = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        acc += 16'(pp8[i][j]) << (i + j);
        if (pp8[i][j] != ((x8[j] & y8[i]) ^ ((i == 7) != (j == 7)))) bad++;
      end
    prod = 16'($signed(x8)) * 16'($signed(y8));
    checks++;
    if (acc != prod || bad != 0) begin
      failures++;
      if (failures < 10) $display("FAIL8 x=%h y=%h sum=%h prod=%h badbits=%0d", x8, y8, acc, prod, bad);
    end
  endtask

  task automatic check32(input logic [31:0] tx, input logic [31:0] ty);
    logic [63:0] acc;
    logic signed [63:0] prod;
    x32 = tx; y32 = ty;
    #1;
    acc = (64'd1 << 32) + (64'd1 << 63);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) acc += 64'(pp32[i][j]) << (i + j);
    prod = 64'($signed(tx)) * 64'($signed(ty));
    checks++;
    if (acc != prod) begin
      failures++;
      if (failures < 10) $display("FAIL32 x=%h y=%h sum=%h prod=%h", tx, ty, acc, prod);
    end
  endtask

  initial begin
    x32 = '0; y32 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        check8();
      end
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h8000_0000, 32'h7fff_ffff);
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'h7fff_ffff, 32'h7fff_ffff);
    for (int n = 0; n < 3000; n++) check32($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
