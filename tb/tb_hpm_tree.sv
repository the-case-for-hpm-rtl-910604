// tb_hpm_tree: checks the reduction tree on random partial-product arrays
// (8-, 16- and 32-bit instances): the two output rows must add up, modulo
// 2^(2N), to the weighted sum of the input bits plus the constant 2^N.
// It also checks the tree's structure against the design's tables: the logic
// depth (adder levels) for each operand width, and N-2 adders in the fullest
// column.
module tb_hpm_tree;
  import hpm_pkg::*;

  logic [7:0][7:0]   pp8;
  logic [15:0]       a8, b8;
  logic [15:0][15:0] pp16;
  logic [31:0]       a16, b16;
  logic [31:0][31:0] pp32;
  logic [63:0]       a32, b32;
  int checks = 0, failures = 0;

  hpm_tree #(.N(8))  dut8  (.pp(pp8),  .row_a(a8),  .row_b(b8));
  hpm_tree #(.N(16)) dut16 (.pp(pp16), .row_a(a16), .row_b(b16));
  hpm_tree #(.N(32)) dut32 (.pp(pp32), .row_a(a32), .row_b(b32));

  // Logic depth of the tree per operand width (design depth table).
  localparam int NW = 8;
  localparam int WIDTHS [NW] = '{8, 16, 32, 40, 48, 54, 60, 64};
  localparam int DEPTHS [NW] = '{4, 6, 8, 8, 9, 9, 9, 10};

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] acc;
    // structure
    for (int k = 0; k < NW; k++)
      expect_eq($sformatf("depth N=%0d", WIDTHS[k]), int'(tree_depth(WIDTHS[k])), DEPTHS[k]);
    expect_eq("dut8 depth",  int'(dut8.DEPTH),  4);
    expect_eq("dut16 depth", int'(dut16.DEPTH), 6);
    expect_eq("dut32 depth", int'(dut32.DEPTH), 8);
    expect_eq("dut8 max adders",  int'(dut8.MAX_COL_ADDERS),  6);
    expect_eq("dut16 max adders", int'(dut16.MAX_COL_ADDERS), 14);
    expect_eq("dut32 max adders", int'(dut32.MAX_COL_ADDERS), 30);

    // function
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < 8; i++)  pp8[i]  = 8'($urandom());
      for (int i = 0; i < 16; i++) pp16[i] = 16'($urandom());
      for (int i = 0; i < 32; i++) pp32[i] = $urandom();
      if (n == 0) begin pp8 = '0; pp16 = '0; pp32 = '0; end
      if (n == 1) begin pp8 = '1; pp16 = '1; pp32 = '1; end
      #1;
      acc = 64'd1 << 8;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) acc += 64'(pp8[i][j]) << (i + j);
      checks++;
      if (16'(a8 + b8) != acc[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 rows %h+%h expected %h", a8, b8, acc[15:0]);
      end
      acc = 64'd1 << 16;
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) acc += 64'(pp16[i][j]) << (i + j);
      checks++;
      if (32'(a16 + b16) != acc[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 rows %h+%h expected %h", a16, b16, acc[31:0]);
      end
      acc = 64'd1 << 32;
      for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) acc += 64'(pp32[i][j]) << (i + j);
      checks++;
      if (64'(a32 + b32) != acc) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 rows %h+%h expected %h", a32, b32, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
