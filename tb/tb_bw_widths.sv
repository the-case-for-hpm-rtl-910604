// tb_bw_widths: runs the registered multiplier at the other operand widths
// the design is evaluated at (8, 16, 48 and 64 bits; 32 bits is covered by
// tb_bw_hpm_mult). Each instance gets corner operands and random operands,
// one per cycle, and every product is checked two cycles later against the
// simulator's signed multiplication. The adder-level count of each
// instance's reduction tree is checked against the depth table
// (4, 6, 9 and 10 levels).
module tb_bw_widths;
  localparam int NVEC = 5000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [7:0]   x8,  y8;   logic [15:0]  p8;   logic v8;
  logic [15:0]  x16, y16;  logic [31:0]  p16;  logic v16;
  logic [47:0]  x48, y48;  logic [95:0]  p48;  logic v48;
  logic [63:0]  x64, y64;  logic [127:0] p64;  logic v64;

  bw_hpm_mult #(.N(8))  d8  (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x8),  .y(y8),  .out_valid(v8),  .p(p8));
  bw_hpm_mult #(.N(16)) d16 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x16), .y(y16), .out_valid(v16), .p(p16));
  bw_hpm_mult #(.N(48)) d48 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x48), .y(y48), .out_valid(v48), .p(p48));
  bw_hpm_mult #(.N(64)) d64 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x64), .y(y64), .out_valid(v64), .p(p64));

  initial begin : watchdog
    repeat (NVEC + 1000) @(posedge clk);
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

  // Reference products, computed as the operands are driven.
  logic [127:0] e64 [$];
  logic [95:0]  e48 [$];
  logic [31:0]  e16 [$];
  logic [15:0]  e8  [$];

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic step(input logic [63:0] a, input logic [63:0] b);
    x64 = a;       y64 = b;
    x48 = a[47:0]; y48 = b[47:0];
    x16 = a[15:0]; y16 = b[15:0];
    x8  = a[7:0];  y8  = b[7:0];
    in_valid = 1'b1;
    e64.push_back(128'($signed(x64)) * 128'($signed(y64)));
    e48.push_back(96'($signed(x48))  * 96'($signed(y48)));
    e16.push_back(32'($signed(x16))  * 32'($signed(y16)));
    e8.push_back (16'($signed(x8))   * 16'($signed(y8)));
    @(posedge clk);
    #1;
    if (e64.size() >= 2) begin
      logic [127:0] r64; logic [95:0] r48; logic [31:0] r16; logic [15:0] r8;
      r64 = e64.pop_front(); r48 = e48.pop_front(); r16 = e16.pop_front(); r8 = e8.pop_front();
      checks += 4;
      if (!(v8 && v16 && v48 && v64)) begin
        failures++;
        $display("FAIL out_valid low");
      end
      if (p64 !== r64) begin failures++; if (failures < 10) $display("FAIL64 %h expected %h", p64, r64); end
      if (p48 !== r48) begin failures++; if (failures < 10) $display("FAIL48 %h expected %h", p48, r48); end
      if (p16 !== r16) begin failures++; if (failures < 10) $display("FAIL16 %h expected %h", p16, r16); end
      if (p8  !== r8)  begin failures++; if (failures < 10) $display("FAIL8 %h expected %h",  p8,  r8);  end
    end
  endtask

  initial begin
    logic [63:0] corner [5];
    corner = '{64'h0, 64'h1, '1, 64'h8000_8000_0000_8080, 64'h7fff_7fff_ffff_7f7f};
    rst_n = 1'b0; in_valid = 1'b0;
    x8 = '0; y8 = '0; x16 = '0; y16 = '0; x48 = '0; y48 = '0; x64 = '0; y64 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    expect_eq("depth N=8",  int'(d8.u_mult.u_tree.DEPTH),  4);
    expect_eq("depth N=16", int'(d16.u_mult.u_tree.DEPTH), 6);
    expect_eq("depth N=48", int'(d48.u_mult.u_tree.DEPTH), 9);
    expect_eq("depth N=64", int'(d64.u_mult.u_tree.DEPTH), 10);
    expect_eq("max adders N=48", int'(d48.u_mult.u_tree.MAX_COL_ADDERS), 46);
    expect_eq("max adders N=64", int'(d64.u_mult.u_tree.MAX_COL_ADDERS), 62);

    // Most negative value at every width (sign bit only), squared and mixed.
    step(64'h8000_8000_0000_8080, 64'h8000_8000_0000_8080);
    foreach (corner[i]) foreach (corner[j]) step(corner[i], corner[j]);
    for (int n = 0; n < NVEC; n++) step(rnd64(), rnd64());
    step('0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
