// tb_kogge_stone_adder: checks the 64-bit final adder (its size in the
// default 32 x 32 multiplier) against the simulator's own addition, on
// corner cases that ripple a carry through every prefix level and on random
// operands. Also runs an 8-bit instance exhaustively.
module tb_kogge_stone_adder;
  localparam int W = 64;
  logic [W-1:0] a, b, sum;
  logic         cout;
  logic [7:0]   a8, b8, sum8;
  logic         cout8;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(W)) dut   (.a(a),  .b(b),  .sum(sum),  .cout(cout));
  kogge_stone_adder #(.W(8)) dut8  (.a(a8), .b(b8), .sum(sum8), .cout(cout8));

  function automatic logic [W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check64(input logic [W-1:0] ta, input logic [W-1:0] tb);
    logic [W:0] exp;
    a = ta; b = tb;
    #1;
    exp = {1'b0, ta} + {1'b0, tb};
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h + %h -> %b %h (expected %h)", ta, tb, cout, sum, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    check64('0, '0);
    check64('1, 64'd1);
    check64('1, '1);
    check64({1'b0, {63{1'b1}}}, 64'd1);
    check64(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAB);
    for (int k = 0; k < W; k++) check64((64'd1 << k) - 1, 64'd1);
    for (int n = 0; n < 20000; n++) check64(rnd64(), rnd64());
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if ({cout8, sum8} != 9'(i + j)) begin
          failures++;
          $display("FAIL8 %0d + %0d -> %0d", i, j, {cout8, sum8});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
