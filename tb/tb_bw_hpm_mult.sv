// tb_bw_hpm_mult: end-to-end test of the registered multiplier at its
// default size (N = 32), no parameters overridden.
//
// Streams operands into the top one per cycle, with idle cycles (in_valid
// low) mixed in, and compares every product against the simulator's signed
// multiplication, delayed by the expected two-cycle latency. The stream is
// 10,000 random operand pairs (the evaluation workload of the design) plus
// corner pairs. It also checks the reset values and that out_valid follows
// in_valid two cycles later, then counts how often each Baugh-Wooley
// mechanism was exercised: a NAND-generated partial-product bit at 1, the
// final MSB inverter turning a 1 into a 0 and a 0 into a 1, and each sign
// combination of the operands. A mechanism never exercised counts as a
// failure.
module tb_bw_hpm_mult;
  localparam int N    = 32;
  localparam int LAT  = 2;
  localparam int NRND = 10000;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   x, y;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int cycles = 0;

  // expected results, one slot per cycle
  logic           exp_v [$];
  logic [2*N-1:0] exp_p [$];

  // mechanism counters
  int n_pos_pos = 0, n_neg_pos = 0, n_neg_neg = 0, n_zero = 0, n_min_min = 0;
  int n_msb_inv_1to0 = 0, n_msb_inv_0to1 = 0, n_nand_one = 0, n_bubble = 0;

  bw_hpm_mult dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .y        (y),
    .out_valid(out_valid),
    .p        (p)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NRND * 3 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe internal mechanisms while the datapath is busy.
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.u_mult.u_pp.pp[0][N-1] && dut.x_q[N-1] == 1'b0) n_nand_one++;
      if (dut.u_mult.sum[2*N-1] == 1'b1) n_msb_inv_1to0++;
      else                               n_msb_inv_0to1++;
    end
  end

  task automatic drive(input logic v, input logic [N-1:0] tx, input logic [N-1:0] ty);
    in_valid = v; x = tx; y = ty;
    exp_v.push_back(v);
    exp_p.push_back(64'($signed(tx)) * 64'($signed(ty)));
    if (v) begin
      if (tx == 0 || ty == 0)                        n_zero++;
      else if (!tx[N-1] && !ty[N-1])                n_pos_pos++;
      else if (tx[N-1] && ty[N-1])                   n_neg_neg++;
      else                                           n_neg_pos++;
      if (tx == {1'b1, {N-1{1'b0}}} && ty == tx)     n_min_min++;
    end else n_bubble++;
    @(posedge clk);
    #1;
    cycles++;
    // Output belonging to the operation driven LAT cycles ago.
    if (exp_v.size() >= LAT) begin
      logic ev; logic [2*N-1:0] ep;
      ev = exp_v.pop_front();
      ep = exp_p.pop_front();
      checks++;
      if (out_valid !== ev) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: out_valid=%b expected %b", cycles, out_valid, ev);
      end
      if (ev) begin
        checks++;
        if (p !== ep) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: p=%h expected %h", cycles, p, ep);
        end
      end
    end
  endtask

  task automatic check_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] corner [6];
    corner = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h8000_0001};
    rst_n = 1'b0; in_valid = 1'b0; x = '1; y = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || p !== '0) begin
      failures++;
      $display("FAIL reset: out_valid=%b p=%h", out_valid, p);
    end
    rst_n = 1'b1;
    // Latency: a single operation after idle cycles must appear exactly LAT
    // cycles after it was presented (checked by the queue in drive()).
    drive(1'b0, '0, '0);
    drive(1'b0, '0, '0);
    foreach (corner[i]) foreach (corner[j]) drive(1'b1, corner[i], corner[j]);
    for (int n = 0; n < NRND; n++) begin
      if ($urandom_range(0, 15) == 0) drive(1'b0, $urandom(), $urandom());
      drive(1'b1, $urandom(), $urandom());
    end
    repeat (LAT + 1) drive(1'b0, '0, '0);

    check_count("positive x positive", n_pos_pos);
    check_count("negative x positive", n_neg_pos);
    check_count("negative x negative", n_neg_neg);
    check_count("zero operand", n_zero);
    check_count("most negative squared", n_min_min);
    check_count("NAND partial-product bit at 1", n_nand_one);
    check_count("MSB inverter 1 -> 0", n_msb_inv_1to0);
    check_count("MSB inverter 0 -> 1", n_msb_inv_0to1);
    check_count("idle cycle", n_bubble);
    $display("mechanisms: pos*pos=%0d neg*pos=%0d neg*neg=%0d zero=%0d min*min=%0d nand1=%0d msb1->0=%0d msb0->1=%0d idle=%0d",
             n_pos_pos, n_neg_pos, n_neg_neg, n_zero, n_min_min, n_nand_one, n_msb_inv_1to0, n_msb_inv_0to1, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
