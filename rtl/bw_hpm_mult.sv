// bw_hpm_mult: top level. A registered N x N signed Baugh-Wooley multiplier
// (default N = 32).
//
// The operands are captured in an input register, multiplied in one cycle
// by the combinational bw_multiplier, and the 2N-bit product is captured in
// an output register. Registers on both sides give the multiplier a common
// synchronous interface and make the whole combinational path, from input
// register to output register, the timed path.
//
// Timing: operands presented with in_valid before rising edge k appear on p
// with out_valid after rising edge k+1 (latency 2 cycles, one new operation
// accepted every cycle). The valid bits and the asynchronous active-low
// reset are this design's own additions for use in a larger system; the
// datapath registers load every cycle.
module bw_hpm_mult #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   x_q, y_q;
  logic           v_q;
  logic [2*N-1:0] p_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      v_q <= 1'b0;
    end else begin
      x_q <= x;
      y_q <= y;
      v_q <= in_valid;
    end
  end

  bw_multiplier #(.N(N)) u_mult (
    .x(x_q),
    .y(y_q),
    .p(p_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      p         <= p_d;
      out_valid <= v_q;
    end
  end
endmodule
