// cordic_stage: one micro-rotation of the super-pipelined CORDIC.
//
// The stage rotates (x, y) by +atan(2**-SHIFT) when the residual angle z is
// zero or positive and by -atan(2**-SHIFT) when it is negative, and moves z the
// other way by the same angle, so z is driven toward zero:
//   d = +1 if z >= 0 else -1
//   x' = x - d * (y >>> SHIFT)
//   y' = y + d * (x >>> SHIFT)
//   z' = z - d * atan(2**-SHIFT)
// The micro-rotation uses only shifts and additions, the rotation angles
// having tangents that are powers of two, as in the source design.
//
// Super-pipelining: the source design splits each stage over two clocks so
// that no clock holds both a shift and an add. The first clock registers the
// shifted copies of x and y, the direction and the unshifted values; the
// second clock does the three additions. The exact register split is this
// design's reading of that description.
//
// Interface: in_valid/in_x/in_y/in_z and out_valid/out_x/out_y/out_z, signed
// fixed point with W-2 fraction bits. Timing: two clocks of latency, one
// vector accepted every clock. Only the valid flags are reset.
module cordic_stage #(
  parameter int unsigned W     = 32,
  parameter int unsigned SHIFT = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  input  logic signed [W-1:0] in_z,
  output logic                out_valid,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y,
  output logic signed [W-1:0] out_z
);
  import cordic_pkg::*;

  localparam logic signed [W-1:0] ATAN = W'(atan_const(SHIFT, W - 2));

  // First clock: shift.
  logic                v_a, neg_a;
  logic signed [W-1:0] x_a, y_a, z_a, xs_a, ys_a;

  always_ff @(posedge clk) begin
    if (!rst_n) v_a <= 1'b0;
    else        v_a <= in_valid;
    x_a   <= in_x;
    y_a   <= in_y;
    z_a   <= in_z;
    xs_a  <= in_x >>> SHIFT;
    ys_a  <= in_y >>> SHIFT;
    neg_a <= in_z[W-1];
  end

  // Second clock: add.
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_a;
    if (neg_a) begin
      out_x <= x_a + ys_a;
      out_y <= y_a - xs_a;
      out_z <= z_a + ATAN;
    end else begin
      out_x <= x_a - ys_a;
      out_y <= y_a + xs_a;
      out_z <= z_a - ATAN;
    end
  end

  initial begin
    assert (W >= 8 && W <= MAX_W) else $error("cordic_stage: W out of range");
    assert (SHIFT < 32) else $error("cordic_stage: SHIFT out of range");
  end
endmodule
