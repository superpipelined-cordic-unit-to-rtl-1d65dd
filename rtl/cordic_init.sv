// cordic_init: stage 1 of the super-pipelined CORDIC (the initialization stage).
//
// It starts every rotation from the vector (K, 0), where K is the inverse of
// the gain that the following N_ROT micro-rotations add to the vector length
// (K = 0.6072529 for 20 rotations). Loading x with K instead of 1 means the
// cosine and sine leave the last stage already scaled, with no multiplier at
// the end of the pipe; the residual angle z starts at the input angle.
// Starting x at this constant and giving stage 1 to the initialization both
// follow the source design; the fixed-point format (W-2 fraction bits) is
// this design's choice.
//
// Interface: in_valid/in_angle in, out_valid with out_x/out_y/out_z out.
// Timing: like every stage of the super-pipeline it spans two clocks, so the
// outputs appear two clocks after the input; one angle is accepted per clock.
// Only the valid flags are reset.
module cordic_init #(
  parameter int unsigned W     = 32,
  parameter int unsigned N_ROT = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y,
  output logic signed [W-1:0] out_z
);
  import cordic_pkg::*;

  localparam logic signed [W-1:0] K = W'(gain_const(N_ROT, W - 2));

  // First half-stage: capture the angle.
  logic                v_a;
  logic signed [W-1:0] z_a;

  always_ff @(posedge clk) begin
    if (!rst_n) v_a <= 1'b0;
    else        v_a <= in_valid;
    z_a <= in_angle;
  end

  // Second half-stage: emit the start vector (K, 0) with the angle as residual.
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_a;
    out_x <= K;
    out_y <= '0;
    out_z <= z_a;
  end

  initial begin
    assert (W >= 8 && W <= MAX_W) else $error("cordic_init: W out of range");
    assert (N_ROT >= 1 && N_ROT <= 32) else $error("cordic_init: N_ROT out of range");
  end
endmodule
