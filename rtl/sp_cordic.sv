// sp_cordic: super-pipelined CORDIC unit computing cosine and sine.
//
// A chain of N_STAGES stages: stage 1 loads the start vector (K, 0) and the
// angle (cordic_init), stages 2 .. N_STAGES each perform one micro-rotation
// with shift 0, 1, ..., N_STAGES-2 (cordic_stage). After the last stage x holds
// cos(angle) and y holds sin(angle). The default of 21 stages (20 rotations)
// is the source design's; it leaves an angle error below atan(2**-19), about
// 2e-6 rad. The stage count and the two-clock stages follow the source design,
// the fixed-point format is this design's choice.
//
// Interface: in_angle is an angle in radians in signed fixed point with W-2
// fraction bits and must lie within +-pi/2 (first or fourth quadrant);
// out_cos and out_sin use the same format.
// Timing: every stage spans two clocks, so the latency is 2*N_STAGES clocks
// (42 by default) and a new angle is accepted, and a result delivered, on
// every clock. There is no stall: the pipeline always advances.
module sp_cordic #(
  parameter int unsigned N_STAGES = 21,
  parameter int unsigned W        = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_cos,
  output logic signed [W-1:0] out_sin
);
  localparam int unsigned N_ROT = N_STAGES - 1;

  logic                v [N_STAGES];
  logic signed [W-1:0] x [N_STAGES];
  logic signed [W-1:0] y [N_STAGES];
  logic signed [W-1:0] z [N_STAGES];

  cordic_init #(.W(W), .N_ROT(N_ROT)) u_init (
    .clk, .rst_n,
    .in_valid (in_valid), .in_angle (in_angle),
    .out_valid(v[0]), .out_x(x[0]), .out_y(y[0]), .out_z(z[0])
  );

  for (genvar s = 1; s < N_STAGES; s++) begin : g_rot
    cordic_stage #(.W(W), .SHIFT(s - 1)) u_stage (
      .clk, .rst_n,
      .in_valid (v[s-1]), .in_x(x[s-1]), .in_y(y[s-1]), .in_z(z[s-1]),
      .out_valid(v[s]),   .out_x(x[s]),   .out_y(y[s]),   .out_z(z[s])
    );
  end

  assign out_valid = v[N_STAGES-1];
  assign out_cos   = x[N_STAGES-1];
  assign out_sin   = y[N_STAGES-1];

  initial assert (N_STAGES >= 2 && N_STAGES <= 33) else $error("sp_cordic: N_STAGES out of range");
endmodule
