// float_to_fixed: IEEE-754 single precision to signed fixed point.
//
// Converts the floating-point angles sent by the host into the CORDIC's
// fixed-point format: a W-bit two's-complement number with W-2 fraction bits.
// The 24-bit significand (hidden one restored) is shifted right by
// 150 - exponent - (W-2) places inside a wide word, so the result is the
// value truncated toward zero, and is negated for a negative sign.
// Special cases: zero and denormal inputs give 0; magnitudes of 2.0 or more,
// infinities and NaN saturate to the largest magnitude of the input's sign
// and raise out_sat. The conversion stage itself is part of the source
// design; its rounding and saturation rules are this design's choice.
//
// Interface: in_valid/in_float in, out_valid/out_fixed/out_sat out.
// Timing: one register stage, one value per clock.
module float_to_fixed #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [31:0]         in_float,
  output logic                out_valid,
  output logic signed [W-1:0] out_fixed,
  output logic                out_sat
);
  localparam int unsigned FRAC = W - 2;

  logic                sign;
  logic [7:0]          expo;
  logic [23:0]         sig;
  logic [W-1:0]        mag;
  logic signed [W-1:0] fixed_c;
  logic                sat_c;

  always_comb begin
    sign  = in_float[31];
    expo  = in_float[30:23];
    sig   = {1'b1, in_float[22:0]};
    sat_c = 1'b0;
    mag   = '0;
    if (expo == 8'd0) begin
      mag = '0;                                   // zero or denormal
    end else if (expo >= 8'd128) begin
      sat_c = 1'b1;                               // |x| >= 2, Inf or NaN
      mag   = {1'b0, {(W-1){1'b1}}};
    end else begin
      mag = W'({sig, {FRAC{1'b0}}} >> (8'd150 - expo));
    end
    fixed_c = sign ? -signed'(mag) : signed'(mag);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_fixed <= fixed_c;
    out_sat   <= in_valid & sat_c;
  end

  initial assert (W >= 8 && W <= 64) else $error("float_to_fixed: W out of range");
endmodule
