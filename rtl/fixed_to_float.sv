// fixed_to_float: signed fixed point to IEEE-754 single precision.
//
// Converts a CORDIC result (W-bit two's complement, W-2 fraction bits) back to
// floating point for the host. The magnitude is normalised so that its leading
// one sits in the top bit; the exponent follows from the leading one's
// position, and the 23 bits below it become the mantissa, rounded to nearest
// with ties to even using the guard bit and a sticky OR of the rest. A
// rounding carry out of the mantissa bumps the exponent. Zero converts to +0.
// The conversion stage itself is part of the source design; the rounding rule
// is this design's choice.
//
// Interface: in_valid/in_fixed in, out_valid/out_float out.
// Timing: one register stage, one value per clock. W must be at least 26 so
// that a guard bit exists below the 24 significant bits.
module fixed_to_float #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_fixed,
  output logic                out_valid,
  output logic [31:0]         out_float
);
  localparam int unsigned FRAC = W - 2;
  localparam int unsigned PW   = $clog2(W);

  logic          sign;
  logic [W-1:0]  mag, norm;
  logic [PW-1:0] msb;
  logic          found;
  logic [23:0]   mant;          // 23 mantissa bits plus a carry bit
  logic          guard, sticky;
  logic [7:0]    expo;
  logic [31:0]   float_c;

  always_comb begin
    sign = in_fixed[W-1];
    mag  = sign ? W'(-in_fixed) : W'(in_fixed);
    // Position of the leading one.
    msb   = '0;
    found = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (mag[i]) begin
        msb   = PW'(i);
        found = 1'b1;
      end
    end
    norm   = mag << (PW'(W - 1) - msb);
    guard  = norm[W-25];
    sticky = |norm[W-26:0];
    mant   = {1'b0, norm[W-2:W-24]};
    if (guard && (sticky || mant[0])) mant = mant + 24'd1;
    expo   = 8'(msb) + 8'(127 - FRAC) + 8'(mant[23]);
    if (!found) float_c = 32'd0;
    else        float_c = {sign, expo, mant[22:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_float <= float_c;
  end

  initial assert (W >= 26 && W <= 64) else $error("fixed_to_float: W out of range");
endmodule
