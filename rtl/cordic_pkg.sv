// cordic_pkg: constants shared by the super-pipelined CORDIC.
//
// The CORDIC datapath carries a vector (x, y) and a residual angle z in signed
// fixed point: a value v is held as round(v * 2**FRAC) with FRAC = W - 2, so the
// default W = 32 gives one sign bit, one integer bit and 30 fraction bits
// (range -2 .. 2, enough for angles up to pi/2 and for sines and cosines).
// The word width is this design's choice; the arithmetic follows the classic
// rotation-mode CORDIC.
//
// The two constant tables hold 62 fraction bits and are rounded down to the
// datapath format by the functions below:
//   ATAN_TAB[i] = round(atan(2**-i) * 2**62)
//   GAIN_TAB[n] = round(prod_{i=0..n} 1/sqrt(1 + 2**(-2*i)) * 2**62)
// GAIN_TAB[19] = 0.6072529... is the start value of x for 20 micro-rotations,
// which removes the CORDIC gain without a multiplier at the end of the pipe.
package cordic_pkg;

  localparam int unsigned MAX_W = 64;   // widest datapath the tables support
  localparam int unsigned TAB_FRAC = 62;

  localparam logic [63:0] ATAN_TAB [32] = '{
    64'd3622009729038561421, 64'd2138197195906305897, 64'd1129764675555192497, 64'd573486189672913778,
    64'd287855953345232185, 64'd144068303048368715, 64'd72051730834756822, 64'd36028064038054493,
    64'd18014306884351854, 64'd9007187801521084, 64'd4503598195715550, 64'd2251799634728303,
    64'd1125899884473003, 64'd562949950625109, 64'd281474976361131, 64'd140737488311637,
    64'd70368744172203, 64'd35184372088149, 64'd17592186044331, 64'd8796093022197,
    64'd4398046511103, 64'd2199023255552, 64'd1099511627776, 64'd549755813888,
    64'd274877906944, 64'd137438953472, 64'd68719476736, 64'd34359738368,
    64'd17179869184, 64'd8589934592, 64'd4294967296, 64'd2147483648
  };

  localparam logic [63:0] GAIN_TAB [32] = '{
    64'd3260954456333195553, 64'd2916686334356757942, 64'd2829601372552588592, 64'd2807750841902562267,
    64'd2802282967498353433, 64'd2800915666627739259, 64'd2800573820569637254, 64'd2800488357751430639,
    64'd2800466991965380887, 64'd2800461650513774536, 64'd2800460315150554575, 64'd2800459981309729686,
    64'd2800459897849522220, 64'd2800459876984470276, 64'd2800459871768207285, 64'd2800459870464141537,
    64'd2800459870138125100, 64'd2800459870056620990, 64'd2800459870036244963, 64'd2800459870031150956,
    64'd2800459870029877455, 64'd2800459870029559079, 64'd2800459870029479485, 64'd2800459870029459587,
    64'd2800459870029454612, 64'd2800459870029453369, 64'd2800459870029453058, 64'd2800459870029452980,
    64'd2800459870029452960, 64'd2800459870029452956, 64'd2800459870029452954, 64'd2800459870029452954
  };

  // atan(2**-i) in a format with frac fraction bits, rounded to nearest.
  function automatic logic signed [MAX_W-1:0] atan_const(int unsigned i, int unsigned frac);
    logic [63:0] v;
    if (i > 31) return '0;                        // below one LSB of any format
    v = ATAN_TAB[i];
    if (frac < TAB_FRAC) v = (v + (64'd1 << (TAB_FRAC - frac - 1))) >> (TAB_FRAC - frac);
    return MAX_W'(signed'({1'b0, v[62:0]}));
  endfunction

  // Start value of x for n_rot micro-rotations, rounded to nearest.
  function automatic logic signed [MAX_W-1:0] gain_const(int unsigned n_rot, int unsigned frac);
    logic [63:0] v;
    if (n_rot < 1 || n_rot > 32) return '0;       // outside the table
    v = GAIN_TAB[n_rot - 1];
    if (frac < TAB_FRAC) v = (v + (64'd1 << (TAB_FRAC - frac - 1))) >> (TAB_FRAC - frac);
    return MAX_W'(signed'({1'b0, v[62:0]}));
  endfunction

endpackage
