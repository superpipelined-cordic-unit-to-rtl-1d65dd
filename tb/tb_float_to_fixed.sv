// tb_float_to_fixed: checks the float-to-fixed converter. Random single-
// precision numbers over a wide range of exponents (including values that
// must saturate), plus zero, a denormal, infinities, NaN and the edges of the
// range, are converted one per clock. The expected value is the real value
// times 2^30 truncated toward zero ($rtoi), or the saturation limit with
// out_sat set when |x| >= 2. Latency must be one clock.
module tb_float_to_fixed;
  import tb_float_pkg::*;
  localparam int unsigned W = 32;
  localparam int unsigned N = 5000;
  localparam logic signed [W-1:0] MAXV = 32'sh7fffffff;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid, out_sat;
  logic [31:0] in_float;
  logic signed [W-1:0] out_fixed;
  int checks = 0, failures = 0, n_sat = 0;
  longint cyc = 0;
  typedef struct { logic signed [W-1:0] v; logic sat; longint t; logic [31:0] f; } exp_t;
  exp_t q[$];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  float_to_fixed #(.W(W)) dut (.*);

  function automatic exp_t model(logic [31:0] f);
    exp_t e;
    real r;
    e.f = f;
    e.sat = 1'b0;
    if (f[30:23] == 8'hff) begin
      e.sat = 1'b1;
      e.v = f[31] ? -MAXV : MAXV;
    end else begin
      r = bits_to_real(f);
      if (r >= 2.0 || r <= -2.0) begin
        e.sat = 1'b1;
        e.v = (r < 0) ? -MAXV : MAXV;
      end else e.v = W'($rtoi(r * 1073741824.0));
    end
    return e;
  endfunction

  initial begin
    static logic [31:0] specials [10] = '{32'h00000000, 32'h80000000, 32'h00012345, 32'h7f800000,
                                   32'hff800000, 32'h7fc00000, 32'h3fffffff, 32'h40000000,
                                   32'hbfffffff, 32'h3fc90fdb};
    in_valid = 0; in_float = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_float = {$urandom_range(0, 1) == 1, 8'($urandom_range(90, 130)), 23'($urandom)};
      if (n < 10) in_float = specials[n];
      if (in_valid) begin
        exp_t e;
        e = model(in_float);
        e.t = cyc + 1;
        q.push_back(e);
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = q.pop_front();
      if (e.sat) n_sat++;
      if (out_fixed !== e.v || out_sat !== e.sat || cyc != e.t) begin
        failures++;
        $display("FAIL: %h -> %h sat %b at %0d, want %h sat %b at %0d", e.f, out_fixed, out_sat, cyc, e.v, e.sat, e.t);
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
