// tb_sp_cordic: end-to-end check of the super-pipelined CORDIC at its default
// size (21 stages, 32-bit words). Random angles in [-pi/2, pi/2], plus the
// end points and zero, are fed first back to back (one per clock) and then
// with random gaps. Each cosine and sine is compared with $cos/$sin within
// 3e-6, the bound set by the last rotation angle atan(2^-19) plus rounding.
// Each result must also match, bit for bit, an integer model of the same
// algorithm written here (start vector (K, 0), 20 shift-and-add rotations with
// constants rounded from $atan and a real-arithmetic K).
// Every result must leave exactly 42 clocks (2 x 21 stages) after its angle
// entered, and the back-to-back burst must come out on consecutive clocks.
module tb_sp_cordic;
  localparam int unsigned W = 32;
  localparam int unsigned N_STAGES = 21;
  localparam int unsigned LAT = 2 * N_STAGES;
  localparam int unsigned N = 3000;
  localparam real PI = 3.14159265358979323846;
  localparam real SCALE = 1073741824.0;   // 2^30
  localparam real TOL = 3e-6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [W-1:0] in_angle, out_cos, out_sin;
  int checks = 0, failures = 0, burst_run = 0, max_run = 0;
  longint cyc = 0;
  real max_err = 0.0;
  typedef struct { real a; longint t; logic signed [W-1:0] c, s; } exp_t;
  int n_exact_fail = 0;

  // Integer model of rotation-mode CORDIC with 20 rotations.
  function automatic void model(logic signed [W-1:0] ang, output logic signed [W-1:0] c, s);
    logic signed [W-1:0] x, y, z, xn, yn, at;
    real k;
    k = 1.0;
    for (int i = 0; i < N_STAGES - 1; i++) k = k / $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    x = W'($rtoi(k * SCALE + 0.5));
    y = '0;
    z = ang;
    for (int i = 0; i < N_STAGES - 1; i++) begin
      at = W'($rtoi($atan(1.0 / real'(longint'(1) << i)) * SCALE + 0.5));
      if (z >= 0) begin xn = x - (y >>> i); yn = y + (x >>> i); z = z - at; end
      else        begin xn = x + (y >>> i); yn = y - (x >>> i); z = z + at; end
      x = xn; y = yn;
    end
    c = x; s = y;
  endfunction
  exp_t q[$];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  sp_cordic dut (.*);

  initial begin
    in_valid = 0; in_angle = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; ) begin
      real a;
      @(negedge clk);
      in_valid = (n < N / 2) || ($urandom_range(0, 3) != 0);
      a = (real'($urandom) / 4294967295.0 - 0.5) * PI;
      if (n == 0) a = PI / 2.0;
      if (n == 1) a = -PI / 2.0;
      if (n == 2) a = 0.0;
      if (n == 3) a = 37.0 * PI / 180.0;
      in_angle = W'($rtoi(a * SCALE));
      if (in_valid) begin
        exp_t e;
        e.a = real'(in_angle) / SCALE;
        e.t = cyc + LAT;
        model(in_angle, e.c, e.s);
        q.push_back(e);
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    checks++;
    if (max_run < N / 2) begin failures++; $display("FAIL: longest run of consecutive results %0d", max_run); end
    $display("max error %g, longest back-to-back run %0d", max_err, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      real c, s, ec, es;
      burst_run++;
      if (burst_run > max_run) max_run = burst_run;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        c = real'(out_cos) / SCALE;
        s = real'(out_sin) / SCALE;
        ec = c - $cos(e.a); if (ec < 0) ec = -ec;
        es = s - $sin(e.a); if (es < 0) es = -es;
        if (ec > max_err) max_err = ec;
        if (es > max_err) max_err = es;
        checks++;
        if (out_cos !== e.c || out_sin !== e.s) begin
          failures++;
          n_exact_fail++;
          if (n_exact_fail < 10) $display("FAIL: angle %f: %h %h, model %h %h", e.a, out_cos, out_sin, e.c, e.s);
        end
        if (ec > TOL || es > TOL || cyc != e.t) begin
          failures++;
          $display("FAIL: angle %f: cos %f sin %f at %0d, want %f %f at %0d", e.a, c, s, cyc, $cos(e.a), $sin(e.a), e.t);
        end
      end
    end else burst_run = 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
