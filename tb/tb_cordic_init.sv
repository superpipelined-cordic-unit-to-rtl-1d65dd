// tb_cordic_init: checks the initialization stage. For random angles, with
// random gaps, the output must be x = K, y = 0, z = angle exactly two clocks
// later, K being the CORDIC gain correction prod 1/sqrt(1 + 2^-2i) over the
// 20 rotations, computed here in real arithmetic and rounded to 30 fraction
// bits (about 0.6072529).
module tb_cordic_init;
  localparam int unsigned W = 32;
  localparam int unsigned N = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [W-1:0] in_angle, out_x, out_y, out_z;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic signed [W-1:0] z; longint t; } exp_t;
  exp_t q[$];
  logic signed [W-1:0] k_ref;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  cordic_init #(.W(W), .N_ROT(20)) dut (.*);

  initial begin
    real k;
    k = 1.0;
    for (int i = 0; i < 20; i++) k = k / $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    k_ref = W'($rtoi(k * real'(64'd1 << 30) + 0.5));
    checks++;
    if (k < 0.6072 || k > 0.6073) begin failures++; $display("FAIL: reference K %f", k); end
    in_valid = 0; in_angle = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_angle = $signed($urandom) >>> 1;
      if (in_valid) begin
        q.push_back('{in_angle, cyc + 2});
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = q.pop_front();
      if (out_x !== k_ref || out_y !== '0 || out_z !== e.z || cyc != e.t) begin
        failures++;
        $display("FAIL: got %h %h %h at %0d, want %h 0 %h at %0d", out_x, out_y, out_z, cyc, k_ref, e.z, e.t);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
