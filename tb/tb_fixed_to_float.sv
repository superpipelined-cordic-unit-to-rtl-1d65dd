// tb_fixed_to_float: checks the fixed-to-float converter. Random fixed-point
// words of every magnitude (a random number of leading zeros), plus zero,
// +-1, the most negative value and values that round up across a power of
// two, are converted one per clock. The expected bit pattern comes from a
// real-arithmetic reference (value / 2^30 rounded to nearest even single
// precision). Latency must be one clock.
module tb_fixed_to_float;
  import tb_float_pkg::*;
  localparam int unsigned W = 32;
  localparam int unsigned N = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [W-1:0] in_fixed;
  logic [31:0] out_float;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [31:0] f; logic signed [W-1:0] x; longint t; } exp_t;
  exp_t q[$];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  fixed_to_float #(.W(W)) dut (.*);

  initial begin
    static logic signed [W-1:0] specials [8] = '{32'sd0, 32'sd1, -32'sd1, 32'sh80000000,
                                          32'sh7fffffff, 32'sh3fffffff, 32'sh40000000, 32'sh000001ff};
    in_valid = 0; in_fixed = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_fixed = $signed($urandom) >>> $urandom_range(0, 31);
      if (n < 8) in_fixed = specials[n];
      if (in_valid) begin
        q.push_back('{real_to_bits(real'(in_fixed) / 1073741824.0), in_fixed, cyc + 1});
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
      if (out_float !== e.f || cyc != e.t) begin
        failures++;
        $display("FAIL: %h -> %h at %0d, want %h at %0d", e.x, out_float, cyc, e.f, e.t);
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
