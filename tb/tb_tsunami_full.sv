// tb_tsunami_full: the design at its default size (21 stages, 32-bit words,
// 65536-entry result memory) running the trigonometric part of a Jacobian
// build for two power-system cases: 6952 angle differences (a 1646-bus
// system) and then 33945 (a 7917-bus system). For each case the host writes
// every angle back to back, one per clock, reads COUNT exactly when the last
// result should land (it must be one short one clock earlier and complete one
// clock later, i.e. one result per clock after a 2*21+3 clock latency), then
// reads every cosine and sine back and compares them with $cos/$sin. The
// memory is cleared between the cases. The angles are random in
// [-pi/2, pi/2]; the cases' real data are not available.
module tb_tsunami_full;
  import tb_float_pkg::*;
  localparam int unsigned AW = 18;
  localparam int unsigned LAT = 2 * 21 + 3;
  localparam logic [AW-1:0] A_CTRL = 0, A_ANGLE = 1, A_COUNT = 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.5e-6;
  localparam int unsigned N_CASES = 2;
  localparam int unsigned CASE_N [N_CASES] = '{6952, 33945};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] avs_address;
  logic avs_write, avs_read, avs_readdatavalid, avs_waitrequest;
  logic [31:0] avs_writedata, avs_readdata;
  int checks = 0, failures = 0;
  logic [31:0] angle_bits [];
  real max_err;

  always #5 clk = ~clk;

  tsunami_cordic_top dut (.*);

  task automatic bus_write(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL: %s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    logic [31:0] d, c, s;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < N_CASES; k++) begin
      int n;
      n = CASE_N[k];
      max_err = 0.0;
      bus_write(A_CTRL, 32'h1);
      angle_bits = new[n];
      foreach (angle_bits[i]) angle_bits[i] = real_to_bits((real'($urandom) / 4294967295.0 - 0.5) * PI);
      // Stream the angles, one per clock.
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        avs_address = A_ANGLE; avs_writedata = angle_bits[i]; avs_write = 1;
        @(negedge clk);
      end
      avs_write = 0;
      // The last angle was accepted at the edge before this negedge (E).
      // Its result is stored at E+LAT and seen by a read at E+LAT+1.
      repeat (LAT - 1) @(negedge clk);
      avs_address = A_COUNT; avs_read = 1;       // read at edge E+LAT
      @(negedge clk);                             // read at edge E+LAT+1
      check("count one clock before the last result", avs_readdata, n - 1);
      @(negedge clk);
      avs_read = 0;
      check("count at the last result", avs_readdata, n);
      bus_read(A_CTRL, d); check("status after the case", d, 0);
      for (int i = 0; i < n; i++) begin
        real a, ec, es;
        bus_read({1'b1, 16'(i), 1'b0}, c);
        bus_read({1'b1, 16'(i), 1'b1}, s);
        a = bits_to_real(angle_bits[i]);
        ec = bits_to_real(c) - $cos(a); if (ec < 0) ec = -ec;
        es = bits_to_real(s) - $sin(a); if (es < 0) es = -es;
        if (ec > max_err) max_err = ec;
        if (es > max_err) max_err = es;
        checks++;
        if (ec > TOL || es > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: entry %0d angle %f: cos %f sin %f", i, a, bits_to_real(c), bits_to_real(s));
        end
      end
      $display("case of %0d angles: largest error %g", n, max_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
