// tb_tsunami_cordic_top: end-to-end test of the whole design through its
// Avalon-MM port, with the result memory reduced to 32 entries so that it can
// be filled. Acting as the host, it
//   1. writes a back-to-back burst of angles (one per clock) covering both
//      the first and the fourth quadrant, waits for the busy flag to drop,
//      reads every cosine and sine back and compares them with $cos/$sin;
//   2. checks, by reading the COUNT register on every clock, that each
//      result is stored 2*N_STAGES+3 clocks after its angle was written and
//      that the burst is stored on consecutive clocks;
//   3. writes an angle of 3.0 (outside the fixed-point range) and checks the
//      saturation flag;
//   4. keeps writing until the memory is full and checks the overflow flag
//      and the count;
//   5. clears, and checks that new results start again at entry 0.
// Each mechanism (back-to-back streaming, fourth-quadrant angles, busy,
// saturation, overflow, clear) is counted, and one that never happened is a
// failure.
module tb_tsunami_cordic_top;
  import tb_float_pkg::*;
  localparam int unsigned N_STAGES = 21;
  localparam int unsigned RA = 5;
  localparam int unsigned AW = RA + 2;
  localparam int unsigned LAT = 2 * N_STAGES + 3;
  localparam logic [AW-1:0] A_CTRL = 0, A_ANGLE = 1, A_COUNT = 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.5e-6;   // CORDIC error plus single-precision rounding
  localparam int unsigned NB = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] avs_address;
  logic avs_write, avs_read, avs_readdatavalid, avs_waitrequest;
  logic [31:0] avs_writedata, avs_readdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_in[$], t_out[$];
  longint rd_edge[$];
  logic [31:0] rd_val[$];
  int run = 0, max_run = 0;
  int n_fourth = 0, n_busy = 0, n_sat = 0, n_ovf = 0, n_clear = 0;
  real angles [NB];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  tsunami_cordic_top #(.N_STAGES(N_STAGES), .RES_ADDR_W(RA)) dut (.*);

  // Edges at which ANGLE writes are accepted.
  always @(posedge clk) if (rst_n && avs_write && avs_address == A_ANGLE) t_in.push_back(cyc);

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL: %s: got %h want %h", what, got, want); end
  endtask

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
    checks++;
    if (!avs_readdatavalid) begin failures++; $display("FAIL: no readdatavalid"); end
    d = avs_readdata;
  endtask

  task automatic wait_idle();
    logic [31:0] d;
    bus_read(A_CTRL, d);
    if (d[0]) n_busy++;
    while (d[0]) bus_read(A_CTRL, d);
  endtask

  task automatic check_result(int entry, real a);
    logic [31:0] c, s;
    real ec, es;
    bus_read({1'b1, RA'(entry), 1'b0}, c);
    bus_read({1'b1, RA'(entry), 1'b1}, s);
    ec = bits_to_real(c) - $cos(a); if (ec < 0) ec = -ec;
    es = bits_to_real(s) - $sin(a); if (es < 0) es = -es;
    checks++;
    if (ec > TOL || es > TOL) begin
      failures++;
      $display("FAIL: entry %0d angle %f: cos %f sin %f", entry, a, bits_to_real(c), bits_to_real(s));
    end
  endtask

  initial begin
    logic [31:0] d;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // 1. Back-to-back burst.
    for (int i = 0; i < NB; i++) begin
      real a;
      a = (real'($urandom) / 4294967295.0 - 0.5) * PI;
      if (i == 0) a = PI / 2.0;
      if (i == 1) a = -PI / 2.0;
      if (i == 2) a = 0.0;
      if (i == 3) a = 37.0 * PI / 180.0;
      d = real_to_bits(a);
      angles[i] = bits_to_real(d);
      if (angles[i] < 0.0) n_fourth++;
    end
    @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      avs_address = A_ANGLE; avs_writedata = real_to_bits(angles[i]); avs_write = 1;
      @(negedge clk);
    end
    // Then read COUNT on every clock to see when each result is stored: a
    // read at edge R returns the count before R, so a result written at edge
    // Wm is first seen by the read at edge Wm+1.
    avs_write = 0; avs_read = 1; avs_address = A_COUNT;
    for (int i = 0; i < LAT + NB + 10; i++) begin
      @(negedge clk);
      rd_edge.push_back(cyc - 1);
      rd_val.push_back(avs_readdata);
    end
    avs_read = 0;
    for (int k = 1; k <= NB; k++)
      foreach (rd_val[j]) if (rd_val[j] >= k) begin t_out.push_back(rd_edge[j] - 1); break; end
    for (int j = 1; j < rd_val.size(); j++) begin
      if (rd_val[j] == rd_val[j-1] + 1) begin
        run++;
        if (run > max_run) max_run = run;
      end else run = 0;
    end
    wait_idle();
    bus_read(A_COUNT, d); check("count after burst", d, NB);
    for (int i = 0; i < NB; i++) check_result(i, angles[i]);

    // 2. Latency and throughput.
    checks++;
    if (t_in.size() != NB || t_out.size() != NB) begin
      failures++; $display("FAIL: %0d angles, %0d results", t_in.size(), t_out.size());
    end else for (int i = 0; i < NB; i++) begin
      checks++;
      if (t_out[i] - t_in[i] != LAT) begin
        failures++; $display("FAIL: result %0d latency %0d, want %0d", i, t_out[i] - t_in[i], LAT);
      end
    end
    checks++;
    if (max_run != NB) begin failures++; $display("FAIL: burst came out in runs of %0d", max_run); end

    // 3. Saturation.
    bus_write(A_ANGLE, real_to_bits(3.0));
    wait_idle();
    bus_read(A_CTRL, d);
    if (d[2]) n_sat++;
    check("saturation flag", d, 32'h4);

    // 4. Fill the memory and overflow it.
    for (int i = NB + 1; i < 2**RA + 3; i++) bus_write(A_ANGLE, real_to_bits(0.5));
    wait_idle();
    bus_read(A_CTRL, d);
    if (d[1]) n_ovf++;
    check("overflow flag", d, 32'h6);
    bus_read(A_COUNT, d); check("count when full", d, 2**RA);
    check_result(2**RA - 1, bits_to_real(real_to_bits(0.5)));

    // 5. Clear and restart.
    bus_write(A_CTRL, 32'h1);
    bus_read(A_CTRL, d); check("flags after clear", d, 0);
    bus_read(A_COUNT, d); check("count after clear", d, 0);
    if (d == 0) n_clear++;
    bus_write(A_ANGLE, real_to_bits(-1.0));
    wait_idle();
    bus_read(A_COUNT, d); check("count after restart", d, 1);
    check_result(0, -1.0);

    $display("mechanisms: back-to-back run %0d, fourth-quadrant angles %0d, busy %0d, saturation %0d, overflow %0d, clear %0d",
             max_run, n_fourth, n_busy, n_sat, n_ovf, n_clear);
    checks++;
    if (max_run < 2 || n_fourth == 0 || n_busy == 0 || n_sat == 0 || n_ovf == 0 || n_clear == 0) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
