// tb_avalon_cordic_slave: checks the Avalon-MM slave with an 8-entry result
// memory. The testbench plays the bus master, the pipeline (res_valid
// pulses, angle_sat) and the memory (read data derived from the address one
// clock after mem_re). It checks that ANGLE writes, and only those, push an
// angle one clock later; that results go to consecutive memory entries and
// stop when the memory is full, setting the overflow flag; the COUNT and CTRL
// registers (busy, overflow, saturation); the clear command; the memory
// window; and a read latency of exactly one clock with no wait states.
module tb_avalon_cordic_slave;
  localparam int unsigned RA = 3;
  localparam int unsigned AW = RA + 2;
  localparam logic [AW-1:0] A_CTRL = 0, A_ANGLE = 1, A_COUNT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] avs_address;
  logic avs_write, avs_read, avs_readdatavalid, avs_waitrequest;
  logic [31:0] avs_writedata, avs_readdata;
  logic angle_valid, angle_sat, res_valid;
  logic [31:0] angle_data;
  logic [63:0] res_data;
  logic mem_we, mem_re;
  logic [RA-1:0] mem_waddr;
  logic [63:0] mem_wdata;
  logic [RA:0] mem_raddr;
  logic [31:0] mem_rdata;
  int checks = 0, failures = 0;
  int n_push = 0, n_memw = 0;
  logic [31:0] last_angle;

  always #5 clk = ~clk;

  avalon_cordic_slave #(.RES_ADDR_W(RA)) dut (.*);

  // Memory model: data is a function of the address, ready one clock later.
  always_ff @(posedge clk) if (mem_re) mem_rdata <= {16'hbeef, 12'd0, mem_raddr};

  // Pipeline side monitors, sampling just before each clock edge.
  always @(posedge clk) if (rst_n) begin
    if (angle_valid) begin n_push++; last_angle = angle_data; end
    if (mem_we) begin
      checks++;
      if (mem_waddr != RA'(n_memw) || mem_wdata != {32'd0, 32'(n_memw)}) begin
        failures++; $display("FAIL: memory write %0d at %0d data %h", n_memw, mem_waddr, mem_wdata);
      end
      n_memw++;
    end
    checks++;
    if (avs_waitrequest !== 1'b0) begin failures++; $display("FAIL: waitrequest"); end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL: %s: got %h want %h", what, got, want); end
  endtask

  task automatic bus_write(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
    @(posedge clk);   // let angle_valid be sampled
    #1;
  endtask

  task automatic bus_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    checks++;
    if (!avs_readdatavalid) begin failures++; $display("FAIL: readdatavalid not one clock after read"); end
    d = avs_readdata;
    @(negedge clk);
    checks++;
    if (avs_readdatavalid) begin failures++; $display("FAIL: readdatavalid held"); end
  endtask

  task automatic push_result(int k);
    @(negedge clk);
    res_valid = 1; res_data = {32'd0, 32'(k)};
    @(negedge clk);
    res_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    angle_sat = 0; res_valid = 0; res_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bus_read(A_CTRL, d);  check("CTRL after reset", d, 0);
    bus_read(A_COUNT, d); check("COUNT after reset", d, 0);

    // Angle pushes.
    bus_write(A_ANGLE, 32'h3f000000);
    check("angle pushes", 32'(n_push), 1);
    check("angle data", last_angle, 32'h3f000000);
    bus_read(A_CTRL, d); check("busy while in flight", d, 32'h1);
    bus_write(A_COUNT, 32'h12345678);
    bus_write(5'h03, 32'h1);
    check("writes elsewhere do not push", 32'(n_push), 1);
    bus_read(A_ANGLE, d); check("ANGLE reads as 0", d, 0);

    // Results until the memory is full, then two more.
    for (int k = 0; k < 3; k++) push_result(k);
    bus_read(A_CTRL, d);  check("no overflow before full", d & 32'h2, 0);
    bus_read(A_COUNT, d); check("COUNT partly filled", d, 3);
    for (int k = 3; k < 10; k++) push_result(k);
    check("memory writes", 32'(n_memw), 8);
    bus_read(A_COUNT, d); check("COUNT when full", d, 8);
    // one angle pushed, ten results returned: the in-flight counter wraps, so
    // push nine more angles to bring it back to zero
    for (int k = 0; k < 9; k++) bus_write(A_ANGLE, 32'(k));
    bus_read(A_CTRL, d); check("overflow flag, not busy", d, 32'h2);

    // Saturation flag.
    @(negedge clk) angle_sat = 1;
    @(negedge clk) angle_sat = 0;
    bus_read(A_CTRL, d); check("saturation flag", d, 32'h6);

    // Memory window: word 2n+h of entry n.
    for (int w = 0; w < 16; w++) begin
      bus_read({1'b1, 4'(w)}, d); check("memory window", d, {16'hbeef, 11'd0, 5'(w)});
    end

    // Back-to-back reads: one datum per clock, each one clock late.
    @(negedge clk);
    avs_read = 1; avs_address = {1'b1, 4'd3};
    @(negedge clk);
    check("pipelined read 1", avs_readdata, {16'hbeef, 16'd3});
    avs_address = {1'b1, 4'd9};
    @(negedge clk);
    avs_read = 0;
    check("pipelined read 2", avs_readdata, {16'hbeef, 16'd9});

    // Clear.
    bus_write(A_CTRL, 32'h1);
    bus_read(A_CTRL, d);  check("CTRL after clear", d, 0);
    bus_read(A_COUNT, d); check("COUNT after clear", d, 0);
    n_memw = 0;
    push_result(0);
    push_result(1);
    check("writes restart at entry 0", 32'(n_memw), 2);
    bus_read(A_COUNT, d); check("COUNT after restart", d, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
