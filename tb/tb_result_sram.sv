// tb_result_sram: checks the result memory at a reduced size (64 entries).
// Random writes and reads run concurrently against a shadow array kept by the
// testbench; every read must return the cosine half (even word) or the sine
// half (odd word) of the addressed entry on the next clock, and a read of an
// entry written in the same clock must return the old contents.
module tb_result_sram;
  localparam int unsigned ADDR_W = 6;
  localparam int unsigned N = 4000;

  logic clk = 1'b0;
  logic we, re;
  logic [ADDR_W-1:0] waddr;
  logic [63:0] wdata;
  logic [ADDR_W:0] raddr;
  logic [31:0] rdata;
  logic [63:0] shadow [2**ADDR_W];
  logic [31:0] want;
  logic pending;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_sram #(.ADDR_W(ADDR_W)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; wdata = 0; raddr = 0; pending = 0;
    // Fill every entry first so that no read sees uninitialised contents.
    for (int i = 0; i < 2**ADDR_W; i++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(i); wdata = {$urandom, $urandom};
      shadow[i] = wdata;
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== want) begin failures++; $display("FAIL: read %h, want %h", rdata, want); end
      end
      re = ($urandom_range(0, 3) != 0);
      raddr = (ADDR_W + 1)'($urandom);
      we = ($urandom_range(0, 1) == 1);
      waddr = (n % 7 == 0) ? raddr[ADDR_W:1] : ADDR_W'($urandom);
      wdata = {$urandom, $urandom};
      if (re) want = raddr[0] ? shadow[raddr[ADDR_W:1]][63:32] : shadow[raddr[ADDR_W:1]][31:0];
      pending = re;
      if (we) shadow[waddr] = wdata;
    end
    @(negedge clk);
    if (pending) begin
      checks++;
      if (rdata !== want) begin failures++; $display("FAIL: read %h, want %h", rdata, want); end
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
