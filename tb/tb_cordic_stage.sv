// tb_cordic_stage: checks one micro-rotation stage against a reference model.
// Random vectors are streamed through a stage with shift 3, with random gaps;
// each output is compared with x -/+ (y>>>3), y +/- (x>>>3), z -/+ atan(1/8),
// the constant being computed here from $atan. The output must appear exactly
// two clocks after its input (one super-pipelined stage).
module tb_cordic_stage;
  localparam int unsigned W = 32;
  localparam int unsigned SHIFT = 3;
  localparam int unsigned N = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [W-1:0] in_x, in_y, in_z, out_x, out_y, out_z;
  int checks = 0, failures = 0;

  typedef struct { logic signed [W-1:0] x, y, z; longint t; } exp_t;
  exp_t q[$];
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  cordic_stage #(.W(W), .SHIFT(SHIFT)) dut (.*);

  function automatic logic signed [W-1:0] atan_ref();
    return W'($rtoi($atan(1.0 / real'(1 << SHIFT)) * real'(64'd1 << (W - 2)) + 0.5));
  endfunction

  initial begin
    in_valid = 0; in_x = 0; in_y = 0; in_z = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_x = $signed($urandom) >>> 2;
      in_y = $signed($urandom) >>> 2;
      in_z = $signed($urandom) >>> 2;
      if (n < 4) in_z = (n[0]) ? 32'sd0 : -32'sd1;    // boundary of the direction test
      if (in_valid) begin
        exp_t e;
        if (in_z >= 0) begin
          e.x = in_x - (in_y >>> SHIFT); e.y = in_y + (in_x >>> SHIFT); e.z = in_z - atan_ref();
        end else begin
          e.x = in_x + (in_y >>> SHIFT); e.y = in_y - (in_x >>> SHIFT); e.z = in_z + atan_ref();
        end
        e.t = cyc + 2;
        q.push_back(e);
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
      if (out_x !== e.x || out_y !== e.y || out_z !== e.z || cyc != e.t) begin
        failures++;
        $display("FAIL: got %h %h %h at %0d, want %h %h %h at %0d", out_x, out_y, out_z, cyc, e.x, e.y, e.z, e.t);
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
