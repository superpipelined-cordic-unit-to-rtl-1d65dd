// tsunami_cordic_top: FPGA design of the CORDIC accelerator board.
//
// Load-flow programs spend much of each Newton-Raphson iteration on the sines
// and cosines of bus angle differences. This design streams those angles
// through a deep, super-pipelined CORDIC unit that returns one cosine/sine
// pair every clock. The data path is the one of the source design:
//   host (PCI, PCI bridge) -> Avalon slave -> float_to_fixed -> sp_cordic
//     -> fixed_to_float (x2) -> result memory -> Avalon slave -> host
// The host side beyond the Avalon slave port is not part of this design.
//
// Interface: a 32-bit Avalon-MM slave (see avalon_cordic_slave for the map).
// Timing: an angle accepted by the ANGLE write at clock edge E is stored in
// the result memory at edge E + 2*N_STAGES + 3 (1 clock in the slave, 1 in
// float_to_fixed, 2*N_STAGES in the CORDIC, 1 in fixed_to_float); angles may
// be written back to back, one per clock, and are stored one per clock.
module tsunami_cordic_top #(
  parameter int unsigned N_STAGES   = 21,
  parameter int unsigned W          = 32,
  parameter int unsigned RES_ADDR_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [RES_ADDR_W+1:0] avs_address,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  input  logic                  avs_read,
  output logic [31:0]           avs_readdata,
  output logic                  avs_readdatavalid,
  output logic                  avs_waitrequest
);
  logic                  angle_valid, angle_sat;
  logic [31:0]           angle_data;
  logic                  fx_valid;
  logic signed [W-1:0]   fx_angle;
  logic                  cr_valid;
  logic signed [W-1:0]   cr_cos, cr_sin;
  logic                  cos_valid, sin_valid;
  logic [31:0]           cos_f, sin_f;
  logic                  mem_we, mem_re;
  logic [RES_ADDR_W-1:0] mem_waddr;
  logic [RES_ADDR_W:0]   mem_raddr;
  logic [63:0]           mem_wdata;
  logic [31:0]           mem_rdata;

  avalon_cordic_slave #(.RES_ADDR_W(RES_ADDR_W)) u_bus (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .avs_readdatavalid, .avs_waitrequest,
    .angle_valid, .angle_data, .angle_sat,
    .res_valid (cos_valid),
    .res_data  ({sin_f, cos_f}),
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata
  );

  float_to_fixed #(.W(W)) u_f2x (
    .clk, .rst_n,
    .in_valid (angle_valid), .in_float (angle_data),
    .out_valid(fx_valid),    .out_fixed(fx_angle), .out_sat(angle_sat)
  );

  sp_cordic #(.N_STAGES(N_STAGES), .W(W)) u_cordic (
    .clk, .rst_n,
    .in_valid (fx_valid), .in_angle(fx_angle),
    .out_valid(cr_valid), .out_cos (cr_cos), .out_sin(cr_sin)
  );

  fixed_to_float #(.W(W)) u_x2f_cos (
    .clk, .rst_n,
    .in_valid (cr_valid), .in_fixed (cr_cos),
    .out_valid(cos_valid), .out_float(cos_f)
  );

  fixed_to_float #(.W(W)) u_x2f_sin (
    .clk, .rst_n,
    .in_valid (cr_valid), .in_fixed (cr_sin),
    .out_valid(sin_valid), .out_float(sin_f)
  );

  result_sram #(.ADDR_W(RES_ADDR_W)) u_sram (
    .clk,
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // The two converters run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) cos_valid == sin_valid)
    else $error("tsunami_cordic_top: converters out of step");
endmodule
