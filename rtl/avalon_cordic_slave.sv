// avalon_cordic_slave: 32-bit Avalon-MM slave that connects the CORDIC path
// to the board's system bus.
//
// The host reaches the FPGA through the PCI bus and a PCI bridge that puts
// every transfer on the 32-bit Avalon system bus; this slave is the far end
// of that path. A write to the ANGLE register sends one floating-point angle
// into the conversion and CORDIC pipeline. Results coming out of the pipeline
// are stored at consecutive entries of the result memory, counted by a write
// pointer; when the memory is full further results are dropped and a sticky
// overflow flag is set. The host reads the results back through a memory
// window. Using the Avalon bus follows the source design; the register map,
// the overflow rule and the bus timing are this design's choices.
//
// Word address map (AW = RES_ADDR_W + 2 address bits):
//   top bit 0, word 0  CTRL   read : bit0 busy (angles still in the pipeline),
//                                    bit1 overflow, bit2 an angle saturated
//                             write: bit0 = 1 clears count and both flags
//   top bit 0, word 1  ANGLE  write: push one angle (IEEE single, radians)
//   top bit 0, word 2  COUNT  read : number of results stored
//   top bit 1          RESULT read : word 2*n = cos of result n, 2*n+1 = sin
// Other register words read as 0 and ignore writes.
//
// Timing: no wait states (waitrequest is always 0); readdatavalid follows a
// read by exactly one clock. One transfer per clock; read and write must not
// be requested together. angle_valid follows the ANGLE write by one clock.
module avalon_cordic_slave #(
  parameter int unsigned RES_ADDR_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Avalon-MM slave
  input  logic [RES_ADDR_W+1:0]   avs_address,
  input  logic                    avs_write,
  input  logic [31:0]             avs_writedata,
  input  logic                    avs_read,
  output logic [31:0]             avs_readdata,
  output logic                    avs_readdatavalid,
  output logic                    avs_waitrequest,
  // to the float-to-fixed converter
  output logic                    angle_valid,
  output logic [31:0]             angle_data,
  input  logic                    angle_sat,
  // from the fixed-to-float converters: {sin, cos}
  input  logic                    res_valid,
  input  logic [63:0]             res_data,
  // result memory
  output logic                    mem_we,
  output logic [RES_ADDR_W-1:0]   mem_waddr,
  output logic [63:0]             mem_wdata,
  output logic                    mem_re,
  output logic [RES_ADDR_W:0]     mem_raddr,
  input  logic [31:0]             mem_rdata
);
  localparam int unsigned AW = RES_ADDR_W + 2;

  typedef enum logic [1:0] {
    REG_CTRL  = 2'd0,
    REG_ANGLE = 2'd1,
    REG_COUNT = 2'd2
  } reg_e;

  logic                  is_mem;
  reg_e                  reg_sel;
  logic                  clear;
  logic [RES_ADDR_W:0]   wr_ptr;          // results stored, also next entry
  logic                  full;
  logic                  overflow, sat_seen;
  logic [7:0]            in_flight;
  logic                  rd_mem_q;
  logic [31:0]           rd_reg_q;

  assign is_mem  = avs_address[AW-1];
  assign reg_sel = reg_e'(avs_address[1:0]);
  assign clear   = avs_write && !is_mem && avs_address[AW-2:0] == (AW-1)'(REG_CTRL) && avs_writedata[0];
  assign full    = wr_ptr[RES_ADDR_W];

  assign avs_waitrequest = 1'b0;

  // Angle push.
  always_ff @(posedge clk) begin
    if (!rst_n) angle_valid <= 1'b0;
    else        angle_valid <= avs_write && !is_mem && avs_address[AW-2:0] == (AW-1)'(REG_ANGLE);
    angle_data <= avs_writedata;
  end

  // Result write pointer and flags.
  assign mem_we    = res_valid && !full;
  assign mem_waddr = wr_ptr[RES_ADDR_W-1:0];
  assign mem_wdata = res_data;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr   <= '0;
      overflow <= 1'b0;
      sat_seen <= 1'b0;
    end else begin
      if (mem_we)              wr_ptr   <= wr_ptr + 1'b1;
      if (res_valid && full)   overflow <= 1'b1;
      if (angle_sat)           sat_seen <= 1'b1;
    end
  end

  // Angles between the ANGLE write and the result write.
  always_ff @(posedge clk) begin
    if (!rst_n) in_flight <= '0;
    else        in_flight <= in_flight + 8'(angle_valid) - 8'(res_valid);
  end

  // Reads: memory window or registers, both with one clock of latency.
  assign mem_re    = avs_read && is_mem;
  assign mem_raddr = avs_address[RES_ADDR_W:0];

  always_ff @(posedge clk) begin
    if (!rst_n) avs_readdatavalid <= 1'b0;
    else        avs_readdatavalid <= avs_read;
    rd_mem_q <= is_mem;
    rd_reg_q <= '0;
    if (avs_address[AW-2:2] == '0) begin
      case (reg_sel)
        REG_CTRL:  rd_reg_q <= {29'd0, sat_seen, overflow, in_flight != 8'd0};
        REG_COUNT: rd_reg_q <= 32'(wr_ptr);
        default:   rd_reg_q <= '0;
      endcase
    end
  end

  assign avs_readdata = rd_mem_q ? mem_rdata : rd_reg_q;

  // Bus rule: a slave port sees at most one transfer per clock.
  a_one_transfer: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write))
    else $error("avalon_cordic_slave: read and write in the same clock");
endmodule
