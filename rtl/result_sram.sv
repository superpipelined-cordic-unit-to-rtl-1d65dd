// result_sram: result memory between the CORDIC pipeline and the host bus.
//
// A simple dual-port memory of 2**ADDR_W entries, each holding one result as
// two IEEE-754 single-precision words: {sine, cosine}. The pipeline writes one
// whole entry per clock; the host side reads it back one 32-bit bus word at a
// time, the low read-address bit choosing the cosine (0) or the sine (1).
// The source design stores its results in an SRAM before they travel back to
// the host; the size, the entry layout and the on-chip array are this
// design's choices.
//
// Interface: write port we/waddr/wdata; read port re/raddr/rdata.
// Timing: writes take effect at the clock edge; rdata is valid on the clock
// after re is high and holds until the next read. A read of the entry being
// written in the same clock returns the old contents.
module result_sram #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [63:0]       wdata,
  input  logic              re,
  input  logic [ADDR_W:0]   raddr,
  output logic [31:0]       rdata
);
  logic [63:0] mem [2**ADDR_W];
  logic [63:0] rd_q;
  logic        half_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rd_q   <= mem[raddr[ADDR_W:1]];
      half_q <= raddr[0];
    end
  end

  assign rdata = half_q ? rd_q[63:32] : rd_q[31:0];
endmodule
