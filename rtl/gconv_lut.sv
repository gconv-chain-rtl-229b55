// gconv_lut: lookup table behind the pre/post LUT operator.
//
// DEPTH words of 32 bit, written by the host one word per cycle (we, waddr,
// wdata) and read combinationally through RD_PORTS independent read ports, one
// for the pre operator and one for the post operator. The table is cleared
// by reset. The document names a LUT as a pre/post operation but gives no
// size; 256 entries of 32 bit is this design's choice.
module gconv_lut
  import gconv_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned RD_PORTS = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           we,
  input  logic [$clog2(DEPTH)-1:0]       waddr,
  input  logic signed [ACC_W-1:0]        wdata,
  input  logic [RD_PORTS-1:0][$clog2(DEPTH)-1:0] raddr,
  output logic signed [RD_PORTS-1:0][ACC_W-1:0]  rdata
);
  logic signed [ACC_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < int'(RD_PORTS); p++) rdata[p] = mem[raddr[p]];
  end
endmodule
