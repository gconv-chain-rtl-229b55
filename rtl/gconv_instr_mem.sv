// gconv_instr_mem: one instruction buffer of the GCONV front end.
//
// The front end has three of them: the basic-information buffer (stride,
// operators and producer IDs of each GCONV, 64-bit entries), the
// unrolling-list buffer (32-bit [unrolling dimension, parameter, dimension,
// unrolling factor, argument] entries) and the output-address buffer (the
// global-buffer address of each tensor, indexed by tensor ID). All three are
// this simple register memory with one write port shared by the host and the
// decoder (host has priority) and one combinational read port. Cleared by
// reset so that unused entries read as the all-zero delimiter. Depths are
// not given by the document and are this design's choice.
module gconv_instr_mem #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [WIDTH-1:0]          wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output logic [WIDTH-1:0]          rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
