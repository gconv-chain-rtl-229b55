// gconv_glb: on-chip global buffer of the engine.
//
// One byte-addressed space holding a data region for inputs and outputs
// (default 100 kB) followed by a kernel-parameter region (default 8 kB),
// the Eyeriss-style split the document uses. Intermediate GCONV results are
// written to the data region and may later be read either as inputs or as
// kernel parameters of a consumer, so both read ports see the whole space.
//
// Ports: two synchronous read ports (input stream and kernel-parameter
// stream, data valid the cycle after the address) and one write port.
// Out-of-range reads return 0 and out-of-range writes are dropped. The
// memory is not reset; the host loads it before use.
module gconv_glb
  import gconv_pkg::*;
#(
  parameter int unsigned DATA_BYTES = 102400,
  parameter int unsigned KERN_BYTES = 8192
) (
  input  logic                       clk,
  input  logic                       re_a,
  input  logic [ADDR_W-1:0]          addr_a,
  output logic [DATA_W-1:0]          rdata_a,
  input  logic                       re_b,
  input  logic [ADDR_W-1:0]          addr_b,
  output logic [DATA_W-1:0]          rdata_b,
  input  logic                       we,
  input  logic [ADDR_W-1:0]          waddr,
  input  logic [DATA_W-1:0]          wdata
);
  localparam int unsigned TOTAL = DATA_BYTES + KERN_BYTES;

  logic [DATA_W-1:0] mem [TOTAL];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < TOTAL) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= (32'(addr_a) < TOTAL) ? mem[addr_a] : '0;
    if (re_b) rdata_b <= (32'(addr_b) < TOTAL) ? mem[addr_b] : '0;
  end
endmodule
