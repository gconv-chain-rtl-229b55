// gconv_data_loader: moves inputs and kernel parameters from the global
// buffer into the local scratchpads of one PE per cycle.
//
// A request carries the target PE (y, x), the ILS and KLS slots and the
// global-buffer addresses of the input and the kernel parameter, plus an ok
// flag that is low for padding or out-of-range loop points. The loader
// issues both reads in the request cycle (synchronous global buffer), keeps
// the target in a one-stage pipeline register, applies the pre operator to
// the input as it arrives and drives the PE data bus in the following cycle.
// The pre result is saturated to the 16-bit ILS width. One input and one
// kernel parameter per cycle is this design's bus width.
module gconv_data_loader
  import gconv_pkg::*;
#(
  parameter int unsigned PY    = 12,
  parameter int unsigned PX    = 14,
  parameter int unsigned ILS_D = 12,
  parameter int unsigned KLS_D = 224
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  pw_cfg_t                     pre,
  // request
  input  logic                        req,
  input  logic [$clog2(PY)-1:0]       req_y,
  input  logic [$clog2(PX)-1:0]       req_x,
  input  logic [$clog2(ILS_D)-1:0]    req_islot,
  input  logic [$clog2(KLS_D)-1:0]    req_kslot,
  input  logic [ADDR_W-1:0]           req_in_addr,
  input  logic [ADDR_W-1:0]           req_k_addr,
  input  logic                        req_ok,
  // global buffer read ports
  output logic                        re_a,
  output logic [ADDR_W-1:0]           addr_a,
  input  logic [DATA_W-1:0]           rdata_a,
  output logic                        re_b,
  output logic [ADDR_W-1:0]           addr_b,
  input  logic [DATA_W-1:0]           rdata_b,
  // pre-operator table
  output logic [7:0]                  lut_idx,
  input  logic signed [ACC_W-1:0]     lut_val,
  // PE data bus
  output logic [$clog2(PY)-1:0]       wr_y,
  output logic [$clog2(PX)-1:0]       wr_x,
  output logic                        wr_i_en,
  output logic [$clog2(ILS_D)-1:0]    wr_i_slot,
  output logic signed [PRE_W-1:0]     wr_i_val,
  output logic                        wr_i_ok,
  output logic                        wr_k_en,
  output logic [$clog2(KLS_D)-1:0]    wr_k_slot,
  output logic signed [DATA_W-1:0]    wr_k_val
);
  logic                      p_vld;
  logic                      p_ok;
  logic signed [ACC_W-1:0]   pre_res;

  assign re_a   = req;
  assign addr_a = req_in_addr;
  assign re_b   = req;
  assign addr_b = req_k_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_vld     <= 1'b0;
      p_ok      <= 1'b0;
      wr_y      <= '0;
      wr_x      <= '0;
      wr_i_slot <= '0;
      wr_k_slot <= '0;
    end else begin
      p_vld <= req;
      if (req) begin
        p_ok      <= req_ok;
        wr_y      <= req_y;
        wr_x      <= req_x;
        wr_i_slot <= req_islot;
        wr_k_slot <= req_kslot;
      end
    end
  end

  gconv_pointwise u_pre (
    .cfg(pre), .x(ACC_W'(signed'(rdata_a))), .lut_idx, .lut_val, .y(pre_res)
  );

  always_comb begin
    wr_i_en  = p_vld;
    wr_k_en  = p_vld;
    wr_i_ok  = p_ok;
    wr_k_val = signed'(rdata_b);
    if (pre_res > 32'sd32767)       wr_i_val = 16'sh7fff;
    else if (pre_res < -32'sd32768) wr_i_val = 16'sh8000;
    else                            wr_i_val = pre_res[PRE_W-1:0];
  end
endmodule
