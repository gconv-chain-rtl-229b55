// gconv_pointwise: the GCONV "pre" and "post" operators.
//
// The same element-wise processing is applied to every input as it is loaded
// into the PE array (pre) or to every output as it leaves the array for the
// global buffer (post). Operations: none, fixed-point scaling
// (x * imm) >>> shift (e.g. multiply by 1/Nbs), add an immediate, AND with an
// immediate, square, arithmetic right shift, and lookup in a 256-entry table
// (index = x clamped to 0..255), which serves functions such as the
// 1/sqrt(var + eps) step of batch normalisation. The table itself lives in
// gconv_lut; this unit drives its read index and uses the returned word.
// Combinational; 32-bit signed in and out, intermediate results wrap at 32
// bits. The document lists multiply, and, square and LUT as examples; the
// immediate/shift encoding is this design's choice.
module gconv_pointwise
  import gconv_pkg::*;
(
  input  pw_cfg_t                  cfg,
  input  logic signed [ACC_W-1:0]  x,
  output logic [7:0]               lut_idx,
  input  logic signed [ACC_W-1:0]  lut_val,
  output logic signed [ACC_W-1:0]  y
);
  logic signed [2*ACC_W-1:0] prod;

  always_comb begin
    if (x < 0)              lut_idx = 8'd0;
    else if (x > 32'sd255)  lut_idx = 8'd255;
    else                    lut_idx = x[7:0];
    prod = 64'(x) * 64'(cfg.imm);
    case (cfg.op)
      PW_MUL:  y = ACC_W'(prod >>> cfg.shift);
      PW_ADD:  y = x + ACC_W'(cfg.imm);
      PW_AND:  y = x & ACC_W'(cfg.imm);
      PW_SQR:  y = x * x;
      PW_LUT:  y = lut_val;
      PW_SHR:  y = x >>> cfg.shift;
      default: y = x;
    endcase
  end
endmodule
