// gconv_main_unit: the GCONV "main" operator of a processing element.
//
// Replaces the multiplier of a conventional convolution PE. It combines one
// pre-processed input (16 bit, signed) with one kernel parameter (8 bit,
// signed) according to the main opcode of the running GCONV: multiply, add,
// subtract (input - parameter), bitwise AND, square of the input, maximum,
// minimum, or pass the input through when the GCONV has no main operator.
// The result is saturated to the 16-bit main-result width the document uses.
// Purely combinational; the set of opcodes beyond those the document names
// (multiply, add, square, and) is this design's choice.
module gconv_main_unit
  import gconv_pkg::*;
(
  input  main_op_e                  op,
  input  logic signed [PRE_W-1:0]   in_val,
  input  logic signed [DATA_W-1:0]  k_val,
  output logic signed [MAIN_W-1:0]  res
);
  logic signed [ACC_W-1:0] wide;
  logic signed [ACC_W-1:0] in_x, k_x;

  always_comb begin
    in_x = ACC_W'(in_val);
    k_x  = ACC_W'(k_val);
    case (op)
      MAIN_MUL: wide = in_x * k_x;
      MAIN_ADD: wide = in_x + k_x;
      MAIN_SUB: wide = in_x - k_x;
      MAIN_AND: wide = in_x & k_x;
      MAIN_SQR: wide = in_x * in_x;
      MAIN_MAX: wide = (in_x > k_x) ? in_x : k_x;
      MAIN_MIN: wide = (in_x < k_x) ? in_x : k_x;
      default:  wide = in_x;
    endcase
    if (wide > 32'sd32767)       res = 16'sh7fff;
    else if (wide < -32'sd32768) res = 16'sh8000;
    else                         res = wide[MAIN_W-1:0];
  end
endmodule
