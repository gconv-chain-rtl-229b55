// gconv_reduce_unit: the GCONV "reduce" operator of a processing element.
//
// Replaces the adder of a conventional convolution PE. It combines a 32-bit
// partial result already held for an output (acc) with a new contribution
// (val) -- either a main-operator result or a partial result forwarded from
// the PE row above -- by addition, maximum or minimum. With RED_NONE (a GCONV
// without reduce operator) the new contribution replaces the old value.
// Addition wraps at 32 bits. Purely combinational. Add and compare are the
// reductions the document names; min and the overwrite mode are this
// design's additions.
module gconv_reduce_unit
  import gconv_pkg::*;
(
  input  red_op_e                  op,
  input  logic signed [ACC_W-1:0]  acc,
  input  logic signed [ACC_W-1:0]  val,
  output logic signed [ACC_W-1:0]  res
);
  always_comb begin
    case (op)
      RED_ADD: res = acc + val;
      RED_MAX: res = (val > acc) ? val : acc;
      RED_MIN: res = (val < acc) ? val : acc;
      default: res = val;
    endcase
  end
endmodule
