// tb_gconv_reduce_unit: checks add / max / min / overwrite reductions on
// random 32-bit operands against an integer model.
module tb_gconv_reduce_unit;
  import gconv_pkg::*;
  red_op_e op;
  logic signed [ACC_W-1:0] acc, val, res;
  int checks = 0, failures = 0;

  gconv_reduce_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(red_op_e o, int a, int v);
    case (o)
      RED_ADD: return a + v;
      RED_MAX: return (v > a) ? v : a;
      RED_MIN: return (v < a) ? v : a;
      default: return v;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op  = red_op_e'(i % 4);
      acc = (i % 3 == 0) ? 32'($urandom) : 32'(($urandom % 2001) - 1000);
      val = (i % 5 == 0) ? 32'($urandom) : 32'(($urandom % 2001) - 1000);
      #1;
      checks++;
      if (int'(res) != model(op, int'(acc), int'(val))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d %0d %0d -> %0d", op, acc, val, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
