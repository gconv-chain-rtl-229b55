// tb_gconv_main_unit: checks every main opcode on random and corner operands
// against an integer model, including saturation to 16 bit.
module tb_gconv_main_unit;
  import gconv_pkg::*;
  main_op_e op;
  logic signed [PRE_W-1:0]  in_val;
  logic signed [DATA_W-1:0] k_val;
  logic signed [MAIN_W-1:0] res;
  int checks = 0, failures = 0;

  gconv_main_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(main_op_e o, int a, int k);
    int r;
    case (o)
      MAIN_MUL: r = a * k;
      MAIN_ADD: r = a + k;
      MAIN_SUB: r = a - k;
      MAIN_AND: r = a & k;
      MAIN_SQR: r = a * a;
      MAIN_MAX: r = (a > k) ? a : k;
      MAIN_MIN: r = (a < k) ? a : k;
      default:  r = a;
    endcase
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = main_op_e'(i % 8);
      if (i < 64) begin
        in_val = (i % 4 == 0) ? 16'sh7fff : (i % 4 == 1) ? 16'sh8000 : 16'(i * 37);
        k_val  = (i % 3 == 0) ? 8'sh80 : 8'sh7f;
      end else begin
        in_val = (i % 2 == 0) ? 16'($urandom) : 16'(($urandom % 512) - 256);
        k_val  = 8'($urandom);
      end
      #1;
      checks++;
      if (int'(res) != model(op, int'(in_val), int'(k_val))) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d in=%0d k=%0d got %0d exp %0d", op, in_val, k_val, res,
                   model(op, int'(in_val), int'(k_val)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
