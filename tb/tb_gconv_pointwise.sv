// tb_gconv_pointwise: checks every pre/post operation on random operands;
// the LUT read port is answered by a table function held in the testbench.
module tb_gconv_pointwise;
  import gconv_pkg::*;
  pw_cfg_t cfg;
  logic signed [ACC_W-1:0] x, lut_val, y;
  logic [7:0] lut_idx;
  int checks = 0, failures = 0;

  gconv_pointwise dut (.*);

  function automatic int table_f(int i);
    return (i * 13) ^ 32'h55;
  endfunction
  assign lut_val = table_f(int'(lut_idx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(pw_cfg_t c, int v);
    longint p;
    int ix;
    case (c.op)
      PW_MUL: begin p = longint'(v) * longint'(c.imm); return int'(p >>> c.shift); end
      PW_ADD: return v + int'(c.imm);
      PW_AND: return v & int'(c.imm);
      PW_SQR: return v * v;
      PW_LUT: begin ix = (v < 0) ? 0 : (v > 255) ? 255 : v; return table_f(ix); end
      PW_SHR: return v >>> c.shift;
      default: return v;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      cfg.op    = pw_op_e'(i % 7);
      cfg.imm   = 16'($urandom);
      cfg.shift = 5'($urandom % 16);
      x = (i % 4 == 0) ? 32'(($urandom % 600) - 300) : 32'(($urandom % 200001) - 100000);
      #1;
      checks++;
      if (int'(y) != model(cfg, int'(x))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d x=%0d got %0d exp %0d", cfg.op, x, y, model(cfg, int'(x)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
