// tb_gconv_data_loader: random load requests against a synchronous global
// buffer model; one cycle after each request the PE data bus must carry the
// target PE and slots, the pre-processed input (square, scaling and LUT are
// exercised, results saturated to 16 bit), the kernel parameter and the ok
// flag.
module tb_gconv_data_loader;
  import gconv_pkg::*;
  localparam int unsigned PY = 12, PX = 14, ILS_D = 12, KLS_D = 224;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pw_cfg_t pre;
  logic req = 0, req_ok = 0;
  logic [$clog2(PY)-1:0] req_y = 0, wr_y;
  logic [$clog2(PX)-1:0] req_x = 0, wr_x;
  logic [$clog2(ILS_D)-1:0] req_islot = 0, wr_i_slot;
  logic [$clog2(KLS_D)-1:0] req_kslot = 0, wr_k_slot;
  logic [ADDR_W-1:0] req_in_addr = 0, req_k_addr = 0, addr_a, addr_b;
  logic re_a, re_b;
  logic [DATA_W-1:0] rdata_a, rdata_b;
  logic [7:0] lut_idx;
  logic signed [ACC_W-1:0] lut_val;
  logic wr_i_en, wr_i_ok, wr_k_en;
  logic signed [PRE_W-1:0] wr_i_val;
  logic signed [DATA_W-1:0] wr_k_val;
  int checks = 0, failures = 0;
  logic [7:0] mem [4096];

  gconv_data_loader #(.PY(PY), .PX(PX), .ILS_D(ILS_D), .KLS_D(KLS_D)) dut (.*);

  always @(posedge clk) begin
    if (re_a) rdata_a <= mem[addr_a[11:0]];
    if (re_b) rdata_b <= mem[addr_b[11:0]];
  end
  assign lut_val = 1000 - int'(lut_idx) * 3;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    pre = '{op: PW_NONE, imm: '0, shift: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      int x, e;
      pw_op_e op;
      op = (i % 4 == 0) ? PW_NONE : (i % 4 == 1) ? PW_SQR : (i % 4 == 2) ? PW_MUL : PW_LUT;
      pre = '{op: op, imm: 16'sd300, shift: 5'd2};
      req = 1; req_ok = 1'($urandom);
      req_y = 4'($urandom % PY); req_x = 4'($urandom % PX);
      req_islot = 4'($urandom % ILS_D); req_kslot = 8'($urandom % KLS_D);
      req_in_addr = ADDR_W'($urandom % 4096); req_k_addr = ADDR_W'($urandom % 4096);
      x = int'($signed(mem[req_in_addr[11:0]]));
      case (op)
        PW_SQR: e = x * x;
        PW_MUL: e = (x * 300) >>> 2;
        PW_LUT: e = 1000 - ((x < 0) ? 0 : x) * 3;
        default: e = x;
      endcase
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      @(negedge clk);
      req = (i % 7 != 0);
      checks++;
      if (!wr_i_en || !wr_k_en || wr_y != req_y || wr_x != req_x || wr_i_slot != req_islot ||
          wr_k_slot != req_kslot || wr_i_ok != req_ok || int'(wr_i_val) != e ||
          wr_k_val != $signed(mem[req_k_addr[11:0]])) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: val %0d exp %0d", i, wr_i_val, e);
      end
      if (!req) begin
        @(negedge clk);
        checks++;
        if (wr_i_en || wr_k_en) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
