// tb_gconv_decoder: two GCONVs are placed in instruction buffers modelled in
// the testbench. The first is a 3x3 convolution (stride 2, padding 1) with
// entries in all four unrolling lists; the decoded configuration is
// compared field by field with values worked out by hand: operators,
// arguments, index weights of repeated parameters, slot weights, reduce
// rows, input extents, strides and addresses. The testbench withholds
// cfg_take for a while to check that the configuration is held, then
// checks the second GCONV's output allocation, its producer-ID lookups
// and that set-up takes one cycle per instruction entry.
module tb_gconv_decoder;
  import gconv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [7:0] n_gconv = 2;
  logic [ADDR_W-1:0] alloc_start = 17'd1000;
  logic busy;
  logic [7:0] bi_raddr;
  logic [63:0] bi_rdata;
  logic [9:0] ul_raddr;
  logic [31:0] ul_rdata;
  logic [5:0] oa_raddr, oa_waddr;
  logic [ADDR_W-1:0] oa_rdata, oa_wdata;
  logic oa_we;
  gconv_cfg_t cfg;
  logic cfg_valid, cfg_take = 0;
  int checks = 0, failures = 0;

  logic [63:0] bi [256];
  logic [31:0] ul [1024];
  logic [ADDR_W-1:0] oa [64];
  assign bi_rdata = bi[bi_raddr];
  assign ul_rdata = ul[ul_raddr];
  assign oa_rdata = oa[oa_raddr];
  always @(posedge clk) if (oa_we) oa[oa_waddr] <= oa_wdata;

  gconv_decoder #(.BI_DEPTH(256), .UL_DEPTH(1024), .OA_DEPTH(64), .DATA_BYTES(102400)) dut (.*);

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  function automatic logic [31:0] ue(ud_e ud, par_e p, dim_e d, int uf, int arg);
    ul_entry_t e;
    e = '{ud: ud, p: p, d: d, uf: N_W'(uf), arg: N_W'(arg), rsvd: 1'b0};
    return 32'(e);
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, u, t0;
    foreach (bi[i]) bi[i] = '0;
    foreach (ul[i]) ul[i] = '0;
    foreach (oa[i]) oa[i] = '0;
    oa[3] = 17'd200;      // input tensor
    oa[4] = 17'd102400;   // weights
    // GCONV 1: 3x3 conv, C 4 -> 8, H/W 7 outputs, stride 2, pad 1
    b = 0;
    bi[b++] = {BI_STRIDE, 29'd0, 4'd1, 4'd1, 4'd2, 4'd2, 4'd0, 4'd0, 4'd1, 4'd1};
    bi[b++] = {BI_MAIN, 37'd0, 3'(MAIN_MUL), 16'd0, 5'd0};
    bi[b++] = {BI_REDUCE, 37'd0, 3'(RED_ADD), 16'd0, 5'd0};
    bi[b++] = {BI_POST, 37'd0, 3'(PW_MUL), 16'd85, 5'd8};
    bi[b++] = {BI_PROD, 43'd0, 6'd3, 6'd4, 6'd5};
    bi[b++] = '0;
    // GCONV 2: pooling-like, reads GCONV 1's output (ID 5), output ID 6
    bi[b++] = {BI_REDUCE, 37'd0, 3'(RED_MAX), 16'd0, 5'd0};
    bi[b++] = {BI_PROD, 43'd0, 6'd5, 6'd5, 6'd6};
    bi[b++] = '0;
    u = 0;
    ul[u++] = ue(UD_PY, P_KS, DIM_H, 3, 3);
    ul[u++] = ue(UD_PY, P_OP, DIM_C, 4, 8);
    ul[u++] = 0;
    ul[u++] = ue(UD_PX, P_OPC, DIM_W, 7, 7);
    ul[u++] = 0;
    ul[u++] = ue(UD_LS, P_KS, DIM_W, 3, 3);
    ul[u++] = ue(UD_LS, P_OP, DIM_C, 2, 8);
    ul[u++] = ue(UD_LS, P_OPC, DIM_H, 2, 7);
    ul[u++] = 0;
    ul[u++] = ue(UD_GB, P_KS, DIM_C, 4, 4);
    ul[u++] = ue(UD_GB, P_OPC, DIM_H, 4, 7);
    ul[u++] = 0;
    ul[u++] = ue(UD_PY, P_KS, DIM_W, 2, 2);
    ul[u++] = 0;
    ul[u++] = 0;
    ul[u++] = 0;
    ul[u++] = ue(UD_GB, P_G, DIM_C, 8, 8);
    ul[u++] = 0;

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    t0 = $time / 10;
    @(negedge clk);
    start = 0;
    wait (cfg_valid);
    // 6 basic entries + 12 list entries + geometry + 2 lookups + allocation
    expect_eq("set-up cycles", int'($time / 10) - t0, 6 + 12 + 4);
    expect_eq("s[W]", int'(cfg.s[DIM_W]), 2);
    expect_eq("s[C]", int'(cfg.s[DIM_C]), 1);
    expect_eq("ps[H]", int'(cfg.ps[DIM_H]), 1);
    expect_eq("ps[B]", int'(cfg.ps[DIM_B]), 0);
    expect_eq("main", int'(cfg.main_op), int'(MAIN_MUL));
    expect_eq("reduce", int'(cfg.red_op), int'(RED_ADD));
    expect_eq("post op", int'(cfg.post.op), int'(PW_MUL));
    expect_eq("post imm", int'(cfg.post.imm), 85);
    expect_eq("n C/op", int'(cfg.n[DIM_C][P_OP]), 8);
    expect_eq("n C/ks", int'(cfg.n[DIM_C][P_KS]), 4);
    expect_eq("n H/opc", int'(cfg.n[DIM_H][P_OPC]), 7);
    expect_eq("n B/g default", int'(cfg.n[DIM_B][P_G]), 1);
    expect_eq("py n", int'(cfg.py.n), 2);
    expect_eq("px n", int'(cfg.px.n), 1);
    expect_eq("ls n", int'(cfg.ls.n), 3);
    expect_eq("gb n", int'(cfg.gb.n), 2);
    expect_eq("weight C/op in LS", int'(cfg.ls.w[1]), 4);   // after py factor 4
    expect_eq("weight H/opc in GB", int'(cfg.gb.w[1]), 2);  // after LS factor 2
    expect_eq("weight W/ks in LS", int'(cfg.ls.w[0]), 1);
    expect_eq("py dp", int'(cfg.py.dp[1]), int'({DIM_C, P_OP}));
    expect_eq("ls iw[1] (op)", int'(cfg.ls_iw[1]), 0);
    expect_eq("ls iw[2]", int'(cfg.ls_iw[2]), 3);
    expect_eq("ls kw[1]", int'(cfg.ls_kw[1]), 3);
    expect_eq("ls kw[2] (opc)", int'(cfg.ls_kw[2]), 0);
    expect_eq("ls ow[0] (ks)", int'(cfg.ls_ow[0]), 0);
    expect_eq("ls ow[2]", int'(cfg.ls_ow[2]), 2);
    expect_eq("n_slots", int'(cfg.n_slots), 4);
    expect_eq("red_rows", int'(cfg.red_rows), 3);
    expect_eq("nipc W", int'(cfg.nipc[DIM_W]), 6 * 2 + 3 - 2);
    expect_eq("nipc C", int'(cfg.nipc[DIM_C]), 4);
    expect_eq("in stride H", int'(cfg.in_stride[DIM_H]), 13);
    expect_eq("in stride C", int'(cfg.in_stride[DIM_C]), 169);
    expect_eq("k stride C", int'(cfg.k_stride[DIM_C]), 9);
    expect_eq("o stride C", int'(cfg.o_stride[DIM_C]), 49);
    expect_eq("o size", int'(cfg.o_size), 8 * 49);
    expect_eq("in base", int'(cfg.in_base), 200);
    expect_eq("k base", int'(cfg.k_base), 102400);
    expect_eq("o base", int'(cfg.o_base), 1000);
    // hold until taken
    repeat (5) @(negedge clk);
    expect_eq("held", int'(cfg_valid), 1);
    expect_eq("oa[5]", int'(oa[5]), 1000);
    cfg_take = 1;
    @(negedge clk);
    cfg_take = 0;
    wait (cfg_valid);
    expect_eq("G2 in base", int'(cfg.in_base), 1000);
    expect_eq("G2 o base", int'(cfg.o_base), 1000 + 392);
    expect_eq("G2 red", int'(cfg.red_op), int'(RED_MAX));
    expect_eq("G2 main default", int'(cfg.main_op), int'(MAIN_PASS));
    expect_eq("G2 s default", int'(cfg.s[DIM_W]), 1);
    expect_eq("G2 red_rows", int'(cfg.red_rows), 2);
    expect_eq("G2 gb n", int'(cfg.gb.n), 1);
    expect_eq("G2 py n", int'(cfg.py.n), 1);
    @(negedge clk);
    cfg_take = 1;
    @(negedge clk);
    cfg_take = 0;
    @(negedge clk);
    expect_eq("idle after chain", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
