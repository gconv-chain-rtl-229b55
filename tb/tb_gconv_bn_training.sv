// tb_gconv_bn_training: batch normalisation forward and backward pass run as
// a ten-GCONV chain on the accelerator at its default size.
//
// Mini-batch of 4, 4 channels, 6 x 6. The chain is the decomposition of the
// batch-norm layer for training:
//   FP1 mean over B                 FP2 t1 = x - mean
//   FP3 t2 = LUT(sum t1^2), pre sqr FP4 y = t1 x t2
//   BP1 t3 = sum_B(y x gy) / 4      BP2 t4 = y x t3
//   BP3 t5 = sum_B(gy) / 4          BP4 t6 = gy - t5
//   BP5 t7 = t6 - t4                BP6 gx = t7 x t2
// (gy: gradient arriving from the next layer, gx: gradient passed back).
// Reductions over B run down the reduce rows of the array; element-wise
// GCONVs take their second operand as kernel parameters produced by an
// earlier GCONV. BP2 takes y as input and t3 as parameters, and BP5 uses
// groups in every dimension, so that each element meets its own parameter.
// Every byte of every output is compared with the behavioural GCONV model
// shared with tb_gconv_top, and the testbench counts drain steps, LUT
// operations and parameters taken from producer GCONVs.
module tb_gconv_bn_training;
  import gconv_pkg::*;

  localparam int unsigned TOTAL = 102400 + 8192;
  localparam int NG = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              host_ib_we = 0;
  logic [1:0]        host_ib_sel = 0;
  logic [9:0]        host_ib_addr = 0;
  logic [63:0]       host_ib_wdata = 0;
  logic              host_lut_we = 0;
  logic [7:0]        host_lut_addr = 0;
  logic [31:0]       host_lut_wdata = 0;
  logic              host_glb_we = 0, host_glb_re = 0;
  logic [ADDR_W-1:0] host_glb_addr = 0;
  logic [DATA_W-1:0] host_glb_wdata = 0, host_glb_rdata;
  logic              start = 0;
  logic [7:0]        n_gconv = 0;
  logic [ADDR_W-1:0] alloc_start = 0;
  logic              busy, gconv_done, chain_done;

  gconv_top dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ GCONV descriptions
  typedef struct {
    int n[4][4];       // [dim][param]
    int s[4];
    int ps[4];
    pw_op_e pre_op;  int pre_imm;  int pre_sh;
    main_op_e main_op;
    red_op_e  red_op;
    pw_op_e post_op; int post_imm; int post_sh;
    int in_id, k_id, out_id;
  } gdesc_t;

  gdesc_t g[NG];
  int     addr_of[64];
  logic [7:0] ref_mem [TOTAL];
  int     lut [256];
  int     bi_n = 0, ul_n = 0;

  // ------------------------------------------------------------ host helpers
  task automatic ib_write(input int sel, input int a, input logic [63:0] d);
    @(negedge clk);
    host_ib_we = 1; host_ib_sel = 2'(sel); host_ib_addr = 10'(a); host_ib_wdata = d;
    @(negedge clk);
    host_ib_we = 0;
  endtask

  task automatic glb_write(input int a, input logic [7:0] d);
    @(negedge clk);
    host_glb_we = 1; host_glb_addr = ADDR_W'(a); host_glb_wdata = d;
    @(negedge clk);
    host_glb_we = 0;
  endtask

  task automatic glb_read(input int a, output logic [7:0] d);
    @(negedge clk);
    host_glb_re = 1; host_glb_addr = ADDR_W'(a);
    @(negedge clk);
    host_glb_re = 0;
    d = host_glb_rdata;
  endtask

  task automatic bi_put(input bi_kind_e k, input logic [60:0] pl);
    ib_write(0, bi_n, {k, pl});
    bi_n++;
  endtask

  task automatic ul_delim();
    ib_write(1, ul_n, 64'd0);
    ul_n++;
  endtask

  // basic information of GCONV i
  task automatic emit_bi(input int i);
    bi_stride_t st;
    st = '{s_b: 4'(g[i].s[0]), s_c: 4'(g[i].s[1]), s_h: 4'(g[i].s[2]), s_w: 4'(g[i].s[3]),
           ps_b: 4'(g[i].ps[0]), ps_c: 4'(g[i].ps[1]), ps_h: 4'(g[i].ps[2]), ps_w: 4'(g[i].ps[3])};
    bi_put(BI_STRIDE, 61'(st));
    if (g[i].pre_op != PW_NONE)
      bi_put(BI_PRE, 61'({3'(g[i].pre_op), 16'(g[i].pre_imm), 5'(g[i].pre_sh)}));
    if (g[i].main_op != MAIN_PASS)
      bi_put(BI_MAIN, 61'({3'(g[i].main_op), 16'd0, 5'd0}));
    if (g[i].red_op != RED_NONE)
      bi_put(BI_REDUCE, 61'({1'b0, 2'(g[i].red_op), 16'd0, 5'd0}));
    if (g[i].post_op != PW_NONE)
      bi_put(BI_POST, 61'({3'(g[i].post_op), 16'(g[i].post_imm), 5'(g[i].post_sh)}));
    bi_put(BI_PROD, 61'({6'(g[i].in_id), 6'(g[i].k_id), 6'(g[i].out_id)}));
    bi_put(BI_END, '0);
  endtask

  // one unrolling-list entry carrying the argument of its parameter
  task automatic ue(input int i, input ud_e ud, input par_e p, input dim_e d, input int uf);
    ul_entry_t e;
    e = '{ud: ud, p: p, d: d, uf: N_W'(uf), arg: N_W'(g[i].n[d][p]), rsvd: 1'b0};
    ib_write(1, ul_n, 64'(e));
    ul_n++;
  endtask

  // ------------------------------------------------------------ reference model
  function automatic int sat(input int x, input int lo, input int hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  function automatic int pw(input pw_op_e op, input int imm, input int sh, input int x);
    longint p;
    case (op)
      PW_MUL: begin p = longint'(x) * longint'(imm); return int'(p >>> sh); end
      PW_ADD: return x + imm;
      PW_AND: return x & imm;
      PW_SQR: return x * x;
      PW_LUT: return lut[sat(x, 0, 255)];
      PW_SHR: return x >>> sh;
      default: return x;
    endcase
  endfunction

  function automatic int mainf(input main_op_e op, input int a, input int k);
    int r;
    case (op)
      MAIN_MUL: r = a * k;
      MAIN_ADD: r = a + k;
      MAIN_SUB: r = a - k;
      MAIN_AND: r = a & k;
      MAIN_SQR: r = a * a;
      MAIN_MAX: r = (a > k) ? a : k;
      MAIN_MIN: r = (a < k) ? a : k;
      default:  r = a;
    endcase
    return sat(r, -32768, 32767);
  endfunction

  function automatic int redf(input red_op_e op, input int acc, input int v);
    case (op)
      RED_ADD: return acc + v;
      RED_MAX: return (v > acc) ? v : acc;
      RED_MIN: return (v < acc) ? v : acc;
      default: return v;
    endcase
  endfunction

  function automatic int nipc(input int i, input int d);
    return (g[i].n[d][1] - 1) * g[i].s[d] + g[i].n[d][0] - 2 * g[i].ps[d];
  endfunction

  function automatic int osize(input int i);
    int sz = 1;
    for (int d = 0; d < 4; d++) sz *= g[i].n[d][3] * g[i].n[d][2] * g[i].n[d][1];
    return sz;
  endfunction

  // computes GCONV i into ref_mem from the GCONV loop definition
  task automatic ref_gconv(input int i);
    int ie[4], ke[4], oe[4], ist[4], kst[4], ost[4];
    int o_tot, k_tot;
    for (int d = 0; d < 4; d++) begin
      ie[d] = g[i].n[d][3] * nipc(i, d);
      ke[d] = g[i].n[d][3] * g[i].n[d][2] * g[i].n[d][0];
      oe[d] = g[i].n[d][3] * g[i].n[d][2] * g[i].n[d][1];
    end
    ist[3] = 1; kst[3] = 1; ost[3] = 1;
    for (int d = 2; d >= 0; d--) begin
      ist[d] = ist[d+1] * ie[d+1];
      kst[d] = kst[d+1] * ke[d+1];
      ost[d] = ost[d+1] * oe[d+1];
    end
    o_tot = oe[0] * oe[1] * oe[2] * oe[3];
    k_tot = 1;
    for (int d = 0; d < 4; d++) k_tot *= g[i].n[d][0];
    for (int o = 0; o < o_tot; o++) begin
      int gi[4], opi[4], opci[4], rem, acc, oaddr;
      rem = o;
      oaddr = addr_of[g[i].out_id];
      for (int d = 3; d >= 0; d--) begin
        int od;
        od = rem % oe[d];
        rem = rem / oe[d];
        opci[d] = od % g[i].n[d][1];
        opi[d]  = (od / g[i].n[d][1]) % g[i].n[d][2];
        gi[d]   = od / (g[i].n[d][1] * g[i].n[d][2]);
        oaddr += od * ost[d];
      end
      acc = int'(red_identity(g[i].red_op));
      for (int kk = 0; kk < k_tot; kk++) begin
        int ksi, rem2, iaddr, kaddr, xin, kv;
        bit ok;
        rem2 = kk; ok = 1;
        iaddr = addr_of[g[i].in_id];
        kaddr = addr_of[g[i].k_id];
        for (int d = 3; d >= 0; d--) begin
          int ipc;
          ksi = rem2 % g[i].n[d][0];
          rem2 = rem2 / g[i].n[d][0];
          ipc = opci[d] * g[i].s[d] + ksi - g[i].ps[d];
          if (ipc < 0 || ipc >= nipc(i, d)) ok = 0;
          iaddr += (gi[d] * nipc(i, d) + ipc) * ist[d];
          kaddr += ((gi[d] * g[i].n[d][2] + opi[d]) * g[i].n[d][0] + ksi) * kst[d];
        end
        if (ok) begin
          xin = sat(pw(g[i].pre_op, g[i].pre_imm, g[i].pre_sh, int'($signed(ref_mem[iaddr]))),
                    -32768, 32767);
          kv  = int'($signed(ref_mem[kaddr]));
          acc = redf(g[i].red_op, acc, mainf(g[i].main_op, xin, kv));
        end
      end
      ref_mem[oaddr] = 8'(sat(pw(g[i].post_op, g[i].post_imm, g[i].post_sh, acc), -128, 127));
    end
  endtask

  function automatic gdesc_t gdef();
    gdesc_t d;
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) d.n[a][b] = 1;
      d.s[a] = 1;
      d.ps[a] = 0;
    end
    d.pre_op = PW_NONE;  d.pre_imm = 0;  d.pre_sh = 0;
    d.main_op = MAIN_PASS;
    d.red_op = RED_NONE;
    d.post_op = PW_NONE; d.post_imm = 0; d.post_sh = 0;
    d.in_id = 0; d.k_id = 0; d.out_id = 0;
    return d;
  endfunction

  // ------------------------------------------------------------ event counters
  int n_drain = 0, n_lut = 0, n_kprod = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.fwd_en) n_drain++;
    if (dut.wb_we && dut.run_cfg.post.op == PW_LUT) n_lut++;
    if (dut.u_ctrl.ld_req && dut.u_ctrl.ld_k_addr < 17'd102400) n_kprod++;
    if (gconv_done) n_done++;
  end

  task automatic need(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end else begin
      $display("mechanism %-26s : %0d", name, n);
    end
  endtask

  function automatic int isqrt(input int a);
    int r = 0;
    while ((r + 1) * (r + 1) <= a) r++;
    return r;
  endfunction

  // shape helpers: 4 x 4 x 6 x 6 with B as reduce (kernel size), as opc,
  // or as groups; C, H, W as opc or as groups
  function automatic gdesc_t shape(input par_e pb, input par_e pchw);
    gdesc_t d;
    d = gdef();
    d.n[DIM_B][pb] = 4;
    d.n[DIM_C][pchw] = 4; d.n[DIM_H][pchw] = 6; d.n[DIM_W][pchw] = 6;
    return d;
  endfunction

  // lists: B in the rows (first, so that a B reduction folds down the
  // rows), H split over rows and outer loop, W and C over the columns,
  // the rest of C in the scratchpads
  task automatic lists(input int i, input par_e pb, input par_e pchw);
    ue(i, UD_PY, pb, DIM_B, 4);   ue(i, UD_PY, pchw, DIM_H, 3); ul_delim();
    ue(i, UD_PX, pchw, DIM_W, 6); ue(i, UD_PX, pchw, DIM_C, 2); ul_delim();
    ue(i, UD_LS, pchw, DIM_C, 2); ul_delim();
    ue(i, UD_GB, pchw, DIM_H, 2); ul_delim();
  endtask

  par_e lb[NG], lc[NG];

  // ------------------------------------------------------------ stimulus
  initial begin
    int t0, t1;
    logic [7:0] d;
    for (int a = 0; a < int'(TOTAL); a++) ref_mem[a] = '0;
    for (int a = 0; a < 64; a++) addr_of[a] = 0;
    for (int a = 0; a < 256; a++) lut[a] = 128 / (1 + isqrt(a / 4));

    repeat (3) @(posedge clk);
    rst_n = 1;

    // external tensors: 1 = x, 2 = gy, 3 = unused parameter slot
    addr_of[1] = 0;
    addr_of[2] = 576;
    addr_of[3] = 102400;
    for (int t = 1; t <= 3; t++) ib_write(2, t, 64'(addr_of[t]));

    // FP1 mean
    g[0] = shape(P_KS, P_OPC); lb[0] = P_KS; lc[0] = P_OPC;
    g[0].red_op = RED_ADD; g[0].post_op = PW_MUL; g[0].post_imm = 64; g[0].post_sh = 8;
    g[0].in_id = 1; g[0].k_id = 3; g[0].out_id = 11;
    // FP2 t1 = x - mean
    g[1] = shape(P_OPC, P_G); lb[1] = P_OPC; lc[1] = P_G;
    g[1].main_op = MAIN_SUB;
    g[1].in_id = 1; g[1].k_id = 11; g[1].out_id = 12;
    // FP3 t2 = LUT(sum t1^2)
    g[2] = shape(P_KS, P_OPC); lb[2] = P_KS; lc[2] = P_OPC;
    g[2].pre_op = PW_SQR; g[2].red_op = RED_ADD; g[2].post_op = PW_LUT;
    g[2].in_id = 12; g[2].k_id = 3; g[2].out_id = 13;
    // FP4 y = t1 x t2
    g[3] = shape(P_OPC, P_G); lb[3] = P_OPC; lc[3] = P_G;
    g[3].main_op = MAIN_MUL; g[3].post_op = PW_SHR; g[3].post_sh = 6;
    g[3].in_id = 12; g[3].k_id = 13; g[3].out_id = 14;
    // BP1 t3 = sum_B(y x gy) / 4
    g[4] = shape(P_KS, P_G); lb[4] = P_KS; lc[4] = P_G;
    g[4].main_op = MAIN_MUL; g[4].red_op = RED_ADD;
    g[4].post_op = PW_MUL; g[4].post_imm = 64; g[4].post_sh = 8;
    g[4].in_id = 2; g[4].k_id = 14; g[4].out_id = 21;
    // BP2 t4 = y x t3
    g[5] = shape(P_OPC, P_G); lb[5] = P_OPC; lc[5] = P_G;
    g[5].main_op = MAIN_MUL; g[5].post_op = PW_SHR; g[5].post_sh = 5;
    g[5].in_id = 14; g[5].k_id = 21; g[5].out_id = 22;
    // BP3 t5 = sum_B(gy) / 4
    g[6] = shape(P_KS, P_OPC); lb[6] = P_KS; lc[6] = P_OPC;
    g[6].red_op = RED_ADD; g[6].post_op = PW_MUL; g[6].post_imm = 64; g[6].post_sh = 8;
    g[6].in_id = 2; g[6].k_id = 3; g[6].out_id = 23;
    // BP4 t6 = gy - t5
    g[7] = shape(P_OPC, P_G); lb[7] = P_OPC; lc[7] = P_G;
    g[7].main_op = MAIN_SUB;
    g[7].in_id = 2; g[7].k_id = 23; g[7].out_id = 24;
    // BP5 t7 = t6 - t4
    g[8] = shape(P_G, P_G); lb[8] = P_G; lc[8] = P_G;
    g[8].main_op = MAIN_SUB;
    g[8].in_id = 24; g[8].k_id = 22; g[8].out_id = 25;
    // BP6 gx = t7 x t2
    g[9] = shape(P_OPC, P_G); lb[9] = P_OPC; lc[9] = P_G;
    g[9].main_op = MAIN_MUL; g[9].post_op = PW_SHR; g[9].post_sh = 6;
    g[9].in_id = 25; g[9].k_id = 13; g[9].out_id = 26;

    for (int i = 0; i < NG; i++) emit_bi(i);
    for (int i = 0; i < NG; i++) lists(i, lb[i], lc[i]);

    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      host_lut_we = 1; host_lut_addr = 8'(a); host_lut_wdata = 32'(lut[a]);
    end
    @(negedge clk) host_lut_we = 0;

    for (int a = 0; a < 1152; a++) begin
      ref_mem[a] = 8'(($urandom % 17) - 8);
      glb_write(a, ref_mem[a]);
    end

    begin
      int alloc = 4096;
      for (int i = 0; i < NG; i++) begin
        if (alloc + osize(i) > 102400) alloc = 4096;
        addr_of[g[i].out_id] = alloc;
        alloc += osize(i);
        ref_gconv(i);
      end
    end

    @(negedge clk);
    alloc_start = 17'd4096; n_gconv = 8'(NG); start = 1;
    @(negedge clk) start = 0;
    t0 = cycles;
    @(posedge chain_done);
    t1 = cycles;
    $display("chain of %0d GCONVs finished in %0d cycles", NG, t1 - t0);

    for (int i = 0; i < NG; i++) begin
      int nz = 0;
      for (int a = 0; a < osize(i); a++) begin
        int ad;
        ad = addr_of[g[i].out_id] + a;
        glb_read(ad, d);
        checks++;
        if (ref_mem[ad] != 0) nz++;
        if (d !== ref_mem[ad]) begin
          failures++;
          if (failures < 20)
            $display("FAIL: GCONV %0d output %0d @%0d: got %0d expected %0d", i + 1, a, ad,
                     $signed(d), $signed(ref_mem[ad]));
        end
      end
      checks++;
      if (nz == 0) begin
        failures++;
        $display("FAIL: GCONV %0d expected output is all zero", i + 1);
      end
    end
    checks++;
    if (n_done != NG) begin
      failures++;
      $display("FAIL: %0d GCONV completions, expected %0d", n_done, NG);
    end
    need("vertical reduce drain", n_drain);
    need("LUT post operator", n_lut);
    need("kernel from producer GCONV", n_kprod);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
