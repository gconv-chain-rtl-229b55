// tb_gconv_pe: drives one PE through random scratchpad writes, clears,
// main/reduce steps and forwarded partial sums, and compares its OLS read
// port with a model of the three scratchpads kept in the testbench. Each
// operation must take effect in the cycle it is issued.
module tb_gconv_pe;
  import gconv_pkg::*;
  localparam int unsigned ILS_D = 12, KLS_D = 224, OLS_D = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  main_op_e main_op;
  red_op_e  red_op;
  logic wr_i_en = 0, wr_i_ok = 0, wr_k_en = 0, clr = 0, cmp_en = 0, fwd_en = 0;
  logic [$clog2(ILS_D)-1:0] wr_i_slot = 0, cmp_islot = 0;
  logic [$clog2(KLS_D)-1:0] wr_k_slot = 0, cmp_kslot = 0;
  logic [$clog2(OLS_D)-1:0] cmp_oslot = 0, rd_slot = 0;
  logic signed [PRE_W-1:0]  wr_i_val = 0;
  logic signed [DATA_W-1:0] wr_k_val = 0;
  logic signed [ACC_W-1:0]  psum_in = 0, ols_rd;
  int checks = 0, failures = 0;

  gconv_pe #(.ILS_D(ILS_D), .KLS_D(KLS_D), .OLS_D(OLS_D)) dut (.*);

  int m_ils [ILS_D];
  bit m_v   [ILS_D];
  int m_kls [KLS_D];
  int m_ols [OLS_D];

  function automatic int mainf(main_op_e o, int a, int k);
    int r;
    case (o)
      MAIN_MUL: r = a * k;
      MAIN_ADD: r = a + k;
      MAIN_SUB: r = a - k;
      MAIN_SQR: r = a * a;
      MAIN_MAX: r = (a > k) ? a : k;
      default:  r = a;
    endcase
    return (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
  endfunction
  function automatic int redf(red_op_e o, int a, int v);
    case (o)
      RED_ADD: return a + v;
      RED_MAX: return (v > a) ? v : a;
      RED_MIN: return (v < a) ? v : a;
      default: return v;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_ils[i]) begin m_ils[i] = 0; m_v[i] = 0; end
    foreach (m_kls[i]) m_kls[i] = 0;
    foreach (m_ols[i]) m_ols[i] = 0;
    main_op = MAIN_MUL;
    red_op  = RED_ADD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      main_op = (round % 3 == 0) ? MAIN_MUL : (round % 3 == 1) ? MAIN_SUB : MAIN_SQR;
      red_op  = (round % 2 == 0) ? RED_ADD : RED_MAX;
      // fill the scratchpads
      for (int i = 0; i < int'(ILS_D); i++) begin
        @(negedge clk);
        wr_i_en = 1; wr_i_slot = 4'(i); wr_i_val = 16'(($urandom % 301) - 150);
        wr_i_ok = ($urandom % 5) != 0;
        wr_k_en = 1; wr_k_slot = 8'(i * 3); wr_k_val = 8'($urandom);
        m_ils[i] = int'(wr_i_val); m_v[i] = wr_i_ok; m_kls[i * 3] = int'(wr_k_val);
      end
      @(negedge clk);
      wr_i_en = 0; wr_k_en = 0;
      clr = 1;
      foreach (m_ols[i]) m_ols[i] = int'(red_identity(red_op));
      @(negedge clk);
      clr = 0;
      // random compute steps
      for (int s = 0; s < 60; s++) begin
        cmp_en = 1;
        cmp_islot = 4'($urandom % ILS_D);
        cmp_kslot = 8'(($urandom % ILS_D) * 3);
        cmp_oslot = 5'($urandom % 4);
        if (m_v[cmp_islot])
          m_ols[cmp_oslot] = redf(red_op, m_ols[cmp_oslot],
                                  mainf(main_op, m_ils[cmp_islot], m_kls[cmp_kslot]));
        @(negedge clk);
      end
      cmp_en = 0;
      // forwarded partial results
      for (int s = 0; s < 4; s++) begin
        fwd_en = 1; rd_slot = 5'(s); psum_in = 32'(($urandom % 2001) - 1000);
        m_ols[s] = redf(red_op, m_ols[s], int'(psum_in));
        @(negedge clk);
      end
      fwd_en = 0;
      for (int s = 0; s < 4; s++) begin
        rd_slot = 5'(s);
        #1;
        checks++;
        if (int'(ols_rd) != m_ols[s]) begin
          failures++;
          $display("FAIL round %0d slot %0d got %0d exp %0d", round, s, ols_rd, m_ols[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
