// tb_gconv_loop_counter: a three-level list (kernel size in W with factor 3,
// outputs in H with factor 2, kernel size in W again with factor 2 and
// weight 3) is stepped through two full passes; counters, the W/ks and
// H/opc index contributions, the linear position and the last / ks_zero /
// ks_max flags are compared with a model after every step. An empty list
// must report last, and clear must restart the nest.
module tb_gconv_loop_counter;
  import gconv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ulist_t lst;
  logic clear = 0, step = 0;
  logic [MAX_LV-1:0][N_W-1:0] cnt;
  logic [3:0][3:0][IDX_W-1:0] contrib;
  logic [IDX_W-1:0] lin;
  logic last, ks_zero, ks_max;
  int checks = 0, failures = 0;

  gconv_loop_counter dut (.*);

  task automatic chk(input int c0, input int c1, input int c2, input int n);
    int e_last, e_kz, e_km;
    e_last = (c0 == 2 && c1 == 1 && c2 == 1);
    e_kz = (c0 == 0 && c2 == 0);
    e_km = (c0 == 2 && c2 == 1);
    checks++;
    if (int'(cnt[0]) != c0 || int'(cnt[1]) != c1 || int'(cnt[2]) != c2 ||
        int'(contrib[DIM_W][P_KS]) != c0 + 3 * c2 || int'(contrib[DIM_H][P_OPC]) != c1 ||
        int'(lin) != n || int'(last) != e_last || int'(ks_zero) != e_kz || int'(ks_max) != e_km) begin
      failures++;
      $display("FAIL at %0d: cnt %0d %0d %0d lin %0d last %0d", n, cnt[0], cnt[1], cnt[2], lin, last);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lst = '0;
    #1;
    checks++;
    if (!last) failures++;          // empty list
    lst.n = 3;
    lst.uf[0] = 3; lst.dp[0] = {DIM_W, P_KS};  lst.w[0] = 1;
    lst.uf[1] = 2; lst.dp[1] = {DIM_H, P_OPC}; lst.w[1] = 1;
    lst.uf[2] = 2; lst.dp[2] = {DIM_W, P_KS};  lst.w[2] = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 24; n++) begin
      int m;
      m = n % 12;
      #1 chk(m % 3, (m / 3) % 2, m / 6, m);
      @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    repeat (5) begin
      @(negedge clk) step = 1;
    end
    @(negedge clk);
    step = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    #1 chk(0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
