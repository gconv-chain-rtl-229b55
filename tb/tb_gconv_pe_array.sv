// tb_gconv_pe_array: a 6 x 3 array. Every PE gets its own inputs and kernel
// parameters over the data bus, all PEs compute in parallel, then the
// vertical reduce links fold groups of red_rows = 3 rows; the last row of
// each group must hold the sum over its group, the other rows their own
// partial results. Also checks that compute is broadcast in one cycle.
module tb_gconv_pe_array;
  import gconv_pkg::*;
  localparam int unsigned PY = 6, PX = 3, ILS_D = 4, KLS_D = 4, OLS_D = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  main_op_e main_op = MAIN_MUL;
  red_op_e  red_op = RED_ADD;
  logic [IDX_W-1:0] red_rows = 3, fwd_k = 0;
  logic [$clog2(PY)-1:0] wr_y = 0, rd_y = 0;
  logic [$clog2(PX)-1:0] wr_x = 0, rd_x = 0;
  logic wr_i_en = 0, wr_i_ok = 1, wr_k_en = 0, clr = 0, cmp_en = 0, fwd_en = 0;
  logic [$clog2(ILS_D)-1:0] wr_i_slot = 0, cmp_islot = 0;
  logic [$clog2(KLS_D)-1:0] wr_k_slot = 0, cmp_kslot = 0;
  logic [$clog2(OLS_D)-1:0] cmp_oslot = 0, rd_slot = 0;
  logic signed [PRE_W-1:0]  wr_i_val = 0;
  logic signed [DATA_W-1:0] wr_k_val = 0;
  logic signed [ACC_W-1:0]  rd_val;
  int checks = 0, failures = 0;

  gconv_pe_array #(.PY(PY), .PX(PX), .ILS_D(ILS_D), .KLS_D(KLS_D), .OLS_D(OLS_D)) dut (.*);

  int iv [PY][PX][ILS_D];
  int kv [PY][PX][KLS_D];
  int part [PY][PX];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < int'(PY); y++)
      for (int x = 0; x < int'(PX); x++)
        for (int t = 0; t < int'(ILS_D); t++) begin
          @(negedge clk);
          iv[y][x][t] = int'($urandom % 41) - 20;
          kv[y][x][t] = int'($urandom % 21) - 10;
          wr_y = 3'(y); wr_x = 2'(x); wr_i_slot = 2'(t); wr_k_slot = 2'(t);
          wr_i_val = 16'(iv[y][x][t]); wr_k_val = 8'(kv[y][x][t]);
          wr_i_en = 1; wr_k_en = 1;
        end
    @(negedge clk);
    wr_i_en = 0; wr_k_en = 0; clr = 1;
    @(negedge clk);
    clr = 0;
    for (int t = 0; t < int'(ILS_D); t++) begin
      cmp_en = 1; cmp_islot = 2'(t); cmp_kslot = 2'(t); cmp_oslot = 0;
      @(negedge clk);
    end
    cmp_en = 0;
    for (int y = 0; y < int'(PY); y++)
      for (int x = 0; x < int'(PX); x++) begin
        part[y][x] = 0;
        for (int t = 0; t < int'(ILS_D); t++) part[y][x] += iv[y][x][t] * kv[y][x][t];
      end
    // every PE computed its own dot product
    for (int y = 0; y < int'(PY); y++)
      for (int x = 0; x < int'(PX); x++) begin
        rd_y = 3'(y); rd_x = 2'(x); rd_slot = 0;
        #1;
        checks++;
        if (int'(rd_val) != part[y][x]) failures++;
      end
    // vertical reduction in groups of three rows
    @(negedge clk);
    for (int k = 1; k < 3; k++) begin
      fwd_en = 1; fwd_k = IDX_W'(k); rd_slot = 0;
      @(negedge clk);
    end
    fwd_en = 0;
    for (int y = 0; y < int'(PY); y++)
      for (int x = 0; x < int'(PX); x++) begin
        int exp_v;
        exp_v = part[y][x];
        if (y % 3 >= 1) exp_v += part[y - 1][x];
        if (y % 3 == 2) exp_v += part[y - 2][x];
        rd_y = 3'(y); rd_x = 2'(x);
        #1;
        checks++;
        if (int'(rd_val) != exp_v) begin
          failures++;
          $display("FAIL y%0d x%0d got %0d exp %0d own %0d above %0d", y, x, rd_val, exp_v, part[y][x], part[y-1][x]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
