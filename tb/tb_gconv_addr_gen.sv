// tb_gconv_addr_gen: random GCONV geometries (arguments, strides, padding)
// and random loop indices, some beyond their arguments; the input, kernel
// and output addresses and ok flags are compared with the loop definition
// computed independently in the testbench.
module tb_gconv_addr_gen;
  import gconv_pkg::*;
  gconv_cfg_t cfg;
  logic [3:0][3:0][IDX_W-1:0] idx;
  logic [ADDR_W-1:0] in_addr, k_addr, o_addr;
  logic in_ok, k_ok, o_ok;
  int checks = 0, failures = 0;

  gconv_addr_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int n[4][4], s[4], ps[4], nipc[4], ie[4], ke[4], oe[4], ist[4], kst[4], ost[4];
      cfg = '0;
      for (int d = 0; d < 4; d++) begin
        for (int p = 0; p < 4; p++) n[d][p] = 1 + int'($urandom % 3);
        s[d]  = 1 + int'($urandom % 2);
        ps[d] = int'($urandom % 2);
        nipc[d] = (n[d][1] - 1) * s[d] + n[d][0] - 2 * ps[d];
        if (nipc[d] < 1) begin ps[d] = 0; nipc[d] = (n[d][1] - 1) * s[d] + n[d][0]; end
        ie[d] = n[d][3] * nipc[d];
        ke[d] = n[d][3] * n[d][2] * n[d][0];
        oe[d] = n[d][3] * n[d][2] * n[d][1];
        for (int p = 0; p < 4; p++) cfg.n[d][p] = N_W'(n[d][p]);
        cfg.s[d] = 4'(s[d]); cfg.ps[d] = 4'(ps[d]); cfg.nipc[d] = IDX_W'(nipc[d]);
      end
      ist[3] = 1; kst[3] = 1; ost[3] = 1;
      for (int d = 2; d >= 0; d--) begin
        ist[d] = ist[d+1] * ie[d+1]; kst[d] = kst[d+1] * ke[d+1]; ost[d] = ost[d+1] * oe[d+1];
      end
      for (int d = 0; d < 4; d++) begin
        cfg.in_stride[d] = ADDR_W'(ist[d]);
        cfg.k_stride[d]  = ADDR_W'(kst[d]);
        cfg.o_stride[d]  = ADDR_W'(ost[d]);
      end
      cfg.in_base = ADDR_W'($urandom % 1000);
      cfg.k_base  = ADDR_W'(100000 + $urandom % 1000);
      cfg.o_base  = ADDR_W'(5000 + $urandom % 1000);
      for (int r = 0; r < 20; r++) begin
        int ea, ka, oa;
        bit eok, kok, ook;
        ea = int'(cfg.in_base); ka = int'(cfg.k_base); oa = int'(cfg.o_base);
        eok = 1; kok = 1; ook = 1;
        for (int d = 0; d < 4; d++) begin
          int i[4], ipc;
          for (int p = 0; p < 4; p++) begin
            i[p] = int'($urandom % (n[d][p] + ((r % 4 == 0) ? 1 : 0)));
            idx[d][p] = IDX_W'(i[p]);
          end
          if (i[3] >= n[d][3] || i[2] >= n[d][2] || i[1] >= n[d][1]) begin
            eok = 0; kok = 0; ook = 0;
          end
          if (i[0] >= n[d][0]) begin eok = 0; kok = 0; end
          ipc = i[1] * s[d] + i[0] - ps[d];
          if (ipc < 0 || ipc >= nipc[d]) eok = 0;
          ea += (i[3] * nipc[d] + ipc) * ist[d];
          ka += ((i[3] * n[d][2] + i[2]) * n[d][0] + i[0]) * kst[d];
          oa += ((i[3] * n[d][2] + i[2]) * n[d][1] + i[1]) * ost[d];
        end
        #1;
        checks++;
        if (in_ok != eok || k_ok != kok || o_ok != ook ||
            (eok && int'(in_addr) != (ea % 131072)) || (kok && int'(k_addr) != (ka % 131072)) ||
            (ook && int'(o_addr) != (oa % 131072))) begin
          failures++;
          if (failures < 10)
            $display("FAIL ok %0d%0d%0d/%0d%0d%0d in %0d/%0d k %0d/%0d o %0d/%0d", in_ok, k_ok, o_ok,
                     eok, kok, ook, in_addr, ea, k_addr, ka, o_addr, oa);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
