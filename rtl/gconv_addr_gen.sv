// gconv_addr_gen: global-buffer addresses of one GCONV loop point.
//
// Given the index of every loop parameter in every dimension, idx[dim][param]
// with param = ks, opc, op, g, it computes per dimension d
//   input  position  g*Nipc + opc*s - ps + ks   (Nipc = input extent per group)
//   kernel position  (g*Nop + op)*Nks + ks
//   output position  (g*Nop + op)*Nopc + opc
// and turns the four positions of each tensor into a byte address
//   base + sum_d position_d * stride_d
// using the per-tensor strides the decoder derived from the layout (W
// innermost, then H, C, B). The *_ok flags are low when any index lies past
// its loop argument (left over by rounding an unrolling factor up) or, for
// the input, when the position falls into the padding; such points are
// skipped by the engine. Purely combinational.
module gconv_addr_gen
  import gconv_pkg::*;
(
  input  gconv_cfg_t                    cfg,
  input  logic [3:0][3:0][IDX_W-1:0]    idx,
  output logic [ADDR_W-1:0]             in_addr,
  output logic                          in_ok,
  output logic [ADDR_W-1:0]             k_addr,
  output logic                          k_ok,
  output logic [ADDR_W-1:0]             o_addr,
  output logic                          o_ok
);
  always_comb begin
    logic [31:0] ia, ka, oa;
    ia = 32'(cfg.in_base);
    ka = 32'(cfg.k_base);
    oa = 32'(cfg.o_base);
    in_ok = 1'b1;
    k_ok  = 1'b1;
    o_ok  = 1'b1;
    for (int d = 0; d < 4; d++) begin
      logic [31:0] i_ks, i_opc, i_op, i_g, n_ks, n_opc, n_op;
      logic signed [31:0] ipc;
      i_ks  = 32'(idx[d][P_KS]);
      i_opc = 32'(idx[d][P_OPC]);
      i_op  = 32'(idx[d][P_OP]);
      i_g   = 32'(idx[d][P_G]);
      n_ks  = 32'(cfg.n[d][P_KS]);
      n_opc = 32'(cfg.n[d][P_OPC]);
      n_op  = 32'(cfg.n[d][P_OP]);
      if (i_g >= 32'(cfg.n[d][P_G]) || i_op >= n_op || i_opc >= n_opc) begin
        in_ok = 1'b0;
        k_ok  = 1'b0;
        o_ok  = 1'b0;
      end
      if (i_ks >= n_ks) begin
        in_ok = 1'b0;
        k_ok  = 1'b0;
      end
      ipc = signed'(i_opc * 32'(cfg.s[d]) + i_ks) - signed'(32'(cfg.ps[d]));
      if (ipc < 0 || ipc >= signed'(32'(cfg.nipc[d]))) in_ok = 1'b0;
      ia += (i_g * 32'(cfg.nipc[d]) + 32'(ipc)) * 32'(cfg.in_stride[d]);
      ka += ((i_g * n_op + i_op) * n_ks + i_ks) * 32'(cfg.k_stride[d]);
      oa += ((i_g * n_op + i_op) * n_opc + i_opc) * 32'(cfg.o_stride[d]);
    end
    in_addr = ADDR_W'(ia);
    k_addr  = ADDR_W'(ka);
    o_addr  = ADDR_W'(oa);
  end
endmodule
