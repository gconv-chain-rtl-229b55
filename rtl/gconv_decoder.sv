// gconv_decoder: set-up state machine of the GCONV front end.
//
// For each GCONV of the chain it reads one entry per cycle from the
// basic-information buffer until the all-zero delimiter (stride/padding,
// pre/main/reduce/post operators, producer IDs), then one entry per cycle
// from the unrolling-list buffer until four delimiters have closed the
// py, px, LS and GB lists. While decoding the lists it records the argument
// of every parameter, the length of each list, and for every entry the
// index weight (product of the factors of earlier entries that unroll the
// same parameter), the ILS/KLS/OLS slot weights of LS entries, and the
// number of rows that reduce together. It then derives the per-dimension
// input extent Nipc = (Nopc-1)*s + Nks - 2*ps and the tensor strides,
// looks up the input and kernel-parameter base addresses by producer ID in
// the output-address buffer, and allocates the output behind the previous
// one (wrapping to alloc_start when the data region would overflow),
// recording it under the GCONV's output ID.
//
// The decoded configuration is offered with cfg_valid and handed over with
// cfg_take, so the next GCONV is decoded while the engine still runs the
// previous one. start (pulse) begins a chain of n_gconv GCONVs at entry 0
// of both buffers; busy stays high until the last one has been taken.
module gconv_decoder
  import gconv_pkg::*;
#(
  parameter int unsigned BI_DEPTH   = 256,
  parameter int unsigned UL_DEPTH   = 1024,
  parameter int unsigned OA_DEPTH   = 64,
  parameter int unsigned DATA_BYTES = 102400
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [7:0]                    n_gconv,
  input  logic [ADDR_W-1:0]             alloc_start,
  output logic                          busy,
  // basic-information buffer
  output logic [$clog2(BI_DEPTH)-1:0]   bi_raddr,
  input  logic [63:0]                   bi_rdata,
  // unrolling-list buffer
  output logic [$clog2(UL_DEPTH)-1:0]   ul_raddr,
  input  logic [31:0]                   ul_rdata,
  // output-address buffer
  output logic [$clog2(OA_DEPTH)-1:0]   oa_raddr,
  input  logic [ADDR_W-1:0]             oa_rdata,
  output logic                          oa_we,
  output logic [$clog2(OA_DEPTH)-1:0]   oa_waddr,
  output logic [ADDR_W-1:0]             oa_wdata,
  // configuration hand-over
  output gconv_cfg_t                    cfg,
  output logic                          cfg_valid,
  input  logic                          cfg_take
);
  typedef enum logic [2:0] {
    S_IDLE, S_BI, S_UL, S_GEO, S_IN, S_K, S_ALLOC, S_HOLD
  } state_e;

  state_e                     state;
  logic [7:0]                 left;
  logic [ADDR_W-1:0]          alloc;
  logic [1:0]                 delims;
  logic [ID_W-1:0]            in_id, k_id, out_id;
  logic [3:0][3:0][IDX_W-1:0] prod;
  logic [IDX_W-1:0]           iprod, kprod, oprod;

  bi_entry_t bi;
  ul_entry_t ul;
  assign bi = bi_entry_t'(bi_rdata);
  assign ul = ul_entry_t'(ul_rdata);

  assign busy      = (state != S_IDLE);
  assign cfg_valid = (state == S_HOLD);
  assign oa_raddr  = (state == S_IN) ? in_id : k_id;
  assign oa_we     = (state == S_ALLOC);
  assign oa_waddr  = out_id;

  // output placement
  logic [ADDR_W-1:0] o_place;
  assign o_place  = (32'(alloc) + 32'(cfg.o_size) > DATA_BYTES) ? alloc_start : alloc;
  assign oa_wdata = o_place;

  // geometry of the decoded GCONV
  logic [3:0][IDX_W-1:0]  g_nipc;
  logic [3:0][ADDR_W-1:0] g_is, g_ks, g_os;
  logic [ADDR_W-1:0]      g_osize;
  always_comb begin
    logic [3:0][31:0] ie, ke, oe;
    for (int d = 0; d < 4; d++) begin
      logic [31:0] nipc;
      nipc = (32'(cfg.n[d][P_OPC]) - 1) * 32'(cfg.s[d]) + 32'(cfg.n[d][P_KS])
             - 2 * 32'(cfg.ps[d]);
      g_nipc[d] = IDX_W'(nipc);
      ie[d] = 32'(cfg.n[d][P_G]) * nipc;
      ke[d] = 32'(cfg.n[d][P_G]) * 32'(cfg.n[d][P_OP]) * 32'(cfg.n[d][P_KS]);
      oe[d] = 32'(cfg.n[d][P_G]) * 32'(cfg.n[d][P_OP]) * 32'(cfg.n[d][P_OPC]);
    end
    g_is[DIM_W] = 1;
    g_ks[DIM_W] = 1;
    g_os[DIM_W] = 1;
    g_is[DIM_H] = ADDR_W'(ie[DIM_W]);
    g_ks[DIM_H] = ADDR_W'(ke[DIM_W]);
    g_os[DIM_H] = ADDR_W'(oe[DIM_W]);
    g_is[DIM_C] = ADDR_W'(ie[DIM_W] * ie[DIM_H]);
    g_ks[DIM_C] = ADDR_W'(ke[DIM_W] * ke[DIM_H]);
    g_os[DIM_C] = ADDR_W'(oe[DIM_W] * oe[DIM_H]);
    g_is[DIM_B] = ADDR_W'(ie[DIM_W] * ie[DIM_H] * ie[DIM_C]);
    g_ks[DIM_B] = ADDR_W'(ke[DIM_W] * ke[DIM_H] * ke[DIM_C]);
    g_os[DIM_B] = ADDR_W'(oe[DIM_W] * oe[DIM_H] * oe[DIM_C]);
    g_osize     = ADDR_W'(oe[DIM_W] * oe[DIM_H] * oe[DIM_C] * oe[DIM_B]);
  end

  // clears the per-GCONV fields to the GCONV defaults (s 1, ps 0, args 1)
  task automatic init_gconv();
    cfg.s       <= {4{4'd1}};
    cfg.ps      <= '0;
    cfg.n       <= {16{N_W'(1)}};
    cfg.pre     <= '{op: PW_NONE, imm: '0, shift: '0};
    cfg.post    <= '{op: PW_NONE, imm: '0, shift: '0};
    cfg.main_op <= MAIN_PASS;
    cfg.red_op  <= RED_NONE;
    cfg.py      <= '0;
    cfg.px      <= '0;
    cfg.ls      <= '0;
    cfg.gb      <= '0;
    cfg.ls_iw   <= '0;
    cfg.ls_kw   <= '0;
    cfg.ls_ow   <= '0;
    cfg.red_rows <= IDX_W'(1);
    in_id       <= '0;
    k_id        <= '0;
    out_id      <= '0;
    prod        <= {16{IDX_W'(1)}};
    iprod       <= IDX_W'(1);
    kprod       <= IDX_W'(1);
    oprod       <= IDX_W'(1);
    delims      <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      left     <= '0;
      alloc    <= '0;
      bi_raddr <= '0;
      ul_raddr <= '0;
      cfg      <= '0;
      in_id    <= '0;
      k_id     <= '0;
      out_id   <= '0;
      prod     <= '0;
      iprod    <= '0;
      kprod    <= '0;
      oprod    <= '0;
      delims   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && n_gconv != 0) begin
          left     <= n_gconv;
          alloc    <= alloc_start;
          bi_raddr <= '0;
          ul_raddr <= '0;
          init_gconv();
          state    <= S_BI;
        end
        S_BI: begin
          bi_raddr <= bi_raddr + 1'b1;
          case (bi.kind)
            BI_END: state <= S_UL;
            BI_STRIDE: begin
              bi_stride_t st;
              st = bi_stride_t'(bi.payload[31:0]);
              cfg.s  <= {st.s_w, st.s_h, st.s_c, st.s_b};
              cfg.ps <= {st.ps_w, st.ps_h, st.ps_c, st.ps_b};
            end
            BI_PRE, BI_POST: begin
              bi_op_t o;
              o = bi_op_t'(bi.payload[23:0]);
              if (bi.kind == BI_PRE) cfg.pre  <= '{op: pw_op_e'(o.opcode), imm: o.imm, shift: o.shift};
              else                   cfg.post <= '{op: pw_op_e'(o.opcode), imm: o.imm, shift: o.shift};
            end
            BI_MAIN:   cfg.main_op <= main_op_e'(bi.payload[23:21]);
            BI_REDUCE: cfg.red_op  <= red_op_e'(bi.payload[22:21]);
            BI_PROD: begin
              bi_prod_t pr;
              pr = bi_prod_t'(bi.payload[17:0]);
              in_id  <= pr.in_id;
              k_id   <= pr.k_id;
              out_id <= pr.out_id;
            end
            default: ;
          endcase
        end
        S_UL: begin
          ul_raddr <= ul_raddr + 1'b1;
          if (ul.ud == UD_NONE) begin
            delims <= delims + 1'b1;
            if (delims == 2'd3) begin
              cfg.n_slots <= oprod;
              state       <= S_GEO;
            end
          end else begin
            logic [3:0]       dp;
            logic [IDX_W-1:0] w;
            dp = {ul.d, ul.p};
            w  = prod[ul.d][ul.p];
            prod[ul.d][ul.p] <= w * IDX_W'(ul.uf);
            cfg.n[ul.d][ul.p] <= ul.arg;
            case (ul.ud)
              UD_PY: begin
                cfg.py.uf[cfg.py.n] <= ul.uf;
                cfg.py.dp[cfg.py.n] <= dp;
                cfg.py.w[cfg.py.n]  <= w;
                cfg.py.n            <= cfg.py.n + 1'b1;
                if (ul.p == P_KS) cfg.red_rows <= cfg.red_rows * IDX_W'(ul.uf);
              end
              UD_PX: begin
                cfg.px.uf[cfg.px.n] <= ul.uf;
                cfg.px.dp[cfg.px.n] <= dp;
                cfg.px.w[cfg.px.n]  <= w;
                cfg.px.n            <= cfg.px.n + 1'b1;
              end
              UD_LS: begin
                cfg.ls.uf[cfg.ls.n] <= ul.uf;
                cfg.ls.dp[cfg.ls.n] <= dp;
                cfg.ls.w[cfg.ls.n]  <= w;
                cfg.ls.n            <= cfg.ls.n + 1'b1;
                cfg.ls_iw[cfg.ls.n] <= (ul.p == P_OP)  ? '0 : iprod;
                cfg.ls_kw[cfg.ls.n] <= (ul.p == P_OPC) ? '0 : kprod;
                cfg.ls_ow[cfg.ls.n] <= (ul.p == P_KS)  ? '0 : oprod;
                if (ul.p != P_OP)  iprod <= iprod * IDX_W'(ul.uf);
                if (ul.p != P_OPC) kprod <= kprod * IDX_W'(ul.uf);
                if (ul.p != P_KS)  oprod <= oprod * IDX_W'(ul.uf);
              end
              default: begin
                cfg.gb.uf[cfg.gb.n] <= ul.uf;
                cfg.gb.dp[cfg.gb.n] <= dp;
                cfg.gb.w[cfg.gb.n]  <= w;
                cfg.gb.n            <= cfg.gb.n + 1'b1;
              end
            endcase
          end
        end
        S_GEO: begin
          cfg.nipc      <= g_nipc;
          cfg.in_stride <= g_is;
          cfg.k_stride  <= g_ks;
          cfg.o_stride  <= g_os;
          cfg.o_size    <= g_osize;
          state         <= S_IN;
        end
        S_IN: begin
          cfg.in_base <= oa_rdata;
          state       <= S_K;
        end
        S_K: begin
          cfg.k_base <= oa_rdata;
          state      <= S_ALLOC;
        end
        S_ALLOC: begin
          cfg.o_base <= o_place;
          alloc      <= o_place + cfg.o_size[ADDR_W-1:0];
          state      <= S_HOLD;
        end
        S_HOLD: if (cfg_take) begin
          left <= left - 1'b1;
          if (left == 8'd1) state <= S_IDLE;
          else begin
            init_gconv();
            state <= S_BI;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
