// gconv_engine_ctrl: execution state machine of the GCONV engine.
//
// Takes a decoded GCONV from the decoder and runs its loop nest on the PE
// array. The spatial lists (py, px) give each PE its share of the loop
// indices, the LS list is the temporal part that fits in the local
// scratchpads and the GB list the outer temporal part. Four programmable
// loop counters (gconv_loop_counter) hold the state of the four lists; the
// loop index of any point is the sum of their contributions.
//
// For every GB iteration:
//   START  clear all OLS to the reduce identity if this iteration begins a
//          new set of outputs (all GB kernel-size counters at zero),
//   FILL   walk LS x px x py, one loop point per cycle, and have the data
//          loader fetch the input and kernel parameter of that point into
//          the ILS/KLS slot of its PE (slot = LS counters weighted so that
//          loops an operand does not depend on share the slot),
//   CMP    walk LS once; every PE does main+reduce on the same slots,
//   DRAIN  if the outputs are complete (all GB kernel-size counters at
//          their maximum): fold partial results down the reduce rows of the
//          array, one (row step, OLS slot) per cycle,
//          then WB: walk LS x px x py again and, for each output point held
//          by the last row of its reduce group, apply the post operator,
//          saturate to 8 bit and write it to the global buffer,
//   NEXT   advance the GB list; when it wraps the GCONV is finished and
//          the next decoded GCONV is taken.
// The mapping must place the kernel-size entries of py first in the py
// list and keep each LS slot count within the scratchpad depths; the
// published mapping algorithm produces such lists. done pulses for one cycle after
// every GCONV; busy is high while a GCONV is being run.
module gconv_engine_ctrl
  import gconv_pkg::*;
#(
  parameter int unsigned PY    = 12,
  parameter int unsigned PX    = 14,
  parameter int unsigned ILS_D = 12,
  parameter int unsigned KLS_D = 224,
  parameter int unsigned OLS_D = 24
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // decoder hand-over
  input  gconv_cfg_t                  cfg_in,
  input  logic                        cfg_valid,
  output logic                        cfg_take,
  output logic                        busy,
  output logic                        done,
  output gconv_cfg_t                  cfg,
  // data loader request
  output logic                        ld_req,
  output logic [$clog2(PY)-1:0]       ld_y,
  output logic [$clog2(PX)-1:0]       ld_x,
  output logic [$clog2(ILS_D)-1:0]    ld_islot,
  output logic [$clog2(KLS_D)-1:0]    ld_kslot,
  output logic [ADDR_W-1:0]           ld_in_addr,
  output logic [ADDR_W-1:0]           ld_k_addr,
  output logic                        ld_ok,
  // PE array commands
  output logic                        clr,
  output logic                        cmp_en,
  output logic [$clog2(ILS_D)-1:0]    cmp_islot,
  output logic [$clog2(KLS_D)-1:0]    cmp_kslot,
  output logic [$clog2(OLS_D)-1:0]    cmp_oslot,
  output logic                        fwd_en,
  output logic [IDX_W-1:0]            fwd_k,
  output logic [$clog2(OLS_D)-1:0]    rd_slot,
  output logic [$clog2(PY)-1:0]       rd_y,
  output logic [$clog2(PX)-1:0]       rd_x,
  input  logic signed [ACC_W-1:0]     rd_val,
  // post-operator table
  output logic [7:0]                  lut_idx,
  input  logic signed [ACC_W-1:0]     lut_val,
  // write-back
  output logic                        wb_we,
  output logic [ADDR_W-1:0]           wb_addr,
  output logic [DATA_W-1:0]           wb_data
);
  typedef enum logic [3:0] {
    E_IDLE, E_START, E_FILL, E_FILL_END, E_CMP, E_DRAIN, E_WB, E_NEXT
  } estate_e;

  estate_e state;

  // loop counters
  logic gb_clear, gb_step, walk_step, walk_clear, space_step;
  logic [MAX_LV-1:0][N_W-1:0]  gb_cnt, py_cnt, px_cnt, ls_cnt;
  logic [3:0][3:0][IDX_W-1:0]  gb_c, py_c, px_c, ls_c;
  logic [IDX_W-1:0]            gb_lin, py_lin, px_lin, ls_lin;
  logic gb_last, py_last, px_last, ls_last;
  logic gb_ksz, gb_ksm, py_ksz, py_ksm, px_ksz, px_ksm, ls_ksz, ls_ksm;

  gconv_loop_counter u_gb (.clk, .rst_n, .lst(cfg.gb), .clear(gb_clear), .step(gb_step),
    .cnt(gb_cnt), .contrib(gb_c), .lin(gb_lin), .last(gb_last), .ks_zero(gb_ksz), .ks_max(gb_ksm));
  gconv_loop_counter u_py (.clk, .rst_n, .lst(cfg.py), .clear(walk_clear),
    .step(space_step && ls_last && px_last),
    .cnt(py_cnt), .contrib(py_c), .lin(py_lin), .last(py_last), .ks_zero(py_ksz), .ks_max(py_ksm));
  gconv_loop_counter u_px (.clk, .rst_n, .lst(cfg.px), .clear(walk_clear),
    .step(space_step && ls_last),
    .cnt(px_cnt), .contrib(px_c), .lin(px_lin), .last(px_last), .ks_zero(px_ksz), .ks_max(px_ksm));
  gconv_loop_counter u_ls (.clk, .rst_n, .lst(cfg.ls), .clear(walk_clear), .step(walk_step),
    .cnt(ls_cnt), .contrib(ls_c), .lin(ls_lin), .last(ls_last), .ks_zero(ls_ksz), .ks_max(ls_ksm));

  // loop index of the current point and its addresses
  logic [3:0][3:0][IDX_W-1:0] idx;
  logic [ADDR_W-1:0] a_in, a_k, a_o;
  logic ok_in, ok_k, ok_o;
  logic [IDX_W-1:0] islot, kslot, oslot;

  always_comb begin
    for (int d = 0; d < 4; d++)
      for (int p = 0; p < 4; p++)
        idx[d][p] = gb_c[d][p] + py_c[d][p] + px_c[d][p] + ls_c[d][p];
    islot = '0;
    kslot = '0;
    oslot = '0;
    for (int l = 0; l < int'(MAX_LV); l++) begin
      islot += IDX_W'(ls_cnt[l]) * cfg.ls_iw[l];
      kslot += IDX_W'(ls_cnt[l]) * cfg.ls_kw[l];
      oslot += IDX_W'(ls_cnt[l]) * cfg.ls_ow[l];
    end
  end

  gconv_addr_gen u_ag (.cfg, .idx, .in_addr(a_in), .in_ok(ok_in), .k_addr(a_k), .k_ok(ok_k),
                       .o_addr(a_o), .o_ok(ok_o));

  // drain counters
  logic [IDX_W-1:0] dk, ds;

  // post operator and write-back
  logic signed [ACC_W-1:0] post_res;
  gconv_pointwise u_post (.cfg(cfg.post), .x(rd_val), .lut_idx, .lut_val, .y(post_res));

  assign busy       = (state != E_IDLE);
  assign cfg_take   = (state == E_IDLE) && cfg_valid;
  assign gb_clear   = cfg_take;
  assign gb_step    = (state == E_NEXT);
  assign walk_clear = (state == E_START);
  assign walk_step  = (state == E_FILL) || (state == E_CMP) || (state == E_WB);
  assign space_step = (state == E_FILL) || (state == E_WB);   // CMP walks LS only

  assign ld_req     = (state == E_FILL);
  assign ld_y       = $clog2(PY)'(py_lin);
  assign ld_x       = $clog2(PX)'(px_lin);
  assign ld_islot   = $clog2(ILS_D)'(islot);
  assign ld_kslot   = $clog2(KLS_D)'(kslot);
  assign ld_in_addr = a_in;
  assign ld_k_addr  = a_k;
  assign ld_ok      = ok_in && ok_k;

  assign clr        = (state == E_START) && gb_ksz;
  assign cmp_en     = (state == E_CMP);
  assign cmp_islot  = $clog2(ILS_D)'(islot);
  assign cmp_kslot  = $clog2(KLS_D)'(kslot);
  assign cmp_oslot  = $clog2(OLS_D)'(oslot);
  assign fwd_en     = (state == E_DRAIN);
  assign fwd_k      = dk;
  assign rd_slot    = (state == E_DRAIN) ? $clog2(OLS_D)'(ds) : $clog2(OLS_D)'(oslot);
  assign rd_y       = $clog2(PY)'(py_lin);
  assign rd_x       = $clog2(PX)'(px_lin);

  assign wb_we      = (state == E_WB) && py_ksm && ls_ksz && ok_o;
  assign wb_addr    = a_o;
  assign wb_data    = sat8(post_res);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      cfg   <= '0;
      dk    <= '0;
      ds    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        E_IDLE: if (cfg_valid) begin
          cfg   <= cfg_in;
          state <= E_START;
        end
        E_START: state <= E_FILL;
        E_FILL: if (ls_last && px_last && py_last) state <= E_FILL_END;
        E_FILL_END: state <= E_CMP;
        E_CMP: if (ls_last) begin
          if (gb_ksm) begin
            dk    <= IDX_W'(1);
            ds    <= '0;
            state <= (cfg.red_rows > IDX_W'(1)) ? E_DRAIN : E_WB;
          end else begin
            state <= E_NEXT;
          end
        end
        E_DRAIN: begin
          if (ds + IDX_W'(1) >= cfg.n_slots) begin
            ds <= '0;
            dk <= dk + IDX_W'(1);
            if (dk + IDX_W'(1) >= cfg.red_rows) state <= E_WB;
          end else begin
            ds <= ds + IDX_W'(1);
          end
        end
        E_WB: if (ls_last && px_last && py_last) state <= E_NEXT;
        E_NEXT: begin
          if (gb_last) begin
            done  <= 1'b1;
            state <= E_IDLE;
          end else begin
            state <= E_START;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
