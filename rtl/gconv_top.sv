// gconv_top: GCONV-augmented convolution accelerator.
//
// An Eyeriss-style engine (12 x 14 PEs with ILS/KLS/OLS scratchpads and a
// 100 kB + 8 kB global buffer) that executes an entire CNN as a chain of
// general convolutions. The host (compiler side) fills three instruction
// buffers -- basic information, unrolling lists, output addresses -- plus
// the LUT of the pre/post operators and the global buffer, then pulses
// start with the number of GCONVs in the chain.
//
//   decoder      reads the instructions of GCONV k+1 while the engine runs
//                GCONV k, allocates its output in the global buffer,
//   engine ctrl  sequences fill / compute / drain / write-back per
//                outer loop iteration through programmable loop counters,
//   data loader  global buffer -> pre operator -> PE scratchpads,
//   PE array     main + reduce in every PE, vertical reduce links,
//   post         applied in the write-back path.
//
// Host ports are plain signals. The global buffer is accessible to the host
// only while busy is low (read data one cycle after host_glb_re). gconv_done
// pulses after each GCONV, chain_done once the whole chain has finished.
module gconv_top
  import gconv_pkg::*;
#(
  parameter int unsigned PY         = 12,
  parameter int unsigned PX         = 14,
  parameter int unsigned ILS_D      = 12,
  parameter int unsigned KLS_D      = 224,
  parameter int unsigned OLS_D      = 24,
  parameter int unsigned DATA_BYTES = 102400,
  parameter int unsigned KERN_BYTES = 8192,
  parameter int unsigned BI_DEPTH   = 256,
  parameter int unsigned UL_DEPTH   = 1024,
  parameter int unsigned OA_DEPTH   = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction buffers: sel 0 basic information, 1 unrolling list, 2 output address
  input  logic                 host_ib_we,
  input  logic [1:0]           host_ib_sel,
  input  logic [9:0]           host_ib_addr,
  input  logic [63:0]          host_ib_wdata,
  // pre/post lookup table
  input  logic                 host_lut_we,
  input  logic [7:0]           host_lut_addr,
  input  logic [31:0]          host_lut_wdata,
  // global buffer
  input  logic                 host_glb_we,
  input  logic                 host_glb_re,
  input  logic [ADDR_W-1:0]    host_glb_addr,
  input  logic [DATA_W-1:0]    host_glb_wdata,
  output logic [DATA_W-1:0]    host_glb_rdata,
  // control
  input  logic                 start,
  input  logic [7:0]           n_gconv,
  input  logic [ADDR_W-1:0]    alloc_start,
  output logic                 busy,
  output logic                 gconv_done,
  output logic                 chain_done
);
  localparam int unsigned BI_AW = $clog2(BI_DEPTH);
  localparam int unsigned UL_AW = $clog2(UL_DEPTH);
  localparam int unsigned OA_AW = $clog2(OA_DEPTH);

  // ---------------------------------------------------------------- instruction buffers
  logic [BI_AW-1:0]  bi_raddr;
  logic [63:0]       bi_rdata;
  logic [UL_AW-1:0]  ul_raddr;
  logic [31:0]       ul_rdata;
  logic [OA_AW-1:0]  oa_raddr, dec_oa_waddr;
  logic [ADDR_W-1:0] oa_rdata, dec_oa_wdata;
  logic              dec_oa_we;
  logic              host_oa_we;

  assign host_oa_we = host_ib_we && host_ib_sel == 2'd2;

  gconv_instr_mem #(.WIDTH(64), .DEPTH(BI_DEPTH)) u_bi (
    .clk, .rst_n, .we(host_ib_we && host_ib_sel == 2'd0), .waddr(host_ib_addr[BI_AW-1:0]),
    .wdata(host_ib_wdata), .raddr(bi_raddr), .rdata(bi_rdata));
  gconv_instr_mem #(.WIDTH(32), .DEPTH(UL_DEPTH)) u_ul (
    .clk, .rst_n, .we(host_ib_we && host_ib_sel == 2'd1), .waddr(host_ib_addr[UL_AW-1:0]),
    .wdata(host_ib_wdata[31:0]), .raddr(ul_raddr), .rdata(ul_rdata));
  gconv_instr_mem #(.WIDTH(ADDR_W), .DEPTH(OA_DEPTH)) u_oa (
    .clk, .rst_n, .we(host_oa_we || dec_oa_we),
    .waddr(host_oa_we ? host_ib_addr[OA_AW-1:0] : dec_oa_waddr),
    .wdata(host_oa_we ? host_ib_wdata[ADDR_W-1:0] : dec_oa_wdata),
    .raddr(oa_raddr), .rdata(oa_rdata));

  // ---------------------------------------------------------------- decoder
  gconv_cfg_t dec_cfg, run_cfg;
  logic       cfg_valid, cfg_take, dec_busy, eng_busy;

  gconv_decoder #(.BI_DEPTH(BI_DEPTH), .UL_DEPTH(UL_DEPTH), .OA_DEPTH(OA_DEPTH),
                  .DATA_BYTES(DATA_BYTES)) u_dec (
    .clk, .rst_n, .start, .n_gconv, .alloc_start, .busy(dec_busy),
    .bi_raddr, .bi_rdata, .ul_raddr, .ul_rdata,
    .oa_raddr, .oa_rdata, .oa_we(dec_oa_we), .oa_waddr(dec_oa_waddr), .oa_wdata(dec_oa_wdata),
    .cfg(dec_cfg), .cfg_valid, .cfg_take);

  // ---------------------------------------------------------------- engine control
  logic                     ld_req, ld_ok;
  logic [$clog2(PY)-1:0]    ld_y, wr_y, rd_y;
  logic [$clog2(PX)-1:0]    ld_x, wr_x, rd_x;
  logic [$clog2(ILS_D)-1:0] ld_islot, wr_i_slot, cmp_islot;
  logic [$clog2(KLS_D)-1:0] ld_kslot, wr_k_slot, cmp_kslot;
  logic [$clog2(OLS_D)-1:0] cmp_oslot, rd_slot;
  logic [ADDR_W-1:0]        ld_in_addr, ld_k_addr, wb_addr;
  logic                     clr, cmp_en, fwd_en, wb_we;
  logic [IDX_W-1:0]         fwd_k;
  logic signed [ACC_W-1:0]  rd_val;
  logic [DATA_W-1:0]        wb_data;
  logic [1:0][7:0]          lut_raddr;
  logic signed [1:0][ACC_W-1:0] lut_rdata;

  gconv_engine_ctrl #(.PY(PY), .PX(PX), .ILS_D(ILS_D), .KLS_D(KLS_D), .OLS_D(OLS_D)) u_ctrl (
    .clk, .rst_n, .cfg_in(dec_cfg), .cfg_valid, .cfg_take, .busy(eng_busy), .done(gconv_done),
    .cfg(run_cfg),
    .ld_req, .ld_y, .ld_x, .ld_islot, .ld_kslot, .ld_in_addr, .ld_k_addr, .ld_ok,
    .clr, .cmp_en, .cmp_islot, .cmp_kslot, .cmp_oslot, .fwd_en, .fwd_k, .rd_slot,
    .rd_y, .rd_x, .rd_val, .lut_idx(lut_raddr[1]), .lut_val(lut_rdata[1]),
    .wb_we, .wb_addr, .wb_data);

  // ---------------------------------------------------------------- global buffer + loader
  logic              re_a, re_b, ld_re_a, ld_re_b;
  logic [ADDR_W-1:0] addr_a, addr_b, ld_addr_a, ld_addr_b;
  logic [DATA_W-1:0] rdata_a, rdata_b;
  logic              wr_i_en, wr_i_ok, wr_k_en;
  logic signed [PRE_W-1:0]  wr_i_val;
  logic signed [DATA_W-1:0] wr_k_val;

  assign busy   = dec_busy || eng_busy || cfg_valid;
  assign re_a   = busy ? ld_re_a : host_glb_re;
  assign addr_a = busy ? ld_addr_a : host_glb_addr;
  assign re_b   = ld_re_b;
  assign addr_b = ld_addr_b;
  assign host_glb_rdata = rdata_a;

  gconv_glb #(.DATA_BYTES(DATA_BYTES), .KERN_BYTES(KERN_BYTES)) u_glb (
    .clk, .re_a, .addr_a, .rdata_a, .re_b, .addr_b, .rdata_b,
    .we(busy ? wb_we : host_glb_we),
    .waddr(busy ? wb_addr : host_glb_addr),
    .wdata(busy ? wb_data : host_glb_wdata));

  gconv_data_loader #(.PY(PY), .PX(PX), .ILS_D(ILS_D), .KLS_D(KLS_D)) u_ld (
    .clk, .rst_n, .pre(run_cfg.pre),
    .req(ld_req), .req_y(ld_y), .req_x(ld_x), .req_islot(ld_islot), .req_kslot(ld_kslot),
    .req_in_addr(ld_in_addr), .req_k_addr(ld_k_addr), .req_ok(ld_ok),
    .re_a(ld_re_a), .addr_a(ld_addr_a), .rdata_a, .re_b(ld_re_b), .addr_b(ld_addr_b), .rdata_b,
    .lut_idx(lut_raddr[0]), .lut_val(lut_rdata[0]),
    .wr_y, .wr_x, .wr_i_en, .wr_i_slot, .wr_i_val, .wr_i_ok, .wr_k_en, .wr_k_slot, .wr_k_val);

  gconv_lut #(.DEPTH(256), .RD_PORTS(2)) u_lut (
    .clk, .rst_n, .we(host_lut_we), .waddr(host_lut_addr), .wdata(host_lut_wdata),
    .raddr(lut_raddr), .rdata(lut_rdata));

  // ---------------------------------------------------------------- PE array
  gconv_pe_array #(.PY(PY), .PX(PX), .ILS_D(ILS_D), .KLS_D(KLS_D), .OLS_D(OLS_D)) u_arr (
    .clk, .rst_n, .main_op(run_cfg.main_op), .red_op(run_cfg.red_op),
    .red_rows(run_cfg.red_rows),
    .wr_y, .wr_x, .wr_i_en, .wr_i_slot, .wr_i_val, .wr_i_ok, .wr_k_en, .wr_k_slot, .wr_k_val,
    .clr, .cmp_en, .cmp_islot, .cmp_kslot, .cmp_oslot, .fwd_en, .fwd_k, .rd_slot,
    .rd_y, .rd_x, .rd_val);

  // ---------------------------------------------------------------- chain completion
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign chain_done = busy_q && !busy;
endmodule
