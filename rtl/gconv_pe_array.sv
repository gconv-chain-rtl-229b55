// gconv_pe_array: the PY x PX processing-element array of the engine.
//
// Default size 12 x 14 PEs, the configuration the document maps GCONVs on.
// Inputs and kernel parameters reach the PEs over a data bus that writes one
// addressed PE (wr_y, wr_x) per cycle. Compute, clear and read-slot commands
// are broadcast to all PEs, so every PE performs one main/reduce step per
// cycle in parallel.
//
// Partial results can only be reduced vertically: each PE's psum_in is the
// OLS read port of the PE directly above it. Rows are grouped in runs of
// red_rows consecutive rows (the kernel-size unrolling placed innermost in
// the vertical dimension); with fwd_en asserted, the rows whose position
// inside their group equals fwd_k fold the partial result of the row above
// into OLS[rd_slot]. Stepping fwd_k from 1 to red_rows-1 leaves the reduced
// result in the last row of each group. rd_val returns OLS[rd_slot] of PE
// (rd_y, rd_x) for write-back.
module gconv_pe_array
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
  input  main_op_e                    main_op,
  input  red_op_e                     red_op,
  input  logic [IDX_W-1:0]            red_rows,
  // data bus
  input  logic [$clog2(PY)-1:0]       wr_y,
  input  logic [$clog2(PX)-1:0]       wr_x,
  input  logic                        wr_i_en,
  input  logic [$clog2(ILS_D)-1:0]    wr_i_slot,
  input  logic signed [PRE_W-1:0]     wr_i_val,
  input  logic                        wr_i_ok,
  input  logic                        wr_k_en,
  input  logic [$clog2(KLS_D)-1:0]    wr_k_slot,
  input  logic signed [DATA_W-1:0]    wr_k_val,
  // broadcast commands
  input  logic                        clr,
  input  logic                        cmp_en,
  input  logic [$clog2(ILS_D)-1:0]    cmp_islot,
  input  logic [$clog2(KLS_D)-1:0]    cmp_kslot,
  input  logic [$clog2(OLS_D)-1:0]    cmp_oslot,
  input  logic                        fwd_en,
  input  logic [IDX_W-1:0]            fwd_k,
  input  logic [$clog2(OLS_D)-1:0]    rd_slot,
  // read-out
  input  logic [$clog2(PY)-1:0]       rd_y,
  input  logic [$clog2(PX)-1:0]       rd_x,
  output logic signed [ACC_W-1:0]     rd_val
);
  logic signed [ACC_W-1:0] ols_rd [PY][PX];
  logic [PY-1:0]           row_fwd;

  always_comb begin
    for (int y = 0; y < int'(PY); y++) begin
      logic [IDX_W-1:0] pos;
      pos = (red_rows == '0) ? '0 : IDX_W'(y) % red_rows;
      row_fwd[y] = fwd_en && (y != 0) && (pos == fwd_k) && (pos != '0);
    end
  end

  for (genvar y = 0; y < int'(PY); y++) begin : g_row
    for (genvar x = 0; x < int'(PX); x++) begin : g_col
      logic signed [ACC_W-1:0] psum_in;
      if (y == 0) begin : g_top
        assign psum_in = '0;
      end else begin : g_link
        assign psum_in = ols_rd[y-1][x];
      end
      gconv_pe #(.ILS_D(ILS_D), .KLS_D(KLS_D), .OLS_D(OLS_D)) u_pe (
        .clk, .rst_n, .main_op, .red_op,
        .wr_i_en  (wr_i_en && wr_y == y && wr_x == x),
        .wr_i_slot, .wr_i_val, .wr_i_ok,
        .wr_k_en  (wr_k_en && wr_y == y && wr_x == x),
        .wr_k_slot, .wr_k_val,
        .clr, .cmp_en, .cmp_islot, .cmp_kslot, .cmp_oslot,
        .fwd_en   (row_fwd[y]),
        .psum_in,
        .rd_slot,
        .ols_rd   (ols_rd[y][x])
      );
    end
  end

  assign rd_val = ols_rd[rd_y][rd_x];
endmodule
