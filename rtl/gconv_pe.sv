// gconv_pe: one processing element of the GCONV convolution engine.
//
// Holds three local scratchpads as in the row-stationary engine the design
// builds on: ILS (pre-processed inputs, each with a valid flag that is
// cleared for padding or out-of-range positions), KLS (kernel parameters)
// and OLS (32-bit partial results). The conventional multiply and add are
// replaced by the GCONV main and reduce units.
//
// Operations, all single-cycle and driven by the engine controller:
//   wr_i / wr_k : write one ILS / KLS slot from the data bus.
//   clr         : set every OLS slot to the identity of the reduce operator.
//   cmp_en      : OLS[cmp_oslot] = reduce(OLS[cmp_oslot],
//                                         main(ILS[cmp_islot], KLS[cmp_kslot]))
//                 skipped when the ILS slot is marked invalid.
//   fwd_en      : OLS[rd_slot] = reduce(OLS[rd_slot], psum_in), psum_in being
//                 the partial result of the PE above (vertical reduce link).
// ols_rd always shows OLS[rd_slot]; it feeds the PE below and the write-back.
// Scratchpad depths default to the document's Eyeriss numbers (12/224/24).
module gconv_pe
  import gconv_pkg::*;
#(
  parameter int unsigned ILS_D = 12,
  parameter int unsigned KLS_D = 224,
  parameter int unsigned OLS_D = 24
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  main_op_e                    main_op,
  input  red_op_e                     red_op,
  // data bus writes
  input  logic                        wr_i_en,
  input  logic [$clog2(ILS_D)-1:0]    wr_i_slot,
  input  logic signed [PRE_W-1:0]     wr_i_val,
  input  logic                        wr_i_ok,
  input  logic                        wr_k_en,
  input  logic [$clog2(KLS_D)-1:0]    wr_k_slot,
  input  logic signed [DATA_W-1:0]    wr_k_val,
  // compute
  input  logic                        clr,
  input  logic                        cmp_en,
  input  logic [$clog2(ILS_D)-1:0]    cmp_islot,
  input  logic [$clog2(KLS_D)-1:0]    cmp_kslot,
  input  logic [$clog2(OLS_D)-1:0]    cmp_oslot,
  // vertical reduction and read-out
  input  logic                        fwd_en,
  input  logic signed [ACC_W-1:0]     psum_in,
  input  logic [$clog2(OLS_D)-1:0]    rd_slot,
  output logic signed [ACC_W-1:0]     ols_rd
);
  logic signed [PRE_W-1:0]  ils   [ILS_D];
  logic                     ils_v [ILS_D];
  logic signed [DATA_W-1:0] kls   [KLS_D];
  logic signed [ACC_W-1:0]  ols   [OLS_D];

  logic signed [MAIN_W-1:0] main_res;
  logic signed [ACC_W-1:0]  cmp_red, fwd_red;

  gconv_main_unit u_main (
    .op(main_op), .in_val(ils[cmp_islot]), .k_val(kls[cmp_kslot]), .res(main_res)
  );
  gconv_reduce_unit u_red_cmp (
    .op(red_op), .acc(ols[cmp_oslot]), .val(ACC_W'(main_res)), .res(cmp_red)
  );
  gconv_reduce_unit u_red_fwd (
    .op(red_op), .acc(ols[rd_slot]), .val(psum_in), .res(fwd_red)
  );

  assign ols_rd = ols[rd_slot];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ILS_D); i++) begin
        ils[i]   <= '0;
        ils_v[i] <= 1'b0;
      end
    end else if (wr_i_en) begin
      ils[wr_i_slot]   <= wr_i_val;
      ils_v[wr_i_slot] <= wr_i_ok;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(KLS_D); i++) kls[i] <= '0;
    end else if (wr_k_en) begin
      kls[wr_k_slot] <= wr_k_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(OLS_D); i++) ols[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < int'(OLS_D); i++) ols[i] <= red_identity(red_op);
    end else if (cmp_en) begin
      if (ils_v[cmp_islot]) ols[cmp_oslot] <= cmp_red;
    end else if (fwd_en) begin
      ols[rd_slot] <= fwd_red;
    end
  end
endmodule
