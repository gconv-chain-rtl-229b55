// gconv_loop_counter: programmable nested-loop counter for one unrolling list.
//
// Because every GCONV brings its own unrolling list, the loop nest cannot be
// a fixed state machine. Instead each list entry owns a counter, and the
// transition condition of each level is the comparison of its counter with
// its unrolling factor: on `step` level 0 (the innermost) counts up, and a
// level that has reached uf-1 wraps to 0 and lets the next level count.
// Stepping with every level at its maximum wraps the whole nest to zero.
// `clear` resets all counters.
//
// Each level advances the index of one {dimension, parameter} pair. The
// 16-way selection of that pair (the entry's dp field) routes the level's
// contribution counter*w into contrib[dim][param]; w is the index weight the
// decoder computed for the entry, so the parameter indices of all levels add
// up to the loop index. Flags: last (every level at its maximum, also true
// for an empty list), ks_zero / ks_max (every kernel-size level at 0 / at
// its maximum), lin (position in the whole nest, 0..product(uf)-1).
// Registers update on the clock edge after step/clear; outputs are
// combinational from the registers.
module gconv_loop_counter
  import gconv_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  ulist_t                         lst,
  input  logic                           clear,
  input  logic                           step,
  output logic [MAX_LV-1:0][N_W-1:0]     cnt,
  output logic [3:0][3:0][IDX_W-1:0]     contrib,
  output logic [IDX_W-1:0]               lin,
  output logic                           last,
  output logic                           ks_zero,
  output logic                           ks_max
);
  logic [MAX_LV-1:0] at_max;   // level counter == uf-1 (or level unused)
  logic [MAX_LV-1:0] is_ks;

  always_comb begin
    for (int l = 0; l < int'(MAX_LV); l++) begin
      logic used;
      used      = 5'(l) < lst.n;
      at_max[l] = !used || (cnt[l] + N_W'(1) >= lst.uf[l]);
      is_ks[l]  = used && (lst.dp[l][1:0] == P_KS);
    end
    last    = &at_max;
    ks_zero = 1'b1;
    ks_max  = 1'b1;
    for (int l = 0; l < int'(MAX_LV); l++) begin
      if (is_ks[l] && cnt[l] != '0) ks_zero = 1'b0;
      if (is_ks[l] && !at_max[l])   ks_max  = 1'b0;
    end
    contrib = '0;
    for (int l = 0; l < int'(MAX_LV); l++) begin
      if (5'(l) < lst.n)
        contrib[lst.dp[l][3:2]][lst.dp[l][1:0]] += IDX_W'(cnt[l]) * lst.w[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      lin <= '0;
    end else if (clear) begin
      cnt <= '0;
      lin <= '0;
    end else if (step) begin
      logic carry;
      carry = 1'b1;
      for (int l = 0; l < int'(MAX_LV); l++) begin
        if (carry) begin
          if (at_max[l]) cnt[l] <= '0;
          else begin
            cnt[l] <= cnt[l] + N_W'(1);
            carry   = 1'b0;
          end
        end
      end
      lin <= last ? '0 : lin + IDX_W'(1);
    end
  end
endmodule
