// gconv_pkg: types and constants shared by the GCONV engine.
//
// A GCONV (general convolution) is a 1-D convolution described by four loop
// parameters -- groups (g), kernels per group (op), outputs per kernel (opc)
// and kernel size (ks) -- repeated in each of the four data dimensions B, C,
// H and W, plus a stride and a padding per dimension and four operators:
// pre (applied to each input on load), main (input x kernel parameter),
// reduce (combining partial results of one output) and post (applied to each
// output on write-back). Every layer of a CNN is executed as a chain of such
// GCONVs on one convolution engine.
//
// Widths follow the document: 8-bit data, 16-bit main results and 32-bit
// reduce/post results. The instruction formats (field order and widths of the
// basic-information and unrolling-list entries), the opcode encodings and the
// 16-bit pre-operator result are this design's own choices.
package gconv_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned DATA_W  = 8;   // stored activations / parameters
  localparam int unsigned PRE_W   = 16;  // pre-operator result held in the ILS
  localparam int unsigned MAIN_W  = 16;  // main-operator result
  localparam int unsigned ACC_W   = 32;  // reduce / post result
  localparam int unsigned IDX_W   = 16;  // loop index / weight width
  localparam int unsigned N_W     = 12;  // loop argument and unrolling factor width
  localparam int unsigned ADDR_W  = 17;  // global-buffer byte address
  localparam int unsigned ID_W    = 6;   // tensor (producer) identifier
  localparam int unsigned MAX_LV  = 16;  // entries per unrolling list (4 dims x 4 params)

  // ---------------------------------------------------------------- loop naming
  typedef enum logic [1:0] {DIM_B = 2'd0, DIM_C = 2'd1, DIM_H = 2'd2, DIM_W = 2'd3} dim_e;
  typedef enum logic [1:0] {P_KS = 2'd0, P_OPC = 2'd1, P_OP = 2'd2, P_G = 2'd3} par_e;

  // Unrolling dimension of an unrolling-list entry. UD_NONE marks the
  // all-zero delimiter. UD_LS is the temporal part kept inside the local
  // scratchpads, UD_GB the outer temporal part served from the global buffer.
  typedef enum logic [2:0] {
    UD_NONE = 3'd0, UD_PY = 3'd1, UD_PX = 3'd2, UD_LS = 3'd3, UD_GB = 3'd4
  } ud_e;

  // ---------------------------------------------------------------- operators
  typedef enum logic [2:0] {
    MAIN_PASS = 3'd0,  // no main operator: forward the input
    MAIN_MUL  = 3'd1,
    MAIN_ADD  = 3'd2,
    MAIN_SUB  = 3'd3,  // input - parameter
    MAIN_AND  = 3'd4,
    MAIN_SQR  = 3'd5,  // input squared
    MAIN_MAX  = 3'd6,
    MAIN_MIN  = 3'd7
  } main_op_e;

  typedef enum logic [1:0] {
    RED_NONE = 2'd0,   // no reduce operator: the latest partial result is kept
    RED_ADD  = 2'd1,
    RED_MAX  = 2'd2,
    RED_MIN  = 2'd3
  } red_op_e;

  typedef enum logic [2:0] {
    PW_NONE = 3'd0,
    PW_MUL  = 3'd1,    // (x * imm) >>> shift : fixed-point scaling, e.g. x 1/Nbs
    PW_ADD  = 3'd2,    // x + imm
    PW_AND  = 3'd3,    // x & imm
    PW_SQR  = 3'd4,    // x * x
    PW_LUT  = 3'd5,    // table lookup, index = x clamped to 0..255
    PW_SHR  = 3'd6     // x >>> shift
  } pw_op_e;

  typedef struct packed {
    pw_op_e             op;
    logic signed [15:0] imm;
    logic [4:0]         shift;
  } pw_cfg_t;

  // ---------------------------------------------------------------- instructions
  // Basic-information buffer entry (64 bit). The first field tells the entry
  // type; an all-zero entry closes the basic information of one GCONV.
  typedef enum logic [2:0] {
    BI_END = 3'd0, BI_STRIDE = 3'd1, BI_PRE = 3'd2, BI_MAIN = 3'd3,
    BI_REDUCE = 3'd4, BI_POST = 3'd5, BI_PROD = 3'd6
  } bi_kind_e;

  typedef struct packed {
    bi_kind_e     kind;     // [63:61]
    logic [60:0]  payload;
  } bi_entry_t;

  // payload layouts (low bits of the 61-bit payload)
  typedef struct packed {   // BI_STRIDE: stride and padding per dimension B,C,H,W
    logic [3:0] s_b, s_c, s_h, s_w;
    logic [3:0] ps_b, ps_c, ps_h, ps_w;
  } bi_stride_t;            // 32 bit

  typedef struct packed {   // BI_PRE / BI_MAIN / BI_REDUCE / BI_POST
    logic [2:0]         opcode;
    logic signed [15:0] imm;
    logic [4:0]         shift;
  } bi_op_t;                // 24 bit

  typedef struct packed {   // BI_PROD: tensor IDs of input, kernel parameters, output
    logic [ID_W-1:0] in_id;
    logic [ID_W-1:0] k_id;
    logic [ID_W-1:0] out_id;
  } bi_prod_t;              // 18 bit

  // Unrolling-list buffer entry (32 bit): [unrolling dimension, parameter,
  // data dimension, unrolling factor, argument of the parameter].
  typedef struct packed {
    ud_e            ud;
    par_e           p;
    dim_e           d;
    logic [N_W-1:0] uf;
    logic [N_W-1:0] arg;
    logic           rsvd;
  } ul_entry_t;

  // ---------------------------------------------------------------- decoded list
  typedef struct packed {
    logic [4:0]                        n;     // number of entries
    logic [MAX_LV-1:0][N_W-1:0]        uf;
    logic [MAX_LV-1:0][3:0]            dp;    // {dim, param} the entry advances
    logic [MAX_LV-1:0][IDX_W-1:0]      w;     // index weight of one counter step
  } ulist_t;

  // ---------------------------------------------------------------- decoded GCONV
  typedef struct packed {
    logic [3:0][3:0]              s;      // stride per dim (index = dim_e)
    logic [3:0][3:0]              ps;     // padding per dim
    logic [3:0][3:0][N_W-1:0]     n;      // loop argument per [dim][param]
    logic [3:0][IDX_W-1:0]        nipc;   // input extent of one group per dim
    logic [3:0][ADDR_W-1:0]       in_stride;
    logic [3:0][ADDR_W-1:0]       k_stride;
    logic [3:0][ADDR_W-1:0]       o_stride;
    logic [ADDR_W-1:0]            in_base;
    logic [ADDR_W-1:0]            k_base;
    logic [ADDR_W-1:0]            o_base;
    pw_cfg_t                      pre;
    main_op_e                     main_op;
    red_op_e                      red_op;
    pw_cfg_t                      post;
    ulist_t                       py;
    ulist_t                       px;
    ulist_t                       ls;
    ulist_t                       gb;
    logic [MAX_LV-1:0][IDX_W-1:0] ls_iw;  // ILS slot weight of each LS entry (0 for op)
    logic [MAX_LV-1:0][IDX_W-1:0] ls_kw;  // KLS slot weight of each LS entry (0 for opc)
    logic [MAX_LV-1:0][IDX_W-1:0] ls_ow;  // OLS slot weight of each LS entry (0 for ks)
    logic [IDX_W-1:0]             red_rows; // rows reduced together (product of py ks factors)
    logic [IDX_W-1:0]             n_slots;  // OLS slots used (product of non-ks LS factors)
    logic [ADDR_W-1:0]            o_size;   // output tensor size in bytes
  } gconv_cfg_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic signed [ACC_W-1:0] red_identity(red_op_e op);
    case (op)
      RED_MAX: return {1'b1, {(ACC_W-1){1'b0}}};
      RED_MIN: return {1'b0, {(ACC_W-1){1'b1}}};
      default: return '0;
    endcase
  endfunction

  function automatic logic signed [DATA_W-1:0] sat8(logic signed [ACC_W-1:0] x);
    if (x > 32'sd127)       return 8'sd127;
    else if (x < -32'sd128) return -8'sd128;
    else                    return x[DATA_W-1:0];
  endfunction

endpackage
