// imt_pkg: types and constants shared by the in-memory transformer accelerator.
//
// Activations and weights are signed 8-bit integers (8-bit quantization of both
// weights and activations). Crossbar tiles are 64x64. The programming bus that
// loads trained weights into the crossbars, the attention configuration and the
// locality pattern encoding are defined here. Widths of the programming bus
// address fields are this design's choice and cover the largest default sizes.
package imt_pkg;

  localparam int XB      = 64;   // rows and columns of one crossbar tile
  localparam int W_BITS  = 8;    // weight and activation precision
  localparam int ACC_W   = 32;   // accumulator width of a crossbar column

  typedef logic signed [W_BITS-1:0] act_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Locality-based attention patterns preloaded into the attention selector.
  typedef enum logic [2:0] {
    PAT_FULL           = 3'd0,
    PAT_STRIDED        = 3'd1,
    PAT_SLIDING        = 3'd2,
    PAT_DILATED        = 3'd3,
    PAT_GLOBAL_SLIDING = 3'd4
  } pattern_e;

  // Run-time attention configuration of one MHA tile.
  typedef struct packed {
    pattern_e    pattern;    // locality pattern
    logic [7:0]  stride;     // stride c of strided patterns (factor of the register length)
    logic [7:0]  window;     // half width w of sliding windows (|offset| < w)
    logic        mask_en;    // causal masking: only positions <= query index
    logic        lsh_en;     // content-based sparsity through the hashing and sparsity units
    logic [15:0] hd_thresh;  // Hamming distance at or below which a key is kept
  } attn_cfg_t;

  // Crossbar arrays that hold trained (static) weights.
  typedef enum logic [2:0] {
    U_PUQ = 3'd0, U_PUK = 3'd1, U_PUV = 3'd2, U_HU = 3'd3,
    U_AU  = 3'd4, U_FF1 = 3'd5, U_FF2 = 3'd6
  } unit_e;

  // Weight programming bus: writes one 64-weight segment (one row of one column
  // tile) of one crossbar array per cycle.
  typedef struct packed {
    logic                   en;
    logic                   dec;    // 0: encoder bank, 1: decoder bank
    logic [4:0]             bank;   // bank index within its chain
    logic [1:0]             tile;   // MHA tile within the bank (decoder: 0 masked, 1 enc-dec)
    logic [6:0]             mat;    // AH mat index within the tile
    unit_e                  unit;
    logic [11:0]            row;    // row of the array
    logic [5:0]             ctile;  // column tile of the array
    logic [XB*W_BITS-1:0]   data;   // weight of column ctile*64+k at bits [8k +: 8]
  } wprog_t;

  // Saturate an accumulator, shifted right arithmetically, to 8 bits.
  function automatic act_t sat8(input acc_t v, input int sh);
    acc_t s;
    s = v >>> sh;
    if (s > 127)       return 8'sd127;
    else if (s < -128) return -8'sd128;
    else               return act_t'(s);
  endfunction

endpackage
