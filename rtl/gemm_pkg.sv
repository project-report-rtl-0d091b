// gemm_pkg: types and constants shared by the GeMM accelerator.
//
// The accelerator holds 64 output-stationary MACs fed from two 128-bit
// SRAMs (16 int8 elements per word) and writes 128-bit words of four int32
// results to a third SRAM. The 64 MACs are arranged as a "virtual" array
// of 4x16, 16x4 or 8x8 rows x columns, chosen per run from the output
// shape. The array sizes, widths and the 4096-word depth are the ones the
// design was specified with; the 2-bit mode encoding and the rule that
// picks a mode are this implementation's choice (see detect_mode).
package gemm_pkg;

  localparam int unsigned NUM_MAC    = 64;   // MACs in the physical array
  localparam int unsigned VEC_LEN    = 16;   // int8 elements per SRAM A/B word
  localparam int unsigned DATA_W     = 8;    // operand width (int8)
  localparam int unsigned ACC_W      = 32;   // accumulator / result width
  localparam int unsigned WORD_W     = 128;  // SRAM word width
  localparam int unsigned RES_PER_WORD = WORD_W / ACC_W;        // 4
  localparam int unsigned DRAIN_BEATS  = NUM_MAC / RES_PER_WORD; // 16
  localparam int unsigned MEM_DEPTH  = 4096; // words per SRAM
  localparam int unsigned DIM_W      = 16;   // width of M, N, K inputs

  // Virtual organisation of the 64 MACs (rows x columns).
  typedef enum logic [1:0] {
    MODE_4X16 = 2'd0,   // 4 rows of 16 MACs
    MODE_16X4 = 2'd1,   // 16 rows of 4 MACs
    MODE_8X8  = 2'd2    // 8 rows of 8 MACs
  } mode_e;

  typedef logic signed [DATA_W-1:0] elem_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // log2 of the tile height H_tile of a mode.
  function automatic logic [2:0] log2_h(mode_e m);
    case (m)
      MODE_4X16: return 3'd2;
      MODE_16X4: return 3'd4;
      default:   return 3'd3;
    endcase
  endfunction

  // log2 of the tile width W_tile of a mode (H_tile * W_tile = 64).
  function automatic logic [2:0] log2_w(mode_e m);
    return 3'd6 - log2_h(m);
  endfunction

  // Mode detection: a short output (M <= 4) uses 4x16, a narrow one
  // (N <= 4) uses 16x4, anything else is tiled 8x8.
  function automatic mode_e detect_mode(logic [DIM_W-1:0] m, logic [DIM_W-1:0] n);
    if (m <= DIM_W'(4))      return MODE_4X16;
    else if (n <= DIM_W'(4)) return MODE_16X4;
    else                     return MODE_8X8;
  endfunction

endpackage
