// gemm_agu: address generation for SRAM A, B and C.
//
// Memory layout. A word of SRAM A holds one 16-row slice of a column of A
// (byte j = A[16*blk + j][k]) at address blk*K + k. A word of SRAM B holds
// one 16-column slice of a row of B (byte j = B[k][16*blk + j]) at address
// blk*K + k. SRAM C is row-major with four int32 results per word: lane j
// of address row*ceil(N/4) + col/4 is C[row][4*(col/4) + j].
//
// Read side (from the tile and k loop counters):
//   addr_a = floor(t_m*H_tile/16) * K + k,   a_off = (t_m*H_tile) mod 16
//   addr_b = floor(t_n*W_tile/16) * K + k,   b_off = (t_n*W_tile) mod 16
// The addr_a formula is the design's; addr_b is its mirror for B. The
// offsets tell the broadcast network which elements of the fetched vector
// the tile uses.
// Write side (from the tile being drained and the drain counter): beat d
// covers MAC indices 4d..4d+3, i.e. tile row r = 4d / W_tile and columns
// c0 = 4d mod W_tile .. c0+3. c_valid is low for rows at or beyond M and
// columns at or beyond N (padding of a partial tile), and such beats are
// not written. The C layout is this implementation's choice.
//
// Purely combinational.
module gemm_agu
  import gemm_pkg::*;
#(
  parameter int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  mode_e                          mode,
  input  logic [DIM_W-1:0]               m_size,
  input  logic [DIM_W-1:0]               n_size,
  input  logic [DIM_W-1:0]               k_size,
  // read side
  input  logic [DIM_W-1:0]               t_m,
  input  logic [DIM_W-1:0]               t_n,
  input  logic [DIM_W-1:0]               k,
  output logic [AW-1:0]                  addr_a,
  output logic [AW-1:0]                  addr_b,
  output logic [3:0]                     a_off,
  output logic [3:0]                     b_off,
  // write side
  input  logic [DIM_W-1:0]               d_tm,
  input  logic [DIM_W-1:0]               d_tn,
  input  logic [$clog2(DRAIN_BEATS)-1:0] d_sel,
  output logic [AW-1:0]                  addr_c,
  output logic                           c_valid
);

  localparam int unsigned XW = 2 * DIM_W;   // wide enough for products

  logic [XW-1:0] row0_a, col0_b, blk_a, blk_b;
  logic [XW-1:0] pidx, tile_r, tile_c, row_c, col_c, words_per_row;
  logic [2:0]    lh, lw;

  always_comb begin
    lh = log2_h(mode);
    lw = log2_w(mode);

    // read addresses
    row0_a = XW'(t_m) << lh;
    col0_b = XW'(t_n) << lw;
    blk_a  = row0_a >> 4;
    blk_b  = col0_b >> 4;
    addr_a = AW'(blk_a * XW'(k_size) + XW'(k));
    addr_b = AW'(blk_b * XW'(k_size) + XW'(k));
    a_off  = row0_a[3:0];
    b_off  = col0_b[3:0];

    // write address of drain beat d_sel
    pidx          = XW'(d_sel) << 2;
    tile_r        = pidx >> lw;
    tile_c        = pidx & ((XW'(1) << lw) - XW'(1));
    row_c         = (XW'(d_tm) << lh) + tile_r;
    col_c         = (XW'(d_tn) << lw) + tile_c;
    words_per_row = (XW'(n_size) + XW'(3)) >> 2;
    addr_c        = AW'(row_c * words_per_row + (col_c >> 2));
    c_valid       = (row_c < XW'(m_size)) && (col_c < XW'(n_size));
  end

endmodule
