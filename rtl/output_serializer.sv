// output_serializer: packs four shadow-register results into a C word.
//
// The 128-bit SRAM C port takes four int32 results per cycle, so a tile of
// 64 results drains in 16 beats. The controller's drain counter 'sel'
// (0..15) picks results 4*sel .. 4*sel+3, which the design places in lanes
// 0..3 of the word (lane j in bits 32*j+31 : 32*j). MAC p holds virtual row
// p / W_tile and column p % W_tile, so each beat is four neighbouring
// columns of one tile row; the controller turns that into the C address.
// The lane order is this implementation's choice.
//
// Purely combinational.
module output_serializer
  import gemm_pkg::*;
(
  input  acc_t                           res [NUM_MAC],
  input  logic [$clog2(DRAIN_BEATS)-1:0] sel,
  output logic [WORD_W-1:0]              word
);

  always_comb begin
    for (int j = 0; j < RES_PER_WORD; j++)
      word[ACC_W*j +: ACC_W] = res[RES_PER_WORD*sel + j];
  end

endmodule
