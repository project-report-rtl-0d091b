// broadcast_network: mode-dependent operand routing to the 64 MACs.
//
// Every cycle one 16-element column of A (a_vec) and one 16-element row of
// B (b_vec) arrive from the SRAMs. MAC p is placed at virtual row
// r = p / W_tile and column c = p % W_tile of the current organisation
// (4x16, 16x4 or 8x8) and receives op_a = a_vec[a_off + r] and
// op_b = b_vec[b_off + c]: each A element is broadcast along a row and each
// B element down a column. a_off/b_off select which part of the 16-element
// vector the current tile uses (for example rows 8..15 for odd 8x8 tiles);
// they are (t_m * H_tile) mod 16 and (t_n * W_tile) mod 16 from the
// address generator. Row-major placement of the MACs and the offset inputs
// are this implementation's choices; the broadcast itself and the three
// organisations follow the design description.
//
// Purely combinational.
module broadcast_network
  import gemm_pkg::*;
(
  input  mode_e       mode,
  input  logic [3:0]  a_off,
  input  logic [3:0]  b_off,
  input  elem_t       a_vec [VEC_LEN],
  input  elem_t       b_vec [VEC_LEN],
  output elem_t       op_a  [NUM_MAC],
  output elem_t       op_b  [NUM_MAC]
);

  for (genvar p = 0; p < NUM_MAC; p++) begin : g_mac
    logic [3:0] row, col;
    always_comb begin
      case (mode)
        MODE_4X16: begin row = 4'(p / 16); col = 4'(p % 16); end
        MODE_16X4: begin row = 4'(p / 4);  col = 4'(p % 4);  end
        default:   begin row = 4'(p / 8);  col = 4'(p % 8);  end
      endcase
    end
    assign op_a[p] = a_vec[4'(a_off + row)];
    assign op_b[p] = b_vec[4'(b_off + col)];
  end

endmodule
