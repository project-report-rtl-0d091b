// mac_pe: one output-stationary multiply-accumulate processing element.
//
// Each enabled cycle it multiplies two signed int8 operands and adds the
// 16-bit product, sign-extended, to a 32-bit accumulator. On the first
// k step of a tile ("load") the product replaces the accumulator instead of
// being added, which resets the accumulator for the new tile without a
// separate clear cycle. The 8x8 multiply and 32-bit accumulate follow the
// design description; the load-on-first-step form of the reset is this
// implementation's choice.
//
// Timing: the accumulator updates on the rising clock edge when en is high;
// acc shows the result from the next cycle. Synchronous active-low reset.
module mac_pe
  import gemm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,     // accumulate this cycle
  input  logic  load,   // first k step: acc <= a*b instead of acc + a*b
  input  elem_t op_a,
  input  elem_t op_b,
  output acc_t  acc
);

  logic signed [2*DATA_W-1:0] prod;
  assign prod = op_a * op_b;

  always_ff @(posedge clk) begin
    if (!rst_n)
      acc <= '0;
    else if (en)
      acc <= load ? acc_t'(prod) : acc + acc_t'(prod);
  end

endmodule
