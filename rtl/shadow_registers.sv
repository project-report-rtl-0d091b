// shadow_registers: 64 x 32-bit buffer between the MAC array and SRAM C.
//
// When a tile's K loop has finished, 'capture' copies all 64 accumulators
// into this bank in one cycle (a plain register-to-register handoff). The
// MAC array is then free to start the next tile while the serializer
// drains the bank into SRAM C four results per cycle, so draining one tile
// overlaps with computing the next. The bank size follows the design
// description; the single capture strobe is this implementation's choice.
//
// Timing: q updates on the rising edge where capture is high and holds
// otherwise. Synchronous active-low reset clears it.
module shadow_registers
  import gemm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic capture,
  input  acc_t d [NUM_MAC],
  output acc_t q [NUM_MAC]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_MAC; i++) q[i] <= '0;
    end else if (capture) begin
      q <= d;
    end
  end

endmodule
