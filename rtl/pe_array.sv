// pe_array: the physical array of 64 output-stationary MACs.
//
// Each MAC owns one output element of the current tile and accumulates
// op_a[p] * op_b[p] while en is high; load starts a new tile (see mac_pe).
// All MACs share en and load, so the whole array steps through the K loop
// in lock-step, one k per cycle. acc[p] is the running sum of MAC p.
// Row/column placement is done by the broadcast network in front of it.
module pe_array
  import gemm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  load,
  input  elem_t op_a [NUM_MAC],
  input  elem_t op_b [NUM_MAC],
  output acc_t  acc  [NUM_MAC]
);

  for (genvar p = 0; p < NUM_MAC; p++) begin : g_pe
    mac_pe u_pe (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .load (load),
      .op_a (op_a[p]),
      .op_b (op_b[p]),
      .acc  (acc[p])
    );
  end

endmodule
