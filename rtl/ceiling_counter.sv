// ceiling_counter: up-counter with a run-time ceiling.
//
// Counts 0, 1, ..., ceiling-1 on each enabled cycle and wraps back to 0;
// 'last' is high while the count equals ceiling-1, so a chain of these
// counters implements nested loops (the enable of an outer counter is the
// 'last' of the inner one). 'clr' returns the count to 0 and has priority
// over 'en'. The controller uses it for the k, tile and drain loops. Only the
// name of this counter is given by the design description; its interface is
// this implementation's choice. A ceiling of 0 behaves like 2**W.
//
// Timing: registered count, synchronous active-low reset; 'last' is
// combinational from the count and the ceiling.
module ceiling_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] ceiling,
  output logic [W-1:0] count,
  output logic         last
);

  assign last = (count == ceiling - W'(1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr)
      count <= '0;
    else if (en)
      count <= last ? '0 : count + W'(1);
  end

endmodule
