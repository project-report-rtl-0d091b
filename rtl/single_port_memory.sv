// single_port_memory: synchronous single-port SRAM model (A, B and C).
//
// One port shared by reads and writes. With en high a write (we high)
// stores wdata at addr on the rising edge; a read (we low) returns the word
// at addr in rdata after that edge, so reads have one cycle of latency.
// rdata holds its value while en is low. The 128-bit width and 4096-word
// depth are those of the design; the one-cycle registered read is this
// implementation's choice for a synchronous SRAM.
module single_port_memory #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
