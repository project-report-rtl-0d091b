// tb_single_port_memory: self-checking test of the 128-bit x 4096 SRAM.
//
// Writes random words to random addresses (the first and last address
// included), keeps a copy here, then reads every written address back and
// checks the data one cycle after the read. Also checks that rdata holds
// while the port is idle and that a write does not disturb rdata.
module tb_single_port_memory;
  localparam int WIDTH = 128, DEPTH = 4096, AW = $clog2(DEPTH);

  logic             clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0]    addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int               checks = 0, failures = 0;
  logic [WIDTH-1:0] model [int];

  single_port_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic write(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = AW'(a); wdata = d;
    model[a] = d;
    @(negedge clk);
    en = 1'b0; we = 1'b0;
  endtask

  initial begin
    write(0, rnd());
    write(DEPTH - 1, rnd());
    for (int i = 0; i < 1000; i++) write($urandom_range(0, DEPTH - 1), rnd());
    // read back, including idle cycles between reads
    foreach (model[a]) begin
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = AW'(a);
      @(negedge clk);
      en = 1'b0;
      check(rdata == model[a], $sformatf("addr %0d read %h expected %h", a, rdata, model[a]));
      @(negedge clk);
      check(rdata == model[a], $sformatf("addr %0d rdata not held", a));
    end
    // a write leaves rdata alone; overwrite then read
    write(5, rnd());
    @(negedge clk); en = 1'b1; addr = 5;
    @(negedge clk); en = 1'b0;
    check(rdata == model[5], "read after overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
