// tb_shadow_registers: self-checking test of the 64 x 32-bit shadow bank.
//
// Changes the input every cycle and pulses 'capture' at random; checks
// that all 64 outputs equal the input of the last capture and hold between
// captures, and that reset clears the bank.
module tb_shadow_registers;
  import gemm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  acc_t d [NUM_MAC];
  acc_t q [NUM_MAC];
  acc_t expq [NUM_MAC];
  int   checks = 0, failures = 0;

  shadow_registers dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (d[i]) d[i] = '0;
    @(negedge clk); @(negedge clk);
    foreach (q[i]) begin checks++; if (q[i] != 0) failures++; end
    foreach (expq[i]) expq[i] = '0;
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      foreach (d[i]) d[i] = acc_t'($urandom);
      capture = ($urandom_range(0, 5) == 0);
      if (capture) expq = d;
      @(negedge clk);
      foreach (q[i]) begin
        checks++;
        if (q[i] != expq[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d reg %0d: %h expected %h", c, i, q[i], expq[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
