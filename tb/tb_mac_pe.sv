// tb_mac_pe: self-checking test of one MAC processing element.
//
// Drives random signed int8 operands with random enable and load patterns,
// including the extreme values -128 and 127, and compares the accumulator
// every cycle with a 32-bit reference sum kept here. Checks that a load
// restarts the sum, that a disabled cycle holds it and that reset clears it.
module tb_mac_pe;
  import gemm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  elem_t op_a = '0, op_b = '0;
  acc_t  acc;
  int    checks = 0, failures = 0;
  int    ref_acc = 0;

  mac_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    check(acc == 0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      en   = ($urandom_range(0, 3) != 0);
      load = ($urandom_range(0, 15) == 0);
      case ($urandom_range(0, 7))
        0:       begin op_a = -128; op_b = -128; end
        1:       begin op_a = -128; op_b = 127;  end
        default: begin op_a = elem_t'($urandom); op_b = elem_t'($urandom); end
      endcase
      if (en) ref_acc = load ? int'(op_a) * int'(op_b) : ref_acc + int'(op_a) * int'(op_b);
      @(negedge clk);
      check(acc == ref_acc, $sformatf("step %0d: acc %0d, expected %0d", i, acc, ref_acc));
    end
    // long run without load: 8x8 products summed into 32 bits
    en = 1'b1; load = 1'b1; op_a = -128; op_b = -128; ref_acc = 16384;
    @(negedge clk);
    load = 1'b0;
    for (int i = 0; i < 300; i++) begin
      ref_acc += 16384;
      @(negedge clk);
    end
    check(acc == ref_acc, $sformatf("long sum %0d, expected %0d", acc, ref_acc));
    rst_n = 1'b0;
    @(negedge clk);
    check(acc == 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
