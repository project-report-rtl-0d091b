// tb_pe_array: self-checking test of the 64-MAC array.
//
// Runs several "tiles": a load step followed by random-length runs of
// enabled and idle cycles with independent random operands for each of the
// 64 MACs, and compares all 64 accumulators with reference sums each cycle.
module tb_pe_array;
  import gemm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  elem_t op_a [NUM_MAC];
  elem_t op_b [NUM_MAC];
  acc_t  acc  [NUM_MAC];
  int    ref_acc [NUM_MAC];
  int    checks = 0, failures = 0;

  pe_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_acc[p]) ref_acc[p] = 0;
    foreach (op_a[p]) begin op_a[p] = '0; op_b[p] = '0; end
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int tile = 0; tile < 8; tile++)
      for (int k = 0; k < 40; k++) begin
        en   = (k == 0) || ($urandom_range(0, 4) != 0);
        load = (k == 0);
        foreach (op_a[p]) begin op_a[p] = elem_t'($urandom); op_b[p] = elem_t'($urandom); end
        foreach (ref_acc[p])
          if (en) ref_acc[p] = (load ? 0 : ref_acc[p]) + int'(op_a[p]) * int'(op_b[p]);
        @(negedge clk);
        foreach (acc[p]) begin
          checks++;
          if (acc[p] != ref_acc[p]) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d k %0d MAC %0d: %0d expected %0d",
                                        tile, k, p, acc[p], ref_acc[p]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
