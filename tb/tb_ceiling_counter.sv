// tb_ceiling_counter: self-checking test of the ceiling counter.
//
// Uses random ceilings (1 to 20, and 0 which means 2**W for a 5-bit
// counter) with random enable and clear, and compares 'count' and 'last'
// with a reference counter kept here every cycle.
module tb_ceiling_counter;
  localparam int W = 5;

  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] ceiling = 5'd1;
  logic [W-1:0] count;
  logic         last;
  int           checks = 0, failures = 0;
  int           ref_cnt = 0, ref_ceil;

  ceiling_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
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
    rst_n = 1'b1;
    for (int seg = 0; seg < 40; seg++) begin
      ceiling  = (seg % 10 == 9) ? 5'd0 : W'($urandom_range(1, 20));
      ref_ceil = (ceiling == 0) ? 32 : int'(ceiling);
      clr = 1'b1; @(negedge clk); clr = 1'b0; ref_cnt = 0;
      for (int i = 0; i < 100; i++) begin
        en  = ($urandom_range(0, 3) != 0);
        clr = ($urandom_range(0, 60) == 0);
        check(last == (ref_cnt == ref_ceil - 1),
              $sformatf("last %0d at count %0d ceiling %0d", last, ref_cnt, ref_ceil));
        if (clr)     ref_cnt = 0;
        else if (en) ref_cnt = (ref_cnt == ref_ceil - 1) ? 0 : ref_cnt + 1;
        @(negedge clk);
        check(int'(count) == ref_cnt, $sformatf("count %0d, expected %0d", count, ref_cnt));
      end
      clr = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
