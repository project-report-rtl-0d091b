// tb_output_serializer: self-checking test of the drain serializer.
//
// Fills the 64 result inputs with random values and checks, for each of
// the 16 drain beats, that lane j of the 128-bit word is result 4*beat + j.
module tb_output_serializer;
  import gemm_pkg::*;

  acc_t              res [NUM_MAC];
  logic [3:0]        sel = '0;
  logic [WORD_W-1:0] word;
  int                checks = 0, failures = 0;

  output_serializer dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      foreach (res[i]) res[i] = acc_t'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (word[32*j +: 32] !== res[4*s + j]) begin
            failures++;
            $display("FAIL beat %0d lane %0d: %h expected %h", s, j, word[32*j +: 32], res[4*s + j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
