// tb_broadcast_network: self-checking test of the operand broadcast.
//
// For each of the three organisations (4x16, 16x4, 8x8) and every offset
// a tile of that organisation can produce, it drives random A and B
// vectors and checks all 64 operand pairs: MAC p, at row p / W and column
// p % W, must see A element a_off + row and B element b_off + column.
module tb_broadcast_network;
  import gemm_pkg::*;

  mode_e      mode = MODE_4X16;
  logic [3:0] a_off = '0, b_off = '0;
  elem_t      a_vec [VEC_LEN];
  elem_t      b_vec [VEC_LEN];
  elem_t      op_a  [NUM_MAC];
  elem_t      op_b  [NUM_MAC];
  int         checks = 0, failures = 0;

  broadcast_network dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, w;
    for (int m = 0; m < 3; m++) begin
      mode = mode_e'(m);
      h = (m == 0) ? 4 : (m == 1) ? 16 : 8;
      w = 64 / h;
      for (int ao = 0; ao < 16; ao += h)
        for (int bo = 0; bo < 16; bo += w)
          for (int rep = 0; rep < 4; rep++) begin
            a_off = 4'(ao); b_off = 4'(bo);
            foreach (a_vec[i]) a_vec[i] = elem_t'($urandom);
            foreach (b_vec[i]) b_vec[i] = elem_t'($urandom);
            #1;
            for (int p = 0; p < 64; p++) begin
              checks += 2;
              if (op_a[p] !== a_vec[ao + p / w]) begin
                failures++;
                $display("FAIL mode %0d MAC %0d op_a %0d expected %0d", m, p, op_a[p], a_vec[ao + p / w]);
              end
              if (op_b[p] !== b_vec[bo + p % w]) begin
                failures++;
                $display("FAIL mode %0d MAC %0d op_b %0d expected %0d", m, p, op_b[p], b_vec[bo + p % w]);
              end
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
