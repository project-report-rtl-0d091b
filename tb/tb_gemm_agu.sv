// tb_gemm_agu: self-checking test of the address generator.
//
// Checks hand-worked cases of the 32x32x32 layout (tile row 3 of the 8x8
// organisation reads A block 1 at offset 8), then random tile coordinates,
// k values, drain beats and matrix sizes in all three organisations
// against reference formulas written with integer division:
//   addr_a = (t_m*H div 16)*K + k,  a_off = t_m*H mod 16 (B likewise),
//   addr_c = row*ceil(N/4) + col div 4 with row = t_m*H + 4d div W and
//   col = t_n*W + 4d mod W, c_valid = row < M and col < N.
module tb_gemm_agu;
  import gemm_pkg::*;

  localparam int AW = 12;

  mode_e            mode = MODE_8X8;
  logic [DIM_W-1:0] m_size = '0, n_size = '0, k_size = '0;
  logic [DIM_W-1:0] t_m = '0, t_n = '0, k = '0, d_tm = '0, d_tn = '0;
  logic [3:0]       d_sel = '0;
  logic [AW-1:0]    addr_a, addr_b, addr_c;
  logic [3:0]       a_off, b_off;
  logic             c_valid;
  int               checks = 0, failures = 0;

  gemm_agu #(.AW(AW)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int h, w, ea, eb, row, col, ec, wpr;
    // 32x32x32, 8x8 tiles: tile (3, 2), k = 5, beat 7
    mode = MODE_8X8; m_size = 32; n_size = 32; k_size = 32;
    t_m = 3; t_n = 2; k = 5; d_tm = 3; d_tn = 2; d_sel = 7;
    #1;
    check(addr_a == 12'd37 && a_off == 4'd8, "A of tile row 3");
    check(addr_b == 12'd37 && b_off == 4'd0, "B of tile column 2");
    // beat 7 = MACs 28..31 = tile row 3, columns 4..7 -> C row 27, cols 20..23
    check(addr_c == 12'(27 * 8 + 5) && c_valid, "C of beat 7");
    // 4x64x16 (4x16): one tile, A uses offset 0
    mode = MODE_4X16; m_size = 4; n_size = 16; k_size = 64;
    t_m = 0; t_n = 0; k = 63; d_tm = 0; d_tn = 0; d_sel = 15;
    #1;
    check(addr_a == 12'd63 && addr_b == 12'd63 && a_off == 0 && b_off == 0, "4x16 reads");
    check(addr_c == 12'd15 && c_valid, "4x16 last beat");

    for (int i = 0; i < 20000; i++) begin
      mode   = mode_e'($urandom_range(0, 2));
      h      = (mode == MODE_4X16) ? 4 : (mode == MODE_16X4) ? 16 : 8;
      w      = 64 / h;
      m_size = DIM_W'($urandom_range(1, 64));
      n_size = DIM_W'($urandom_range(1, 64));
      k_size = DIM_W'($urandom_range(1, 64));
      t_m    = DIM_W'($urandom_range(0, (m_size + h - 1) / h - 1));
      t_n    = DIM_W'($urandom_range(0, (n_size + w - 1) / w - 1));
      k      = DIM_W'($urandom_range(0, k_size - 1));
      d_tm   = DIM_W'($urandom_range(0, (m_size + h - 1) / h - 1));
      d_tn   = DIM_W'($urandom_range(0, (n_size + w - 1) / w - 1));
      d_sel  = 4'($urandom);
      #1;
      ea  = (t_m * h / 16) * k_size + k;
      eb  = (t_n * w / 16) * k_size + k;
      row = d_tm * h + (4 * d_sel) / w;
      col = d_tn * w + (4 * d_sel) % w;
      wpr = (n_size + 3) / 4;
      ec  = row * wpr + col / 4;
      check(addr_a == AW'(ea) && a_off == 4'((t_m * h) % 16),
            $sformatf("mode %0d t_m %0d k %0d: A %0d/%0d expected %0d/%0d", mode, t_m, k, addr_a, a_off, ea, (t_m*h)%16));
      check(addr_b == AW'(eb) && b_off == 4'((t_n * w) % 16),
            $sformatf("mode %0d t_n %0d k %0d: B %0d/%0d expected %0d", mode, t_n, k, addr_b, b_off, eb));
      check(c_valid == (row < m_size && col < n_size),
            $sformatf("mode %0d beat %0d: c_valid %0d", mode, d_sel, c_valid));
      if (row < m_size && col < n_size)
        check(addr_c == AW'(ec), $sformatf("mode %0d beat %0d: C %0d expected %0d", mode, d_sel, addr_c, ec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
