// tb_gemm_accelerator: end-to-end test of the GeMM accelerator at its
// default parameters.
//
// For each run the testbench draws random int8 matrices A (M x K) and
// B (K x N), packs them into SRAM A and SRAM B through the host ports
// (A: 16-row column slices, B: 16-column row slices, unused bytes zero),
// starts the accelerator, counts clock edges from the edge that samples
// 'start' to 'done', reads C back and compares every element with a
// product computed here. Runs: the three evaluated shapes 4x64x16,
// 16x64x4 and 32x32x32 (expected 82, 82 and 545 cycles), K = 1 and other
// short K (drain longer than compute: stalls), unaligned shapes such as
// 17x5 (partial tiles), multi-tile runs of the 4x16 and 16x4
// organisations, and a 64x64x64 run. The expected latency of every run is
// T*(K+1) + 17 + (T-1)*max(0, 15-K) for T tiles. It also counts how often
// each mechanism occurred (three modes, stall, drain overlapping compute,
// skipped padding beats, non-zero broadcast offsets) and fails if one never
// did.
module tb_gemm_accelerator;
  import gemm_pkg::*;

  localparam int AW   = $clog2(MEM_DEPTH);
  localparam int MAXD = 64;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic [DIM_W-1:0]  m_size = '0, n_size = '0, k_size = '0;
  logic              busy, done, stall;
  mode_e             mode;
  logic              host_a_we = 1'b0, host_b_we = 1'b0, host_c_en = 1'b0;
  logic [AW-1:0]     host_a_addr = '0, host_b_addr = '0, host_c_addr = '0;
  logic [WORD_W-1:0] host_a_wdata = '0, host_b_wdata = '0, host_c_rdata;

  gemm_accelerator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_mode [3];
  int n_stall = 0, n_overlap = 0, n_pad = 0, n_off = 0, n_multitile = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.u_ctrl.rd_en && dut.u_ctrl.c_we) n_overlap++;
    if (dut.u_ctrl.drain_active && !dut.u_ctrl.c_we) n_pad++;
    if (dut.u_ctrl.mac_en && (dut.u_ctrl.a_off != 0 || dut.u_ctrl.b_off != 0)) n_off++;
  end

  byte A [MAXD][MAXD];
  byte B [MAXD][MAXD];
  int  C [MAXD][MAXD];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int M, input int N, input int K, input int exp_mode);
    int H, W, T, exp_lat, cycles, wpr;
    logic [WORD_W-1:0] w;
    if (exp_mode < 0) exp_mode = (M <= 4) ? 0 : (N <= 4) ? 1 : 2;
    // data and reference
    for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) A[i][k] = byte'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = byte'($urandom);
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < K; k++) C[i][j] += int'(A[i][k]) * int'(B[k][j]);
    end
    // load SRAM A and B
    for (int blk = 0; blk < (M + 15) / 16; blk++)
      for (int k = 0; k < K; k++) begin
        for (int j = 0; j < 16; j++)
          w[8*j +: 8] = (16*blk + j < M) ? A[16*blk + j][k] : 8'd0;
        @(negedge clk);
        host_a_we = 1'b1; host_a_addr = AW'(blk*K + k); host_a_wdata = w;
      end
    @(negedge clk) host_a_we = 1'b0;
    for (int blk = 0; blk < (N + 15) / 16; blk++)
      for (int k = 0; k < K; k++) begin
        for (int j = 0; j < 16; j++)
          w[8*j +: 8] = (16*blk + j < N) ? B[k][16*blk + j] : 8'd0;
        @(negedge clk);
        host_b_we = 1'b1; host_b_addr = AW'(blk*K + k); host_b_wdata = w;
      end
    @(negedge clk) host_b_we = 1'b0;
    // run and time
    m_size = DIM_W'(M); n_size = DIM_W'(N); k_size = DIM_W'(K);
    start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
      @(negedge clk);
    end while (!done && cycles < 100000);
    // expected latency
    H = (exp_mode == 0) ? 4 : (exp_mode == 1) ? 16 : 8;
    W = 64 / H;
    T = ((M + H - 1) / H) * ((N + W - 1) / W);
    exp_lat = T * (K + 1) + 17 + (T - 1) * ((K < 15) ? 15 - K : 0);
    if (T > 1) n_multitile++;
    n_mode[int'(mode)]++;
    check(int'(mode) == exp_mode, $sformatf("%0dx%0dx%0d mode %0d, expected %0d", M, K, N, mode, exp_mode));
    check(cycles == exp_lat, $sformatf("%0dx%0dx%0d latency %0d, expected %0d", M, K, N, cycles, exp_lat));
    $display("GeMM %0dx%0dx%0d (MxKxN): mode %s, %0d tiles, %0d cycles (ideal %0d), %.2f ops/cycle",
             M, K, N, mode.name(), T, cycles, T * K, 2.0 * M * N * K / cycles);
    // read back C
    wpr = (N + 3) / 4;
    for (int i = 0; i < M; i++)
      for (int wd = 0; wd < wpr; wd++) begin
        host_c_en = 1'b1; host_c_addr = AW'(i*wpr + wd);
        @(negedge clk);
        host_c_en = 1'b0;
        for (int l = 0; l < 4; l++)
          if (4*wd + l < N)
            check($signed(host_c_rdata[32*l +: 32]) == C[i][4*wd + l],
                  $sformatf("%0dx%0dx%0d C[%0d][%0d] = %0d, expected %0d", M, K, N, i, 4*wd + l,
                            $signed(host_c_rdata[32*l +: 32]), C[i][4*wd + l]));
      end
  endtask

  initial begin
    n_mode = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the three evaluated workloads
    run(4, 16, 64, 0);
    run(16, 4, 64, 1);
    run(32, 32, 32, 2);
    // short K: compute shorter than drain
    run(8, 16, 1, 2);
    run(16, 16, 3, 2);
    run(4, 48, 1, 0);
    // unaligned shapes and padding
    run(17, 5, 7, 2);
    run(3, 37, 20, 0);
    run(29, 2, 16, 1);
    // multi-tile 4x16 and 16x4 organisations
    run(4, 64, 18, 0);
    run(64, 4, 18, 1);
    // largest square of the proposed tests
    run(64, 64, 64, 2);
    // random shapes
    for (int t = 0; t < 4; t++)
      run(1 + $urandom_range(0, 40), 1 + $urandom_range(0, 40), 1 + $urandom_range(0, 40),
          -1);
    // mechanisms
    $display("mechanisms: mode4x16=%0d mode16x4=%0d mode8x8=%0d stall=%0d overlap=%0d pad=%0d offset=%0d multitile=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_stall, n_overlap, n_pad, n_off, n_multitile);
    check(n_mode[0] > 0, "4x16 mode never used");
    check(n_mode[1] > 0, "16x4 mode never used");
    check(n_mode[2] > 0, "8x8 mode never used");
    check(n_stall > 0, "no stall");
    check(n_overlap > 0, "drain never overlapped compute");
    check(n_pad > 0, "no padding beat skipped");
    check(n_off > 0, "no non-zero broadcast offset");
    check(n_multitile > 0, "no multi-tile run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
