// tb_gemm_performance: the three reference workloads, ten random runs each.
//
// Runs 4x64x16, 16x64x4 and 32x32x32 (MxKxN) with fresh random int8 data
// ten times each on the accelerator at its default parameters, checks
// every C element against a product computed here and checks the cycle
// count from the start edge to 'done' against 82, 82 and 545 cycles. It
// prints a report per workload: cycles, ideal cycles (tiles x K),
// operations (2*M*N*K), ops/cycle and efficiency against the 128 ops/cycle
// peak (expected 99.90, 99.90 and 120.25 ops/cycle).
module tb_gemm_performance;
  import gemm_pkg::*;

  localparam int AW   = $clog2(MEM_DEPTH);
  localparam int MAXD = 32;

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

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte A [MAXD][64];
  byte B [64][MAXD];
  int  C [MAXD][MAXD];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one run; returns the measured cycle count
  task automatic run(input int M, input int N, input int K, output int cycles);
    int wpr;
    logic [WORD_W-1:0] w;
    for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) A[i][k] = byte'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = byte'($urandom);
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < K; k++) C[i][j] += int'(A[i][k]) * int'(B[k][j]);
    end
    for (int blk = 0; blk < (M + 15) / 16; blk++)
      for (int k = 0; k < K; k++) begin
        for (int j = 0; j < 16; j++) w[8*j +: 8] = (16*blk + j < M) ? A[16*blk + j][k] : 8'd0;
        @(negedge clk);
        host_a_we = 1'b1; host_a_addr = AW'(blk*K + k); host_a_wdata = w;
      end
    @(negedge clk) host_a_we = 1'b0;
    for (int blk = 0; blk < (N + 15) / 16; blk++)
      for (int k = 0; k < K; k++) begin
        for (int j = 0; j < 16; j++) w[8*j +: 8] = (16*blk + j < N) ? B[k][16*blk + j] : 8'd0;
        @(negedge clk);
        host_b_we = 1'b1; host_b_addr = AW'(blk*K + k); host_b_wdata = w;
      end
    @(negedge clk) host_b_we = 1'b0;
    m_size = DIM_W'(M); n_size = DIM_W'(N); k_size = DIM_W'(K);
    start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
      @(negedge clk);
    end while (!done && cycles < 100000);
    wpr = (N + 3) / 4;
    for (int i = 0; i < M; i++)
      for (int wd = 0; wd < wpr; wd++) begin
        host_c_en = 1'b1; host_c_addr = AW'(i*wpr + wd);
        @(negedge clk);
        host_c_en = 1'b0;
        for (int l = 0; l < 4; l++)
          if (4*wd + l < N)
            check($signed(host_c_rdata[32*l +: 32]) == C[i][4*wd + l],
                  $sformatf("%0dx%0dx%0d C[%0d][%0d]", M, K, N, i, 4*wd + l));
      end
  endtask

  initial begin
    int dims [3][3] = '{'{4, 16, 64}, '{16, 4, 64}, '{32, 32, 32}};
    int exp_cycles [3] = '{82, 82, 545};
    int ideal [3] = '{64, 64, 512};
    int cycles;
    real ops;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int c = 0; c < 3; c++) begin
      for (int it = 0; it < 10; it++) begin
        run(dims[c][0], dims[c][1], dims[c][2], cycles);
        check(cycles == exp_cycles[c], $sformatf("case %0d: %0d cycles, expected %0d", c + 1, cycles, exp_cycles[c]));
      end
      ops = 2.0 * dims[c][0] * dims[c][1] * dims[c][2];
      $display("case %0d  %0dx%0dx%0d: %0d cycles (ideal %0d), %0.0f ops, %.2f ops/cycle, efficiency %.1f%%",
               c + 1, dims[c][0], dims[c][2], dims[c][1], cycles, ideal[c], ops, ops / cycles,
               100.0 * ops / cycles / 128.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
