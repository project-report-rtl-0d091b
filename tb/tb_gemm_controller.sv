// tb_gemm_controller: self-checking test of the controller on its own.
//
// For a set of shapes it starts a run and, cycle by cycle, compares the
// SRAM A/B read requests with the loop nest t_m, t_n, k (addresses from the
// layout formulas), checks that the MAC enable and load follow each read by
// exactly one cycle, that one capture follows the last k of every tile,
// that every valid C word address is written exactly once and no other,
// and that 'done' comes T*(K+1) + 17 + (T-1)*max(0, 15-K) edges after
// start. Short-K shapes must produce stall cycles.
module tb_gemm_controller;
  import gemm_pkg::*;

  localparam int AW = 12;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [DIM_W-1:0] m_size = '0, n_size = '0, k_size = '0;
  logic             busy, done, stall, rd_en, mac_en, mac_load, capture, c_we;
  mode_e            mode;
  logic [AW-1:0]    addr_a, addr_b, addr_c;
  logic [3:0]       a_off, b_off, drain_sel;
  int               checks = 0, failures = 0, stalls = 0;

  gemm_controller #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int M, input int N, input int K);
    int h, w, mt, nt, T, exp_lat, cycles, reads, caps, wpr;
    int exp_a [$], exp_b [$];
    int written [int];
    bit prev_rd, prev_first;
    h  = (M <= 4) ? 4 : (N <= 4) ? 16 : 8;
    w  = 64 / h;
    mt = (M + h - 1) / h;
    nt = (N + w - 1) / w;
    T  = mt * nt;
    for (int tm = 0; tm < mt; tm++)
      for (int tn = 0; tn < nt; tn++)
        for (int k = 0; k < K; k++) begin
          exp_a.push_back((tm * h / 16) * K + k);
          exp_b.push_back((tn * w / 16) * K + k);
        end
    m_size = DIM_W'(M); n_size = DIM_W'(N); k_size = DIM_W'(K);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cycles = 0; reads = 0; caps = 0; prev_rd = 0; prev_first = 0;
    do begin
      // sampled in the middle of the cycle
      if (mac_en != prev_rd || (prev_rd && mac_load != prev_first)) begin
        check(0, $sformatf("%0dx%0dx%0d: MAC enable/load not one cycle after read", M, K, N));
      end
      prev_first = rd_en && (reads % K == 0);
      prev_rd    = rd_en;
      if (rd_en) begin
        check(reads < exp_a.size() && int'(addr_a) == exp_a[reads] && int'(addr_b) == exp_b[reads],
              $sformatf("%0dx%0dx%0d read %0d: A %0d B %0d", M, K, N, reads, addr_a, addr_b));
        reads++;
      end
      if (capture) caps++;
      if (stall) stalls++;
      if (c_we) begin
        check(!written.exists(int'(addr_c)), $sformatf("C word %0d written twice", addr_c));
        written[int'(addr_c)] = 1;
      end
      @(posedge clk); cycles++;
      @(negedge clk);
    end while (!done && cycles < 50000);
    exp_lat = T * (K + 1) + 17 + (T - 1) * ((K < 15) ? 15 - K : 0);
    check(cycles == exp_lat, $sformatf("%0dx%0dx%0d: latency %0d expected %0d", M, K, N, cycles, exp_lat));
    check(reads == T * K, $sformatf("%0dx%0dx%0d: %0d reads", M, K, N, reads));
    check(caps == T, $sformatf("%0dx%0dx%0d: %0d captures", M, K, N, caps));
    wpr = (N + 3) / 4;
    check(written.num() == M * wpr, $sformatf("%0dx%0dx%0d: %0d C words written, expected %0d",
                                             M, K, N, written.num(), M * wpr));
    foreach (written[a]) check(a < M * wpr, $sformatf("C word %0d out of range", a));
    check(!busy, "busy after done");
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    run(4, 16, 64);
    run(16, 4, 64);
    run(32, 32, 32);
    run(8, 16, 1);
    run(17, 5, 7);
    run(4, 64, 15);
    run(64, 4, 14);
    for (int i = 0; i < 6; i++)
      run($urandom_range(1, 48), $urandom_range(1, 48), $urandom_range(1, 24));
    check(stalls > 0, "no stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
