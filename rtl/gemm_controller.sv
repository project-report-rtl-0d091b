// gemm_controller: mode detection, loop sequencing, address generation and
// drain control of the GeMM accelerator.
//
// On 'start' it latches M, N, K, picks the virtual array organisation
// (detect_mode in gemm_pkg) and runs the loop nest
//   for t_m < M_tiles, for t_n < N_tiles, for k < K: fetch A/B, MAC
// with M_tiles = ceil(M/H_tile) and N_tiles = ceil(N/W_tile). Each cycle of
// the COMPUTE state issues one read of SRAM A and SRAM B. Because the SRAMs
// answer one cycle later, the per-read controls (valid, first k, last k,
// broadcast offsets, tile coordinates) pass through one register stage to
// line up with the data at the MACs. One cycle after the last k has been
// accumulated, 'capture' moves the 64 results into the shadow registers and
// the drain counter then steps through 16 beats, writing four results per
// cycle to SRAM C while the next tile already computes.
//
// Between two tiles the controller spends one cycle in NEXT_TILE. It also
// stalls there when K is short: a tile's results may only be captured once
// the previous tile has finished draining (16 beats), so the next tile is
// held until its capture can no longer overtake the drain. A down-counter
// (hold) loaded with 15 at a tile's last read measures this: the next tile
// may start once hold <= K, so tiles with K >= 15 never stall.
//
// Timing, for T tiles without stalls: 'done' rises T*(K+1) + 17 clock edges
// after the edge that samples 'start' (82 for 4x64x16, 545 for 32x32x32).
// 'done' stays high until the next start; 'busy' is high in between.
//
// The loop order, the 16-beat drain overlapping the next tile and the
// latencies follow the design description. State encoding, the hold
// counter, the start/done handshake and the M <= 4 / N <= 4 mode rule are
// this implementation's choices. K, M and N must be at least 1.
module gemm_controller
  import gemm_pkg::*;
#(
  parameter int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [DIM_W-1:0]               m_size,
  input  logic [DIM_W-1:0]               n_size,
  input  logic [DIM_W-1:0]               k_size,
  output logic                           busy,
  output logic                           done,
  output logic                           stall,
  output mode_e                          mode,
  // SRAM A / B read requests
  output logic                           rd_en,
  output logic [AW-1:0]                  addr_a,
  output logic [AW-1:0]                  addr_b,
  // broadcast network and MAC array (aligned with SRAM read data)
  output logic [3:0]                     a_off,
  output logic [3:0]                     b_off,
  output logic                           mac_en,
  output logic                           mac_load,
  // shadow registers, serializer and SRAM C
  output logic                           capture,
  output logic [$clog2(DRAIN_BEATS)-1:0] drain_sel,
  output logic                           c_we,
  output logic [AW-1:0]                  addr_c
);

  localparam int unsigned DSW = $clog2(DRAIN_BEATS);

  typedef enum logic [1:0] {
    S_IDLE      = 2'd0,
    S_COMPUTE   = 2'd1,
    S_NEXT_TILE = 2'd2,
    S_FINISH    = 2'd3
  } state_e;

  state_e           state;
  logic [DIM_W-1:0] m_r, n_r, k_r, mt_r, nt_r;
  mode_e            mode_d;
  logic             go;

  // ---------------------------------------------------------------- loops
  logic [DIM_W-1:0] k_cnt, tn_cnt, tm_cnt;
  logic             k_last, tn_last, tm_last;
  logic             iss_v;

  assign go    = start && (state == S_IDLE);
  assign iss_v = (state == S_COMPUTE);

  ceiling_counter #(.W(DIM_W)) u_k_cnt (
    .clk(clk), .rst_n(rst_n), .clr(go), .en(iss_v),
    .ceiling(k_r), .count(k_cnt), .last(k_last));

  ceiling_counter #(.W(DIM_W)) u_tn_cnt (
    .clk(clk), .rst_n(rst_n), .clr(go), .en(iss_v && k_last),
    .ceiling(nt_r), .count(tn_cnt), .last(tn_last));

  ceiling_counter #(.W(DIM_W)) u_tm_cnt (
    .clk(clk), .rst_n(rst_n), .clr(go), .en(iss_v && k_last && tn_last),
    .ceiling(mt_r), .count(tm_cnt), .last(tm_last));

  // ------------------------------------------------------ pipeline stages
  logic             s1_v, s1_first, s1_last, s1_final;
  logic [3:0]       s1_aoff, s1_boff;
  logic [DIM_W-1:0] s1_tm, s1_tn;
  logic             hf_final;
  logic [DIM_W-1:0] hf_tm, hf_tn;
  logic [3:0]       iss_aoff, iss_boff;

  // ---------------------------------------------------------------- drain
  logic             drain_active, d_final, d_last;
  logic [DIM_W-1:0] d_tm, d_tn;
  logic             c_valid;

  // DRAIN_BEATS = 2**DSW, which a DSW-bit ceiling of 0 counts through
  ceiling_counter #(.W(DSW)) u_drain_cnt (
    .clk(clk), .rst_n(rst_n), .clr(capture), .en(drain_active),
    .ceiling(DSW'(DRAIN_BEATS)), .count(drain_sel), .last(d_last));

  // ------------------------------------------------------------------ AGU
  gemm_agu #(.AW(AW)) u_agu (
    .mode(mode), .m_size(m_r), .n_size(n_r), .k_size(k_r),
    .t_m(tm_cnt), .t_n(tn_cnt), .k(k_cnt),
    .addr_a(addr_a), .addr_b(addr_b), .a_off(iss_aoff), .b_off(iss_boff),
    .d_tm(d_tm), .d_tn(d_tn), .d_sel(drain_sel),
    .addr_c(addr_c), .c_valid(c_valid));

  // -------------------------------------------------- hold (stall) counter
  logic [DSW-1:0] hold;
  logic           may_start;

  assign may_start = (DIM_W'(hold) <= k_r);

  // --------------------------------------------------------------- outputs
  assign rd_en    = iss_v;
  assign a_off    = s1_aoff;
  assign b_off    = s1_boff;
  assign mac_en   = s1_v;
  assign mac_load = s1_first;
  assign c_we     = drain_active && c_valid;
  assign busy     = (state != S_IDLE);
  assign stall    = (state == S_NEXT_TILE) && !may_start;

  always_comb mode_d = detect_mode(m_size, n_size);

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      mode  <= MODE_8X8;
      m_r   <= DIM_W'(1);
      n_r   <= DIM_W'(1);
      k_r   <= DIM_W'(1);
      mt_r  <= DIM_W'(1);
      nt_r  <= DIM_W'(1);
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_COMPUTE;
          done  <= 1'b0;
          mode  <= mode_d;
          m_r   <= m_size;
          n_r   <= n_size;
          k_r   <= k_size;
          mt_r  <= (m_size + (DIM_W'(1) << log2_h(mode_d)) - DIM_W'(1)) >> log2_h(mode_d);
          nt_r  <= (n_size + (DIM_W'(1) << log2_w(mode_d)) - DIM_W'(1)) >> log2_w(mode_d);
        end
        S_COMPUTE: if (k_last)
          state <= (tm_last && tn_last) ? S_FINISH : S_NEXT_TILE;
        S_NEXT_TILE: if (may_start)
          state <= S_COMPUTE;
        S_FINISH: if (drain_active && d_last && d_final) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // hold: cycles until the shadow registers can accept another tile
  always_ff @(posedge clk) begin
    if (!rst_n)                hold <= '0;
    else if (iss_v && k_last)  hold <= DSW'(DRAIN_BEATS - 1);
    else if (hold != '0)       hold <= hold - DSW'(1);
  end

  // stage 1: aligned with the SRAM read data
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_final <= 1'b0;
      s1_aoff <= '0; s1_boff <= '0; s1_tm <= '0; s1_tn <= '0;
    end else begin
      s1_v     <= iss_v;
      s1_first <= iss_v && (k_cnt == '0);
      s1_last  <= iss_v && k_last;
      s1_final <= tm_last && tn_last;
      s1_aoff  <= iss_aoff;
      s1_boff  <= iss_boff;
      s1_tm    <= tm_cnt;
      s1_tn    <= tn_cnt;
    end
  end

  // stage 2: handoff of the finished tile to the shadow registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      capture <= 1'b0; hf_final <= 1'b0; hf_tm <= '0; hf_tn <= '0;
    end else begin
      capture  <= s1_v && s1_last;
      hf_final <= s1_final;
      hf_tm    <= s1_tm;
      hf_tn    <= s1_tn;
    end
  end

  // drain of the tile held in the shadow registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain_active <= 1'b0; d_final <= 1'b0; d_tm <= '0; d_tn <= '0;
    end else if (capture) begin
      drain_active <= 1'b1;
      d_final      <= hf_final;
      d_tm         <= hf_tm;
      d_tn         <= hf_tn;
    end else if (drain_active && d_last) begin
      drain_active <= 1'b0;
    end
  end

  // A tile may only be captured when the previous one has fully drained.
  assert property (@(posedge clk) disable iff (!rst_n)
                   capture |-> (!drain_active || d_last))
    else $error("shadow registers overwritten while draining");

  // A run needs at least one k step and one row and column.
  assert property (@(posedge clk) disable iff (!rst_n)
                   go |-> (k_size != '0 && m_size != '0 && n_size != '0))
    else $error("GeMM started with a zero dimension");

endmodule
