// gemm_accelerator: top level of the 64-MAC flexible-broadcast GeMM engine.
//
// Computes C (M x N, int32) = A (M x K, int8) * B (K x N, int8). SRAM A and
// SRAM B each deliver one 128-bit word (16 int8) per cycle: a 16-row slice
// of a column of A and a 16-column slice of a row of B. The words are split
// into 16 bytes (unpack), routed by the broadcast network to the 64 MACs of
// the current virtual organisation (4x16, 16x4 or 8x8, chosen from the
// output shape), and accumulated for K cycles. The finished tile moves to
// the shadow registers and is written to SRAM C four results per cycle
// while the next tile computes. See gemm_agu for the memory layouts.
//
// Host interface: while busy is low the host owns the three SRAM ports:
// it writes A and B words (host_a_*, host_b_*) and reads C words
// (host_c_en/host_c_addr, data on host_c_rdata one cycle later). A
// one-cycle 'start' with m_size, n_size, k_size launches a run; 'busy' is
// high until 'done' rises, and 'done' holds until the next start. 'stall'
// marks cycles in which the next tile waits for the drain of the previous
// one. The block structure follows the design description; the host ports
// and their multiplexing onto the SRAMs are this implementation's choice.
module gemm_accelerator
  import gemm_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DIM_W-1:0]  m_size,
  input  logic [DIM_W-1:0]  n_size,
  input  logic [DIM_W-1:0]  k_size,
  output logic              busy,
  output logic              done,
  output logic              stall,
  output mode_e             mode,
  input  logic              host_a_we,
  input  logic [AW-1:0]     host_a_addr,
  input  logic [WORD_W-1:0] host_a_wdata,
  input  logic              host_b_we,
  input  logic [AW-1:0]     host_b_addr,
  input  logic [WORD_W-1:0] host_b_wdata,
  input  logic              host_c_en,
  input  logic [AW-1:0]     host_c_addr,
  output logic [WORD_W-1:0] host_c_rdata
);

  // controller
  logic                           rd_en, mac_en, mac_load, capture, c_we;
  logic [AW-1:0]                  addr_a, addr_b, addr_c;
  logic [3:0]                     a_off, b_off;
  logic [$clog2(DRAIN_BEATS)-1:0] drain_sel;

  gemm_controller #(.AW(AW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .m_size(m_size), .n_size(n_size), .k_size(k_size),
    .busy(busy), .done(done), .stall(stall), .mode(mode),
    .rd_en(rd_en), .addr_a(addr_a), .addr_b(addr_b),
    .a_off(a_off), .b_off(b_off), .mac_en(mac_en), .mac_load(mac_load),
    .capture(capture), .drain_sel(drain_sel), .c_we(c_we), .addr_c(addr_c));

  // SRAM A and B: host writes while idle, controller reads while busy
  logic [WORD_W-1:0] a_word, b_word, c_word;

  single_port_memory #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_sram_a (
    .clk(clk),
    .en   (busy ? rd_en  : host_a_we),
    .we   (!busy && host_a_we),
    .addr (busy ? addr_a : host_a_addr),
    .wdata(host_a_wdata),
    .rdata(a_word));

  single_port_memory #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_sram_b (
    .clk(clk),
    .en   (busy ? rd_en  : host_b_we),
    .we   (!busy && host_b_we),
    .addr (busy ? addr_b : host_b_addr),
    .wdata(host_b_wdata),
    .rdata(b_word));

  // unpack: byte j of a word is vector element j
  elem_t a_vec [VEC_LEN];
  elem_t b_vec [VEC_LEN];
  for (genvar j = 0; j < VEC_LEN; j++) begin : g_unpack
    assign a_vec[j] = a_word[DATA_W*j +: DATA_W];
    assign b_vec[j] = b_word[DATA_W*j +: DATA_W];
  end

  // broadcast network and MAC array
  elem_t op_a [NUM_MAC];
  elem_t op_b [NUM_MAC];
  acc_t  acc  [NUM_MAC];
  acc_t  shadow [NUM_MAC];

  broadcast_network u_bcast (
    .mode(mode), .a_off(a_off), .b_off(b_off),
    .a_vec(a_vec), .b_vec(b_vec), .op_a(op_a), .op_b(op_b));

  pe_array u_array (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .load(mac_load),
    .op_a(op_a), .op_b(op_b), .acc(acc));

  // shadow registers, serializer, SRAM C
  shadow_registers u_shadow (
    .clk(clk), .rst_n(rst_n), .capture(capture), .d(acc), .q(shadow));

  output_serializer u_ser (.res(shadow), .sel(drain_sel), .word(c_word));

  single_port_memory #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_sram_c (
    .clk(clk),
    .en   (busy ? c_we   : host_c_en),
    .we   (busy && c_we),
    .addr (busy ? addr_c : host_c_addr),
    .wdata(c_word),
    .rdata(host_c_rdata));

endmodule
