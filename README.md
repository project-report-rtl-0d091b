# Flexible-broadcast GeMM accelerator (64 int8 MACs)

This accelerator computes `C = A x B` for int8 matrices A (M x K) and
B (K x N) and produces int32 results. It has 64 multiply-accumulate units
(MACs). A fixed 8x8 array would leave half of them idle on thin outputs such
as 4 x 16 or 16 x 4. Here the 64 MACs are instead regrouped for every run
into a *virtual* array of 4 x 16, 16 x 4 or 8 x 8 rows x columns. The choice
follows the shape of the output, so all 64 MACs work on every cycle of the
K loop.

Each MAC is output-stationary: it owns one element of the current output
tile and adds one product to it per cycle. One 128-bit word from SRAM A (16
elements of a column of A) and one from SRAM B (16 elements of a row of B)
feed all 64 MACs in one cycle. A multiplexer network broadcasts A elements
along the rows of the virtual array and B elements down its columns. After
the last k, the 64 results move in one cycle into a bank of shadow
registers. From there they drain into SRAM C, four results (one 128-bit
word) per cycle. Meanwhile the array already computes the next tile.

```
 SRAM A --128b--> unpack --a_vec[16]--+
                                       +--> broadcast network --> 64 MACs --> shadow regs --> serializer --128b--> SRAM C
 SRAM B --128b--> unpack --b_vec[16]--+        ^ mode, offsets              (64 x 32b)        ^ drain count
                                               |                                               |
                   controller + address generators (mode detection, loops, drain, stall) ------+
```

## Virtual array organisations

| mode        | rows x cols (H x W) | A elements used per fetch | B elements used per fetch | chosen when |
|-------------|---------------------|---------------------------|---------------------------|-------------|
| `MODE_4X16` | 4 x 16              | 4 of 16                   | 16 of 16                  | M <= 4      |
| `MODE_16X4` | 16 x 4              | 16 of 16                  | 4 of 16                   | M > 4, N <= 4 |
| `MODE_8X8`  | 8 x 8               | 8 of 16                   | 8 of 16                   | otherwise   |

MAC `p` sits at virtual row `r = p / W` and column `c = p % W`. It receives
`op_a = a_vec[a_off + r]` and `op_b = b_vec[b_off + c]`. The offsets exist
because a memory word always holds 16 rows of A (or 16 columns of B),
while a tile may need fewer. In 8 x 8 mode, for example, tile rows 0 and 1
read the same A word: tile row 0 uses elements 0..7 and tile row 1 uses
elements 8..15. The rule that picks the mode from M and N is this design's
own choice. It maps the three reference shapes 4x64x16, 16x64x4 and
32x32x32 to the three modes.

The output is covered by `ceil(M/H) x ceil(N/W)` tiles, visited with tile
row outermost, then tile column, then k:

```
for t_m < ceil(M/H): for t_n < ceil(N/W):
    for k < K: fetch A word, B word;  every MAC: acc += A[t_m*H + r][k] * B[k][t_n*W + c]
    hand the tile to the shadow registers; drain it while the next tile runs
```

## Memory layout and address generation

All three SRAMs are 128 bits wide and 4096 words deep. The host must store
A and B in this layout:

* **SRAM A (column slices).** Word `blk*K + k` holds `A[16*blk + j][k]` in
  byte `j` (bits `8j+7:8j`), for j = 0..15. Rows at or beyond M are padding
  (write zero).
* **SRAM B (row slices).** Word `blk*K + k` holds `B[k][16*blk + j]` in byte
  `j`. Columns at or beyond N are padding.
* **SRAM C (row-major, four per word).** Word `row*ceil(N/4) + col/4`
  holds `C[row][4*(col/4) + j]` in bits `32j+31:32j`. Lanes at or beyond N
  in the last word of a row are don't-care.

The address generator (`gemm_agu`) computes, for tile `(t_m, t_n)` and step
`k`:

```
addr_a = floor(t_m*H / 16) * K + k        a_off = (t_m*H) mod 16
addr_b = floor(t_n*W / 16) * K + k        b_off = (t_n*W) mod 16
```

Drain beat `d` (0..15) carries MACs `4d..4d+3`. Since W >= 4, these are four
neighbouring columns of tile row `4d / W`, starting at column `4d mod W`.
That gives C row `t_m*H + 4d/W` and C column `t_n*W + 4d mod W`. A beat
whose row is at or beyond M, or whose first column is at or beyond N, is
not written. This is how partial tiles of unaligned shapes such as 17 x 5
are handled.

Capacity: A needs `ceil(M/16)*K` words, B needs `ceil(N/16)*K` words and C
needs `M*ceil(N/4)` words. Each must be at most 4096.

## Pipeline and timing

The schedule is fixed, with one cycle per stage:

1. **Issue.** In state COMPUTE the controller presents `addr_a` and `addr_b`
   for one k per cycle.
2. **Read and broadcast.** The SRAMs return the words one edge later. The
   per-read controls are registered once so they arrive together with the
   data: valid, first k, last k, offsets and tile coordinates. The broadcast
   network is combinational between the SRAM outputs and the MACs.
3. **Accumulate.** On the first k of a tile a MAC *loads* the product
   instead of adding it. This resets the accumulators without a bubble.
4. **Capture.** One cycle after the last accumulation, `capture` copies all
   64 accumulators into the shadow registers.
5. **Drain.** A 16-beat drain counter selects four results per cycle. The
   serializer forms the 128-bit word, and the address generator gives its
   C address.

Between two tiles the controller spends one cycle in state NEXT_TILE. For a
run of T tiles with K >= 15, `done` therefore rises

```
latency = T*(K+1) + 17   clock edges after the edge that samples start
```

The 17 extra cycles are the SRAM read, the capture and the final 16-beat
drain. This gives 82 cycles for 4x64x16 and for 16x64x4, and 545 cycles for
32x32x32.

**Stall on short K.** A new tile may be captured only after the previous
tile has drained all 16 beats. A capture on the last beat is allowed. When
K < 15, computing a tile takes less time than the drain, so the controller
holds the next tile in NEXT_TILE. A small down-counter `hold` is loaded with
15 at the last read of a tile, and the next tile starts once `hold <= K`.
Each tile start is delayed by `max(0, 15-K)` cycles, so in general

```
latency = T*(K+1) + 17 + (T-1)*max(0, 15-K)
```

An assertion in `gemm_controller` flags any capture that would overwrite
shadow registers that are still draining.

## Performance

These are cycle counts of the RTL at its default size. Ops count as
2*M*N*K, and the peak is 128 ops/cycle.

| workload (MxKxN) | mode  | tiles | ideal cycles | cycles | ops/cycle | of peak |
|------------------|-------|-------|--------------|--------|-----------|---------|
| 4 x 64 x 16      | 4x16  | 1     | 64           | 82     | 99.90     | 78 %    |
| 16 x 64 x 4      | 16x4  | 1     | 64           | 82     | 99.90     | 78 %    |
| 32 x 32 x 32     | 8x8   | 16    | 512          | 545    | 120.25    | 94 %    |
| 64 x 64 x 64     | 8x8   | 64    | 4096         | 4177   | 125.52    | 98 %    |

Each fetch brings in 32 bytes and feeds 128 ops, so the machine sits
exactly at the ridge point of its roofline: 4 ops/byte with 32 bytes/cycle
of operand bandwidth. The loss comes from the pipeline fill and the final
drain, and it shrinks as the number of tiles grows.

## Interface of the top level (`gemm_accelerator`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; `m_size`, `n_size`, `k_size` are sampled with it |
| `m_size`, `n_size`, `k_size` | in | 16 | M, N, K (each at least 1) |
| `busy` | out | 1 | high from start until done |
| `done` | out | 1 | rises after the last C write; stays high until the next start |
| `stall` | out | 1 | a tile start is being held for the drain |
| `mode` | out | 2 | organisation in use (`gemm_pkg::mode_e`) |
| `host_a_we/addr/wdata` | in | 1/12/128 | write SRAM A while `busy` is low |
| `host_b_we/addr/wdata` | in | 1/12/128 | write SRAM B while `busy` is low |
| `host_c_en/addr` | in | 1/12 | read SRAM C while `busy` is low |
| `host_c_rdata` | out | 128 | C word, one cycle after `host_c_en` |

Typical use: write A and B, pulse `start`, wait for `done`, then read C.
While `busy` is high the controller owns all three SRAM ports and host
accesses are ignored.

## Source files

| file | contents |
|------|----------|
| `rtl/gemm_pkg.sv` | sizes, `mode_e`, `log2_h`/`log2_w`, the mode-detection rule |
| `rtl/gemm_accelerator.sv` | top level; SRAM port multiplexing; unpacking of words into bytes |
| `rtl/gemm_controller.sv` | FSM (IDLE, COMPUTE, NEXT_TILE, FINISH), loop counters, pipeline registers, hold/stall, drain, done |
| `rtl/gemm_agu.sv` | A/B/C address formulas and broadcast offsets (combinational) |
| `rtl/ceiling_counter.sv` | wrap-at-ceiling counter used for the k, tile and drain loops |
| `rtl/broadcast_network.sv` | operand multiplexers for the three organisations |
| `rtl/pe_array.sv`, `rtl/mac_pe.sv` | 64 MACs: int8 x int8 products into 32-bit accumulators |
| `rtl/shadow_registers.sv` | 64 x 32-bit capture bank |
| `rtl/output_serializer.sv` | selects four results per drain beat |
| `rtl/single_port_memory.sv` | 128 x 4096 single-port SRAM with a one-cycle registered read |

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=F` at the end.
`tb/tb_gemm_accelerator.sv` runs the whole design at its default parameters
on about 16 shapes. These include the three reference workloads with their
cycle counts, K = 1, unaligned shapes, multi-tile runs of every mode,
64x64x64 and random shapes. It compares every C element with a reference
product computed in the testbench, and it checks that each mechanism
(every mode, stall, drain overlapping compute, skipped padding beats,
non-zero offsets) actually occurred. `tb/tb_gemm_performance.sv` runs
each of the three reference workloads ten times with fresh random data and
prints cycles, ops/cycle and efficiency for each.

## Simulating

```
verilator --binary --timing --assert -Irtl rtl/gemm_pkg.sv tb/tb_gemm_accelerator.sv \
          --top-module tb_gemm_accelerator -o sim
./obj_dir/sim
```

Replace `gemm_accelerator` with any module name to run its unit test. The
full-size end-to-end test finishes in well under a second.

## Design choices and limits

Several points are this design's own choices:

* The start/done handshake, the host ports, the synchronous reset, the
  one-cycle SRAM read latency, the byte and lane order in memory words and
  the row-major C layout.
* The mode-detection rule (M <= 4, then N <= 4, else 8 x 8).
* The one idle cycle between tiles. It is kept because it reproduces the
  reference cycle counts above exactly.
* Handling short K with a stall counter.
* Skipping padded rows and columns during the drain.

Limits and things not built:

* M, N and K must be at least 1. The inputs are 16 bits wide, but the SRAM
  capacity limits the sizes (see above). Nothing checks for overflow of the
  capacity.
* Operands are treated as signed int8. Accumulators wrap at 32 bits.
* Not built: the suggested extra pipeline register between the broadcast
  network and the MACs, which would cost 1024 flip-flops and one cycle of
  latency. Also not built: the scaled variants, a 16 x 16 array of 256 MACs
  and an operand prefetch buffer for reduced bandwidth. These are possible
  improvements, not part of this design.
* The SRAMs are behavioural arrays. A real implementation would map them
  to 128-bit SRAM macros with the same one-cycle read.
