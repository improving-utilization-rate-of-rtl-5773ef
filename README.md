# Semi-parallel 2-bit SC polar decoder with precomputation and look-ahead

This is SystemVerilog RTL for a successive-cancellation (SC) decoder for polar codes. It uses only
P processing elements (PEs), far fewer than the code length N. The decoder is a semi-parallel
design: a stage with more butterflies than PEs is spread over several clocks, so the PEs stay busy
most of the time. Two techniques cut the number of clocks:

* **Precomputation.** One PE activation computes the f value of a butterfly and *both* possible g
  values (`La+Lb` for partial sum 0, `Lb-La` for partial sum 1). A g value is then chosen when it is
  read back, not computed a second time. Each stage therefore runs only half as often as in a plain
  SC decoder.
* **2-bit decisions with look-ahead.** The last stage is replaced by a decision node (D node) that
  decides two bits from two stage-1 LLRs. Four more D nodes decide the next two bits under every
  possible partial sum, and a MUX picks the right pair. Each decision clock therefore yields four
  bits.

At the default size (N = 1024, P = 64, 5-bit LLRs) a frame decodes in **784 clocks**. In general
the decoding time is

    NC = N/4 + sum_{l=1}^{n-1} 2^(n-l-1) * max(1, 2^l / P)
       = 0.75 N + N/(2P) * log2(N / (4P))      (for N >= 4P)

That gives 47, 95, 192, 388 and 784 clocks for N = 64 ... 1024 with P = 64, and 6 clocks for the
N = 8, P = 2 example below. The PE utilisation, N log2 N / (2P * NC), is then 0.064, 0.074, 0.083,
0.093 and 0.102. The testbenches check each of these numbers.

## Decoding order

Let N = 2^n. The channel LLRs are "stage n". A stage-l activation takes a node's 2^(l+1) LLRs
(stage-l+1 values). It runs 2^l butterflies, the pairs `(x[j], x[j+2^l])`, and stores 2^l f values
and 2^l g pairs. The decoder walks the SC tree depth first:

1. After a frame is loaded: stages n-1, n-2, ..., 1, each reading the f values the stage above
   wrote (stage n-1 reads the channel).
2. A decision clock decides bits i..i+3 from the stage-1 results.
3. Let i' = i+4 and t = trailing zeros of i'. The decoder now enters the right child of size 2^t.
   Stage t-1 reads the g candidates of stage t. For each operand it takes the subtracted value if
   the partial sum of the just-finished left sibling is 1, and the added value otherwise. The
   stages below it read f values again. Then comes the next decision clock.

Example, N = 8, P = 2:

| clock | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| PEs | stage 2, butterflies 0,1 | stage 2, butterflies 2,3 | stage 1 (f) | | stage 1 (g, sums of u0..u3) | |
| decision | | | | u0..u3 | | u4..u7 |

A stage-l activation takes max(1, 2^l/P) clocks. Stage l runs 2^(n-l-1) times per frame, and there
are N/4 decision clocks. Adding these up gives NC above.

## Blocks

| module | role |
|---|---|
| `polar_sp_decoder` | top: wires the blocks below, holds the stage-1 decision register |
| `sc_controller` | schedule FSM: stage, clock in stage, bit index, RAM addresses, g-select enable, channel pages |
| `channel_buffer` | captures P channel LLRs per transfer, writes them to a channel page the next clock |
| `llr_memory` | three internal LLR banks (F, G+, G-) and a two-page channel RAM, each a lo and a hi `llr_ram`; MUX channel/internal |
| `llr_ram` | one RAM of P*Q-bit words, synchronous write, asynchronous read |
| `pe_array` | P `pe`s and the operand MUX (lo/hi lanes, in-word shift, g candidate select) |
| `pe` | f = sign·min(abs), g+ = La+Lb, g- = Lb-La, saturating |
| `ppu` | partial-sum unit: running encoding of the decided bits, routed to the PEs |
| `d_unit_la` | look-ahead decision unit: 5 `d_node`s and a 4:1 MUX, four bits per clock |
| `d_node` | two-bit decision from two stage-1 LLRs and two frozen flags |
| `frozen_mem` | frozen-bit table, N/4 words of four flags, writable |
| `polar_pkg` | saturation, memory map and latency functions |

### Memory map (the hardest part to see from the code)

Every stage's output vector (2^m LLRs for stage m) has a fixed region, the same in all three banks.
The channel LLRs ("stage n") live in a separate channel RAM with two pages. Their addresses follow
the internal stages, and a read there returns the page being decoded on the F outputs.

* A vector of at least 2P LLRs is split in halves. The lower half is stored in the **lo** RAM and
  the upper half in the **hi** RAM, at the same addresses, P LLRs per word. Butterfly j pairs
  element j with element j + 2^l, and 2^l is exactly half the vector. So clock c of a large stage
  reads the same address c in both RAMs and gets P upper operands (lo) and P lower operands (hi).
* A vector of P LLRs or fewer fits in one lo word. The PE array then pairs lane k with lane
  half + k of that word.
* A stage's results for clock c go to the lo RAM in the first half of its clocks and to the hi RAM
  in the second half. This matches how the next stage down will read them.

Region m takes max(1, 2^m/(2P)) words in each of lo and hi. At N = 1024, P = 64 each of the F,
G+ and G- banks has 2 x 12 words and the channel RAM 2 pages x 2 x 8 words, all 320 bits wide.
Stage-1 results are not stored in RAM. They go into a small decision register, which the decision
unit reads in the next clock.

All RAMs share one read address, and one write address serves the three internal banks. The
channel RAM has its own write port, so the channel buffer can fill one page while the PEs read the
other. A PE clock reads 6 words and writes 3 words, so it runs a butterfly pass in one clock. The
path is RAM read, g MUX, PE, then RAM write.

### Partial sums

`ppu` holds an N-bit register `x` that always equals the polar encoding of the bits decided so
far, with undecided bits counted as 0 (G = F^{⊗n}, F = [[1,0],[1,1]], natural index order). Each
decision clock brings bits i..i+3, and i is a multiple of 4. These are encoded into
`b = (u0^u1^u2^u3, u1^u3, u2^u3, u3)`, and `b[j mod 4]` is XORed into every `x[j]` whose
`j >> 2` is a bitwise subset of `i >> 2`. That is one XOR level after a 4-bit encoder, whatever N
is.

When a left sibling of size S has just finished at bit index i', `x[i'-S .. i'-1]` holds exactly
its partial sums. No later bit can have reached those positions yet. The select base from the
controller (`i' - 2^(l+1) + c*P`) and the butterfly span pick the 2P bits that PE k needs for its
upper (`sa[k]`) and lower (`sb[k]`) operand.

### Decision node and look-ahead

For stage-1 LLRs `La`, `Lb`, with sign = 1 for negative and `comp = |La| >= |Lb|`:

    u(2i)   = !fr1 & (sign(La) ^ sign(Lb))
    u(2i+1) = !comp&!fr2&sign(Lb) | comp&!fr1&!fr2&sign(Lb) | comp&fr1&!fr2&sign(La)

This is the SC hard decision on f(La, Lb), followed by the one on g. Frozen bits are 0. If g is
exactly zero, u(2i+1) follows the sign of `La` when bit 2i is frozen and the sign of `Lb`
otherwise. The look-ahead unit decides u(4k), u(4k+1) from the two stage-1 f values. At the same
time it runs D nodes on all four combinations of the g candidates for bits 4k+2 and 4k+3. The MUX
then selects by `(u(4k)^u(4k+1), u(4k+1))`.

## Interface and timing (`polar_sp_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `frz_we`, `frz_addr`, `frz_data` | in | 1, log2(N/4), 4 | frozen table: word k holds the flags of bits 4k..4k+3 (bit j = bit 4k+j, 1 = frozen); write only while `busy` is low |
| `llr_valid`, `llr_ready`, `llr_in` | in/out/in | 1, 1, P*Q | channel LLRs: transfer w carries LLR w*P+k in lane k (Q-bit two's complement, bits k*Q +: Q); N/P transfers per frame (one if N <= P) |
| `u_valid`, `u_idx`, `u_bits` | out | 1, log2 N, 4 | four decided bits: `u_bits[j]` = u(u_idx + j) |
| `busy`, `done` | out | 1 | busy during decoding; `done` comes with the last `u_valid` |

`llr_ready` is high while a channel page is free and the frame being loaded is not yet complete.
Each group is written to RAM one clock after it is accepted. When the decoder is idle, decoding
starts on the clock after the last group is written and lasts NC clocks. `u_valid` is high in the
decision clocks.

Loading overlaps decoding. The channel RAM has two pages, so the next frame can be sent while the
current one decodes. If it is complete by the time `done` is high, it starts on the very next
clock, so the decoder delivers one frame every NC clocks. `llr_ready` stays low while both pages
hold frames. Every frame in flight uses the one frozen table, so change the table only while
`busy` is low.

Parameters are `N` (code length, power of two, at least 8), `P` (PEs, power of two, 2 <= P) and
`Q` (LLR bits, default 5). Defaults: N = 1024, P = 64, Q = 5.

## Numbers

LLRs are Q-bit two's-complement integers with no fractional bits. PE results saturate to
±(2^(Q-1)-1), which is ±15 for Q = 5. The symmetric range keeps every magnitude within Q-1 bits.
Input LLRs should also lie in that range. An input of -16 is accepted, and the PE treats its
magnitude as 16 before saturating.

## Where this RTL departs from the reference architecture

* **Memory order.** The reference architecture keeps channel LLRs in bit-reversed order in its
  banks. This RTL uses the lo/hi split described above. That gives internal banks of about the
  same depth (24 words here, against 26).
* **Partial-sum unit.** The reference PPU is a recursive pipelined structure with about N/2
  registers. This one uses N registers holding the running encoding, with one XOR level per
  update. At the default N = 1024 that is 1024 flip-flops. For very long codes (N = 2^17) it would
  dominate the flip-flop count.
* **Frozen table.** It is a writable RAM, four flags wide because look-ahead consumes four bits
  per clock, rather than a two-bit-wide ROM.
* **Channel storage.** Channel LLRs are not kept in the F bank. They have their own RAM with two
  pages, so a frame can be loaded while the previous one decodes. At the default size this costs
  16 more 320-bit words than a single channel region would. All LLR storage together is 33,280
  bits, against 30,080 bits for the reference architecture's memory count
  ((3(N-2) + 3(2P log2 P - 2P + 2) + N) * Q).
* **RAM read.** Reads are asynchronous (distributed-RAM style), so read, PE and write-back fit in
  one clock. On an FPGA block RAM with registered reads, the schedule would need one clock of read
  prefetch.
* **Decision register.** Stage-1 results go to a register, not to RAM. PEs 0 and 1 produce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_polar_sp_decoder` runs the defaults (N = 1024, P = 64). It decodes nine frames at three code
  rates and two noise levels. Frames come in groups of three that share a frozen set. The second
  frame of a group is loaded while the first one decodes. The third is held off by `llr_ready`
  until a channel page is free. Every decided bit is compared with a bit-serial reference SC
  decoder in `decoder_harness`, which uses the textbook recursion and the same arithmetic. In
  frames whose noise cannot flip a channel sign, the bits must also equal the transmitted message.
  Each frame must take 784 clocks (utilisation 0.102). A preloaded frame must start on the clock
  after the previous `done`. The harness counts, and requires, back-to-back frames, held-off
  input, right-child g selection, the subtracted g candidate, multi-clock stages, split and
  single-word stages, hi-RAM writes, saturation, all four look-ahead MUX inputs and all four
  frozen patterns of a bit pair.
* `tb_latency_sweep` does the same at N = 64, 128, 256, 512 (P = 64) and N = 8 (P = 2). It expects
  47, 95, 192, 388 and 6 clocks, and utilisation 0.064, 0.074, 0.083 and 0.093 for the P = 64
  sizes.
* `tb_large_codes` decodes at N = 2^15 and N = 2^17 (P = 64). It expects 26368 and 107520 clocks
  and takes about a minute.
* `tb_sc_controller` checks the schedule clock by clock against an independently listed schedule
  and memory map, for N = 8/P = 2, N = 64/P = 8 and N = 1024/P = 64. It also checks the page
  handover when frames run back to back.
* `tb_pe` and `tb_d_node` are exhaustive. `tb_d_unit_la`, `tb_pe_array`, `tb_ppu`,
  `tb_llr_memory`, `tb_llr_ram`, `tb_channel_buffer` and `tb_frozen_mem` are random and
  model-based.

Run a testbench with plain Verilator from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb rtl/polar_pkg.sv \
        tb/tb_polar_sp_decoder.sv --top-module tb_polar_sp_decoder -o sim
    ./obj_dir/sim

To try another size, change the parameters of `decoder_harness` in a testbench. For example,
`.N(4096), .P(64)` expects 0.75·4096 + 32·4 = 3200 clocks.

Not covered: error-rate curves (the harness checks exactness against the reference, not BER),
FPGA timing and resource figures, and code constructions. The frozen set is an input.
