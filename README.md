# Viterbi encoder/decoder with a rotating trace-back survivor memory

This is a small, complete hard-decision Viterbi system for the rate-1/2,
constraint-length-3 convolutional code. It has an encoder, a pseudorandom
channel-error generator and a 4-state decoder, all timed by one clock and
one counter. The interesting part is the decoder's survivor memory. There is
no full trace-back for every decoded bit. Instead, the memory is one ring of
`W+S+D` words that is written once and read `r` times per symbol. Each
trace-back walks `S` words to reach the surviving path and then `D` more
words that give `D` decoded bits at once. The areas of the ring used for
writing, converging and reading out data move around the ring by `W` words
on every trace-back.

The default configuration is `S = 16`, `r:w = 5:1` and `W = D = 4`. That makes
a 24-word × 4-bit memory and 6 clocks per data bit, so the throughput is 1/6 of
the clock rate. The path metrics are 6 bits wide, and because they are compared
by subtraction they may wrap around freely.

## The system

```
            +-------------+  tx_coded (serial: z1, z0)
 txdata --->| conv_encoder|-------------------------------> (loop back in the test bench)
            +-------------+
 rx_coded --->[error_generator]--rx_bit-->+----------------------------------------+
 errorctrl -->|  18-bit LFSR, AND of n   || viterbi_decoder                          |
 errorcnt  <--|  stages, sampled errors  ||  ser_to_par -> acs_array -> survivor_unit |--> rxdata, rxvalid
              +--------------------------+ +----------------------------------------+
                 ^ sample                         ^ count, wrrd_n
                 +------------------ rw_counter (mod r+w) ----------------------
```

`viterbi_top` ports: `clk`, `rst` (synchronous, active high) and `en`. The `en`
input is a global enable: while it is low every register holds. The other
ports are `txdata`, `tx_coded`, `rx_coded`, `errorctrl[3:0]`, `errorcnt[15:0]`,
`rxdata` and `rxvalid`. To loop the channel back, connect `tx_coded` to
`rx_coded`. `txdata` is taken once per period, in the write cycle (see below).
`rxdata` is valid while `rxvalid` is high, which is one clock per period. The
bit taken in period *k* comes out in the write cycle of period *k*+25.

## One period: one write, five reads

The master counter `rw_counter` counts 0…5. `wrrd_n` (write high, read low)
is high at count 0. Every block takes its enable from this count:

| count | encoder / channel | ser_to_par | ACS array | survivor memory |
|---|---|---|---|---|
| 0 | takes `txdata`, registers {z1,z0}; line carries z0 of the previous symbol | – | metrics update | **write** came_from word at WrAddr, then WrAddr+1 |
| 1 | z1 | – | – | read at RdAddr, then RdAddr−1 |
| 2 | z1 | captures z1 | – | read |
| 3 | z1 | – | – | read |
| 4 | z0 | captures z0 | – | read |
| 5 | z0 | – | – | read |

The ACS units compute their came_from bits combinationally during count 0,
from the registered metrics and the symbol captured in the previous period.
The word is written into the memory at the end of that same cycle.

## The survivor ring

The memory holds `N = W+S+D = 24` words. The write address counts up, but only
in write cycles. The read address counts down, but only in read cycles. Both
wrap modulo `N`. After reset the first write goes to address 0 and the reads
then run 23, 22, 21, 20, 19. The next write goes to 1, followed by reads
18 … 14, and so on. Because reads outnumber writes 5:1, the read pointer sweeps
the ring backwards five times as fast as the write pointer moves forwards.

A *trace-back cycle* is `S+D = 20` consecutive reads, counted down from 19 to 0
by `countTB` (module `tb_counter`). It spans exactly `W = 4` periods. For this to
work, the rule `(S+D)/r = W/w` must hold, and `survivor_unit` checks it during
elaboration.

- Trace-back *m* starts at the word written one write before the newest one,
  from state 00. This start state is arbitrary on purpose.
- Its first `S = 16` reads only bring the path onto the survivor, so their
  bits are discarded.
- Its last `D = 4` reads (`countTB` 3…0, `savedata` high) give the data bits of
  four consecutive symbols, newest first.
- The word read last in a trace-back is the very word that the next write
  overwrites. The ring is therefore used completely, with no spare word.

The data bits come out in reverse time order. `out_shift_reg` puts them back
in order. On each `savedata` read it shifts left and takes the new bit in at
`A[0]`. On each write cycle it shifts right and sends `A[0]` out
(`dataout = A[0] & wrrd_n`). After four saves the oldest bit sits in `A[0]`, so
the next four write cycles send the bits oldest first. This gives one decoded
bit per period, which matches the input rate.

A single register is enough only because all `D` data reads fall between two
writes, which needs `D ≤ r`. In schemes with fewer reads per write, such as 2:1
with `W = D = 16`, write cycles arrive in the middle of the data reads. A
bidirectional register would then send out a bit that has only just been
saved. For `D > r`, `survivor_unit` therefore instantiates `dual_shift_reg`
instead, which works as follows:

- A collecting register only ever shifts left, taking one bit on each data
  read.
- On the last data read, the whole group, including that last bit, is copied
  into a second register.
- The second register only ever shifts right and sends `B[0]` out in each
  write cycle.

It takes the `W` writes of one trace-back cycle to empty the second register.
It is therefore empty just as the next group arrives. The output timing is the
same as with the single register.

**Latency.** Trace-back *m* starts at the word of write 4*m*−1 and decodes
writes 4*m*−20 … 4*m*−17. These bits leave in writes 4*m*+4 … 4*m*+7, so every
bit leaves exactly `N = 24` writes after its own word was written. One more
period is spent in the encoder and the serial-to-parallel stage, which makes
25 periods from `txdata` to `rxdata`. The first 24 outputs after reset come
from unwritten memory and are meaningless.

## Following the path backwards

A trellis state is the encoder's 2-bit shift register, `J = {newest, older}`.
New bits enter on the left, so input `x` moves state `{a,b}` to state `{x,a}`.
State `{x,a}` therefore has two predecessors: `{a,0}` (upper) and `{a,1}`
(lower). The ACS unit of state *n* writes bit *n* of the survivor word:

- 0 if the upper predecessor won,
- 1 if the lower predecessor won.

During trace-back (`traceback_unit`):

```
p     = wrd[J]        // came_from bit of the current state
Jnext = {J[0], p}     // its predecessor
d     = J[1]          // the data bit that led into J
```

J goes back to 00 after the last data read of each trace-back.

The code is `z1 = x^s1^s0` (sent first) and `z0 = x^s0`, with generators
111 and 101. The branch metric is the Hamming distance (0…2) between the
received symbol and the symbol expected on that branch.

## Path metrics that may overflow

Metrics only grow, so the 6-bit H registers wrap around on any long message.
`acs_unit` never compares them directly. It forms
`diff = (h_dn + bm_dn) − (h_up + bm_up)` modulo 64 and selects the lower
candidate when the sign bit of `diff` is set. Picture the metrics on a circle
of 64 values. The subtraction tells which of two values lies further
clockwise, as long as they are less than half the circle (32) apart. For this
code the metrics of the four states never differ by more than 24, so the
comparison stays right forever and no rescaling is needed. Ties go to the
upper predecessor.

## Error generator

`error_generator` is an 18-stage shift register with feedback `x0 = x7 ^ x18`.
That is the primitive polynomial 1 + x^7 + x^18, with period 2^18 − 1. The
register shifts every clock. With `errorctrl = n`, the error signal is the AND
of the first *n* stages in a list spread along the register, so it is high on
about 2^-n of the clocks: 6 gives 1/64, 8 gives 1/256, and 0 turns errors off.

The error signal XORs the received bit. Because z1 and z0 are sampled on
different clocks, one error event does not always hit both bits of a symbol.
`errorcnt` counts only the errors that land on a sampling clock, which are the
errors the decoder actually sees.

The LFSR keeps running between samples. That is harmless only while its period
is not a multiple of `r+w`. Otherwise the same error pattern would land on the
same sampling phases in every period of the LFSR. 2^18 − 1 = 262 143 is odd,
so it is never a multiple of 6 or any even `r+w`. It is, however, divisible by
3 and 7, so at the 2:1 and 6:1 schemes the error pattern repeats in step with
the sampling. That does not matter for runs shorter than one LFSR period.

## Parameters

`viterbi_top` has these parameters:

- `R` = 5: reads per write.
- `S` = 16: convergence depth.
- `D` = 4: data bits per trace-back, with `W = D`.
- `HW` = 6: metric width.
- `CNT_W` = 16: width of the error counter.

Any scheme with `S + D = R·D` works. Elaboration stops with an error
otherwise. The table lists the useful schemes with `w = 1`, and last the
plain scheme that decodes one bit per trace-back. All of them are simulated
end to end by `tb_table1_configs`:

| S | r | W = D | memory words | clocks per bit | output register |
|---|---|---|---|---|---|
| 15 | 2 | 15 | 45 | 3 | dual |
| 16 | 2 | 16 | 48 | 3 | dual |
| 16 | 3 | 8 | 32 | 4 | dual |
| 15 | 4 | 5 | 25 | 5 | dual |
| **16** | **5** | **4** | **24** | **6** | single (default) |
| 15 | 6 | 3 | 21 | 7 | single |
| 18 | 7 | 3 | 24 | 8 | single |
| 14 | 8 | 2 | 18 | 9 | single |
| 16 | 9 | 2 | 20 | 10 | single |
| 14 | 15 | 1 | 16 | 16 | single |
| 15 | 16 | 1 | 17 | 17 | single (simple trace-back, one bit each) |

Small `r` buys throughput with memory. The latency is always `2D+S+1`
periods. The address and count widths follow from the parameters. The serial-to-parallel sample points are
derived from `R+1`: z1 at `max(1,(R+1)/2−1)` and z0 at `(R+1)/2+1`.

## Files

| file | contents |
|---|---|
| `rtl/viterbi_pkg.sv` | state/symbol types, encoder output function, Hamming distance, sample points |
| `rtl/viterbi_top.sv` | whole system |
| `rtl/rw_counter.sv` | master mod r+w counter, `wrrd_n` |
| `rtl/conv_encoder.sv` | encoder and serial channel output |
| `rtl/error_generator.sv` | LFSR error injector and counter |
| `rtl/viterbi_decoder.sv` | decoder: ser_to_par + acs_array + survivor_unit |
| `rtl/ser_to_par.sv` | serial-to-parallel |
| `rtl/acs_array.sv`, `rtl/acs_unit.sv` | four ACS units, branch metrics, H registers |
| `rtl/survivor_unit.sv` | survivor memory subsystem |
| `rtl/surv_mem.sv` | 24×4 memory: synchronous write, address-multiplexed read, not reset |
| `rtl/addr_counters.sv` | up-counting write / down-counting read address |
| `rtl/tb_counter.sv` | mod S+D trace-back counter, `savedata`, `end_of_d` |
| `rtl/traceback_unit.sv` | bit select and J register |
| `rtl/out_shift_reg.sv` | bidirectional output register (D ≤ r) |
| `rtl/dual_shift_reg.sv` | two-register output reordering (D > r) |
| `tb/tb_<module>.sv` | one self-checking test bench per module |
| `tb/tb_table1_configs.sv`, `tb/tb_ber_sweep.sv` | system runs at all schemes / bit-error-rate sweep |
| `tb/surv_checker.sv`, `tb/sys_checker.sv` | parameterised helpers used by the benches above |

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
To build and run one, for example the whole-system test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/viterbi_pkg.sv tb/tb_viterbi_top.sv \
          --top-module tb_viterbi_top -o sim
./obj_dir/sim
```

The test benches read no files, and each one runs in well under a second.

## What the test benches check

- `tb_viterbi_top` runs the whole system at default sizes with the channel
  looped back.
  - With no errors it sends all 0s, all 1s, 00000 followed by 1s,
    alternating bytes of 0s and 1s, 0101…, random data, and random data with
    `en` stalls. Every decoded bit must equal the bit sent 25 periods earlier.
  - It then sends 20 000 random bits with `errorctrl = 6`. `errorcnt` must
    equal the number of flips seen at the sampling clocks, and the decoded
    error rate must be under 1/20 of the channel error count. A typical run
    counts about 650 channel errors and about 10 decoded errors.
  - It also counts, and requires at least once: writes, reads, trace-back
    restarts, data reads, write- and read-address wrap, metric wrap, stalls
    and sampled errors.
- `tb_viterbi_decoder` feeds the decoder from its own encoder model. It runs
  clean, then with isolated single-bit errors (which must all be corrected),
  then with stalls, and checks the 25-period latency.
- `tb_table1_configs` runs the whole system at all eleven schemes of the table
  above. Each run is error free and checks the exact latency.
- `tb_ber_sweep` sends 100 000 random bits at each error setting, compares
  the decoded error rate with the channel error rate, and prints a table. One
  run gave:

  | errorctrl | channel errors counted | channel BER | decoded errors | decoded BER |
  |---|---|---|---|---|
  | 4 | 12504 | 0.0625 | 1551 | 0.0155 |
  | 5 | 6309 | 0.0315 | 164 | 0.0016 |
  | 6 | 3189 | 0.0159 | 10 | 0.0001 |
  | 7 | 1567 | 0.0078 | 4 | 0.00004 |
  | 8 | 800 | 0.0040 | 0 | 0 |
  | 9 | 411 | 0.0021 | 0 | 0 |

  It also checks that the spread of the four path metrics stays within 24.

- `tb_survivor_unit` compares every output bit with a reference trace-back
  computed from the history of random survivor words. It does this at
  (16,5,4), (16,9,2), (16,2,16) and (15,4,5). The last two use the dual
  register.
- `tb_dual_shift_reg` runs the dual register in the 2:1 schedule, with writes
  in the middle of the data reads.
- `tb_acs_array` replays a 10-step worked trellis example, checking its
  printed metrics, then runs 2000 random steps against an integer model.
- `tb_acs_unit` checks the wrap-safe comparison against unbounded integers.
- `tb_error_generator` checks that the period is exactly 2^18−1 and that
  exactly 4096 error clocks occur per period at `errorctrl = 6`. It also
  checks the counting rule.
- The remaining benches check their counters and registers against small
  models.

## Design choices and departures

- **Code generators.** The generators (111, 101) and the order z1-first were
  chosen because they reproduce the metrics of the worked trellis example
  that the design was checked against.
- **Channel slots.** The source's timing map puts z1 on cycles 0–2 and z0 on
  3–5. Here the encoder registers its symbol at the end of cycle 0, so the
  slots move one cycle later (z1 on 1–3, z0 on 4, 5 and 0). The sample points
  stay at 2 and 4.
- **Trace-back start.** Each trace-back starts from state 00 instead of the
  best-metric state. This relies on `S` = 16 ≈ 5 × constraint length for
  convergence.
- **Enable and reset.** `en` as a global enable, the synchronous reset, the
  LFSR seed (1), the AND tap list, the `errorctrl` encoding and the 16-bit
  error counter are all this design's choices.
- **Error counter width.** The 16-bit error counter wraps after 65 535 counted
  errors. That is enough for 100 000-bit runs at 1/64, but not at very high
  error rates.
- **Metric width.** The spread of the four metrics is taken as at most 24,
  which gives 6 bits with the subtraction compare. A smaller spread (about 5)
  would allow 4 bits, but this design keeps the safer 6. `tb_ber_sweep`
  watches the spread on every clock over all 600 000 bits. The largest spread
  it saw was 3.
- **Output register selection.** The rule that picks the dual output register
  when `D > r` is this design's reading. The source describes the dual
  register for fast schemes and the single one for 5:1 and slower.
- **Clock rate.** No timing or area figures are given here. At 6 clocks per
  bit, a 1.4112 Mb/s CD-audio stream would need an 8.5 MHz clock.
