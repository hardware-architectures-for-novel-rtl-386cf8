# 3-bit FAID decoder for quasi-cyclic LDPC codes

Flash-memory LDPC decoders must reach very low error rates (an uncorrectable
bit error rate near 1e-15) at high code rates (0.88 to 0.94), with little
power. Min-sum decoders with 3-bit messages are small, but they show an
error floor. Getting rid of the floor with min-sum takes 4 or 5 bits per
message, and that costs area and power.

A **finite alphabet iterative decoder (FAID)** keeps 3-bit messages
(values -3..+3). It gets a low error floor in a different way: its variable
node update is not a sum but a designed look-up map. The map depends on
the channel value and on the other incoming messages. The check node
update is unchanged: the sign is the product of the other signs, and the
magnitude is the smallest of the other magnitudes.

This RTL implements such a decoder for quasi-cyclic codes of column weight
four. It processes one whole column block of the parity-check matrix
(4 circulants, 140 variable nodes) per clock cycle, or two with `P = 2`.
It accepts hard-decision reads, and 2-bit soft reads: four levels,
obtained from three reads of the cell.

## Code and default configuration

The parity-check matrix H is an MB x NB array of L x L circulants. Each
column block holds DV shifted identity matrices, each in a different row
block. Row i of a circulant with shift s has its one in column
(i + s) mod L. The defaults describe the rate-0.94, 1 KB code:

| parameter | default | meaning |
|---|---|---|
| `L` | 140 | circulant size |
| `NB` | 64 | column blocks (N = 8960 bits) |
| `MB` | 4 | row blocks (560 checks) |
| `DV` | 4 | column weight = circulants per column block |
| `P` | 1 | column blocks processed per cycle (2 doubles the throughput) |
| `MAX_ITER` | 20 | iteration limit |
| `CH_W1`, `CH_W2` | 1, 2 | channel weights used only for the hard decision |

The two other target codes also use L = 140. The rate-0.91, 1 KB code has
MB = 6 and NB = 66. The rate-0.883, 2 KB code has MB = 16 and NB = 136.
Both run with the same RTL once the parameters are set; the testbench
`tb_faid_decoder_codes` runs both. The base matrix itself (which circulant
sits where, with what shift) is not fixed by the RTL. It is loaded at run
time through the `code_*` ports. After reset the table holds a placeholder
code: row block (j+e) mod MB and shift e*j mod L for slot e of column
block j.

## Messages, channel values and the variable node map

* A message is a 3-bit two's-complement value in -3..+3. The value -4 is
  never produced.
* A channel value is `chan_t {sgn, rel}`. `sgn = 1` means the cell read as
  1, that is, a negative LLR. `rel` picks the magnitude: 1 for the strong
  level C2, 0 for the weak level C1. A hard-decision read is the same
  thing with `rel = 0`, and table 0 then holds the hard-decision map.
* The map Phi(y, m1..m(DV-1)) is stored only for a negative channel value.
  For a positive one the VNU uses the symmetry
  Phi(+C, m) = -Phi(-C, -m).
* Table address: a = sum over i of (m_i + 3) * 7^(DV-2-i). The inputs are
  the other edges in ascending order, the first one most significant.
  With DV = 4 each table has 343 entries.

For column weight three, the reference map for -C (rows m1, columns m2,
both -3..3) is this one. It is the constant `FAID_DV3_MAP` in `faid_pkg`:

```
      -3 -2 -1  0  1  2  3
  -3  -3 -3 -3 -3 -3 -3 -1
  -2  -3 -3 -3 -3 -2 -1  1
  -1  -3 -3 -2 -2 -1 -1  1
   0  -3 -3 -2 -1  0  0  1
   1  -3 -2 -1  0  0  1  2
   2  -3 -1 -1  0  1  1  3
   3  -1  1  1  1  2  3  3
```

No column-weight-four map is fixed in this RTL, so the two tables are
writable (`lut_*` ports, table 0 for C1 or hard C, table 1 for C2). After
reset, a DV = 3 build holds the map above in both tables. Any other build
holds sat(m1 + m2 + m3 - 1), which is only a placeholder. A real FAID
needs a map designed for the code, and its error-floor behaviour comes
entirely from that map.

The hard decision of a variable is the sign of (sum of all DV incoming
messages + channel value weighted by CH_W1 or CH_W2). A zero sum keeps the
channel sign. This rule and the weights are choices of this design.

## Column-serial schedule and the two check-state sets

This is the part that needs the most care. The decoder walks through the
column blocks j = 0..NB-1, one per cycle. Each variable node therefore
needs its check-to-variable messages at the moment its column is visited.
Storing one message per edge would cost 35,840 x 3 bits. Instead, each
check keeps a compressed state `cstate_t`:

* `min1`, `min2`: the two smallest magnitudes seen;
* `idx`: the column block that gave `min1`;
* `sgn`: the XOR of all message signs.

Every check has at most one edge per column block, so `idx` identifies
the edge exactly. The message a check sends back to column block j is:

* sign: `sgn` XOR the sign that column last sent;
* magnitude: `min2` if `idx == j`, otherwise `min1`.

The signs sent by each column are kept in a sign memory. The magnitudes
live only in the check states.

There are two full sets of states in `faid_check_bank`:

* **PREV** holds the states completed in the previous pass. All messages
  of the current pass are read from PREV.
* **CUR** collects the new variable-to-check messages as each column block
  is processed.

At the last column block of a pass, CUR (with that block folded in)
becomes PREV, and CUR is emptied. This makes the result exact and
independent of the
column order. A newly computed message does not reach the other columns
until the next pass, so convergence per pass equals that of flooding
decoding. A schedule that passes new messages on within the same pass
would need per-edge magnitudes, or a merge rule this design does not
have.

One cycle for column block j, in `faid_decoder`:

1. The code table gives the DV row blocks and shifts of block j. The
   channel memory gives its L channel values, and the sign memory the
   DV x L signs it sent last time.
2. For each slot, the PREV states of the row block are rotated from check
   order into variable order (`qc_rotator`, shift L - s). They are then
   turned into check-to-variable messages.
3. L VNUs (`faid_vnu`) produce DV x L new messages and L decisions.
4. The messages and decisions are rotated back into check order (shift
   s) and folded into CUR (`cn_fold`). The decisions are XORed into a
   per-check parity. The new signs and the decisions are written back.

With `P = 2` two column blocks go through steps 1 to 4 side by side. Their
messages are folded into CUR in column order within the cycle, so the
decisions and iteration counts are the same as with `P = 1`, and a pass
takes NB/2 cycles. Each memory is then split into two banks, even and odd
column blocks.

**Pass 0** starts with PREV cleared to all-zero magnitudes. Every incoming
message is therefore 0, the VNUs emit Phi(y, 0, ..., 0), and the decisions
are the channel signs. If the channel word already satisfies every
check, the frame ends after one pass with `iterations = 0`. Pass n > 0 is
iteration n. After each pass the parity of every check is tested. The
first pass whose decisions satisfy all checks ends the frame with
`success = 1`. Otherwise the frame ends after iteration `MAX_ITER` with
`success = 0`.

## Interface and timing

All ports are synchronous to `clk`; `rst_n` is an asynchronous, active-low
reset.

| port | dir | meaning |
|---|---|---|
| `lut_we, lut_sel, lut_addr, lut_wdata` | in | write one map entry |
| `code_we, code_addr, code_rb, code_sh` | in | write one circulant (address = column block * DV + slot) |
| `ch_we, ch_col, ch_wdata[L]` | in | write the L channel values of one column block |
| `start` | in | decode the frame now in the channel memory |
| `busy` | out | high while decoding |
| `done` | out | one-cycle pulse when the frame ends |
| `success`, `iterations` | out | result of the last frame |
| `dec_col` / `dec_data[L]` | in / out | combinational read of the decided bits of one column block |

The protocol:

1. Load the tables (optional), the code and the channel values while
   `busy` is low. Writes while busy are ignored, and an assertion flags
   them.
2. Pulse `start`.
3. `done` rises (NB/P) x (iterations + 1) cycles after the clock edge that
   sampled `start`. There is no bubble between passes.

The worst case at the defaults is 21 x 64 = 1344 cycles, or 13.4 us at
100 MHz (672 cycles with `P = 2`). A decoded frame stays readable until the
next frame's first
pass overwrites it.

## Files

| file | contents |
|---|---|
| `rtl/faid_pkg.sv` | message and state types, the DV = 3 map, `cn_fold` and `cn_c2v` |
| `rtl/faid_decoder.sv` | top level: datapath, memories and rotators |
| `rtl/faid_ctrl.sv` | pass, column and iteration sequencing, early stop |
| `rtl/faid_check_bank.sv` | P and C check states, syndrome parity |
| `rtl/faid_vnu.sv` | one variable node: map lookup and hard decision |
| `rtl/faid_vnu_lut.sv` | the two writable map tables |
| `rtl/faid_code_table.sv` | the base matrix (row block, shift per circulant) |
| `rtl/qc_rotator.sv` | L-lane cyclic shifter |
| `rtl/faid_col_ram.sv` | column-wide memory (channel values, signs, decisions) |
| `tb/faid_ref_pkg.sv` | edge-list reference decoder used by the end-to-end tests |
| `tb/tb_*.sv` | self-checking testbench per module |
| `tb/tb_faid_decoder.sv` | end to end at L = 13, NB = 12, 40 frames, random codewords |
| `tb/tb_faid_decoder_full.sv` | end to end at the default parameters |
| `tb/tb_faid_decoder_codes.sv`, `tb/faid_decoder_env.sv` | the rate-0.91 and rate-0.883 code sizes, and the rate-0.94 code with `P = 2` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

The end-to-end tests build a random QC code and load it with a soft map.
They draw random codewords from the null space of H by GF(2) elimination
(the 2 KB run uses the all-zero word), flip bits, and decode hard and soft
frames. The reference model in `tb/faid_ref_pkg.sv` computes every
check-to-variable message directly from the other edges of its check, not
from compressed states. Each frame must then match the model in:

* decisions;
* success flag;
* iteration count;
* decoding time, (NB/P) x (iterations + 1) cycles.

Each test also counts its mechanisms and fails if one never happened:

* a clean word stopping at pass 0;
* a stop after some iterations;
* reaching the iteration limit;
* soft frames;
* code and table loading.

The unit tests check the following:

* the VNU exhaustively against the printed map, plus random DV = 4 tables;
* the check bank against the sign product and the two smallest magnitudes
  of every check, and the syndrome, including passes whose decisions
  cancel;
* the rotator for every shift;
* the memories, the code table and the controller's cycle timing.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/faid_pkg.sv tb/faid_ref_pkg.sv \
  rtl/*.sv tb/tb_faid_decoder.sv --top-module tb_faid_decoder -o sim
./obj_dir/sim
```

The default-size test takes about 30 s to build and 25 s to run.

## Departures and limits

* **Variants.** Two column blocks per cycle (8 circulants, twice the
  throughput) is `P = 2`. A serial variant that does one circulant per
  cycle, to save logic, is not built.
* **Schedule.** Messages come from the previous pass's complete check
  states (see above). A layered schedule that uses new messages within
  the pass may need fewer iterations than this one.
* **Maps and codes.** The column-weight-four maps and the base matrices
  must be supplied by the user. The reset contents are placeholders, and
  decoding strength with them says nothing about a designed FAID.
* **Hard-decision rule.** The decision rule and the channel weights
  CH_W1 = 1, CH_W2 = 2 are assumptions.
* **Timing closure.** The whole cycle is combinational, with no pipeline
  registers: memory read, rotation, message generation, map lookup,
  rotation and fold. Meeting 100 MHz may need a pipeline stage between
  the VNUs and the fold. That stage would not create hazards, because P
  is only read and C is only written during a pass.
* **Tables as registers.** The map tables are registers read by every
  VNU. A build with a fixed, designed map would fold them into logic.
