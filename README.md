# Partly parallel LDPC decoder, (3,6)-regular, 9216-bit codewords

This is synthesizable SystemVerilog for a decoder of a rate-1/2 low-density
parity-check (LDPC) code. The code has 9216-bit codewords and 4608 parity
checks. Every bit takes part in 3 checks and every check covers 6 bits. The
decoder runs log-domain belief propagation (sum-product), up to 10
iterations, and stops early once every parity check is satisfied.

The main idea is to build the code so that its structure is the hardware.
The parity check matrix is an 18 x 36 *base matrix* in which every 1 becomes a
cyclically shifted 256 x 256 identity matrix and every 0 becomes a 256 x 256
zero block. The hardware is the Tanner graph of the small base matrix: 36
variable node units (one per base column) and 18 check node units (one per
base row), joined by fixed wires. Each unit processes the 256 expanded nodes of
its group one per clock. The expansion factor L = 256 (the *folding factor*)
trades throughput for area. Because every block is a shifted identity, no
switching is needed between the units: plain counters started at the right
offsets supply the memory addresses.

## The code

The base matrix (row i: the six 0-based base columns it checks) is
`ldpc_pkg::BASE_COLS`:

```
 0:  4  5  6 17 24 32      9:  8  9 15 18 23 26
 1:  3  5 12 14 22 34     10: 10 18 20 25 31 34
 2:  1  6 12 17 27 35     11: 19 25 27 28 30 33
 3:  2  9 10 25 31 33     12:  2  4  9 16 20 21
 4:  7 10 11 28 29 35     13:  7 11 13 21 24 26
 5: 11 15 19 20 26 27     14:  0  3 13 14 15 16
 6:  1  2 29 30 32 35     15:  0  4  5  6 12 30
 7:  8 13 22 23 28 31     16: 14 16 18 21 22 34
 8:  0  1  3 17 23 24     17:  7  8 19 29 32 33
```

Every column appears exactly three times. The 1 at 1-based base position
(i, j) becomes an L x L identity whose columns are shifted by

    P(i,j) = ((i-1) * j) mod L

so row r of that block (0-based) checks column (r + P) mod L of the block.
With L = 256 this gives the 4608 x 9216 matrix.

Codeword bit n = j*L + d is variable node d of group j, where j is the base
column. Its messages live at address d of every RAM of processing element j.

The all-zeros and all-ones words are both codewords, because every check
covers six bits; the testbenches use both.

## Message formats

All messages are fixed point with 5 fractional bits.

| signal | width | format |
|---|---|---|
| intrinsic message z (channel LLR) | 8 | two's complement, +: bit 0 more likely, range -4 to +3.97 |
| check-to-variable message | 8 | sign-magnitude `{sign, mag[6:0]}` |
| variable-to-check hybrid word | 9 | `{hd, sign, mag[6:0]}`: the variable's current hard decision and its message |

The magnitude of a message is already passed through f. In the log-domain
algorithm used here, f(x) = ln((1+e^-x)/(1-e^-x)) is applied on both sides:
- The variable node sends sign(γ)·f(|γ|).
- The check node sends the XOR of the other signs, with magnitude f(Σ other magnitudes).

f is its own inverse, so no other nonlinearity is needed.

f is a 170-entry, 7-bit table (`ldpc_lut`), computed at elaboration as
`min(127, round(32·f(x/32)))`. f(0) reads 127, and any input of 170 or more
reads 0.

Carrying the hard decision along with every variable-to-check message lets the
check node units compute the parity checks (the syndrome) in the same pass as
the messages. This is what makes early termination free.

## One frame: phases and pipeline

`ldpc_ctrl` runs a frame as a sequence of phases. Each phase has L issue cycles
and then 2 drain cycles.

1. **INIT.** On cycle t the 36 intrinsic messages of address t arrive on
   `llr_in`. They are stored in the INIT RAMs. They also go through the
   variable node units with all check messages set to zero. This writes the
   first variable-to-check words, sign(z)·f(|z|), into RAM 1-3, and the first
   hard decisions into DEC RAM.
2. **CHECK.** This is check node processing. On cycle t, check node unit i
   works on check t of its group:
   - read: RAM k of PE j is read at address (t + P) mod L;
   - exchange: the nine-bit words travel through the shuffle network;
   - compute: the check node unit works out the six messages;
   - exchange: the messages travel back;
   - write: they are written to the same words two cycles later.

   The 18 parity results are ORed over the phase. If no check failed, the
   frame ends here with `converged = 1`. The decoded bits are then the hard
   decisions already in DEC RAM.
3. **VAR.** This is variable node processing. All RAMs of a PE are read at
   address t. The variable node unit combines the three check messages with
   the intrinsic message. It writes the three new hybrid words back to the same
   address, and the hard decision to DEC RAM. One iteration is now complete.
   After `MAX_ITER` (10) iterations the frame ends with `converged = 0`.

The read-to-write latency is 2 cycles: one for the synchronous RAM read and
one for the pipeline register inside each node unit. During a check phase a
RAM word can be written as late as the phase's last cycle, and the next phase
may read any word first. So each phase drains for 2 cycles before the next
one reads.

Cycle counts, from the clock edge that samples `start` to the edge that
samples `done` high:

- a frame that stops in the check phase after r iterations: (L+2)(2r+2) + 1;
- a frame that hits the limit: (L+2)(2·MAX_ITER+1) + 1 = 5419 at the defaults.

At a 48 MHz clock the worst case is 9216 bits per 5419 cycles = 81.6 Mbit/s.
Frames that converge early are faster. In simulation, frames at a noise
standard deviation of 0.4 take 1 or 2 iterations, which is about 350 Mbit/s at
48 MHz.

## Check node unit (`ldpc_cnu`)

The unit has six 9-bit inputs and six 8-bit outputs, plus the parity result.

- The hard-decision bits go through an XOR chain, which gives the parity
  result (1 means the check failed).
- The sign bits go through a second XOR chain. Each output sign is the total
  XOR with the edge's own sign removed.
- The six 7-bit magnitudes go into prefix and suffix adder chains. After the
  pipeline register, prefix[p] + suffix[p] is the sum of the other five
  magnitudes. This 10-bit sum is saturated to 9 bits and looked up in f.

## Variable node unit (`ldpc_vnu`)

The unit has three 8-bit check messages y and the 8-bit intrinsic message z.

- Each y is converted from sign-magnitude to two's complement (b_k).
- The pairwise sums (b_1+b_2, b_0+b_2, b_0+b_1) and the total are formed.
- After the pipeline register, which also holds z, z is added:
  - γ_k = z + (sum of the other two b) is the extrinsic value for edge k;
  - λ = z + b_0 + b_1 + b_2 is the posterior value, and hd = (λ ≤ 0).
- Each 10-bit γ_k goes back to sign-magnitude. Its magnitude is saturated to
  8 bits and looked up in f, giving output word k: `{hd, sign(γ_k), f(|γ_k|)}`.

## Memories, addresses and the shuffle network

Each processing element (`ldpc_pe`) holds one variable node unit and these memories:

| memory | size | contents |
|---|---|---|
| INIT RAM | L x 8 | intrinsic messages |
| RAM 1, 2, 3 | L x 9 | messages shared with the 1st, 2nd and 3rd neighbouring check group (increasing base row) |
| DEC RAM | L x 1 | hard decisions, with an external read port |

The variable-to-check word and the check-to-variable message of one edge share
a word of RAM k. Each phase overwrites, in place, what the previous phase left
there. A multiplexer picks the write data: the shuffle network in check phases,
the variable node unit otherwise.

Why counters are enough: in check phase cycle t, CNU i handles check t of its
group. For the edge to column j, that check is joined to variable
(t + P(i,j)) mod L. So RAM k of PE j, which faces CNU i, is read with a counter
that starts at P(i,j) and counts up modulo L. Each RAM gets a different start,
so the address generator of a PE (`ldpc_addr_gen`) has three counters. In
variable and init phases all three start at 0. The write addresses are the
read addresses delayed by two cycles.

`ldpc_shuffle_ag` holds the 36 address generators and the fixed network:
- Input p of CNU i is joined to RAM k of PE j, where j is the p-th column of
  base row i and k is the position of row i among the rows of column j.
- Forward (9-bit) and backward (8-bit) wires are separate.
- The wiring is derived at elaboration from `BASE_COLS` by the functions in
  `ldpc_pkg`.

## Top level (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | begin a frame; only while `busy` = 0 (asserted) |
| `in_ready`, `in_addr` | out | 1, log2 L | load cycle and address d being loaded |
| `llr_in[36]` | in | 8 each | during a load cycle: `llr_in[j]` = LLR of bit j*L + `in_addr` |
| `busy` | out | 1 | frame in progress |
| `done` | out | 1 | one-cycle pulse at the end of a frame |
| `converged` | out | 1 | every parity check satisfied (held until next start) |
| `iterations` | out | log2(MAX_ITER+1), 4 | iterations run (held) |
| `dec_raddr`, `dec_rdata` | in, out | log2 L, 36 | one cycle after address d, `dec_rdata[j]` = decoded bit j*L + d |

The load is not flow-controlled. Once `start` has been taken, the source must
supply a new 36-LLR word on each of the next L cycles, indexed by `in_addr`.
The decoded word is valid from `done` until the next `start`.

Parameters: `L` (default 256) and `MAX_ITER` (default 10). The address
counters wrap at L, so L need not be a power of two; the address generator and
the whole decoder are tested at L = 20 as well as at L = 256. The base matrix
and the widths are fixed in `ldpc_pkg`.

## Departures from the original design and choices made here

- **Cycle count.** The original schedule is 2L cycles per iteration plus L for
  initialization. Here each phase takes 2 extra drain cycles, for the pipeline
  registers and the synchronous RAM read, giving (L+2)(2r+1).
- **RAM ports.** The original design clocked its block RAMs at twice the
  decoder clock, to read and write in one cycle. Here each RAM has one read
  port and one write port on the decoder clock. A read of the word being
  written returns the old word.
- **Intrinsic message width.** The intrinsic message is 8 bits, with range
  -4 to +3.97. A 10-bit format (5 fractional bits) was also described for it. The
  8-bit width matches the RAM and datapath widths the architecture uses.
  Strong channel LLRs therefore saturate. At σ = 0.4, 2y/σ² is usually above
  4.
- **Interfaces.** The load interface (36 LLRs per cycle during INIT), the DEC
  RAM read port, the `done`/`converged` handshake and the synchronous reset
  are choices made here.
- **Saturation.** The check node sum is saturated to 9 bits, and the
  variable-node magnitudes to 8 bits, before the table. The table rounding
  (to nearest) is also chosen here.
- **Iteration limit.** When the limit is hit, the hard decisions of the last
  iteration are not checked again, so `converged = 0` means "not shown to be
  a codeword".
- **Bit and port order.** The bit order inside the hybrid word, the mapping of
  RAM k to the k-th neighbouring check group, and the ordering of CNU inputs
  by increasing column are choices made here.
- **Not included.** The FPGA clock manager and the vendor ROM/RAM cores are
  replaced by plain RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/ldpc_ref_pkg.sv` is an independent
integer model of the arithmetic: the dense base matrix, the shift rule,
f computed at run time, and the node updates.

| testbench | what it checks |
|---|---|
| `tb_ldpc_decoder` | full size (L = 256). Four frames: noiseless, two at σ = 0.4 (all-zeros and all-ones codewords), one at σ = 1.2. Each is compared bit for bit with a software decoder: decoded bits, `converged`, iterations, exact cycle count. It requires all three ways a frame can end (at once, after iterating, at the limit). |
| `tb_ldpc_decoder_small` | the same method at L = 20 and `MAX_ITER` = 4 (720-bit codewords): counters that wrap at a non-power of two, a different iteration limit, nine frames |
| `tb_ldpc_awgn` | full size, 12 frames at σ = 0.4. Bit-exact comparison. Reports bit and frame errors, mean iterations and throughput at 48 MHz. |
| `tb_ldpc_ctrl` | phase sequence, stage timing, presets, parity failures on the first, middle and last cycle of a check phase, iteration limit |
| `tb_ldpc_pe` | INIT/CHECK/VAR/CHECK on one PE against a model of its RAM contents and DEC RAM |
| `tb_ldpc_shuffle_ag` | every forward and backward wire, and every check-phase address, against the dense matrix |
| `tb_ldpc_cnu`, `tb_ldpc_vnu` | random and corner inputs (saturating sums, λ = 0, zero inputs) against the model, with latency 1 |
| `tb_ldpc_lut`, `tb_ldpc_ram`, `tb_ldpc_addr_gen` | all table entries; random read/write with collisions; counter sequences for L = 20 and L = 256 |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  --top-module tb_ldpc_decoder rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

Replace the testbench name for the others. Each full-size test runs in well
under a second.

What this shows and what it does not:
- The RTL agrees bit for bit with an independent model of the algorithm at the
  fixed-point formats above.
- Error-rate performance was not characterised beyond the frames listed.
- No FPGA timing or resource results were produced.

## Changing it

- **Folding factor.** Change `L`. The shifts, counters and RAM depths follow
  it.
- **A different base matrix of the same degrees.** Replace `BASE_COLS` in
  `ldpc_pkg`, and the dense rows in `tb/ldpc_ref_pkg.sv` for the testbenches.
  Each column must appear exactly three times.
- **Message widths.** The widths are package constants. The CNU and VNU
  internal sums (10 bits) are sized for them and need revisiting if they
  change.
