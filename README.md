# A programmable Rake-receiver processor

A CDMA receiver (WCDMA, TD-SCDMA, and with a different front end IEEE 802.11b)
gets its signal over several propagation paths, each with its own delay and
phase. A *Rake* receiver gives each strong path a "finger": it delays the
paths so they line up, undoes the spreading codes on each one, and adds them,
weighted by their channel estimates (maximum ratio combining, MRC). Rake
receivers are normally fixed-function hardware per standard. This design does
the whole job in software, on a small DSP core built for it:

* **One instruction is issued per clock cycle**, as on a simple RISC, but
  *vector instructions* hand a whole loop (de-scramble 256 samples, correlate
  64 offsets) to a SIMD cluster and then run for many cycles. The controller
  goes on issuing ordinary instructions (address set-up, loop control, the next
  configuration) while the vector runs. This gives VLIW-like parallelism
  without VLIW instruction words.
* **Two different SIMD clusters.** One is a 4-way complex ALU whose
  "multiplier" can only multiply by 0, ±1, ±j and ±1±j. That is all that
  de-scrambling, de-spreading and correlation with ±1 codes need. The other is
  a 2-way full complex MAC for channel weighting, |x|², maximum search and FFT
  butterflies.
* **Data never gets copied.** Samples live in five small single-port memories
  behind a *partial* interconnect. Two of the memories can be reached by both
  clusters. When one task is done, the two clusters *swap* those memories.
* **One circular buffer aligns all fingers.** A single single-port memory with
  one write address generator and four read address generators serves all
  four fingers. Its five accesses per sample are time-interleaved.

The top module is `rake_processor`. Everything below it is synthesizable
SystemVerilog-2017. The only part that is not modelled is the analog front
end: its complex sample stream enters through top-level ports.

## Contents

| file | what it is |
|---|---|
| `rtl/rake_pkg.sv` | shared widths, complex types, memory request/vector types, operation enums, config bus, unit numbers |
| `rtl/risc_pkg.sv` | instruction encoding of the controller |
| `rtl/rake_processor.sv` | top: wires controller, clusters, memories, network and delay buffer |
| `rtl/risc_controller.sv` | single-issue controller: 16-bit RF, ALU/shift, MAC, branches, vector issue, IDLE |
| `rtl/integer_memory.sv` | 16-bit data memory of the controller |
| `rtl/alu_cluster.sv` | ALU SIMD cluster: sequencing, code generators, load/store units, 4-way ALU |
| `rtl/vector_alu.sv`, `rtl/alu_lane.sv` | four short-multiplier lanes with accumulators, per-lane code select, lane adder tree |
| `rtl/scrambling_code_gen.sv` | Gold-code (de-scrambling) generator |
| `rtl/ovsf_code_gen.sv` | OVSF code generator, four codes at once |
| `rtl/cmac_cluster.sv`, `rtl/vector_cmac.sv` | CMAC SIMD cluster and its 2-way complex MAC datapath |
| `rtl/vector_controller.sv` | loop counter and drain sequencer shared by both clusters |
| `rtl/vector_lsu.sv` | vector load unit (parallel, broadcast, sliding window) and store unit (round, saturate) |
| `rtl/sample_memory.sv`, `rtl/agu.sv` | banked single-port sample memory and its address generator |
| `rtl/partial_network.sv` | memory-to-port interconnect with legality check and swapping |
| `rtl/rake_delay_buffer.sv` | circular delay-equalisation buffer for four fingers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Data formats

Samples are complex numbers with 16-bit two's complement real and imaginary
parts (`cplx_t`). The controller works on 16-bit integers. Widths grow as
follows:

* An ALU lane's product is at most |Re x|+|Im x|, so it needs 18 bits. The
  accumulator adds 8 guard bits, giving 26 bits per part.
* The CMAC keeps 40-bit accumulators.
* On a store, the vector store unit shifts right with rounding by a
  configurable amount, then saturates to 16 bits.

The guard-bit count and the accumulator widths are this design's choice.

## The controller, single issue, and IDLE

`risc_controller` executes one 32-bit instruction per cycle from a program
memory that is written from outside while stopped (`prog_we`, `prog_addr`,
`prog_wdata`). `start` runs it from address 0 until `HALT`. The encoding is in
`risc_pkg.sv`:

* opcode in [31:26], rd in [25:22], rs in [21:18], a 16-bit immediate in
  [15:0];
* register-register instructions take rt from imm[3:0].

Instruction groups:

* **RISC:** `ADD SUB AND OR XOR SHL SHR ADDI LI MUL MAC MFA CLA BEQ BNE JMP LD
  ST`. `MAC` accumulates 16×16 products into a 32-bit accumulator; `MFA` reads
  it back shifted.
* **Configuration:** `CFG rs, imm` writes register `imm[7:0]` of the
  configuration bus. The high nibble of `imm` selects the unit (see below) and
  the low nibble the register. This is how memories, AGUs, network, clusters
  and delay buffer are set up. It takes one cycle and can be done while vectors
  run.
* **Vector issue:** `VALU rs, op` and `VCMAC rs, op` start a vector of length
  `rs` on a cluster.
* **Synchronisation:** `IDLE mask` stops issue until every cluster named in the
  mask (bit 0 ALU, bit 1 CMAC) is idle. Issuing to a cluster that is still busy
  also waits.
* **Data movement to/from the controller:**
  - `LDS` and `STS` read and write one complex word on the controller's
    network port;
  - `RDMAX` reads the index found by the CMAC maximum search;
  - `OUT` writes a result word to the `out_valid`/`out_data` port.

A load costs one extra cycle; every other instruction takes one cycle.

`idle_cycles` counts cycles lost waiting and `vec_issued` counts vector
instructions. A program's efficiency is `vec_issued` against the cycles the
clusters were busy.

Configuration units (`imm[7:4]` of `CFG`): 0–4 sample memories MEM1–MEM5,
5 network, 6 ALU cluster, 7 CMAC cluster, 8 delay buffer.

## How a vector instruction runs

Both clusters use the same skeleton:

* a `vector_controller` loop;
* a `vector_lsu` on the load side;
* the datapath;
* the same `vector_lsu`'s store half on the store side.

A vector of *len* elements becomes *steps* loop iterations, one memory access
each, followed by *drain* cycles. In the drain cycles the pipeline empties and
results are stored. `busy` is high for exactly *steps + drain* cycles, plus one
cycle for each cycle the loop is stalled (see the delay buffer).

Memory reads are registered, so an element loaded in one cycle is computed in
the next. Stores are issued in fixed drain cycles.

This cost model is built to match published cycle counts for the kernels.
`tb_alu_cluster` and `tb_cmac_cluster` check them:

| kernel | operation | length | steps + drain | cycles |
|---|---|---|---|---|
| vabsqr | \|x_i\|² | 64 | 64 + 2 | 66 |
| vmul | c_i·x_i | 16 | 16 + 2 | 18 |
| vmac | Σ c_i·x_i | 256 | 128 + 4 (two elements per step) | 132 |
| vmac2 | two sums, two coefficient sets | 256×2 | 256 + 4 | 260 |
| vsmac | Σ (±1±j)·x_i | 64 | 16 + 2 (four elements per step) | 18 |
| vsmac4 | four such sums | 64×4 | 64 + 6 | 70 |

### Load modes

The vector load unit has three modes (ALU cluster config register 2):

* **PAR (parallel).** One access returns four consecutive words, one per lane.
  Use it for element-wise work such as de-scrambling.
* **BCAST (broadcast).** One word per step, given to all four lanes. Each lane
  applies its own code. This is how four OVSF codes de-spread the same samples
  at once.
* **SLIDE (sliding window).** One new word per step is shifted into a 4-word
  window, and lane k sees the sample k positions back. Four lanes then correlate
  four consecutive delays of the received signal against one code in one pass.
  The window takes 3 extra steps to fill. This is what the multi-path search
  uses.

BCAST and SLIDE read one word per step instead of four. That cuts memory
fetches by three quarters when consecutive data are processed.

## The ALU cluster

### The short complex multiplier (`alu_lane`)

A code chip is `a + jb` with a, b ∈ {−1, 0, +1}, coded as two 2-bit signed
values (`scode_t`). Multiplying x = xr + j·xi by it needs no multiplier:

  Re = a·xr − b·xi, Im = a·xi + b·xr

Each term is selected, zeroed or inverted by a multiplexer. A negation is done
as one's complement plus a carry into the adder, and the lane counts the carries
it needs (0, 1 or 2). The product is sign-extended into the guard bits and
added into the accumulator. `clr` makes that cycle's sum start from zero
instead of the old value, so back-to-back sums need no idle cycle.

### Where the codes come from (`vector_alu`)

Per lane, the code can come from four sources:

* the instruction (ALU register 1; a constant code, e.g. all 1 for plain
  accumulation);
* the de-scrambling generator (the same chip for all lanes);
* the OVSF generator (its own chip per lane);
* memory (a pilot or sync sequence stored as samples).

`vector_alu` also adds the four accumulators in an adder tree, which folds a
`vsmac` split over the lanes into one sum.

### Gold-code generator (`scrambling_code_gen`)

It produces the 3GPP downlink scrambling code:

* two 18-bit LFSRs:
  - x with feedback x⁰⊕x⁷;
  - y with feedback y⁰⊕y⁵⊕y⁷⊕y¹⁰;
* the I chip is x⁰⊕y⁰;
* the Q chip is x⁴⊕x⁶⊕x¹⁵⊕y⁵⊕y⁶⊕y⁸…y¹⁵;
* each bit maps to ±1, so a chip is (±1 ± j).

For de-scrambling, the `conj` input gives the conjugate. The x register is
loaded with the code's seed through two configuration writes. The y register
starts all-ones. The polynomials are the 3GPP ones; the architecture itself
only asks for "a Gold-code generator".

### OVSF generator (`ovsf_code_gen`)

Chip n of code k at spreading factor SF = 2^L is the parity of
`n AND bitrev_L(k)`, mapped to ±1. This is the usual OVSF tree in closed form.
The generator keeps one chip counter and four code indices, so one step yields
four chips, one per lane. `sym_end` marks the last chip of a symbol. L is at most 9
(SF up to 512).

## The CMAC cluster

`vector_cmac` holds two complex multiply-accumulate datapaths.
`cmac_cluster` uses them as follows:

| op | what it does |
|---|---|
| `VC_MUL` | element-wise product c·x |
| `VC_ABSQR` | \|x\|² |
| `VC_MAC` | dot product; two elements per step, the two partial sums are folded at the end |
| `VC_MAC2` | the same x against two coefficient vectors (stored interleaved in B) |
| `VC_MAX` | running maximum of \|x\|² and its index, read by the controller with `RDMAX` |
| `VC_BFLY` | radix-2 butterfly A0 ± w·A1, twiddle w in Q1.15 from port B |

For MRC, configuration register 1 conjugates operand B. Operand B is then the
channel estimate, and the result Σ ĥ*·y is the combined symbol.

## Memories, AGUs and the partial network

This is the part that most differs from an ordinary DSP, and the part a program
has to get right.

**Sample memories.** Each `sample_memory` has 1024 complex words.

* The words are spread over four single-port banks: word w is in bank w mod 4.
* One access can therefore return four consecutive words from any start
  address. That is what PAR loads use.
* The memory has its own `agu`, so the load/store units only say "next". The
  address pattern comes from the memory's configuration:
  - registers 0–2: base, stride and modulo length (circular buffers; 0 means
    no wrap);
  - register 3: bit-reversed (FFT) order and its width;
  - writing register 4 sets the start offset and restarts the AGU.

**The network** (`partial_network`) connects six ports:

| port | use |
|---|---|
| 0 | ALU cluster load |
| 1 | ALU cluster store |
| 2 | CMAC cluster load A |
| 3 | CMAC cluster load B |
| 4 | CMAC cluster store |
| 5 | controller |

The ports connect to five memories, MEM1–MEM5. Configuration register p
selects the memory of port p. Not every choice is wired:

* MEM1 and MEM2 reach only the ALU cluster;
* MEM5 reaches only the CMAC cluster;
* MEM3 and MEM4 reach both clusters;
* the controller reaches everything.

A forbidden selection is refused and sets `net_cfg_err`. If two ports use one
memory in the same cycle, the lower-numbered port wins and `net_conflict` is
set. Programs are expected to avoid both.

**Swapping.** Writing register 8 with two port numbers exchanges their
memories in one cycle. A typical use:

1. the ALU cluster writes its results into MEM3 while the CMAC cluster works on
   MEM4;
2. one swap later, the CMAC reads the ALU's results and the ALU writes over the
   old data.

Only the connection moves, never the data: MEM3/MEM4 are ping-pong buffers.

Two details matter when programming it:

* Read data returns one cycle after the request, through the selection that
  was current when the request was made.
* An AGU belongs to the memory, not to the port. After a swap, the new user
  continues from wherever the memory's AGU stands unless it reconfigures it.

## The delay-equalisation buffer

`rake_delay_buffer` is the receive-side entry of the design. It is also the
block whose timing constrains the whole processor.

The buffer holds the most recent N samples of the input stream in one
single-port memory. N = 184 is 12 µs of delay spread at 4 samples per chip and
3.84 Mchip/s. It has five address generators, all modulo N:

* the write AGU;
* one AGU per finger, started `delay_k` samples behind the write AGU.

All five step once per input sample. Finger k therefore always reads the sample
written `delay_k` samples ago. A delay can be anything up to N−1 samples, many
symbol times, limited only by the memory length.

Because the memory has one port, each input sample costs five time-interleaved
accesses:

    slot:   0        1          2          3          4
            write    read f0    read f1    read f2    read f3

So a new sample can be accepted at most every 5 cycles. For WCDMA that is
4 × 5 × 3.84 M = 76.8 M accesses per second. This is why the processor needs
to be clocked at about 77 MHz for WCDMA.

When the last read returns, the four aligned samples are copied to the
`fingers` output together and `out_valid` rises. This happens NF+3 = 7 cycles
after `in_valid`.

The output is double-buffered. The next sample can be processed while the
cluster still holds the previous four. The status flags:

* `overrun`: a sample arrived less than 5 cycles after the previous one and was
  dropped;
* `out_lost`: a new finger vector replaced one that was never consumed.

Configuration (unit 8): registers 1–4 hold the finger delays. Writing register 0
restarts the buffer.

**Connection to the ALU cluster.** With ALU configuration register 2 bit 4 set,
the ALU cluster reads the delay buffer instead of memory. The four lanes then
get the four fingers' aligned samples, so one PAR step de-scrambles one chip
of all four fingers.

The input stream sets the pace. While no finger vector is waiting, the
cluster's loop *stalls*, and its `busy` time grows by one cycle per stalled
cycle. Every finger vector taken is acknowledged (`dly_ack`).

## A complete receiver in software

`tb_rake_processor` runs one complete receiver program (387 instructions) on
the top module at its default parameters, and checks the results against a
model computed in the testbench. The test signal is:

* four random OVSF channels at SF 32;
* scrambled with a Gold code;
* four propagation paths with different delays and complex gains;
* a pilot sequence.

Samples enter at the delay buffer's maximum rate, one every five cycles. At a
76.8 MHz clock that is the WCDMA rate of 15.36 Msample/s.

The program does the following, and shows how the pieces above are meant to be
used together:

1. **Capture.** The ALU copies the incoming stream from the delay buffer into
   a memory (instruction code 1, single-item store).
2. **Path search.** The ALU correlates the capture with the scrambling code in SLIDE
   mode (four delays per pass). The four correlations are also the channel
   estimates of the four fingers.
3. **Hand-over.** A swap moves the correlations to the CMAC side.
4. **Peak search.** `VC_MAX` finds the strongest delay, and the controller
   reads it with `RDMAX` and outputs it.
5. **Finger processing.**
   - The finger delays are written to the delay buffer.
   - The ALU de-scrambles the four fingers in PAR mode straight from the
     buffer, stalling on the sample stream.
   - It then de-spreads the result with four OVSF codes in BCAST mode.
6. **Combining.** A second swap moves the de-spread symbols to the CMAC, which
   combines the fingers by MRC (`VC_MAC` with conjugated channel estimates).
7. **Readout.** Results are read out, once through bit-reversed addressing and
   once after a butterfly pass, using `LDS` and `OUT`.

Throughout the run, the controller configures the next step while a vector
runs, and uses `IDLE` only where it needs a result.

The testbench counts how often each mechanism occurred and fails if any never
did:

* stalls on the delay buffer;
* swaps;
* IDLE waits;
* RISC instructions issued while a vector ran;
* waits on a busy cluster;
* each load mode;
* the scrambling and OVSF code sources;
* maximum search, MRC and butterfly;
* modulo addressing in the delay buffer and bit-reversed addressing in a sample memory.

## Departures and limits

What follows the published architecture:

* the split into controller, two SIMD clusters with common vector control and
  load/store units, and code generators;
* the short multiplier;
* memories with their own modulo/FFT AGUs, the partial network with swapped
  ping-pong memories, and the single-memory time-interleaved delay buffer
  (N = 184, four fingers);
* single issue with IDLE synchronisation;
* the kernel cycle counts;
* masking the inputs of idle execution units.

What is this design's own:

* all widths beyond 16-bit samples and integers;
* the memory sizes (1024 complex words per sample memory, 256 words of integer
  memory, 1024 instructions);
* the instruction encoding and opcode list;
* every configuration register map;
* the bank organisation of the sample memories;
* the exact connectivity matrix of the network, its port list and conflict
  rule;
* the sliding-window load mode, as the way "one item at a time" loading serves
  correlation;
* memory as a fourth code source;
* the lane adder tree;
* the 40-bit CMAC accumulators and the Q1.15 butterfly;
* masking idle units at their datapath inputs with the element enable;
* the output handshake of the delay buffer;
* the Gold and OVSF formulas, taken from the 3GPP definitions.

Not modelled or not checked:

* **The analog front end.** It is replaced by the `sample_valid`/`sample`
  ports.
* **IEEE 802.11b.** The architecture is said to handle it at 72 MHz. At 22 Msample/s
  (11 Mchip/s, 2 samples per chip), the five-access delay buffer would need
  110 M accesses per second, which is more than that. The mapping that 802.11b
  would use (e.g. fewer fingers, or combining at chip level) is not described,
  so it is not implemented here.
* **Required clock rates.** The rates quoted for whole receivers (76 MHz WCDMA,
  65 MHz TD-SCDMA, 72 MHz 802.11b) depend on programs that are not published.
  They are not reproduced.
* **Power.** Only operand masking is modelled: the ALU lanes and the CMAC
  datapaths see zero inputs while idle. Clock gating and power figures are not
  part of the RTL.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog that fails the run if
it hangs.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/rake_pkg.sv rtl/risc_pkg.sv tb/tb_rake_processor.sv \
        --top-module tb_rake_processor -o sim --Mdir obj_tb_rake_processor
    ./obj_tb_rake_processor/sim

Replace `tb_rake_processor` by any other `tb_<module>` to test one block. The
two packages must come first; `-y rtl` finds the other modules by file name.

The full receiver test runs in well under a minute. The unit testbenches run
in seconds; most compare thousands of random cases with a reference computed
in the testbench (for example, the Gold code from its definition, or the OVSF
code from the recursive tree).

What the tests check:

* `tb_alu_cluster` and `tb_cmac_cluster` check the cycle counts in the table
  above.
* `tb_rake_delay_buffer` checks the 5-cycle sample rate, the latency and both
  error flags.
* `tb_partial_network` checks the legality matrix, swaps and conflicts.

Every testbench has been shown to catch a deliberately broken copy of its
module.

## Changing it

* **Memory size, delay-buffer length, program size.** These are parameters of
  `rake_processor`: `MEM_DEPTH`, `DLY_DEPTH`, `PROG_DEPTH` and `IMEM_DEPTH`.
* **Number of fingers.** This is `NF` of the delay buffer. The ALU lanes are
  tied to `LANES` = 4 in `rake_pkg`. More fingers need more lanes or several
  passes.
* **Network connectivity.** This is the `ALLOWED` parameter of
  `partial_network`.
* **New vector operations.** Add them to the enums in `rake_pkg`. In the
  cluster, give each one a steps/drain pair and the drain cycles in which it
  stores.
