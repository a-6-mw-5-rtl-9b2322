# Hardware speech recognizer (WFST/GMM Viterbi decoder) in SystemVerilog

This is a synthesizable model of the decoder described in "A 6-mW, 5,000-word
Real-time Speech Recognizer using WFST Models" (Price, Glass, Chandrakasan,
IEEE JSSC 2015). The chip turns 16 kHz audio into word IDs. The speech models
sit in an external memory:

- The language and pronunciation model is a weighted finite-state transducer
  (WFST), a graph of states and arcs.
- The acoustic model is a set of Gaussian mixture models (GMMs), one per
  "senone" (a context-dependent sound unit).

The hardware works in two parts:

1. **Front-end.** It cuts the audio into 25 ms frames every 10 ms. For each
   frame it computes a 39-value feature vector: 12 mel-frequency cepstral
   coefficients (MFCCs), the log power, and their first and second time
   differences.
2. **Viterbi search.** It keeps a list of active hypotheses. Each hypothesis
   is a WFST state with a log-probability score. For every feature vector it
   does four things:
   - follows every outgoing arc of every hypothesis;
   - adds the arc weight and the acoustic score of the arc's senone;
   - prunes the weak results with an adaptive beam;
   - stores the survivors as the next frame's hypotheses.

   After each frame, a snapshot of the hypotheses goes to external memory.
   At the end of the utterance, a backtrace through these snapshots recovers
   the word sequence.

The memory-saving ideas of the chip are all modelled:

- feedback control of the beam width, so the list stays within 4096 entries;
- a cache for WFST arcs that are isolated in memory;
- a per-frame cache for GMM scores;
- 5-bit/3-bit quantized GMM parameters decoded through tables;
- a front-end that runs on one clock cycle in 16.

## Directory layout

- `rtl/` holds the design, one module or package per file.
- `tb/` holds one self-checking testbench per module, plus a behavioural
  external-memory model (`ext_mem_model.sv`).

## Block structure

```
asr_top
 |- host_ctrl          byte command decoder, configuration registers
 |- fe_clk_div         clock enable, 1 cycle in 16
 |- frontend           MFCC chain (runs on the enable)
 |   |- fe_window      400-sample frames, hop 160, Hamming window, zero pad to 512
 |   |- fe_fft         512-point real FFT as 256-point complex FFT + warping, |X|^2
 |   |- fe_filterbank  26 triangular mel bands, two multipliers, + total power
 |   |- fe_log         natural log (leading one + 64-entry ROM)
 |   |- fe_dct         12 cepstra (DCT-II) + log power
 |   |- fe_cmn         cepstral mean normalization (exponential, ~10 s)
 |   `- fe_deltas      first and second differences -> 39 values
 |- sync_fifo          feature vector buffer (16 vectors)
 |- viterbi_search     search controller
 |   |- active_list x2 hash tables of hypotheses (current and next frame)
 |   |- wfst_arc_cache arc fetch with a cache of isolated arcs
 |   |   `- plru_tree  tree pseudo-LRU over 4096 entries
 |   |- gmm_eval       GMM scoring with score cache and quantization tables
 |   |   `- log_add    log(e^a + e^b) with a 4096 x 16-bit table
 |   |- beam_ctrl      beam pruning with feedback width control
 |   |- backtrace      word recovery from snapshots
 |   `- mem_arbiter    4 memory clients inside the search
 |- stats_counters     per-frame and per-utterance event counters
 `- mem_arbiter        search and host share the external memory port
```

`asr_pkg.sv` holds the shared widths, types and the saturating score add.

## Number formats

- **Scores** are signed 32-bit log-probabilities in units of 1/256 nat.
  Additions saturate.
- **Features** are signed 16-bit with 8 fractional bits.
- **Means** in the quantization tables use the feature format.
- **Inverse variances** have 8 fractional bits.
- **Component score:** g_c - (sum of (x - mean)^2 * inverse variance) >> 17.
  This gives the usual -1/2 weighted squared distance in score units. The
  constant g_c holds the weight and normalisation of the component.

## External memory layout

Memory is addressed in 32-bit words. The default bases can be changed by host
registers.

| Item | Location | Format |
|---|---|---|
| WFST state | its ID is the word address of its first arc | arcs are 3 words each, consecutive |
| Arc word 0 | state + 3*i | destination state ID |
| Arc word 1 | +1 | weight [31:16] (signed), input label = senone [15:0] |
| Arc word 2 | +2 | output label = word ID [31:16] (0 = none), arc count of the destination [15:0] |
| GMM index | gmm_base + senone (default 0x0080_0000) | component count [31:24], pointer [23:0] |
| Component c | pointer + 21*c | word 0: g_c; words 1..20: two dimensions each, byte = {inverse-variance index[7:5], mean index[4:0]} |
| Quantization tables | qt_base + 40*d (default 0x00F0_0000) | 32 mean values, then 8 inverse-variance values, in bits [15:0] |
| Snapshots | snap_base + frame*4096 + index (default 0x0100_0000) | {output label [31:16], back-pointer [11:0]} |

The arc count of the destination is stored in each arc for two reasons:

- the beam controller can predict how many arcs the next frame will process;
- the arc cache can tell whether a state has few enough arcs (0 to 2) to be
  cached.

## Host interface

The host talks to the chip over a byte stream in each direction with
valid/ready handshakes. Multi-byte fields are big-endian.

| Command | Bytes that follow | Action |
|---|---|---|
| 0x01 | addr[4] n[2] data[4] x n | write n words to external memory |
| 0x02 | n[2] sample[2] x n | audio samples to the front-end |
| 0x03 | value[2] x 39 | one feature vector straight to the search |
| 0x04 | reg[1] value[4] | set a configuration register |
| 0x05 | sel[1] | read a statistics counter (4 bytes returned) |
| 0x06 | - | start an utterance |
| 0x07 | - | end the utterance; returns the word IDs (2 bytes each, last word first), then 0xFFFF |
| 0x08 | - | load the GMM quantization tables from memory |

The configuration registers are:

| Register | Meaning | Reset value |
|---|---|---|
| 0 | start state | - |
| 1 | arc count of the start state | 1 |
| 2 | snapshot base | 0x0100_0000 |
| 3 | GMM base | 0x0080_0000 |
| 4 | quantization table base | 0x00F0_0000 |
| 5 | initial beam | 2560 (10 nat) |
| 6 | minimum beam | 256 |
| 7 | maximum beam | 8192 |
| 8 | feedback gain (Q16; 0 = fixed beam) | 0 |
| 9 | target list size | 2048 |
| 10 | bit 0: arc cache on; bit 1: GMM cache on | both on |

Statistics selector 0..11 returns the last frame's count of one event.
Selector 12..23 returns the same event totalled over the utterance. The
events, in order, are:

0. hypotheses expanded
1. arcs processed
2. arcs accepted
3. new states stored
4. list overflows
5. arc cache hits
6. arc cache misses
7. WFST words read
8. GMM evaluations
9. GMM cache hits
10. GMM words read
11. snapshot words written

Audio can also enter on the dedicated `audio_*` port of `asr_top`.

## How the search works, cycle by cycle

For each feature vector, `viterbi_search` walks the current list by index.
For each hypothesis it requests each arc from the arc cache:

- a hit takes 2 cycles;
- a miss takes three memory reads.

It then requests the senone's score from `gmm_eval`:

- a hit in the per-frame score cache is immediate;
- a miss reads the index word, then one parameter word per cycle, with
  21 cycles per mixture component.

The sum of hypothesis score, arc weight and acoustic score is compared with
the best score of the previous frame minus the beam. A survivor is inserted
into the next list:

- a new state is appended;
- a state already present keeps the better score and its back-pointer.

The insertion walks the hash chain one entry per cycle. After the last
hypothesis:

- the next list is written out as a snapshot;
- the two lists swap roles.

The beam controller adjusts the beam after every arc. The change is
gain x (N_target/N_expected - N_accepted/N_processed), clamped to the
[minimum, maximum] range.

In this model one arc is in flight at a time. The stages are not overlapped
as in the chip's pipeline.

## Parameters and sizes

The default parameters are the paper's sizes:

- 4096-entry active lists;
- a 4096-entry arc cache with 4096-way PLRU and 2 kB pages;
- 26 mel bands, 12 cepstra and 39 features;
- 25 ms / 10 ms frames and a 512-point FFT;
- front-end clock divided by 16;
- 32-level mean and 8-level inverse-variance quantizers;
- a 4096 x 16-bit (64 kb) log-add table.

The following sizes are not given in the paper and were chosen here:

| Parameter | Value |
|---|---|
| hash buckets | 4096 |
| arc-cache hash slots | 8192 |
| feature FIFO depth | 16 |
| FFT data width | 24 bits |
| CMN time constant | 1024 frames |
| GMM score cache | 4096 senones |

The paper's test model fits these defaults:

- the WSJ 5,000-word WFST: 2.9M states and 9.2M arcs, about 110 MB at
  12 bytes per arc;
- the GMM set: 4,002 senones of 32 to 64 components, in 39 dimensions.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Highlights:

- **Front-end units** are compared against floating-point models computed in
  the testbench:
  - a direct DFT for `fe_fft`;
  - a triangular mel bank for `fe_filterbank`;
  - a DCT-II for `fe_dct`;
  - ln(x) for `fe_log`;
  - exact integer models for CMN and deltas.
- **Cycle counts are checked:**
  - 512 + 1024 + 257 cycles per FFT frame;
  - 257 + 27 per filter-bank frame;
  - 27 + 312 per DCT.
- **`tb_frontend`** runs the whole chain at the paper's minimum real-time
  pace: 625 kHz front-end clock and 16 kHz audio.
- **`tb_gmm_eval`** compares GMM scores with a floating-point
  log-sum-exp. It checks 21 cycles per component and the score-cache hit.
- **`tb_viterbi_search`** decodes a 4-state test network with three
  senones and checks the words.
- **`tb_asr_top`** runs the full-size design at its default parameters and
  drives everything through the host byte link:
  - model tables written by host commands;
  - an utterance of host feature vectors that must decode to the expected
    words, with feedback beam control on;
  - an utterance of real audio through the front-end;
  - an utterance whose 5000 successors overflow the 4096-entry list;
  - statistics read back and compared with counted events.

  It counts that every mechanism happened at least once: host writes,
  front-end vectors, list swaps, arc and GMM cache hits and misses, beam
  changes, snapshots, backtrace words, overflows and statistics reads.

Each testbench was also run against a copy of its module with one
deliberate bug (for example, an inverted accept test or a dropped acoustic
score), and it reported failures every time.

### Running a testbench

Any testbench builds with plain Verilator 5. The package goes first, and
the tools find the other modules by file name:

```
verilator --binary --timing -Wno-fatal --top-module tb_fe_fft \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/asr_pkg.sv tb/tb_fe_fft.sv
./obj_dir/Vtb_fe_fft
```

The last line printed is `TB_RESULT checks=N failures=M`. The full-size
`tb_asr_top` finishes in about two minutes.

The code uses IEEE 1800-2017 SystemVerilog. It was checked with Verilator 5
(lint and simulation) and with Yosys using the slang front end
(elaboration and coarse synthesis).

## What is not modelled

- **Off-chip parts.** The external flash/DRAM, the microphone/ADC and the
  FPGA/USB board bridge are outside the chip. `asr_top` exposes a memory
  port, an audio port and a host byte port instead. The testbenches use a
  behavioural memory model.
- **Feature/audio log memory.** It appears on the die photo but is not
  described, so it is left out.
- **Search pipelining and scale.** The chip overlaps the search stages and
  hides memory latency. This model processes one arc at a time. It is
  functionally equivalent but slower per arc. Real-time operation on the
  full WSJ task was not simulated.
- **Epsilon arcs and final-state weights.** Neither is handled. Every arc
  consumes a frame, and the best state of the last frame starts the
  backtrace.
- **Front-end details.** The Hamming window, the mel formula, the
  frequency-domain log power and the exponential mean normalization follow
  common HTK practice. They are not bit-exact HCopy.
- **Power.** Voltage/frequency scaling and power measurement are outside
  this RTL.
