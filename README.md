# Mux-based BPSK and QPSK modulators

A phase-shift-keying modulator normally multiplies the data with a carrier
(BPSK) or mixes two data streams onto a cosine and a sine (QPSK). This design
does neither. Every carrier phase the modulation can ever send is computed
once and stored as a small ROM holding one carrier period. Modulating is then
only a matter of *choosing*: for each symbol a multiplexer passes the ROM of
the matching phase to the output. There is no multiplier, no adder and no
numerically controlled oscillator in the datapath: two ROMs and a 2:1 mux for
BPSK, four ROMs and a 4:1 mux for QPSK.

The input is a stream of 14-bit words from an ADC. The output is a stream of
32-bit IEEE-754 single-precision samples of the modulated carrier, ready to be
plotted or handed to floating-point processing. With the default 50 MHz clock
one symbol lasts 400 ns, so the BPSK modulator sends 2.5 Mbit/s and the QPSK
modulator 5 Mbit/s.

Both modulators are in the top level `psk_modulators_top`, side by side, with
a shared clock and reset and otherwise separate ports.

## Symbols, carrier periods and samples

Three numbers fix the whole timing, all in `rtl/psk_pkg.sv`:

| parameter            | default | meaning                                  |
|----------------------|---------|------------------------------------------|
| `DATA_W`             | 14      | bits per ADC word                        |
| `SAMPLES_PER_SYMBOL` | 10      | ROM words = samples per carrier period   |
| `CLKS_PER_SAMPLE`    | 2       | clock cycles each sample is held         |

One symbol is exactly one carrier period. This is what makes the mux approach
work without glitches: every symbol begins at ROM address 0, at the start of
a period, so switching from one ROM to another at a symbol boundary never cuts
a period in half. The carrier frequency is therefore tied to the symbol rate:
50 MHz / (2 x 10) = 2.5 MHz, one cycle per symbol.

```
clk            _|‾|_|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_
sample tick     ^   .   ^   .   ^         ^   .   ^          every 2 clocks
sample index    0       1       2   ...   9       0
symbol start    ^                                 ^          every 20 clocks
d_out          < symbol n                        >< n+1
data_out       < s0    >< s1    >< s2  ...< s9    >< s0'
```

A QPSK symbol carries two bits, a BPSK symbol one, so at the same 400 ns
symbol time QPSK moves twice the data. A 14-bit word lasts 7 QPSK symbols
(140 clocks) or 14 BPSK symbols (280 clocks).

## The carrier tables

ROM word `k` of a ROM with phase `p` holds

    sin(2*pi*k/SAMPLES_PER_SYMBOL + p)

rounded to single precision. The table is not stored as literal numbers: the
package function `psk_pkg::carrier_sample` computes it with `$sin` at
elaboration and `psk_pkg::float32_bits` converts the real value to its bit
pattern (round to nearest). Only constants reach the hardware, so changing the
period length or a phase only means changing a parameter.

| modulator | ROM     | phase | sent for | first words                        |
|-----------|---------|-------|----------|------------------------------------|
| BPSK      | Sin_ph1 | 90°   | bit 1    | 3F800000 3F4F1BBD 3E9E377A ...     |
| BPSK      | Sin_ph2 | 270°  | bit 0    | BF800000 BF4F1BBD BE9E377A ...     |
| QPSK      | ph1     | 315°  | dibit 11 | BF3504F3 BE20305B 3EE87171 ...     |
| QPSK      | ph2     | 45°   | dibit 10 | 3F3504F3 3F7CD925 3F641901 ...     |
| QPSK      | ph3     | 225°  | dibit 01 | BF3504F3 BF7CD925 BF641901 ...     |
| QPSK      | ph4     | 135°  | dibit 00 | 3F3504F3 3E20305B BEE87171 ...     |

The two BPSK ROMs are 180° apart. The QPSK phases are the four odd multiples
of 45°. The assignment of dibits to phases is the one of the original
hardware's simulation output, which is reproduced here bit for bit. It is not
the Gray-coded textbook constellation that puts 11 at 45° and 01 at 135°. To
use another mapping, change the `QPSK_PH*_DEG` constants in `psk_pkg`.

Each ROM holds 10 x 32 = 320 bits of table: 640 bits for BPSK and 1280 bits
for QPSK. The address port is 6 bits wide, as in the original design, so a
synthesis tool may round the depth up (yosys reports 16-word memories).
Addresses 10 to 63 read as 0.

## Blocks

Each modulator is built from the same five kinds of block:

| module           | role                                                        |
|------------------|-------------------------------------------------------------|
| `control_block`  | clock divider and sample index; emits the sample tick (`rom_en`, `counter_en`) and the symbol start (`bit_separator_en`); counts symbols in `data_counter` |
| `sample_counter` | ROM address, 0..9, one step per sample tick                  |
| `carrier_rom`    | one carrier period at one phase; registered output, `clken`  |
| `bit_separator`  | splits each ADC word into 1-bit or 2-bit symbols, MSB first  |
| `gate_of_mux`    | combinational 2:1 or 4:1 selector driven by the symbol      |

`bpsk_modulator` uses one `sample_counter` for its two ROMs. `qpsk_modulator`
gives each of its four ROMs its own counter, as the original design does. The
four counters always hold the same value.

### Alignment

The ROMs register their output, so a sample appears one clock after its
address. The control block and the counters start a symbol on the tick at
which the address is 0. On that edge the bit separator moves to the next
symbol and the ROMs load word 0. The mux select and the first sample of the
new symbol therefore change on the same clock edge, and `data_out` never shows
a sample of the old phase with the new symbol. An assertion in each modulator
checks that every symbol starts at address 0.

### Taking ADC words

The bit separator samples `data_in` itself, at the symbol start after the
previous word is used up. In that cycle it raises `word_load`. The word must
be valid in the cycle in which `word_load` is high, and it may change after
that clock edge. An ADC that updates more slowly than once per word simply
holds its value. After reset the first symbol start takes a new word.

## Interface of `psk_modulators_top`

| port                                 | dir | width | meaning                                      |
|--------------------------------------|-----|-------|----------------------------------------------|
| `clk`                                | in  | 1     | clock, 50 MHz in the original design         |
| `rst`                                | in  | 1     | synchronous, active high                     |
| `bpsk_data_in`, `qpsk_data_in`       | in  | 14    | ADC words                                    |
| `bpsk_data_out`, `qpsk_data_out`     | out | 32    | single-precision carrier samples             |
| `bpsk_word_load`, `qpsk_word_load`   | out | 1     | the data_in word is taken in this cycle      |
| `bpsk_d_out`, `qpsk_d_out`           | out | 1 / 2 | symbol being sent                            |
| `bpsk_data_counter`, `qpsk_data_counter` | out | 32 | symbols started since reset               |

The first sample tick and the first symbol start come in the first cycle
after `rst` is released. `data_out` is defined from the following cycle.
Before that it shows whatever the ROM output registers held, because the ROMs
have no reset.

## Where this RTL departs from the original design

- **Reset.** The original blocks have no reset input. Here a synchronous
  active-high `rst` is added to every register except the ROM outputs.
- **Extra outputs.** `word_load`, `d_out` and `data_counter` are brought out.
  The original modulator has only `clk`, `data_in` and the sample output, which
  makes 47 pins: 1 + 14 + 32.
- **Output width.** The original top-level symbol labels the output
  `data_out[13..0]`, but its samples are 32-bit floats and its pin count
  includes 32 output pins. The output here is 32 bits.
- **Sample rate.** The original text speaks of one sample per clock, but its
  simulations show a new sample every second clock and a 400 ns symbol at
  50 MHz. This RTL follows the simulations (`CLKS_PER_SAMPLE = 2`). Setting
  `CLKS_PER_SAMPLE = 1` gives one sample per clock and doubles the data rate.
- **Bit order and word hand-off.** The original does not say how the bit
  separator orders bits or takes words. MSB first is consistent with its
  simulations. The `word_load` handshake is this design's own.
- **Control block internals.** Only the function and the output names of the
  control block are known. The divider and the counter inside it are the
  simplest circuit that produces the observed timing. The meaning of
  `data_counter` (symbols started) is this design's choice.
- **ph3.** The 225° phase of the QPSK ROM for dibit 01 is the only phase left
  over. No original waveform shows it.

Not included: the ADC, which is external, and any demodulator. The original
board also held a coherent demodulator, but it was not described beyond the
textbook principle.

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/psk_pkg.sv tb/tb_util_pkg.sv tb/tb_psk_modulators_top.sv \
    --top-module tb_psk_modulators_top
./obj_dir/Vtb_psk_modulators_top
```

Replace the testbench name to run another one. `tb_util_pkg` decodes
single-precision words and computes the ideal carrier with `$sin`,
independently of the RTL's table generator. Samples are compared within 1e-6.

| testbench                | what it shows                                                      |
|--------------------------|--------------------------------------------------------------------|
| `tb_psk_modulators_top`  | both channels at default sizes, random words, three runs from reset (one cut mid-word); every sample, symbol, count and word hand-off; QPSK takes twice the bits of BPSK; each dibit, both bits, phase changes and restarts must occur |
| `tb_psk_modulators_resized` | the same end-to-end check with 16 samples per symbol and one sample per clock |
| `tb_bpsk_modulator`      | the word 01000111100100 from the original simulation plus random words; bit-exact words for both bit values; 20 clocks per bit, 280 per word |
| `tb_qpsk_modulator`      | the word 11011010110011 from the original simulation, followed by a word starting with 10, so the original dibit sequence 00, 11, 10 appears; the ten bit-exact words of dibit 11; 20 clocks per dibit, 140 per word |
| `tb_control_block`       | tick every 2 clocks, symbol start every 20, symbol count           |
| `tb_sample_counter`      | address against a reference count under a random enable            |
| `tb_carrier_rom`         | all words of all six phases, read latency, `clken` hold, out-of-range reads |
| `tb_bit_separator`       | 1-bit and 2-bit separators under a random enable, MSB-first order, `word_load` timing |
| `tb_gate_of_mux`         | 2:1 and 4:1 selection for random data                              |

All testbenches run in well under a second. The top-level testbench uses the
default parameters throughout.

## Changing the design

- Other ADC widths: `DATA_W` must be a multiple of the symbol width (1 or 2).
  `bit_separator` checks this with an elaboration-time assertion.
- Other carrier resolutions: `SAMPLES_PER_SYMBOL` up to 64 with the 6-bit
  address. Any period works, because the table is computed, not stored;
  `tb_psk_modulators_resized` runs 16 samples per symbol.
- Other rates: `CLKS_PER_SAMPLE` >= 1.
- The modulators' parameters pass through `psk_modulators_top`. The phase
  constants live in `psk_pkg`.
