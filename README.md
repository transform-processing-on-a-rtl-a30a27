# Reconfigurable data path processor for transform processing

This is a processor with no instruction set in the usual sense. Sixteen
identical **data path elements** (DPEs) sit on one **global bus**. The bus
carries every element's 32-bit output register, so each element can read the
result of any other element, itself included, on every clock. A very wide
instruction (528 bits, 33 per element) sets up all sixteen elements at once
for one clock. A program is a short list of such instructions. The sequencer
issues one per clock and repeats a loop of them forever: there are no
branches, no conditions and no stalls. Data flows through in lock-step with
the program.

What suits it to FFTs is that each element does a whole multiply-accumulate
step per clock:

    out <= (A * B + C +/- D) [<< 1 | >>> 1]      R1 <= A-source   R2 <= C-source

Here A, B, C and D are words read from the bus or from the element's two data
registers. A directed graph of a butterfly can then be laid out with one
graph row per clock and one graph node per element.

The design here is the *modified* element. In this version both data
registers can feed both the multiplier and the adder, which is what makes
them usable as accumulators in FFT programs.

## The data path element (`rdpp_dpe`)

```
            global bus (16 x 32 bits)
     +---------+---------+---------+
   MUXA      MUXB      MUXC      MUXD        (each picks one element's output)
     |  \      |         |  \      |
     |  DREG1  |         |  DREG2  |
     |    \____|_________|___/|    |
     |    /    |         |    \    |
    SEL1    LOGIC1      SEL2    LOGIC2       SEL:   MUX, DREG1, DREG2 or 0
     |  A      | B       |  C      | D       LOGIC: any 2-input Boolean function
     +--- x ---+         |         |
           \_____________+ ________+ + cin
                         |
                  OUTPUT REGISTER  (hold / load / load<<1 / load>>>1)
```

Routing rules. They decide what one instruction can do:

- **A (multiplicand)** comes through SEL1. SEL1 sees MUXA, DREG1 or DREG2.
- **B (multiplicand)** comes through LOGIC1, which sees MUXA and MUXB. B is
  normally MUXB passed through.
- **C (addend)** comes through SEL2. SEL2 sees MUXC, DREG1 or DREG2.
- **D (addend)** comes through LOGIC2, which sees MUXC and MUXD. Only D can
  be subtracted. LOGIC2 forms its one's complement and the carry-in is set to 1.
- **DREG1** can only load from MUXA, and **DREG2** only from MUXC. An
  instruction that needs MUXA for a multiplicand and also loads DREG1 from a
  different element is therefore illegal. For example, `P6*P8 R1=P9` cannot
  be encoded.
- The multiplier takes the **upper 16 bits** of A and B as signed fractions.
  The product is 32 bits and is as wide as the adder. Two 1/0/15 fractions
  give a 2/0/30 product, which has one extra sign bit. A `<<1` in the same
  instruction removes that bit.
- Everything completes in one clock. Results appear on the bus in the next
  cycle. DREG1, DREG2 and the output register are the only state.
- An omitted operand is a constant zero. For SEL this is its own zero code,
  and for LOGIC it is the all-zero truth table. The all-zero control field
  is the default instruction (NOP/HOLD). Under it the output register and
  both data registers keep their values.

### Control field of one element (33 bits, `rdpp_pkg::dpe_ctrl_t`)

| bits | field | meaning |
|---|---|---|
| 32:29 | `mux_a` | element read by MUXA |
| 28:25 | `mux_b` | element read by MUXB |
| 24:21 | `mux_c` | element read by MUXC |
| 20:17 | `mux_d` | element read by MUXD |
| 16:15 | `sel1` | 0 zero, 1 MUXA, 2 DREG1, 3 DREG2 |
| 14:13 | `sel2` | 0 zero, 1 MUXC, 2 DREG1, 3 DREG2 |
| 12:9 | `logic1_fn` | truth table, bit `{a,b}` of fn is the result (a = MUXA, b = MUXB) |
| 8:5 | `logic2_fn` | truth table (a = MUXC, b = MUXD) |
| 4 | `dreg1_ld` | DREG1 <= MUXA |
| 3 | `dreg2_ld` | DREG2 <= MUXC |
| 2 | `cin` | carry into the adder |
| 1:0 | `out_mode` | 0 hold, 1 load, 2 load shifted left, 3 load shifted right (arithmetic) |

The full instruction is 16 of these fields: `[527:0]`, element *i* at bits
`33*i +: 33`. Useful truth tables: `1010` passes b, `0101` gives NOT b (used
for subtraction), `1100` passes a, `0000` gives zero.

Examples in the assembler notation `A*B+C±D shift R1=x R2=y`, where `Pn` is
the output of element n:

- `P0*P1<1 R1=P1 R2=P7` encodes as follows. MUXA=1 feeds SEL1 and DREG1.
  MUXB=0 feeds LOGIC1 (pass b). MUXC=7 loads DREG2. SEL2 and LOGIC2 are zero.
  out_mode is shift left.
- `P3*R1-P5` encodes as SEL1=DREG1 and MUXB=3 with pass b. MUXD=5 with NOT b
  and cin=1.
- `R2` encodes as SEL2=DREG2, LOGIC1 zero, LOGIC2 zero and load.

## Processor (`rdpp_top`)

- **Global bus.** Element *i*'s output register is bus slot *i*. All 64
  multiplexers (four per element) read the whole 512-bit bus.
- **Data input.** Samples enter through element 0. In element 0's view of
  the bus, its own slot is replaced by `data_in`. An instruction such as
  "element 0: out = MUXC with MUXC = 0" therefore copies the input word onto
  the bus, and every element can read it in the next cycle as `P0`. The
  element that receives input is mostly busy passing it on. `data_in` has no
  handshake. The outside world supplies the word that the executing
  instruction expects; `exec_valid`/`exec_addr` tell it which instruction
  that is.
- **Control store** (`rdpp_ctrl_store`). This is a 64 × 528-bit RAM, built as
  sixteen 33-bit memories. It is loaded before a program runs, one element
  field per clock (`prog_we`, `prog_addr`, `prog_dpe`, `prog_data`). A
  63-word program loads in 1008 clocks. The read port is registered and
  serves as the instruction register.
- **Sequencer** (`rdpp_sequencer`). A `start` pulse fetches address 0. After
  the instruction at `loop_end`, fetching continues at `loop_start`, forever,
  until `stop`. Addresses below `loop_start` form a preamble that runs once.
  Execution lags the fetch by one clock. While nothing executes, every
  element receives the default instruction and holds its state.
- **Output.** The whole global bus is brought out as `bus_o`. The program
  decides in which element and at which clock a result can be read.

Timing: from `start`, the instruction at address *k* executes in clock
*k*+1. An input word presented while element 0 executes an input instruction
is readable as `P0` one clock later. A result computed by an instruction is
on the bus from the next clock until its element loads again.

## Number format

There are no overflow flags and no saturation. Sums wrap at 32 bits. Programs
avoid overflow by choosing the format of the input data. Write a format as
sign/integer/fraction bits:

- Adding four 3/0/29 values gives a 1/2/29 result.
- A product of two fractions gains one sign bit.
- A butterfly output is kept as 2/0/30, or shifted left back to 1/0/31 when
  its magnitude is known to stay below one.

The arithmetic right shift (`>1`) halves a sum, so radix-2 outputs can be
scaled by 1/2 per stage.

## Programs in the testbenches

`tb/tb_rdpp_top.sv` holds a **radix-2 butterfly**, `H0 = (h0+h1)/2` and
`H1 = (h0-h1)(cos - j sin)`:

- It uses 8 elements and an 8-instruction loop, and processes one butterfly
  per 8 clocks.
- Inputs arrive in the order x0, y0, x1, y1, cos, sin.
- A product cannot be subtracted, so `-dr = x1 - x0` is formed separately.
- It exercises the data registers as multiplier and addend, subtraction, both
  shifts, self-accumulation (`+=`), hold, the loop, and stop/restart.
- The schedule is written out in the file's header.

`tb/tb_rdpp_radix4.sv` holds a **radix-4 butterfly**:

- Inputs arrive in the order x0 y0 x2 y2 x1 y1 x3 y3, then sin/cos for each
  of the three twiddles.
- It forms r0..r3 and s0..s3 (the sums and differences of the four complex
  inputs). Then it computes `X(k) = r cos + s sin` and
  `Y(k) = s cos - r sin`.
- It uses all 16 elements and a 16-instruction loop, one butterfly per 16
  clocks.
- Element 11 negates each sine as it arrives, because only the last addend
  can be subtracted.

Both testbenches compare every output two ways. One is a bit-exact
fixed-point reference. The other is a floating-point DFT within a small
tolerance. Both also check the rate. `tb/rdpp_asm_pkg.sv` is a small encoder
that applies the routing rules above. It turns `A*B+C±D shift R1= R2=`
operands into control fields.

`tb/tb_rdpp_fft.sv` runs **complete FFTs of 16, 256, 1024, 4096 and
65536 points**. The testbench acts as the host, and the processor does all the
arithmetic:

- The host holds the data set between passes and streams butterflies back to
  back. It follows the iterative decimation-in-frequency radix-4 order, with
  twiddle `W_len^(j·k)`.
- The processor runs the radix-4 program with right shifts added, so each
  pass scales its outputs by 1/4. The result is `DFT/N`, in base-4
  digit-reversed order.
- Inputs carry guard sign bits: 3, 4, 5, 5 and 6 bits for the five sizes. With
  them, no sum of four can overflow in any pass, since a pass can grow a
  component by at most √2 after the 1/4 scaling.
- Every butterfly is checked bit-exactly, and 64 bins against a
  floating-point DFT.

### Throughput

The 16-clock radix-4 program gives `16 × (N/4) × log4 N` clocks per FFT,
checked exactly by the FFT testbench. For comparison, a cascaded radix-4
program for this architecture processes 16 complex points in 63 clocks and
needs `T = N/16 × 63 × log16 N` clocks. In that program, 62 of the 63 clocks
input data and twiddle factors, and the 32 data registers of the 16 elements
accumulate the second stage.

| N | this radix-4 program | cascaded radix-4 | cascaded at 75 MHz |
|---|---|---|---|
| 16 | 128 | 63 | 0.84 µs |
| 256 | 4,096 | 2,016 | 26.9 µs |
| 1,024 | 20,480 | two cascaded passes + one radix-4 pass | |
| 4,096 | 98,304 | 48,384 | 645 µs |
| 65,536 | 2,097,152 | 1,032,192 | 13.8 ms |

The cascaded program would fit: 63 words in the 64-word control store, with
a load time of 1008 clocks. It is not included here. The memory that holds
data between passes is outside the processor and is not included either.

**Precision.** The multiplier sees only the upper 16 bits of each operand.
With guard bits on the input and a 1/N scale on the output, large transforms
lose accuracy. The largest error against the exact `DFT/N` stays near
2·10⁻⁵ at every size. At N = 65536, however, the output bins themselves have
an rms value of only about 5·10⁻⁵, so the result is barely above the
truncation noise. Two remedies are possible. A wider multiplier with
rounding would improve it. Scaling adapted to the data (block floating
point) would too.

## Where this RTL makes its own choices

These points are not fixed by the architecture as described, and were chosen
here:

- The 33-bit field layout. 528 bits divided by 16 elements gives exactly 33,
  which this layout fills.
- The binary element index used as the multiplexer select.
- A truth-table LOGIC unit.
- A zero code in SEL.
- The multiplier uses the upper halves of its operands.
- The control store is 64 words deep and is loaded one field per clock.
- The loop is defined by loop-start/loop-end inputs, with start at address 0
  and a stop input.
- Input enters through element 0 by replacing its own bus slot, rather than
  through a separate input bus. A separate bus would need more instruction
  bits.
- The whole bus is the output.
- All registers have a synchronous active-low reset to zero.

Possible improvements that are **not** built:

- a wider multiplier with rounding
- multi-bit shifts
- two input ports for real and imaginary parts
- packed complex words

The original element, with DREG1 reaching only the multiplier and DREG2 only
the adder, is also not built.

## Files and simulation

`rtl/`:

- `rdpp_pkg.sv`: sizes, control-field struct and codes
- `rdpp_bus_mux.sv`: MUXA–MUXD
- `rdpp_dreg.sv`
- `rdpp_sel.sv`
- `rdpp_logic.sv`
- `rdpp_mac.sv`
- `rdpp_out_reg.sv`
- `rdpp_dpe.sv`
- `rdpp_ctrl_store.sv`
- `rdpp_sequencer.sv`
- `rdpp_top.sv`

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_rdpp_radix4.sv`, `tb_rdpp_fft.sv` and the encoder package
`rdpp_asm_pkg.sv`. Each
testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rdpp_pkg.sv tb/rdpp_asm_pkg.sv rtl/rdpp_*.sv tb/tb_rdpp_top.sv \
    --top-module tb_rdpp_top -o sim && ./obj_dir/sim
```

Replace `tb_rdpp_top` with any other testbench. The block testbenches need
only `rtl/rdpp_pkg.sv` and the module files they test. The processor
testbenches run at the default size (16 × 32 bits, 64 words). The FFT
testbench simulates about 2.2 million clocks in a few seconds, and the
others take well under a second.

To change the size, use the parameters `N_DPE`, `W` and `DEPTH` on
`rdpp_top`. The field layout in `rdpp_pkg` follows the package constants,
so a different element count also needs `RDPP_N_DPE` changed in the package.
