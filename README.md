# Residue-code components for cyber-physical systems

This RTL collects the digital parts of a cyber-physical system (CPS) that
measures analog signals, computes on them, exchanges them over a network and
presents the result to an operator. Most of it rests on one idea. A number
does not have to be written as a binary word. It can be written as its set of
residues modulo a few pairwise coprime moduli (a residue number system, RNS).
Each residue can then be carried **one-hot**, as one active line out of P.
This is called the Haar-Krestenson (H-K) code. As a 3-bit binary word per
modulus it is called the Rademacher-Krestenson (R-K) code.

In the one-hot form, modular arithmetic needs no carries and no adder chains.
A subtraction mod P is a P x P grid of two-input gates, and a square mod P is a
wired OR of at most two lines. Either takes one gate level, whatever the word
length. The same one-hot lines fall naturally out of a flash ADC. So a
converter followed by residue arithmetic gives a very short path from the
analog input to the result.

The components are independent. They sit side by side in the top module
`cps_components_top`, each with its own ports and a shared clock and reset:

| Group | Modules | What it does |
|---|---|---|
| Squarer processor | `hk_squarer_proc`, `hk_diff_matrix`, `hk_mod_square`, `hk_code_register` | (x-y)^2 of two analog inputs in residue code |
| Multifunctional ADC | `flash_adc_hk`, `adc_comparator_line`, `adc_haar_encoder` | Flash ADC giving one-hot, binary and residue codes in parallel |
| Pixel coding | `rgb_crt_encoder`, `rgb_crt_decoder`, `rgb_channel_rcs_coder` | RGB pixel packed by the Chinese remainder theorem; colour channel in R-K/H-K code |
| Frame protocol | `dep_frame_tx`, `dep_frame_rx` | 7-bit data-exchange frame with register codes instead of bit stuffing |
| Galois-numbered MSK | `gmsk_galois_mapper`, `gmsk_galois_demapper` | Chooses one of four MSK tones per bit; checks the numbering at the receiver |
| Manchester framing | `dman_jk_encoder`, `dman_jk_decoder` | Differential or plain Manchester line with J/K-violation delimiters |
| Operator support | `neuro_subject_model`, `co_state_classifier` | Threshold neuro-model of a subject; normal/abnormal/breakdown state of a plant |

The packages are `hk_pkg`, `rgb_pkg`, `dep_pkg`, `gmsk_pkg` and `dman_pkg`.
`galois_seq4` is a helper shared by the two MSK modules.

## Residue codes in one page

Take the moduli P1..Pk, pairwise coprime, with product P0. Every integer
0 <= N < P0 is fixed by its residues r_i = N mod P_i.

- **H-K code.** Residue r_i is carried on line r_i of a group of P_i lines,
  with exactly one line high per group. The squarer's defaults (moduli 8, 9, 11
  and 13) use 41 lines for a range of 10296.
- **R-K code.** Each residue is a plain binary word. The colour-channel coder
  uses moduli 5, 7 and 8, with 3 bits each.
- **Back to an integer (CRT).** N = (sum r_i * B_i) mod P0. The base is
  B_i = m_i * P0/P_i, with m_i * (P0/P_i) = 1 mod P_i. For 5, 7 and 8 the bases
  are 56, 120 and 105. For the pixel moduli 256, 255 and 257 they are 16711425,
  8421376 and 8421120, and P0 = 16776960. `rgb_pkg::crt_basis` computes them
  during elaboration.

Subtraction, addition and multiplication work on each residue separately.
Nothing crosses between moduli. Only comparison, overflow detection and
conversion back to binary need all the residues together.

## The difference-modular squarer (`hk_squarer_proc`)

This block computes (x - y)^2 of two analog inputs x and y. That is one term of
a squared Euclidean distance, the core of distance-based pattern matching. The
data path per sample is:

```
ux --flash_adc_hk--> H-K(x) --+--hk_code_register (sx)--+
                                                        +--> per modulus P:
uy --flash_adc_hk--> H-K(y) --+--hk_code_register (sx)--+    hk_diff_matrix -> hk_mod_square -> sq_hk[P]
```

1. **ADCs.** Each input is a 16-bit sample of the voltage, with 2^16 as full
   scale. A `flash_adc_hk` with LEVELS = 100 turns it into the level
   floor(u * 100 / 2^16) and gives it as one one-hot group per modulus. The
   ADC's binary output is left unused here.
2. **Registers.** Two `hk_code_register`s, 41 bits each, take both codes on
   the clock edge where the strobe `sx` is high. The result therefore belongs
   to one instant for both inputs.
3. **Difference matrix** (`hk_diff_matrix`, one per modulus). The cell at
   row i (x residue) and column j (y residue) is a two-input gate. Its output
   means "(j - i) mod P". All cells with the same value are ORed into output
   line d. For P = 11, row 0 reads 0 1 2 ... 10 and row 1 reads 10 0 1 ... 9.
   Because the input is one-hot, exactly one cell is active.
4. **Modular squarer** (`hk_mod_square`). Output line s is the OR of the input
   lines d with d^2 mod P = s. For P = 11: 0<-0, 1<-{1,10}, 3<-{5,6},
   4<-{2,9}, 5<-{4,7}, 9<-{3,8}. Lines 2, 6, 7, 8 and 10 are never active,
   since they are not quadratic residues mod 11. Because d and P-d have the
   same square, the output does not depend on whether the matrix formed
   y - x or x - y.
5. **Result.** `sq_hk[m]` is the one-hot residue of (x-y)^2 mod MODS[m]. It is
   valid from the clock edge after the strobe, and `sq_valid` marks that
   cycle. Use the CRT above to read it as an integer.

**Worked example.** Take x = 29 and y = 17.
- x has residues (5, 2, 7, 3) mod (8, 9, 11, 13); y has (1, 8, 6, 4).
- The matrices give y - x = (4, 6, 10, 1).
- The squarers give (0, 0, 1, 1), which is 144 = 12^2 mod (8, 9, 11, 13).

**Range.** The moduli 8, 9, 11 and 13 cover 10296 values, which is enough for
inputs 0..99 (99^2 = 9801). Wider inputs need more or larger moduli. For
example, 0..127 needs 16129 and does not fit the defaults. `MODS`, `NMOD`,
`PMAX` (largest modulus) and `LEVELS` are parameters. An elaboration check
rejects a modulus above `PMAX`. The test bench `tb_hk_squarer_table12`
runs four more configurations side by side:

| Inputs | Moduli | Product |
|---|---|---|
| 0..15 | 2, 3, 5, 11 | 330 |
| 0..255 | 13, 16, 17, 19 | 67184 |
| 0..1023 | 29, 32, 33, 37 | 1133088 |
| 0..2047 | 43, 45, 47, 49 | 4456305 |

For each pair it checks every residue, and it checks the integer that the
residues decode to.

**Timing.** From the registers to `sq_hk` there are two gate levels, AND then
OR, for the matrix and one OR level for the squarer. The word length does not
change this.

## The multifunctional flash ADC (`flash_adc_hk`)

- **Comparators** (`adc_comparator_line`). This is a behavioural model of the
  resistor ladder and the paraphase comparators. Comparator j (j = 1..L-1)
  trips when u * L >= j * 2^VW. It gives both a direct and an inverse output.
- **Haar line** (`adc_haar_encoder`). One two-input AND-NOT per level turns
  the thermometer code into the inverse one-hot (Haar) code. Line j is low
  only when comparator j has tripped and comparator j+1 has not. Line 0 is
  simply comparator 1's direct output, and the top line is comparator L-1's
  inverse output.
- **Binary and residue outputs.** A bank of multi-input AND-NOT gates reads
  the Haar lines. Binary bit b is the NAND of the inverse Haar lines whose
  index has bit b set. Residue line r of modulus P is the NAND of the lines
  j with j mod P = r. The gate masks are constants computed during
  elaboration.
- **Outputs.** The binary code, the residue codes and the one-hot code all
  come out after two gate levels.

The defaults are the small example configuration: 8 levels, 3 binary bits,
and moduli 3 and 4. The squarer instantiates the same ADC with 100 levels and
four moduli. The test bench `tb_flash_adc_hk_configs` runs four larger
configurations through every level:
- 1024 levels with moduli {7, 12, 13}, product 1092;
- 1024 levels with moduli {32, 33}, product 1056;
- 100 levels with moduli {3, 5, 7}, product 105;
- 1000 levels with moduli {31, 33}, product 1023.

Any set of pairwise coprime moduli works, as long as their product reaches
the number of levels.

## Pixel coding

- **`rgb_crt_encoder`.** Treats R, G and B as residues mod 256, 255 and 257
  and packs them into one 24-bit number N = (R*B1 + G*B2 + B*B3) mod 16776960.
  For example, (10, 200, 100) packs to 9187850. G must stay below 255, and an
  assertion checks this. The encoder is combinational.
- **`rgb_crt_decoder`.** Reduces N mod 256, 255 and 257. The red value is just
  the low 8 bits. `code_bad` flags a word that is no pixel: N >= P0, or a blue
  residue of 256.
- **`rgb_channel_rcs_coder`.** Codes one 0..255 intensity as residues mod
  5, 7 and 8. It outputs them both as the R-K code (9 bits, {a, c, d}) and as
  the H-K code (20 one-hot lines). It also decodes an R-K word back with the
  bases 56, 120 and 105. Decoded values above 255 set `rk_bad`. 5*7*8 = 280,
  so 24 of the 280 codes are unused and serve for error detection.

## The 7-bit frame without bit stuffing (`dep_frame_tx`, `dep_frame_rx`)

A sensor of accuracy class 1.0 needs only the values 0..99. A 7-bit word
leaves codes 100..127 unused, and the frame uses them for framing:

| Word | Code | Role |
|---|---|---|
| IDLE | 127 (1111111) | line idle; also fill inside the PDU |
| FLAG | 126 (1111110) | frame start and end |
| R1..R5 | 103, 107, 111, 115, 119 | register codes announcing the next field |
| info | 0..99 | address, control, data and CRC digits |

The frame on the line is:

```
IDLE.. FLAG R1 A1[5] R2 A2[5] R3 Y R4 PDU.. R5 CRC[3] FLAG IDLE..
```

- **No bit stuffing.** A data word can never look like a flag, so no bits are
  inserted and the frame length depends only on the field lengths.
- **Addresses.** They are 5 digit-words each: 35 bits, enough for a 32-bit
  address.
- **CRC.** CRC-16/CCITT (polynomial 0x1021, initial value 0xFFFF, MSB first)
  over the 7-bit words of A1, A2, Y and the PDU. It is sent as three info
  words holding bits 15:10, 9:4 and 3:0.
- **Transmitter.** Takes the PDU from a valid/ready stream ending with
  `pdu_last`. It sends one word per clock and inserts IDLE when the source
  stalls.
- **Receiver.** Skips IDLE words inside a frame. It checks the order of the
  register codes and the field lengths, delivers the PDU words, and reports
  `frame_ok` or `frame_err` at the closing flag. It also counts good and bad
  frames. After an error it waits for the next FLAG.

## Galois-numbered MSK tones (`gmsk_galois_mapper`, `gmsk_galois_demapper`)

Each data bit is sent as one of four MSK tones.
- **Ones.** The ones of a packet are numbered by the recurrent sequence
  s[n] = s[n-1] xor s[n-4], started at 1111. It has period 15 and runs
  1111 0101 1001 000. A one sends tone f11 when its numbering bit is 1 and f12
  when it is 0.
- **Zeros.** They are numbered by their own copy of the sequence and send
  f21 or f22.
- **Receiver.** It keeps the same two counters, so a tone whose numbering bit
  is wrong reveals an error. A flipped bit shifts both sequences, so an error
  keeps showing until the next packet start (`sof`).
- **Interface.** Tones are 2-bit indices (`gmsk_pkg::freq_t`). Building the
  analog waveform is outside this RTL.
- **Limitation.** The demapper only *detects* errors (`num_err`, `err_count`).
  It does not correct them.

## Manchester framing with J/K delimiters (`dman_jk_encoder`, `dman_jk_decoder`)

Two line codes are available, selected by the parameter `DIFF`.

- **Differential Manchester (`DIFF = 1`, the default).** Every bit has a
  transition in the middle. A 0 also has a transition at the start of the
  bit; a 1 has none.
- **Plain Manchester (`DIFF = 0`).** A 0 is high then low, and a 1 is low then
  high.
- **Delimiters.** Both codes use the same code violations on purpose:
  - J has no transition at all.
  - K changes at the start only.
  - The start delimiter is J K 0 J K 0 0 0.
  - The end delimiter is J K 1 J K 1 1 1.

  In plain Manchester, a start trigger after the bits 1 0 gives these
  half-bit levels: 01 10 00 11 10 00 11 10 10 10.
- **Encoder.** Emits one half-bit per clock. Between frames it sends 1 bits,
  so there are always mid-bit transitions to follow. Bytes go out MSB first.
- **Decoder.** Takes the half-bit phase (`first_half`) from outside, because
  clock recovery is not part of this RTL. It classifies each symbol, finds SD
  and ED, assembles bytes, and flags a J/K violation where a data byte or the
  end delimiter should be.

## Operator support

- **`neuro_subject_model`.** Works on each of NG = 9 input flows. For each
  flow it forms the weighted sum sum_j alpha[g][j] * w[g][j], takes its sign
  (-1, 0 or +1), and multiplies the sign by a significance coefficient k[g].
  The response z is the sum over the flows. Numbers are signed two's
  complement, and the result is registered one clock after `in_valid`. With
  all k = 1, z is the plain sum of the signs.
- **`co_state_classifier`.** Averages blocks of 8 samples of a plant parameter
  into M_x. It reports `normal` if |M_x - M*| <= tol, `abnormal` if the
  distance is within eps, and `breakdown` beyond eps. An operator display
  would show the state (for example as a face picture); the display itself is
  not part of this RTL.

## Where this RTL departs from its source description, or fills gaps

- **Squarer range.** The defaults cover inputs 0..99. The source also mentions
  a 0..127 example whose square (16129) the stated moduli cannot hold. Use
  more moduli for it.
- **Analog parts.** The comparators are an ideal behavioural model on a 16-bit
  sample, not real-valued voltages. The MSK tone synthesis is not modelled.
- **Frame protocol.** Several details were not given and are chosen here:
  - the CRC polynomial and its 3-word form;
  - the IDLE fill word inside the PDU;
  - the single control word Y;
  - all handshakes and resets.

  The fifth register code is 119, the next in the family 103, 107, 111, 115.
  Only the 7-bit frame is built. The same scheme with 4-, 6- or 8-bit words
  would need its own code table.
- **Galois numbering.** The numbering restarts at every packet. The tone rule
  (1 -> f11, 0 -> f12 for ones; 1 -> f21, 0 -> f22 for zeros) is applied to
  the sequence above. The receiver does not correct errors.
- **Manchester.** In the differential code, J and K follow the usual
  token-ring convention. The plain code follows the drawn start trigger
  1 0 J K 0 J K 0 0 0. Neither code is named as the main one; differential
  is the default here.
- **Neuro-model.** The significance coefficient is applied as a multiplier on
  each flow's sign. alpha is used as a weight in the product alpha * w, as
  the model's equation has it. The prose also calls alpha a threshold; a
  threshold can be added as one more factor with a fixed w. The memory
  environment and the model's output flows are not built.
- **State classifier.** One radius eps separates abnormal from breakdown.
  M_x is a plain block mean.
- **Clocking.** Every sequential block uses one clock and a synchronous,
  active-low reset `rst_n`. Gate-delay figures (such as a squarer path of
  8 gate delays) are properties of a technology and are not modelled.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. With
Verilator 5:

```
verilator --binary --timing -y rtl -Irtl \
  rtl/hk_pkg.sv rtl/rgb_pkg.sv rtl/dep_pkg.sv rtl/gmsk_pkg.sv rtl/dman_pkg.sv \
  tb/tb_hk_squarer_proc.sv --top-module tb_hk_squarer_proc
./obj_dir/Vtb_hk_squarer_proc
```

Run it from the repository root. Replace the testbench name for another
block.

`tb/tb_cps_components_top.sv` runs the whole top at its default parameters.
It exercises every mechanism and counts how often each one happened:
- squarer strobes, ADC levels, pixel round trips and bad codes;
- good frames, fill words, CRC errors and framing errors;
- tones and numbering errors;
- Manchester frames and violations;
- neuro-model signs and the three plant states.

If any mechanism never happened, the testbench counts a failure. It finishes
in seconds.

Two more testbenches run configurations other than the defaults:
- `tb/tb_hk_squarer_table12.sv` runs the squarer with the four other module
  sets listed above. Its largest ADCs have 2048 levels, so Verilator takes
  about a minute to compile it. The simulation itself is instant.
- `tb/tb_flash_adc_hk_configs.sv` runs the 1024-, 1000- and 100-level
  converters through every level.
