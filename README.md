# Significance-driven memory protection for a near-threshold bio-signal processor

A wearable ECG node spends most of its energy in its SRAMs, and the cheapest
way to cut that energy is to lower the supply voltage until the memories sit
near the transistor threshold. There, ordinary 6-transistor (6T) SRAM cells
start to flip bits at random (around 0.07 % of bits at 0.65 V and 0.22 % at
0.6 V). Protecting all of memory with error-correcting codes, or building it
all from larger 8T cells, costs area and energy that eat the savings.

This design protects each part of memory only as much as its contents need:

| region | cells | holds | protection | on a single bit-flip |
|---|---|---|---|---|
| instruction memory | 8T | program | none needed, the cell is reliable | (does not happen) |
| DM_Rest | 6T | control data, scalars, pointers | SECDED on every word | corrected |
| Extr_buffer | 6T | non-sparse signal window (resampled RR intervals) | SECDED on the top 11 bits of each word only | corrected in the MSBs; the LSBs keep the error |
| DWT_buffer, significant words | 6T | large low-frequency wavelet coefficients (10 % of the words) | SECDED | corrected |
| DWT_buffer, other words | 6T | near-zero wavelet coefficients | one parity bit | the word reads back as **0** |

The idea rests on two points. First, an error in an intermediate signal buffer
only degrades the final output (the LF/HF ratio of a heart-rate-variability
spectrum), while an error in code or control data can crash the program.
Second, the two signal buffers have different statistics. The extrapolated
window is spread over its whole range, so every word matters equally and only
the high-order bits are worth protecting. The wavelet window is sparse: nearly
every coefficient is close to zero. A flip in a high bit of such a word would
turn a tiny value into a huge one, so when parity shows an error it is better
to return the value the word almost certainly had, zero. The few large
coefficients, which are always the low-frequency ones at known positions, get
full correction.

With the default configuration (11 protected MSBs, 10 % significant DWT words)
the evaluation this design follows reports about 2.6 % error in the LF/HF
ratio at 0.65 V, and about 18 % less buffer energy than full SECDED protection.

The processor core is not part of this RTL. It is an off-the-shelf
ARM Cortex-M3 that runs the spectral-analysis software. Its instruction and
data ports are ports of the top module.

## Block structure

```
                      wbsn_dsp_top
   NVM port ──► boot_loader ──► instr_mem_8t ──► if_* (processor fetch)
                     │
                 boot_done_o (processor reset release)

   d_* (processor data bus) ──► hetero_dmem ─┬─ dm_rest      (sram_6t_array 1024 x 39)
   flip_* (bit-flip injection) ─────────────►├─ extr_buffer  (sram_6t_array  512 x 37)
                                             └─ dwt_buffer   (sram_6t_array   52 x 39
                                                             + sram_6t_array 460 x 33)
   each protected region: secded_enc on the write path, secded_dec on the read path
```

| file | contents |
|---|---|
| `rtl/wbsn_mem_pkg.sv` | `DATA_W`, code-size functions (`hamming_bits`, `secded_bits`, `data_pos`), `rd_status_e`, `dm_region_e` |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | extended Hamming code for any field width K |
| `rtl/sram_6t_array.sv` | single-port storage array with a bit-flip port |
| `rtl/dm_rest.sv`, `rtl/extr_buffer.sv`, `rtl/dwt_buffer.sv` | the three protected data-memory regions |
| `rtl/hetero_dmem.sv` | address decoding and response multiplexing over the regions |
| `rtl/instr_mem_8t.sv` | instruction memory |
| `rtl/boot_loader.sv` | NVM to instruction-memory copy at bootstrap |
| `rtl/wbsn_dsp_top.sv` | top level |

## The SECDED code

`secded_enc` and `secded_dec` implement a classic extended Hamming code for a
K-bit field. Codeword positions are numbered from 1. Powers of two hold the
Hamming check bits, and the data bits fill the other positions in order
(`data_pos(j)`). Hamming bit i is the XOR of the data bits whose position has
bit i set. One more bit holds the overall parity of data and Hamming bits.
The code needs `r` Hamming bits, the smallest with `2**r >= K + r + 1`, plus
the parity bit:

* K = 32 (full words): 6 + 1 = **7** check bits, 39-bit stored word;
* K = 11 (Extr_buffer MSB field): 4 + 1 = **5** check bits, 37-bit stored word.

Decoding: the syndrome is the recomputed Hamming bits XOR the stored ones.

* Odd overall parity means a single error. The syndrome is the position of
  the flipped bit: 0 is the parity bit itself, a power of two is a Hamming
  bit, and anything else is a data bit, which is flipped back.
* Even parity with a nonzero syndrome means a double error, reported as
  `RD_UNCORRECTABLE`.
* If the syndrome points past the end of the codeword, the word has several
  errors; this is also reported as uncorrectable.

Both are pure combinational logic. The masks are constants computed at
elaboration, so each check bit is one XOR tree.

The evaluation behind this design counts six ECC bits per 32-bit word and
calls the code SECDED. Six bits are enough for single error correction but
not for double error detection. This RTL implements true SECDED and spends
seven bits.

## Stored word layouts

Check bits are stored above the data in the same array word: `{check, data}`.

* DM_Rest and significant DWT words: `[38:32]` SECDED over `[31:0]`.
* Extr_buffer: `[36:32]` SECDED over `[31:21]` (the 11 MSBs); bits `[20:0]`
  have no protection. With `PROT_MSB = P`, the check field is `secded_bits(P)`
  wide and covers `[31:32-P]`.
* Non-significant DWT words: `[32]` even parity over `[31:0]`.

The DWT buffer is split into two arrays of different width, because
significant and non-significant words carry different numbers of check bits.
Words `0 .. SIG_WORDS-1` are significant, with
`SIG_WORDS = ceil(DEPTH * SIG_PERCENT / 100)` (52 by default). The software
must therefore place the low-frequency (approximation) coefficients at the
start of the buffer. This is the usual output order of a DWT, but it is a
contract with the software.

## Read status

Every data read returns a `rd_status_e` with the data:

| status | meaning |
|---|---|
| `RD_CLEAN` | no error seen. In the Extr_buffer LSBs and for an even number of flips in a parity-protected word, errors are not seen at all. |
| `RD_CORRECTED` | a single flip was corrected; the data is exact |
| `RD_ZEROED` | parity failed in a non-significant DWT word; 0 returned |
| `RD_UNCORRECTABLE` | a double flip in a SECDED field; the data must not be trusted |

Nothing in the hardware acts on the status. The status is there for the
software, or for a monitor that counts error rates.

## Interfaces and timing

All regions share one convention:

* Single port, one access per cycle: `req`, `we`, `addr` and `wdata`.
* A read returns `rvalid`, `rdata` and `status` exactly one cycle later.
  Back-to-back reads run at one per cycle.
* Correction sits in the same cycle as the array read.
* Reset (`rst_ni`, asynchronous, active low) clears only the control flops.
  The arrays are not reset.

Data address map of `hetero_dmem` (32-bit word addresses, default sizes):

| word address | region |
|---|---|
| 0 – 1023 | DM_Rest |
| 1024 – 1535 | Extr_buffer |
| 1536 – 1587 | DWT_buffer, significant |
| 1588 – 2047 | DWT_buffer, non-significant |

At other sizes, an address past the last region reads 0 with `d_addr_err_o`,
and a write there is dropped. Accesses are word-only. A byte store into an
ECC-protected word would need read-modify-write, which this design does not
provide.

Bootstrap proceeds as follows:

1. After reset, `boot_loader` waits one cycle.
2. It requests each NVM word in turn: `nvm_req_o` is high for one cycle, and
   the NVM answers with `nvm_rvalid_i` after any delay.
3. It writes each word to the same address in the instruction memory.
4. It raises `boot_done_o`, which must hold the processor in reset until then.

With an NVM that answers L cycles after the request, the boot takes
`1 + IM_WORDS * (L + 1)` cycles: 16385 cycles at the defaults with L = 1.
Fetches before `boot_done_o` are ignored. After it, `if_rdata_o` carries the
word one cycle after `if_req_i`.

`flip_en_i`, `flip_addr_i` and `flip_mask_i` XOR a mask into one stored data
word, check bits included. They use the same address map as `d_addr_i`, and
the mask is applied after a write to the same word in the same cycle. They
reproduce near-threshold upsets in simulation. Tie `flip_en_i` low in a real
chip.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `PROT_MSB` | 11 | Extr_buffer MSBs under SECDED. Evaluated points: 11, 26, 32; 4 proved too few. |
| `SIG_PERCENT` | 10 | share of DWT_buffer words under SECDED. Evaluated points: 5–100 %. |
| `EXTR_WORDS`, `DWT_WORDS` | 512 | one 512-sample analysis window each |
| `REST_WORDS` | 1024 | DM_Rest size; chosen here, not given by the evaluation |
| `IM_WORDS` | 8192 | instruction memory size (32 KiB); chosen here, the application size is not given |

## What follows the source design and what is chosen here

The following come from the source design:

* the region split;
* 8T instruction memory without ECC;
* SECDED for control data and significant words;
* SECDED on the MSBs with unprotected LSBs for the non-sparse buffer;
* parity with substitution by zero for non-significant sparse words;
* the static significance split by DWT frequency band;
* 512-word windows;
* the 11-MSB / 10 % default;
* full shadowing of the program image from NVM at bootstrap.

The following are this implementation's choices:

* the exact code construction, and 7 rather than 6 check bits;
* even parity;
* the address map, region order and the sizes of DM_Rest and the instruction
  memory;
* one-cycle read timing, single-port arrays and word-only access;
* the read-status output;
* the position of the significant words (lowest addresses);
* the boot handshake;
* the bit-flip port.

Not built:

* the processor core (a licensed Cortex-M3);
* the NVM;
* the analog front end, ADC and radio;
* the spectral-analysis application, which is software.

The energy figures quoted above come from memory models in the evaluation,
not from this RTL.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` is an independent
reference model of the code, which computes check bits as the XOR of the
positions of the set bits. `tb/nvm_model.sv` is a behavioural NVM. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wbsn_mem_pkg.sv tb/tb_ref_pkg.sv tb/tb_wbsn_dsp_top.sv \
    --top-module tb_wbsn_dsp_top -o sim
./obj_dir/sim
```

`tb_wbsn_dsp_top` runs the whole subsystem at its default sizes, in this
order:

1. It boots the full 8192-word image and checks the cycle count.
2. It fetches every instruction.
3. It writes one window into each region: control words, a non-sparse
   window and a sparse window.
4. It flips every stored bit with probability 0.22 %, plus a few deliberate
   single and double flips.
5. It reads all 2048 words back. Each word is checked against the rule of
   its region.

The testbench counts each mechanism: boot copy, ignored fetch during boot,
correction in each region, uncorrectable detection, LSB pass-through and
zero substitution. It fails if any count stays at zero.

`tb_protection_sweep` runs the evaluated protection points side by side.
It builds nine data memories, one for each combination of 11, 26 or 32
protected MSBs and 5, 10 or 15 % significant words. All nine receive the
same 25 windows and the same flips, at 0.07 % and at 0.22 % per data bit,
with at most one flip per word. The testbench checks every read against its
configuration. It prints the residual absolute error left in each buffer and
checks that this error never grows when protection is added. The error
measured is the error in the stored samples, not in the final LF/HF ratio:
that would need the analysis software.

The buffer testbenches also run the non-default points `PROT_MSB = 26` and
`SIG_PERCENT = 100`. The address-error path only exists at sizes that leave
part of the address space unmapped, so `tb_hetero_dmem` checks it on a
smaller instance.
