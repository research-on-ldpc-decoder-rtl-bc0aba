# LDPC decoders: WiMAX 3-state fully-parallel, DVB-T2 conflict-free layered, LSC-ET

This repository holds SystemVerilog RTL for three pieces of LDPC decoding hardware:

1. A **WiMAX (IEEE 802.16e) decoder core**. It is fully parallel and bit-serial.
   - 96 processing units of 24 two-bit lines.
   - A layer takes 3 clocks.
   - Layered offset min-sum with (6,1) quantization.
   - Early-detect saturation in the post-VNU.
   - Advanced dynamic quantization (ADQ).
2. A **DVB-T2 decoder**. It is 40-parallel layered normalized min-sum with a factor of 0.75.
   - The parity-check matrix is rearranged so that one ROM entry describes nine layers.
   - Message-updating conflicts are resolved exactly by dividing a conflict layer into two sub-layers.
3. An **LSC-ET unit**. It is a generic early-termination checker for layered decoders. The parity checks of iteration i+1 use the hard decisions of iteration i.

They are independent designs. `ldpc_top` places them side by side on one clock and reset. Each block's ports are brought out with the prefix `w_`, `d_` or `e_`.

## Files

| RTL (`rtl/`) | What it is |
|---|---|
| `wmx_pkg.sv` | WiMAX constants, PU state type, compressed CN word (4 minima, 2 positions, 24 signs) |
| `wmx_decoder.sv` | WiMAX core: controller, PN array, CN memory, PU array, ADQ, parity check, output |
| `wmx_pu.sv` | 3-state PU: 24 lines, two CN_RECOVER units, Min_finder, adq flag |
| `wmx_vnu_line.sv` | one 2-bit serial line: pre-VNU, VN register, post-VNU with early-detect saturation, ADQ halving |
| `wmx_min_finder.sv` | CNU: min1/min2/position per half, sign products, offset and 4-bit limit |
| `wmx_cn_recover.sv` | expands a compressed CN word into 24 signed messages |
| `wmx_cn_mem.sv` | register CN memory, one word per PU and layer |
| `wmx_pn.sv` | 2-bit rotator for sub-block sizes up to 96 |
| `wmx_adq.sv` | ADQ trigger: window of four layers of pseudo-unsatisfied counts |
| `dvb_pkg.sv` | DVB-T2 constants, PCM entry (A, S), compressed extrinsic word |
| `dvb_decoder.sv` | DVB-T2 decoder with its controller |
| `dvb_igu.sv` | 22 entry buffers and the next-layer function (A, S) -> (A-8, S-1) or (A+1, S) |
| `dvb_pd.sv` | pattern decoder: division pattern of a conflict block |
| `dvb_pe.sv` | processor element: SCFU, 22 v2c buffers, Word-MEM |
| `dvb_app_mem.sv`, `dvb_sign_mem.sv`, `dvb_pcm_rom.sv` | APP memory (1620 x 40 x 8), sign memory (7128 x 40), PCM ROM (3960 entries) |
| `barrel_shifter.sv` | 40-way rotator used as PN0 and PN1 |
| `lsc_et.sv` | LSC-ET checker |
| `ldpc_top.sv` | top level |

Each `tb/tb_<block>.sv` is a self-checking testbench. It prints `TB_RESULT checks=N failures=M` at the end.

## WiMAX core

### Data flow

- No APP memory is used. The 6-bit APP messages stream two bits per clock through three stages:
  - out of the post-VNU of one layer;
  - through one rotator per block column;
  - into the pre-VNU of the next layer.
- States S0, S1 and S2 carry bits [1:0], [3:2] and [5:4]. A layer therefore takes 3 clocks.
- The PU's Min_finder sees the complete VN values at the end of S2. Its result is registered and written to CN memory in the next S0.
- Alignment: line r of column c holds VN (c, (r + a_c) mod z).
  - Each non-zero block with shift s rotates column c by (s - a_c) mod z.
  - Zero blocks let their lines bypass.

### Early-detect saturation

The post-VNU checks for saturation at S1. The rule is:

- EDP = !VN[5] & VN[4] & !Sgn & Carry forces APP[3:2] = 11 and then APP[5:4] = 01.
- EDN = VN[5] & !VN[4] & Sgn & !Carry forces APP[3:2] = 00 and then APP[5:4] = 10.

Bits [1:0] are already sent, so the result is off by up to 3 LSB.

### ADQ

- Every PU raises `adq` when its check node's sign product is negative.
- Once per frame, the trigger fires when the sum over the current and three previous layers is below `ps_th`.
- Two rounds later, every stored VN value and every stored CN magnitude is halved.

### Frame timing

1. Load the base matrix through `bm_*`.
2. Hold `llr` and the configuration steady, and pulse `start`.
3. Decoding takes `niter x nlayers` rounds.
4. One more round and `nlayers` clocks check parity. `ok` = all checks satisfied.
5. One clock rotates the columns back. The hard decisions then appear on `hd`, and `done` pulses.

From start to done: `3*nlayers*niter + nlayers + 5` clocks.

### Not built

The two-layer concurrent mode with the two switch arrays is not built. The PU has the `dual` input and the OR gate for the adq flag, but the decoder ties `dual` to 0.

## DVB-T2 decoder

### Mapping

- Check c = j + 9q*s (0 <= j < 9q, q = (N-K)/360) is row s of layer (j mod q)*9 + j div q.
- Information bit 360b + k + 9t is lane t of APP block 9b + k.
- Parity bit c is lane s of APP block kb + layer.
- Row s of a block with shift S reads lane (s - S) mod 40.
- The PCM ROM holds, for each group of nine layers, the first layer's (A, S) list, sorted so that two entries with the same A are adjacent.
  - For the parity part this is the own block (A = kb + 9g, S = 0) and the previous-parity block.
  - For group 0 the previous-parity block is A = kb + 9q - 1, S = 1. Row 0 of that block is the staircase edge that does not exist. The controller removes it.

### Conflict blocks

Two adjacent entries with the same A make a conflict block. The pattern decoder works from the distance d = |S1 - S2| folded to at most 20:

- It halves d and 40 together while both are even.
- Row x goes to the second sub-layer when bit δ of x is set.
- d = 8 and d = 16 cannot be divided. The decoder then reports `pd_err`.

### Schedule

Per group, the controller loads w entries. Each layer (or sub-layer) then takes:

- 1 clock to open;
- w read clocks (APP-MEM -> PN0 -> PEs);
- 1 clock to finish;
- w write clocks (PEs -> PN1 -> APP-MEM, signs to Sign-MEM).

A lane or sign is written only if its PE was active in that sub-layer.

Clocks per iteration: `q*(w + 9*(2w+2)) + (2w+2)*(number of conflict layers)`.

### Not built

The overlapped pipeline with the bypass unit and the APP selector is not built. It would hide most of the read/write latency and the second sub-layer. The arithmetic results do not change, but the built schedule needs roughly twice the clocks.

## LSC-ET

- `hd_new = hd_upd ? app_sign : hd_old` keeps each variable's hard decision from its last update position in the iteration. This is the extra bit stored with each APP word.
- The checker XORs the carried bits per check node between `layer_start` and `layer_end`.
- `stop` pulses after `iter_end` when every layer of the iteration was satisfied and the iteration was not the first one.

## Verification

All block and end-to-end testbenches pass.

- `tb_wmx_decoder` (NPU = 8):
  - compares every hard decision, `ok`, `adq_changed` and the clock count with a bit-exact model written in the testbench;
  - the model covers offset min-sum, early-detect saturation and the ADQ trigger and halving;
  - frames use random codes, with and without ADQ, with heavy noise, and with z < NPU;
  - the same model was also run at 96 PUs and 12 layers, and matched.
- `tb_dvb_decoder`:
  - runs a small code in DVB-T2 form (q = 3, N = 2520) with three planted conflict blocks, one per division pattern;
  - the reference model works on the original parity-check matrix, not the rearranged one;
  - checks every hard decision, decoding of every frame and the clock count.
- `tb_ldpc_top` runs the top at its default sizes:
  - it counts the following mechanisms: WiMAX decoded / failed / ADQ frames, early-detect saturations, DVB-T2 conflict sub-layers, removed edges, `pd_err`, and LSC-ET stops.
- Smaller testbenches cover the rotators, memories, IGU, pattern decoder, ADQ trigger and LSC-ET.
  - The pattern decoder test checks every shift pair against the property that rows x and x+d land in different sub-layers.

One observation from the tests: with 6-bit APPs and fixed quantization, frames whose variable nodes take part in many layers can fail to decode even without noise. The stored APP clips while the old CN messages are still subtracted. This is the saturation effect that the quantization change addresses. The end-to-end test therefore only requires that at least one WiMAX frame decodes. It does not require every frame to decode.

## Sizes and assumptions

Parameters default to the numbers of the design:

- WiMAX: 96 PUs, 24 columns, 12 layers, ADQ window 4.
- DVB-T2: 40 lanes, 1620 APP blocks, 810 layers, 7128 sign words, 3960 ROM entries, row weight up to 22.

Memories are written as arrays with combinational read.

These choices are mine, because the description does not fix them:

- the load ports for the base matrix and the PCM ROM;
- the 50-bit CN word;
- one Min_finder instead of two;
- one PN per block column (24);
- rounding down in the 0.75 scaling;
- the LSC-ET interface.
