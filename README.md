# Joint crosstalk-avoidance and error-correcting codes for NoC links

The wires between two switches of a network-on-chip are long, parallel and
tightly packed. Two things go wrong on them. A wire whose two neighbours both
switch against it sees up to four times its coupling capacitance: it is slow
and it burns energy. And a transient upset (supply noise, a particle strike,
ground bounce) can flip a wire. This design puts a small encoder at the
output of the sending switch and a decoder at the input of the receiving
switch, so that the link

* never lets a wire see both of its neighbours switch against it (maximum
  coupling p = 2, so the worst-case wire delay drops from (1 + 4λ)τ to
  (1 + 2λ)τ, λ being the ratio of coupling to ground capacitance), and
* corrects any single wrong wire.

Because every single upset is corrected, the link wires can be driven at a
lower swing (0.86 V instead of 1.2 V is the figure this design was sized
around) with no loss of reliability against an uncoded link, which is where
most of the energy saving comes from.

Three codes are provided, all built on the same idea: send every flit bit
twice on adjacent wires and add the flit's even parity.

| code | wires for a K-bit flit | 32-bit flit | where the parity goes |
|------|------------------------|-------------|-----------------------|
| DAP, duplicate-add-parity | 2K+1 | 65 | top wire |
| BSC, boundary shift code | 2K+1 | 65 | alternates top wire / wire 0 on successive codewords |
| MDR, modified dual rail | 2K+2 | 66 | two copies, on the two top wires |

## Why duplication limits coupling

Number the wires of a K-bit DAP link 0..2K. Flit bit x[i] drives wires 2i and
2i+1; wire 2K carries x[0] ^ ... ^ x[K-1]. Each data wire has a partner that
always switches with it, so at most one of its two neighbours can switch in
the opposite direction: coupling ≤ 2. The parity wire has one neighbour only.

BSC goes one step further. On every second codeword the whole DAP word moves
up by one wire and the parity re-enters at wire 0:

```
unshifted:  code[2i] = code[2i+1] = x[i]      code[2K] = parity
shifted:    code[2i+1] = code[2i+2] = x[i]    code[0]  = parity
```

The odd wires carry x[0..K-1] in both forms; only the even wires change
meaning. Between two successive codewords the pair boundaries therefore never
coincide: a wire's neighbour on one side started from the same value as the
wire, and its neighbour on the other side ends at the same value, so neither
can switch fully against it.

For a 4-bit flit the three codes give (top wire first, one row per cycle after
reset):

| cycle | flit | BSC | DAP | MDR |
|-------|------|-----|-----|-----|
| 1 | 0010 | 100001100 | 100001100 | 1100001100 |
| 2 | 0010 | 000011001 | 100001100 | 1100001100 |
| 3 | 1100 | 011110000 | 011110000 | 0011110000 |
| 4 | 1010 | 110011000 | 011001100 | 0011001100 |
| 5 | 0100 | 100110000 | 100110000 | 1100110000 |
| 6 | 0011 | 000011110 | 000001111 | 0000001111 |

The example as originally printed has 1 on the parity wire in row 4,
although the even parity of 1010 is 0. The encoders follow the parity
equation, so they produce the row shown here. The testbenches feed the
published row-4 codewords to the decoders: to them it is one wrong parity
wire, and they still return 1010 and flag the mismatch.

## How the decoders correct an error

The decoder recomputes the parity of the upper copy (the odd wires) and
compares it with the received parity.

* They agree: the upper copy is intact (or the error is on the lower copy),
  so the upper copy is the flit.
* They differ: either the upper copy or the parity wire was hit; the lower
  copy (the even wires) is intact and is taken.

A 2:1 multiplexer per bit implements this, with the parity comparison as the
select. That select is brought out as `mismatch`.

The BSC decoder first undoes the shift of every second codeword (moves the
word down one wire, parity back to the top) and then decodes as DAP. It keeps
its own phase bit, reset to "unshifted" and flipped on every codeword it
accepts, so encoder and decoder stay in step as long as every codeword sent is
received exactly once.

The MDR decoder has two parity copies. When they disagree the single error is
on a parity wire, both data copies are intact, and the upper copy is kept;
otherwise it decodes like DAP. This use of the second copy is a choice of this
implementation.

## Pipeline and timing

Each codec is a register stage, so the link gains two pipeline stages:

```
cycle t    : in_valid=1, in_flit=F sampled by the encoder
cycle t+1  : codeword of F on the wires, link_valid=1, decoder samples it
cycle t+2  : out_valid=1, out_flit=F
```

Flits may be sent back to back or with idle cycles between them. When the
encoder enable is low the wires keep their last codeword and do not toggle.
A BSC phase advances per codeword sent, not per clock, so idle cycles do not
break the alternation. A one-bit valid wire runs uncoded beside the coded
wires; it stands in for the switches' flow control, which is outside this
design. All resets are synchronous and active low, and clear wires and
outputs.

## Modules

| file | what it is |
|------|------------|
| `rtl/codec_pkg.sv` | `code_e` (`CODE_DAP`, `CODE_BSC`, `CODE_MDR`), `FLIT_W = 32`, `code_width()` |
| `rtl/dap_encoder.sv`, `rtl/dap_decoder.sv` | DAP codec stages |
| `rtl/bsc_encoder.sv`, `rtl/bsc_decoder.sv` | BSC codec stages; the encoder also outputs `shifted` |
| `rtl/mdr_encoder.sv`, `rtl/mdr_decoder.sv` | MDR codec stages |
| `rtl/coded_link.sv` | one link: encoder, wires, decoder; `CODE` parameter picks the code |
| `rtl/jcac_link_top.sv` | top: one 32-bit link of each code side by side |

Every module has a `K` parameter (flit width, default 32). Encoders have
`enc_en`, `flit[K-1:0]` and `code[NW-1:0]`; decoders have `dec_en`,
`code[NW-1:0]`, `flit[K-1:0]`, `flit_valid` and `mismatch`.

`coded_link` also has a `wire_fault[NW-1:0]` input that is XORed onto the
wires between the stages. It models transient upsets for verification; tie it
to zero in a real link. `link_code` shows what the encoder drives.
`coded_link` carries a concurrent assertion, `a_max_coupling`, that fails if
two successive codewords ever give a switching wire a coupling above 2.

The top `jcac_link_top` has three independent channels with prefixes `dap_`,
`bsc_` and `mdr_`: `*_in_valid`, `*_in_flit`, `*_fault`, `*_link_code`,
`*_out_valid`, `*_out_flit`, `*_out_mismatch`, plus `bsc_link_shifted`. To use
a single code in a network, instantiate `coded_link` with the wanted `CODE`
on each switch-to-switch link.

## What is not here

* **The NoC switches and the network.** The codes were evaluated in 8×8 mesh
  and folded-torus networks of 64 cores, with wormhole switching and
  dimension-order (e-cube) routing. Those switches come from earlier work and
  are not specified here (no port count, buffer depth, flit format or flow
  control), so none is provided. A mesh of that size has 224 unidirectional
  links, a folded torus 256; each would take one `coded_link`.
* **Energy.** The savings were obtained with gate-level power analysis of the
  codecs and switches at 130 nm and a wire capacitance model. RTL cannot
  reproduce those numbers. The published results were 17–31 % lower energy
  per bit for the mesh and 28–46 % for the folded torus, for λ = 1 to 4, with
  DAP and MDR slightly better than BSC.

## Verification

Each module has a self-checking testbench in `tb/`, each ending with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_dap_encoder`, `tb_bsc_encoder`, `tb_mdr_encoder` | the 4-bit table above; random 32-bit flits against a reference model; one-cycle latency; wires hold when idle; BSC phase alternation across idle cycles |
| `tb_dap_decoder`, `tb_bsc_decoder`, `tb_mdr_decoder` | the printed 4-bit codewords; random 32-bit codewords with a single random upset or none: the flit always comes back, and `mismatch` is as predicted; upper-copy, lower-copy and parity errors each exercised |
| `tb_coded_link` | the table through whole links with one upset per row; random traffic with idle cycles and upsets against a scoreboard |
| `tb_jcac_link_top` | the top at full size: 4000 cycles of random traffic per channel with idle cycles and upsets; two-cycle latency of every flit; coupling ≤ 2 on every wire change; counts every mechanism and fails if one never happened |
| `tb_link_energy_workload` | wire activity of the three links against an uncoded link (see below) |

`codec_ref_pkg` in `tb/` is the reference model the testbenches compare with.
It builds codewords the way the table prints them rather than the way the RTL
does.

To run one with plain Verilator, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_jcac_link_top \
    -y rtl -y tb +libext+.sv rtl/codec_pkg.sv tb/codec_ref_pkg.sv \
    tb/tb_jcac_link_top.sv
./obj_dir/Vtb_jcac_link_top
```

### Wire activity

`tb_link_energy_workload` sends 3000 uniformly random 32-bit flits, then 40
runs of 25 identical all-zero or all-one flits, through all three links. It
counts self transitions Σ Δᵢ² and neighbour coupling Σ (Δᵢ − Δᵢ₊₁)² on the
wires, checks them against the reference model, and prints a relative
interconnect energy per flit, V² · (self + λ · coupling), with 1.2 V uncoded
and 0.86 V coded:

| traffic | λ | uncoded | DAP | BSC | MDR |
|---------|---|---------|-----|-----|-----|
| random | 1 | 67.6 | 47.7 | 47.6 | 48.0 |
| random | 4 | 201.3 | 118.6 | 118.3 | 119.0 |
| runs of 0s/1s | 1 | 1.85 | 1.91 | 3.34 | 1.92 |
| runs of 0s/1s | 4 | 1.91 | 2.03 | 5.59 | 2.04 |

The test requires all three codes to come out below the uncoded link on random
traffic. On low-activity data the coded links gain little or nothing, and BSC
costs more than the others, because its shift moves the even wires even when
the flit repeats. The capacitance model and the voltages here are idealised.
Codec and switch energy are left out.

## Choices made in this implementation

* Flit width 32 (the link width the codes were evaluated on); the tables use 4.
* Each codec is one register stage with an enable (the drawings of the codecs
  show an encoder enable and a decoder enable but do not define them).
* BSC phase advances per codeword sent; the first codeword after reset is
  unshifted.
* MDR places both parity copies on the two top wires, and its decoder uses the
  second copy to recognise a parity-wire error.
* The parity bit is even parity everywhere.
* Synchronous active-low reset.
* The uncoded valid wire, the `mismatch` status output and the `wire_fault`
  test input are additions of this implementation.
