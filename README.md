# CFGLUT-based bitstream obfuscation for FPGAs

An SRAM FPGA receives its whole configuration from a bitstream in external
memory. Anyone who can read that bitstream can rebuild the netlist and then
insert a hardware trojan. This design keeps part of the logic out of the
bitstream. Selected functions are built from **CFGLUTs**: look-up tables whose
truth table is shifted in at run time through a serial configuration port. In
the bitstream these LUTs hold an all-zero table. Their real tables sit in a
separate **secure memory**. A small loader copies them into every CFGLUT after
power-up. Someone who reverse-engineers the bitstream finds LUTs with unknown
contents where those functions should be.

The RTL shows the two ways of using CFGLUTs:

* **Substitution.** An existing LUT of a design is replaced by a CFGLUT with
  the same function. The example is one statement of a memory controller,
  `init_ack_fe = init_ack_r & !init_ack`, the falling edge of `init_ack`.
  There is no hardware overhead: one LUT becomes one CFGLUT.
* **Logic encryption.** Extra CFGLUTs are inserted on nets of a circuit as
  *key gates*. Each one computes one of AND, OR, NAND, NOR, XOR, XNOR or NOT
  of the net and a key bit. The net's value passes through unchanged only when
  the right key is applied. Neither the key nor the gate type can be read from
  the bitstream.

The cost is programming time: 32 clock cycles, during which all CFGLUTs are
loaded in parallel. During that time the obfuscated logic is not yet valid.

## Block structure

```
                 sm_wr_*                cfg_start ──► busy / done
                    │                      │
             ┌──────▼───────┐  row r  ┌────▼──────────┐
             │ secure_memory├────────►│ cfglut_loader │
             │ 32 x N bits  │◄────────┤  (32 shifts)  │
             └──────────────┘ rd addr └──┬─────────┬──┘
                                    CE   │ CDI[i]  │
              ┌──────────────────────────┼─────────┼─────────────────┐
              ▼                          ▼         ▼                 ▼
   mc_init_ack_fe_obf (CFGLUT 0)   key_gate (CFGLUT 1)  ...   key_gate (CFGLUT N)
   init_ack ─► init_ack_fe         net,k1 ─► net'              net,kN ─► net'
```

| Module | Role |
|---|---|
| `cfglut_obf_top` | Top level. The secure memory, the loader, one substituted CFGLUT and `N_KEY_GATES` key gates. |
| `cfglut5` | The configurable LUT: a 32-bit shift register and a read multiplexer. |
| `secure_memory` | Holds the CFGLUT tables. It is laid out bit-sliced, so that one row feeds every CFGLUT. |
| `cfglut_loader` | Reads the 32 rows and drives CE and CDI. |
| `mc_init_ack_fe_obf` | The memory-controller fragment with `init_ack_fe` moved into a CFGLUT. |
| `key_gate` | A CFGLUT used as a key gate. |
| `cfglut_pkg` | Sizes, the gate-function enum and the INIT words. |

## The CFGLUT (`cfglut5`)

The INIT register is 32 bits, one entry per combination of the five inputs.
While `ce` is high, every clock shifts `cdi` into bit 0, and bit 31 leaves on
`cdo`. Shifting INIT[31] first and INIT[0] last loads a full table in 32
clocks. The outputs are plain multiplexers:

* `o6 = INIT[{i4,i3,i2,i1,i0}]` is a 5-input function.
* `o5 = INIT[{0,i3,i2,i1,i0}]` is a 4-input function of the lower half.

Both use the current register contents, so the function changes on the same
clock edge that shifts the table. The register starts at the `INIT`
parameter. The obfuscated design always leaves that parameter at 0. `cdo`
lets the previous table be read back while a new one is loaded, and lets
CFGLUTs be chained.

Some descriptions of this primitive speak of a 16-bit table and 16 clocks.
That is the 4-input view, the `o5` half. This design uses the full 32-bit
table and 32 clocks.

## Programming: memory layout and timing

All CFGLUTs share one CE and each has its own CDI. To load them in parallel,
the loader needs bit *b* of every table in the same clock. The secure memory
is therefore stored **transposed**:

```
row r, bit i  =  INIT of CFGLUT i, bit (31 - r)
```

CFGLUT 0 is the `init_ack_fe` LUT. CFGLUT *g*+1 is key gate *g*. A loader run
looks like this, counting from the clock edge that sees `cfg_start` high:

| Cycle | What happens |
|---|---|
| 0 | Start is seen and row 0 is read. This is synchronous, block-RAM style, with one cycle of latency. |
| 1 … 32 | `cfg_busy`=1 and CE=1. Row *k* is on CDI while row *k*+1 is read. |
| 33 onward | `cfg_done`=1, and it stays high. |

CE is high for exactly 32 cycles. Another `cfg_start` while `cfg_done` is high
reprograms every CFGLUT, for example to load new key-gate functions. Reset
(`rst_n`, synchronous, active low) returns the loader to idle. It does not
clear the CFGLUT tables, which, like the FPGA primitive, have no reset.

The secure memory is provisioned through `sm_wr_en/sm_wr_addr/sm_wr_data`,
one row per clock. How that port is protected is a system question outside
the RTL.

## The substituted statement (`mc_init_ack_fe_obf`)

`init_ack_r` stays an ordinary flip-flop. Its inverse is formed in ordinary
logic. The CFGLUT gets `I0 = init_ack`, `I1 = !init_ack_r`, `I2..I4 = 0`, and
its `O5` output is `init_ack_fe`. The function is 1 only when both of its
inputs are 0, that is at table entry 0. The table is therefore
`INIT = 32'h0000_0001` (`cfglut_pkg::INIT_ACK_FE_INIT`). Before programming,
`init_ack_fe` is constantly 0.

## Key gates (`key_gate`)

Each key gate has the locked net on `I0`, the key bit on `I1`, and `O5` as its
output. `cfglut_pkg::key_gate_init(kind)` builds the table: a 4-entry table
indexed by `{key, net}`, repeated 8 times so that `I2..I4` do not matter.
These are the correct keys for the gates that pass the net through:

| Function | Correct key | Output with wrong key |
|---|---|---|
| XOR | 0 | `!net` |
| XNOR | 1 | `!net` |
| AND | 1 | 0 |
| OR | 0 | 1 |

NAND, NOR and NOT invert the net. They are meant for places where an
inversion is absorbed by the surrounding logic. Which function and which key
is used for each gate is a design-time choice; the hardware does not fix it.
The default top has two key gates, with key inputs `key_in[0]` (k1) and
`key_in[1]` (k2). The circuit they lock is not part of the RTL: its nets
enter on `lock_net_in` and return on `lock_net_out`.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `cfglut_obf_top.N_KEY_GATES` | 2 | Number of key gates. The design has `N_KEY_GATES + 1` CFGLUTs. |
| `cfglut_obf_top.INIT_BITS` | 32 | Table size and number of programming cycles. |
| `cfglut5.INIT` | 0 | Power-up table. Keep it 0 in an obfuscated design. |
| `secure_memory.WIDTH` / `DEPTH` | 3 / 32 | Number of CFGLUTs / table bits. |

## Where the design makes its own choices

These points are not dictated by the method. They are choices of this RTL:

* the transposed memory layout;
* the start/busy/done handshake;
* the one-cycle read latency;
* the synchronous reset of the loader and of `init_ack_r`;
* `o5` reading the lower half of the table;
* net on `I0` and key on `I1` in the key gates.

Two things from the described method are not reproduced:

* the rest of the memory controller around the `init_ack_fe` statement;
* the example circuit that the key gates lock.

Neither is specified in enough detail to write. Any error detection or
correction in the secure memory is left to the memory technology and is not
modelled.

For synthesis on a real FPGA, `cfglut5` should be mapped to the vendor's
CFGLUT5 primitive (or inferred as a shift-register LUT). Otherwise the tool
builds a 32-flip-flop shift register and a multiplexer. That is functionally
equivalent, but it does not hide the table in a LUT.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cfglut_pkg.sv tb/cfglut_obf_top_tb.sv --top-module cfglut_obf_top_tb
./obj_dir/Vcfglut_obf_top_tb
```

| Testbench | What it checks |
|---|---|
| `cfglut5_tb` | Random tables, all 32 input combinations on O6 and O5, CE holding the table, CDO readback, and the INIT parameter. |
| `secure_memory_tb` | Writes and reads of all rows, read latency, and holding the output without `rd_en`. |
| `cfglut_loader_tb` | Exactly 32 CE cycles, rows in order, done timing, reprogramming, and reset in the middle of a load. |
| `mc_init_ack_fe_obf_tb` | Output 0 before programming, then `init_ack_r & !init_ack` against a model. |
| `key_gate_tb` | All seven functions against operator-level models, and correct versus wrong keys. |
| `cfglut_obf_top_tb` | End to end at the default size: provisioning, programming (32 cycles), the substituted function, both key gates with correct and wrong keys, and reprogramming with CDO readback of the old tables. It counts each of these and fails if one never happened. |
