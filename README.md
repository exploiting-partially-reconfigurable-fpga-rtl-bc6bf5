# Run-time switchable 4x4 Hadamard transform

This design computes a 4x4 Hadamard transform in either of two
architectures: a small sequential one that saves power, or a 12-actor
pipelined one that is fast. They occupy one region of an FPGA in turn.
The system switches between them at run time by dynamic partial
reconfiguration: a partial bitstream for the other architecture is written
through the 32-bit internal configuration port, and the region then holds
the new module. Both modules have the same 16-input, 16-output dataflow
interface, so the rest of the system does not see which one is loaded.
Only the transform rate and the power change.

The RTL covers the two transform modules, the reconfigurable partition
that holds them, and a simulation model of the configuration port. The
processor that orders reconfigurations is outside it, and so are the bus,
the flash holding the bitstreams, the bus peripheral that moves bitstream
words to the configuration port, the UART and the timer. The top brings out
the signals those parts would drive or watch.

## The transform

A block `X` of 4x4 signed samples enters on 16 ports in row-major order:
port `4*i+j` carries `X[i][j]`. The result leaves on 16 ports in the same
order:

    Y = H2 * X * H2 ,   H_0 = 1,  H_m = 1/sqrt(2) [H_{m-1}  H_{m-1};
                                                  H_{m-1} -H_{m-1}]

`H2 = S/2`, where `S` is the 4x4 matrix of +1/-1 in Sylvester order. Entry
`S[r][c]` is -1 exactly when `r & c` has an odd number of ones. The
hardware works with integers. It computes `Y = floor((S*X*S) / 4)`, using
an arithmetic right shift by two. The outputs are therefore `IN_W+2` bits
wide, and no result ever overflows. The default is `IN_W = 8`.

Both modules give bit-identical results. The testbenches compare them
with a reference that builds `S` from the recursion above and multiplies
matrices directly.

## The dataflow channel

Every port is a one-token channel made of `valid`, `ready` and `data`. A
token is transferred on a rising clock edge where `valid` and `ready` are
both high. Once offered, a token stays on the port, unchanged, until it is
taken; assertions check this on the outputs. Input ports may become valid
independently of each other. A module fires only when every token it needs
is present. Reset is synchronous and active low throughout.

## Hadamard-seq (`rtl/hadamard_seq.sv`)

This module is a single actor with 17 actions, sequenced by a state
machine so that only one action can fire in each state:

* **READ** fires when all 16 input ports hold a token and stores the
  block (16 x `IN_W` bits).
* **OUT_k**, for k = 0 … 15 in order, computes output `k = 4r+c` directly
  as a signed sum of all 16 stored samples:
  `sum_ij S[r][i]*S[j][c]*X[i][j]`, shifted right by two. The action then
  puts the result on output port `k`.

The 16 output ports share one result register, and port `k` is valid while
that register holds the token of action `k`. An OUT action fires when the
register is empty or is being emptied in the same clock. With every output
ready, a block therefore takes exactly 17 clocks: READ, then one clock per
output. Output `k` is taken `2+k` clocks after the block was read, and the
next block can be read while the last output is still waiting.

The hardware is small: one 16-input add/subtract tree whose signs depend
on the state. That tree is also its long path.

## Hadamard-pip (`rtl/hadamard_pip.sv`, `rtl/hadamard_actor.sv`)

This module is twelve actors in three ranks of four. Each actor
(`hadamard_actor`) has four input ports and four output ports. It fires
when all four inputs hold a token and all four output slots are free, or
are being freed in the same clock. Each output has a one-token register.

| rank | actor `a` computes | operation |
|------|--------------------|-----------|
| 1 | row `a`: `T[a][c] = sum_j X[a][j] S[j][c]` | 4-point butterfly, +2 bits |
| 2 | column `a`: `U[r][a] = sum_i S[r][i] T[i][a]` | 4-point butterfly, +2 bits |
| 3 | row `a`: `Y[a][c] = U[a][c] >>> 2` | scale by 1/4, -2 bits |

The butterfly is two levels of add and subtract:

    s0 = a+b, d0 = a-b, s1 = c+d, d1 = c-d
    y0 = s0+s1, y1 = d0+d1, y2 = s0-s1, y3 = d0-d1

The ranks are connected as a transpose. Output `c` of rank-1 actor `i`
feeds input `i` of rank-2 actor `c`. Output `r` of rank-2 actor `c` feeds
input `c` of rank-3 actor `r`. Every link between ranks is therefore one
channel with its own handshake, and a column actor waits for all four row
actors. With ready outputs, one block enters every clock and leaves 3
clocks later. Backpressure on any output stalls only the actors behind it.
The internal widths are `IN_W`, then `IN_W+2`, then `IN_W+4`, and finally
`IN_W+2`.

## The reconfigurable partition (`rtl/hadamard_rp.sv`)

In silicon, only one of the two modules exists in the region at a time.
For simulation, the partition instantiates both. The input `active_rm`
(`RM_SEQ` or `RM_PIP`) names the module the configuration memory holds.
The other module is held in reset, and its ports are closed.

While `decouple` is high, a bitstream is being written. During that time:

* no input token is accepted;
* no output token is offered;
* both modules are held in reset, so the new module starts clean.

A block still inside the partition when a reconfiguration starts is lost.
The output `busy` tells the controller when the partition is empty.

## Configuration port model (`rtl/icap_config_model.sv`)

This file is a **behavioural model**, not logic to implement. It has the
ports of the Virtex-5 ICAP primitive: `CLK`, active-low `CE` and `WRITE`,
32-bit `I` and `O`, and `BUSY`. It writes one word per clock with no wait
states. It also keeps, in a register, which module the partition's
configuration frames currently hold.

The model uses its own minimal bitstream format, because real frame data
is not modelled:

* words before the sync word `0xAA995566` are ignored;
* the sync word is word 0;
* bit 0 of word 1 names the module;
* the load ends after `BYTES/4` words.

While a load runs, `loading` is high. On the clock after the last word,
`loaded_rm` changes and `load_done` pulses for one clock. A read (`CE`
low, `WRITE` high) returns `{30'b0, loading, loaded_rm}` on `O`. After
reset, the partition holds Hadamard-seq.

### Reconfiguration time

A partial bitstream of `B` bytes written 32 bits per clock takes `B/4`
clocks, which is `B*8 / (32*f)` µs at `f` MHz. Both partial bitstreams are
192512 bytes long, so a switch takes 48128 clocks, or 481.28 µs at
100 MHz. The top-level testbench measures exactly this. On a real board
the time is a few microseconds longer, because the processor takes time to
start the transfer. That overhead lies outside this RTL.

## Top level (`rtl/rvc_dpr_top.sv`)

`rvc_dpr_top` connects the configuration port model to the partition.
The model's `loading` drives the partition's `decouple`, and `loaded_rm`
drives `active_rm`. Its ports are:

| group | ports |
|-------|-------|
| data | `in_valid/in_ready/in_data[16]`, `out_valid/out_ready/out_data[16]` |
| configuration port | `icap_ce_n`, `icap_write_n`, `icap_i[31:0]` in; `icap_o[31:0]`, `icap_busy` out |
| status | `active_rm`, `reconfiguring`, `reconfig_done`, `rp_busy` |

Parameters: `IN_W` (8), `OUT_W` (`IN_W+2`), `BITSTREAM_BYTES_P` (192512)
and `INIT_RM` (`RM_SEQ`). Shared types and constants, such as `rm_e`, the
sync word and the port count, live in `rtl/hadamard_pkg.sv`.

To switch modules, the controller should:

1. wait for `rp_busy` to go low;
2. stream the partial bitstream into `icap_*`;
3. wait for `reconfig_done`.

## What the design adds, and where it departs

The following points come from the architecture this RTL implements:

* the two architectures;
* one actor with 17 actions and a state machine for the sequential module;
* three ranks of four actors for the pipelined module;
* 16 inputs and 16 outputs;
* the 32-bit, 100 MHz configuration port;
* the 192512-byte bitstreams.

The following are choices made in this RTL:

* **Separable 2-D transform.** The transform is applied on both sides,
  `H2*X*H2`, on a 4x4 block, as is usual in image coding.
* **Integer scaling.** The output is floored to `(S*X*S)/4`.
* **Sample width.** Samples are 8 bits and signed.
* **Port order.** Ports are in row-major order.
* **Handshake.** Each channel is a one-token valid/ready handshake.
* **Pipelined ranks.** Rank 1 transforms rows, rank 2 transforms columns
  and rank 3 scales.
* **Sequential module.** Outputs come in order 0 to 15, through one shared
  result register.
* **Partition behaviour.** The partition isolates itself and resets while
  a bitstream loads, and it reports `busy`.
* **Bitstream format.** The model's format (sync word, module id in word 1)
  is its own.
* **Module after reset.** The sequential module is loaded at reset.

The modules were written by hand as RTL. They were not generated from
dataflow actor descriptions. At the default width, in a generic coarse
synthesis:

* the pipelined module has about 560 flip-flops;
* the sequential module has about 20 flip-flops, plus 128 bits of sample
  storage.

Timing closure, power and the actual partial-reconfiguration flow
(floorplanning, bitstream generation) are FPGA-tool matters and are not
represented.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them use
`tb/tb_had_ref_pkg.sv`, a reference model that multiplies matrices
directly.

| testbench | what it shows |
|-----------|---------------|
| `tb_hadamard_actor` | butterfly and scaling actors under random valid/ready; 1-clock latency, 1 token set per clock |
| `tb_hadamard_seq` | 60 blocks, random per-port valid/ready; output `k` at `2+k` clocks, 17 clocks per block |
| `tb_hadamard_pip` | 60 blocks, random per-port valid/ready; 3-clock latency, 1 block per clock |
| `tb_hadamard_rp` | switching by hand, isolation while decoupled, both modules |
| `tb_icap_config_model` | 48128-clock load, junk before sync, paused loads, status read-back |
| `tb_rvc_dpr_top` | full size, all defaults: seq → reconfigure to pip (48128 clocks) with blocks waiting → pip → reconfigure back with pauses → seq under backpressure. It counts every mechanism (seq run, pip run, reconfiguration, isolation stall, backpressure) and requires each of them |

To run one testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/hadamard_pkg.sv tb/tb_had_ref_pkg.sv tb/tb_rvc_dpr_top.sv \
        --top-module tb_rvc_dpr_top -o sim
    ./obj_dir/sim

The full-size top-level run simulates about 100,000 clocks and finishes in
seconds.
