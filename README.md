# FIFO-less dataflow actors in RTL: a Clip actor, a one-bit channel arbiter and a broadcast manager

Dataflow programs (networks of *actors* that exchange *tokens* over
unidirectional channels) are usually mapped to hardware with a FIFO on every
channel. This library shows the alternative: every actor becomes one RTL
module with a clocked body and a combinational scheduler, and channels carry
no storage at all. A token lives in the producing actor's output register; the
only extra state per channel is a single flip-flop (point-to-point channel) or
one flip-flop per consumer (fan-out). With this, an actor can fire one action
and move one token per clock cycle, and the control overhead per channel is a
handful of gates.

The example actor is **Clip**, the last stage of a video 2-D inverse DCT: it
saturates 10-bit signed samples to the 9-bit range `[min, 255]`, where `min`
is `-255` or `0` depending on a per-block flag.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/clip_actor.sv` | `clip_actor` | the Clip actor: state, two actions, scheduler |
| `rtl/com_arbiter.sv` | `com_arbiter` | point-to-point channel control, 1 flip-flop |
| `rtl/broadcast.sv` | `broadcast` | one-to-N channel control, N flip-flops, generic N |
| `rtl/dp_ram.sv` | `dp_ram` | vendor-neutral inferable dual-port RAM for actor lists |
| `rtl/clip_network.sv` | `clip_network` | top: Clip -> arbiter -> broadcast to 2 consumers, RAM beside it |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_rate_mismatch` |

## The channel protocol

Every channel, inside and outside the top, uses three kinds of signal:

* `send` (producer side to consumer): a token is offered. It stays high until
  the token is taken.
* `ack` (consumer to producer side): the consumer takes the offered token in
  this cycle. It is a one-cycle pulse, raised in the same cycle in which the
  consuming action fires, and only while `send` is high.
* `rdy` / `pready` (arbiter to the producing actor's scheduler): the output
  port may be written in this cycle.

The data is the producing actor's output register (`O_data`), read by all
consumers directly.

Cycle by cycle, for an actor writing port O through a `com_arbiter`:

```
cycle        t           t+1                  t+2
actor        fires       fires again if       ...
             (O_psend=1) consumer acks in t+1
O_data       old         token A              token B
send         0           1 (A offered)        1 (B offered)
ack          -           1 (A taken)          ...
pready       1           1 (= !full | ack)    ...
```

The key point is that `pready = EMPTY or ack`: when the consumer takes the
waiting token, the producer may overwrite its output register in the same
cycle, because the consumer reads the old value before the clock edge. That is
what gives one token per cycle without a FIFO. If the consumer does not take
the token, `pready` is low and the producer's scheduler is locked, so the token
cannot be overwritten.

Two consequences matter when building larger networks:

1. **Combinational paths run backwards along the chain.** A consumer's `ack`
   depends on its own `rdy`, which depends on the `ack` of the consumer after
   it, and so on. The critical path grows with the length of a chain of actors
   that are all ready; this is the price of one token per cycle. Breaking the
   chain needs a register slice, which this library does not provide.
2. **A cycle in the network graph makes a combinational loop** through the
   scheduler/arbiter pairs. Networks with feedback need a register on the loop.

### `com_arbiter`

A two-state machine (EMPTY, FULL) held in one flip-flop. `psend` from the actor
sets FULL; `ack` clears it (a simultaneous `psend` keeps it FULL with the new
token). Outputs: `send = FULL`, `pready = EMPTY | ack`. It stores no data.
Assertions check that the actor only writes when `pready` allowed it and that
only an offered token is acknowledged.

### `broadcast`

For a port read by N actors. One `consumed[k]` flip-flop per target:

* `out_send[k] = in_send & ~consumed[k]`: each target is offered the token
  until it has taken it once.
* `in_ack = in_send & ((consumed | out_ack) == '1)`: the source (or its
  arbiter) is acknowledged in the cycle the last target takes the token; a
  same-cycle `out_ack` counts, so when all targets accept together there is no
  extra cycle.
* On `in_ack` all flags clear for the next token.

Targets may therefore take a token in different cycles; the fast one simply
sees `out_send[k]` low until the next token arrives. N is a parameter
(default 2).

In the top, the broadcast sits behind the arbiter: the arbiter's `send` is the
broadcast's `in_send` and the broadcast's `in_ack` is the arbiter's `ack`.

## The Clip actor

State: `count` (7-bit signed, reset to -1) and `sflag`. Ports: `I` (10-bit
signed samples), `SIGNED` (one bool per block), `O` (9-bit signed).

| action | fires when | does |
|---|---|---|
| `read_signed` | `count < 0` and a token on SIGNED | `sflag := SIGNED`, `count := BLOCK_TOKENS-1` |
| `limit` | `count >= 0`, a token on I and `O_rdy` | `O := i > 255 ? 255 : i < min ? min : i`, with `min = sflag ? -255 : 0`; `count := count - 1` |

So each SIGNED token applies to the next `BLOCK_TOKENS` (64) samples.

The module is split the same way the actor is: a combinational **scheduler**
(an if/else-if chain over the actions; it tests each guard, token presence
`*_send` and output room `O_rdy`, and drives both the action's fire signal and
the input's `ack`), and a clocked **execute** process that updates the state
and the output register for the fired action. The arithmetic of `limit` is a
separate combinational block whose result is registered. Only one action fires
per cycle. Because the scheduler is combinational, a token is consumed in the
cycle it is offered; a scheduler inside the clocked process would need a cycle
to see its own `ack` take effect and would halve the rate.

Rate: with all tokens available and the output free, a block takes exactly
`BLOCK_TOKENS + 1` cycles (one for the flag, one per sample). Output latency
is one cycle from firing to `send`.

## Dual-port RAM

`dp_ram` is the vendor-neutral memory used for actor lists that are too large
for registers: one write port and one synchronous read port on one clock,
read-first on a same-address collision, no reset of the contents. It is
written so FPGA and ASIC tools infer their own RAM; nothing in it is
vendor-specific. The Clip actor has no list, so in the top the RAM is placed
next to the network with its own ports (`ram_*`), not connected to the actor.

## Top: `clip_network`

```
 I ------------> +-----------+  O_psend  +-------------+ send  +-----------+ O_send[0]/O_ack[0]
 SIGNED -------> | clip_actor|---------->| com_arbiter |------>| broadcast |--------------------> target 0
                 |           |<----------|             |<------|   N = 2   |--------------------> target 1
                 +-----------+  O_rdy    +-------------+ ack   +-----------+ O_send[1]/O_ack[1]
                   O_data (shared by both targets)
```

Parameters (defaults): `IN_W = 10`, `OUT_W = 9`, `NUM_TARGETS = 2`,
`RAM_DATA_W = 16`, `RAM_ADDR_W = 6`. Reset is asynchronous, active low
(`rst_n`).

## How far it goes, and where it is this library's own

Taken from the source design: the Clip actor's widths, the reset value of
`count`, the `limit` action and its guard, the scheduler structure (guard,
`*_send`, `O_rdy`, acknowledge in the firing cycle), the one-bit arbiter that
locks the scheduler and stores no data, the broadcast's per-target flip-flops
with AND gating and the all-ones acknowledge, generic broadcast size with two
as the example, and inferred vendor-neutral RAM.

This library's own choices:

* The `read_signed` action. The source only says that the lower bound is set
  by another action. Its guard (`count < 0`) and the reload to 63 (64 samples,
  one 8x8 block, per flag) follow the usual MPEG-4 Clip actor.
* `pready` depending combinationally on `ack`, and the broadcast counting a
  same-cycle `out_ack`; both are needed for one token per cycle.
* Putting the arbiter in front of the broadcast on a fan-out port.
* RAM widths, depth, single clock, read-first behaviour.
* Reset values other than `count`; reset style for the arbiter and broadcast.

Not included: the other actors of the 1-D IDCT (Scale, Combine, ShuffleFly,
Shuffle, Final) and the 7-actor AC/DC prediction network. Their names and
token rates are known but not their arithmetic, so neither complete benchmark
(2-D IDCT, AC/DC prediction) can be run on this RTL. The rate mismatch between
ShuffleFly (produces on one cycle in two) and Shuffle (consumes on two cycles
in three) is reproduced in `tb_rate_mismatch` with an arbiter between two
pattern-driven test actors.

## Verification

Each testbench drives random traffic that obeys the protocol, compares every
output against its own reference model, and prints
`TB_RESULT checks=<n> failures=<n>`; each has a watchdog.

| testbench | checks |
|---|---|
| `tb_com_arbiter` | `send`/`pready` every cycle against a 1-bit model; same-cycle ack-and-produce; lock when full |
| `tb_broadcast` | N=3 and N=2 instances; every `out_send` and `in_ack`; split and simultaneous consumption |
| `tb_dp_ram` | random writes and reads against an array model, same-address read-first |
| `tb_clip_actor` | which action fires each cycle, every clipped value, stalls on `O_rdy`; rate of 64 samples + 1 flag per 65 cycles |
| `tb_clip_network` | top at default parameters: 40 blocks through the network to two independent random consumers; each target gets every token once and in order; last 4 blocks at full rate must take 4 x 65 + 1 cycles; counts that every mechanism occurred (scheduler locked, input starved, split and joint broadcast, back-to-back tokens, every clip case, both modes); RAM write/read |
| `tb_rate_mismatch` | producer pattern 0,1 against consumer pattern 1,1,0 through an arbiter: no token lost or read twice, rate one per two cycles |

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_clip_network \
    tb/tb_clip_network.sv rtl/*.sv -Mdir obj_tb
./obj_tb/Vtb_clip_network
```

Each testbench runs in well under a second. `tb_broadcast` and `tb_dp_ram` set
their module's parameters; all others use the defaults.
