# Self-timed circuits compiled from communicating processes

This is a small library of two-phase self-timed macromodules and five circuits built from them. Each circuit is what a process-description compiler produces for one short concurrent program:

| circuit | program it implements | module |
|---|---|---|
| Guardex with channel sharing | `P <= (a? -> b? -> P) \| (b? -> a? -> P)  \|\|  Q <= (c? -> a! -> Q) \| (d? -> b! -> Q)` | `guardex_shared` |
| Guardex without sharing | `P <= (a? -> P) \| (b? -> P)  \|\|  Q <= (c? -> a! -> Q) \| (d? -> b! -> Q)` | `guardex_mutex` |
| Barrier synchronisation | `P <= a! -> P  \|\|  Q <= a? -> Q  \|\|  R <= a? -> R` | `barrier_sync` |
| Multicast | `P[x1] <= a!x1 -> P  \|\|  Q <= a?y -> Q[y]  \|\|  R <= a?z -> R[z]` | `multicast` |
| Pipelined multiplier | `MULTPIPE[x,y] \|\| PZ[z]`, shift-and-add multiply with the accumulator in its own process | `mult_pipe` |

`async_examples_top` places all five side by side. They share only the clock and the clear.

The main idea is in the two Guardex circuits. Process P's choice between `a?` and `b?` is a *guarded command*. In general a guard like this needs an arbiter, because both requests might arrive. Here, however, Q sends only one of `a!` and `b!` per round, so P's guard is *mutually exclusive*. That lets P's guard be evaluated *speculatively*, using only C-elements and XORs. Both channels are armed at once. The one that completes undoes the arm of the other. Q's guard over `c` and `d` really can see both requests, so it keeps a ring arbiter.

## Signalling conventions

All control signals use **two-phase (transition) signalling**:

- A request is a change of level, 0→1 or 1→0. It is answered by a change on the acknowledge.
- A handshake is pending while `req != ack`.
- A data bus is *bundled* with its request: the data must be stable before the request changes and must stay stable until the acknowledge.

The basic parts are:

- **MERGE**: an XOR. A transition on any input gives a transition on the output. Wherever control can enter a state from more than one place, a MERGE joins those paths. The loop of every tail-recursive process is a MERGE of `start` and the completion signals that lead back to the start of the loop.
- **C-element** (`c_element`): the output follows the inputs once they all agree, and holds otherwise. A two-input C-element is the rendezvous of a channel with a single receiver: the sender's request meets the receiver's readiness. With N inputs it is a completion tree. For example, `ctree3` is `c_element #(.N(3))`.
- **DELAY** (`delay_line`): passes on transitions after a fixed delay.
- **CALL** (`call_element`): lets two callers share one server.
- **Q-select** (`q_select`): steers a token to its true or false output by sampling a level.
- **Bundled register** (`reg_2ph`, "reg8"): latches its data on a request transition.

### How the self-timed behaviour is realized

Each state-holding part is a flip-flop on a common sampling clock `clk`. This covers the C-elements, the Q-selects, the registers and the delay stages. XOR MERGEs are plain combinational logic. As a result:

- A C-element's output changes on the first clock edge after its inputs agree, so each C-element adds one clock of latency.
- Every feedback ring in these netlists passes through a flip-flop, so there are no combinational loops.
- The RTL is synthesizable for any FPGA or ASIC flow and simulates deterministically.
- Inputs from outside are expected to be synchronous to `clk`. Synchronize them first if they are not.

The *order* of events is the same as in a self-timed implementation. What changes is that delays are counted in clocks. So a timing argument such as "the undo settles before the next request can arrive" becomes an exact cycle count that the testbenches check. This is a modelling choice. A gate-level self-timed implementation would replace `c_element`, `q_select` and `delay_line` with real self-timed cells.

`clr_n` is an active-low asynchronous clear. It sets every signal to 0, which counts as "no transition yet".

## Speculative guards: `cal2` and `guardex_mutex`

`cal2` is the two-input CAL component:

```
MERGE 2 = start ^ C5        C 3 = C(MERGE 2, req[0])  -> fire[0]  -> DELAY -> done[0]
MERGE 4 = start ^ C3        C 5 = C(MERGE 4, req[1])  -> fire[1]  -> DELAY -> done[1]
```

A transition on `start` moves one input of both C 3 and C 5, so both channels are armed. Suppose channel 0's request arrives. C 3 fires, and its output moves MERGE 4 back. C 5's armed input returns to where it was, so channel 1 is disarmed. Because the guard is mutually exclusive, channel 1's request cannot arrive in between.

The C-element is not delay-insensitive on its own. Each output therefore leaves through a DELAY (2 clocks by default). This ensures the undo has settled before the process that follows can re-arm the guard. That padding is called **foam-wrapper packaging** here. The same mutual-exclusion rule is checked by an assertion: both arms must never fire on the same clock.

`guardex_mutex` puts this guard in P. P's loop MERGE combines `start`, `done[0]` and `done[1]`.

Q is built as follows:

- Q's loop MERGE combines `start` and the acknowledges of `a` and `b`. Each loop transition injects a token into a two-stage ring arbiter (`ring_arbiter`, "ring2").
- Each stage samples a "request pending" level: `c_in ^ c_out` for stage 0 and `d_in ^ d_out` for stage 1. The token either leaves as that stage's grant or moves on to the next stage.
- The grant arms C 9 (for `c?`) or C 10 (for `d?`).
- The output of C 9 or C 10 acknowledges the environment (`c_out` / `d_out`). The same output is Q's `a!` or `b!` request into P's CAL.

The token enters at stage 0, so `c` wins if both are already pending when it arrives.

## Sharing a channel between a guard and a later use: `call_element`, `guardex_shared`

In the shared Guardex, P uses channel `a` twice: in its guard, and after `b?`. It uses `b` the same way. Each channel has one rendezvous C-element (`Ca`, `Cb`). A CALL element puts two callers on it: R1 is the guard use and R2 is the later use.

The CALL element (`call_element`):

```
rs = r1 ^ r2             (MERGE 1)
a1 = C(r1,  r2 ^ as_i)   (C 4, with MERGE 3)
a2 = C(r1 ^ as_i, r2)    (C 5, with MERGE 2)
```

The property that makes speculation work through a CALL is this: **two transitions on R1 with no acknowledge in between (R1;R1)** produce RS;RS, and they leave the CALL exactly as it was. A second R1 is therefore an undo.

In `guardex_shared`:

1. One transition of P's loop MERGE drives R1 of both CALLs. Both channels are armed.
2. Say `a` wins. `Ca` fires, and the CALL of `a` returns A1.
3. A1 of `a` immediately drives R1 of `b`'s CALL a second time. This is the undo: `Cb`'s armed input moves back.
4. The same A1, delayed by 8 clocks ("delay8"), drives R2 of `b`'s CALL. That request is the `b?` that follows `a?`. The delay lets the undo settle first.
5. A2 of either CALL (the later use is complete) re-initiates P's loop.

Q is the same as in `guardex_mutex`.

The program itself requires the environment to alternate: each round of P consumes one `c` and one `d`, in either order. If `d` is offered twice in a row, the circuit deadlocks, exactly as the program would. The testbenches respect this.

## Barrier and multicast

**`barrier_sync`** (N = 3):

- Each process is a loop MERGE of `start` and its own `body_done[i]`.
- An N-input C-element (completion tree) waits for all processes and produces `go`.
- `go` acts both as the sender's acknowledge and as the initiate of what every receiver does next. No process begins round k+1 before all have finished round k.
- If you connect every `body_done[i]` to `go`, you get the bare circuit, which is three processes whose loops contain nothing but the barrier.

**`multicast`** (W = 8, two receivers):

- The sender P holds `x1` in a bundled register. It is loaded through `ld`/`ld_in`/`ld_ack`.
- P's loop MERGE raises a request with `x1` on `a_data`.
- Each receiver has a C-element that joins P's request with that receiver's own readiness. The C-element makes the receiver's register latch.
- The receiver's acknowledge re-arms that receiver at once. It does not wait for the other receiver; this is the optimized form.
- A completion tree over the receivers' acknowledges releases P, so P never sends again before every receiver has its copy.

A send takes 3 clocks. Nothing orders a reload of `x1` against a send in flight, so a send that overlaps a reload can carry either value. Both receivers still get the same value.

## Pipelined multiplier: `mult_pipe`

`mult_pipe` computes `x*y mod 2^W` with the recursion

```
MULTFN(x, y, z) = z                       if y = 0
                = MULTFN(x, y-1, z+x)     if y odd
                = MULTFN(x<<1, y>>1, z)   otherwise
```

It is split into two processes, each a netlist of two-phase macromodules:

- **`multpipe_proc`** (MULTPIPE) holds `x` and `y`.
- **`pz_proc`** (PZ) owns `z` and offers two operations: `azx` ("add x to z") and `sz` ("send z on `result`").

MULTPIPE works as follows:

- A C-element accepts an operand pair when MULTPIPE is free, that is, at clear and after each `sz` acknowledge. It writes `x` and `y`.
- A 3-input MERGE of "operands loaded", "odd step done" and "even step done" starts each iteration.
- A predicate-action block (`pab`) tests *y = 0*. Its true output is the `sz` request. Its false output starts a second `pab` that tests *y odd*.
- **Odd step.** The true output is the `azx` request, with `x` bundled. Its acknowledge means PZ has *taken* `x`, not added it. That acknowledge starts the subtractor (`sub_2ph`), and `y - 1` is written back.
- **Even step.** Both shifters (`shifter_2ph`) start together. A C-element joins them. `x << 1` and `y >> 1` are written back, and a second C-element joins the writes.
- `y` has three writers: load, `y - 1` and `y >> 1`. A `shared_reg` (a CALL element, a data multiplexer selected by "writer 1 is calling", and a register) separates the load from the second write port. A further CALL shares that port between the subtractor and the shifter.

PZ works as follows:

- PZ's guard `sz? | azx?` is mutually exclusive, so it is a `cal2`, the same speculative component as above.
- The foam-wrapped `azx` completion latches `x1` and starts the adder (`adder_2ph`). The adder takes `ADD_LAT` clocks, 4 by default. The sum is written into `z`.
- The `sz` completion is the `res_req` transition, with `z` on `res_data`. When `res_ack` arrives, `z` is cleared for the next product.
- The MERGE of the two `z` write acknowledges re-arms the guard.

The speed-up comes from the odd step. MULTPIPE carries on as soon as PZ has latched `x`, so the addition overlaps the decrement and the shift that always follows it (`y - 1` is even). A second odd step waits only if PZ is still busy. With `ADD_LAT = 4` it never waits.

Ports, all two-phase:

- Operands in: `op_req`, `op_x`, `op_y` → `op_ack`.
- Product out: `res_req`, `res_data` → `res_ack`.

`tb_mult_pipe` checks 508 products. It bounds each latency per step and checks that the overlap occurs.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `c_element` | `N` | 2 | number of inputs (3 for the barrier's completion tree) |
| `delay_line` | `DEPTH` | 2 | delay in clocks |
| `reg_2ph`, `multicast`, `mult_pipe`, top | `W` | 8 | data width |
| `ring_arbiter` | `N` | 2 | number of guard arms |
| `cal2`, `guardex_mutex` | `DELAY` | 2 | foam-wrapper delay |
| `guardex_shared` | `DELAY` | 8 | delay from a guard win to the later use |
| `barrier_sync` | `N` | 3 | number of processes |
| `multicast` | `NRECV` | 2 | number of receivers |
| `mult_pipe`, `adder_2ph` | `ADD_LAT` / `LAT` | 4 | adder completion time in clocks (own choice) |
| `pab` | `ODD` | 0 | 0: test for zero, 1: test for odd |

## Where this RTL departs from a gate-level self-timed design

- **Clocked emulation.** Every state-holding element is a flip-flop. A real Q-select and ring arbiter must resolve metastability. Here the request level is simply sampled on a clock edge.
- **Multiplier operands.** Operands come in over one channel. The constant 1 of `y - 1` is hard-wired, not held in a loaded register. The adder's `ADD_LAT` is a free choice, and so is the adder's minimum of 2 clocks.
- **Multiplier temporaries.** The original circuit keeps separate temporary registers for the shifted x, the shifted and decremented y, and the sum. Here each operator (shifter, subtractor, adder) holds its own result in an output register, and that register plays the temporary's part until the value is written back.
- **Multiplier restart.** After reporting a product, the multiplier waits for new operands, and PZ clears `z`. The process description as written would keep reporting the same `z`.
- **Multicast rendezvous.** Each receiver's rendezvous is a plain two-input C-element.
- **Circuits not included.** The unoptimized multicast is not built. Neither is the non-pipelined multiplier, which is the slower alternative the pipelined one improves on.
- **Clock-count delays.** Every DELAY value is in clocks. The numbers 2 and 8 come from the part names "Delay-2" and "delay8".
- **Reset state.** The all-zero clear state is an assumption.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops. Each one also has a watchdog that counts a failure if the run hangs. To run one with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  --top-module tb_guardex_shared tb/tb_guardex_shared.sv -Mdir obj
./obj/Vtb_guardex_shared
```

Every block has its testbench `tb/tb_<module>.sv`. `tb_async_examples_top` runs all five circuits at once at the default parameters with random environments. It checks every result. It also counts how often each mechanism happened, and counts a failure if one never did. The mechanisms are:

- CAL undo;
- CALL R1;R1 undo and CALL R2 reuse;
- ring-arbiter contention;
- a barrier waiting on a late process;
- a multicast receiver re-armed before the sender is released;
- adder overlap in the multiplier.

Asynchronous clears need a real falling edge. The testbenches therefore start `clr_n` high and pull it low after 2 ns.

## Files

- `rtl/` contains one module per file. The library parts are `c_element`, `delay_line`, `reg_2ph`, `shared_reg`, `q_select`, `ring_arbiter`, `call_element`, `cal2`, `pab`, `shifter_2ph`, `sub_2ph` and `adder_2ph`. The circuits are `barrier_sync`, `multicast`, `guardex_mutex`, `guardex_shared`, `multpipe_proc`, `pz_proc` and `mult_pipe`. The top is `async_examples_top`.
- `tb/` contains one self-checking testbench per module above, except `q_select`, `multpipe_proc` and `pz_proc`. Those three are exercised through `ring_arbiter` and `mult_pipe`.
