# Selection check for a linear-selection core memory

In a linear-selection (word-organised) core memory, a binary address of K
bits has to become a current pulse on exactly one of M = 2^K word lines. The
addressing circuitry does that: address register, decoding matrices,
selection switches and current drivers. If it goes wrong, the memory
quietly reads or writes the wrong word, or no word, or several words at
once. Parity on the data does not catch this, because the wrong word
carries valid parity of its own.

The check here watches the word lines themselves. Every word line threads
one extra *checking core*. A reading wire is threaded through the checking
cores of a chosen set of lines, so it picks up a pulse whenever any line of
that set carries current. The wire is therefore an OR gate with thousands of
inputs. An amplifier on each wire makes a logic level of it. From these
wires the check circuitry rebuilds a code of the address that was *actually*
selected. It compares that code with the code the computer meant to select.

The RTL models a 4096-word by 28-bit memory whose word lines carry three
such plates:

* **Method II, parity (the main check).** With the address, the computer
  sends one redundant bit: the parity of the address. Two reading wires
  collect the lines of even-parity and odd-parity addresses. A mismatch
  means a line of the wrong parity class was driven, or no line was.
* **Method I, full re-encoding.** 2K reading wires turn the one-out-of-M
  word lines back into the binary address and its complement. These are
  compared with the address register bit by bit. Every selection error is
  caught: a missing line, extra lines, or a wrong line.
* **Permanent store.** One more core per word line, and one reading wire
  per bit of a stored word. This gives a read-only memory that reuses the
  working memory's address circuits.

## Block structure

```
 addr_i, red_i ─► address_register ─► address_decoder ──word[M-1:0]──┬─► core_array ─► rdata_o
 (from computer)      │    │               ▲ fault_i                 ├─► permanent_store ─► pdata_o
                      │    │               │ read/write pulse        ├─► selection_checker (parity)  ─► sel_err_o, b_o
                      │    └─ red (D bits) ┼────────────────────────►│     code = red
                      └─ addr (K bits) ────┼────────────────────────►└─► selection_checker (address) ─► full_err_o, full_b_o
                                     memory_timing                         code = addr
```

| module | role |
|---|---|
| `core_check_pkg` | subset modes, code width and subset code functions, fault record, stored-word function of the permanent store |
| `address_register` | holds K address bits and D redundant bits for a cycle |
| `address_decoder` | binary to one-out-of-M word lines, gated by the current pulse; fault injection |
| `core_array` | M x N cores, selected by word lines; destructive read, then write |
| `check_encoder` | the encoder plate: 2D reading wires built from checking cores |
| `check_comparator` | NOT, EXCLUSIVE-OR and OR network producing b_j and the error |
| `selection_checker` | encoder plate plus comparator; one instance per method |
| `permanent_store` | read-only word per line, on extra cores of the same lines |
| `memory_timing` | load / settle / read / write sequencer |
| `core_memory_top` | everything wired together |

## The reading wires and the comparator

For each position j of the code there are two wires. `c_j` threads the
lines whose code has bit j = 1. `c'_j` threads the lines whose code has
bit j = 0. In Method I the code of line l is l itself, so each wire has
M/2 = 2048 arguments. In Method II with parity, the code is one bit and the
two wires are the even and odd wires.

When exactly the right line is driven, `(c_j, c'_j) = (r_j, ~r_j)`, where r
is the code sent by the computer. Each position is checked as

    b_j = (r_j xor c_j) or (~r_j xor c'_j)

| r_j | c_j | c'_j | b_j | meaning |
|---|---|---|---|---|
| 0 | 0 | 0 | 1 | no line driven |
| 0 | 0 | 1 | 0 | correct |
| 0 | 1 | 0 | 1 | line of the other class |
| 0 | 1 | 1 | 1 | lines of both classes |
| 1 | 0 | 0 | 1 | no line driven |
| 1 | 0 | 1 | 1 | line of the other class |
| 1 | 1 | 0 | 0 | correct |
| 1 | 1 | 1 | 1 | lines of both classes |

The error output is the OR of all b_j. Two wires per position are needed,
not one. A single wire cannot tell "no line" from "a line whose bit is 0",
and it cannot tell "one line" from "two lines".

Method I is complete. If the driven set of lines is anything other than
{addr}, then either it is empty, which makes every b_j = 1, or it contains
some line l ≠ addr. Such a line differs from addr in some bit j, so it
drives the wire that should stay silent at that position.

Method II with parity is partial. It catches a missing line, a wrong line
of the other parity, and an extra line of the other parity. It misses a
wrong or extra line of the *same* parity, such as a decoder fault that
inverts two address bits. In the self-test of `selection_checker_tb`
(random single faults on a 7-bit address), about a third of the injected
faults escape parity and none escape Method I. The parity check is
worthwhile when the likely faults of a given build (a connector, one
decoder input) move the selection to the other parity class. The cost is
two wires instead of 2K.

`SUBSET = SUBSET_ONES` gives a finer Method II: the subsets are addresses
with the same number of ONEs, coded in binary on D = ceil(log2(K+1)) = 4
positions for K = 12. It uses the same two-wires-per-bit plate. Setting
`SUBSET_ADDRESS` and D = K turns Method II into Method I. The two methods
are one circuit with different codes.

## Memory cycle

`memory_timing` runs one operation in four clocks:

| clock | state | action |
|---|---|---|
| 0 | IDLE, `start_i` high | `load_o`: address, redundant bits, op and write data registered |
| 1 | SETTLE | decoder inputs stable, no current |
| 2 | READ | read current on the selected line(s): data, permanent store and both checks sensed; captured on the closing edge (`strobe_o`); the driven words are cleared |
| 3 | WRITE | write current: the driven words receive the word just read (read op) or `wdata_i` (write op); `done_o` high |

Results (`rdata_o`, `pdata_o`, `sel_err_o`, `b_o`, `full_err_o`,
`full_b_o`) are valid while `done_o` is high, and they stay valid until the
next READ state ends. A new `start_i` is accepted from the clock after
`done_o`. A start while `busy_o` is high is ignored. The live reading
wires `c_o`, `cn_o`, `full_c_o` and `full_cn_o` are brought out for
observation.

The core array is addressed only through the word lines. A faulty decoder
therefore really does read the wrong word or an OR of several words, and
really does overwrite them in the write phase. Tests see the same damage
the hardware would cause.

## Fault injection

`fault_i` (type `sel_fault_t`) lets a testbench break the addressing
circuitry on purpose. Tie it to zero in normal use.

* `addr_flip` inverts decoder input bits, so a wrong line is selected.
* `drop_sel` removes the pulse from the selected line.
* `extra_en` / `extra_line` drive one more line as well.

Together these produce the three error kinds the check is meant to find:
no line, extra lines, and a wrong line.

## Parameters

| parameter | default | origin |
|---|---|---|
| `K` | 12 | 4096-word original memory, M = 2^K |
| `N` | 28 | its 28-bit word |
| `SUBSET` | `SUBSET_PARITY` | the original memory used the parity check |
| `D` | `code_width(SUBSET, K)` = 1 | one redundant bit for parity |
| `PS_W` | 28 | this design's choice (permanent store width) |

All of this RTL's sizes match the original memory. Nothing was scaled down.

## Where this RTL goes beyond or departs from the original description

* Only the logic of the addressing circuitry is modelled. Current
  amplitudes, pulse shaping, magnetic switch cores and the sense
  amplifiers are replaced by ideal levels. A 1 on a word line means a
  full-select current pulse.
* The original check circuitry has no described clocking. The four-clock
  cycle, the strobe at the end of the read pulse, and the asynchronous
  active-low reset are choices of this RTL.
* The original memory used only the parity check. Method I is built beside
  it on the same word lines, so both can be compared. Remove `u_check_i`
  from `core_memory_top` for the original configuration.
* For Method II with more than one redundant position, the wiring (one pair
  of wires per code bit, binary subset code) is this design's choice. For
  parity it reduces to the two-wire plate of the original.
* An error is only reported. No retry and no interrupt are generated.
* The contents of the permanent store are a placeholder:
  `core_check_pkg::pstore_word(l, K)` stores the bits of l followed by
  their complements, repeated. Edit that function to wire real contents.
  Its width (`PS_W` = 28) is also a choice of this design.
* The redundant bits are taken in the same clock as the address. The
  original allows them to arrive a little later.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module core_memory_top_tb \
    rtl/core_check_pkg.sv tb/core_memory_top_tb.sv
./obj_dir/Vcore_memory_top_tb
```

Replace the top module name to run another testbench. The package must be
read first, and `-Irtl` lets Verilator find the other modules by file name.

| testbench | what it shows |
|---|---|
| `core_memory_top_full_tb` | full size (K = 12, N = 28, no parameter changed): all 4096 words written, 256 read twice (rewrite after destructive read), 600 random operations with faults; reference model of driven lines, data, permanent store and both checks; four-clock latency |
| `core_memory_top_tb` | same at K = 6, N = 10, 3000 random operations; fails if any mechanism (read, write, rewrite, permanent store, Method I and II detections, a parity miss, wrong redundant bit, each fault kind, start while busy) never occurs |
| `selection_checker_tb` | every address of a 7-bit decoder, fault free and with each fault kind; Method I must miss nothing, Method II must miss some faults but not all |
| `core_memory_top_ones_tb` | same as `core_memory_top_tb` with the ONEs-count subsets (3 redundant bits); about 9 % of the injected faults escape, against about 21 % with parity in `core_memory_top_tb` |
| `check_encoder_tb` | address, parity and ones-count plates against per-line expected wire levels |
| `check_comparator_tb` | the eight rows of the truth table, plus random 5-bit cases |
| `address_decoder_tb`, `core_array_tb`, `address_register_tb`, `permanent_store_tb`, `memory_timing_tb` | the individual blocks |

The full-size run takes about three minutes to build, because of the
4096-way generate structures. It simulates in about a second.

## Synthesis notes

Each M-way structure is a `generate` over the word lines: one address
comparator per line in the decoder, one register per word in the core
array, and one constant word per line in the permanent store. The
many-input ORs are `or_tree`, a balanced tree of two-input ORs that stands
for a sense or reading wire threaded through many cores. The core array is
modelled as individual cores reached through word lines, not as an
addressed RAM, because a wrong or multiple selection must reach the wrong
cores. At full size it synthesizes to 4096 x 28 flip-flops.
