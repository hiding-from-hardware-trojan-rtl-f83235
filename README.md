# Parity-valued trigger and multiplexer for a stealthy output-replacement trojan

This RTL implements a hardware-trojan structure that is built to get past
detectors looking for *rare events*: nets that almost never toggle during
simulation, or that have unusually high SCOAP controllability and
observability values. It is a research artefact for studying such
detectors, meant to be simulated and analysed.

The trojan wraps an arbitrary functional unit (FU). When the FU's input
equals a secret activation key, the module output is replaced by a
malicious value. In the reference application the FU is a 128-bit AES core
and the malicious value is its encryption key. Otherwise the FU's result
passes through unchanged.

A naive version has a comparator `act = (inp == KEY)` and a multiplexer.
With random inputs `act` never goes high, and the AND tree under it toggles
less and less towards its root. A toggle-count analysis flags those nets at
once. This design keeps the same activation probability (one input in
2^128), but no net in the trojan is rare: in simulation with random inputs
each of its wires toggles at a rate of 0.35 to 0.5, also while it is dormant.

## Parity-valued logic

The idea behind the design is to carry the suspicious one-bit signals on
**wire pairs** and read the logical value from the parity of the pair:

| wires | parity | logical value |
|-------|--------|---------------|
| `11`  | even   | 1             |
| `00`  | even   | 1 (never produced here) |
| `01`, `10` | odd | 0           |

A pair can move between `01` and `10` without changing its value. So a
dormant trigger can toggle constantly while still meaning "no match". Every
gate in this design outputs logic-1 only as `11`. The `00` code is never
produced, and the pAND gate uses that to simplify its logic.

## Blocks

```
          inp ──┬──────────────► (external FU) ──► fu_out ──┐
                │                                           ▼ q
                │   parity_comparator   act (2 wires)   parity_mux ──► out
                └─► in0      eq ───────────────────────► sel
        ACT_KEY ──► in1                                     ▲ p
                                   enc_key (malicious unit) ┘
```

* **`parity_trojan_top`** is the infected output stage. It holds the
  trigger (`parity_comparator` of `inp` against the parameter `ACT_KEY`)
  and the multiplexer. Its malicious unit is just the connection from
  `enc_key` to the multiplexer. The FU is not included: connect its result
  to `fu_out` and its key to `enc_key`.
* **`parity_comparator`** (the trigger) works in three steps:
  1. It forms the bitwise equality `in0 ~^ in1`.
  2. It feeds every 4-bit slice of that vector to an `all_one_gate`.
  3. A `pand_tree` reduces the WIDTH/4 parity bits to one.

  At 128 bits that takes 32 all-one gates and 31 pAND gates in 5 levels.
* **`all_one_gate`** converts 4 ordinary bits into one parity bit. The
  output is `11` when all four inputs are 1. Otherwise exactly one wire is
  high. With a = in[3], b = in[2], c = in[1], d = in[0]:

      y[1] = ~a&d | c&d | a&~b        (high for 9 of the 16 inputs)
      y[0] = ~a&~d | a&b              (high for 8 of the 16 inputs)

  Because the 15 non-matching inputs split almost evenly between the two
  wires, both wires keep toggling.
* **`pand_gate`** is the AND of two parity bits x = {a,b} and z = {c,d}.
  Any input that contains `00` is a don't-care, which leaves:

      y[1] = ~a&b | b&d
      y[0] = a&~b | a&c

  | x \ z | 01 | 10 | 11 |
  |-------|----|----|----|
  | 01    | 10 | 10 | 10 |
  | 10    | 01 | 01 | 01 |
  | 11    | 10 | 01 | 11 |

* **`pand_tree`** is a helper that builds a binary tree of `pand_gate`s,
  laid out as a heap. For a power-of-two leaf count it pairs neighbouring
  leaves first.
* **`parity_mux`** computes `t = p ^ q` and applies two toggle stages:
  `out = p ^ (t & sel[0]) ^ (t & sel[1])`. Even select parity (logic-1)
  toggles zero or two times and gives `p`. Odd parity toggles once and
  gives `q`. In the top module, `p` is the malicious value and `q` is the
  FU result.
* **`parity_pkg`** defines the type `pbit_t` (one wire pair) and the helper
  `pval()` (the logical value of a pair).

All of the logic is combinational. It has no clock and no reset, and the
output follows the inputs with no latency.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `parity_trojan_top` | `WIDTH` | 128 | input/output/key width; must be a multiple of 4 |
| `parity_trojan_top` | `ACT_KEY` | `128'h0123456789abcdef_fedcba9876543210` | any value; the key is a free design-time choice |
| `parity_comparator`, `parity_mux` | `WIDTH` | 128 | |
| `pand_tree` | `N` | 32 | number of leaves |

## Design choices and deviations

* **Polarity of the multiplexer.** On a match, the output switches to the
  malicious value. The one-line form of the naive multiplexer,
  `out = act ? fu_out : mu_out`, has the operands the other way round; the
  behaviour here follows the trojan's purpose, which is to replace the output
  when the key is seen.
* **Gate equations.** The all-one and pAND equations were read from the
  gates' Karnaugh maps. These choices belong to this RTL: which function
  drives `y[1]` and which drives `y[0]`, and how `a..d` map to bit
  positions. Swapping the two wires everywhere changes nothing logically.
* **Gate-level form.** The RTL writes the gates as sums of products, and
  synthesis chooses the cells. The pAND gate reduces to four 2-input NANDs.
  The all-one gate needs a NOR gate beyond that. A netlist generated from
  this RTL may not keep the hand-mapped structure. Its toggle profile can
  therefore differ from a hand-built version, although the wire functions
  and thus their toggle rates are the same.
* **Tree shape.** The pAND reduction is a balanced tree. For slice counts
  that are not a power of two, the heap layout decides which nodes pair up.
* **Not included.** The AES core, and the naive comparator-based trojan
  that is used only as a baseline for comparison. No area model is given
  either. The area of this structure depends on the cell library; when
  wrapped around an AES core, its cost has been reported at roughly 520
  NAND2 equivalents, against roughly 370 for the naive version.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_all_one_gate` | all 16 inputs against the Karnaugh-map table; the output is never `00`; the value is 1 only for `1111`; the 9/8 wire split |
| `tb_pand_gate` | all 9 legal input pairs against the map table, plus the parity AND |
| `tb_parity_mux` | 128-bit random data with all four select codes; the output stays put when `01` is re-encoded as `10` |
| `tb_parity_comparator` | 128-bit and 20-bit (odd tree) instances: random pairs, equal pairs, every single-bit difference; toggle rate of the output wires > 0.1 (measured ≈ 0.51) |
| `tb_parity_trojan_top` | default parameters: 1000 random inputs pass `fu_out`; the key leaks `enc_key` (twice); all 128 single-bit near misses are rejected; it counts each mechanism and checks that the act wires (≈ 0.50) and the lowest multiplexer-stage wire (≈ 0.35) toggle at a rate above 0.1 |

The top-level testbench uses a stand-in FU: `fu_out` is a fixed rotate-XOR
of `inp`. It runs at full size in well under a second. To run one
testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl rtl/parity_pkg.sv \
    tb/tb_parity_trojan_top.sv --top-module tb_parity_trojan_top
./obj_dir/Vtb_parity_trojan_top
```

Toggle rates are measured only in simulation of this RTL. SCOAP values were
not computed.
