# Serial pseudorandom-to-natural code converter (Galois form)

A single-track absolute position encoder carries one pseudorandom binary
sequence (PRBS) on its scale. For an n-bit maximal-length sequence, every
window of n consecutive bits is a different n-bit word, so the word under the
reading head identifies the position. But that word is not a binary number.
Turning it into one is the converter's job.

The serial method works like this. Put the read word into a PRBS generator
and step the generator until it reaches the word that marks position 0. The
number of steps is the position. This is small and cheap, but one conversion
can take up to 2^n - 2 steps, so the time per step limits how often the
position can be measured.

A classic serial converter uses a Fibonacci generator. There, all the taps
meet in a chain of XOR gates in front of one cell, and the clock period has
to cover the whole chain. This design uses a **Galois generator** instead.
Each tapped cell has its own XOR gate, fed from the last cell, so every
feedback path has exactly one XOR gate, however many taps there are.

The difficulty is that a Galois register holding the read word does not
produce the same sequence. So the word first passes through a small XOR
network, the **initial adjustment logic**. That network turns the word into
the register state that produces the word. The network is used only at load
time, so it adds nothing to the time per step.

The default configuration is n = 7: a 127-bit sequence, positions 0..126.

## Structure

```
head_bit ─► code_assembly_reg ─► code_word_adjust ─► galois_shift_reg ─► init_state_ident
 (x7 in)      x7..x1                 X7..X1            load/shift ◄───────┘  │
                                                                             ▼
                                                       step_counter ◄── clear/count
                                                       position P6..P0
```

| module | role |
|---|---|
| `prbs_conv_pkg` | default constants; `galois_step()` and `adjust_word()` |
| `code_assembly_reg` | serial-in register holding the last n track bits, newest in x(n) |
| `code_word_adjust` | XOR network from read word x to register state X |
| `galois_shift_reg` | n-cell Galois register with load and shift |
| `init_state_ident` | detects the position-0 state; drives load, shift, counter clear and enable |
| `step_counter` | n-bit step counter whose value is the position |
| `prbs_converter` | top level |

Bit order everywhere: bit i of a vector is x(i+1) or X(i+1). Written as a
bit string, a word reads x7..x1.

## The Galois register and its taps

One clock of the register, for the default taps (`TAPS = 7'b0001111`):

```
X7' = X6        X4' = X7 ^ X3       X1' = X7
X6' = X5        X3' = X7 ^ X2
X5' = X4        X2' = X7 ^ X1
```

X7 is the output stage. Every other cell takes the cell below it. The cells
whose `TAPS` bit is set also XOR in X7. This generates the same sequence as the
serial (Fibonacci) form x(1) ← x(4) ^ x(5) ^ x(6) ^ x(7). The serial form
moves the code word one position toward position 0 per step.

## Initial adjustment: from read word to register state

Loaded with state X, the register emits X7 now, then X7 one clock later, and
so on. For the conversion to work, those outputs must be x7, x6, ..., x1 of the
read word. The output k clocks after the load depends only on cells
X(7-k)..X7, so the state can be solved one cell at a time from the top down:

```
X7 = x7
X6 = x6
X5 = x5
X4 = x4
X3 = x3 ^ x7
X2 = x2 ^ x6 ^ x7
X1 = x1 ^ x5 ^ x6 ^ x7
```

This takes three XOR gates. `prbs_conv_pkg::adjust_word()` does the same
top-down solve for any `N` and `TAPS`:

1. Set the cell being solved, and the cells below it, to zero.
2. Step the register k times.
3. Set the cell to the read bit XOR the bit that comes out.

With constant parameters, this folds into the XOR network above. The same
function also computes the register state of the position-0 word, which is
the state that stops the conversion.

Worked example (x7..x1):

- The read word 0110001 gives the state 0110011.
- The register then passes through 1100110, 1000011, 0001001, 0010010,
  0100100, 1001000, 0011111, 0111110, 1111100 and 1110111.
- 1110111 is the state of the position-0 word 1110010.
- That is 10 steps, so the position is 10.

## Conversion control and timing

- **Start.** `convert` is sampled on a clock edge. At that edge the register
  loads the adjusted `code_word` and the counter clears. `busy` rises.
- **Steps.** On each later clock, the register steps and the counter adds
  one. This continues until the register holds the position-0 state.
- **Stop.** In the clock where the register holds the position-0 state,
  `done` is high for one cycle and `busy` falls. The register and counter
  then hold, and `position` stays valid until the next `convert`.
- **Latency.** For position p, `done` comes p+1 clocks after the `convert`
  clock: 1 load clock plus p steps. The worst case is 127 clocks for n = 7.
- **Forbidden word.** All-zero is the generator's lock-up state. If it is
  read, nothing is loaded, `forbidden` is set and no conversion runs.
  `forbidden` clears at the next `convert`.
- **Restart.** A `convert` while `busy` restarts the conversion with the
  current word.
- **Reading during a conversion.** `bit_strobe` / `head_bit` can be used
  while a conversion runs. They only change `code_word`, which the running
  conversion no longer uses.

All flip-flops use a synchronous, active-low reset `rst_n`. After reset the
register holds the position-0 state, and the converter is idle.

The top level has assertions for three rules:

- load and shift are never active together;
- `done` happens only at the position-0 state;
- the register never holds all zeros.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 7 | word length, register length and counter width |
| `TAPS` | `'b0001111` | Galois tap mask: bit i set means X(i+1) takes X(N) |
| `INIT_WORD` | `'b1110010` | the code word at position 0, x7..x1 |

`TAPS` must describe a maximal-length generator, or some words never reach
the position-0 state. `N` can be up to 32, the package's vector width.

## Where this departs from the classic description

The classic converter is described at block level, using a clock block, a
delay element and an asynchronous LOAD/SHIFT line from the state detector.
This RTL is fully synchronous, and the following are its own choices:

- a comparator plus a one-clock `done` in place of the delay element;
- a `convert` input that decides when a conversion starts;
- separate load and shift enables;
- the `busy` output;
- the forbidden-word guard;
- restart on `convert` while busy;
- the reset values.

The reading head and code track are sensors and appear here as the
`head_bit` and `bit_strobe` ports. The oscillator appears as `clk`. Neither
the Fibonacci converter nor the two-direction variant (step forward or
backward, depending on the last position) is included. The testbench uses
the Fibonacci recurrence only as an independent reference.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_code_word_adjust`: checks all 128 words against the seven equations.
  For each word it also checks that a separately modelled Galois register
  emits x7..x1.
- `tb_galois_shift_reg`: checks the ten example states. It also checks a
  full 127-step period against explicit equations, with no repeated or zero
  state, and checks hold, load priority and reset.
- `tb_init_state_ident`: checks conversions of 0, 10 and 126 steps, each
  with the exact shift count and the `done` timing. It also checks the
  forbidden word and a restart.
- `tb_code_assembly_reg` and `tb_step_counter`: compare each module with a
  reference model under random stimulus.
- `tb_prbs_converter`: the end-to-end test at the default parameters. It
  builds the 127-entry position table from the Fibonacci recurrence, then:
  - walks the whole track bit by bit and converts every position, checking
    the value and the p+1 clock latency;
  - traces the register through the worked example;
  - converts 40 random words, some with track bits read during the
    conversion;
  - converts the forbidden word and tests a restart;
  - counts each of these events and fails if any never happened.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/prbs_conv_pkg.sv tb/tb_prbs_converter.sv --top-module tb_prbs_converter
./obj_dir/Vtb_prbs_converter
```

Swap in the name of another testbench to run it instead. Each simulation
finishes in well under a second.
