# Compositional microprogram control unit with address converter, on AND/OR matrices

A microprogram control unit spends most of its logic on deciding where to go
next. This design cuts that logic down for *linear* flow-charts, those made
mostly of straight runs of operator vertices, by combining two ideas:

1. **Counting inside chains.** The operator vertices of the flow-chart are
   grouped into *operational linear chains* (OLC): runs of vertices that always
   execute one after the other. Consecutive vertices of a chain are stored at
   consecutive addresses. Inside a chain the next address is simply the current
   one plus one, so no transition logic is needed there.
2. **Jumping by class, not by address.** Only at a chain *output* (its last
   vertex) does the unit need a computed jump. Chains whose outputs lead to
   exactly the same transitions are *pseudoequivalent* and are put into one
   *class*. An *address converter* turns the address of the current chain
   output into the short binary code of its class. The jump logic then depends
   on that code and on the logic conditions only. It no longer depends on the
   full address, and it needs one row per transition of a class, not one per
   chain.

Everything combinational is built from programmable AND and OR matrices, in
the style of a custom-made (mask-programmed) PLA. A microprogram is loaded by
choosing the crosspoint patterns. The RTL is fully parameterized: the matrix
personalities are computed at elaboration time from three small tables, and
the defaults hold a worked six-vertex example.

## Structure

```
           +---------- y0 (increment) ---------------------------+
           v                                                     |
 X --> [M1 &]--F--> [M2 1]--phi--> [CT] --T--> [M3 &] --lines--> [M4 1] --> Y, y0, yE
        ^                          ^  ^          ^      |                     |
        | tau                 Start  Clock       |      v                     | yE
        +------------------- [M5 1] <-- lines ---+--(same lines)              v
                                                 +---- Fetch <------ [T: S=Start, R=yE]
```

| Part | Matrices | Module | Job |
|------|----------|--------|-----|
| CC, transition circuit | M1 (AND), M2 (OR) | `cmcu_cc` | next address D = F(tau, X) at a chain output |
| CT, address counter | (register) | `cmcu_ct` | cleared by Start, +1 on y0, loads D otherwise |
| CM, control memory | M3 (AND), M4 (OR) | `cmcu_cm` | decodes {Fetch, T} into word lines, ORs them into the microinstruction |
| AT, address converter | M5 (OR) | `cmcu_at` | class code tau from the word lines |
| T, fetch flip-flop | (register) | `cmcu_fetch` | Fetch = 1 between Start and the word carrying yE |
| Generic matrices | | `and_matrix`, `or_matrix` | the two crosspoint arrays all of the above use |
| Top | | `cmcu_u1` | wires it together |
| Tables, area formulas | | `cmcu_pkg` | the example microprogram and the crosspoint-count functions |

The address converter does not need its own decoder. It reuses the word
lines of the control-memory decoder M3, which are already one-hot on the
current address. This makes M5 a single OR matrix.

## How a microprogram runs

All state is in CT and in the fetch flip-flop. Everything else is
combinational.

* **Start.** Pulse `start` high for one clock. At the next rising edge CT
  becomes 0 and Fetch becomes 1. Address 0 holds a *start word* whose only
  content is y0, so the first useful vertex sits at address 1.
* **Each cycle with Fetch = 1.** M3 raises the word line of address T, and
  M4 produces the microinstruction in the same cycle. `y` (y1..yN), `y0` and
  `ye` are valid from shortly after the clock edge until the next one.
* **Next address** (at the next rising edge):
  * y0 = 1 (not a chain output): CT <- CT + 1.
  * y0 = 0 (chain output): CT <- D. Here M5 has produced the class code tau of
    the chain, and M1/M2 have combined it with the conditions `x` sampled in
    this cycle.
* **End.** A word with yE = 1 clears Fetch at the next edge. From then on all
  word lines are 0, all outputs are 0, and CT holds its value until the next
  Start.

So a path of P words through the flow-chart, start word included, keeps Fetch
high for exactly P cycles. Starting again in the middle of a run is allowed:
Start always wins.

## Classes and the address converter, on the example

The default microprogram implements this flow-chart:

```
b0 (start) -> b1: y1 y3 --x1=1--> b2: y0 y2 y3 -> b3: y1 y4 --+
                        --x1=0--> b4: y2 ---------------------+--> test x2
test x2 = 0            -> b5: y0 y3 -> b6: y1 y3 y4 yE -> end
test x2 = 1, x3 = 1    -> b6
test x2 = 1, x3 = 0    -> back to b2
```

The chains are alpha1 = {b1}, alpha2 = {b2, b3}, alpha3 = {b4} and
alpha4 = {b5, b6}. The outputs of alpha2 (b3) and alpha3 (b4) both lead to the
same "test x2" node, so they form one class. This gives three classes:

| Class | Chains | Code tau1 tau2 | Output addresses |
|-------|--------|----------------|------------------|
| B0 | alpha1 | 00 | 001 |
| B1 | alpha2, alpha3 | 01 | 011, 100 |
| B2 | alpha4 | 10 | 110 (leads only to the end) |

Control memory (word bits `{yE, y4, y3, y2, y1, y0}`):

| Address | Vertex | y0 | y1 | y2 | y3 | y4 | yE |
|---------|--------|----|----|----|----|----|----|
| 000 | start | 1 | 0 | 0 | 0 | 0 | 0 |
| 001 | b1 | 0 | 1 | 0 | 1 | 0 | 0 |
| 010 | b2 | 1 | 0 | 1 | 1 | 0 | 0 |
| 011 | b3 | 0 | 1 | 0 | 0 | 1 | 0 |
| 100 | b4 | 0 | 0 | 1 | 0 | 0 | 0 |
| 101 | b5 | 1 | 0 | 0 | 1 | 0 | 0 |
| 110 | b6 | 0 | 1 | 0 | 1 | 1 | 1 |
| 111 | unused | 0 | 0 | 0 | 0 | 0 | 0 |

Transition table, one M1 row per line:

| h | Class (tau) | Condition | Target | D bits set |
|---|-------------|-----------|--------|------------|
| 1 | B0 (00) | x1 | 010 (b2) | D1 |
| 2 | B0 (00) | not x1 | 100 (b4) | D2 |
| 3 | B1 (01) | x2 and not x3 | 010 (b2) | D1 |
| 4 | B1 (01) | not x2 | 101 (b5) | D2, D0 |
| 5 | B1 (01) | x2 and x3 | 110 (b6) | D2, D1 |

Without classes, the b3 and b4 outputs would each need their own copy of rows
3 to 5, and each row would have to test the full three-bit address. With
classes they share the rows, and each row tests only two code bits. Class B2
has no rows: its chain ends the program, and D = 000 there is never used
because Fetch drops at the same edge.

Bit conventions used throughout: address bit D_i / T_i has weight 2^i. A class
code is written tau1 tau2 with tau1 as the more significant bit of the `tau`
vector. `x[0]` is x1 and `y[0]` is y1.

## Matrix sizes

For L conditions, N microoperations, R_A address bits, R_B code bits and H
transition rows, the crosspoint counts of the five matrices are:

| Matrix | Crosspoints | Example |
|--------|-------------|---------|
| M1 | 2 (L + R_B) H | 50 |
| M2 | H R_A | 15 |
| M3 | 2 (R_A + 1) 2^R_A | 64 |
| M4 | 2^R_A (N + 2) | 48 |
| M5 | 2^R_A R_B | 16 |
| total | | 193 |

`cmcu_pkg` provides these as functions (`area_m1` ... `area_total`). The RTL
instantiates matrices of exactly these shapes. M3, for example, is a full
decoder with one extra column for Fetch. So the crosspoint masks in the
parameters are the matrix programming.

## Programming your own flow-chart

Build the tables for your flow-chart and override the top's parameters:

* `L`, `N`, `RA`, `RB`, `H`, `G`: number of conditions, microoperations,
  address bits, class-code bits, transition rows and chain outputs.
* `CM_WORDS[a]`: the word at address a, `{yE, yN..y1, y0}`. Set y0 on every
  vertex that is not a chain output, and on the start word at address 0.
  Consecutive vertices of a chain must sit at consecutive addresses.
* `TR_CODE[h]`, `TR_XCARE[h]`, `TR_XVAL[h]`, `TR_ADDR[h]`: row h fires when
  tau equals `TR_CODE[h]` and the conditions selected by `TR_XCARE[h]` equal
  `TR_XVAL[h]`. It then sends the counter to `TR_ADDR[h]`. The rows of one
  class must have mutually exclusive conditions.
* `AT_ADDR[g]`, `AT_CODE[g]`: chain output at address `AT_ADDR[g]` belongs to
  the class with code `AT_CODE[g]`.

The top asserts (SystemVerilog concurrent assertions) that exactly one word
line is active while Fetch is 1, and that at most one transition row fires at
a chain output. A table with overlapping rows trips the second one.

## What is given and what was chosen here

The following follow the published method: the block structure, the matrix
types and their connections, the start/increment/load/stop behaviour, the
example microprogram and its tables, and the area formulas.

These are choices of this implementation:

* An asynchronous active-low reset `rst_n` clears CT and Fetch. The method
  itself starts only from the Start pulse.
* Start is sampled on the clock edge, and it has priority over yE.
* CT holds while Fetch = 0. Otherwise it would keep loading meaningless
  addresses after the end.
* One microinstruction per clock. The matrices are purely combinational.
* Address 111 of the example holds an all-zero word.
* Unprogrammed converter addresses give tau = 0. This is harmless, because
  tau is used only at chain outputs.

The published method also compares the area against a control unit without
the converter, for flow-charts with 5 to 44 transitions. That baseline is not
part of this design, and those flow-charts are not available, so only the
example is simulated.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cmcu_pkg.sv \
    tb/tb_cmcu_u1.sv --top-module tb_cmcu_u1 -Mdir obj_u1
./obj_u1/Vtb_cmcu_u1
```

Replace `tb_cmcu_u1` by `tb_cmcu_cc`, `tb_cmcu_cm`, `tb_cmcu_at`,
`tb_cmcu_ct`, `tb_cmcu_fetch`, `tb_and_matrix` or `tb_or_matrix` for the
unit tests.

`tb_cmcu_u1` runs the whole unit at its default parameters. It uses a
reference that walks the flow-chart vertex by vertex, independent of the
tables. It performs 400 microprogram runs with random conditions, some of
them restarted mid-run, plus two fixed 5-cycle paths. Each cycle it compares
y1..y4, y0, yE, Fetch, the class code at chain outputs and the next address.
It also checks the run length in cycles and the idle state after the end. It
counts each mechanism: Start, increment, each of the five transitions
including the loop back to b2, each class code, end by yE, idle, and restart.
A mechanism that never occurs counts as a failure. The unit testbenches check
the matrices exhaustively or against a cycle-by-cycle reference model.
