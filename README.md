# DF-KPI coordinating processors: a dynamic data flow machine in SystemVerilog

A data flow machine has no program counter. An operator runs as soon as
its operands exist. Each operand travels as a *token* that names the
operator it feeds. DF-KPI is a dynamic data flow architecture with
*direct operand matching*. A token for a two-input operator does not
search a large associative memory for its partner. It carries the base
address of a matching vector (MVB), and its destination carries an
index (IX). Item MVB+IX of the Frame Store is therefore the one place
where the two operands of that activation can meet.

This RTL builds that machine around its centre, the *coordinating
processor* (CP). The CP is a multi-function pipeline that loads a token,
matches it if needed, fetches the operator and executes it. The top
level, `dfkpi_system`, holds 16 CPs that share the following units:

- a Data Queue Unit (DQU), where waiting tokens are kept;
- an Instruction Store (IS), which holds the data flow program;
- a Frame Store (FS), which holds the matching vectors.

The CPs form a 4×4 grid. Its rows and columns close into rings (a
torus), and an interconnection network moves results between
neighbouring CPs.

## Tokens and operators

All formats are packed structs in `rtl/dfkpi_pkg.sv`.

**Data token.** `<P><T,V><MVB><DST><IX>`

| Field | Width (bits) | Meaning |
|---|---|---|
| P | 2 | Priority. Carried along but not used. |
| T | 2 | Data type. Carried along but not used. |
| V | 16 | Value. |
| MVB | 8 | Matching-vector base address. |
| DST | 10 | Destination: `<MF><IP><ADR>`. |
| IX | 4 | Matching index. |

The DST sub-fields are:
- **MF**, the matching function. `B` (bypass) means the consumer needs
  no partner. `M` (match) means the token must meet another one.
- **IP**, the input port, left or right.
- **ADR**, the operator's address in the Instruction Store.

**Instruction.** `<OC><LI><DST><IX>[<DST2><IX2>]` holds a 4-bit opcode,
an 8-bit literal, and the DST and IX of the *result* token. A flag `nd`
adds a second destination, DST2/IX2. Such an operator sends its result
twice: first to DST and then to DST2. This is how one value feeds two
consumers, for example a single-input operator and a matched one. Two
destinations is this design's limit.

**Frame Store item.** `<AF><V>`: a presence flag and a waiting operand.
The operand's input port is stored beside them. This lets a second
operand for the *same* port be recognised instead of being paired by
mistake.

The 16 opcodes are the DF-KPI operator set. What `dfkpi_peu` does with
each:

| OC | Operator | Result |
|---|---|---|
| 0 | ACCEPT | LD passed on (program entry) |
| 1 | IF | LD to DST.ADR if LD.V ≠ 0, else to address LI |
| 2 | KILL | nothing (operand consumed) |
| 3 | OUT | LD to the host port |
| 4 | RET | LD to the host port, flagged as a return |
| 6 | UN_OP | LI[2:0]: NEG, NOT, INC, DEC, ABS, SHL, SHR, MOV of LD |
| 7 | BIN_OP | LI[2:0]: ADD, SUB, MUL, AND, OR, XOR, LT, EQ of LD, RD |
| 8 | CASE | LD to DST.ADR + RD.V |
| 9 | DEF | sign-extended LI (program constant) |
| 10 | GATE | LD if RD.V ≠ 0, else nothing |
| 5, 11–15 | SEL, LOAD, SEND, TUP, APPLY, CONSTR | not executed: `unsupported` is raised and nothing is produced |

These operators are not executed:
- SEL and CONSTR need a structure store.
- LOAD and TUP need token copying.
- APPLY needs the call mechanism, which allocates matching vectors.

None of these is specified here.

Every result goes once to each destination. The literal is used as
shown above, not as a copy count. IF and CASE change the address of
both copies in the same way.

## The micro-program: L, M, C, F, O

`dfkpi_ctrl` moves each CP through five states:

```
        Init
         |
         v
   +---> L ---- CP.DI holds a token ----> M
   |     ^                                |
   |     |  operand stored (item empty)   |-- MF=B, or partner found --> F --(IS read)--> F --> O
   |     +--------------------------------|                                                |
   |                                      |-- item holds same-port operand --> C           |
   |                                      |-- waiting for the FS bus: stay in M            |
   |   C: PutDT (DQU, or network if the DQU is full); stays in C until accepted            |
   +---- C                                                                                 |
   +---- O: result sent (PutDI / PutICN / PutDQ) or no result; CP_free pulses <------------+
```

The registers follow a single path:

`CP.DI → CP → (CMP) → LFR → IS read → FOR → PEU → result`

- **Load (L).** Copies CP.DI into the CP register and frees CP.DI.
- **Matching (M).** CMP looks at DST.MF.
  - *Bypass*: the token goes straight into the Load/Fetch register
    (LFR).
  - *Match*: the CP requests the Frame Store over the bus and reads item
    MVB+IX. This takes one clock after the grant. Then one of three
    things happens:
    - **Item empty.** The operand is stored there and AF is set. The CP
      returns to Load; this token produces no result yet.
    - **Item holds the partner** (the other port). The partner is
      copied into LFR and AF is cleared. The pair goes on to Fetch.
    - **Item holds an operand for the same port.** This is a collision:
      an earlier activation with the same MVB+IX has not fired yet. The
      token goes to Copy.
- **Copy (C).** Writes the colliding token back to the DQU (PutDT). If
  the DQU is full, it sends the token to another CP instead. The token
  returns later through GetDT and is retried until the item is free.
  This trades work for simplicity: nothing is dropped or reordered
  wrongly. A collision that never resolves, where the partner never
  comes, circulates for ever. This is the same as any operand that never
  finds its partner.
- **Fetch (F).** Reads the IS at LFR.DST.ADR (one clock). It then loads
  the Fetch/Operate register (FOR): the operator plus the operands
  ordered by port. LD is the left operand and RD the right. A bypassed
  token always becomes LD, with RD = 0.
- **Operate (O).** The PEU computes the result combinationally and the
  CP sends it out. The CP stays in O until the result has been placed,
  for both destinations if there are two; each takes at least one
  clock. It then pulses `cp_free` and returns to Load.

Clock counts are fixed by the micro-program. A bypassed single-input
token takes 5 clocks from Load to the clock its result leaves (L, M, F,
F, O). A matched token that finds its partner takes 6 clocks, plus any
wait for the Frame Store grant. The segments work on one token at a
time, with no overlap between tokens. The one exception is CP.DI, a
one-token buffer in front of Load that is refilled while the segments
behind it are busy.

## Where results go

DF-KPI's rule is: keep the result in the same CP if it is not busy,
otherwise send it to another CP, and if all are busy, put it in the
DQU. Here "busy" means *CP.DI is occupied*, so the order is:

1. **PutDI**: into the CP's own CP.DI, if empty.
2. **PutICN**: into the network, if it offers a neighbouring CP whose
   CP.DI is empty.
3. **PutDQ**: into the DQU through the bus.
4. Otherwise the CP waits in O (an *Operate stall*).

CP.DI has a fixed write priority when several sources compete: own
result, then network, then DQU. The DQU pushes a token into any empty
CP.DI as long as the queue is not empty (GetDT). A CP that has just
finished finds its next token already waiting.

OUT and RET results leave on the host ports (`host_out_*`), one per CP.
KILL, a closed GATE and unsupported operators produce nothing.

## System level: bus, network, and the deadlock reserve

`dfkpi_bus` is the shared bus between the CPs and the DQU and Frame
Store. Each clock it makes three grants, each with a rotating priority:

- **GetDT**: one grant, among the CPs whose CP.DI is empty.
- **PutDT**: one grant, among CPs in Operate or Copy. A put by a CP
  wins over a put by the host.
- **Frame Store**: one grant. After a grant, the Frame Store is locked
  for one clock. The granted CP's read and its store/clear, done in the
  next clock, therefore form an atomic test-and-set on the item.

`dfkpi_icn` is the network. CP *i* sits in row *i*/4 and column
*i* mod 4 of the grid. It is linked to its east, south, west and north
neighbours, with wrap-around: CP3's east neighbour is CP0, and CP0's
north neighbour is CP12. Every clock, the network takes the CPs in
Operate or Copy in rotating order. It gives each one a neighbour whose
CP.DI is free and that no earlier sender has taken, trying east, south,
west and north in that order. A token crosses one link in one clock
and is never forwarded further. So "all CPs busy" becomes, in practice,
"all four neighbours busy", and the DQU absorbs the rest. The grid
width is the `COLS` parameter.

The DQU is a 64-entry FIFO. A full DQU could deadlock the machine. The
CPs empty it, and a CP that is blocked on putting into it would never
come back to take from it. Two rules prevent this:

- The host may put a token only while more than 2×NCP (32) places are
  free. This keeps room for the CPs' own tokens.
- Copy falls back to the network when the DQU is full.

The reserve is a bound, not a proof for every program. An operator
with two destinations turns one token into two. A program that
multiplies its tokens faster than it consumes them can fill even the
reserved places. The CPs then wait in Operate until a place frees up.

## Module list

| File | Contents |
|---|---|
| `rtl/dfkpi_pkg.sv` | widths, token/instruction structs, opcodes, states, event vector |
| `rtl/dfkpi_system.sv` | top: 16 CPs, bus, network, DQU, IS, FS, host ports |
| `rtl/dfkpi_cp.sv` | coordinating processor: CP.DI, CP, LFR, FOR, routing |
| `rtl/dfkpi_ctrl.sv` | L/M/C/F/O micro-program |
| `rtl/dfkpi_cmp.sv` | MF decode and Frame Store address MVB+IX |
| `rtl/dfkpi_peu.sv` | operator execution |
| `rtl/dfkpi_dqu.sv` | token FIFO with a show-ahead head |
| `rtl/dfkpi_is.sv` | instruction memory, one synchronous read port per CP |
| `rtl/dfkpi_fs.sv` | Frame Store: AF flags with reset, operand array |
| `rtl/dfkpi_icn.sv` | CP-to-CP network over the torus links |
| `rtl/dfkpi_bus.sv` | DQU and Frame Store arbitration, host reserve |

Each file opens with a comment covering its interface, its timing, and
which parts are DF-KPI's and which are choices made here.

The top's status outputs help when watching a run:
- `ev` holds one pulse per CP and per event: bypass, FS store, FS match,
  FS wait, copy, GetDT, PutDI, PutICN, PutDQ, consumed, Operate stall
  and fan-out (the first of two copies has been sent).
- `state` gives each CP's current state.
- `dq_count` gives the DQU fill level.

## Testbenches and simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module against values it computes itself. At the end it
prints `TB_RESULT checks=<n> failures=<m>`, and a watchdog ends the run
if it hangs. To run one with plain Verilator (5.x):

```
verilator --binary --timing -Wno-fatal --top-module tb_dfkpi_system -o sim \
  rtl/dfkpi_pkg.sv $(ls rtl/*.sv | grep -v dfkpi_pkg) tb/tb_dfkpi_system.sv
./obj_dir/sim
```

The package must come first on the command line, because the modules
import it.

Notes on the testbenches:

- **`tb_dfkpi_system`** runs the top at its default size (16 CPs). It
  loads an 8-operator program that uses almost every mechanism:
  - ACCEPT and UN_OP feed a two-input ADD through the Frame Store.
  - INC follows, with two destinations: IF (then OUT or RET) and KILL.

  It then puts 200 activations into the DQU and checks the results as a
  multiset against a software model. Two of the activations share a
  matching vector on purpose, to force a collision and its retry. The
  test counts every event kind and fails if any never occurred: bypass,
  store, match, FS wait, copy, GetDT, each of the three result routes,
  fan-out, and Operate stall. It also fails if any CP stayed unused. A
  run takes about 1400 clocks.
- **`tb_dfkpi_cp`** surrounds one CP with behavioural models of the DQU,
  IS and Frame Store. It checks cycle counts (the 5 and 6 clocks above,
  plus time spent in CP.DI), a withheld Frame Store grant, collisions,
  each result route, and fan-out to two destinations (the copies leave
  in consecutive clocks, through the CP's own input, the network or the
  DQU).
- **`tb_dfkpi_dqu`, `tb_dfkpi_is` and `tb_dfkpi_bus`** override sizes to
  keep runs short. All others use the defaults.

The simulator is two-state, so all state that is read before being
written is reset. The operand and instruction arrays are the exception:
they are always written before they are read.

## How far it follows DF-KPI, and where it departs

These follow DF-KPI:
- the token, destination and instruction fields;
- the B/M matching function;
- Frame Store items with a presence flag, addressed by MVB and IX;
- the five CP states and their signal names (Init, GetDT, PutDT,
  CP_free);
- the register chain CP → LFR → FOR with CMP and PEU;
- result routing in the order own CP → other CP → DQU;
- 16 CPs in a 4×4 grid with wrap-around links, sharing one DQU, IS
  and FS;
- the operator set by name.

These are choices made here, where DF-KPI gives no detail:
- **Widths and sizes**: the field widths in the table above; a 64-entry
  DQU; a 256-word IS; a 256-item FS.
- **State transitions.** Which condition causes which transition in L,
  M, C, F and O is this design's reading, including that a same-port
  collision leads to Copy.
- **Operator semantics.** The exact meaning of IF, CASE, GATE and DEF;
  the UN_OP/BIN_OP sub-function encoding in LI; 16-bit
  two's-complement arithmetic.
- **Handshakes and arbitration.** The bus arbitration, the Frame Store
  lock, the host reserve in the DQU, and the Copy fallback to the
  network.
- **Busy.** A CP counts as "busy" when its CP.DI is occupied.

Departures and omissions:
- **At most two destinations.** In DF-KPI an instruction may list any
  number of destinations, and the literal can give a copy count. Here
  an operator has one or two destinations and sends one token to each.
  A value needed by more than two consumers must pass through extra
  operators, for example a chain of two-destination MOVs.
- **Six operators not executed**: SEL, LOAD, SEND, TUP, APPLY, CONSTR.
- **No matching-vector allocation.** DF-KPI allocates matching records
  per call, each with a header (reference count RC, vector size, old
  base, return address, new base). It frees a record when RC reaches
  zero. Here the MVB in the token is used directly, and an item is
  freed when its pair is formed. There is no RC and no header. The
  program or host must hand out MVB values that do not clash. A clash
  is not an error, but it costs collision retries.
- **Priority and type are not used.** P is not used for scheduling; the
  DQU is first-in first-out. T is not checked by the PEU; the result
  takes LD's type.
- **No overlap between segments.** The pipeline handles one token at a
  time from Load to Operate. Only CP.DI overlaps with the rest. The
  Fetch/Operate register's result half is the PEU's combinational
  output, not a separate register.
- **One-hop network.** A result reaches only one of the four
  neighbours of its CP. It is never routed across several links. If
  every neighbour is busy it goes to the DQU, even when a distant CP is
  idle.
- **Supporting units are not built.** The host computer, the
  information-technology unit and the fast I/O processors are
  represented only by the top's host ports: program load, token input,
  and OUT/RET output.
