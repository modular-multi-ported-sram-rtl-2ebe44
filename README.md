# Multi-ported memory from dual-ported SRAM blocks (I-LVT)

FPGA block RAMs, and most ASIC RAM compilers, give at most two ports. Wide
processors (VLIW, vector, CGRA, multi-core) want register files and buffers
with several write and several read ports at once. This RTL builds an
`NW`-write / `NR`-read memory out of nothing but simple dual-ported SRAM
blocks (one write port, one read port), without multi-pumping the clock and
without a large register file.

The construction is the *live-value table* (LVT) scheme, with the table
itself also made of SRAM and organised as an *invalidation* table (I-LVT),
as proposed by Abdelhadi and Lemieux. Two codings of the table are provided:
binary-coded and one-hot-coded.

## The idea in three layers

```
          waddr[k] ─┬──────────────────────────────┐
                    │                              ▼
 wdata[k] ──► data bank k (1W / NR read) ───►  ┌────────┐
             (one per write port)             │ rdmux  │──► rdata[r]
                                              │ per    │
 raddr[r] ──► every data bank, read copy r ──►│ read   │
        └───► invalidation LVT ── bank sel ──►│ port   │
                                              └────────┘
```

1. **Data banks.** Write port `k` owns data bank `k` and writes only there,
   so no two ports ever share an SRAM write port. A bank has to be read by all
   `NR` read ports, so it is built by *replication*: `NR` dual-ported blocks
   (`dpram`) that are always written together, each read by one read port
   (`mrram`).
2. **Live-value table.** After several ports have written one address, its
   newest value sits in the bank of whichever port wrote it last. The table
   keeps, per address, the identity of that port.
3. **Read multiplexers.** Every read port reads its address from all `NW`
   data banks and from the table in parallel; the table's answer picks the
   bank (`rdmux`).

A classic LVT is a multi-ported memory of bank IDs built from registers,
which does not scale to deep memories. Here the table is built from SRAM too,
and that is the hard part: the table needs `NW` write ports itself. The
invalidation table solves it the same way as the data: one table bank per
write port. Each write port writes only its own table bank, but chooses the
word it writes, after reading the other table banks at the same address
(*feedback*), so that the set of all `NW` words at that address now points at
it, invalidating every older writer. A read evaluates a fixed *output
function* over the `NW` words.

## The invalidation table

Each table bank has `NR` output read copies (one per read port) and feedback
copies, one for each of the other `NW-1` writers. Feedback copy `p` of bank
`i` is read at the write address of writer `p` if `p < i`, else of writer
`p+1`.

### Binary-coded (`ilvt_bin`)

Each table bank is `ceil(log2 NW)` bits wide.

* Write by port `k` at address `a`: `bank_k[a] <= k XOR (XOR of bank_i[a], i != k)`.
* Read at `a`: last writer `= XOR of bank_i[a]` over all `i`.

After the write the XOR of all banks is exactly `k`. Example with three
ports, address 5 all zero: port 2 writes (stores `2^0^0 = 2`, XOR = 2), then
port 1 writes (stores `1^0^2 = 3`, XOR = `0^3^2 = 1`).

### One-hot-coded (`ilvt_1ht`)

Each table bank is `NW-1` bits wide. Every pair of banks `(i, j)`, `i < j`,
shares one *condition*, held in two bits: bit `j-1` of bank `i` and bit `i`
of bank `j`. If the two bits are equal bank `i` wins the pair, if they differ
bank `j` wins. The feedback function of writer `k` sets its own bits so that
it wins every pair it belongs to, for bit `n` of its word:

| bit `n`   | new value                          | effect                       |
|-----------|------------------------------------|------------------------------|
| `n < k`   | `NOT bank_n[a]` bit `k-1`          | pair `(n, k)` differs: `k` wins |
| `n >= k`  | `bank_(n+1)[a]` bit `k`            | pair `(k, n+1)` equal: `k` wins |

For three ports:

```
bank0 <= { bank2<0>,  bank1<0>  }
bank1 <= { bank2<1>, ~bank0<0>  }
bank2 <= { ~bank1<1>, ~bank0<1> }
```

Exactly one bank wins all its pairs. A read port applies the same function
to the words it read and compares the result with each bank's own word; the
bank whose word matches is the last writer (one-hot), encoded into an index
for the multiplexer.

Each writer needs only **one** bit from each other bank: from bank `i`,
writer `j` needs bit `j-1` (if `i < j`) or bit `j` (if `i > j`), which is
always bit `p` of feedback copy `p`. So the feedback copies are one bit wide,
and the feedback path is a single inverter or wire, which is why this coding
has the shortest feedback path.

### Why the table banks are written one cycle late

The SRAM read is synchronous. The feedback read for a write presented in
cycle `t` is taken at the clock edge ending cycle `t`; its data arrive in
cycle `t+1`, where the feedback function computes the word, and the table
bank is written at the edge ending cycle `t+1`, with the write enable and
address delayed by a register. The data bank itself is written at the edge
ending cycle `t`.

Consequence: if port `j` writes the same address in cycle `t+1`, its
feedback read happens in the very cycle the table bank of port `k` is being
written. Every feedback copy therefore forwards the word being written when
the addresses match (new data on read-during-write). Without that, back to
back writes from two ports to one address corrupt the table; the table
testbenches catch exactly this.

## Timing and bypass modes

A read presented in cycle `t` returns its word in cycle `t+1`. A write
presented in cycle `t` can be read from cycle `t+1` on, depending on `BYP`:

| `BYP`      | read in cycle `t` (same cycle as the write) | read in cycle `t+1` | how |
|------------|-----------------------|---------------------|-----|
| `BYP_NON`  | old word | old or new word | no forwarding on the table's output copies |
| `BYP_RAW` (default) | old word | new word | table output copies forward the word being written |
| `BYP_RDW`  | new word | new word | also: registered compare of each read address against the write addresses, a hit overrides the table; data banks forward the word being written |

`BYP_RAW` behaves like a single block RAM (new data read-after-write),
`BYP_RDW` like a register (new data read-during-write). From cycle `t+2` on
all modes return the new word.

Two write ports must not write the same address in the same cycle; an
assertion in `mpram` reports it. Every read port reads every cycle.

## Interface and parameters (`mpram`)

| parameter   | default   | meaning |
|-------------|-----------|---------|
| `NW`        | 4         | write ports |
| `NR`        | 4         | read ports |
| `W`         | 32        | word width |
| `D`         | 32768     | depth in words |
| `LVT`       | `LVT_1HT` | table coding: `LVT_1HT` or `LVT_BIN` |
| `BYP`       | `BYP_RAW` | `BYP_NON`, `BYP_RAW`, `BYP_RDW` |
| `INIT_FILE` | `""`      | optional `$readmemh` file with the initial words |

The defaults are the largest configuration of the published evaluation
(3 or 4 write ports, 3 or 4 read ports, 16K or 32K words of 16 or 32 bits),
so every evaluated configuration is a subset of the default build.

| port    | dir | width            | |
|---------|-----|------------------|-|
| `clk`   | in  | 1                | clock |
| `rst`   | in  | 1                | synchronous; clears only the table's delayed write enables |
| `we`    | in  | `[NW]`           | write enable per write port |
| `waddr` | in  | `[NW][log2 D]`   | write address per write port |
| `wdata` | in  | `[NW][W]`        | write data per write port |
| `raddr` | in  | `[NR][log2 D]`   | read address per read port |
| `rdata` | out | `[NR][W]`        | read word, one cycle after `raddr` |

Contents are never reset. At start every SRAM holds zero, then every data
bank is loaded from `INIT_FILE` if one is given. An all-zero table means
"bank 0 wrote last" for every address in both codings, so the memory reads
back the initial contents.

## SRAM cost

Bits of SRAM, for depth `d`, width `w`:

| part | bits |
|------|------|
| data banks | `d*w*NW*NR` |
| binary table | `d*ceil(log2 NW)*NW*(NW-1) + d*ceil(log2 NW)*NW*NR` |
| one-hot table | `d*(NR+1)*NW*(NW-1)` |

At the defaults: data 16,777,216 bits; one-hot table 1,966,080 bits (total
18,743,296); binary table 1,835,008 bits. Binary needs fewer bits here; the
one-hot table pays a little memory for the shorter feedback path. For
`NW <= 3` the one-hot table is never larger.

## Files

| file | contents |
|------|----------|
| `rtl/mpram_pkg.sv` | `lvt_e`, `byp_e`, `bank_id_w()` |
| `rtl/dpram.sv`     | dual-ported SRAM block, registered read, optional forwarding and init file |
| `rtl/mrram.sv`     | 1W/NR RAM by replication of `dpram` |
| `rtl/ilvt_bin.sv`  | binary-coded invalidation table |
| `rtl/ilvt_1ht.sv`  | one-hot-coded invalidation table |
| `rtl/rdmux.sv`     | read multiplexers |
| `rtl/mpram.sv`     | the multi-ported memory (top) |
| `tb/tb_*.sv`       | self-checking testbenches, one per module, plus `tb_mpram_full` and `tb_mpram_workloads` |
| `tb/mpram_traffic.sv` | random-traffic driver and checker for one memory, used by `tb_mpram_workloads` |
| `tb/mpram_init.hex`| 32 initial words for `tb_mpram` |

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop on a
watchdog. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_mpram \
          rtl/mpram_pkg.sv tb/tb_mpram.sv
./obj_dir/Vtb_mpram
```

(`tb_mpram` opens `tb/mpram_init.hex` by a relative path, so run it from that
directory.) Replace `tb_mpram` by any other testbench name.

| testbench | what it checks |
|-----------|----------------|
| `tb_dpram` | read latency, read-after-write, old vs. forwarded read-during-write |
| `tb_mrram` | three read copies, forwarding on one port only |
| `tb_rdmux` | selection for every bank and port |
| `tb_ilvt_bin`, `tb_ilvt_1ht` | 3W/2R tables on 16 words against a last-writer model, with and without output forwarding; counts back-to-back cross-port writes and all-ports-writing cycles |
| `tb_mpram` | six memories (both codings x three bypass modes), 4W/4R, 32 x 16 bit: initial contents, the two-port example (0x8C to address 3 and 0x24 to address 1 in one cycle, read back, then overwrite), 8000 random cycles against a word model; requires reads served by every bank, read-after-write and read-during-write collisions, back-to-back cross-port writes and all-port writes to have happened |
| `tb_mpram_full` | default size (4W/4R, 32768 x 32): fill of 4096 words at four words per cycle (cycle count checked), read-back, mixed random traffic |
| `tb_mpram_workloads` | the evaluated configurations: 3W/3R 16K x 16, 3W/4R 32K x 16, 4W/3R 16K x 32, 4W/4R 32K x 32, each in both codings, 2000 random cycles each (helper `tb/mpram_traffic.sv`) |

## Own choices and limits

Beyond the published method, these are choices of this RTL:

* write enables per port, and the rule that two ports never write one
  address in the same cycle;
* a read latency of one cycle, with every read port reading every cycle;
* the forwarding logic that realises the bypass modes, and the extra
  `BYP_NON` mode;
* the delayed write enable of the table, and a reset that clears only it;
* the binary encoding of the one-hot table's result before the multiplexer;
* loading the same init file into every data bank.

Not included: the register-based LVT and the XOR-based multi-ported memory
that the method is compared against, and any FPGA-vendor-specific RAM
primitive; `dpram` is a plain array that synthesis tools map to block RAM.
Area and Fmax figures of the published evaluation are not reproduced here.
