# Hardware multipliers for Edwards-curve ECC over NIST P-192 on an 8051

An 8-bit 8051 can authenticate itself with elliptic-curve cryptography, for
example an infotainment unit proving to the car that it belongs there. In
software alone, one scalar multiplication takes about 29 s at 12.5 MHz. Nearly
all of that time goes into multiplying 192-bit field elements. This RTL holds
the co-processors that take over that multiplication. There are two kinds:

* **A memory-mapped 192-bit modular multiplier** (`mm192_coproc`). It reads
  both operands straight from the 8051's data RAM and multiplies them with a
  *broadcast* architecture: one 8x192-bit partial product per clock. It then
  reduces the product modulo p = 2^192 - 2^64 - 1 in hardware and writes the
  result back to RAM. The CPU starts it with a single byte on a parallel port.
* **Three parallel-port integer multipliers** (`par_mult`, W = 8, 16, 32). The
  CPU pushes operands through ports P1/P2 and commands through P0. They only
  multiply limbs, so the software still does the multi-precision carry
  handling and the reduction.

The curve is the Edwards curve x^2 + y^2 = 1 + d x^2 y^2 with d = 22, in
projective coordinates (X, Y, Z). Its one unified formula serves for both
point addition and point doubling.

## Block map

```
                 8051 (not included)
     ext. memory bus   |  P0 (cmd)         P0/P1/P2 (x3)
            |          |                        |
        +---v---+   +--v-----------+     +------v------+
        |mem_mux|<--| mm192_coproc |     | par_mult W=8|
        +---+---+   |  bcast_mac   |     | par_mult 16 |
            |       |  p192_reduce |     | par_mult 32 |
        +---v---+   +--------------+     +-------------+
        | xram  |------^ rdata
        +-------+
```

`ecc_codesign_top` instantiates all of these side by side. Each
co-processor has its own 8051-facing ports. A real system fits one of the four
co-processors; this top builds all of them so that each can be simulated.

| file | what it is |
|---|---|
| `rtl/p192_pkg.sv` | the prime, element types, the twelve multiplication configurations, command bits |
| `rtl/bcast_mac.sv` | 192x8 broadcast multiply-accumulate, 384-bit result after 24 bytes |
| `rtl/p192_reduce.sv` | combinational P-192 reduction of a 384-bit value |
| `rtl/mm192_coproc.sv` | command decoder, fetch/stream sequencer, result register, write-back |
| `rtl/mem_mux.sv` | exclusive RAM access for CPU or co-processor |
| `rtl/xram.sv` | 64 KiB byte-wide RAM, one registered read port |
| `rtl/par_mult.sv` | parallel-port W x W multiplier with its command FSM |
| `rtl/ecc_codesign_top.sv` | everything wired together |

## The 192-bit co-processor

### Twelve configurations instead of addresses

The CPU does not pass operand addresses. A projective Edwards point addition
has exactly twelve modular multiplications. They are always on the same
variables, so each one is hardwired as a configuration (A slot, B slot,
result slot), and the command byte only names the configuration (0-11). The
variables live in nine 24-byte slots starting at `BASE`: slot 0 holds d, and
slot k holds the scratch register Rk (k = 1..8). Each element is stored least
significant byte first.

| cfg | operation | cfg | operation | cfg | operation |
|---|---|---|---|---|---|
| 0 | R3 = R3*R6 | 4 | R7 = R7*R3 | 8 | R3 = R3*R3 |
| 1 | R1 = R1*R4 | 5 | R8 = R1*R2 | 9 | R2 = R2*R3 |
| 2 | R2 = R2*R5 | 6 | R8 = d*R8 | 10 | R3 = R3*R1 |
| 3 | R7 = R7*R8 | 7 | R2 = R2*R3 | 11 | R1 = R1*R7 |

The software puts (X1,Y1,Z1) in R1..R3 and (X2,Y2,Z2) in R4..R6. It then
alternates these multiplications with its own additions and subtractions.
The sequence is the one in `tb/tb_ecc_codesign_top.sv`, task `padd`. At the
end, R1, R2 and R3 hold X3, Y3 and Z3.

### Command protocol

Commands go through the co-processor's parallel port (`cmd` / `mm_p0`). Each
one acts on the rising edge of its bit, so the CPU writes the command byte
and then writes 0x00 again.

| P0 value | action | busy time |
|---|---|---|
| `0x80` + n | multiply under configuration n and keep the reduced result inside | 50 clocks |
| `0x40` | write the kept result to the result slot of the last configuration | 24 clocks |

`busy` is high while the co-processor owns the RAM. The memory multiplexer
follows `busy`: in that time CPU writes are dropped, and CPU reads see the
co-processor's traffic. `done` rises as `busy` falls and stays high until the
next command. Only one command may run at a time: an assertion in
`mm192_coproc` flags a command issued while busy. The result is kept until
the CPU asks for it, so a configuration may overwrite one of its own
operands, and the write-back can be repeated.

### Datapath and timing

A multiplication takes 50 clocks:

1. **Clocks 0-48: LOAD.** A 48-step address sequence runs. Steps 0-23 read
   operand A, least significant byte first, into a 192-bit shift register.
   Steps 24-47 read operand B. The RAM answers one clock after the address,
   so each step consumes the byte requested one step earlier.
2. **B streams through `bcast_mac`.** Each B byte goes straight into the
   multiplier without being stored. It is multiplied by all of A (the
   "broadcast") and added into the accumulator. The accumulator's upper half
   shifts right by 8 bits every clock. The byte that drops out is final and
   moves into the lower half. This keeps the adder at 200 bits, not 384.
3. **Clock 49: RED.** `p192_reduce` reduces the 384-bit product, and the
   result register captures it.

`p192_reduce` uses the special form of the prime. It splits the product into
six 64-bit words (A5..A0). Because 2^192 = 2^64 + 1 (mod p), the product is
congruent to the sum of four re-wired 192-bit numbers:

```
S0 = (A2, A1, A0)   S1 = (0, A3, A3)   S2 = (A4, A4, 0)   S3 = (A5, A5, A5)
```

Their sum is below 3*2^192 + 2^128, which is less than 4p. The block
computes sum - p, sum - 2p and sum - 3p in parallel and keeps the smallest
result that is not negative. The output is therefore always fully reduced,
even for inputs that are not (any 384-bit value is handled). In random use,
subtracting 3p almost never happens. `tb_p192_reduce` exercises it with
corner values.

At 12.5 MHz, a 50 + 24 clock multiplication fits easily in the 90 cycles
the software spends per field multiplication in the co-processor version.

## The parallel-port multipliers

P0 carries the command, and P1/P2 carry 16 bits at a time in either
direction (`din`/`dout` here). Operands and the product move in 16-bit
chunks; P0[1:0] selects the chunk:

| W | operand chunks (rising P0 bit 7) | result chunks (rising P0 bit 6) |
|---|---|---|
| 8 | 0 = {B, A} (P2 = B, P1 = A) | 0 |
| 16 | 0 = A, 1 = B | 0 low, 1 high |
| 32 | 0,1 = A low/high, 2,3 = B low/high | 0..3 |

The FSM moves through LOAD, CALC and READY. Once every operand chunk has been
written, it registers the product one clock later and raises `ready`. A read
command puts the selected result chunk on `dout` one clock later. A new
load command starts the next multiplication. The multiplication itself is
the plain `*` operator, so the synthesis tool maps it onto the FPGA's
hardware multipliers.

## How far to trust it

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_ecc_codesign_top` runs at the top's default parameters and plays the
  8051. It computes k*P for k = 0x06 (3 point additions) and for the 192-bit
  key `0x3DCF46ED302128736C0844766B41273BEB74600FF5984564` (281 point
  additions, 3,372 co-processor multiplications). It then applies the same
  key to that result, which is two steps of a chained k^n * P validation
  loop. The base point is
  P = (2, 145856074246581849553882507518887366570983786224641840723). Each
  result is compared with affine coordinates computed independently, and
  every intermediate point is checked to lie on the curve. The testbench also
  checks that a CPU write made while the co-processor is busy is dropped. It
  drives a full 192x192-bit grade-school product through each parallel-port
  unit (576, 144 and 36 limb products). Finally, it counts that every
  configuration, the write-back and the 0p/1p/2p reduction cases all occurred.
  Run time is under a second. For the 192-bit key, the co-processor is busy
  for 246,864 clocks (3,372 x 74). The testbench's idealised software
  accounts for the rest of the 550,440 clocks. On a real 8051, software
  addition, subtraction and data moves dominate instead, and one scalar
  multiplication is expected to take about 8 million clocks (0.65 s at
  12.5 MHz).
* `tb_mm192_coproc` runs every configuration with random reduced and
  unreduced operands. It checks that only the result slot changes, that busy
  lasts exactly 50 and 24 clocks, and that a repeated write-back gives the
  same result.
* `tb_bcast_mac`, `tb_p192_reduce`, `tb_par_mult`, `tb_mem_mux` and
  `tb_xram` test their blocks against reference values computed inside the
  testbench.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/p192_pkg.sv \
    tb/tb_ecc_codesign_top.sv --top-module tb_ecc_codesign_top -o sim
./obj_dir/sim
```

## Choices this RTL makes on its own

The architecture itself is fixed: byte-wide memory access, twelve hardwired
configurations, a broadcast multiplier fed from memory, hardware P-192
reduction, and parallel-port multipliers stepped by P0 commands. The details
below were left open and are choices of this RTL:

* The command encodings: bit 7 multiplies and bit 6 writes back or reads,
  with the configuration or chunk number in the low bits. Commands act on
  rising edges.
* The `busy`/`done`/`ready` status outputs.
* The slot layout and `BASE` = 0x0000, and the mapping of the twelve
  configurations onto the point-addition sequence.
* A read-first RAM with one clock of latency. The 64 KiB size is the
  8051's external data space.
* The right-shifting accumulator inside the broadcast multiplier.
* Subtracting k*p when the sum is greater than or equal to k*p, so results
  are always below p.
* Separate input and output buses standing in for the bidirectional P1/P2
  port pins.
* One synchronous, active-high reset.

Not included:

* The 8051 processor itself.
* The software layers: field addition and subtraction, the point-addition
  sequencing and the scalar-multiplication loop. The testbench models these
  in SystemVerilog.
* The Schnorr authentication protocol and the CAN bus link.

The scalar multiplication shown here branches on the key bits and is not
protected against simple power analysis. The co-processor's timing does not
depend on the data.
