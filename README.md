# FGDTA: a configurable processor-to-accelerator interface

A small hardware accelerator (a DCT stage, an FIR filter, an exponent unit)
often has no bus logic of its own. It has an operand input, a start pulse, a
busy flag and a result output, and it is a slave of the processor. The
processor's on-chip bus, however, has its own protocol and its own word width,
and the accelerator's width is often different from it: here a 64-bit
accelerator sits behind 32-bit buses.

This design is one generic interface that sits between the two and is adapted
by configuration, not rewritten for each case. Two things are configured:

* **the bus side.** Every supported bus is reduced to a single generic
  two-cycle transfer, an *address step* followed by a *data step*. Only a thin
  front end is specific to each bus. AMBA AHB and AMBA APB front ends are
  provided.
* **the widths.** `PROC_DS` is the processor data size and `ACC_DS` the
  accelerator data size. The control unit packs processor words into
  accelerator operands, or splits processor words into several accelerator
  operands, as the two sizes require.

The interface targets *fine-granularity, deterministic-time accelerators*
(FGDTA): units with a fixed operand size and only a few internal registers.
Their computing time should be constant, but the interface waits on `busy`, so
it also works when the time varies.

```
            processor bus                                  accelerator
  AHB  ──► fgdta_ahb ─┐                                  ┌─► xdata[ACC_DS]
                      ├─► gen_xfer ──► fgdta_ctrl ───────┼─► start
  APB  ──► fgdta_apb ─┘   (address/    (operand regs,    ├── busy
                           data step)   result regs,     └── ydata[ACC_DS]
                                        sequencer)
```

`soc_comm_top` holds one complete interface on AHB and one on APB. Both are
set to 32-bit buses and 64-bit accelerators. It brings out both bus slave
ports and both accelerator ports. The processor, the bus fabric (decoder,
arbiter, AHB-to-APB bridge) and the accelerators are not part of the RTL.

## Files

| file | contents |
|---|---|
| `rtl/fgdta_pkg.sv` | configuration package: default widths, the four shared types, register map, sequencer states |
| `rtl/gen_xfer.sv` | generic two-step transfer unit |
| `rtl/fgdta_ctrl.sv` | control unit: width conversion, flow control, accelerator sequencer |
| `rtl/fgdta_ahb.sv` | complete interface with an AHB-Lite slave port |
| `rtl/fgdta_apb.sv` | complete interface with an APB slave port |
| `rtl/soc_comm_top.sv` | top: AHB and APB interfaces side by side |
| `tb/acc_model.sv` | behavioural accelerator (butterfly `{a+b, a-b}` on the two operand halves, fixed or random latency) |
| `tb/ahb_master.sv`, `tb/apb_master.sv` | bus master models |
| `tb/ctrl_tester.sv` | per-configuration driver and checker for the control unit |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## The generic transfer (`gen_xfer`)

Each transfer takes two clock cycles:

1. **Address step.** Select, direction and address are on the bus
   (`a_ctrl.sel/write/addr`) and are registered.
2. **Data step.** The registered transfer is presented to the control unit
   (`x_ctrl`). Write data flows from the bus to the control unit, and read data
   flows back, combinationally. The step ends at the clock edge of a cycle in
   which the control unit returns `x_rsp.ready`. While `ready` is low the data
   step is stretched by wait states.

The address-step register and the data-step logic work in parallel. A new
address step is accepted in the last cycle of the previous data step. So on a
pipelined bus, transfers overlap and complete at one per cycle. A bus that
separates its transfers needs two cycles each. The bus must not start an
address step while a data step is stretched. An assertion checks this rule.

* **AHB** (`fgdta_ahb`). An address phase with `HSEL`, `HTRANS` = NONSEQ or
  SEQ and `HREADY` high is an address step. The AHB data phase is the data
  step, and `HREADYOUT` is its ready. IDLE and BUSY transfers are ignored.
  Bursts are simply consecutive pipelined transfers. `HRESP` is always OKAY.
  Only full-word transfers are supported, and an assertion checks `HSIZE`.
* **APB** (`fgdta_apb`). The setup phase is the address step and the access
  phase is the data step. `PREADY` (APB3) carries the wait states, and
  `PSLVERR` is always low.

Peak bus rate is therefore one 32-bit word per cycle on AHB and one word per
two cycles on APB. A burst of 16 status reads takes 17 cycles on AHB and
32 on APB. The testbenches check both figures.

## The control unit (`fgdta_ctrl`)

### Blocks of data

All storage is organised in *blocks* of `BUF_W = max(PROC_DS, ACC_DS)` bits.
One of the two sizes must be a whole multiple of the other.

| case | processor words per block | accelerator runs per block |
|---|---|---|
| `ACC_DS > PROC_DS` (default 32/64) | `ACC_DS/PROC_DS` (2) | 1 |
| `PROC_DS > ACC_DS` (e.g. 32/16) | 1 | `PROC_DS/ACC_DS` (2) |
| equal | 1 | 1 |

Words and operand slices are ordered least significant first. With 32/64,
the first word written is `xdata[31:0]` and the second is `xdata[63:32]`. The
results come back the same way. With 32/16, one written word produces two
accelerator runs: first on bits `[15:0]`, then on bits `[31:16]`. Their two
results are packed into one result word in the same positions.

There are two register sets. The **operand registers** receive processor words
and feed `xdata`. The **result registers** collect `ydata` and return it to
the processor. Because there are two sets, the processor can load the next
block while the accelerator still works on the current one.

### Register map and programming model

Addresses are word offsets from the interface's base address. The offset is
decoded from address bit `log2(PROC_DS/8)` (bit 2 for 32-bit buses). Higher
address bits are left to the bus decoder, which drives `HSEL`/`PSEL`.

| offset | access | meaning |
|---|---|---|
| 0 (data) | write | next operand word; the last word of a block completes the block and starts the accelerator |
| 0 (data) | read | next result word; the last word of a block frees the result registers |
| 1 (status) | read | bit 0 operand block full, bit 1 sequence running, bit 2 result ready, bit 3 accelerator `busy` |
| 1 (status) | write | ignored |

Flow control is done with bus wait states, so software needs no polling:

* A **data write** waits while the operand registers hold a full block that
  the accelerator has not finished with.
* A **data read** waits while a computation is pending, that is, while a full
  operand block has not yet produced its result. If nothing is pending and no
  result is held, the read completes at once and returns 0.

The simplest program is: write the words of a block, then read the words of
its result. The first read waits until the result is ready. For throughput,
write block *n+1* before reading the result of block *n*. The interface holds
one block being computed or waiting, plus one result. Writing a third block
before reading a result stalls the bus for good, so software must not do this.
Polling the status register instead of relying on wait states also works, and
is what one would do on an APB bus without `PREADY`.

### Internal organisation

The unit is written as five cooperating processes:

1. **launch**: decodes each data step and decides whether it can complete now
   (`x_rsp.ready`);
2. **write**: stores a word in the operand registers and counts words;
3. **read**: selects the result word (or the status word) and counts words;
4. **write reset**: frees the operand registers when the last accelerator run
   of the block delivers its result;
5. **read reset**: frees the result registers after the last result word is
   read.

A three-state sequencer (`SEQ_IDLE`, `SEQ_ISSUE`, `SEQ_WAIT`) drives the
accelerator. It starts when the operand block is full and the result registers
are free. `SEQ_ISSUE` drives the operand slice on `xdata` and raises `start`
for one cycle. `SEQ_WAIT` waits for `busy` to be low, then stores `ydata` in
the result registers. It then issues the next slice, or returns to idle and
marks the result ready.

### Accelerator handshake and timing

The accelerator must follow these rules:

* It samples `xdata` on the clock edge where `start` is high. `xdata` then
  stays stable until its result has been taken.
* It raises `busy` in the cycle after `start` and keeps it high until `ydata`
  is valid.
* An accelerator that answers in one cycle may keep `busy` low. `ydata` must
  then be valid in the cycle after `start`.

Let *L* be the number of cycles `busy` is high. After the data step that
writes the last operand word, the result is ready after `1 + N_OP × (L + 2)`
cycles, where `N_OP` is the number of accelerator runs per block. A data read
issued right after that write waits exactly that many cycles. The testbenches
check this count for several widths and latencies.

## Configuring

Default widths live in `fgdta_pkg` (`DEF_PROC_DS = 32`, `DEF_ACC_DS = 64`,
`DEF_ADDR_W = 32`), along with the types built from them:

* `proc_data_t`;
* `acc_data_t`;
* `bus_ctrl_in_t`: select, direction and address of one transfer;
* `bus_ctrl_out_t`: ready.

To retarget the interface, edit the package defaults or override the
`PROC_DS`/`ACC_DS` parameters of `fgdta_ahb`, `fgdta_apb` or `fgdta_ctrl`
directly. Several configurations can coexist in one design. For a new bus,
write a front end like `fgdta_ahb.sv` that maps the bus's address phase to
`a_ctrl` and its data-phase ready to `d_ready`. `gen_xfer` and `fgdta_ctrl`
stay unchanged.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fgdta_pkg.sv tb/tb_soc_comm_top.sv --top-module tb_soc_comm_top
./obj_dir/Vtb_soc_comm_top
```

Replace the testbench name to run the others:

* `tb_gen_xfer`: random address steps and wait states against a reference
  model, and one transfer per cycle when pipelined.
* `tb_fgdta_ctrl`: four width configurations (32/64, 32/16, 32/8, 32/32 with
  a one-cycle accelerator). It checks results, latency, status, the idle read
  and the write stall.
* `tb_fgdta_ahb` and `tb_fgdta_apb`: the complete interface on each bus, with
  results, wait-state counts and bus rates.
* `tb_soc_comm_top`: both buses at once at the default sizes, 200 blocks each.
  The APB side uses a random-latency accelerator. The test counts that every
  mechanism occurs (pipelined overlap, read wait, write stall on both buses,
  status polling, idle read) and prints the bytes moved per cycle on each bus.

The RTL is synthesizable. The assertions sit in the modules and are ignored by
synthesis.

## Departures and limits

* **One clock.** The bus, the interface and the accelerator share one clock.
  Running the accelerator at its own frequency would need a clock-domain
  crossing on the start/busy handshake and the data buses, which is not
  provided.
* **Equal widths use the general path.** When the two sizes are equal, a
  minimal interface would only decode the select and the direction. Here the
  word still passes through the operand and result registers, which adds one
  register stage and a few cycles.
* **Only fixed-size accelerators.** Accelerators with variable data size and
  non-deterministic granularity (a variable-length coder, or a DCT working on
  whole 8×8 blocks or images) need buffering and a protocol that this design
  does not have. Those accelerators would need a different interface.
* **Only AHB and APB front ends.** No PCI front end is given.
* **Error handling.** There are no error responses. Writes to the status word
  are ignored. Offsets above 1 alias onto offsets 0 and 1. Sub-word transfers
  are not supported.
* **Measured rates.** The interface alone allows 4 bytes per cycle on AHB
  and 2 on APB, a ratio of 2. Measured rates of a whole system also depend on
  the processor's software loop, the bus clock and the accelerator latency,
  so they are lower than these peaks.
