# AHB-to-APB bridge with a handshake clock-domain crossing

In an AMBA system the processor, memories and DMA sit on the fast, pipelined
AHB bus. The slow peripherals (UART, timer, GPIO, keypad) sit on the simple APB
bus. A bridge joins the two. This bridge is an AHB slave on `HCLK` and the APB
master on `PCLK`, and the two clocks may have **any frequency ratio and any
phase**. The bridge holds each AHB transfer and carries it across the clock
boundary with a request/acknowledge handshake, not an asynchronous FIFO. It
keeps the AHB master waiting (`HREADY` low) until the APB transfer has finished,
so that no write is lost and no read returns stale data.

The price is speed: each handshake edge passes through a two-flop synchronizer,
so one transfer costs several cycles of both clocks. That is acceptable for
register accesses to slow peripherals, which is what APB is for.

The RTL also contains a small AHB traffic generator/checker, an APB register-bank
slave, and a top level that joins all three into a system you can simulate.

## Block structure

```
               HCLK domain                       |            PCLK domain
                                                 |
 AHB  --->  ahb_response  --PENDWR/PENDRD----------> sync2 x2 --> apb_access ---> APB
 bus        (controller,  <------------------------------------------ PDONE       bus
             HREADY)   <-- sync2 <---                |              (setup/access,
               |  strobes                            |               PRDATA latch)
               v                                     |                 ^
           control_transfer  -- addr_q/write_q/wdata_q ----------------+
           (HADDR/HWRITE/HWDATA latches, HRDATA reg) <--- rdata_q ------+
```

| file | role |
|---|---|
| `rtl/ahb2apb_pkg.sv` | widths (32-bit address and data), `HTRANS` encoding |
| `rtl/sync2.sv` | double stage synchronizer (two flip-flops on the receiving clock) |
| `rtl/control_transfer.sv` | HCLK latches for address, direction and write data; HRDATA register |
| `rtl/ahb_response.sv` | AHB-side state machine: accept, raise request, drive `HREADY` |
| `rtl/apb_access.sv` | APB-side state machine: synchronize request, APB setup/access, `PDONE` |
| `rtl/ahb2apb_bridge.sv` | the bridge: the three blocks above |
| `rtl/ahb_driver_monitor.sv` | AHB master environment: reset generator, traffic, read-data check |
| `rtl/apb_driver_monitor.sv` | APB slave environment: register bank plus protocol monitor |
| `rtl/reset_sync.sv` | reset synchronizer that brings the generated reset into PCLK |
| `rtl/ahb2apb_top.sv` | driver/monitor, bridge and slave wired together |

The AHB interface of the bridge is `ahb_response` plus `control_transfer`, both on
`HCLK`. The APB interface is `apb_access`, on `PCLK`.

## The handshake (how a transfer crosses the boundary)

Three single-bit signals cross between the domains:

* `PENDWR`: "a write is pending", from HCLK to PCLK.
* `PENDRD`: "a read is pending", from HCLK to PCLK.
* `PDONE`: "the peripheral operation is done", from PCLK to HCLK.

All three leave a flip-flop, and each receiver passes them through its own
`sync2`. The multi-bit values never go through a synchronizer. Instead, the
handshake guarantees that they are stable whenever the other side looks at them:

* The address, direction and write data sit in `control_transfer`. They change
  only when a new AHB transfer is accepted. That can only happen once the
  previous handshake has fully returned to zero.
* The read data sits in `apb_access.rdata_q`. It is loaded at the end of the APB
  access, in the same edge that raises `PDONE`, and held while `PDONE` is high.
  The HCLK side samples it only after the synchronized `PDONE` is high, which is
  at least one full HCLK period later.

The handshake is four-phase (return to zero):

1. **HCLK.** A transfer is accepted when `HSEL` is high, `HTRANS` is NONSEQ or SEQ,
   and `HREADY` is high. Address and direction are latched.
   * For a read, `PENDRD` rises on that same edge.
   * For a write, the next edge first samples `HWDATA`, which AHB presents in the
     data phase, and then raises `PENDWR`.
2. **PCLK.** The synchronized request is seen, 2–3 PCLK edges later. `PSEL` rises
   with `PADDR`/`PWRITE`/`PWDATA` (setup cycle). `PENABLE` follows for
   `1 + WAIT_STATES` cycles (access). On the last access cycle `PRDATA` is
   latched, `PSEL`/`PENABLE` fall, and `PDONE` rises.
3. **HCLK.** The synchronized `PDONE` is seen. The request falls and, for a read,
   `HRDATA` is loaded.
4. **PCLK.** The request is seen low, so `PDONE` falls.
5. **HCLK.** The synchronized `PDONE` is seen low. `HREADY` goes high for one cycle
   and the AHB data phase ends. A new transfer may be accepted in that same cycle
   (AHB pipelining).

`HREADY` is low from the accepting edge to step 5. It is decoded from the state
register and the synchronized `PDONE`, so it is glitch-free.

**Cost per transfer.** A read keeps `HREADY` low for about
`4 HCLK + (7 + WAIT_STATES) PCLK` cycles; a write takes one HCLK cycle more. Each
crossing can add up to one period of the receiving clock, depending on phase.

* When the APB side answers at once, the AHB side alone accounts for 5 HCLK
  cycles per read and 6 per write. `tb_ahb_response` checks exactly these counts.
* At HCLK = 3 × PCLK with no wait states, the full-size test measured 792 stall
  cycles for 32 transfers (about 25 HCLK cycles each).

Only one transfer is in flight at a time. This is the design's main limitation,
and it is inherent to the handshake method.

## AHB side details

* **Ports.** `HCLK, HRESETn, HSEL, HTRANS[1:0], HADDR[31:0], HWRITE,
  HWDATA[31:0]` in; `HRDATA[31:0], HREADY` out.
* **No `HRESP`, `HSIZE`, `HBURST` or `HPROT`.** Every transfer completes OKAY
  and is treated as a full 32-bit word.
* **`HREADY` is this slave's own ready output, and the bridge also samples it.**
  That is right for a single-slave bus. On a multi-slave AHB you would add a
  separate `HREADY` input from the multiplexor and use it in the `accept` term of
  `ahb_response`.
* **Ignored transfer types.** IDLE and BUSY transfers, and transfers with
  `HSEL` low, are ignored.

## APB side details

* **Ports.** `PCLK, PRESETn, PRDATA[31:0]` in; `PSEL, PENABLE, PADDR[31:0],
  PWRITE, PWDATA[31:0]` out.
* **Registered outputs.** All APB outputs are registered and follow AMBA 2 APB
  timing: one setup cycle, then access.
* **Wait states.** The port list has no `PREADY`, so slow peripherals are served
  by `WAIT_STATES`, a fixed number of extra access cycles for every transfer
  (default 0). A peripheral that needs a variable number of wait states would
  need an added `PREADY` input, ending the access in `apb_access`'s `S_ACCESS`
  state.

## Environment blocks

**`ahb_driver_monitor`** generates the system reset. It stretches `RESETn` to
`RST_CYCLES` HCLK cycles and releases it on HCLK. On `start` it runs one pass:

1. `NUM_XFERS` writes of `seed ^ (i * 32'h9E3779B9)` to `ADDR_BASE + 4*i`.
2. One write with `HSEL` low, which must have no effect.
3. `NUM_XFERS` reads of the same addresses, each compared with the expected value.

Transfers go out in back-to-back pairs, with one IDLE cycle between pairs, so both
the pipelined hand-over and an idle bus are exercised. Its counters report:

* writes and reads completed;
* read mismatches (`err_count`);
* HCLK cycles spent stalled;
* IDLE gaps;
* deselected transfers;
* back-to-back hand-overs.

`done` stays high until `start` is released.

**`apb_driver_monitor`** is a bank of `DEPTH` 32-bit registers (default 64),
word-addressed by `PADDR[7:2]`. Higher address bits alias. `PRDATA` is the
addressed word during a selected read and zero otherwise. It counts:

* writes and reads;
* extra access cycles;
* protocol errors: `PENABLE` without `PSEL`, access without setup, and signals
  changing between setup and the end of the access.

**`ahb2apb_top`** wires driver → bridge → slave. The generated reset goes straight
to the HCLK side, which already releases it on HCLK. It reaches the PCLK side
through `reset_sync`. Clocks are inputs, because clock generation is left to the
testbench. The counters and both buses are brought out as ports. After a
correct pass:

* `err_count = 0` and `proto_err_count = 0`;
* `NUM_XFERS` writes and `NUM_XFERS` reads on each side;
* `wait_count = 2 * NUM_XFERS * WAIT_STATES`.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `WAIT_STATES` | bridge, `apb_access`, top | 0 | extra APB access cycles per transfer |
| `NUM_XFERS` | driver, top | 16 | writes (and reads) per pass |
| `ADDR_BASE` | driver, top | 0 | first address of the pass |
| `RST_CYCLES` | driver | 4 | HCLK cycles the generated reset is held |
| `DEPTH` | APB slave, top | 64 | registers in the APB bank |
| `RESET_VAL` | `sync2` | 0 | synchronizer value in reset |
| `ADDR_W`, `DATA_W` | package | 32 | bus widths |

`NUM_XFERS` must not exceed `DEPTH` if the read-back is to match.

## Where this RTL goes beyond what the bridge specification fixes

The signal names, the split into AHB response / control transfer / APB access,
the three handshake signals and the double stage synchronizers belong to the
bridge's specification. Everything below is this implementation's own choice:

* **Widths.** 32-bit address and data.
* **Resets.** Active low, asynchronous assert (named `HRESETn`/`PRESETn`).
* **Handshake timing.** The handshake returns to zero, as described above. The
  state machines and the exact cycle on which `HREADY` rises are also choices.
* **`HRDATA`** is registered.
* **Wait states** are a fixed count, since there is no `PREADY`.
* **Environment blocks.** The traffic programme, data pattern, register bank and
  protocol checks are all choices.
* **Clocks** are top-level inputs rather than generated inside the environment
  blocks.
* **Reset synchronizer.** A reset synchronizer into PCLK is added.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_sync2` | output equals input two edges earlier; reset values |
| `tb_control_transfer` | each latch against a reference model, 1000 random cycles |
| `tb_ahb_response` | strobes per transfer; ignored IDLE/BUSY/deselected; exact HREADY-low counts (5 + d1 + d2 read, 6 + d1 + d2 write) |
| `tb_apb_access` (with `apb_access_harness`) | PSEL 3 cycles after request, one setup, 1+WS access cycles, read data from the last access cycle, PDONE release; WS = 0 and 3 |
| `tb_ahb2apb_bridge` | 1500 random transfers at five HCLK/PCLK period pairs (10/10, 10/13, 10/40, 35/10, 7/23 ns) against a shadow memory; APB transfers matched in order |
| `tb_ahb_driver_monitor` | address/data programme, reset release time, counters, a corrupted read is caught |
| `tb_apb_driver_monitor` | register bank, counters, each protocol violation counted once |
| `tb_ahb2apb_top` | end to end, WAIT_STATES=2, four clock ratios, two passes each; checks that stalls, wait states, back-to-back hand-over, IDLE gaps, deselected transfers, both clock orderings and re-run after reset all occur |
| `tb_ahb2apb_top_full` | the top at default parameters, one full pass at HCLK = 3 × PCLK |

The RTL also carries SVA assertions for the handshake and bus rules: one request
at a time, `HREADY` low while a request is pending, APB setup-then-access, signals
held while the master waits, and the crossing rule that the latched transfer
and the read data do not change while the request or `PDONE` is up.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv \
    rtl/ahb2apb_pkg.sv tb/tb_ahb2apb_top.sv --top-module tb_ahb2apb_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. (`-Wno-fatal` lets the testbenches' clock-period delays, held in variables, through Verilator's `ZERODLY` warning.) Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ahb2apb_pkg.sv
rtl/<module>.sv --top-module <module>`. Verilator reports `SYNCASYNCNET` for the
resets. This is expected: the same reset is an asynchronous flip-flop reset and
also the `disable iff` condition of the assertions.

## Limits and things to know before reuse

* One transfer at a time, with a long per-transfer latency (see above). Use an
  asynchronous FIFO design if you need APB throughput.
* No error response, no byte or halfword writes, and no `PREADY`/`PSLVERR`
  (APB3/APB4). The bridge drives a single APB slave select; decoding `PSEL` for
  several peripherals from `PADDR` is left to the surrounding system.
* The CDC scheme relies on `control_transfer`'s outputs and `rdata_q` being
  stable while sampled. Keep them as direct register outputs, and add the usual
  max-delay constraints on those paths in implementation.
