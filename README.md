# Remote control of on-detector VME modules over an optical link

Trigger and readout electronics that sit on a particle detector live in VME
crates that nobody can reach while the experiment runs, in a radiation field
that upsets the configuration memory of FPGAs and CPLDs. This design lets a
computer in an ordinary crate, far away, act as the master of such a remote
crate: it reads and writes the remote modules over their VME bus, and when a
module's VME logic itself is corrupted it reloads that logic over a JTAG bus.

Two VME modules do the work:

* **CCI** (Control/Configuration Interface), a slave in the local crate. The
  local host writes an *instruction* into its registers and later reads the
  *response* from them.
* **HSC** (Hi-pT/Star-Switch Controller), the master of the remote crate. It
  executes each instruction on the remote VME bus or JTAG bus and sends back
  exactly one response.

The two are joined by a pair of G-LINK optical links that carry one 16-bit
word per 40 MHz clock in each direction. Everything the host can do goes
through one small instruction set.

```
 local host ── VME ── CCI ══ G-LINK (instructions) ══▶ HSC ── VME ── slave modules
                       ▲                                │  └─ N-lines + eTBC ── JTAG ── module CPLDs
                       ╚════ G-LINK (responses) ════════╝
```

## Messages on the link

Every instruction and every response is one *message*: a 14-bit control word,
sent as a G-LINK control word, and, for some messages, two 16-bit data words
(bits 31:16 first), sent as G-LINK data words. The layout of the control word
(`rtl/rcs_pkg.sv`) is this design's own:

| bit 13 | bits 12..0 |
|---|---|
| 1 | eTBC access: [12] read, [11] error (in responses), [10:8] register address, [7:0] data |
| 0 | [12:9] opcode, [8:0] operand |

| Instruction | Opcode | Executed by | Operand / data words | Response |
|---|---|---|---|---|
| idle | 0 | PPE | – | HSC status: [4:0] N-line, [5] N-line on, [6] interrupts on, [7] VME inhibited |
| setVMEA | 1 | SPE | data = 32-bit VME address | echo |
| setVMED | 2 | SPE | data = 32-bit VME write data | echo |
| configVME | 3 | SPE | [0] write, [1] A32 (else A24), [2] D32 (else D16) | [0] timeout, [1] bus error, [2] inhibited, [8] data follow; a read returns the data |
| interruptVME | 4 | SPE | – | IRQ lines seen, [6:0] = IRQ7..IRQ1 |
| enableInterrupt | 5 | SPE | [0] enable | echo |
| inhibitVME | 6 | SPE | [0] inhibit | echo |
| resetHSC | 7 | PPE | [0] reset SPE + VME controller, [1] reset eTBC | echo |
| configJTAG | 8 | PPE | [5] enable, [4:0] N-line number 1..21 | echo |
| configeTBC | bit 13 | PPE | read/write, address, data in the control word | read data in [7:0], [11] timeout |

An instruction carries data words only for setVMEA and setVMED; a response
carries them when operand bit 8 is set. One more message flows unprompted from
HSC to CCI: when the HSC has acknowledged a VME interrupt it sends an
interruptVME message with operand bit 7 set, the level in bits 2:0 and the
16-bit status ID as data.

A VME write therefore takes three instructions (address, data, configVME) and
a read two; the address and data registers keep their values, so repeated
accesses can skip the ones that did not change.

## The HSC: two encoders, one of them kept simple

The HSC is split along the line of what must survive radiation
(`rtl/hsc_top.sv`):

* The **Primary Protocol Encoder** (`rtl/hsc_ppe.sv`) sees every instruction.
  It executes idle, resetHSC, configJTAG and configeTBC itself, and passes the
  VME instructions on. It is the part that must keep working, because through
  it the host can reset the rest, select a module's JTAG port with an N-line,
  and drive the embedded test-bus controller (eTBC) that reloads a CPLD. (In
  the hardware this encoder moves from a CPLD to a radiation-tolerant ASIC.)
* The **Secondary Protocol Encoder** (`rtl/hsc_spe.sv`) executes the VME
  instructions through the VME controller (`rtl/vme_master.sv`) and forwards
  interrupts. If it stops answering, the host resets it with resetHSC, or
  reloads its CPLD over JTAG through the PPE (N-line 1 is the HSC's own scan
  port).

Both encoders answer over one transmitter. The PPE owns it: responses go
through a register stage and an arbiter that takes the PPE's own response
before a waiting SPE response. SPE instructions pass a forwarding register in
the PPE, an input register and a decode stage in the SPE, and a response input
register back in the PPE. These four registers are why an SPE instruction
takes four clocks longer than a PPE one.

### Response times

Clocks from the last instruction word at the receiver's outputs to the response
control word at the transmitter's inputs (25 ns each):

| Instruction | Path | Clocks | Condition |
|---|---|---|---|
| idle | PPE | 5 | – |
| setVMEA | SPE | 9 | – |
| configVME read | SPE + VME | 20 | slave drives DTACK* 4 clocks after DS* |
| configeTBC | PPE + eTBC | 25 | eTBC drives RDY* 12 clocks after STRB* |

These are the response times measured on the original prototype (122, 244,
496 and 620 ns). The RTL reproduces the clock counts exactly. The last two
rows depend on the answering chip. The VME path is: request, address phase,
AS*, DS*, slave answer, two synchroniser flops, then the result. `done` is
reported as soon as the data are latched. The controller waits for DTACK* to be
released before it starts the next cycle.

### VME side

`vme_master` runs single A24/A32, D16/D32 cycles and D16 interrupt-acknowledge
cycles. There are no block transfers. Address modifiers are the standard
non-privileged data codes, 0x39 and 0x09. A D16 cycle drives A1 from the
address, and data travel on D15..D0. A slave that gives neither DTACK* nor
BERR* within `VME_TIMEOUT` clocks (default 255, 6.4 µs) produces a timeout
response. That response is the host's sign that the slave's VME CPLD has lost
its configuration. inhibitVME blocks all VME cycles, interrupt acknowledges
included. When interrupts are enabled and the bus is free, the SPE
acknowledges the highest active IRQ level and forwards the status ID.

### JTAG side

JTAG is not generated here. The eTBC, a separate chip, masters the TAP, and
addressable scan ports on every module connect it to one module's CPLD when
that module's N-line is high. The PPE drives the 21 N-lines (`n_lines[21:1]`,
at most one high) and the eTBC's 8-bit host bus (`etbc_a[2:0]`, `etbc_rw`,
data, `etbc_strb_n`, `etbc_rdy_n`, `etbc_rst_n`). The bus handshake works as
follows:

1. The address, R/W and data are driven one clock before STRB* falls.
2. STRB* stays low until the synchronised RDY* is seen.
3. The access ends when RDY* is released.

No RDY* within `ETBC_TIMEOUT` clocks gives an error response. This handshake is
a generic one chosen for this design; check it against the eTBC data sheet
before using it with the real part.

## The CCI

`rtl/cci_top.sv` contains a VME slave with interrupter (`cci_vme_slave`), the
register file (`cci_regs`), and the same G-LINK framer, deframer and link
builder as the HSC. Registers are 32-bit. A D32 cycle moves a whole register.
A D16 cycle moves bits 31:16 when A1 is 0 and bits 15:0 when A1 is 1. The
default base address is 0x0080_0000 (A24 AM 0x39/0x3D, or A32 AM 0x09/0x0D),
with a 256-byte window.

| Offset | Register | Contents |
|---|---|---|
| 0x00 | CSR | [0] interrupt enable, [1] busy (ro), [2] link up (ro), [3] interrupt pending (ro, write 1 clears), [6:4] CCI IRQ level (default 1) |
| 0x04 | INSTR_CTRL | [13:0] control word; writing bits 15:0 sends the instruction |
| 0x08 | INSTR_DATA | 32 bits sent as the two data words of setVMEA/setVMED |
| 0x0C | RESP_CTRL | [13:0] last response control word, [31] update bit |
| 0x10 | RESP_DATA | 32-bit data of the last response |
| 0x14 | INT_INFO | [15:0] status ID, [18:16] remote IRQ level, [31] valid (cleared by reading) |
| 0x18 | LINK | [7:0] link-build attempts, [15:8] framing errors |

Driver sequence for one instruction:

1. Write INSTR_DATA if the instruction needs data.
2. Write INSTR_CTRL. This sends the instruction and clears the update bit.
3. Poll RESP_CTRL until bit 31 is set.
4. Read RESP_DATA if operand bit 8 is set.

A response that never comes means the SPE (for VME instructions) or the link
has failed. The CCI does not time this out; that is up to the host.

When an unprompted interruptVME message arrives, the CCI stores the level and
status ID in INT_INFO. If its own interrupt enable is set, it raises IRQ* at
the level in the CSR. It answers the local host's acknowledge at that level
with the forwarded status ID and then releases IRQ* (release on acknowledge).
Interrupt handling is switched separately at the two ends, both with
enableInterrupt. With operand bit 1 clear the instruction goes to the HSC.
With bit 1 set the CCI keeps it: it sets its own enable to operand bit 0 and
answers at once in the response register, update bit set, without using the
link. CSR bit 0 is the same enable and can also be written directly.

## Building the link

The G-LINK receivers do not always lock at power-on, because transmitter and
receiver run from slightly different clocks. On each end, `glink_link_init`
works as follows:

1. It pulses the receiver's input-sampler reset.
2. It waits for `rx_ready` with no `rx_error` for `LOCK_CYCLES` clocks
   (default 16).
3. If that does not happen within `RETRY_CYCLES` (default 1024), it resets the
   sampler again.
4. If a built link drops, it is rebuilt the same way.

Words received while the link is down are ignored.

## Where this departs from, or adds to, the system it follows

* The control-word bit layout, operands, status bits, register map, base
  address, timeouts and link-builder counts are this design's own choices.
* The reference material lists idle both as handled by the CCI and as answered
  by the PPE in 5 clocks. Here the PPE answers it with a status word.
* enableInterrupt for the CCI is answered by the CCI itself (operand bit 1
  set), so it never reaches the HSC.
* interruptVME sent *by the host* returns the remote IRQ lines. This query is
  an addition.
* The eTBC host-bus handshake and the 16-bit interrupt status ID are assumed.
* VME bus arbitration is not implemented. The HSC is assumed to be the only
  master of its crate.
* VME tri-state lines appear as separate in, out and output-enable vectors.

Not in the RTL, because they are purchased parts or not logic: the G-LINK
transmitter/receiver chips, optical transceivers, the 40 MHz oscillators, the
eTBC and the addressable scan ports, the controlled HPT/SSW modules and the
local host with its PCI-VME adapter. `rcs_top` brings out the pins where they
connect.

## Throughput

Each instruction costs one link round trip, the HSC response time and the
host's polling. In the end-to-end simulation the links have 500 ns of latency
each way, about 90 m of fibre plus the chips. One 32-bit write plus read-back
(setVMEA, setVMED, configVME write, setVMEA, configVME read, each polled)
takes about 10.8 µs. That is roughly 0.4 MB/s of written-and-verified
configuration data with this simple driver. It is the same order as the 1 MB/s that the
original system was estimated to give. Loading or reading back 18 MB of FPGA
configuration per crate then takes tens of seconds, which easily fits a
polling scheme for upsets that arrive at a few per hour. The host's own VME
access time is not modelled, so treat this figure as an upper bound.

## Files

| File | Contents |
|---|---|
| `rtl/rcs_pkg.sv` | message type, opcodes, control-word helpers |
| `rtl/rcs_top.sv` | top: CCI and HSC, G-LINK pins, both VME buses, JTAG controls as ports |
| `rtl/hsc_top.sv`, `hsc_ppe.sv`, `hsc_spe.sv`, `vme_master.sv` | remote controller |
| `rtl/cci_top.sv`, `cci_regs.sv`, `cci_vme_slave.sv` | local interface |
| `rtl/glink_tx_framer.sv`, `glink_rx_deframer.sv`, `glink_link_init.sv` | link side, used by both |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/vme_slave_model.sv`, `etbc_model.sv`, `glink_link_model.sv` | behavioural models of the parts outside the RTL |

All modules use one clock and an asynchronous active-low reset. Parameter
defaults are the values described above.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It also
has a watchdog. To run the end-to-end test, which uses the top at its default
parameters and finishes in well under a second:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/rcs_pkg.sv tb/tb_rcs_top.sv --top-module tb_rcs_top -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_*.sv` to test one module.

`tb_rcs_top` covers the following:

* link build with retries
* A32/D32 and A24/D16 writes and reads
* 1000 random write/read-back cycles (N_RW in the testbench)
* an upset configuration word found by polling and rewritten
* a timeout followed by JTAG recovery (N-line select, eTBC write and read)
* a bus error and inhibitVME
* a remote interrupt delivered to the local host with its status ID
* resetHSC
* the four response times in the table above

It counts each of these and fails if any never happened. `tb_hsc_top` checks
the same response times on the HSC alone.
