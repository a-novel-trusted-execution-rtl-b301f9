# BA51-H virtualization hardware: a two-stage SPMP for an MMU-less RISC-V MCU

Microcontrollers have no MMU, so they cannot isolate software the way
application processors do, with page tables. The BA51-H approach is to build a
trusted execution environment (TEE) out of virtualization instead. A small
static-partitioning hypervisor runs in HS-mode. Each RTOS and its tasks run as
a virtual machine in VS/VU-mode. All isolation comes from physical memory
protection tables rather than address translation: no memory is translated,
and every access is checked against regions.

This repository holds synthesizable SystemVerilog for that hardware layer
around the RISC-V core:

- **MPU**: the M-mode **PMP** (with the enhanced-PMP lockdown rules), the
  hypervisor's **unified SPMP** (second
  stage) and each guest's **vSPMP** (first stage), checked together on the
  instruction and data paths in the same cycle;
- **CSR decode** for those tables and the supervisor timers, with VS-mode
  accesses steered to the guest's own copies;
- **Sstc** supervisor and guest timers, a **CLINT**, and an **APLIC** with a
  machine domain and a delegated supervisor domain (8 sources);
- **trap routing** of the hypervisor extension: M, HS or VS;
- a **64 KiB SRAM**;
- eight **debug triggers** on the fetch and data ports.

The processor pipeline itself (a 2-stage RV32 core) is not included. The top
level exposes the ports a core would connect to.

Default sizes follow the BA51-H feature-rich configuration:

| Item | Size |
|------|------|
| PMP | 16 entries |
| unified SPMP | 16 entries |
| APLIC | 8 interrupt sources |
| debug triggers | 8 |
| SRAM | 64 KiB |

The vSPMP size is not published; it is set to 16 here.

## Privilege modes and who checks what

The hart's state is `{V, PRV}` (`ba51h_pkg::mode_t`). This gives five modes:

| Mode | V | PRV | Typical software |
|------|---|-----|------------------|
| M  | 0 | M | firmware |
| HS | 0 | S | hypervisor |
| HU | 0 | U | bare-metal partition / hypervisor user tasks |
| VS | 1 | S | guest RTOS |
| VU | 1 | U | guest tasks |

Each access is checked by three tables. An access is allowed only if all three
allow it.

| Mode | vSPMP (stage 1, guest's) | SPMP (stage 2, hypervisor's) | PMP (firmware's) |
|------|--------------------------|------------------------------|------------------|
| M  | not checked | not checked | only locked entries apply (MML: see the PMP) |
| HS | not checked | as **supervisor** | entry must match and allow |
| HU | not checked | as user | entry must match and allow |
| VS | as **supervisor** | as **user** | entry must match and allow |
| VU | as user | as user | entry must match and allow |

The key idea of the *unified* model is the SPMP column. There is a single
second-stage table. Inside it, everything a guest does, kernel or task, looks
like a user-mode access. The hypervisor therefore confines a VM with ordinary
user-rule entries, and it does not have to split its entries between a
"host" table and a "guest" table. The guest, in turn, separates its own
kernel from its tasks in the vSPMP. There, VS counts as supervisor.

When an access is refused, the MPU reports:

- the access-fault cause: 1 for a fetch, 5 for a load, 7 for a store;
- which stage refused. Stage 1 takes precedence, then stage 2, then the PMP.

The stage lets the hypervisor tell a guest's own violation from a breach of
isolation.

## The SPMP table (`spmp.sv`)

One module serves both stages. Parameters choose the role:

- `VIRTUAL=0, HAS_SWITCH=1` is the hypervisor's unified SPMP;
- `VIRTUAL=1, HAS_SWITCH=0` is the vSPMP.

**Entries.** Each entry has a configuration byte and an address register.

The configuration byte uses the PMP layout:

| Bits | Field |
|------|-------|
| 0 | R |
| 1 | W |
| 2 | X |
| 4:3 | A (address mode) |
| 7 | S (mode bit) |

The A field takes the PMP values: OFF, TOR, NA4 and NAPOT.

The address register holds physical address bits 33:2, as in the PMP.
`region_match.sv` does the address matching for all three tables:

- TOR takes the previous entry's address as its base;
- NAPOT encodes the region size in the number of trailing ones.

**Rules.** The lowest-numbered *active* entry that matches decides:

| Entry | Supervisor access | User access |
|-------|-------------------|-------------|
| S = 1 | its R/W/X | refused |
| S = 0 | refused | its R/W/X |
| shared encoding (below) | per table | per table |
| no match | allowed | refused |

A few S/R/W/X combinations are of no use as a one-sided rule. W without R is
reserved, and an S=1 RWX rule would let the hypervisor run writable code.
These combinations encode regions shared by both sides instead:

| S R W X | Supervisor | User |
|---------|------------|------|
| 0 0 1 0 | RW | R |
| 0 0 1 1 | RW | RW |
| 1 0 1 0 | X | X |
| 1 0 1 1 | RX | X |
| 1 1 1 1 | R | R |

This is the same table as the enhanced PMP's MML mode, with S in the place of
L. It is deliberately limited. For instance, no entry gives the hypervisor RW
and a guest RWX. A region needing such a mix is entered twice, once with each
mode bit, and only the copy for the running side is switched on. In the
unified SPMP a guest, whether VS or VU, always gets the user column.

**Switch.** The unified SPMP has a switch register: one enable bit per entry
(`spmpswitch`, CSR 0x170; 0x171 would hold entries 32 to 63). An entry takes
part in matching only if its A field is not OFF and its switch bit is 1. This
is the context-switch aid. The hypervisor can keep every VM's regions
programmed and move between VMs with one CSR write. The same mechanism lets
it turn the guest regions off while it runs itself, and turn its own regions
off while a guest runs.

The vSPMP has no switch. Its entries are rewritten by the hypervisor on a VM
switch. The switch resets to all zeros, so no SPMP entry is active after
reset.

Example: the end-to-end testbench uses this layout.

| Entry | Region | Rule |
|-------|--------|------|
| e0 | 0x0000-0x3FFF | S, RW (hypervisor) |
| e1 | 0x4000-0x7FFF | U, RWX (guest A) |
| e2 | 0x8000-0xBFFF | U, RWX (guest B) |
| e3 | 0x0000_0000-0x0FFF_FFFF | S, RW (hypervisor's view of everything) |
| e4 | 0xC000-0xCFFF | shared data: hypervisor RW, guest R |

The switch values are:

- 0b11001 while the hypervisor runs;
- 0b10010 while guest A runs;
- 0b00100 while guest B runs.

With guest A running, it can reach only 0x4000-0x7FFF, plus the shared page
for reading. Inside that range, its
vSPMP decides what its kernel and its tasks may do.

## The PMP (`pmp.sv`)

The PMP follows the standard RISC-V PMP:

- 16 entries;
- a lock bit L (bit 7);
- the lowest matching entry wins;
- S/U accesses are refused when no entry matches;
- M-mode accesses are checked only against locked entries.

A locked entry ignores writes to its configuration. It also ignores writes to
its address register. When it is a TOR entry, it protects the address register
of the entry below it too.

**Enhanced PMP.** The firmware's protection is an enhanced PMP (ePMP), so the
RISC-V Smepmp rules are built in (parameter `SMEPMP`, default 1). They are
controlled by `mseccfg` (CSR 0x747), which resets to 0 and then leaves the
plain PMP behaviour described above:

| Bit | Name | Effect |
|-----|------|--------|
| 0 | MML | Machine-mode lockdown; sticky, cleared only by reset |
| 1 | MMWP | M-mode accesses that match no entry are refused; sticky |
| 2 | RLB | Locked entries may be rewritten; can be set only while no entry is locked |

With MML set, L no longer means "also applies to M". It selects whom a rule
serves:

- L=1 rules serve M-mode only;
- L=0 rules serve S/U only;
- W without R (reserved in the plain PMP) and L with RWX become shared
  regions.

| L R W X | M-mode | S/U-mode |
|---------|--------|----------|
| 0 0 0 0 / 1 0 0 0 | none | none |
| 0 0 0 1, 0 1 0 0, 0 1 0 1, 0 1 1 0, 0 1 1 1 | none | as the R W X bits |
| 0 0 1 0 | RW | R |
| 0 0 1 1 | RW | RW |
| 1 0 0 1, 1 1 0 0, 1 1 0 1, 1 1 1 0 | as the R W X bits | none |
| 1 0 1 0 | X | X |
| 1 0 1 1 | RX | X |
| 1 1 1 1 | R | R |

Under MML, M-mode may not execute from memory that matches no entry. Unless
RLB is set, a write that would create a new locked executable rule (LRWX 1001,
1010, 1011 or 1101) is ignored, so the firmware cannot add code for itself
once it has locked down.

## CSR map (`tee_csr_file.sv`)

| CSR | Register | Who may access |
|-----|----------|----------------|
| 0x3A0-0x3A3 / 0x3B0-0x3BF | pmpcfg0-3 / pmpaddr0-15 | M |
| 0x747 / 0x757 | mseccfg / mseccfgh (reads 0) | M |
| 0x7A0-0x7A4 | tselect, tdata1, tdata2, tdata3 (reads 0), tinfo | M |
| 0x1A0-0x1A3 / 0x1B0-0x1BF | spmpcfg0-3 / spmpaddr0-15 | M, HS; **VS reaches the vSPMP** |
| 0x170 / 0x171 | spmpswitch (low / high) | M, HS (illegal in VS) |
| 0x2A0-0x2A3 / 0x2B0-0x2BF | vspmpcfg0-3 / vspmpaddr0-15 | M, HS |
| 0x14D / 0x15D | stimecmp(h) | M; HS with menvcfg.STCE; **VS reaches vstimecmp** with both STCE bits |
| 0x24D / 0x25D | vstimecmp(h) | M; HS with menvcfg.STCE |
| 0x605 / 0x615 | htimedelta(h) | M, HS |
| 0xC01 / 0xC81 | time(h), read-only; **V-mode reads time + htimedelta** | M; below M with mcounteren.TM, plus hcounteren.TM in V-mode and scounteren.TM in U/VU |

A guest RTOS therefore programs "its SPMP" and "its timer" with the ordinary
supervisor CSR numbers, unaware that it is virtualized.

The PMP and timer numbers are the standard RISC-V ones. The SPMP, switch and
vSPMP numbers are this design's choice, following the RISC-V pattern: S-level
registers at 0x1xx, VS-level registers at 0x2xx.

A refused access raises `csr_illegal` and writes nothing. Accesses by HU and
VU are always refused.

## Timers, interrupts and traps

**CLINT** (`clint.sv`). A 64-bit `mtime` counts `time_tick` pulses. MTIP is
high while `mtime >= mtimecmp`, and MSIP is a register bit. The offsets are
0x0000 (msip), 0x4000 (mtimecmp) and 0xBFF8 (mtime).

**Sstc** (`sstc_timer.sv`).

- STIP is high while `mtime >= stimecmp`.
- VSTIP is high while `mtime + htimedelta >= vstimecmp`.

A guest can therefore run its own tick without trapping to the hypervisor.
The same block answers reads of the `time` counter. A read from V-mode gets
`mtime + htimedelta`, so the time a guest reads is the time its timer
compares against.

**APLIC** (`aplic.sv`, `aplic_domain.sv`). This is a reduced RISC-V AIA APLIC
with direct delivery to one hart. Sources 1 to 8 enter the machine domain.

- Firmware may delegate a source (sourcecfg.D). It then belongs to the
  supervisor domain at `+0x8000`, which drives SEIP, and the hypervisor
  handles it without M-mode.
- Source modes: inactive, detached, rising or falling edge, high or low level.
- Per-source enables and priorities (lower is more urgent).
- A threshold, `topi`, and `claimi`. Reading `claimi` clears an edge source's
  pending bit.

The register offsets are the AIA ones.

**Trap routing** (`hyp_trap_router.sv`). This block is combinational.

An interrupt is handled at one of three levels:

| Level | Condition | Taken when |
|-------|-----------|------------|
| M | not delegated | below M, or in M with MIE set |
| HS | delegated by `mideleg` only | V=1, or HU, or HS with SIE set |
| VS | delegated by `mideleg` and `hideleg` | V=1, and VU or VS with vsstatus.SIE set |

The highest level wins. Within a level the order is MEI, MSI, MTI, SEI, SSI,
STI, VSEI, VSSI, VSTI. VS-level causes are renumbered to their supervisor
numbers (10→9, 6→5, 2→1).

Exceptions go to M unless `medeleg` delegates them from a lower mode. A
delegated exception goes to VS if it came from V-mode and `hedeleg` is set.
Otherwise it goes to HS. An interrupt is preferred over a simultaneous
exception.

**Interrupt latency.** The BA51 core is specified to issue the first handler
instruction 4 clock cycles after an external interrupt line rises. This
hardware uses one of them. The APLIC registers the line into its pending
bit at the next clock edge. From there, the EIP bit, the trap router and
the `trap` output are combinational. The end-to-end testbench checks this
one-clock path for a level source and an edge source.

## Debug triggers (`trigger_unit.sv`)

Eight address triggers watch the fetch and data ports. They use the RISC-V
debug specification's type 6 (`mcontrol6`) layout. That layout has enable
bits for the two virtual modes as well as for M, S and U, so firmware can
set a breakpoint that fires only inside a guest.

Each trigger compares the access address with `tdata2`. It can test for
equal (match 0), greater-or-equal (match 2) or less-than (match 3). It
fires when that comparison holds and both the access type (execute, load or
store) and the current mode are enabled. The access is then not performed.
It returns as a fault with cause 3 (breakpoint) and no protection stage,
which takes precedence over any protection fault. The trigger's `hit0` bit
is set.

Only M-mode reaches the registers: `tselect` (0x7A0), `tdata1` (0x7A1),
`tdata2` (0x7A2) and `tinfo` (0x7A4); `tdata3` reads as zero. There is no
debug mode, no chaining and no data matching. Action 0 (breakpoint
exception) is the only action. A match value other than 0, 2 or 3 reads
back as 0.

## Top level (`ba51h_tee_hw.sv`)

The top level has these ports:

- **Core side.** The current `mode`. A fetch port (`if_*`) and a data port
  (`d_*`, with byte enables). A CSR port (`csr_*`). Plus the core-CSR state
  that timers and trap routing need: `mie`, `mideleg`, `hideleg`, `medeleg`,
  `hedeleg`, the three global enables, the STCE bits, the counter-enable TM
  bits, and the software- and hypervisor-injected `ssip`, `vssip`, `vseip`.
- **Platform side.** `time_tick` and `irq_src[8:1]`.
- **External bus.** Requests that passed the MPU and are not for on-chip
  targets leave on `ext_i_*` and `ext_d_*`. When no request is made there,
  address, data and byte enables read as zero. A refused access therefore
  shows nothing on the bus.
- **Outputs.** `mip` and the trap decision (`trap`, `trap_is_irq`,
  `trap_cause`, `trap_target`).

Timing:

- A fetch or data request is one cycle long and is checked combinationally in
  that cycle.
- `*_rvalid`, `*_rdata`, `*_fault` and `*_fstage` appear on the next clock.
  The external bus must also return read data on that clock.
- Refused accesses never reach SRAM, the peripherals or the external bus.
- A fault recorded in the response cycle drives the trap outputs in that same
  cycle, as a load, store or fetch access fault. A data fault is reported
  ahead of a fetch fault.
- CSR reads are combinational. CSR writes take effect at the clock edge.
- Reset is asynchronous and active low.

Address map (this design's choice):

| Range | Target |
|-------|--------|
| 0x0000_0000-0x0000_FFFF | SRAM (fetch and data) |
| 0x0200_0000-0x0200_FFFF | CLINT |
| 0x0C00_0000 | APLIC machine domain |
| 0x0C00_8000 | APLIC supervisor domain |
| anything else | external bus |

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

With plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ba51h_pkg.sv rtl/mpu_csr_if.sv \
          tb/tb_ba51h_tee_hw.sv --top-module tb_ba51h_tee_hw -Mdir obj -o sim
./obj/sim
```

Use the same command with `tb/tb_<block>.sv` and `--top-module tb_<block>` for
the block testbenches:

| Testbench | What it covers |
|-----------|----------------|
| `tb_pmp` | PMP |
| `tb_spmp` | both SPMP roles |
| `tb_mpu` | stage combination and precedence |
| `tb_tee_csr_file` | CSR decode and VS redirection |
| `tb_clint` | CLINT |
| `tb_sstc_timer` | Sstc timers |
| `tb_aplic` | APLIC |
| `tb_hyp_trap_router` | trap routing |
| `tb_sram` | SRAM |
| `tb_trigger_unit` | debug triggers |

`tb_ba51h_tee_hw` runs the whole hardware at its default sizes. It plays a
firmware/hypervisor/two-guest scenario:

1. Firmware sets up the PMP.
2. The hypervisor lays out the SPMP and loads the guest images.
3. A guest programs its vSPMP through the redirected CSRs.
4. The guest is stopped by stage 1 and by stage 2. It can read a page the
   hypervisor shares with it, but cannot write to it.
5. The guest timer interrupts the guest directly.
6. The hypervisor switches VMs.
7. The PMP stops the hypervisor itself.
8. APLIC interrupts go to HS (delegated) and to M (kept).
9. The CLINT timer interrupts M.
10. M reaches the external bus, and a refused access leaves the bus idle.
11. A debug trigger turns an M-mode load into a breakpoint.
12. The firmware sets MML. After that, its own fetch and load from the
    supervisor's SRAM are refused.

The testbench counts each of these mechanisms and fails if one never
happens. It finishes in well under a second.

## Where this RTL stands relative to the published BA51-H

These parts follow the published design:

- the unified dual-stage SPMP: a guest-controlled first stage, a
  hypervisor-controlled second stage, and VS/VU treated as user accesses in
  the second stage;
- the per-entry S/U mode bit;
- the bit-wise entry switch, and no switch for the vSPMP;
- the 16-entry PMP and SPMP;
- Sstc and an APLIC with 8 sources and interrupt delegation;
- 64 KiB of SRAM.

These are standard RISC-V behaviour that the published design names but does
not detail:

- PMP matching and locking;
- the Smepmp rules (`mseccfg`), taken as the meaning of the firmware's "ePMP";
- Sstc registers, the time counter and the hypervisor timer offset;
- APLIC registers;
- hypervisor trap delegation;
- the trigger registers (the published design gives only their number,
  eight).

These are this design's own choices:

- the S-bit position;
- the SPMP/vSPMP CSR numbers;
- the VS redirection of the SPMP CSRs;
- the vSPMP size;
- the SPMP's shared-region encodings (the RISC-V SPMP/ePMP table) and the
  absence of a SUM-style override;
- the fault-stage report and its precedence;
- the address map and bus timing;
- the two-domain APLIC layout;
- all reset values.

Not included:

- the core pipeline, register file and decoder, and the core's own CSRs and
  exception manager;
- the debug unit, power management, VIC/PIC;
- the AXI4/QMEM protocol bridges (plain request ports stand in for them);
- trace and the memory debugger;
- APLIC MSI delivery;
- accesses that straddle a region boundary: checks are made on the word
  address only.

Gate counts are not comparable with published area figures. Synthesis of this
RTL gives generic cells for the protection hardware only, not the gates of a
full core.

## Files

| File | Contents |
|------|----------|
| `rtl/ba51h_pkg.sv` | mode, access, entry and trap types; cause and interrupt numbers |
| `rtl/mpu_csr_if.sv` | register bundle shared by the three protection tables |
| `rtl/region_match.sv` | TOR/NA4/NAPOT address match |
| `rtl/pmp.sv` | PMP |
| `rtl/spmp.sv` | SPMP (both roles) |
| `rtl/mpu.sv` | the three tables combined |
| `rtl/tee_csr_file.sv` | CSR decode |
| `rtl/clint.sv` | CLINT |
| `rtl/sstc_timer.sv` | Sstc timers |
| `rtl/aplic.sv`, `rtl/aplic_domain.sv` | APLIC |
| `rtl/hyp_trap_router.sv` | trap routing |
| `rtl/sram.sv` | SRAM |
| `rtl/trigger_unit.sv` | debug triggers |
| `rtl/ba51h_tee_hw.sv` | top |
| `tb/tb_*.sv` | testbenches |
