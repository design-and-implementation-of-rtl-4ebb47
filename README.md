# Logic BIST subsystem with eight self-testing partitions

A safety-critical SoC has to prove at every power-up that its digital logic
still works before it starts its application. Logic built-in self-test (LBIST)
does this without a tester: a pseudo-random pattern generator (PRPG) fills the
scan chains of the logic under test, one or more at-speed capture clocks let the
logic respond, and a multiple-input signature register (MISR) folds everything
shifted out into a 64-bit signature. After a few hundred patterns that signature
is compared with a stored good value. One bad bit anywhere changes it.

This RTL implements such a subsystem for a device split into eight
independently tested partitions, A0, A1, B0, B1, C0, C1, P0 and P1. Each
partition sits in its own *LBIST island* with its own controller, clock gating
and reset control. A self-test control unit (STCU) runs the islands at start-up
and decides whether the device may enter functional mode. A JTAG test control
unit (TCU) gives debug access to every controller. The logic under test is a
synthetic scan netlist, the *dummy netlist*. It has the chain count, chain
length, clock domains and resets of the real partition. This lets the whole
start-up flow be simulated at RT level against signatures computed for that
netlist, long before the real netlist exists.

## Partitions

| Partition | Scan flops | LBIST chains | Chain length | PRPG bits | Clock domains |
|-----------|-----------:|-------------:|-------------:|----------:|---------------|
| A0 | 77K | 1600 | 49 | 46 | system, tck |
| A1 | 60K | 1100 | 55 | 36 | system, tck |
| B0 | 24K |  500 | 48 | 24 | system, tck |
| B1 | 60K | 1100 | 55 | 36 | system, tck |
| C0 | 45K | 1000 | 45 | 34 | system, tck |
| C1 | 60K | 1100 | 55 | 36 | system, tck |
| P0 | 26K |  600 | 44 | 26 | system, tck |
| P1 | 60K | 1100 | 55 | 36 | system, tck |

The chain length is derived: ceil(flops / chains). The 10 % chain overhead of
the source is not modelled. Every island adds eight observation flops in front
of its last chain (see *X-bounding*), so the controller shifts
chain length + 8 cycles per pattern. The tables live in `lbist_pkg`
(`PART_SIZE_K`, `PART_CHAINS`, `PART_PRPG_W`, `chain_len()`).

## Block structure

```
lbist_top
 ├─ lbist_tcu            JTAG TAP, LTDR, controller register access
 ├─ lbist_stcu           start-up sequencer, NVM signature compare, TCU/STCU mux
 ├─ lbist_misr_mux       32-bit MISR word to the pads
 └─ lbist_island  x8
     ├─ lbist_controller
     │   ├─ lbist_serial_if        JTAG-like register access (dselect + data)
     │   ├─ lbist_co_clock_control shift/capture enables
     │   │   └─ lbist_slow_clk_gen programmable slow clock (enable tick)
     │   ├─ lbist_prpg + lbist_phase_shifter
     │   ├─ lbist_mask_decoder
     │   ├─ lbist_cc_concat        lockups, masking, production scan concat
     │   └─ lbist_scan_monitor     space compactor + lbist_misr
     ├─ lbist_clock_control   combines shift and capture enables
     ├─ lbist_cgl_control     selects functional / LBIST / scan-mode enables
     ├─ lbist_cgl_lake        latch-based clock gates, one per domain
     ├─ lbist_reset_control   23 active-low + 2 active-high partition resets
     ├─ lbist_xbound          input isolation muxes
     ├─ lbist_interface_dummy XOR observation flops
     └─ lbist_dummy_netlist   the logic under test
```

## One LBIST run

A controller is configured through its serial interface and started by a
rising `bist_run`. `bist_run` passes a two-flop synchroniser into the
`bist_clk` domain. Then, for pattern counter values `pc_start` to `pc_end`:

1. **Shift.** `SHIFT_LEN` slow-clock ticks. The slow clock is not a clock. It
   is a one-cycle enable produced every `SHIFT_DIV` `bist_clk` cycles by
   `lbist_slow_clk_gen`, so every LBIST flop runs on `bist_clk` and timing
   stays single-clock. On each tick the PRPG steps, the phase shifter feeds one
   new bit into every chain, and the MISR absorbs the bits that fall out. The
   MISR does not compact the very first shift, because the chains hold no
   response yet.
2. **Capture.** An eight-cycle window at full `bist_clk` rate. Each clock
   domain has an 8-bit pulse string in the `CAP_PULSE` register. The leftmost
   bit is the first cycle, and a 1 gives that domain a capture clock in that
   cycle. The defaults are `1000_0000` (system domain) and `0010_0000` (tck
   domain), so the two domains capture one after the other and never race.

After the last capture, one more shift unloads the final responses into the
MISR. Then `bist_done` rises and `misr_value` holds the signature. For N
patterns, a shift length L and a divider D, a run takes exactly

    3 + (N + 1) * L * D + N * 8   bist_clk cycles from bist_run to bist_done,

which the controller testbench checks.

The PRPG is a Fibonacci LFSR with the partition's length. At the start of a
run it loads the seed register (default 1), and a seed of zero becomes 1. The 64-bit MISR is the same LFSR with the
parallel inputs XORed in. Taps are maximum-length polynomials chosen per width
(`lbist_pkg::lfsr_taps`). The phase shifter gives chain `c` the XOR of two or
three PRPG bits: `c mod w`, a second bit offset by `1 + (c / w) mod (w-1)`,
and a third one half a register away (`lbist_pkg::ps_tap`). This keeps
neighbouring chains decorrelated. The space compactor XORs chain `c` into MISR
input `c mod 64`.

## Clocking: enables, clock gates and lockups

No clock is generated by the controller. Shift and capture are *enables*.
`lbist_clock_control` ORs them per domain, and `lbist_cgl_control` picks
between three sources: functional clock enables, LBIST enables when `lbist_en`
is high, and the TCU's enables in production scan mode. Scan mode has top
priority. `lbist_cgl_lake` turns each enable into a gated clock with a latch
that is transparent while the clock is low, followed by an AND gate. This
produces clean pulses rather than a 50 % clock. `cg_bypass` and
`se_gatedclk` force the gates open for scan.

Every LBIST chain starts and ends with a rising-edge flop. Falling-edge lockup
flops sit between the PRPG/phase shifter and the chains, and between the chains
and the compactor. With them, the partition's domains may differ in clock skew
by up to half a cycle without hold problems. Scan enable and `lbist_en` are
launched on the falling edge for the same reason.

## Registers of a controller

The serial interface works like a JTAG data register pair on `bist_tck`:

- With `reg_sel = 1`, the 4-bit `dselect` register is shifted and updated. It
  chooses the register behind the data path.
- With `reg_sel = 0`, the 64-bit data register is shifted. Capture loads it
  from the selected register, and update writes it back.

Bits go in and out LSB first.

| dselect | Register | Access | Default |
|---------|----------|--------|---------|
| 0001 | PRPG seed | rw | 1 |
| 0010 | MISR start value | rw | 0 |
| 0011 | shift length | rw | chain length + 8 |
| 0100 | shift divider | rw | 8 |
| 0101 | pattern count start | rw | 0 |
| 0110 | pattern count end | rw | `PC_END_DEFAULT` (255) |
| 0111 | capture pulse strings, 8 bits per domain | rw | `80`, `20` |
| 1000 | MISR value | r | |
| 1001 | status: pattern counter, done | r | |

The configuration is treated as static while a run is in progress. It is
written on `bist_tck` and read on `bist_clk` without synchronisers.

## Scan chain masking

A chain that captures unknown values would corrupt the signature, so any one
chain can be masked. `mask_config[0]` enables the mask, and `mask_config[16:1]`
is the chain index. `mask_config = 1` therefore masks chain 0. A masked chain
is fed constant 1 instead of PRPG data and is left out of the compactor.

## JTAG access and direct mode

`lbist_tcu` is an IEEE 1149.1 TAP with a 6-bit instruction register:

| IR | Data register |
|----|---------------|
| 6'd4 | LTDR, the LBIST test data register (86 bits in the scan path) |
| 6'd5 | pass-through to the selected controllers' serial interface |
| others | 1-bit bypass |

LTDR scan path, LSB first: `testmode`, `direct_control`, `sel[7:0]` (one bit
per controller), `run`, `reg_sel`, `misr_word_sel`, `mask_config[63:0]`, and
then eight read-only done flags that Capture-DR loads. The LTDR is cleared in
Test-Logic-Reset.

A debug session in direct mode runs as follows:

1. Write the LTDR with `testmode = direct_control = 1` and the wanted `sel`
   bits. The STCU hands the controllers' run, select and serial lines to the
   TCU.
2. For each register:
   - Write the LTDR with `reg_sel = 1`, then use IR 5 to shift in the 4-bit
     address.
   - Write the LTDR with `reg_sel = 0`, then use IR 5 to shift the 64-bit
     value in or out.
3. Write the LTDR with `run = 1`.
4. Poll the done flags through the LTDR.
5. Read the MISR through IR 5 (address 1000), or on the pads. `misr_pad` shows
   `MISR[31:0]` with `misr_word_sel = 0` and `MISR[63:32]` with 1, taken from
   the lowest-numbered selected controller.

## Start-up self-test (STCU)

`lbist_stcu` runs on `tck` once `stcu_start` rises. The steps are:

1. **Configure.** For each enabled partition p, read NVM word `8 + p` (the
   pattern count end) and write it to controller p through the shared serial
   bus, with dselect `0110` and then the data register.
2. **Run.** Start the controllers all at once (`stcu_parallel = 1`), or one
   after another in index order. Each time, wait for `bist_done`, which is
   synchronised into `tck`.
3. **Judge.** Compare each MISR with NVM word `p`, and set `fail_map[p]` on a
   mismatch.
4. **Report.** Raise `stcu_done` with `lbist_pass`, and then either
   `functional_mode` or `safe_state`.

The NVM read port (`nvm_rd`, `nvm_addr`, and `nvm_rdata` valid one cycle
later) is brought out of the top.

## Resets

All 23 active-low and 2 active-high resets of a partition pass through
`lbist_reset_control`:

- **Scan mode:** every reset follows `scan_rst_n`, so no functional glitch
  reaches the scan flops.
- **LBIST running (`lbist_en`):** functional resets are held inactive, because
  a reset in the middle of a run would make the signature meaningless. The
  system reset still gets through, so LBIST can never block a device reset.
- **Otherwise:** each reset is the functional reset combined with `sys_rst_n`.

## X-bounding and the interface dummy

During LBIST, the partition inputs come from outside logic that is not
controlled by the test, so they are unknown. `lbist_xbound` replaces each input
while `lbist_en` is high. Instead of a constant, it uses a flop of
`lbist_interface_dummy`. Each of its eight flops captures the XOR of a group of
partition outputs (flop j takes outputs j, j+8, ...). The inputs then toggle,
and the outputs are observed. The eight flops are a scan segment in front of
the partition's last chain, so their content reaches the MISR.

## Production scan

With `scan_mode = 1`, the controller joins four consecutive LBIST chains into
one production chain. The first chain of each group takes `prod_scan_in`. Each
following chain takes the previous chain's output through one falling-edge
lockup. The last chain's output is `prod_scan_out`. The clocks come from the
TCU enables and the resets from `scan_rst_n`. The top has one production chain
per four LBIST chains: up to 400 per island, with unused positions tied off.

## The dummy netlist

`lbist_dummy_netlist` has the partition's chain count and length, its clock
domains and its resets. Chain `c` runs on domain `c mod 2` and is reset by
reset `c mod 23` / `c mod 2`.

- **Shift:** the chains shift.
- **Capture:** each chain takes its own rotated content XOR (rotated content
  AND NOT another chain), plus a partition input at bit 0.
- **Outputs:** each is the XOR of bits of two chains.

The logic is chosen only to make the signature depend on every flop, every
input and the capture order of the domains. The testbench package
`tb_lbist_model_pkg` recomputes the signature of an island independently of the
RTL.

## Parameters

`lbist_top` has no parameters that need setting: the partition sizes come from
the package. For quick simulation, `CHAINS_OVR` and `LEN_OVR` replace every
island's chain count and length. Other parameters:

- `DOMAINS`, default 2.
- `PIN` / `POUT`, default 16. These are the partition input and output counts.
- `PC_END_DEFAULT`, default 255.

The lower blocks take `PRPG_W`, `CHAINS`, `CHAIN_LEN` and `DOMAINS`. Their
defaults are partition C0.

## Where this RTL departs from its source

- The controller is an own implementation, not a vendor LBIST IP. Its run
  sequence, register map (apart from `0110` = pattern count end), dselect and
  data widths, LFSR polynomials, phase shifter and compactor are all design
  choices.
- The slow-clock divider defaults to 8. The published test runs used
  320 MHz / 80 MHz, which is a divider of 4. That is a register setting, and
  the testbenches use 4.
- The PRPG is as long as the partition table says (24 to 46 bits).
  `prpg_value` is 64 bits wide and zero-extended.
- Controller select and done flags are 8 bits, one per controller. The source
  uses 5-bit and 4-bit fields in different places.
- Table-driven examples of masked chains quote 981 and 750 chains. Here the
  chain counts follow the partition table, and the decoder handles any count.
- Some source examples capture four or more domains per partition. Here each
  partition has the two domains of the partition table.
- Switching the controllers between `bist_clk` and `tck` with `run = 0` is not
  needed: the serial interface always runs on `tck`.
- Not built:
  - the NVM, PLL and oscillator;
  - the EDT compression controllers;
  - the TCU's other registers (generic TCR, reset and clock TDRs) and the reset
    generation module;
  - test points and launch-off-shift controls;
  - extra scan chains that hold the controller's own registers for ATPG.
- The dummy netlist is always present in the island; it is not selected by a
  compile-time define.
- The signatures quoted for the real partitions cannot be reproduced, because
  they belong to the product netlists. The testbenches compare against the
  model's signatures for the dummy netlist.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv` that ends with
a `TB_RESULT checks=… failures=…` line. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_lbist_top \
    rtl/lbist_pkg.sv rtl/*.sv tb/tb_lbist_model_pkg.sv tb/tb_lbist_top.sv
./obj_dir/Vtb_lbist_top
```

The two system-level testbenches are:

- **`tb_lbist_top`**: the whole subsystem at 8 chains of 4 flops per island.
  It covers:
  - direct mode over JTAG;
  - register writes and reads;
  - a masked chain;
  - both MISR pad words;
  - parallel STCU runs that pass with a functional reset held active;
  - sequential STCU runs with one bad NVM signature, which end in safe state;
  - production scan.
- **`tb_lbist_workloads`**: a debug session over JTAG at full size. All eight
  controllers are set up together:
  - chain 0 masked;
  - shift divider 4, as for a 320 MHz fast clock with an 80 MHz slow clock;
  - pattern count end 272;
  - explicit capture pulse strings.

  After the run, every MISR is read on the pads in two words and compared with
  the model, and the pattern counters must stand at 272. On every shift, chain
  0's scan input must stay 1 while chain 1 toggles.
- **`tb_lbist_top_full`**: the top at its full default size. The STCU runs all
  eight partitions in parallel for 261 patterns, and the testbench compares
  every MISR with the model and reads one over the pads. It builds in about a
  minute and a half.
