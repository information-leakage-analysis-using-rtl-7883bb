# Fault-emulation engine for a gate-level processor

This RTL lets a manager program find out which hardware faults make a processor leak or corrupt data. Each gate input of the processor's netlist gets a small fault-injection (FI) cell. Three scan chains program every cell as fault-free, stuck-at-0, stuck-at-1, delayed by one cycle, or inverted. Around the instrumented processor (the DUT) a few state machines run one experiment at a time:

1. Reset the DUT.
2. Let it run its program for a fixed number of cycles.
3. Record everything it prints on its UART and every value its address bus takes.
4. Hand the results to the manager.

The manager is software on an embedded CPU. It sees the engine only as one 32-bit output register and one 32-bit input register (GPIO).

The structure follows the FPGA fault-emulation platform described in *Information Leakage Analysis Using a Co-Design-Based Fault Injection Technique on a RISC-V Microprocessor*. That platform has:

- a master state machine, a serial-collection machine, an address-collection machine and a runtime monitor;
- a 64 KB serial buffer and a 2048-word address buffer;
- 85713 FI cells on three scan chains.

The GPIO bit layout, the handshakes, the readout protocol and some state-machine details are this design's own. They are listed in the "Own choices" section below.

The processor is not part of this RTL. Its fault sites, UART and address bus are ports of the top module `fe_platform`.

## Block map

```
             gpio_out[31:0]                     gpio_in[31:0]
                  |                                  ^
            +-----v----------------------------------+-----+
            |                fe_gpio_if                    |
            |  decode, scan_clk edge -> scan_en, readout   |
            +--+--------+---------+---------------+--------+
               |scan_en |start,   |rd port B      |rm_valid/char
               |sdi     |params   |               |
   site_in  +--v-----+ +v-------+ |   +-------+   |   +-----+
  --------->|fi_scan_| |mst_ctrl|-+-->| sdc   |---+-->| rm  |
  site_out  | chain  | +--------+ |   +---+---+   |   +--+--+
  <---------| 85713  |   |  |     |       |A      |      |B
            | cells  |   |  |     |   +---v-------v------v--+
            +--------+   |  |     +-->|  BRAM1 (64 KB)      |
          rocket_rst_n <-+  |         +---------------------+
                            |  halt   +-----+   +----------------+
                            +-------->| adc |-->| BRAM2 2048x32   |
               addr_bus ------------->+-----+   +----------------+
               uart_intr/data/ack <----> sdc
```

| File | Block |
|---|---|
| `rtl/fe_pkg.sv` | fault-type enum, GPIO field structs, readout selectors |
| `rtl/fi_cell.sv` | FI cells (a row of `WIDTH` of them) |
| `rtl/fi_scan_chain.sv` | all fault sites, three chains of `N_SITES` bits |
| `rtl/mst_ctrl.sv` | master control (Mst) |
| `rtl/sdc.sv` | serial data collection |
| `rtl/adc.sv` | address data collection |
| `rtl/rm.sv` | runtime monitor |
| `rtl/fe_bram.sv` | BRAM1 and BRAM2 (one write/read port, one read port) |
| `rtl/fe_gpio_if.sv` | GPIO register interface and readout |
| `rtl/fe_platform.sv` | top |

Everything runs in one clock domain. The published platform ran at 24 MHz.

## Fault sites and the three scan chains

Every FI cell holds three scan flip-flops: `type0`, `type1` and `active`.

- With `active` low, the cell passes `site_in` through unchanged.
- With `active` high, the output depends on the type:

| type1 type0 | fault | `site_out` |
|---|---|---|
| 00 | stuck-at-0 | 0 |
| 01 | stuck-at-1 | 1 |
| 10 | delay | `site_in` registered once (the previous cycle's value) |
| 11 | invert | `~site_in` |

The delay register samples every cycle whether or not the fault is active. A delay fault therefore takes effect on the first cycle it is enabled.

Each of the three flip-flops belongs to a different chain. All three chains shift together, so one shift moves each cell's configuration to the next cell.

- Cell `i` is chain position `i`, and the scan inputs enter at cell 0.
- A bit shifted in at step `j` of a full load (`N_SITES` shifts) ends at site `N_SITES-1-j`.
- After the load, one more shift moves the whole pattern one site further. This is how a campaign walks a fault across all 85713 sites with one scan pulse per experiment.
- `k` adjacent active cells model `k` simultaneous faults of one type. The published campaigns used up to five.

`fi_cell` is written with bit vectors: bit `i` of each register is one cell. `fi_scan_chain` links rows of `SEG` cells (default 1024) into the three long chains. Segmenting changes nothing at the ports. It only keeps elaboration of 85713 cells fast.

At the default size the chain alone holds 4 × 85713 flip-flops: three scan bits and one delay register per site. It dominates the area (about 343k flip-flops in the top).

## One experiment (mst_ctrl)

The manager raises `start`. The master then steps through these states:

| state | what happens |
|---|---|
| CLEAR_START | cycle counter cleared; SDC, ADC and RM started in clear mode |
| GET_PARAMS / WAIT_PARAMS | three parameter words taken over a four-phase handshake: 0 = run cycle limit, 1 = serial idle wait, 2 = mode (bit 0 = stream) |
| WAIT_CLEAR | DUT held in reset until SDC, ADC and RM all report done |
| START_ROCKET | DUT reset released; SDC and ADC start collecting (RM too in stream mode) |
| RUN | exactly `cycle_limit` cycles; ADC is halted in the last one |
| WAIT_SERIAL | `exit_enabled` high until SDC stops |
| DONE | `done` reported until the manager drops `start` |

Both buffer clears write every word: 65536 cycles for BRAM1 and 2048 for BRAM2. The clears run while the parameters are being transferred.

After the run the DUT is left out of reset. It is reset again by the next experiment.

The published setup used a limit of 2^22 cycles and an idle wait of 2^20 cycles. Both parameter words are 23 bits wide.

`cycles` counts DUT cycles from the release of reset until DONE. The manager can read it back.

## Serial collection: when does an experiment end?

This is the subtle part. A faulty processor may hang, print garbage, reboot forever or print far more than expected. The engine has to end every experiment without cutting off output that might reveal a secret.

`sdc` runs a four-phase handshake with the DUT's UART:

1. The DUT raises `uart_intr` with a character.
2. `sdc` writes the character to BRAM1 at `nbytes mod DEPTH` and raises `uart_ack`.
3. `uart_ack` stays high until `uart_intr` falls.

Collection stops when any of the following happens:

- **Buffer full.** Applies only when stream mode is off. The character at the last BRAM1 address was written, and the `full` status bit is set.
- **Manager stop.** `cprog_term` is high. This is checked after each character and also while waiting, so the manager can cut an experiment short at any time, for example once it has recognised a fault-free output. The `term` status bit is set.
- **Idle exit.** `exit_enabled` is high (the fixed run window is over) and no character has arrived for `idle_wait` cycles. The idle counter restarts at every character. A DUT that keeps printing therefore keeps the experiment going past the run window, until it falls silent, fills the buffer or is stopped by the manager.

If the DUT has been quiet for longer than `idle_wait` by the end of the run window, the experiment ends in the first cycle of WAIT_SERIAL.

A fault can hold `uart_intr` high for good. `sdc` then takes one character and keeps its acknowledge up. While the line stays high after the acknowledge, that time counts as idle, and the manager stop and the idle exit still apply. Without this, a stuck interrupt line would hang the engine for the rest of the campaign.

### Stream mode and the runtime monitor

Some programs print far more than 64 KB. The published pseudo-random-generator runs printed 281264 bytes. For such programs the manager sets the stream bit in parameter word 2. Then:

- `rm` watches how many characters `sdc` has stored. It reads each new one through BRAM1's second port and offers it on `rm_char` with `rm_valid`. The manager answers with `rm_ack` (four-phase).
- BRAM1 becomes a ring. When the DUT gets `DEPTH` characters ahead of the manager, `sdc` withholds `uart_ack`, so the DUT's UART stalls and nothing is lost. The idle counter stays at zero during such a stall.
- The manager can judge the output while the DUT runs and stop early with `cprog_term`.

Without stream mode the runtime monitor stays idle after its clear. The manager reads BRAM1 through the readout path once `done` is reported.

## Address trace (adc)

During RUN, `adc` compares the DUT address bus with its previous value each cycle. When the value differs, `adc` writes it to BRAM2 and counts it in `nchanges`. The first sample of a run always counts as a change. The cycle in which `halt` arrives is still sampled.

BRAM2 is a ring. After a run it holds the newest 2048 changes, and `wptr` points one past the newest. The last 50 changes are at `(wptr-50 .. wptr-1) mod 2048`. The published analysis used those 50 together with the change count and the serial output to classify fault behaviour.

## Manager interface (fe_gpio_if, fe_pkg)

The output register (manager to engine) is registered once before use:

| bits | field |
|---|---|
| 0 | `start` |
| 1 | `params_valid` |
| 2 | `scan_clk`: each rising edge shifts the chains once |
| 3, 4, 5 | scan data for the `type0`, `type1` and `active` chains |
| 6 | `cprog_term` |
| 7 | `rm_ack` |
| 8 | `rd_req` |
| 31:9 | data: parameter word, or readout `{sel[3:0], addr[15:0]}` |

The input register (engine to manager) is also registered:

| bits | field |
|---|---|
| 0 | `params_req` |
| 1 | `params_ack` |
| 2 | `done` |
| 3 | `rm_valid` |
| 4 | `rd_ack` |
| 7:5 | scan outputs of the last site `{active, type1, type0}` |
| 15:8 | `rm_char` |
| 31:16 | `rd_data` |

To read a value, the manager:

1. puts a selector and an address in the data field;
2. raises `rd_req`;
3. waits for `rd_ack`, takes `rd_data`, and drops `rd_req`.

The selectors are:

| sel | value |
|---|---|
| 0 | BRAM1 byte at addr |
| 1, 2 | BRAM2 word at addr, low and high half |
| 3, 4 | serial characters stored, low and high half |
| 5, 6 | address changes, low and high half |
| 7 | ADC `wptr` |
| 8, 9 | DUT cycles, low and high half |
| 10 | status `{rm_busy, mst_busy, dut_released, exit_enabled, term, full}` |

A BRAM1 read waits while the runtime monitor owns BRAM1's second port.

A scan shift takes two system clocks at best: `scan_clk` high for one cycle, then low for one.

## Connecting a DUT

The DUT's netlist must be instrumented so that each gate input `i` reads `site_out[i]`. The value the driving net would have given goes to `site_in[i]`.

The DUT also connects:

- `rocket_rst_n` to its reset;
- `uart_intr`, `uart_data` and `uart_ack` to its UART (handshake above);
- `addr_bus` to the 32-bit address bus to be traced.

`tb/dut_model.sv` is a behavioural stand-in for the DUT and shows the protocol. It prints a short AES-style report and routes these signals through fault sites:

- its UART character bits (sites 7:0);
- its character-ready flag (site 8);
- its address bus (sites 40:9);
- a reboot flag (site 41).

Injected faults then show the behaviours the published study classified: corrupted output, no output, endless reboots, and correct output with a wrong address trace.

`tb/twister_model.sv` is a second stand-in that prints MT19937 numbers in hex. It passes the 32-bit number itself through sites 31:0, so a fault there gives well-formed but wrong output.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fe_platform` | `N_SITES` | 85713 | fault sites (gate inputs) |
| | `B1_DEPTH` | 65536 | BRAM1 bytes |
| | `B2_DEPTH` | 2048 | BRAM2 words |
| `fi_scan_chain` | `SEG` | 1024 | cells per row (layout only) |
| `fi_cell` | `WIDTH` | 1 | cells in the row |

All defaults are the published sizes except `SEG` and `WIDTH`.

The published setups fit at these defaults:

- **AES runs.** 288 bytes of output, 52147 address changes and a 2^22-cycle window. All fit.
- **Pseudo-random runs.** 281264 bytes of output and 19550 address changes. These fit in stream mode.

## Own choices and departures

- **GPIO bit layout, handshakes and readout selectors.** Entirely this design's. The published engine gives only the two 32-bit registers and which data crosses them.
- **Scan chain clocking.** The chains shift on the system clock, enabled by the rising edge of a GPIO bit. The published platform drove a separate scan clock tree from the GPIO bit.
- **Fault-type encoding.** Chosen here. Engine reset clears all FI cells to fault-free.
- **Parameter words.** The idle wait and the stream mode are extra parameter words; the published master names a single cycle-limit parameter. The serial ring with back-pressure is this design's way of passing outputs longer than BRAM1.
- **UART handshake.** The published collector acknowledges a character as it stores it. The four-phase completion, and counting an interrupt held high after its acknowledge as idle time, are this design's.
- **DONE state.** The master has a DONE state that waits for `start` to fall.
- **Address ring.** BRAM2 is organised as a ring, and the first address of a run counts as a change.
- **Not in the RTL.** The processor, the netlist instrumentation flow, the manager software, the vendor GPIO block, and full FPGA reconfiguration between experiments (used in the published work to scrub the processor's memories). Scrubbing happens outside the engine. A static campaign simply skips it.

## Simulation

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Itb -y rtl -y tb +libext+.sv \
    rtl/fe_pkg.sv tb/tb_fe_platform.sv --top-module tb_fe_platform
./obj_dir/Vtb_fe_platform
```

Replace `tb_fe_platform` with any other testbench name. The testbenches are:

- `tb_fi_cell`, `tb_fi_scan_chain`, `tb_mst_ctrl`, `tb_sdc`, `tb_adc`, `tb_rm`, `tb_fe_bram`, `tb_fe_gpio_if`: the blocks alone.
- `tb_fe_platform`: 48 sites, a 256-byte BRAM1 and a 64-word BRAM2. Eight experiments cover:
  - all four fault types and five simultaneous faults;
  - the buffer-full, idle and manager-stop exits;
  - the address-ring wrap;
  - a stream run that wraps the serial ring several times under back-pressure.

  Each mechanism is counted, and the test fails if one never occurs.
- `tb_fe_platform_full`: the top at its default sizes, taken through a fault-free run and a run with an invert fault moved into site 0. It takes about 20 s.
- `tb_fault_campaign`: the manager's campaign loop with 48 sites. It covers the four fault types and 1 to 5 adjacent faults. Each group of faults is loaded once at site 0 and then moved up one site per scan pulse before each experiment, which gives 920 experiments. The outcome of every window that touches only character bits, address bits or unused sites is predicted and checked, as are no output for a stuck-low "ready" and a full buffer for a stuck reboot flag.
- `tb_aes_workload`: the AES campaign's sizes with 48 sites and the default buffers.
  - The run window is 2^22 cycles and the idle wait 2^20 cycles.
  - The model program makes 52147 address changes. The newest 50 entries of the wrapped address ring are checked.
  - A reboot fault then makes the model print until the 64 KB buffer is full, and all 65536 characters are read back.
  - The DUT is the same report-printing model as above, not a real AES program. The test takes about 5 s.
- `tb_twister_workload`: the pseudo-random-generator workload at full length. `tb/twister_model.sv` is a behavioural processor that prints one million MT19937 bits as 281264 characters. The engine has 80 sites and the default 64 KB serial buffer, and runs in stream mode.
  - A fault-free run is checked against a reference generator in the testbench and stopped by the manager after 35000 matching characters.
  - A run with bit 0 of the generated number stuck at 0 must deliver all 281264 characters through the ring, well formed and each equal to the reference with that bit cleared.

The manager model shared by the platform testbenches is `tb/fe_manager.svh`.
