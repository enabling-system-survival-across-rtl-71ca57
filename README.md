# Health-monitor: surviving a broken TrustZone hypervisor

A TrustZone hypervisor such as LTZVisor runs two guests on one ARM core.
The secure guest's memory is guarded by the TrustZone memory controller,
and the non-secure guest gets the core in time slices. If the hypervisor
or the TrustZone configuration has a flaw, the non-secure guest can write
into secure memory. Nothing in the processor notices, and the secure guest
goes on running corrupted code or data.

The Health-monitor is a block in programmable logic that closes that gap.
While the non-secure guest runs, it reads the whole secure memory image
over a DMA again and again and compresses every pass into a 128-bit key.
The secure guest cannot run during that window, so every key must equal
the first one taken right after the window opened. A different key means
someone else wrote secure memory. The monitor then raises an error. When
the hypervisor switches back to the secure side, the monitor writes a
known-good image back into secure memory before the secure guest resumes.

Known-good images come from two places:

* **RAM checkpoints.** Every pass that hashes to the expected key was also
  captured on the fly into a spare RAM. That capture becomes the newest
  healthy image.
* **A ROM image.** The first pass after power-on is recorded into a
  write-once memory. It is the fallback when no checkpoint exists, or when
  checkpoint recovery keeps failing.

This repository holds synthesizable SystemVerilog for the whole monitor:
detection, memory access, checkpoints, controller and register interface.
It also holds the *intruder* test module, which injects an attack. The
Xilinx AXI DMA, the processor and the DDR are outside this RTL. Their
ports are brought out of the top module, and the testbenches use a
behavioural DMA/DDR model.

## Block structure

```
                 AXI4-Lite (hypervisor)
                        |
                 +--------------+  NOB, TRIG, CS, STATUS, RCC/HCC/NoC/NoR
                 | hm_registers |<------------------------------+
                 +--------------+                               |
                        | start / reset / cs                    |
                 +--------------+   counters, status            |
                 | control_unit |-------------------------------+
                 +--------------+
         read/write req |   hash/capture/restore strobes
   +--------------------+------------------------+
   |                    |                        |
+-----------------+  +------------------+  +-------------------+
| memory_module   |  | detection_module |  | checkpoint_module |
|  rw_trigger  ---+--> hash_function    |  |  memory_selector  |
|  read_memory ---+--> hash_keys        |  |  rom_image        |
|  write_memory <-+--+ hash_comparator  |  |  ram_image x 2    |
+-----------------+  +------------------+  +-------------------+
  |  ^        |         words in ------------------^  restore data out
  |  |        +--- S2MM stream (restore) <-------------+
  |  +---------- MM2S stream (secure memory words)
  +------------- AXI4-Lite to the DMA's length registers
                                   +-----------------+
  error_trigger, NS window ------> | intruder_module |--> AXI4-Lite write to DDR
                                   +-----------------+
```

`health_monitor_top` wires these blocks together. Each box is one module in
`rtl/`. The shared bus structs, the hash selector and the state encoding
live in `rtl/hm_pkg.sv`.

## The key cycle

A *window* is the time the non-secure guest owns the CPU. Before handing
the CPU over, the hypervisor writes `0` and then the secure image size in
bytes to `TRIG`. The first write resets the key cycle. The second starts
it. From then on the controller loops:

1. **Read pass.** The trigger writes the byte count into the DMA's MM2S
   length register. The DMA streams the secure image, one 32-bit word per
   clock. Every accepted word is fed to the hash and, in the same clock,
   written into the capture RAM. One setup clock re-initialises the hash
   before each pass.
2. **First pass of the window:** the key is stored (SAVE HASH).
   **Every later pass:** the key is compared with the stored one (COMPARE).
3. **Match.** The captured copy becomes the healthy checkpoint (*commit*),
   and a new pass starts (NEW READ).
4. **Mismatch.** The controller goes to ERROR, sets the error flag, stops
   reading and waits in IDLE.

Passes run back to back for as long as the window lasts. Hashing time in
clocks therefore equals the image size in words. For example, an 86 KB
secure image (21,384 words) takes 21,384 clocks, or 214 µs at 100 MHz. At
least two passes must fit in the window for one comparison to happen.

When the hypervisor switches back to the secure side it writes `CS` and
then polls `STATUS` until it reads 1. With no error pending, `STATUS` is
already 1 and the window simply ends. A pass still running is allowed to
finish, but its comparison is discarded, because the secure guest may
already be changing its own memory. With an error pending, `CS` starts
recovery:

* **RAM RECOVERY.** Used if a checkpoint exists and `Error_c` ≤ 5.
  `Error_c` counts how many windows in a row have ended in an error.
* **ROM RECOVERY** otherwise.

Recovery streams the chosen image back through the DMA's S2MM channel,
with byte count `NOB`. The end of that stream clears the error, `STATUS`
returns to 1, and the hypervisor continues into the secure guest.

`Error_c` is cleared by a window that ends cleanly and by a ROM recovery.
A ROM recovery also discards the RAM checkpoint. Writing `0` to `TRIG`
(at the start of every window) drops the RAM checkpoint as well. A
recovery therefore always uses an image confirmed in the same window,
after any legitimate edits the secure guest made before the window. If
the attack lands before the window's first confirmed pass, the ROM image
is used.

## Checkpoint rotation

A pass is captured *before* it is known to be healthy. Writing it over the
only good image would be unsafe, and copying it afterwards would cost
another full pass. So there are two RAMs, and `healthy_sel` names the one
holding the healthy image:

* every pass is written into the *other* RAM;
* on commit, `healthy_sel` flips: the fresh capture becomes the healthy
  image, and the old one becomes the next capture target;
* on a mismatch nothing flips, and the healthy RAM is untouched.

The ROM image takes every capture until the end of the first complete pass
after power-on, and then locks for good. All three memories are 38,400 ×
32 bits (150 KB each, 3,686,400 bits in total). Words past the end are
neither stored nor restored, so the image size must not exceed 153,600
bytes. Restore reads are registered. The memory selector prefetches the
next address when the stream accepts a word, so the S2MM stream runs
without gaps.

## The controller

`control_unit` is a nine-state machine. The state numbers are visible on
the top's `state` output:

| Code | State        | What happens |
|-----:|--------------|--------------|
| 0 | RESET        | Entered on a `TRIG=0` write from IDLE or from any pass state (not from recovery). Clears the stored key, match bit, error flag and key cycle, and drops the RAM checkpoint. An unfinished read stream is drained: TREADY is held high until its TLAST, and no new read starts before that. One clock. |
| 1 | IDLE         | Waits. Goes to FUNCTION when read data is available; to RAM/ROM RECOVERY on error plus `CS`; to RESET on a `TRIG=0` write. |
| 2 | FUNCTION     | Hashes and captures one word per accepted beat. Leaves on TLAST: to SAVE HASH for the first key, otherwise to COMPARE. |
| 3 | SAVE HASH    | Stores the key, then goes to NEW READ. |
| 4 | COMPARE      | Match: commit and go to NEW READ. Mismatch: go to ERROR. After `CS`, the result is ignored. |
| 5 | ERROR        | Sets the error flag, increments `Error_c`, returns to IDLE. |
| 6 | NEW READ     | Requests the next DMA read if the window is still open. |
| 7 | RAM RECOVERY | Streams the healthy RAM image to S2MM until the write is done. |
| 8 | ROM RECOVERY | Streams the ROM image. Also clears `Error_c` and the checkpoint. |

## Hash function

The key is four independent 32-bit hash lanes. Lane *i* consumes byte *i*
of every word and forms key bits `[32i+31:32i]`. Each lane feeds its own
previous value back, so only the value after the last word matters. The
algorithm is a parameter (`ALGO`, of type `hash_algo_e`):

| `ALGO`       | Update per byte `b`                       | Start value |
|--------------|-------------------------------------------|-------------|
| `HASH_FNV1` (default) | `h = (h * 16777619) ^ b`         | `0x811C9DC5` |
| `HASH_FNV1A` | `h = (h ^ b) * 16777619`                  | `0x811C9DC5` |
| `HASH_SDBM`  | `h = b + (h << 6) + (h << 16) - h`        | 0 |
| `HASH_DJB2`  | `h = (h << 5) + h + b`                    | 5381 |
| `HASH_CRC32` | bitwise MSB-first CRC, polynomial `0x04C11DB7`, no final XOR | `0xFFFFFFFF` |

FNV-1 is the default. Of the byte-wide algorithms it produced the fewest
collisions on real hypervisor memory. The alternatives give the same
throughput and can serve as secondary checks. Each lane is one multiply or
one shift-add chain per clock. A multiplier-free choice (SDBM, DJB2, CRC32)
is the knob to turn if the multiply limits the clock.

## Register map (`s_axil_hm`, AXI4-Lite, 32-bit)

| Offset | Name   | Access | Meaning |
|-------:|--------|--------|---------|
| 0x00 | RCC    | R   | Clocks taken by the last recovery, from its start to the end of the write stream. |
| 0x04 | HCC    | R   | Clocks taken by the last completed hashing pass (FUNCTION clocks). Equals the word count when the DMA does not stall. |
| 0x08 | NoC    | R   | Number of checkpoints committed. |
| 0x0C | NoR    | R   | Number of restores. |
| 0x10 | NOB    | R/W | Byte count of the recovery write (the secure image size). |
| 0x14 | TRIG   | R/W | Write 0: reset the key cycle. Write N > 0: open a window and read N bytes per pass. Reads back the last value. |
| 0x18 | CS     | W   | Any write: the hypervisor is switching back to the secure side. Reads 0. |
| 0x1C | STATUS | R   | 1: no error and no recovery pending. 0: error or recovery in progress. |

Address bits [4:2] select the register. The block ignores its base
address. Only RCC and HCC have fixed offsets in the reference software
(base + 0x0 and base + 0x4). The other offsets are this design's choice.

## DMA side

The monitor drives a Xilinx AXI DMA in simple (register) mode. At start-up
the hypervisor software programs the channel control registers and both
source/destination addresses (the start of secure memory). After that,
the monitor's `rw_trigger` only writes lengths through `m_axil_dma`:

* `DMA_BASE + 0x28` (MM2S_LENGTH): starts a read pass.
* `DMA_BASE + 0x58` (S2MM_LENGTH): starts a restore.

Each is a single AXI4-Lite write. A read and a write request that arrive
together are queued, and the read goes first. Streams are 32-bit AXI4-Stream
without TKEEP. `read_memory` accepts MM2S beats only in FUNCTION, or while
draining. `write_memory` sends `NOB/4` words on S2MM with TLAST on the
last one and reports completion on the final handshake.

## Intruder module

An attack source for tests. It behaves like a non-secure guest that has
broken out of its isolation, but it is a secure AXI master, so TrustZone lets its
writes through. Software sets the target address (offset 0x0) and data
(offset 0x4) through `s_axil_intr`. On each rising edge of *error_trigger
AND non-secure window open*, it performs one AXI4-Lite write of that value
to that address on `m_axil_intr`. On the board, error_trigger is a
switch.

## Top-level ports

`health_monitor_top` has one clock and an active-low asynchronous reset.
All buses are packed structs from `hm_pkg` (`axil_req_t`/`axil_rsp_t` for
AXI4-Lite, `axis_t` plus a separate TREADY for streams):

| Port group | Meaning |
|---|---|
| `s_axil_hm`, `s_axil_hm_rsp` | Register interface for the hypervisor. |
| `m_axil_dma`, `m_axil_dma_rsp` | To the DMA's configuration port. |
| `s_axis_mm2s`, `s_axis_mm2s_tready` | From the DMA read channel. |
| `m_axis_s2mm`, `m_axis_s2mm_tready` | To the DMA write channel. |
| `s_axil_intr*`, `m_axil_intr*` | Intruder configuration and its DDR master. |
| `error_trigger` | Intruder trigger. |
| `state`, `error`, `hash_match`, `ns_running`, `checkpoint_valid`, `healthy_sel`, `rom_locked`, `error_c` | Observation outputs. |

Parameters: `DEPTH` = 38400 words per image memory, `ERR_LIMIT` = 5,
`ALGO` = `HASH_FNV1`, `DMA_BASE` = 0.

## Design choices and departures

Where the description of this design leaves a point open or contradicts
itself, the RTL makes these choices:

* **Recovery trigger.** Recovery starts at the hypervisor's context switch
  (`CS`) after an error, not immediately. The secure guest cannot run
  before its memory is restored, and the non-secure guest could corrupt a
  restore done while it still runs.
* **STATUS polarity.** The reference driver loops until the status
  register reads 1, while the prose speaks of a register that is "cleared"
  when recovery is done. The RTL follows the driver: 1 means healthy.
* **RESET and the RAM images.** RESET "clears all RAM images" by dropping
  the checkpoint flag in one clock, not by writing 38,400 zeros.
* **Error_c.** The count is described only as "consecutive recoveries of
  the same state". Here it counts consecutive windows that end in an error,
  and it is cleared by a clean window end or a ROM recovery. It is not
  cleared by a commit. Every RAM recovery needs a commit in the same
  window, so clearing on commit would keep `Error_c` at 1 or below and the
  ROM fallback would never fire.
* **ROM recording.** The ROM is recorded by the first complete pass after
  power-on and never written again. On the board it was pre-loaded with the
  boot image; recording the first pass gives the same content without an
  initialisation file.
* **Memory build.** The three memories are plain arrays. The original
  implementation split them across BRAM and LUT RAM to fit the FPGA; that
  is left to synthesis.
* **Lane order** (byte *i* → key word *i*), the register offsets beyond
  0x04, the stream drain on reset, the discarded late comparison and the
  intruder's edge sensitivity are this design's own choices.
* **Not included.** The CPU-side software (abort handlers, scheduler
  hooks) and the AXI DMA IP are not RTL here. The testbenches use
  `tb/dma_ddr_model.sv`, a behavioural model of the DMA registers, both
  streams, optional stalls and a DDR array.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

* Unit tests (`tb_hash_function`, `tb_hash_keys`, `tb_hash_comparator`,
  `tb_detection_module`, `tb_rw_trigger`, `tb_read_memory`,
  `tb_write_memory`, `tb_memory_module`, `tb_ram_image`, `tb_rom_image`,
  `tb_memory_selector`, `tb_checkpoint_module`, `tb_control_unit`,
  `tb_hm_registers`, `tb_intruder_module`):
  * hash lanes are checked against a reference model and against published
    vectors (FNV-1("a") = `0x050C5D7E`, FNV-1a("a") = `0xE40C292C`,
    CRC-32/MPEG-2("123456789") = `0x0376E6E7`, which is the CRC variant used here);
  * the bus and stream handshakes are checked under random stalls;
  * the controller is checked state by state, including the HCC and RCC
    counts.
* `tb_hash_workload` streams a 200,000-byte memory-like image through all
  five hash algorithms. It checks each key against the reference model,
  checks the cost of one setup clock plus 50,000 clocks, and reports
  repeated intermediate keys (none for FNV-1).
* `tb/hm_system_test.sv` is an end-to-end scenario that plays the
  hypervisor over AXI4-Lite. It covers:
  * the boot pass that records the ROM;
  * legal secure-side edits;
  * an attack with RAM recovery;
  * five more failing windows (four RAM recoveries, then ROM when
    `Error_c` passes 5);
  * an attack before the window's first checkpoint (ROM);
  * a `TRIG=0` reset in mid-pass (stream drain);
  * an attack attempt outside the window, which must do nothing.

  After each recovery it compares the DDR model word for word with the
  expected image. It counts every controller mechanism and fails if one
  never happened. Three wrappers run it:
  * `tb_health_monitor_top`: 48-word image, random DMA stalls;
  * `tb_hm_case_study`: 21,384-word (86 KB) image, checks HCC = 21,384.
    It prints an RCC of 21,388 clocks for a RAM recovery. The reference
    board reported 21,507 clocks for the same image. The gap is DDR and
    DMA latency, which the gap-free DMA model here does not have;
  * `tb_hm_full_size`: a 38,400-word image that fills the checkpoint
    memories, with the top at its default parameters. It takes about
    1.6 M clocks, a few seconds with Verilator.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hm_pkg.sv tb/tb_hm_full_size.sv --top-module tb_hm_full_size -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The testbenches use
`$urandom` for stimulus and need no data files.
