# AHB-to-APB bridge across asynchronous clocks

A system bus (AMBA AHB) usually runs on a fast clock, while the peripheral bus behind it
(AMBA APB) runs on a slower one that need not be related to it in phase or frequency. Wiring
a value from one domain into flip-flops of the other fails in two ways:

- **Lost data.** If the fast side changes a value every fast cycle and the slow side samples it
  once per slow cycle, the samples in between are simply never seen.
- **Metastability.** A flip-flop whose input changes inside its setup/hold window can hang
  between 0 and 1 for a while. If downstream logic uses it in that state, different parts of
  the design can read different values.

This bridge solves both with an **asynchronous FIFO** between an AHB slave and an APB master.
Every AHB transfer becomes one FIFO entry, written on the AHB clock. The APB side removes
entries on its own clock and replays them as APB transfers. A burst that arrives faster than
the APB can handle waits in the FIFO. Only when the FIFO is full does the AHB master see wait
states. Only FIFO pointers cross the clock boundary. They cross in Gray code, through two-flop
synchronizers, so a crossing pointer is always either its old value or its new one.

```
            hclk domain            |  both  |            pclk domain
  AHB  --> slave_ahb --push/entry--> afifo --entry/empty--> apb_bridge --> APB
 master   (address/data phase,     | Gray    |  (IDLE/SETUP/ACCESS,        peripheral
           stall when full)        | ptrs +  |   read data, error out)
                                   | sync_ff |
```

Each FIFO entry is 41 bits: `{write, addr[7:0], data[31:0]}` (`bridge_pkg::xfer_t`). The
address and the direction travel with the data, so nothing from the AHB side reaches the APB
side except through the FIFO.

## The clock-domain crossing (`afifo`)

This is the part that is easiest to get wrong, so here it is in detail.

**Pointers.** Each side owns one pointer (`gray_ptr`) that is one bit wider than the memory
address. With the default 16 entries, that is 4 address bits plus a wrap bit. The binary value
addresses the memory (`fifo_mem`). A registered Gray copy, `gray = bin ^ (bin >> 1)`, is what
the other side sees. From one count to the next, exactly one bit of the Gray copy changes, so
a synchronizer that samples it in mid-change gets either the old count or the new one, never a
third value. The Gray copy comes straight from a flip-flop, so it carries no combinational
glitches.

**Synchronizers.** The write pointer reaches the read clock through `sync_ff` (two flops), and
the read pointer reaches the write clock the same way. The second flop gives a metastable
first flop one full clock period to settle. The mean time between failures of a synchronizer
grows exponentially with that settling time, so two stages are the usual minimum.
`sync_ff.STAGES` can be raised for very fast clocks.

**Flags.** Both flags are computed from the pointer value after the current edge, then
registered:

- `empty` (read side): the next read pointer equals the synchronized write pointer.
- `full` (write side): the next write pointer equals the synchronized read pointer with its
  two top bits inverted. That means the same position, one lap ahead.

Each side sees the other's pointer two or three of its own cycles late. A late write pointer
makes the FIFO look emptier than it is, and a late read pointer makes it look fuller. Both
errors are safe. They cost a few cycles of latency but never lose or duplicate an entry.

**Read port.** The memory is read asynchronously at the read pointer. `out_data` is therefore
the oldest entry whenever `empty` is low, and `pop` removes it on the next `clk_r` edge. That
word was written at least two read-clock cycles before `empty` could fall, so it is stable.

**Misuse.** A push while full or a pop while empty is ignored. It is reported as a one-cycle
pulse on `push_err_on_full` (write clock) or `pop_err_on_empty` (read clock). Inside the
bridge, neither should ever fire.

**Depth.** 16 entries, set by `ahb2apb_bridge.FIFO_ADDR_W = 4`. That is the longest
fixed-length AHB burst (INCR16/WRAP16), so a whole burst can be queued even while the APB side
is busy.

## AHB side (`slave_ahb`)

AHB is pipelined. A transfer's address and control arrive in its address phase. Its write
data arrives in the following data phase, overlapping the next transfer's address phase.

- **Address phase.** The slave registers `haddr` and `hwrite` for every NONSEQ or SEQ transfer
  that arrives with `hsel` and `hready` high. IDLE and BUSY transfers are accepted with no wait
  state and create no entry.
- **Data phase.** The slave pushes `{hwrite, address, hwdata}` into the FIFO. For a read, the
  data field is zero. If the FIFO is full at that moment, `hreadyout` goes low and the data
  phase is stretched until an entry has been freed. No transfer is ever dropped.
- **Bursts.** SINGLE, INCR, INCR4/8/16 and WRAP4/8/16 are all handled. The slave does not
  generate addresses, because in AHB the master drives every beat's address. It does check
  them, though. From `hsize` and `hburst` it computes where the next SEQ beat must be:
  - incrementing bursts: address + 2^hsize;
  - wrapping bursts: the same, but wrapped inside an aligned block of beats × 2^hsize bytes.

  A SEQ beat at any other address raises `addr_err` for one cycle. The beat is still passed
  on.
- **Responses.** Always OKAY, so there is no `hresp` port. Narrow transfers (`hsize` below a
  word) pass all 32 bits of `hwdata` without selecting byte lanes.

`hready` is the bus's HREADY. With this bridge as the only slave, connect `hreadyout` back to
`hready`.

## APB side (`apb_bridge`)

An IDLE → SETUP → ACCESS state machine:

- Whenever the FIFO is not empty in IDLE, or at the end of an ACCESS, the master pops the head
  entry. It registers the entry onto `paddr`, `pwrite` and `pwdata` and enters SETUP, with
  `psel` high and `penable` low.
- One cycle later comes ACCESS (`penable` high). The master holds ACCESS until `pready` is
  high.
- If another entry is waiting at the end of ACCESS, the next SETUP follows immediately.

A stream of transfers with no wait states therefore runs at one transfer per two PCLK cycles.

Reads are carried out on the APB like writes. The read data is captured at the end of ACCESS
and delivered on `prdata_out`, with a one-cycle `rdata_valid` pulse in the PCLK domain. The
AHB read itself has already completed, with no data. `pslverr` at the end of ACCESS is
reported as a one-cycle `xfer_err` pulse.

## Timing and throughput

- **AHB write acceptance.** One transfer per HCLK cycle while the FIFO has room.
- **APB drain rate.** One transfer per 2 PCLK cycles, plus wait states.
- **Latency.** After a push, `empty` falls 3–4 PCLK edges later (two synchronizer stages plus
  the registered flag). SETUP starts on the next edge.
- **Clock ratio.** To fill a burst quickly, HCLK's period should be at most 3/4 of PCLK's.
  The bridge has no hard limit of its own, because the FIFO and `hreadyout` absorb any
  mismatch. The tests run HCLK at 3× PCLK, at exactly 4/3× PCLK, and at half of PCLK.
- **Reset.** `hreset_n` resets the AHB slave and both halves of the FIFO. `preset_n` resets
  the APB master. Both are asynchronous and active low. Assert them together, and hold each
  for at least one edge of its clock.

## Top-level ports (`ahb2apb_bridge`)

| group | ports |
|---|---|
| AHB in | `hclk hreset_n hsel hready hwrite hsize[2:0] hburst[2:0] htrans[1:0] haddr[7:0] hwdata[31:0]` |
| AHB out | `hreadyout`, `addr_err` (bad burst address), `push_err_on_full` |
| APB in | `pclk preset_n pready prdata[31:0] pslverr` |
| APB out | `psel penable pwrite paddr[7:0] pwdata[31:0]` |
| results (pclk) | `prdata_out[31:0] rdata_valid xfer_err pop_err_on_empty` |

The only parameter is `FIFO_ADDR_W` (default 4, giving 16 entries). The bus widths are
package constants in `bridge_pkg` (`ADDR_W = 8`, `DATA_W = 32`).

## What is original and what was chosen here

The published bridge fixes these points:

- the three-part structure (AHB slave, asynchronous FIFO, APB master);
- Gray-coded FIFO pointers with synchronizers;
- the bin-to-Gray rule;
- the 8-bit address and 32-bit data widths;
- the port and instance names used here;
- the burst types;
- the 3/4 clock-period guideline.

These choices were made for this RTL:

- FIFO depth 16 and two synchronizer stages.
- First-word fall-through read; registered flags; error flags as one-cycle pulses.
- The address and direction carried inside the FIFO entry, instead of a separate address path.
- Stalling AHB with `hreadyout` when the FIFO is full, instead of dropping the transfer. The
  `hsel` and `hreadyout` ports were added for this.
- The burst-address check and its `addr_err` output.
- Read handling. The original gives the APB master a PRDATA input but has no AHB read-data
  path. Here, reads are posted and their data comes out on the APB side, and AHB reads return
  no data.
- `pslverr` taken from the peripheral. In the original schematic, the APB master's error input
  was fed from the FIFO's error flags. Here, the FIFO flags are separate outputs.
- No HRESP, and no byte-lane selection for narrow writes.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_gray_ptr` | binary count, Gray rule bit by bit, one-bit steps, wrap-around |
| `tb_sync_ff` | two-cycle delay, reset |
| `tb_fifo_mem` | random writes/reads against a reference array |
| `tb_afifo` | full after exactly 16, refused push/pop flagged, random traffic at 10 ns / 27 ns clocks against a reference queue |
| `tb_slave_ahb` | every burst type, reads and writes, random full flag, stall rule, one injected bad burst address |
| `tb_apb_bridge` | 8 back-to-back writes in 17 PCLK cycles, random wait states, read data, `pslverr` |
| `tb_ahb2apb_bridge` | whole bridge at its default size, described below |
| `tb_bridge_clock_ratio` | 48-write streams at HCLK/PCLK periods of 30/40, 10/30 and 20/10 ns; in-order delivery, exactly 2 PCLK cycles per APB transfer under backlog, AHB stalled only when it is the faster side |

The end-to-end test first issues five single byte writes (132, 67, 103, 33, 104 to addresses
32, 23, 2, 1, 0). It then runs every burst type, reads, an APB error address and one bad burst
address. It checks that each AHB transfer appears on the APB once, in order and intact. It also
counts that each mechanism happened at least once:

- an AHB stall;
- an APB wait state;
- the APB going idle;
- FIFO pointer wrap-around;
- a wrapping burst crossing its boundary;
- a read;
- an APB error;
- an address error.

The RTL also carries assertions:

- the Gray pointers move one bit per step;
- a push never meets a full FIFO;
- a stalled data phase holds;
- APB SETUP is followed by ACCESS;
- `penable` implies `psel`;
- the APB signals stay stable during ACCESS.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bridge_pkg.sv tb/tb_ahb2apb_bridge.sv \
          --top-module tb_ahb2apb_bridge
./obj_dir/Vtb_ahb2apb_bridge
```

Replace the testbench name to run any other test. Verilator is a two-state simulator, and
every register that is read is reset.

Not covered by simulation:

- metastability itself, which a digital simulator cannot show;
- clock ratios other than the four simulated ones (periods 10/30, 30/40 and 20/10 ns for the
  bridge, 10/27 ns for the FIFO alone).
