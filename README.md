# A switchable-interconnect accelerator framework, loaded for JPEG

A host processor running an ordinary operating system should be able to hand work to
hardware accelerators in an FPGA, and the accelerators should not have to talk to the
system bus. That is the problem this design solves. Accelerators sit in
*reconfigurable frames*. Each frame has the same small interface:
- one stream channel in and one out;
- a 16-bit control word;
- an optional *side path* to memory.

A fixed *framework* around the frames does everything that would otherwise involve the
system bus:
- It holds local input and output buffers that a DMA engine or the host fills and drains.
- It streams the input buffer into the first accelerator.
- It chains the frames in any order, using a switch set from a control register.
- It writes the last accelerator's results back into the output buffer.
- It translates and checks the side-path accesses of the accelerators with a small MMU.

The host controls it all through device control registers (DCRs). These sit on a
separate control bus, so polling never competes with data transfers.

In the configuration shipped here (`jpeg_accel_top`), two of the three frames hold the
compute-heavy core of a JPEG encoder:
- frame 0: an 8x8 forward DCT;
- frame 1: the quantizer.

The third frame is left open and its signals are brought out as ports. Per 8x8
macroblock, the host:
1. writes 64 samples into the input buffer;
2. starts a transaction;
3. polls until the framework is idle;
4. reads 64 quantized coefficients back.

```
            64-bit bus                     DCR bus
                |                             |
        buffer_bus_port                    dcr_regs ---- route, start, frame ctrl/AID,
          |          |                        |          TLB fill
   input buffer   output buffer               |
       |               ^                      |
 stream_feeder   stream_collector             |
       |               ^                      |
   +---+---------------+------ interconnect_switch ------+
   |        frame 0 (DCT)  frame 1 (quant)  frame 2 (open)|
   +-------------------------------------------------------+
                    side paths -> ammu -> memory master
```

## Source files

| File | Role |
|---|---|
| `rtl/saif_pkg.sv` | shared types and constants: stream word, side-path request/response, DCR offsets, TLB entry |
| `rtl/jpeg_accel_top.sv` | top: the framework with the DCT in frame 0, the quantizer in frame 1, frame 2 on ports |
| `rtl/accel_framework.sv` | the framework shell around `NUM_FRAMES` frames |
| `rtl/dual_port_buffer.sv` | block RAM with a 64-bit bus port and a 16-bit stream port |
| `rtl/buffer_bus_port.sv` | decodes the bus window onto the input and output buffers |
| `rtl/stream_feeder.sv` | pushes 8x8 blocks from the input buffer, row- or column-major |
| `rtl/stream_collector.sv` | writes the tail stream into the output buffer, detects the end |
| `rtl/interconnect_switch.sv` | routes streams between feeder, frames and collector; carries RFD back |
| `rtl/ammu.sv` | accelerator MMU: TLB, AID checks, round-robin arbitration, memory master |
| `rtl/dcr_regs.sv` | control, status, route, per-frame control/AID and TLB fill registers |
| `rtl/dct8x8_accel.sv` | DCT accelerator |
| `rtl/quant_accel.sv` | quantizer accelerator |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_jpeg_accel_top` is the end-to-end test |
| `tb/tb_jpeg_workload.sv` | the JPEG call sequence at full length, and the host transfer-size sweep |
| `tb/frame_model.sv` | behavioural accelerator used in testbenches (adder with random stalls, or side-path user) |

## The frame stream protocol and backpressure

This is the part everything else relies on. Each direction of a frame carries one
`stream_t` (28 bits) plus one RFD wire going the other way:

| Signal | Width | Meaning |
|---|---|---|
| `data` | 16 | the value |
| `addr` | 9 | where the value belongs: block*64 + row*8 + col in a 512-word buffer |
| `valid` | 1 | `data`/`addr` hold a new word this cycle |
| `start` | 1 | first word of a block (asserted with `valid`) |
| `done` | 1 | last word of a block (asserted with `valid`) |
| `rfd` | 1 | sink to source: ready for data |

The rules:
- **Transfer.** A word moves on a rising edge where `valid && rfd`.
- **Backpressure.** When the sink lowers RFD, the source must hold `data`, `addr`,
  `valid`, `start` and `done` unchanged until RFD is high again. A source with no
  internal storage passes the backpressure upstream, so its own input RFD goes low too.
  Both accelerators check this with an assertion (`a_hold`).
- **Stall.** A source may drop `valid` inside a block; the sink simply waits.
- **No storage in the channels.** The switch is pure wiring. Each accelerator chooses
  its own buffering:
  - The quantizer has one output register. Its input RFD is "register empty or being
    taken this cycle", so backpressure reaches upstream in the same cycle.
  - The DCT must see a whole block before it can produce anything. It keeps RFD high
    while it collects 64 samples, then holds RFD low for the two compute passes, which
    stalls the feeder.
- **Addresses travel with the data.** A sink may store words by address, not by
  arrival order. The feeder can therefore walk a block column-major, and the DCT,
  quantizer and collector still put every value in its place.

## Feeder and collector

`stream_feeder` is the *push* engine. On `start` it walks 1 to 8 blocks of the input
buffer (CTRL[6:4] + 1), in row-major order or, with CTRL[1], column-major. It sends one
word per cycle, with `start` on word 0 and `done` on word 63 of each block. The
buffer's registered read port doubles as the feeder's output register. When RFD is low,
the read enable is simply held off, and the word stays put.

`stream_collector` is always ready. It writes each arriving word to the output buffer
at the word's address. When it has seen the `done` of the last expected block, it
pulses `complete`, which clears STATUS.busy.

## The switchable interconnect

Endpoints are numbered as follows:
- **Sources:** 0 = feeder, 1+i = output of frame i.
- **Sinks:** i = input of frame i, `NUM_FRAMES` = collector.

The ROUTE register has a 4-bit field per sink, bits [4s+3:4s]. Each field names the
source the sink listens to. A value above `NUM_FRAMES` leaves the sink unconnected, and
it then sees an idle channel. RFD flows back along the same selection. A source that no
sink selected sees RFD low, so it stalls rather than losing data.

Useful routes for the top (three frames):

| Route | Chain |
|---|---|
| `0xFFFF_3210` (reset) | feeder -> DCT -> quant -> frame 2 -> collector |
| `0xFFFF_2F10` | feeder -> DCT -> quant -> collector (JPEG) |
| `0xFFFF_1FF0` | feeder -> DCT -> collector |
| `0xFFFF_2F0F` | feeder -> quant -> collector |

Rules for software:
- **Switch between transactions.** A route change takes effect on the next cycle. The
  switch cannot know where a block boundary is, so the route should be written only
  while STATUS.busy is 0.
- **No shared sources.** Two sinks must not select the same source; `dcr_regs` asserts
  this.
- **No rings.** Frames must not be routed in a ring (a frame feeding itself, directly
  or through others); `dcr_regs` asserts this too.

Verilator reports `UNOPTFLAT` on the frame RFD arrays. It treats each array as one
variable, so it sees a false loop. A real combinational loop would need a forbidden
ring route.

## The accelerator MMU (side path)

A frame that needs data outside its stream, such as a table or a result destination,
uses the side path. It raises `rd_req` or `wr_req` together with a 32-bit virtual
address and, for a write, 16 bits of data. It holds them until it sees `ack` for one
cycle. `err` with `ack` means the access was refused. While waiting, a frame that cannot
sink more input lowers its RFD. This latency is the main reason the stream protocol has
backpressure.

`ammu` serves one request at a time, picking among frames round-robin. The TLB is
**4 entries, direct-mapped, 4 KB pages**, indexed by virtual address bits 13:12. A
request is allowed if all of these hold:
- the entry is valid;
- its virtual page number matches;
- its 3-bit AID equals the requesting frame's AID (FRAMEi[18:16]);
- for a write, the entry is writable.

The physical address is the entry's page number joined to the low 12 bits. An allowed
request goes out on the `mem_*` request/acknowledge master. A refused one is answered
with `err` two cycles after the request, pulses `fault`, and sets the sticky
STATUS[1].

Timing of an allowed access: one cycle to arbitrate, one for the lookup, then the
memory latency (`mem_req` held until `mem_ack`), then one cycle of `ack`.

The operating system fills an entry with two DCR writes:
1. **TLB_A:** VPN in [31:12], AID in [6:4], writable in [1], valid in [0].
2. **TLB_B:** PPN in [31:12]. This write installs the entry.

Writing an entry with valid clear revokes it. The AID tags let frames owned by
different processes share the TLB safely.

## Isolating a frame for reloading

A frame is reloaded by partial reconfiguration while the rest of the system keeps
running. During that time its outputs are meaningless. Setting FRAMEi[31] cuts frame i
off at the framework boundary:
- its stream output and side-path request are replaced by idle values;
- its output RFD and its input are held idle.

A chain routed through an isolated frame simply stalls, and nothing reaches the
collector. It resumes when the bit is cleared, which `tb_accel_framework` checks. Set
the bit only while the frame has no side-path request outstanding. Typically software
also routes other work around the frame.

## DCR register map

Base `DCR_BASE` = 0x080. Register offsets:

| Offset | Name | Access | Bits |
|---|---|---|---|
| 0 | CTRL | W | [0] start, [1] column-major, [6:4] blocks-1; ignored while busy |
| 1 | STATUS | R | [0] busy, [1] side-path fault (sticky, cleared by start) |
| 2 | ROUTE | R/W | 4-bit source per sink |
| 3 | TLB_A | W | see above |
| 4 | TLB_B | W | see above; commits the fill |
| 8+i | FRAMEi | R/W | [15:0] control word to frame i, [18:16] AID of frame i, [31] isolate frame i |

`dcr_ack` comes one cycle after `dcr_read`/`dcr_write`. Read data is valid with it.

## Buffers and the bus window

The input and output buffers are each 512 x 16 bits (1 KB), the reach of the 9-bit
stream address. On the 64-bit bus they sit at the following byte addresses:
- input buffer: 0x000–0x3FF;
- output buffer: 0x400–0x7FF.

Each bus word holds four 16-bit values in big-endian order: value 0 is in [63:48], and
`bus_be[7]` is the lowest-addressed byte. Reads return data with `bus_rvalid` one cycle
later.

## The accelerators

**DCT (`dct8x8_accel`).** This is the orthonormal JPEG 2-D forward DCT, computed
row-column with eight multipliers per pass.
- **Constants.** Cosines are Q15 integers taken from cos(kπ/16), k = 0..8, by symmetry.
- **Rounding.** The row pass keeps 3 extra fraction bits. Outputs are rounded and
  saturated to 16 bits. Against a double-precision DCT the error is at most 1.
- **Period.** A block takes 64 cycles to collect, 64 for the row pass and 64 to emit,
  so 192 cycles per block. The first coefficient appears 65 edges after the last sample.

**Quantizer (`quant_accel`).** Divides each coefficient by the table entry at its
position, rounding to the nearest integer with ties away from zero.
- **Table.** The standard JPEG luminance table, scaled to the encoder's default quality
  75, computed at elaboration from `QUALITY`. Each entry is max(1, (base·S+50)/100),
  where S = 200−2Q for Q ≥ 50 and S = 5000/Q below 50. `QUALITY=100` gives a
  pass-through.
- **Timing.** One word per cycle, one cycle of latency.

Neither accelerator uses its control word or the side path.

## How far to trust it, and where it departs from the original design

Each module's testbench compares it against an independently computed model. Each
testbench was also run against a deliberately broken copy of its module and failed,
which shows that it can detect faults.

The end-to-end test `tb_jpeg_accel_top` runs the top at its default size. Its
transactions are:
- T1: DCT then quantizer, 8 blocks fed column-major;
- T2: DCT alone, with its throughput checked;
- T3: quantizer alone;
- T4: a behavioural side-path accelerator in frame 2;
- T5: the same accelerator with a wrong AID.

It counts every mechanism and fails if one never occurs: backpressure, stall, route
switch, column-major feed, multi-block transaction, TLB fill, translated access and
refused access.

The workload test `tb_jpeg_workload` runs the encoder's access pattern at full
length. It makes 11,900 calls, each one macroblock, which is what a 1.4 MB test bitmap
needs. The blocks are taken from a synthetic 800-pixel-wide image. Of the 761,600
quantized coefficients, all but 120 match a double-precision reference exactly, and
none is off by more than 1. Each call keeps the accelerators busy for 195 cycles: the
192-cycle DCT block period plus the quantizer and collector stages. The test then
sweeps host transfers from 4 to 512 bytes, in 4-byte steps, through the bus window.
It runs in about ten seconds.

Departures and own choices:
- **Three frames.** The original text speaks of two reconfigurable regions, while its
  block diagram has three frames. Three are built so that a side-path accelerator can
  sit next to the JPEG pair.
- **Push only.** The original also allows the head accelerator to *pull* from the input
  buffer by address; that mode is not built.
- **DCT timing.** The original DCT was a pipelined vendor core, about 100 cycles deep,
  taking one sample per cycle. This DCT is a simpler block-at-a-time design. Its
  192-cycle period is what drives the backpressure seen in the chain.
- **One clock.** Bus, DCR and accelerators share one clock. The original DCR bus was
  slower (about three accelerator cycles per access) and clocked from the processor.
- **Not included.** The processor, the processor and peripheral buses, the DRAM and the
  DMA engine are outside this RTL. The bus slave, DCR slave and aMMU memory master are
  plain ports for them. The original DMA moves up to 2 KB per transaction, while a
  buffer here holds 1 KB (8 macroblocks), so such a transfer takes two transactions.
- **Own choices.** Register layout, route encoding, buffer size, quantization table,
  rounding and the aMMU arbitration policy.
- **Isolation.** The original only states that frames are isolated for run-time
  reconfiguration. The gating described above is this design's own way of doing it.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_jpeg_accel_top \
  rtl/saif_pkg.sv $(ls rtl/*.sv | grep -v saif_pkg) tb/frame_model.sv tb/tb_jpeg_accel_top.sv
./obj_dir/Vtb_jpeg_accel_top
```

The package must come first. `-Wno-fatal` keeps the explained `UNOPTFLAT` and the
unused-signal warnings from stopping the build. The same command works for any
testbench once its name is changed. `tb/frame_model.sv` is needed by `tb_accel_framework`
and `tb_jpeg_accel_top`. Each testbench runs in seconds; the workload test takes about
ten.

To change the design, adjust the module parameters:
- `NUM_FRAMES` (up to 7, within the 32-bit ROUTE register);
- `TLB_ENTRIES`;
- `QUALITY`;
- `DCR_BASE`.

`BUF_WORDS` is tied to the 9-bit stream address in `saif_pkg`.
