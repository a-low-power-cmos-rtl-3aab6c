# Time-to-First-Spike imager with fair, pipelined AER read-out

This is a SystemVerilog model of a CMOS image sensor that encodes each pixel's
brightness as a time. After a global start, every pixel discharges its
photodiode. A pixel emits exactly one spike, when its sensing node crosses a
threshold. Bright pixels fire early and dark pixels fire late. A pixel that
has fired asks for the read-out bus once. It is read, it resets itself, and it
stays in stand-by until the next frame. Unlike spiking pixels, which fire
again and again in proportion to their light, no pixel here can hold the bus
more than once per frame.

The read-out uses Address-Event Representation (AER). The sensor sends the
*address* of the pixel that fired, tagged with a time-derived data word, over
a shared bus. Asynchronous arbiter trees decide who gets the bus. This model
has three features that cut the queueing delay ("timing error") that
collisions cause:

1. **Pipelined row and column arbitration.** Row buffers and column buffers
   let the row arbiter choose the next row while the column arbiter is still
   sending the current one.
2. **A hierarchical column arbiter.** Eight 16-input sub-trees work on one
   row in parallel and share one output bus.
3. **Radix-4 arbiter cells.** The trees are shallower. Each cell
   arbitrates fairly: its priority moves on after every grant.

A counter, with a step time for each level read from an SRAM, turns the 1/I
time-to-first-spike law back into a code that is roughly linear in the
photocurrent.

The silicon is asynchronous and partly analog. Here everything is clocked
RTL; the section *Departures* lists what that changes.

## Signal flow of one event

```
 pixel(r,c) --WrdReq[r]--> row_buffer[r] --req--> row AER tree (128 leaves, radix 4)
            <--WrdAck[r]-- row_buffer[r] <--ack--
 pixel(r,c) --ColReq[c]--> column_buffer[c] --held--> column_aer --> out_row/out_col/out_data
            <--ColAck[c]-- column_buffer[c]       ca_busy --> all row_buffers
```

1. `start` recharges every pixel. Pixel (r,c) fires after
   `Tf = ceil((Vdd - VTH) / iph)` clocks.
2. The fired pixel raises its row line. The row buffer passes the request to
   the row AER tree. The tree acknowledges one row.
3. The row buffer lets the acknowledgement through to the row (`wrd_ack`),
   but only if the column AER is idle.
4. Every fired pixel of that row drives its column line. The column buffers
   latch all of them in one clock and acknowledge them at once.
5. A pixel that sees both its row and its column acknowledgement resets
   itself and enters stand-by.
6. The column AER now holds the row (`ca_busy` high). It stores the row
   address, and it sends the latched columns one per clock as
   `(out_row, out_col, out_data)`.
7. When a row buffer sees `ca_busy` while its row is acknowledged, it
   *kills* its request (M17 in the circuit). The row AER can then choose
   the next row at once. That row's acknowledgement waits in its row buffer
   (M20) until `ca_busy` falls. So arbitration of row *k+1* overlaps the
   transfer of row *k*.
8. A pixel can fire after its row was taken but before the kill is lifted.
   It then simply requests its row again.

### Clock-level timing of one row (`tfs_imager`, `row_buffer`, `column_buffer`)

| clock | row buffer *i*                 | column side                         | pixels of row *i*      |
|-------|--------------------------------|-------------------------------------|------------------------|
| t0    | `ack_raer[i]`=1, `ca_busy`=0   | idle                                |                        |
| t1    | `wrd_ack[i]`=1 (registered)    | `col_req` lines high                | drive `col_req`        |
| t2    | `wrd_ack[i]`=1, sees `ca_busy` | columns latched, `ca_busy`=1, first event offered | see `wrd_ack` & `col_ack` |
| t3    | killed, `wrd_ack[i]`=0         | next column ...                     | stand-by               |
| t3    | row AER acknowledges row *i+1*; `row_buffer[i+1]` holds it | ... | |
| tN    | kill lifted when `ca_busy` falls | last column sent, `ca_busy`=0    |                        |
| tN+1  | `wrd_ack[i+1]`=1               |                                     |                        |

With the receiver always ready, a row with *k* fired pixels takes about
*k* + 2 clocks. Only the `ca_busy` → `wrd_ack` hand-over is not hidden behind
the transfer of the previous row.

## The fair arbiter cell (`aer_cell`)

Each cell has three parts:

* **Arbitration.** The cell chooses one of its `RADIX` requests. It keeps
  that choice for as long as the chosen request stays up, like the
  cross-coupled latch it models.
* **Propagation.** `req_up` is the OR of the requests.
* **Acknowledgement.** `ack_up` goes only to the chosen input.

The choice is made combinationally and stored at the clock edge. When the
chosen request drops, a waiting one takes over in the same clock.

**Fairness.** A priority pointer decides between requests that arrive
together. It moves after each arbitration, that is, when the chosen request
is withdrawn.

* **Radix 2:** the pointer toggles, like the `switch` of the two-input
  circuit. A pair arriving together is served 0 then 1. A lone request 0
  after that is served, and the next pair is then served 1 first.
  `tb_aer_cell` replays exactly this sequence.
* **Radix above 2:** the pointer moves to the input after the one just
  served (round robin). A pointer that only stepped by one would let the
  same input beat the same competitor twice in a row. `tb_aer_tree` checks
  that two contenders alternate, both inside one cell and across sub-trees.

A cell keeps its upward request while any of its inputs requests. A busy
sub-tree therefore finishes its pending requests before the grant moves
elsewhere. This cannot starve anyone here, because every pixel requests only
once per frame.

`aer_tree` builds `ceil(log_RADIX N)` levels of cells and pads the leaves up
to `RADIX**L` with inputs that never request. Its delay grows with that depth
(delay ≈ cell delay × log_r m). The depths are 4 levels for the 128 rows,
2 levels for a 16-column sub-tree, and 4 or 6 levels for radix 2 at 16 or 64
inputs.

## Hierarchical column AER (`column_aer`)

The 128 column-buffer outputs are split into eight blocks of 16. Each block
has its own radix-4 tree and its own 4-bit address encoder. A top tree of the
same fair cells chooses the block that drives the shared bus. Its encoded
choice gives the upper 3 column-address bits, and the block's local address
gives the lower 4.

`ca_busy` is the OR of all held columns. The encoded row acknowledgement is
stored while `ca_busy` is low and frozen while it is high. This matters
because the row acknowledgement has already moved on to the next row while
the columns are still being sent.

## Sampling counter and SRAM (`tfs_control`, `ctrl_sram`)

The first-spike time is `Tf = K / I`, with `K = Vdd - VTH` in model units. A
linear time counter would give codes proportional to 1/I. `tfs_control`
works differently:

* At `start` it loads its top level (255).
* It counts down one level per step of a *modulated* sampling clock
  (`sample_tick`).
* It stays on level D for `SRAM[D]` base clocks. A stored 0 counts as 1.
* It stops at 0.

The data word of an event is the counter value at the moment the event
leaves on the bus.

To get a code proportional to the photocurrent, level D should start at
`K/(D+1)` clocks. The SRAM is therefore loaded with

```
SRAM[255] = floor(K/255)
SRAM[D]   = floor(K/D) - floor(K/(D+1))      for 1 <= D < 255
```

With this table, a pixel read right after its spike gets a code just below
its photocurrent code. The counter can step at most once per clock, so every
SRAM word must be at least 1. That needs `K >= 255 * 256`. This is why the
pixel model uses `VW = 17`, giving `K = 65535` (the brightest pixel fires
after 257 clocks). Any other transfer curve can be loaded through the write
port. The SRAM is not reset and must be written before the first frame.

## Pixel model (`tfs_pixel`, `pixel_frontend`, `pixel_array`)

`pixel_frontend` is a *behavioural* model of the analog parts: the
photodiode and its capacitance, the reset transistors, and the
current-feedback event generator. It is written so that it synthesises.

* The sensing node `vn` is a 17-bit number; all ones stands for Vdd.
* It drops by `iph` every clock and saturates at 0.
* `event_x = (vn <= VTH)`, with `VTH = 2**16`.
* `start` recharges the node. `hold` (the self-reset) keeps it at Vdd.

`tfs_pixel` adds the handshake as a three-state machine
(`PX_STANDBY`, `PX_INTEGRATE`, `PX_FIRED`, in `tfs_pkg`):

* `wrd_req` is high in `PX_FIRED`.
* `col_req = PX_FIRED & wrd_ack`.
* The pixel goes to stand-by on `wrd_ack & col_ack`.

`pixel_array` ORs the requests onto the shared row and column lines. In
silicon these are wired-OR active-low lines.

## Parameters (`tfs_imager`)

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `ROWS`, `COLS` | 128, 128 | pixel array | the sensor described |
| `SUB` | 16 | columns per column sub-tree (8 sub-trees) | the sensor described |
| `RADIX` | 4 | inputs per arbiter cell | the sensor described |
| `VW` | 17 | width of the sensing-node model | own choice (see above) |
| `IW` | 8 | photocurrent code width | own choice |
| `VTH` | 2**(VW-1) | event threshold | own choice |
| `DW` | 8 | data word / counter width (256 levels) | own choice |
| `TW` | 16 | SRAM word (dwell time) width | own choice |

Top-level ports:

* Inputs: `clk`, `rst_n`, `start` (one clock), `iph[ROWS][COLS]`, and the
  SRAM write port `sram_we/sram_addr/sram_wdata`.
* Output bus: `out_valid/out_ready/out_row/out_col/out_data`. An event is
  transferred on a clock where `out_valid && out_ready`.
* Observation: `ca_busy`, `all_standby` (every pixel has been read, or was
  never started) and `sample_tick` (one pulse per counter step).

## Files

| file | content |
|------|---------|
| `rtl/tfs_pkg.sv` | pixel state type, tree-depth function |
| `rtl/tfs_imager.sv` | top level |
| `rtl/pixel_array.sv`, `rtl/tfs_pixel.sv`, `rtl/pixel_frontend.sv` | pixels |
| `rtl/row_buffer.sv`, `rtl/column_buffer.sv` | row and column buffers |
| `rtl/aer_cell.sv`, `rtl/aer_tree.sv`, `rtl/addr_encoder.sv` | arbiter cell, tree, encoder |
| `rtl/column_aer.sv` | hierarchical column AER |
| `rtl/tfs_control.sv`, `rtl/ctrl_sram.sv` | sampling counter and its SRAM |
| `tb/tb_<module>.sv` | one self-checking test per module |
| `tb/tb_imager_env.sv` | stimulus and scoreboard shared by the two imager tests |
| `tb/tb_tfs_imager.sv` | imager at 16 x 32, two frames |
| `tb/tb_tfs_imager_full.sv` | imager at full default size, one frame |

## Simulating

Every test prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tfs_pkg.sv tb/tb_tfs_imager.sv \
          --top-module tb_tfs_imager -o sim && obj_dir/sim
```

Swap in any `tb/tb_<name>.sv` and its module name. The simulator has only
two states, so every register that is read is reset. The SRAM is written by
the tests.

The imager tests work as follows:

* They give each pixel a photocurrent, with a share of dark pixels and many
  repeated values, so that whole groups fire in the same clock.
* They load the SRAM table above and run frames with a receiver that stalls
  at random.
* For every event they check:
  * it comes from a lit pixel, and that pixel is read only once;
  * it is not read before its first-spike time;
  * its data word equals a model of the counter and is not above the
    pixel's photocurrent.
* At the end, every lit pixel has been read and no event is left.
* They count how often each mechanism occurred: row collisions, row
  acknowledgements held back by `ca_busy` (pipelining), kills, rows
  requested again after a kill, several columns latched together, several
  sub-trees busy together, receiver stalls, and counter steps. A mechanism
  that never occurred counts as a failure.

The full-size test reads one complete 128 x 128 frame at default
parameters. Building it with verilator takes several minutes.

## Departures from the described circuit, and limits

* **Clocked, not asynchronous.** Every 4-phase handshake is a
  registered request/acknowledge pair on one clock. Ordering and
  arbitration follow the circuit. Delays in nanoseconds, metastability and
  the analog timing of the latch cannot be represented. The delay
  comparison of radix-2 and radix-4 trees therefore shows up here only as
  tree depth.
* **Analog parts are behavioural.** These are the photodiode, the reset
  transistors and the event generator. The linear discharge and the
  threshold are kept. Leakage, noise, the feedback of the event generator
  and power are not modelled.
* **Own choices** where the circuit description is silent:
  * the output bus handshake;
  * data taken at transfer time (so queueing delay appears in the data);
  * latching column requests only while the column AER is idle;
  * the top tree that shares the bus among the column sub-trees;
  * the round-robin rule for radix 4;
  * all widths except the array and tree sizes;
  * the counting direction of the sampling counter and its table format.
* **Fixed-priority cells,** used only as a comparison point for the fair
  cell, are not provided.
* **Physical properties** are outside RTL: pixel area, fill factor, the
  0.35 µm process and layout.
