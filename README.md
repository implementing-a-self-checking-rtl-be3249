# Self-checking neural photon event identifier

An image-intensified CCD camera (microchannel-plate electron multiplier,
phosphor screen, fibre-optic coupling, 512 x 512 CCD read at 20 Mpixel/s)
records single photons as small blobs of charge. Each blob is roughly
Gaussian and about 5 x 5 pixels across. Most pixels hold nothing of
interest, so the frames are screened on board: every 5 x 5 window of the
image goes through a small recurrent neural network. The network keeps or
clears each pixel of the window, and the pattern of surviving pixels says
whether the window holds a genuine photon event.

The system is meant for radiation environments and SRAM-based FPGAs, so
every result must be checked as it is computed. The arithmetic is carried
out in **AN codes**: a value v is stored and computed as 3v or 9v. An adder
or multiplier fed with multiples of 3 (or 9) produces a multiple of 3 (or 9)
when it works correctly. A single upset bit almost always breaks that
divisibility, and a residue checker catches it. Memories and links use
parity, links are duplicated, comparators are duplicated, and the controller
is triplicated.

This repository holds synthesizable SystemVerilog for the digital part: the
CCD interface, the 25 self-checking neurons and the TMR-protected controller.
It also holds self-checking testbenches for every module.

## The network

Window positions are numbered j = 0..24 in row-major order (row = j / 5). Each
neuron holds an 8-bit state s_j, which starts at its pixel value. One
iteration computes, for all neurons at once:

    x      = sum_i w[class(i)] * s_i  -  theta
    y      = 0                   if x <= -128 T
             255                 if x >=  128 T
             floor(128 + x / T)  otherwise
    s_j'   = s_j   if |y - s_j| < s_j / 4
             0     otherwise

After three iterations the event flag of neuron j (NZ) is `s_j != 0`.

The charge blob is symmetric under rotation about the window centre. Only
six weights are therefore independent. The class of a position is the
unordered pair of its row and column distances from the centre:

    class map          classes
    5 4 3 4 5          0 = centre            (1 position)
    4 2 1 2 4          1 = edge neighbour     (4)
    3 1 0 1 3          2 = diagonal           (4)
    4 2 1 2 4          3 = two straight out   (4)
    5 4 3 4 5          4 = knight's move      (8)
                       5 = corner             (4)

The weight of input i depends only on where i lies in the window. So
x, and hence y, is the same for every neuron. A neuron differs from the others
only in its own state, which it compares with y. Each neuron still computes x
itself, so that each neuron (originally one FPGA) is complete and
self-checking on its own.

Number formats (in `pe_pkg`):

| quantity | range | stored as |
|---|---|---|
| pixel | 8-bit unsigned | 9 bits: `{odd parity, pixel}` |
| state s | 0..255 | 3s, 10 bits |
| weight w | 8-bit signed | 3w, 10 bits signed |
| threshold theta | 16-bit signed | 9 theta, 20 bits signed |
| temperature T | 12-bit unsigned | 9T, 16 bits |
| activation x | | 9x, 26 bits signed |

## From camera to result

```
camera ──► ccd_interface ──col A..E (x2)──► event_id_unit (5 boards x 5 neurons)
              parity, 4 line FIFOs             │ NZ[25]  ERROR[25][2]  busy
                                               ▼
host ◄──── results, errors ──── nn_controller (3 copies + voter) ──CMD──►
```

**`ccd_interface`** adds a parity bit to each incoming pixel and loads it
into register E. The pixel also goes into a chain of four `line_fifo`s,
each 512 x 9 and one image row long. Once a FIFO holds a full row, each new
pixel pushes the pixel one row up out into the next register (D, C, B, A)
and into the next FIFO. After each pixel, A..E therefore hold one column of
the window. The column goes out on two identical copies. The interface also
counts rows and columns, and marks a window complete (`win_valid`) when it
lies wholly inside the frame. Before the FIFOs have filled, they deliver a
coded zero pixel.

**`event_id_unit`** holds five `neural_board`s of five neurons. Board r takes
register r of the column (A = oldest row) into its first neuron. Every INIT
command moves each pixel one neuron along its board, so the 25 neurons
always hold the current 5 x 5 window. All neurons share the CMD bus. The
SIN25 bus has one line per neuron: each neuron sends its state on its own
line and reads all 25.

**`nn_controller`** runs three `nn_controller_core` copies and a
`tmr_voter`:
1. `host_download` encodes the host's weights, threshold and temperature
   (3w, 9 theta, 9T). It shifts the resulting 96 bits into every neuron's
   parameter register, one bit per cycle, as LOAD commands.
2. For each pixel the controller takes (`pix_ready`), it sends INIT.
3. If the window is complete, it sends three ITER commands, each after all
   neurons are idle. It then presents one result:
   - `res_nz`: the 25 event flags;
   - `res_event`: the centre neuron's flag;
   - `res_row`, `res_col`: the window centre.
4. Every cycle it samples the 25 two-rail error pairs, and keeps a sticky
   mask of the neurons that reported an error.

## Inside a neuron, and where each fault is caught

One ITER takes 23 cycles when the activation has to be divided and 15 when
it saturates. Edges are counted from the one that samples ITER:

| edges | stage | work | check |
|---|---|---|---|
| 1..10 | serial exchange | each neuron shifts out 3s, LSB first. The `wss` counts the ones of each class in every bit slice and adds them, shifted by the bit position, to six class sums | the two SIN25 copies must agree |
| 11 | multiply | class sum x 3w gives six 9N products | class sums divisible by 3 |
| 12 | add | sum of the products minus 9 theta gives 9x | products divisible by 9 |
| 13 | saturate (`sfs`) | compare with +-128 x 9T | 9x divisible by 9; the two comparator pairs must agree; 9T divisible by 9 |
| 14..21 | divide | 8 restoring shift-and-subtract steps on 9(x+128T) by 9T, building 3y | after every step: remainder divisible by 9, partial 3y divisible by 3 |
| 22 | update | stability rule, computed twice | the two results must agree; new state divisible by 3 |
| 23 | write | OUT_Reg takes the new state, busy falls | OUT_Reg divisible by 3 (continuously) |

More checks run outside the table:
- **INIT**: the Initialization Interface checks the parity of both pixel
  copies and compares the copies.
- **Parameters**: the parameter register checks its fields (divisible by 3
  or 9) whenever no download is in progress.
- **NZ flag**: computed two ways and compared.

Every checker gives its verdict as a two-rail pair:
- a valid pair is 01 or 10;
- an error is 00 or 11.

A chain of two-rail checker cells (`two_rail_checker`) merges all the
pairs into one pair per neuron. That pair is the neuron's line on the ERROR
bus.

The division is the least obvious part. The quotient has 8 bits, so eight
compare-and-subtract steps of the shifted divisor 9T·2^k give floor(u/T)
directly. Both the remainder and the divisor are multiples of 9, so each
step stays inside the code, and the residue check after each step can work
without decoding anything.

## Timing and interfaces

- **Camera:** a pixel moves when `pix_valid` and `pix_ready` are both high.
  The controller lowers `pix_ready` while it analyses a window. This
  stalls the camera stream, which a real camera cannot accept (see below).
- **Cycles per pixel:**
  - incomplete window: 2 cycles;
  - complete window: 78 cycles if every iteration divides, 54 if every
    iteration saturates.
  A simulated 512 x 512 frame averaged 67.5 cycles per pixel.
- **Host:** pulse `host_download` with `host_params` valid.
  `params_loaded` rises 97 cycles later. No pixel is taken before that.
- **Results:** `res_*` is valid for the one cycle in which `res_valid` is
  high. Results come in raster order of the window centres.
- **Errors:** `err_neurons`, `err_flag` and `err_tmr` are sticky until
  reset.
- **Reset:** `rst_n` is asynchronous and active low. `frame_start` is a
  one-cycle pulse before the first pixel of a frame. It clears the
  counters and empties the FIFOs.

## Choices this design makes, and departures

Taken from the source description:
- the window and network equations, and alpha = 1/4;
- three iterations and six weight classes;
- four 512 x 9 FIFOs with registers A..E;
- parity on pixels, 3N weights and states, 9N threshold, temperature and
  arithmetic;
- checks after every division step;
- duplicated links, comparators and NZ flag;
- two-rail error signals and a TMR controller.

This design's own choices:
- **Weight classes** follow the position of the input in the window, as the
  equation is written with a weight indexed only by the input. If instead
  the weights should depend on the offset between two neurons, change
  `class_of` in `pe_pkg` (and `CLASS_TAB` in `tb_ref_pkg`) to take both
  indices.
- **Event decision:** an event is declared when the centre neuron survives.
  The pattern itself is also returned, so a host can apply a richer rule.
- **Division** uses binary restoring steps (8 per output) instead of up to
  255 single subtractions of T.
- **No pipelining across windows.** The weighted sum of the next window
  does not run while the output of the current one is being formed. The
  iterations of one window depend on each other, and overlapping windows
  would need a second state register in every neuron. Arithmetic stages
  are still registered.
- **The camera is throttled** by `pix_ready`. A free-running 20 MHz camera
  would need a clock of about 1.1 GHz at the cycle counts above, or more
  parallel hardware; the source gives no clock rate for the neural unit.
- **Widths and encodings:** threshold 16 bits, temperature 12 bits, odd
  parity, LSB-first serial order, and the CMD encoding (NOP, LOAD, INIT,
  ITER plus one data bit).
- **Unprotected paths:** the CMD bus to the neurons is not duplicated.
  Parameters arrive coded and are checked in every neuron, so a corrupted
  LOAD bit is still detected.
- **TMR scope:** the voter votes the controller outputs only. An upset copy
  is outvoted and flagged, and it resynchronises when its state is next
  rewritten. It is not actively repaired.
- **Not built:** the analog detector chain (microchannel plate, phosphor,
  optics), the CCD camera, the host computer, the configuration memories,
  and on-board learning. Training happens off-line, and the trained weights
  come in through `host_params`.

## Simulating

Every file in `rtl/` holds one module or package; `pe_pkg.sv` must be read
first. Each testbench in `tb/` compares against `tb_ref_pkg`, an integer
model of the network written independently of the RTL. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/pe_pkg.sv tb/tb_ref_pkg.sv tb/tb_photon_event_system.sv \
  --top-module tb_photon_event_system
./obj_dir/Vtb_photon_event_system
```

| testbench | what it shows |
|---|---|
| `tb_photon_event_system` | two 12 x 10 frames end to end, with two parameter sets; every result checked. Also: a forced SIN25 duplication fault is reported, and an upset in one controller copy is outvoted and flagged. It counts stalls, FIFO filling, skipped windows, low/high saturation, division, kept and cleared states, and event and no-event windows, and fails if any never happened |
| `tb_photon_event_system_full` | one full 512 x 512 frame at the default parameters, all 258,064 complete windows checked (about 2 minutes) |
| `tb_event_id_unit` | the 25 neurons driven directly; NZ pattern per window; parity error detection |
| `tb_neural_board` | one board as row 1 of the window, the other rows modelled on SIN25; its five NZ flags per window; a copy mismatch at the board input is reported by its first neuron |
| `tb_neuron` | one neuron among 24 modelled neighbours: state after each iteration, busy length 23/15 cycles, error detection |
| `tb_wss`, `tb_sfs` | activation value and 12-cycle latency; sigma_T, stability rule and 1/9-cycle latency |
| `tb_ccd_interface`, `tb_line_fifo` | window columns, parity, window position; FIFO order and flags |
| `tb_init_interface`, `tb_param_reg` | coding and the checks at INIT and download |
| `tb_nn_controller`, `tb_tmr_voter` | command sequence, results, error latching, TMR masking |
| `tb_residue_checker`, `tb_two_rail_checker` | checker verdicts, exhaustively or at random |

`LINE` and `ROWS` on `photon_event_system` set the frame size (default
512 x 512). All other sizes are in `pe_pkg`.
