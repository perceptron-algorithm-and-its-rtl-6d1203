# A two-input perceptron trainer in fixed point

This is a small hardware accelerator that trains a single perceptron with
two inputs and a bias. It is built to be as simple as possible. There is one
learning core and four plain single-port memories. No DMA and no floating
point. Each training point is a pair (x1, x2) with a class label 0 or 1. The
core runs the classic perceptron rule over the points in memory and keeps the
weights in memory. At the end it reads the weights out one word per cycle.

The whole thing is about 120 flip-flops, a 16x16 multiplier pair, an adder
tree and four 256 x 16-bit memories.

## Numbers: everything times 512

Inputs and weights are real numbers, but the hardware only stores 16-bit
integers. Each of x1, x2, w1, w2 and b is stored as `round(value * 512)`.
That is two's-complement fixed point with 9 fraction bits. The range is
[-64, 64) and the step is 1/512. The label is **not** scaled; it is the
plain integer 0 or 1.

Why that split works:

* **Output.** `s = w1*x1 + w2*x2 + b` is computed with both factors of each
  product scaled, so each product carries a factor 512*512 = 2^18. The bias
  carries only 512, so it is shifted left by 9 bits before it is added. Only
  the sign of `s` matters (`y = 1` if `s >= 0`, else `0`), and scaling does
  not change a sign. Each product is a full 32 bits. The sum is 34 bits, so
  nothing overflows. With narrower product registers the weights fail to
  converge.
* **Update.** `w_k += eta * (label - y) * x_k`. `label - y` is -1, 0 or +1
  because the label is unscaled. `x_k` is already scaled by 512, so the
  step lands on the weight scale with no correction. The bias step is
  `eta * (label - y) * 512`.
* **Learning rate.** `eta = 2^-LR_SHIFT`, and the default is 1/2. The step is
  an arithmetic right shift of `x_k`, so no multiplier is needed.
* **Saturation.** A new weight that would leave the 16-bit range is clamped to
  32767 or -32768 instead of wrapping.

To read a weight back as a real number, divide the stored integer by 512.

## The core's loop

`perceptron_core` is one state machine. For each point `i` in
`0 .. num_samples-1` it goes through these states:

| cycle | state  | weight memory (mem-w)         | data memories                    |
|-------|--------|-------------------------------|----------------------------------|
| 1     | RD_W1  | read addr 0 (w1)              | read addr i (x1, x2, label)      |
| 2     | RD_W2  | read addr 1 (w2); capture w1  | outputs now hold point i         |
| 3     | RD_B   | read addr 2 (b); capture w2   |                                  |
| 4     | CALC   | b on the output: compute y and the new weights | |
| 5-7   | WR_*   | write w1, w2, b               |                                  |

The weights really do go back to memory after every point. The next point
reads them again. So the weights in mem-w are always current, and a later
pass continues from where the last one stopped. In prediction-only mode
(`learn = 0`) the three writes are skipped and a point takes 4 cycles.

After the last point the core reads mem-w addresses 0, 1 and 2. The final
w1, w2 and b then appear on `w_data_out` on three consecutive cycles, marked
by `wout_valid` and `wout_idx`. One cycle later `done` pulses.

Latency from the clock edge that samples `start` to the edge that raises
`done`:

* learning: `7*N + 4` cycles
* prediction only: `4*N + 4` cycles

For every point, `pred_valid` pulses with `pred` (y), `pred_label` and
`pred_idx`. A host can score accuracy from these outputs alone.

## Memories

`mem_unit` is the memory used four times:

* `u_mem_x1` holds x1 of each point.
* `u_mem_x2` holds x2 of each point.
* `u_mem_label` holds the label of each point.
* `u_mem_w` holds w1, w2 and b at addresses 0, 1 and 2.

Pins: `ena`, `w` (1 = write, 0 = read), `addr[7:0]`, `din[15:0]`,
`dout[15:0]`, `clk`, `rst`.

* A read is registered. The data is on `dout` after the next clock edge, and
  it stays there until the next read.
* A write leaves `dout` unchanged.
* `rst` clears `dout` only. The array is not cleared, so it can be replaced
  by an SRAM macro.

The three data memories share one read request from the core. All three
always read the same point.

## Top level and host port

`perceptron_top` wires the core to the four memories. It also adds a host
port so the memories can be filled and inspected. While the core is idle, the
host owns the memories:

* `host_sel` picks the memory: 0 = x1, 1 = x2, 2 = label, 3 = weights.
* `host_ena` / `host_w` / `host_addr` / `host_din` behave like the memory
  pins.
* A host read shows on that memory's `*_data_out` one cycle later.

While `busy` is high, the core owns all four memories and the host port is
ignored.

A typical session:

1. Write the initial weights (for example 0, 0, 0) to mem-w addresses 0 to 2.
2. Write up to 256 points to the x1, x2 and label memories.
3. Pulse `start` with `learn = 1` and `num_samples = N`. Wait for `done`.
   Repeat for more passes, or load the next batch first.
4. Load test points. Pulse `start` with `learn = 0` and count
   `pred == pred_label`.

## Where this design departs from, or adds to, the original description

* **Memory depth.** The memories have 8-bit addresses, so each holds 256
  words. The reference data set has 500 training and 200 test points. The
  200 test points fit in one load. The 500 training points do not, so they
  are trained in two batches of 250. The weights carry over in mem-w between
  batches.
* **Value range.** A 16-bit word divided by 512 can reach 128 only when read
  as unsigned. The weights must be signed, so here the word is two's
  complement and the range is [-64, 64).
* **Learning rate.** The learning rate is not specified. The default of 1/2
  is a choice (`LR_SHIFT = 1`).
* **Activation at zero.** `y = 1` when the sum is exactly 0. This is a
  choice.
* **Saturation.** Clamping new weights to the 16-bit range is a choice.
* **Added for usability.** The host port, the `start` / `busy` / `done`
  handshake, the prediction-only mode and the weight addresses in mem-w are
  this design's own.
* **Not modelled.** The original results include an area of 0.0078 mm^2 and
  clocks of 1.25 to 1.91 GHz in a 25 nm library. RTL simulation cannot
  confirm them.

## Files

| file | contents |
|------|----------|
| `rtl/perceptron_pkg.sv` | widths, the x512 scale, weight addresses, `mem_req_t`, saturation function |
| `rtl/mem_unit.sv` | single-port 256 x 16 memory |
| `rtl/perceptron_core.sv` | the learning state machine and datapath |
| `rtl/perceptron_top.sv` | core + four memories + host port |
| `tb/mem_unit_tb.sv` | memory: latency, enable, hold, reset |
| `tb/perceptron_core_tb.sv` | core against an integer reference model, including saturation and cycle counts |
| `tb/perceptron_top_tb.sv` | full-size end-to-end run |

## Verification

Every testbench checks itself against values it computes on its own. Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

`perceptron_top_tb` runs the top at its default parameters and works only
through the host port:

* It makes a 700-point data set: x1 and x2 uniform in [-8, 8), label
  `x1 > x2`, and points within 1/4 of the line dropped.
* It trains on 500 points in batches of 250 for 6 passes.
* It tests on the other 200 points and requires at least 95% accuracy.
* It then reads memories back, tries a host write while busy, saturates the
  weights with large values, and runs one pass over all 256 words.

Each prediction, each weight read out, each cycle count and the weights left
in mem-w are compared with an integer reference model. A typical run learns
about w1 = 14.2, w2 = -14.1, b = -1.5 and classifies all 200 test points
correctly. Each mechanism is counted and must occur at least once:

* weight update
* correct point with no update
* saturation
* learning run
* prediction-only run
* serial weight output
* host load and read
* host write ignored while busy
* full-depth pass

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/perceptron_pkg.sv tb/perceptron_top_tb.sv --top-module perceptron_top_tb
./obj_dir/Vperceptron_top_tb
```

Swap in `mem_unit_tb` or `perceptron_core_tb` to run the other testbenches.
Each finishes in well under a second.
