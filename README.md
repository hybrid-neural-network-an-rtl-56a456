# HybridNet: a frame-grouping, event-driven ANN for a dynamic vision sensor

A dynamic vision sensor (DVS) does not deliver images. Each pixel sends an
address-event (AER) when its brightness changes. Spiking networks can use such
events directly, but they are hard to train and need many spikes per pixel.
HybridNet takes a middle road:

* A **frame-maker** watches the event rate. When something moves in front of
  the sensor, it gathers the events of that burst into one small binary frame
  (28x28 pixels). When nothing happens, no frame is made and the rest of the
  chip stays idle. The result behaves like a camera whose frame rate adapts
  to the scene.
* The frame then runs through an ordinary ANN with ReLU neurons and
  **4-bit** weights and membranes. The ANN can be trained off-line as a normal
  frame-based network. Layers do not share a clock schedule. They only
  exchange AER events: a neuron sends one event carrying its address and its
  4-bit value, and an **end-of-frame (EOF)** command tells the next layer that
  the frame is complete.
* When a layer receives EOF, each neuron with a positive membrane sends
  exactly one event and every neuron resets to zero. Each neuron therefore
  fires at most once per frame. That is where the low event count, and the
  low energy, come from.

The network built here is the digit classifier (MNIST-sized input):

```
 DVS --AER--> aer_rx --> frame_maker --> conv_core x3 --> subsample_pool --> fc_layer --> max_select --> aer_tx --AER--> host
 (4-phase)              128x128 -> 28x28   5x5 kernels     2x2 max, 3x12x12    10 neurons    digit        (4-phase)
                        Active/Frame_rdy   24x24 neurons   merges 3 streams
```

## Event format and handshake

Every link between layers is a valid/ready stream of `hnn_pkg::aer_evt_t`:

| field | bits | meaning |
|-------|------|---------|
| `eof` | 1 | end-of-frame command; the other fields are ignored |
| `ch`  | 2 | feature map (channel) of the sending neuron |
| `y`, `x` | 5 + 5 | position of the sending neuron |
| `val` | 4 | the neuron's value (its positive membrane; 1 for an input pixel) |

An event moves when `valid` and `ready` are both high. A sender holds its
event steady until it is taken. Every layer can stall the one before it, so
no events are lost inside the network.

## Frame-maker: deciding when a frame exists

`frame_maker` contains five parts:

* `fm_timer` is a prescaler. Its `tick` comes every `TICK_DIV` cycles (220
  cycles by default, 1 us at 220 MHz). Its `time_now` counts the ticks.
* `event_rate_calc` counts sensor events over a sliding window of `N_BINS`
  bins of `BIN_TICKS` ticks each (default 10 x 100 ticks, i.e. 1 ms). `rate`
  is the sum of the last `N_BINS - 1` closed bins plus the count of the open
  bin. It is updated one cycle after every event, so a burst reaches the
  threshold at the event that makes the count equal to it, not at a window
  boundary. It falls back to zero at most `N_BINS` bins after the last event.
  The sum saturates.
* `fm_controller` is a two-state machine:
  * **Non-active to Active** when `rate >= threshold` and at least `ref_time`
    ticks have passed since it last became Non-active. This is the
    refractory time.
  * **Active to Non-active** when `rate < threshold` and at least `hold_time`
    ticks have passed since it last became Active. This is the minimum
    frame length.

  Times are compared as differences, so the wrapping timer does no harm.
* `frame_memory` holds a 28x28x1 bit image. A sensor event at (x, y) maps to
  pixel (x/4 - 2, y/4 - 2). The 128x128 sensor is subsampled by 4 to 32x32,
  and 2 pixels are cut from each border, which leaves 28x28. Events that land
  in the border are dropped. Pixels are set only while Active is high, and
  only if the memory was free when Active rose. When Active falls,
  `frame_rdy` rises.
* `frame2aer` scans the ready frame in row order, one pixel per cycle. For
  each set pixel it sends an event with `val = 1`, clearing each pixel as it
  goes. Then it sends EOF and releases the memory.

A frame is captured only when Active rises while no earlier frame is waiting.
Events that arrive while a frame is still being read out are dropped. The
memory has one buffer only. Choose `ref_time` longer than the read-out time if
no burst may be lost; the read-out is limited by the convolution layer, about
30 cycles per set pixel.

The sensor word assumed by `frame_maker` is `{1'b0, y[6:0], x[6:0], polarity}`.
Both polarities set a pixel.

## Convolution cores: the costly part

There are three `conv_core`s. Each holds a 5x5 signed 4-bit kernel and 24x24
signed 4-bit membranes. All three receive the same events: the top hands an
event over only when all three are ready, so the cores stay in lock-step.

For an input event (x, y, val), the core visits the 25 kernel taps in order
(ky, kx). Tap (ky, kx) updates the neuron at (y-ky, x-kx), if that neuron
exists, with

    mem = sat4(mem + w[ky][kx] * val)

The update runs through a two-stage pipeline. The first stage computes the
address and the product. The second does a read-modify-write of the membrane
memory. Two taps of the same event never hit the same neuron, so the pipeline
needs no forwarding. The sweep needs 27 cycles. The core takes the next event
`EV_CYCLES` = 30 cycles after the previous one, which is the per-event time
of the original implementation.

The membranes sit in two banks. Events accumulate into one bank. When EOF
arrives, the banks swap, and a scanner walks the finished bank while the next
frame's events already accumulate into the other. The scanner visits the 576
neurons in row order. Each positive neuron sends
`{ch = CH_ID, y, x, val = membrane}`. Every neuron, positive or not, is
cleared. Then the scanner sends EOF. If the next EOF arrives while the
scanner is still busy (a frame of fewer than about 20 events), the EOF waits.
The core therefore takes a new frame every 30N + 1 cycles for N events,
which is the pipelined throughput the original design reports. After reset
the core spends 576 cycles clearing both banks before it raises `in_ready`.

## Subsampling, fully connected layer, MAX

* **`subsample_pool`** does 2x2 max pooling. It takes the three core outputs
  on separate ports and merges them with a round-robin arbiter, one event per
  cycle. It keeps the largest value seen for each of the 3x12x12 units. The
  channel comes from the port number. Once all three cores have sent EOF, it
  sends every non-zero unit in (ch, y, x) order, clears its store and sends
  EOF.
* **`fc_layer`** holds ten neurons. Each input event selects one weight row,
  `ch*144 + y*12 + x`, which holds ten 4-bit weights. All ten membranes update
  in the same cycle, so the layer takes one event per clock. On EOF the
  positive neurons send `{x = neuron, val}` in order, all membranes reset, and
  EOF follows.
* **`max_select`** keeps the largest value it receives. On a tie the first
  one wins, which is the lower neuron number. On EOF it offers the result:
  the digit, and a `none` flag when no output neuron fired.
* **`aer_tx`** sends the result as a 4-phase AER word: bits 3:0 are the digit,
  bit 4 is `none`, and bits 15:5 are zero.

## Arithmetic

* Weights and membranes are signed 4-bit, in the range -8..7.
* Event values are unsigned 4-bit. In practice they are 1..7, because only
  positive membranes are sent.
* Every accumulation saturates. Saturating sums depend on the order of the
  additions, so the order is fixed: input events in arrival order; in the
  cores, taps in (ky, kx) order; in the fully connected layer, units in pooled
  scan order.
* There are no biases.
* The output layer also has 4-bit membranes, so ties at +7 happen. The
  lowest-numbered winner is then reported.

## Top-level interface (`hybridnet_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `dvs_req`, `dvs_data`, `dvs_ack` | in/in/out | 1/16/1 | 4-phase AER input from the sensor |
| `threshold` | in | 16 | events per rate window needed to start a frame |
| `ref_time`, `hold_time` | in | 32 | refractory and hold times, in timer ticks |
| `cfg_we`, `cfg_sel`, `cfg_addr`, `cfg_neuron`, `cfg_data` | in | 1/2/9/4/4 | weight write port (below) |
| `tx_req`, `tx_data`, `tx_ack` | out/out/in | 1/16/1 | 4-phase AER output with the result |
| `active`, `frame_rdy`, `rate` | out | 1/1/16 | frame-maker status |

Weight loading writes one 4-bit weight per cycle:

* `cfg_sel` = 0, 1 or 2 selects a convolution core, with `cfg_addr` = ky*5 + kx.
* `cfg_sel` = 3 selects the fully connected layer, with `cfg_addr` = input row
  ch*144 + y*12 + x and `cfg_neuron` = 0..9.

Weights are not reset. Load them before the first frame.

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `SENSOR_W` | 128 | sensor width and height in pixels |
| `SUB` | 4 | subsampling factor, sensor pixels per frame pixel |
| `CROP` | 2 | frame pixels cut from each border after subsampling |
| `TICK_DIV` | 220 | clock cycles per timer tick |
| `BIN_TICKS` | 100 | ticks per bin of the rate window |
| `N_BINS` | 10 | bins in the sliding rate window |
| `CONV_CYCLES` | 30 | cycles per event in the convolution cores |

`SENSOR_W / SUB - 2 * CROP` must be 28; an assertion in the top checks it.
The layer sizes are fixed in the top. They are parameters of the individual
modules.

## Timing

All figures are at a 220 MHz clock, for a frame of N set pixels.

| stage | cycles |
|-------|--------|
| AER input | 3 cycles from `dvs_req` to `data_v`; about 8 cycles per event with the 4-phase handshake |
| frame read-out | overlaps the convolution; limited by its 30 cycles per event |
| convolution | 30 * N, then 576 for the neuron scan (overlapped with the next frame) |
| pooling | up to 432 for its scan (the non-zero units are sent during this scan) |
| fully connected layer | one cycle per pooled event, then 10 for its scan |

For the average MNIST frame of 125 pixels this comes to about 4.8k cycles
(22 us) from the end of the frame to the result. The throughput is set by the
convolution cores: 3751 cycles per frame, about 58.6k frames/s, because the
neuron scan of one frame overlaps the next frame. The pooling and fully
connected scans are shorter than that. The frame memory is single-buffered.
From the sensor side, the next frame is captured only after the previous one
has been read out into the cores.

## How this RTL relates to the published design

The block structure follows the published design: frame-maker with timer, rate
calculator, controller, frame memory and Frame2AER converter; three 5x5
convolution cores onto 24x24; 2x2 subsampling; ten fully connected neurons;
MAX. So do the sizes, the 4-bit arithmetic, the ReLU fire-once-and-reset rule
on EOF, the controller's four conditions, the 30-cycle convolution event and
the one-cycle fully connected update.

The following are this implementation's own choices, because the original
leaves them open:

* the 4-phase AER handshakes and the 16-bit word formats at both ends;
* the valid/ready streams between layers, and the event field layout;
* the rate as a count over a sliding 1 ms window of ten bins, with a 1 us
  timer tick;
* "last Active/Non-active time" read as the moment the state was entered;
* saturating 4-bit accumulation, no biases, and all neurons cleared at EOF;
* subsampling read as max pooling, with round-robin merging of the three
  cores;
* the tie rule and the no-winner flag of MAX;
* the single-buffered frame memory and the weight configuration port.

Known differences:

* The latency from the end of a frame to its result is about 22 us for 125
  events, against less than 20 us reported. The 576-cycle neuron scan of the
  convolution cores is on the result path. It is overlapped only with the
  next frame.
* The three parallel networks used for the three-saccade dataset (one per
  saccade direction) are not instantiated. A single network for a 34x34
  sensor is a parameter setting of the top: `SENSOR_W`=34, `SUB`=1,
  `CROP`=3.
* Events that arrive before Active rises are not stored. Because the rate and
  Active are registered, the events up to and including the one that brings
  the rate to the threshold are lost. With threshold T, a frame of single
  events per pixel loses its first T pixels.
* The spiking-network comparison design is not part of this RTL.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
  rtl/hnn_pkg.sv tb/tb_hnn_ref_pkg.sv tb/tb_hybridnet_top.sv \
  --top-module tb_hybridnet_top -o sim && ./obj_dir/sim
```

Replace the last file and top name to run another test:

* `tb_hybridnet_top` runs eight frames with a shortened time base (tick = 4
  cycles, rate window = 5 bins of 5 ticks, hold time 60 ticks). Each burst
  after the first starts during the refractory time of the previous frame,
  and one burst has a pause long enough for the rate to drop below the
  threshold, which splits it into two frames. One frame lies entirely in the
  cropped border, so it gives a no-winner result.
* `tb_hybridnet_full` runs three frames with every parameter at its default.
  It simulates about 3.6M cycles.
* `tb_workload_mnist` runs MNIST-style input at the default timing. First,
  eight synthetic digits drawn as thick random strokes are sent with one
  event per set pixel, as an e-MNIST style frame, through the default
  128x128 top with threshold 1. Then three saccade-style recordings go
  through a second top set for a 34x34 sensor. Each saccade replays a digit
  at three small offsets. The test checks every result and its latency, and
  prints the average number of events per frame and the latency.
* Each block has its own test: `tb_aer_rx`, `tb_aer_tx`, `tb_fm_timer`,
  `tb_event_rate_calc`, `tb_fm_controller`, `tb_frame_memory`,
  `tb_frame2aer`, `tb_frame_maker`, `tb_conv_core`, `tb_subsample_pool`,
  `tb_fc_layer`, `tb_max_select`.

The end-to-end tests do the following:

* load random weights;
* play the sensor with bursts of random pixel sets;
* compute the expected digit with an independent model of the layer
  arithmetic (`tb/tb_hnn_ref_pkg.sv`);
* compare it with the word on the AER output;
* count the design's mechanisms: frames made, refractory blocking, cropped
  events, back-pressure from the cores, core arbitration, neurons fired per
  layer, and results with and without a winner.

`tb/tb_hnn_body.svh` holds the body both tests share.

Lint: `verilator --lint-only -Wall -y rtl rtl/hnn_pkg.sv rtl/hybridnet_top.sv`.
The warnings that remain are unused bits, for example the polarity bit and the
upper event fields that some layers ignore.

## Files

* `rtl/hnn_pkg.sv`: event type and the saturating add.
* `rtl/aer_rx.sv`, `rtl/aer_tx.sv`: AER interfaces.
* `rtl/frame_maker.sv`, with `fm_timer`, `event_rate_calc`, `fm_controller`,
  `frame_memory` and `frame2aer`.
* `rtl/conv_core.sv`, `rtl/subsample_pool.sv`, `rtl/fc_layer.sv`,
  `rtl/max_select.sv`: the network.
* `rtl/hybridnet_top.sv`: the whole design.
* `tb/`: the testbenches and the reference model.
