# Self-checking a CCSDS 123.0-B-2 compressor against configuration upsets

A hyperspectral compressor on an SRAM FPGA has a weakness that an ASIC does not:
a radiation-induced bit flip in the configuration memory changes the circuit
itself, and it stays changed until the device is reconfigured. Every image
compressed after the upset may be wrong. The compressor's predictor and entropy
coder adapt to the data, so one wrong value spoils everything after it. That
makes the damage invisible in the data and hard to catch locally.

This RTL protects the compressor without duplicating it. Between images, the
compressor is given a small, fixed synthetic test image whose compressed form is
known in advance. If its output differs from that reference, the core is assumed
corrupted, and the FPGA is reconfigured before the next image. The same error
propagation that makes upsets harmful makes them easy to see: an upset that
touches the test image almost always shows up in its **last 64-bit output
frame**. So a cheap checker that keeps only the output size and that last frame
does almost as well as comparing the whole output.

The compressor core itself is **not** part of this RTL. Its ports are brought out
of the top level, and the testbenches use a small behavioural stand-in
(`tb/ccsds_core_model.sv`).

## The two checkers and the timer

Each self-check runs three independent judges at once:

| judge | module | what it keeps | fails when |
|---|---|---|---|
| last-frame check ("method B") | `ref_check` | expected frame count and final 64-bit frame | final frame differs; end-of-image flag early or missing |
| full-output check ("method A") | `full_check` + `ref_mem` | every expected frame, in a memory | any frame differs; same size rule |
| watchdog | `check_timer` | the known run length, in cycles | the run takes longer than that and the checkers have not finished |

The timer covers faults that make the core stop or lose output: neither
comparator would ever see a wrong frame then. The compressor is deterministic,
so the time the test image takes is a fixed number of cycles.

`full_check` reads its reference through a memory with a registered read port.
It puts the address of the *next* expected frame on `rd_addr` one cycle ahead,
so frames can be checked back to back, one per cycle.

By default both methods are built. The parameters `USE_FULL_CHECK` and
`USE_REF_CHECK` build either one alone. The last-frame check needs no
reference memory and is almost as good, so `USE_FULL_CHECK = 0` (no
`full_check`, no `ref_mem`) is the economical build. The published
fault-injection results show the two methods differing on only a handful of
upsets out of millions. A method that is left out reads as finished and
never failed.

The last-frame check has one blind spot: an upset that corrupts an output
frame without touching the compressor's running state, so the error does
not reach the last frame. Upsets in the adaptive part of a real compressor
do spread, which is why this case is rare.

### Protecting the protection

The timer and both comparators are the only parts whose failure could hide a
corrupted core. They are built three times (the `g_tmr` generate loop in
`selfcheck_module_a`). Their outputs, and the reference-memory address, pass
through 2-of-3 voters (`tmr_vote`). Any disagreement between copies is treated
like a failed check: it raises a reconfiguration request. The reference memory
is not triplicated, because block RAM has its own ECC.

Synthesis tools merge identical logic. For a real FPGA build, mark the three
copies (for example with `keep_hierarchy`/`dont_touch`) so they stay separate.

## One self-check, step by step (`selfcheck_control`)

```
IDLE ──check──► DRAIN ──image out of the core──► START ──► RUN ──both finished──► IDLE (chk_pass)
                  │                                          │
                  │ image never leaves (timer)               │ failure, timeout or
                  ▼                                          ▼ voter disagreement
                ERROR (chk_fail, reconfig_req) ◄─────────────┘
```

* **IDLE**: the input multiplexers (`input_mux`) feed the core from the sensor.
  The core's frames go to `store_out`.
* **DRAIN** (skipped when no image is inside the core): a check never cuts
  into an image. The control counts accepted
  image samples against `nx*ny*nz` of the image configuration. It lets the
  current image finish entering the core, then holds the next one back. When
  the last frame of the current image has left the core, the check starts.
  The schedule asks for the check as soon as the image's last sample is in
  (`img_done`), so in the normal schedule every check passes through DRAIN.
* **Flush watchdog**: once the image is fully in, `flush_start` restarts the
  triplicated timer. An upset can make the core lose the end of an image:
  output stops, or the end-of-image flag never comes. Without the watchdog
  the check would then wait forever and nothing would ever fail. With it,
  the timeout moves the control to ERROR.
* **START / RUN**: the multiplexers switch configuration and samples to the
  test-image generator (`golden_source`). One `chk_start` pulse restarts the
  generator, the three timers and the six comparators. The output gate keeps
  test frames away from `store_out`. The check passes when both comparators
  have counted the expected number of frames without a mismatch.
* **ERROR**: the first failure ends the check. The control then holds both
  input streams, keeps the output blocked and raises `reconfig_req` until
  it is reset. After a failed check, the core's output is not trusted.

The flags `selfcheck_timeout`, `selfcheck_ref_finished/failed` and
`selfcheck_full_finished/failed` are cleared at the start of a check. They hold
the last check's outcome until the next one. `selfcheck_timeout` is also
cleared when the flush watchdog starts, and a flush timeout sets it.

## The test image (`golden_source`)

The test image is computed from the sample coordinates, not stored. It comes out
band-interleaved-by-pixel (band fastest, then pixel, then line) at one sample
per cycle under valid/ready. With `t = (x*0x9E37 + y*0x7F4B + z*0x3C6F) mod 2^16`
and `h = t ^ (t >> 7)`:

* pixel (0,0) alternates between 0x0000 and 0xFFFF across bands. These are the
  extremes of the sample range, and they exercise saturation.
* the last line is `h`: full-range noise that produces large residuals.
* every other sample is `61z + 13x + 7y + h[3:0]`: smooth ramps that the
  predictor learns.

This formula is this design's own choice. A real deployment should replace it
with whatever pattern is proven to reach every part of its compressor. The
reference (`exp_words`, `exp_last`, `ref_mem` contents) must be produced by
running that compressor, or a bit-exact software model of it, on the pattern.
The RTL only compares.

Default size: 32 pixels × 26 lines × 512 bands = 425,984 samples. All 512
bands the core supports are used. At 200 MHz the run takes 2.13 ms, inside
the 2.2 ms self-check budget and the 440,000-cycle timer. The test image is
roughly 100 to 2,000 times smaller than a sensor image, which is why a check
costs little time.

## The capture schedule (`test_control`)

Within one sensor capture period the FPGA has to do:

```
COMPRESS ─► CHECK ─► [RECONFIGURE ─► RECOMPRESS] ─► slack until the next image
```

The bracketed steps run only when the check fails. `test_control` waits for
`img_done` (the image's last sample has entered the core) and pulses
`check`. On a failure, or on a reconfiguration request
from the protected design at any time, it:

1. holds `reconfig_req` until the configuration port answers `reconfig_done`;
2. holds the protected design and the core (`core_rst`) in reset for
   `RST_CYCLES`;
3. pulses `recompress`, so that the image buffer (a ping-pong buffer holding
   the last image, outside this RTL) replays the image;
4. waits for that image's `img_done`.

Compressing twice (at the sensor rates quoted for the published design), plus
a 2.2 ms check and about 1 s of reconfiguration, fits in the capture period of
AVIRIS, AVIRIS-NG and NACHOS-class sensors. It does not fit for a CHIME-class
sensor.

## The test setup around it (`image_comp`, `selfcheck_testbed`)

For fault-injection experiments, it is useful to know whether an upset actually
damaged the *sensor image*, independently of the self-check. `image_comp`
compares `store_out`, cycle by cycle, with a golden compressed image stream
supplied on `gold_img`, for example a fault-free copy of the core:

* `check_failed`: the streams differ in valid, data or end-of-image flag.
* `check_finished`: the golden stream has ended while the protected design's
  stream has not.

Both flags stick until the protected design is reset. With them, one can
count upsets that damage images but also upsets the self-check catches before
they damage any image. The second kind is the advantage over plain duplication.

`selfcheck_testbed` is the top level. It joins `test_control`,
`selfcheck_module_a` (the protected design: generator, multiplexers, control,
triplicated checkers, reference memory, output gate) and `image_comp`.

## Interfaces

Types are in `rtl/selfcheck_pkg.sv`:

* samples are 16 bits (3.2 Gbit/s at 200 MHz is 16 bits per cycle);
* `core_cfg_t` carries the image geometry (`nx` up to 1023, `ny` up to 8191,
  `nz` up to 1023) and the near-lossless limits `max_abs_err` and
  `max_rel_err` (16 bits each);
* `frame_beat_t` is one output beat `{valid, last, data[63:0]}`. `last` marks
  the final frame of an image.

Sample streams use valid/ready. The core's frame stream has no back-pressure.
All resets are synchronous and active high. The expected size and last frame of
the test image are plain inputs (constants for a given pattern). `ref_mem` is
filled through `ref_we/ref_waddr/ref_wdata` before the first check.

Top-level parameters and defaults:

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY`, `NZ` | 32, 26, 512 | test-image geometry |
| `ABS_ERR`, `REL_ERR` | 16, 16 | error limits the test image is compressed with |
| `TIMEOUT_CYCLES` | 440,000 | watchdog limit (2.2 ms at 200 MHz) |
| `REF_DEPTH` | 8192 | frames in the full-output reference (16 block RAMs of 512×72) |
| `CNT_W` | 32 | counter width |
| `RST_CYCLES` | 16 | reset length after reconfiguration |
| `USE_REF_CHECK`, `USE_FULL_CHECK` | 1, 1 | build the last-frame and the full-output check |

## Where this RTL departs from, or adds to, the published design

Taken from the published design:
* the structure of the protected design;
* the two comparison methods;
* the timer;
* the triplication of timer and comparators;
* the multiplexing of configuration and data;
* the schedule;
* the `check_failed`/`check_finished` monitor;
* the 64-bit frame, 512 bands, 200 MHz and 2.2 ms figures.

This design's own choices:
* **All state machines and handshakes**: draining an image before a check,
  ending a check at its first failure, holding everything after a failure,
  and the reconfiguration and recompress handshakes.
* **The size rule**: the output size is judged with the core's end-of-image
  flag, which is assumed to exist.
* **The flush watchdog**: the timer also guards the wait for an image to
  leave the core, not only the test-image run.
* **The test image**: a formula replaces the published synthetic image, which
  is not reproduced.
* **The reference memory depth**: 8192 frames, read from the block-RAM
  difference between the two methods.
* **Cycle-exact comparison in `image_comp`**: a correct but delayed output
  counts as a difference.
* **The unspecified widths**: the error-limit fields and the counters.

Not included: the CCSDS 123.0-B-2 core, the image buffer, the FPGA
configuration port, storage and downlink, and the fault-injection platform
used to emulate upsets.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
one with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_selfcheck_testbed \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/selfcheck_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_selfcheck_testbed.sv
./obj_dir/Vtb_selfcheck_testbed
```

Keep `--assert`: several modules state their rules as assertions. The rules:
* a stalled test sample stays unchanged;
* test frames never meet an open output gate;
* every ended check has exactly one result;
* a timed-out timer has stopped;
* `check` and `recompress` are one-cycle pulses.

* `tb_selfcheck_testbed` is the end-to-end test at a 4×3×8 test image. It
  covers, with counts printed at the end:
  * a passing check, and a check that waits for an image in flight;
  * an upset the sensor image never exposes but the test image does;
  * a timeout, a last-frame mismatch, a full-output mismatch and a size error;
  * an image whose end never leaves the core (flush watchdog);
  * a voter disagreement;
  * reconfiguration and recompression;
  * core back-pressure;
  * both monitor flags.
* `tb_selfcheck_testbed_full` runs one capture cycle with every parameter at
  its default: 425,984-sample test image, 6,656 reference frames. It runs a
  passing check and a failing one followed by recovery, and takes a few
  seconds.
* `tb_selfcheck_methods` builds the protected design three ways side by
  side: both methods, last-frame only and full-output only. It gives all
  three the same upsets, and confirms that only the blind spot above
  separates the methods.
* `tb_fault_campaign` is a small exhaustive fault-injection campaign. It
  uses three sensor images with the error limits of the published campaigns:
  * image 1: 1024 absolute, 4096 relative;
  * image 2: 1 absolute, 0 relative;
  * image 3: 16 absolute, 16 relative, with image 1's content.

  Every upset the stand-in can emulate is injected once into each image, 74
  per image. A method-A build and a method-B build run side by side. For
  each injection, the testbench predicts in software whether the stored
  image is damaged and whether each method must fail, and checks the
  hardware against that prediction. It ends by printing, for each image,
  the injections, the errors at the output image, and the detected and
  undetected errors per method. It also counts upsets caught although the
  image itself came out correct. Like the published campaigns, it shows
  that heavier compression hides more upsets in the image. The check,
  which always uses the same test image, does not depend on the image.
  The percentages describe the stand-in, not a real core.
* `tb_<module>` tests each block on its own.

`tb/ccsds_core_model.sv` is the compressor stand-in. It is *not* CCSDS
123.0-B-2. It folds each quantised sample into a 64-bit running signature and
emits the signature every `FRAME_SAMPLES` samples, so like the real
compressor it carries any error to the end of the stream. Its `fault_mode`
input emulates configuration upsets: a stuck input bit, output that stops, a
lost end-of-image flag, a flipped bit in the last frame, or one corrupted
frame that does not spread. `tb/tb_ref_pkg.sv`
recomputes the test image and the stand-in's output independently of the RTL,
so the testbenches get their expected values from there.

## How far to trust it

Each block has a self-checking testbench, and each testbench has been shown to
fail on a deliberately broken copy of its block. The full-size run confirms
that the default test image fits the timer and the reference memory, **with
the stand-in core**. With a real core, two things must be checked:

* whether its compressed test image fits in `REF_DEPTH` frames;
* how many cycles it really takes, which is what `TIMEOUT_CYCLES` must be set to.
  The same limit bounds the wait for an image to leave the core, which must
  be far shorter than a check.

Detection coverage depends on the real core, the real test image and the FPGA,
and nothing here measures it. The campaign testbench shows that the checking
logic reports exactly what the stand-in's upsets deserve. It does not show how
often a real upset is caught.

One gap is left open. An upset that stops the core from accepting samples in
the middle of an image never reaches a check, because the schedule waits for
the image to finish entering. Whatever feeds the sensor stream, such as the
image buffer, has to notice that it cannot deliver.
