# Pulse-selecting front end for a photon-counter DAQ

A phototube behind a telescope, looking at a pulsar, gives an analog signal.
A fast ADC digitises it at about 3 Gsample/s. No host computer can take
that stream. This FPGA firmware keeps only the parts of the stream that hold
a pulse. It looks at 32 samples in each 100 MHz clock cycle. If any sample is
above a threshold set by the host, it sends that word and the words after it
to the network interface. The host chooses the threshold and the minimum
number of samples that follow each pulse. A built-in sawtooth generator can
stand in for the ADC, so the chain can be tested on the bench.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Each block has
a self-checking testbench. A further testbench runs the whole design at its
default sizes.

## Data path

```
 adc_clk 375 MHz                      | master_clk 100 MHz                        | eth_clk
                                      |                                           |
 adc_data[31:0] -> adc_ddr_capture -> sawtooth_gen -+-> adc_fifo_r (32->128) -+   |
   (DDR, 4 samples     rise/fall       (ADC or      |                          +-> interleave -> peak_finder -> ethernet FIFO -> eth_dout
    per edge)          word pair        ramp)       +-> adc_fifo_f (32->128) -+      256 bit      256 bit        (async_fifo)
                                                                              |                                           |
                          reg bus -> user_regs: threshold, read_size, send_enable, test source, status
```

* **adc_ddr_capture.** The ADC puts four 8-bit samples on the 32-bit bus at
  every rising edge and every falling edge of its 375 MHz clock. One flop per
  edge captures the bus. On the next rising edge the two words come out as a
  pair, and the rising-edge word is the earlier one.
* **sawtooth_gen.** Normally it passes the pair through. In test mode it
  sends a ramp instead. All eight samples of one ADC clock carry the same
  value, and the value goes up by one on every clock, wrapping from 255 to 0.
  The mode bit comes from the register block and is synchronised into the ADC
  clock domain.
* **adc_fifo_r / adc_fifo_f.** Each edge has its own FIFO. A FIFO packs four
  32-bit words into one 128-bit entry, with the oldest word in the low bits.
  The entry then crosses into the 100 MHz domain through a Gray-pointer
  dual-clock FIFO (`async_fifo`).
* **Interleave.** The peak finder reads both FIFOs together, and only when
  neither is empty (`~(r_empty | f_empty)`). The two halves are merged back
  into time order: rise0, fall0, rise1, fall1, and so on. This gives a
  256-bit word of 32 consecutive samples, with the oldest sample in
  bits [7:0].
* **peak_finder.** Selects words, as described in the next section.
* **Ethernet FIFO.** An `async_fifo` of 512 × 256 bits. It hands the
  selected words to the network interface, which reads them on its own clock.

### Rates

| point                  | rate                                    |
|------------------------|-----------------------------------------|
| ADC bus                | 375 MHz × 2 edges × 4 = 3.0 Gsample/s   |
| peak finder            | 100 MHz × 32 = 3.2 Gsample/s            |
| each edge FIFO in/out  | 12.0 Gbit/s in, 12.8 Gbit/s out         |
| Ethernet FIFO worst case | 100 MHz × 256 bit = 25.6 Gbit/s       |

The processing side is slightly faster than the ADC, so the edge FIFOs stay
close to empty and cannot overflow. This holds for any `master_clk` above
93.75 MHz. The Ethernet FIFO can overflow. If pulses
come close together, or the threshold is low, the network cannot keep up.
The FIFO then drops words, pulses `eth_fifo_overflow` and sets a sticky bit in
the status register. This is the intended behaviour: loss happens in one
known place and is reported.

## The selection rule (peak_finder)

The peak finder takes one word per cycle, when `data_valid` is high.

1. **Hit.** A word is a hit if any of its 32 samples is strictly greater
   than `signal_threshold`. A hit word is always forwarded, and its
   post-trigger count is cleared.
2. **Window.** After a hit, each following valid word is forwarded and adds
   32 to the count. The window closes with the word that brings the count to
   `user_samples_after_trig` or above. So `ceil(N/32)` words follow the hit
   word:

   | read size N | words after the hit word |
   |-------------|--------------------------|
   | 0           | 0 (only the hit word)    |
   | 1 to 32     | 1                        |
   | 33          | 2                        |
   | 300         | 10                       |

3. **Retrigger.** A hit inside an open window starts the count again. Each
   pulse is therefore followed by at least N samples, and overlapping pulses
   come out as one continuous stretch with no gap.

The block has no back-pressure. A selected word appears on `data_out` with
`out_enable` one clock after it arrived. Gaps in `data_valid` do not count
towards the window. Two monitor outputs, `trigger` and `retrigger`, are
brought out of the top as `peak_trigger` and `peak_retrigger`.

The port names follow the original schematic of this block. One of them is
misleading: the pin called `empty` means "data available". The schematic
drives it with the inverted OR of the two FIFO empty flags. `in_enable` is the
read strobe for both FIFOs. It is high whenever data is available.

## Registers

Writes arrive as a one-cycle `reg_wr` strobe with a 4-bit `reg_addr` and
32-bit `reg_wdata`, on `master_clk`. `reg_rdata` returns the register at
`reg_addr` one clock later.

| addr | name      | bits                                        | reset |
|------|-----------|---------------------------------------------|-------|
| 0    | threshold | [7:0] peak threshold                        | 255 (nothing triggers) |
| 1    | read_size | [15:0] minimum samples sent after a peak    | 32    |
| 2    | control   | [0] send_enable, [1] sawtooth source        | 0     |
| 3    | status    | read only: [0] Ethernet FIFO overflowed, [1]/[2] rising/falling ADC FIFO overflowed; sticky until reset | 0 |

`send_enable` goes straight out to the network interface. It is the switch
that starts the data sender.

## Interfaces outside this design

These parts are not part of the RTL:

* The network interface, which builds the UDP packets, carries the host's
  register writes and empties the Ethernet FIFO. Its signals are ports of
  `nanocam_daq_top`: the register bus, `eth_clk`, `eth_rd_en`, `eth_dout`,
  `eth_dout_valid`, `eth_empty` and `send_enable`.
* The ADC, whose output is the `adc_clk` and `adc_data` ports.
* The on-chip logic analyser, the configuration flash and the sensor.

`reset` is active high and asynchronous. `reset_sync` releases it separately
in each of the three clock domains. Hold it for a few cycles of the slowest
clock.

## How far to trust it, and where it departs from the original

The threshold compare, the sample count after a trigger, 32 samples of 8 bits
per 100 MHz word, the DDR bus format, the two edge FIFOs and the sawtooth
source all follow the original firmware description. The following are this
design's own choices:

* **Window unit.** The window is counted in samples, 32 per word, so the
  read size is a minimum number of samples. The original sample code counted
  one per forwarded word.
* **Retrigger.** Restarting the count on a hit inside an open window is
  new.
* **Hit rule.** "Strictly greater than" the threshold is this design's
  choice.
* **FIFO reads.** The FIFOs have registered read ports. `data_valid` is
  driven by their valid flags, where the original schematic left it
  unconnected. `in_enable` is gated by data availability instead of being
  tied high.
* **Sizes, map and order.** FIFO depths (128 × 128-bit per edge, 512 ×
  256-bit for Ethernet), the register map and reset values, and the sample
  order inside bus words are all assumptions.
* **Test-source details.** The sawtooth's step of one per ADC clock and its
  register select are assumptions.
* **FIFO implementation.** The FIFOs are written out here. The original used
  vendor-generated FIFOs.

The ADC's nominal rate (1.5 Gsample/s) is lower than the bus capacity
described (3 Gsample/s). Both fit, because the widths are set by the bus
format.

Verification is by simulation only. No timing closure at 375 MHz or 100 MHz
has been attempted. On a real FPGA the capture flops belong in the input DDR
registers, and the two clock crossings need timing constraints (max-delay on
the Gray pointers).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. To run one, for example the whole design:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/daq_pkg.sv tb/tb_nanocam_daq_top.sv --top-module tb_nanocam_daq_top
./obj_dir/Vtb_nanocam_daq_top
```

| testbench             | covers                                                                 |
|-----------------------|------------------------------------------------------------------------|
| tb_nanocam_daq_top    | whole design at default sizes, in three phases (below)                 |
| tb_peak_finder        | random words with spikes and valid gaps against a reference; latency; window lengths; retrigger; reset |
| tb_async_fifo         | two clocks, order, registered read, full, drop and overflow pulse, sticky flag, reads while empty |
| tb_adc_fifo           | 4:1 packing order at 375/100 MHz; no overflow at full rate; overflow when the reader stops |
| tb_adc_ddr_capture    | pairing of rising and falling words                                    |
| tb_sawtooth_gen       | pass-through; ramp value, equal bytes and wrap; mode switches          |
| tb_user_regs          | reset values; write and read-back; read-only status                    |
| tb_sawtooth_overflow  | bench test: sawtooth source, low threshold, slow network reader; every received word is an intact ramp segment, written = received + dropped, overflow reported |

`tb_nanocam_daq_top` runs in three phases:

* **Spike bursts.** Bursts of spikes with six read sizes. Every output word
  is compared with a reference model run on the recorded ADC samples.
* **Sawtooth.** Runs the sawtooth source and checks that the selected words
  are ramp segments.
* **Overflow.** Forces an Ethernet FIFO overflow and checks the status bit
  and that exactly 512 words were kept.

It counts triggers, retriggers, window words, mode switches and overflows,
and fails if any of them never happened.

To change the sizes, use the top's parameters `ADC_FIFO_DEPTH` and
`ETH_FIFO_DEPTH`, which must be powers of two of at least 4. The sample
format constants are in `daq_pkg`.

## Files

* `rtl/daq_pkg.sv`: sample format constants, register map
* `rtl/nanocam_daq_top.sv`: top level, clock domains, interleave
* `rtl/adc_ddr_capture.sv`, `rtl/sawtooth_gen.sv`, `rtl/adc_fifo.sv`,
  `rtl/async_fifo.sv`, `rtl/peak_finder.sv`, `rtl/user_regs.sv`: the blocks
* `rtl/sync_2ff.sv`, `rtl/reset_sync.sv`: clock-domain-crossing helpers
* `tb/`: one testbench per block, the end-to-end test and the bench-test
  workload (`tb_sawtooth_overflow`)
