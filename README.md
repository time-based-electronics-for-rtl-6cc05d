# Readout firmware for a two-ASIC MRPC timing front-end board

To tell charged hadrons from neutral ones, a semi-digital hadron calorimeter can be given layers of
multi-gap resistive plate chambers (MRPCs) read out with timing to a few tens of picoseconds. The
front-end board for those layers carries two 32-channel **Petiroc2B** ASICs (64 channels) on a
shared clock and connects to an FPGA board. Each ASIC discriminates its inputs, measures time with an
on-chip TDC and digitises charge. After a hit it waits for a conversion command, then sends one
serial frame holding every channel.

This repository is the FPGA side of that board, in synthesizable SystemVerilog. It:

1. loads the configuration of both ASICs through their daisy-chained slow-control shift register;
2. reacts to a trigger by pulsing `start_conv`, and receives both chips' 960-bit frames;
3. Gray-decodes every channel and computes its absolute hit time;
4. sends the raw frames to a PC over a UART, or, with the UART path off, only outputs the decoded
   records, for an on-chip logic analyser.

The ASICs themselves, the clock generator and the power modules are not logic and are not here. A
behavioural model of the ASIC's digital pins (`tb/petiroc2b_model.sv`) stands in for the chips in
the testbenches.

## The readout frame and the time stamp

After a conversion, each chip pulls `trans_onb` low and shifts out 960 bits. That is 32 channels of 30
bits each:

| field   | bits | meaning                                            |
|---------|------|----------------------------------------------------|
| coarse  | 9    | count of the 40 MHz clock (25 ns), wraps every 12.8 us |
| fine    | 10   | TDC interpolation, 37 ps per code                 |
| charge  | 10   | ADC code                                           |
| hit     | 1    | channel fired                                      |

Every field is in reflected Gray code. The hit time within the 12.8 µs coarse loop is

    abs_time_ps = (coarse + 1) * 25000 - fine * 37

The fine code counts back from the **end** of the 25 ns period in which the hit fell, hence the `+1`.
The result is a signed 25-bit number of picoseconds. A large fine code with `coarse = 0` gives a
small negative value.

The time differences between hits are only meaningful modulo 12.8 µs. Take a 25 kHz pulse train
(40 µs period): the decoded differences between neighbouring hits are 40 mod 12.8 = 1.60 µs. At
10 kHz they are 10.40 µs.

**Design choices the frame format does not fix.** The field widths and the Gray coding are the
ASIC's. The field order inside a channel word is this design's choice: coarse, fine, charge, hit,
MSB first. So is the channel order in the frame: channel 0 first. If the real chip orders its bits
differently, only `frame_deser` (channel numbering) and the slicing at the top of
`channel_decoder` need to change.

## One event, step by step

`readout_ctrl` runs this sequence:

1. A hit pulls the chip's `trigb`, `nor32_t` and `nor32_c` low (all active low). They pass through a
   two-flop synchroniser.
2. If the frame buffers are free, `start_conv` goes high for `START_CONV_CYCLES` = 10 clocks. That is
   100 ns at 100 MHz, the minimum the ASIC needs. `start_conv` is shared by both chips, so **both
   chips convert and send a frame on every event**. A chip without a hit sends all-zero hit flags.
3. Each chip sends its frame while its `trans_onb` is low. The readout clock `clk_read` runs freely
   at clk/`BIT_DIV` (25 MHz). The chip is taken to change `dout` on the rising edge of `clk_read`.
   The FPGA samples mid-bit, on the clock after the falling edge (`bit_stb`).
4. When both `frame_deser` blocks have reported a full frame, the controller waits for every trigger
   line to go high again. The chip releases them at the end of its transfer. Then the controller
   returns to idle.

Two mechanisms are this design's own:

- **Stall.** With the UART path on, a conversion starts only when both FIFOs are empty and no packet
  is pending. A hit that arrives while the UART is still busy is not lost at once: the chip keeps its
  trigger low, and the conversion starts when the buffers drain. `stall_count` counts such waits.
- **Time-out.** If the frames or the trigger release do not arrive within `TIMEOUT_CYCLES` (200 µs)
  after `start_conv`, the controller gives up. It counts the time-out and returns to idle. A frame
  that did arrive is still sent.

`frame_deser` also flags a transfer that ends before 960 bits or runs past them (`frame_err_count`).
A short frame is not passed to the UART.

## Data paths

Each chip has the same receive path (`g_chip` in the top):

```
trans_onb, dout ─► retime ─► frame_deser ─┬─ 30-bit words ─► channel_decoder ─► hit_valid / hit[]
                                          └─ bytes ─► sync_fifo (128 B) ─┐
                                                                          ├─► tx_framer ─► uart_tx ─► uart_txd
                              (other chip) ─► sync_fifo ─────────────────┘
```

- **Decoded records** (`hit_valid[c]`, `hit[c]` of type `feb_pkg::hit_rec_t`) come out one per
  clock, 32 per chip per event, as the frame arrives. Each holds the chip, channel, binary coarse,
  fine, charge, hit flag and `abs_time_ps`. They are produced whatever `uart_enable` is set to.
- **UART packets.** Each frame becomes `A5`, chip index (`00` or `01`), then the 120 raw
  (Gray-coded) frame bytes in arrival order. The default format is 8N1 at 115200 baud. The PC does
  the decoding. The lower chip is served first.
- **`uart_enable`** selects the path. When it is low, no frame is kept and the readout never waits
  for the UART. Change it only while `readout_busy` is low and no packet is in flight.

## Configuration chain

The slow-control registers of the two chips are chained: FPGA → chip 0 → chip 1 → FPGA. `sc_config`
works as follows:

- After reset it holds `sr_rstb` low for `SC_DIV` clocks, to clear the chain.
- On `cfg_start` it shifts in all `2 × SC_BITS_PER_CHIP` bits of `cfg_data`, MSB first, so the MSB
  ends in the last stage of chip 1. Chip 1 holds the upper half of `cfg_data` and chip 0 the lower
  half.
- Each bit lasts `SC_DIV` clocks (10 MHz). `sr_in` changes while `sr_ck` is low, and `sr_ck` rises
  half-way through the bit.
- The bit leaving the chain is captured just before each rising edge. After a load, `cfg_readback`
  holds the previous chain contents in the same layout as `cfg_data`. To check the chain, load the
  same pattern twice and compare.

The 640-bit register length and the pin timing are placeholders chosen for this design. Set
`SC_BITS_PER_CHIP` to the real register length before use.

## Parameters (top level)

| parameter           | default     | origin |
|---------------------|-------------|--------|
| `N_CHIPS`           | 2           | board |
| frame (`feb_pkg`)   | 960 bits = 32 × (9+10+10+1) | ASIC |
| TDC step / clock    | 37 ps / 25 ns (`channel_decoder`) | ASIC |
| `START_CONV_CYCLES` | 10 (100 ns) | ASIC minimum, at the assumed clock |
| `CLK_HZ`            | 100 MHz     | assumed |
| `BIT_DIV`           | 4 (25 MHz readout clock) | assumed |
| `TIMEOUT_CYCLES`    | 20000 (200 µs) | assumed |
| `BAUD`              | 115200      | assumed |
| `SC_BITS_PER_CHIP`  | 640         | assumed |
| `SC_DIV`            | 10          | assumed |
| `FIFO_DEPTH`        | 128 (power of two, ≥ 120) | assumed |

## Rates

The readout time per event is:

- 960 bits at 25 MHz = 38.4 µs;
- plus about 0.15 µs of control;
- plus the ASIC's conversion time, which is not modelled from real data (the model uses 0.8 µs).

What that means for the two pulse rates:

- **10 kHz (100 µs period), UART off:** the readout keeps up.
- **25 kHz (40 µs period), UART off:** the readout keeps up only if the real conversion takes less
  than about 1.4 µs. Raising the readout clock (smaller `BIT_DIV`) gives margin, if the ASIC
  accepts a faster clock.
- **UART on:** one event is 2 × 122 bytes = 21.2 ms at 115200 baud. At pulse rates like these, most
  pulses are held back by the stall. A faster link would be needed.

## Files

`rtl/`:

- `feb_pkg.sv`: frame constants and `hit_rec_t`.
- `feb_readout_top.sv`: the top level.
- `readout_ctrl.sv`, `frame_deser.sv`, `gray2bin.sv`, `channel_decoder.sv`: trigger and readout.
- `sync_fifo.sv`, `tx_framer.sv`, `uart_tx.sv`: UART path.
- `sc_config.sv`: configuration chain.

`tb/`:

- One self-checking testbench per module: `tb_<module>.sv`.
- `tb_feb_readout_top.sv`: the end-to-end test (10 Mbaud UART). It covers configuration, one- and
  two-chip events, a stall, a time-out, and UART-off events, with every record and UART byte
  checked.
- `tb_feb_full.sv`: one complete operation with every parameter at its default, including the
  115200-baud packets. It takes about two minutes.
- `tb_feb_injection.sv`: periodic injections at 10 and 25 kHz, one chip and both chips. It checks
  the neighbour-hit differences modulo 12.8 µs and that the chip-to-chip difference stays constant.
- `petiroc2b_model.sv`: behavioural ASIC model.

Every testbench ends with `TB_RESULT checks=N failures=M`. To simulate one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_feb_readout_top rtl/feb_pkg.sv tb/tb_feb_readout_top.sv
./obj_dir/Vtb_feb_readout_top
```

## Limits and open points

- The bit order of the frame, the readout clock relation (edge, rate), the slow-control length and
  pin timing are assumptions. Check them against the ASIC datasheet before use on hardware.
- The design assumes both chips answer every `start_conv`. If the real chip sends nothing when it
  has no hit, an event on one chip ends in a time-out. To fix that, only wait for chips whose
  trigger was seen.
- Channel masks, thresholds and the other analog settings are bits inside the configuration
  pattern. No field map is provided.
- Ethernet readout is not implemented. Neither is the statistical timing analysis, which is done
  off-line.
