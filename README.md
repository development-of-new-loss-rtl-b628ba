# Programmable logic for a 16-channel beam-loss monitor module

This RTL is the FPGA part of a 19" loss-monitor module built to replace old CAMAC electronics
at a high-intensity proton accelerator. The module measures 16 detector currents with
logarithmic amplifiers and 18-bit ADCs. Several of these modules must also share
machine-protection data with each other quickly. The FPGA therefore does two separate jobs:

1. **Acquisition.** It reads the 16 ADCs at 1 MSps over parallel SPI buses and time-stamps each
   sample set. It decimates the samples to 10 kSps and streams the results into a DDR4 buffer,
   then interrupts the real-time processors that run the protection algorithms.
2. **Virtual Backplane.** Each module holds a copy of a memory that all modules share. A write
   by any module's processor is sent over 10.3125 Gbps fibre links (64B/66B coding) and ends up
   in every module's copy. To software, the modules behave as if they sat on one backplane with a
   common memory.

The two parts share no signals inside the FPGA: software links them. The processors, DDR4
controller, AXI interconnect, serial transceivers and all analog circuits are outside this RTL.
The top module brings out their connections as ports.

The block structure, rates and widths come from the published description of the module. These
include 16 channels, 18-bit samples, 1 MSps in and 10 kSps out, a 128-bit AXI-Stream, an AXI4
slave network port with WRITE/ENCODE/DECODE/DPRAM, and a round-robin hub with an RX and a TX FIFO
per port. They also include three link ports, 64B/66B coding with 32 data bits per block, and a
block check character. That description leaves most other details open: clock rates, formats,
register maps, the forwarding rule and the error handling. Those choices are this design's own,
and the section "Choices made here" lists them.

```
            clk_acq (200 MHz)                                   clk_vb (156.25 MHz)
 16 ADC ──SPI──► adc_spi_master ×16 ─┐                 AXI4 ───────► vb_network_port (hub port 0)
                 acq_controller ◄────┘ time stamp,                    │ WRITE/ENCODE, DECODE, DPRAM
                        │ sample sets  window marks                   ▼
                 decim_filter ×16  (average | low-pass)          vb_hub  (RX/TX FIFO per port,
                        │ 10 kSps values                               round-robin, forwarding)
                 axis_frame_packer ──► 128-bit AXI-Stream → DDR4    │ ports 1..3
                 adc_axi_regs ◄── AXI4-Lite;  irq → real-time cores  ▼
                                                              vb_link_port ×3 (64B/66B TX/RX)
                                                                      │ 66-bit blocks
                                                                 serial transceivers / SFP+
```

## Acquisition path (`adc_ip_core`)

### Sampling and SPI read
`acq_controller` makes a sample tick every `SAMPLE_DIV` clocks: 200 clocks at 200 MHz gives
1 MSps. On each tick it starts all 16 `adc_spi_master`s at once and latches a free-running
64-bit clock counter as the time stamp of that sample set. Each master reads its ADC in four
steps:

1. It raises CONVST for 80 clocks (400 ns, the conversion time).
2. It lowers CS_n.
3. It clocks out 18 bits, MSB first, with SCLK = clk/2 (100 MHz), sampling SDO on each rising
   SCLK edge.
4. It raises CS_n again.

A read takes 118 clocks, well inside the 200-clock period. If a tick comes while transfers are
still running, the tick is skipped and counted as an overrun. With the default settings this
cannot happen. Samples are 18-bit two's complement.

### Decimation
Every `DECIM`-th sample set (100 by default) is marked as the last of a window. For each
window, each channel's `decim_filter` gives one value in one of two modes:

| mode | output (signed 32 bit) | meaning |
|---|---|---|
| 0, average | sum of the window's samples | mean × DECIM. The sum is kept exact; the reader divides. |
| 1, low-pass | y × 256 at the window end | y ← y + (x − y)/2^LP_SHIFT, evaluated on every 1 MSps sample. The time constant is 2^LP_SHIFT samples. |

A mode change takes effect at the next window boundary, so no output mixes the two modes.
Bit 31 of the frame's status word gives the mode of that frame's data.

### Frames on the AXI-Stream
Each decimated set becomes one frame of five 128-bit beats. `tlast` is set on beat 4.

| beat | [127:96] | [95:64] | [63:32] | [31:0] |
|---|---|---|---|---|
| 0 | status: [31] mode, [15:0] overrun count | sequence number | time stamp [63:32] | time stamp [31:0] |
| 1 | ch 3 | ch 2 | ch 1 | ch 0 |
| 2 | ch 7 | ch 6 | ch 5 | ch 4 |
| 3 | ch 11 | ch 10 | ch 9 | ch 8 |
| 4 | ch 15 | ch 14 | ch 13 | ch 12 |

The time stamp is that of the window's last sample set. The sequence number counts every
window, so a gap shows a dropped frame. The stream never stalls the ADCs. If a frame is still
waiting for `tready` when the next one is ready, the new one is dropped and counted in DROPS.
At 10 kSps the stream is 99.97 % idle, so this only happens when the sink stops for a long
time.

### Registers (`adc_axi_regs`, AXI4-Lite, 32-bit)

| offset | name | access | reset | content |
|---|---|---|---|---|
| 0x00 | CTRL | rw | 0 | [0] enable, [1] mode (1 = low-pass), [2] interrupt enable |
| 0x04 | SAMPLE_DIV | rw | 200 | clocks per sample |
| 0x08 | DECIM | rw | 100 | samples per window |
| 0x0C | LP_SHIFT | rw | 4 | low-pass time constant exponent |
| 0x10 | IRQ_STATUS | rw1c | 0 | [0] a frame has been sent |
| 0x14 / 0x18 / 0x1C | FRAMES / DROPS / OVERRUNS | ro | 0 | counters |
| 0x20 / 0x24 | TIME_LO / TIME_HI | ro | – | current time-stamp counter |

`irq` = IRQ_STATUS[0] AND CTRL[2]. It is a level signal. If a new frame arrives in the same
clock as a clear, the status bit stays set.

## Virtual Backplane (`virtual_backplane`)

### Update messages
Everything that travels between modules is a 56-bit `vb_msg_t` (`lm_pkg`):

| field | bits | use |
|---|---|---|
| src | 4 | ID of the node that made the write (parameter `NODE_ID`) |
| hops | 4 | how many more link-to-link forwards are allowed (starts at `MAX_HOPS` = 7) |
| addr | 16 | 32-bit word address in the shared memory |
| data | 32 | the word |

### Network port (hub port 0)
`vb_network_port` is a 32-bit AXI4 slave with 4-bit IDs. The byte address is 4 × the word
address, and the memory is 1024 words by default. INCR and FIXED bursts of up to 256 beats are
supported; WRAP is treated as INCR. One write burst and one read burst are handled at a time.

- **Write.** Each W beat goes into the local `vb_dpram` and, in the same clock, into a message
  to the hub. If the hub's RX FIFO for port 0 is full, the beat waits (`wready` low). Writes are
  whole words; `wstrb` is not used. B, with the burst's ID, follows the beat marked `wlast`.
- **Pacing.** Local messages leave at most one every `TX_GAP` = 8 clocks, so a burst runs at
  one beat per 8 clocks. The links have no back-pressure. In a ring of three, each hub takes in
  about seven times one node's send rate: its own writes plus the copies forwarded both ways
  round the ring. Unpaced bursts from several nodes at once therefore overflow the hub FIFOs.
  At one word per 8 clocks a node can still send 1953 words in one 100 µs refresh period,
  more than the whole memory.
- **Read.** The words come from the local copy, one R beat every two clocks, with `rlast` on the
  last one and the burst's ID on every beat.
- **Received messages.** They are written into the copy and cannot be refused. They win the
  single write port over a local write, which then waits a clock. Messages with this node's own
  ID, or with an address outside the memory, are ignored.

### Hub and forwarding
`vb_hub` has an RX FIFO and a TX FIFO (16 deep) for each port. Each clock a round-robin arbiter
takes the head of one non-empty RX FIFO and copies it to the TX FIFOs of the other ports:

- **From port 0 (a local write):** to every link port, with `hops` unchanged.
- **From a link:** to port 0, and to the other links only while `hops` > 0, with `hops` − 1.
  A message from a link that carries this node's own ID has come back around a loop, so it is
  not forwarded at all.

This lets a write reach every module in a chain, star or ring. The hop count bounds the
traffic in meshes and in parallel links between two modules. `MAX_HOPS` must be at least the
longest path between two modules.

There is **no back-pressure across the network and no retransmission**. A message that meets a
full FIFO is lost and counted in `hub_drops`. So is a message whose block check fails. The
system stays consistent because software rewrites all the data it publishes on every 10 kHz
cycle, so the next cycle repairs a loss. Copies can arrive by paths of different length, so a
reader can briefly see an older value. Once writes stop, every copy ends up equal.

The hub forwards **one message per clock in total**. That matches one fully loaded link (one
block per clock). With all three links receiving at line rate, it does not keep up. The network
port's send pacing (one local message per 8 clocks) keeps the total load of a three-node ring
at about 7/8 of that, even when every node writes a burst at the same moment. Bigger networks
need a larger `TX_GAP`. As a rule of thumb, the load a hub sees is the number of copies that
pass through it for each write, times the write rate.

### Link ports (64B/66B)
`vb_link_port` = `vb_link_tx` + `vb_link_rx`. It exchanges one 66-bit block per 156.25 MHz
clock with a serial transceiver running at 10.3125 Gbps. Bits [1:0] hold the sync header, and
bit 0 is sent first.

- **Data block:** sync header `01`, payload `{BCC[7:0], message[55:0]}`. The BCC is a CRC-8
  (x⁸+x²+x+1, initial value 0) over the 56 message bits, MSB first. The 32 data bits per block
  give 5.0 Gbps of payload per link.
- **Idle block:** sync header `10`, type byte 0x1E, rest zero. It is sent whenever no message is
  waiting.
- **Scrambling:** the payload, but not the header, goes through the self-synchronising
  scrambler x⁵⁸+x³⁹+1.
- **Block lock:** when not locked, a block with an invalid header (`00`/`11`) pulses `rx_slip`.
  This asks the transceiver to shift its block boundary by one bit. 64 valid headers in a row
  give lock. When locked, 16 invalid headers in a window of 64 blocks lose it. Only locked data
  blocks with a correct BCC are delivered; the rest are counted in `bcc_errors`.

## Top level (`som_logiv16_pl`)
The top has two clock/reset pairs:

- `clk_acq`/`rst_acq_n`: 200 MHz for acquisition.
- `clk_vb`/`rst_vb_n`: 156.25 MHz, the transceiver user clock.

Resets are active low. Assert them asynchronously; release them synchronously to their clock.
All other ports are plain signals:

- the ADC SPI pins (`adc_*`)
- the 128-bit stream and `irq`
- an AXI4-Lite slave `acq_*` for the acquisition registers
- an AXI4 slave `vb_*` for the shared memory
- three 66-bit transceiver interfaces (`link_*`)
- status counters

Parameters: `N_CH` = 16, `N_LINKS` = 3, `VB_AW` = 10 (memory size 2^VB_AW words), `NODE_ID` = 1.
Give every module in a network a different `NODE_ID`.

## Choices made here
These points are not given by the original description:

- **Clocks and ADC timing.** 200 MHz acquisition clock, 100 MHz SCLK, 400 ns conversion wait.
  The SPI framing follows the usual ADS9110 read-after-conversion sequence.
- **Time stamp.** A 64-bit count of acquisition clocks.
- **Decimation formats.** Window sum, and a low-pass output with 8 fraction bits.
- **Frames and registers.** The frame layout, the drop-instead-of-stall rule and the register
  map are this design's.
- **Network port.** AXI4 with INCR/FIXED bursts, but no byte strobes, no WRAP and one burst
  per direction at a time. The shared memory has 1024 words.
- **Send pacing.** The 8-clock minimum gap between local messages. For networks larger than a
  ring of three, raise `TX_GAP`.
- **Messages and forwarding.** The message fields, the forwarding and loop rules, the hop limit
  and the FIFO depths are this design's.
- **Link coding.** CRC-8 as the block check character. The idle block, scrambler and lock
  procedure are borrowed from 10GBASE-R practice.
- **Transceiver interface.** A parallel 66-bit block interface with a block-enable and a slip
  request. The transceiver's gearbox and clock-domain crossing are outside the RTL.

Not in the RTL are the parts that are analog, vendor hard IP or software:

- the log amplifiers, bias and HV supplies, DACs, temperature sensors, power and clock units
- the TTL/interlock mezzanine
- the processors and DDR4
- the SFP+ transceivers
- the interlock rules and the control-system filters, which run as firmware on the processors

## Simulation
Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `adc_model` is a behavioural ADC.
- `axil_master.svh` holds AXI4-Lite master tasks.

Run a testbench with, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb rtl/lm_pkg.sv \
          tb/tb_som_logiv16_pl.sv --top-module tb_som_logiv16_pl
./obj_dir/Vtb_som_logiv16_pl
```

`-y` lets Verilator find each module in the file of the same name.

| testbench | what it checks |
|---|---|
| tb_adc_spi_master | 18-bit values, CONVST/CS_n framing, exact read length |
| tb_acq_controller | sample period, time stamps, data collection, window marks, overrun |
| tb_decim_filter | window sums and low-pass values against a reference model, mode switch |
| tb_axis_frame_packer | frame contents under random back-pressure, tlast, drop counting |
| tb_adc_axi_regs | register reset values, read/write, strobes, interrupt mask and clear |
| tb_adc_ip_core | 16 ADCs at 1 MSps → 10 kSps frames, checked value by value, both modes |
| tb_vb_dpram | memory against a reference array |
| tb_vb_network_port | INCR/FIXED write and read bursts, IDs, wlast/rlast, write → message, message → memory, own-ID discard, write stalls |
| tb_vb_hub | forwarding rule, hop count, loop stop, round-robin order, drops on full FIFO |
| tb_vb_link_port | lock from a random bit offset, delivery, BCC drop, loss and recovery of lock |
| tb_virtual_backplane | three nodes in a ring agree on every word; traffic stops |
| tb_vb_refresh | 10 kHz refresh: three nodes at default size write 256-word bursts at the same instant for three periods; all copies agree, nothing is dropped |
| tb_som_logiv16_pl | whole top at default parameters, with a peer node |

The whole-top test covers: both filter modes, interrupts, a frame dropped by a stalled sink,
overruns, slips to find lock, a corrupted block removed by the BCC check, loopback copies being
discarded, and updates in both directions. It runs in about 15 s.
