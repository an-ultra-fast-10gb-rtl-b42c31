# 10 Gb/s Aurora 64b66b serialiser back end

A pixel read-out chip that has to ship data at mega-frame rates quickly runs
out of pads and power if it uses a wide LVDS bus. This design replaces the bus
with one 10 Gb/s serial link. Parallel data from the chip is moved into a
fast clock domain. There it is framed and scrambled as Aurora 64b66b, cut into
8-bit words at 1.25 GHz, and serialised to a single 10 Gb/s bit stream. A CML
line driver then takes the stream off chip. An FPGA with a standard Aurora
64b66b receiver can take the link directly.

The RTL follows a published 65 nm serialiser with a 5 GHz LC-oscillator PLL.
The architecture and the mechanisms are that design's. Where it gives only a
function, the circuits here are this implementation's own; each such choice
is listed below under "Where this RTL makes its own choices". The analogue
parts are not RTL. The PLL is a behavioural simulation model. The CML driver
is left out: the serial bit is a top-level port.

## Data path and clocks

```
 wr_clk domain        |  word clock (1.25 GHz = clk5g/4)                    | clk5g (5 GHz)
                      |                                                     |
 32-bit words -> tx_fifo -> bytes --+                                       |
                      |             +-> aurora_framer -> aurora_encoder ----+-> serialiser_8to1 -> ser_out
                      | prbs11_gen -+    (block kind)    (scrambler,        |   (phase clocks,    (10 Gb/s)
                      |                                   header, gearbox)  |    retime, 2x4:1, 2:1)
                                                                            |
 ref_clk -> lc_pll (x128) -> clk5g ---------------------------------------->+
```

| module | role |
|---|---|
| `ser10g_top` | the whole back end; chooses FIFO or PRBS-11 source per block |
| `lc_pll` | behavioural PLL model: LC VCO with capacitor bands, PFD, charge pump, PI filter |
| `pll_div128` | feedback divider, clk5g / 128 |
| `tx_fifo` | dual-clock FIFO, 32-bit words in, bytes out, Gray-coded pointers |
| `prbs11_gen` | PRBS-11 (x^11 + x^9 + 1) test pattern, 8 bits per cycle |
| `aurora_framer` | picks data / idle / clock-compensation / end-of-frame for each block |
| `aurora_scrambler` | x^58 + x^39 + 1 self-synchronous scrambler, 8 bits per cycle |
| `aurora_encoder` | sync-header insertion and the 66-to-8 gearbox with its hold cycle |
| `phase_clock_gen` | eight 1.25 GHz clocks 100 ps apart from two shift counters |
| `ser_4to1` | one 5 Gb/s half-rate serialiser |
| `serialiser_8to1` | retiming, two `ser_4to1`, clock-steered 2:1 multiplexer |
| `reset_sync` | reset release synchronised to one clock |
| `aurora_pkg` | sync headers, block-type codes, block-kind enum |

There are three clock domains:

- The ASIC's own write clock, `wr_clk`. It is unrelated to everything else.
- The 5 GHz `clk5g` from the PLL.
- The 1.25 GHz word clock. It is `ph[0]` of the phase generator, i.e.
  clk5g / 4. The FIFO read side, PRBS generator, framer and encoder run on it.

The line rate is always 2 × f(clk5g), because the 2:1 multiplexer sends one
bit in each half of clk5g. A 39.0625 MHz reference gives 5 GHz and 10 Gb/s.
A 40.283 MHz reference gives 5.15625 GHz. That is the 10.3125 Gb/s standard
Aurora 64b66b rate, which the original chip ran at in its link tests.

## Bit order

All of the following holds end to end:

- Every 8-bit word goes on the line LSB first.
- A 66-bit block is its 2-bit sync header followed by payload bytes 0 to 7.
- The header is `0,1` on the line for a data block and `1,0` for a control
  block. In `aurora_pkg` these are the vectors `SYNC_DATA = 2'b10` and
  `SYNC_CTRL = 2'b01`, with bit 0 going out first.
- Only the 64 payload bits are scrambled. The scrambler does not advance
  over headers.
- `tx_fifo` sends byte `wr_data[7:0]` first.

## The encoder gearbox and its hold cycle

This is the least obvious part. The encoder takes one 8-bit payload word per
cycle and puts out one 8-bit line word per cycle, one cycle later. Each 64-bit
block needs 66 line bits, so every block leaves 2 bits behind. They wait in an
8-bit elastic buffer. Once per word the encoder ORs the new bits in above the
waiting ones: header plus scrambled byte on word 0 of a block, the scrambled
byte alone otherwise. It then sends the lowest 8 bits.

| block | bits waiting after its word 0 |
|---|---|
| 1 | 2 |
| 2 | 4 |
| 3 | 6 |
| 4 | 8 |

After the fourth block the buffer is full. In the next cycle the encoder
raises `hold`, takes no input, and sends the 8 waiting bits. The buffer is then
empty again. The pattern repeats every 33 word clocks: 4 × 66 = 264 line bits,
of which 32 cycles carry input. The payload rate is therefore
32/33 × 10 Gb/s = 9.70 Gb/s, including control blocks.

The hold always falls on a block boundary. Aurora needs the 8 words of a
block on consecutive cycles. Also, the framer only chooses the next block's
kind when a block starts. `hold` is combinational from the encoder's state, so
the framer sees it in the same cycle and simply waits. Framer and encoder each
count words within the block. An assertion in the top checks that the two
counts agree.

## Packet rules (aurora_framer)

When a block starts, the framer picks one kind, in this priority:

1. **Clock compensation.** Every `idle_interval` blocks it sends an idle block
   (type 0x78) with the CC flag (0x80 in byte 1). This gives the receiver
   regular clock-correction points. `idle_interval = 0` turns it off.
2. **End of frame.** When `eof_interval` data blocks have gone out in the
   current frame, it sends a separator block (type 0x1E, 0 valid bytes). This
   closes the frame. `eof_interval = 0` turns it off.
3. **Data.** Sent if the source holds a whole block. For the FIFO that is
   `rd_block_avail`, meaning at least 8 bytes. The PRBS source always has a
   block.
4. **Idle.** Sent otherwise (type 0x78, no flags). An empty FIFO therefore
   fills the link with idles on its own.

`prbs_mode` picks the source. The top samples it when a block starts and holds
it for the rest of the block, so it may be changed at any time. The PRBS
generator advances only on data words. The payloads of successive data blocks
therefore form one unbroken PRBS-11 sequence, which a receiver can check
across idle and control blocks.

## Serialiser timing (serialiser_8to1)

`phase_clock_gen` turns clk5g into eight 1.25 GHz phases. Ring A is a 4-bit
shift register holding `0011`, rotated on each rising edge; its bits are
`ph[0,2,4,6]`. Ring B loads ring A on each falling edge; its bits are
`ph[1,3,5,7]`. Phase `ph[i]` rises `i × 100 ps` after `ph[0]`.

The path of a word through the serialiser:

- **Capture.** The word is captured on `ph[0]` at time T.
- **Retiming.** Bit i is moved onto `ph[i]`. Bits 1–4 go there directly.
  Bits 5–7 first pass through `ph[4]`.
- **Valid windows.** Bit i is then valid from `T + i·100 ps` for a full
  800 ps.
- **Even stream.** One `ser_4to1`, on clk5g rising edges, sends bits 0, 2, 4
  and 6. Its one-hot select comes from ring A. At `T + (k+1)·200 ps` it takes
  bit 2k, which is 200 ps after that bit settled.
- **Odd stream.** The other `ser_4to1` does the same for bits 1, 3, 5 and 7,
  on falling edges, with ring B.
- **2:1 mux.** `sout` is the even stream while clk5g is high and the odd
  stream while clk5g is low.

Bit 0 reaches the line 200 ps after the capturing `ph[0]` edge. Then one bit
follows every 100 ps.

## The PLL model (lc_pll)

This model is event-level, not synthesizable, and meant only for simulation:

- **VCO.** A clock whose frequency is `F_TOP_MHZ − cap_sel·F_STEP_MHZ` plus a
  tuning term. The tuning term is limited to ±`TUNE_MHZ`. The band stands in
  for the switchable capacitors of the LC tank.
- **Feedback.** The synthesizable `pll_div128` divides the VCO by 128.
- **PFD and charge pump.** A tri-state phase-frequency detector. Each
  reference cycle it pumps a charge equal to the signed UP/DN pulse width in
  ps.
- **Loop filter.** Proportional-integral.
- **Lock.** `lock` rises after 32 reference cycles with less than 5 ps of
  phase error.

With the default bands:

| reference | `cap_sel` | result |
|---|---|---|
| 39.0625 MHz | 3 | lock in about 260 reference cycles |
| 40.283 MHz | 2 | lock at 5.156 GHz |
| any | 0 | cannot reach 5 GHz; correctly never locks |

These numbers belong to the model, not to the silicon. The real oscillator's
jitter, duty cycle and tuning range are not represented. Until `lock` is
high, the top holds the whole word domain in reset.

## Where this RTL makes its own choices

The original design gives the mechanisms above but not these details:

- Aurora block-type codes. Idle and clock compensation are 0x78 with flag
  0x80; end of frame is separator 0x1E with 0 bytes. Header polarity and bit
  order come from 64b66b convention.
- The scrambler polynomial x^58 + x^39 + 1. It is the Aurora 64b66b one; the
  original does not state it.
- The block priority, the 16-bit interval inputs, and reading "programmable
  idle interval" as the period of clock-compensation blocks.
- The FIFO depth of 16 words. The FIFO, with its Gray-pointer construction
  and the `rd_block_avail` flag, is this design's own. The original describes
  the asynchronous interface only by its function and was still developing
  it.
- The hop plan of the retiming stage, the ring-decoded 4:1 select, and ring B
  loading ring A. The last of these makes the 100 ps offset independent of
  the edge on which reset ends.
- Resets. All are asynchronous-assert. The word domain is released only after
  PLL lock.
- The 2:1 multiplexer uses the clock directly. It does not model any added
  phase-tracking delay. In silicon that timing margin has to be designed in
  at transistor level.

Not included:

- The CML line driver and its charge-balancing devices.
- The dynamic TSPC flip-flop cell. Ordinary flip-flops stand in for it.
- The wire-bond/PCB link model.
- The test-board parts.

## Simulating

Every testbench checks its own results. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The files use
`timescale 1ps/1fs` (the 5 GHz clock has a 200 ps period). To build any one
of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/aurora_pkg.sv \
          tb/tb_ser10g_top.sv --top-module tb_ser10g_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ser10g_top` | whole design at default parameters (see below) |
| `tb_aurora_encoder` | every line word against a bit-serial model of header + scrambler; 1-cycle latency; exactly one hold per 33 cycles, on block boundaries |
| `tb_aurora_framer` | block kinds and contents against a separate model of the packet rules, under random holds and source availability |
| `tb_aurora_scrambler` | against a bit-serial scrambler; recovery by a self-synchronous descrambler |
| `tb_prbs11_gen` | against a serial LFSR over 8 periods; 1024 ones per period |
| `tb_tx_fifo` | byte order, full after DEPTH words, flags never optimistic, unrelated clocks |
| `tb_phase_clock_gen` | period 800 ps, 50 % duty, phase offsets of i × 100 ps |
| `tb_ser_4to1`, `tb_serialiser_8to1` | bit order and exact 200 ps latency, sampled in every 100 ps slot |
| `tb_pll_div128`, `tb_lc_pll` | divide ratio; lock, output frequency and the no-lock band |
| `tb_link_prbs_10g3125` | whole design at 10.3125 Gb/s (40.283 MHz reference): measured line rate, about 146k PRBS-11 bits error free, clock-compensation and end-of-frame spacing |

`tb_ser10g_top` runs the full chain in about 2 s of CPU time:

1. The PLL locks.
2. `tb/aurora_rx_model.sv`, a behavioural receiver, samples `ser_out` in each
   bit slot. It finds the block boundary by bit slipping and descrambles.
3. PRBS-11 traffic is checked bit for bit, and so is the spacing of the
   clock-compensation and end-of-frame blocks.
4. The test switches to FIFO data. It writes bursts at 400 MHz × 32 bits,
   faster than the link drains them, so `wr_full` pushes back. Gaps between
   bursts leave the FIFO empty, so idles are sent. Every byte must arrive in
   order.
5. It counts encoder holds, idle, clock-compensation and end-of-frame blocks,
   and full-FIFO pushes. Any mechanism that never happened counts as a
   failure.

`tb_link_prbs_10g3125` repeats the PRBS part at the 10.3125 Gb/s Aurora
rate. Long link runs (the original chip was run for 60 hours at
10.3125 Gb/s) are outside simulation reach.
