# EMS: an E1 mapper/demapper for SDH STM-1

EMS adds and drops E1 tributaries (2.048 Mbit/s, plesiochronous) to and from an SDH STM-1
(155.52 Mbit/s, synchronous). It connects to the STM-1 through a byte-wide **Telecom Bus** clocked
at 19.44 MHz. It connects to each E1 through a serial data/clock pair.

The hard part is the rates. An E1 runs on its own clock, within ±50 ppm of 2.048 MHz. The SDH side
gives every E1 a fixed slot: one VC-12 per 500 µs superframe. That slot holds 1023 data bits plus
two *justification opportunity* bits, S1 and S2. Each superframe carries 1023, 1024 or 1025 E1 bits,
depending on whether S1 and S2 carry data. The core does the rate matching in both directions. In
each direction a small bit FIFO sits between the two clocks, and its fill level (**DELTA**) drives a
hysteresis controller:

* **Drop** (SDH to E1). The bits taken from the VC-12 arrive in bursts. They are played out at
  65.536 MHz divided by 32 (2.048 MHz). If DELTA reaches 48, the divider changes to 31
  (about 2.114 MHz). If DELTA falls to 16, it changes to 33 (about 1.986 MHz). In both cases it
  returns to 32 when DELTA is back at 32. The FIFO is 64 bits.
* **Add** (E1 to SDH). E1IN is written at its own clock into a 128-bit FIFO. At each superframe
  start the core chooses the justification:
  * normal: S2 carries data (1024 bits);
  * fast: S1 and S2 both carry data (1025 bits), chosen when DELTA has reached 96;
  * slow: neither carries data (1023 bits), chosen when DELTA has fallen to 32.

  Fast or slow returns to normal when DELTA is back at 64.

The design scales by replication. One shared column counter, a 9-cycle bus buffer and an output
multiplexer serve N identical **AddDrop** channels. N = 63 fills a whole STM-1 and is the default.
N = 1 is the basic single-channel core. All channels work in parallel, so the through-latency is
9 bus clocks for any N.

## Block diagram

```
DTBDATA ──┬──────────────► dtb_buffer (9 cycles) ──► insert_mux ──► DTBDATAOUT
          │                                              ▲  ▲ replace[i], data_to_insert[i]
DTBPAY ───┼─► column_address ──col_address, v1──┐        │  │
DTBJ0J1 ──┘                                     ▼        │  │
                        ┌───────────── add_drop[i] (i = 0..N-1) ──────────────┐
          CHANNEL[i] ──►│ v5_enable ─dataOut/dataValid/superFrameStart─┬──────│─► delay_line ─► replace[i]
                        │     │                                        │      │
                        │     ├─► vc12_drop ─► E1OUT[i], CKE1OUT[i]    │      │
                        │     └─► vc12_add ◄── E1IN[i], CKE1IN[i]  ────┴──────│─► data_to_insert[i]
                        └─────────────────────────────────────────────────────┘
```

| File | Block | Role |
|---|---|---|
| `rtl/ems_pkg.sv` | shared | Geometry, types, channel-to-column and V5-address functions |
| `rtl/column_address.sv` | ColumnAddress | VC-4 column number, J1 and superframe-start marks |
| `rtl/v5_enable.sv` | V5Enable | Picks out one channel's VC-12 bytes, decodes the TU-12 pointer |
| `rtl/vc12_drop.sv` | VC12Drop | VC-12 → FIFO → E1OUT with the adaptive divider |
| `rtl/vc12_add.sv` | VC12Add | E1IN → FIFO → VC-12 bytes with bit justification |
| `rtl/bit_fifo.sv` | (FIFO) | Dual-clock circular bit FIFO with DELTA output |
| `rtl/delay_line.sv` | Delay | Times the per-channel `replace` strobe |
| `rtl/add_drop.sv` | AddDrop | One channel: the four blocks above |
| `rtl/dtb_buffer.sv` | Buffer | 9-cycle Telecom Bus delay |
| `rtl/insert_mux.sv` | Multiplexer | Chooses the buffered byte or a channel's replacement byte |
| `rtl/ems.sv` | top | Shared front end plus `N_CH` AddDrop channels |

## How a channel finds its bytes

**STM-1 frame.** One STM-1 frame is 9 rows × 270 byte columns and lasts 125 µs. The first 9
columns are transport overhead, with DTBPAY low. The other 261 columns carry the VC-4. The VC-4
may start anywhere in that area. Its first byte, J1, is marked by DTBJ0J1 together with DTBPAY.

**Column number.** `column_address` numbers the payload bytes 0..260 from J1 and wraps each row.
In the VC-4:

* column 0 is the path overhead;
* columns 1..8 are fixed stuffing;
* columns 9..260 carry 63 interleaved TU-12s.

Each TU-12 owns four columns, 63 apart. Its first column is `channel_column(ch)`:
9 + (K−1) + 3(L−1) + 21(M−1), where K is the TUG-3, L the TUG-2 and M the TU-12 number, and
ch − 1 = 21(K−1) + 3(L−1) + (M−1). For example, channel 1 → column 9, channel 2 → 30,
channel 4 → 12, channel 22 → 10 and channel 63 → 71. CHANNEL = 0 disables a channel.

**Superframe.** Four frames form a TU-12 superframe of 144 bytes per TU-12, 36 per frame. Bytes 0,
36, 72 and 108 are the pointer bytes V1..V4. The other 140 bytes form the VC-12. The core finds
the superframe phase from the low two bits of H4 (VC-4 overhead, row 5): the value received in one
VC-4 is the phase of the next one, and 0 means the V1 frame. `column_address` then raises `v1` on
that VC-4's J1.

**Pointer.** `v5_enable` counts the channel's bytes 0..143 (`counter144`) and removes V1..V4. It
joins V1[1:0] and V2 into a 10-bit pointer offset. The offset counts VC-12 bytes from the byte
after V2, skipping the V-bytes:

| offset | TU-12 byte of V5 |
|---|---|
| 0..34 | offset + 37 |
| 35..69 | offset + 38 |
| 70..104 | offset + 39 |
| 105..139 | offset − 104 |

When the count reaches that byte, `super_frame_start` marks V5. The pointer from the previous
superframe is used, so a V5 placed before V2 works from the second superframe on.

VC-12 layout, bytes numbered from V5:

```
  0 V5   1 R   2..33 data   34 R
 35 J2  36 C1 C2 O O O O R R   37..68 data   69 R
 70 N2  71 C1 C2 O O O O R R   72..103 data  104 R
105 K4 106 C1 C2 R R R R R S1  107 S2 I I I I I I I  108..138 data  139 R
```

Sn carries data when **two or more of the three Cn bits are 1**. This polarity is the one the
design follows. It is the opposite of the ITU-T G.707 convention, so invert C1/C2 on both sides to
talk to standard equipment.

## Timing of the add path: the 9-cycle window

The byte on DTBDATA in bus cycle *t* leaves on DTBDATAOUT in cycle *t*+9.

* In cycle *t*+1, `v5_enable` reports that byte (registered).
* In cycle *t*+2, `vc12_add` has loaded the replacement byte into `data_to_insert`. It holds it
  until the channel's next byte, which is at least 63 cycles later.
* `delay_line` (8 stages) turns the cycle-*t*+1 `data_valid` into `replace` in cycle *t*+9.
* In cycle *t*+9, `insert_mux` takes the replacement instead of the buffered byte.

The following pass through unchanged:

* bytes of channels that are not selected;
* the TU-12 pointer bytes (the add direction reuses the incoming pointer);
* the VC-12 path overhead (V5, J2, N2, K4).

## Clock domains and reset

| Domain | Clock | Logic |
|---|---|---|
| Telecom Bus | `dtbyck` (19.44 MHz) | column counter, buffer, mux, V5Enable, drop FIFO write, add FIFO read |
| Reference | `ck65_536` | drop FIFO read, CKE1OUT divider, drop hysteresis |
| E1 input *i* | `cke1in[i]` | add FIFO write |

**Crossing between domains.** Each FIFO is written one bit per write clock. The write pointer
crosses to the read side Gray-coded through two flip-flops, and DELTA is computed on the read side.
This is why the drop side serialises each VC-12 byte into its FIFO one bit per bus clock. No read
pointer goes back to the writer: the hysteresis control keeps the FIFOs away from full and empty.

**DELTA width.** DELTA is the pointer difference modulo the FIFO size. A completely full FIFO
therefore reads as 0.

**Start-up.**
* Drop: playout starts once 32 bits are buffered. Until then E1OUT is 0, while CKE1OUT already
  runs at the nominal rate.
* Add: mapping starts at the first superframe start at which 64 bits are buffered. Before that the
  FIFO is held at half full by discarding its oldest bits, and the superframes go out in normal
  mode with zero data.

**E1 interface timing.** E1IN is sampled on the rising edge of CKE1IN. E1OUT changes on the rising
edge of CKE1OUT and should be sampled on its falling edge. CKE1OUT is high for 16 reference clocks
of each 31/32/33-clock period.

**Reset.** `rst_n` is an asynchronous, active-low reset applied to all domains. It needs at least
one edge of each clock while it is low.

## Interface of `ems`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `rst_n` | in | 1 | reset, active low |
| `ck32_768` | in | 1 | 32.768 MHz reference; kept for interface compatibility, unused |
| `ck65_536` | in | 1 | 65.536 MHz reference for the E1 output clocks |
| `dtbyck` | in | 1 | Telecom Bus clock, 19.44 MHz |
| `dtbpay`, `dtbj0j1`, `dtbdata[7:0]` | in | | Telecom Bus input: payload flag, J0/J1 marker, data |
| `dtbdataout[7:0]` | out | 8 | Telecom Bus output, 9 clocks behind the input |
| `channel[N_CH]` | in | 6 each | TU-12 number (1..63) served by each channel, 0 = idle |
| `e1in`, `cke1in` | in | N_CH | E1 inputs and their clocks |
| `e1out`, `cke1out` | out | N_CH | E1 outputs and their clocks |

`N_CH` (default 63) sets the number of channels. Two channels must not select the same TU-12. An
assertion in `ems` reports it if they do.

## Where this design departs from, or adds to, its source

The following are this design's own choices, not taken from the description it follows:

* **Superframe phase from H4.** The source names the V1 output of ColumnAddress but not how the
  phase is found.
* **Pointer offsets 70..104 use +39.** The source gives the other three ranges. This one follows
  the same rule of skipping V4.
* **DTBYCK is an input.** The source's interface drawing shows it leaving the core. A core fed only
  with 32.768/65.536 MHz references cannot make 19.44 MHz.
* **CK32_768 is unused.** Its role is not described.
* **Add middle limit of 64.** The source gives only 32 and 96 for the add FIFO. 64 follows the
  drop controller, which returns at its middle value.
* **Clock-domain crossing and write serialisation**, the start-up behaviour, the passing of
  VC-12 overhead bytes and zero R/O bits, and the CKE1OUT duty cycle.
* **FIFOs are flip-flop arrays.** The source used FPGA block RAM.

Not implemented:

* TU-12 or AU-4 pointer justification events (increment/decrement, new-data flag);
* generation of J2/N2/K4 or BIP in the add direction;
* any alarm or performance monitoring.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

**Shared models.** `tb/sdh_tb_pkg.sv` holds the stimulus and reference models. It generates an
STM-1 Telecom Bus with a floating VC-4 and 63 TU-12s with different pointer offsets. It also
builds and parses VC-12s with the E1 mapping, using PRBS-23 data. Received E1 bit streams are
checked bit by bit against what was sent, after lining up on the first 64-bit window they share.

| Testbench | What it shows |
|---|---|
| `tb_ems_pkg` | Channel columns; V5 address for all 140 offsets |
| `tb_column_address` | Column numbers, J1 and V1 marks over 14 frames |
| `tb_v5_enable` | Exact set of VC-12 bytes and V5 marks for channels 1, 22, 63 and 0 |
| `tb_bit_fifo` | Dual-clock bit order and DELTA bound at 2 MHz write / 19.44 MHz read |
| `tb_vc12_drop` | E1OUT bit-exact through normal, fast and slow superframes; CKE1OUT periods 31, 32 and 33 all occur; DELTA stays inside the FIFO |
| `tb_vc12_add` | E1IN at 2.048, ≈2.050 and ≈2.046 MHz is mapped bit-exact; normal, fast and slow superframes all occur; overhead passes unchanged |
| `tb_add_drop` | One channel in both directions |
| `tb_delay_line`, `tb_dtb_buffer`, `tb_insert_mux` | Delays and multiplexer selection |
| `tb_ems` | Full 63-channel core at default parameters over 80 superframes (40 ms of traffic), see below |

`tb_ems` checks:

* the 9-cycle bypass of every byte that must not change;
* all 63 drop streams and all 63 add streams, bit-exact;
* that each mechanism occurs: bypass, replacement, the three drop divider values, and the three
  add justification modes.

On a typical workstation it takes about 3 minutes with Verilator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ems_pkg.sv tb/sdh_tb_pkg.sv tb/tb_ems.sv --top-module tb_ems -o sim
./obj_dir/sim
```

Known gap in the unit benches: `tb_vc12_drop` does not notice S1 being accepted on a single C1
vote, because its stimulus always sends the C1 bits of a superframe all equal. The drop path is
still checked bit-exactly by `tb_add_drop` and `tb_ems`.
