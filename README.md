# SpaceWire link end, layer by layer

SpaceWire is a point-to-point, full-duplex serial link for spacecraft data
handling. Each direction uses two wires, Data and Strobe. Above the wires, the
protocol is a stack of small layers:

- **Signal layer**: recovers bits from the two wires.
- **Character layer**: groups bits into characters.
- **Exchange layer**: starts the link, recovers from errors and does credit-based flow control.
- **Packet layer**: frames data bytes into packets.

This RTL builds one link end as those layers. Status flows up the receive
side and across to the transmitter, so each layer's output can be watched on
its own.

The structure follows a paper on a layered UVM verification environment for
SpaceWire ("A Layered UVM Based Testbench Design for SpaceWire"). That paper
describes the same layers as monitor components: a bit receiver, a character
decoder, a packet collector and a transmitter that runs the link state
machine. Here they are synthesizable hardware. Where the paper says what a
layer does but not how, the simplest working circuit was chosen, and each
such choice is listed below.

```
 d_in,s_in ─► ds_decoder ─► char_decoder ─┬─► rx_fifo (56) ─► rx_valid/rx_char
               (bits,        (chars,      ├─► packet_collector ─► pkt_*
                disconnect)   parity/ESC) └─► gotNULL/gotFCT/gotNChar/gotTime
                                                      │
                     link_fsm ◄───────────────────────┘ errors
                        │ state                 spw_credit ◄── FCT/N-Char counts
                        ▼                          │
 tx_valid/tx_char ─► spw_transmitter ◄─────────────┘ can_send, fct_ok
 tick_in/time_in ─►      │ bits
                     ds_encoder ─► d_out,s_out
```

Everything runs on one system clock. The default timing numbers assume
100 MHz. At that clock, the default 10 clocks per bit gives a 10 Mbit/s
transmit rate.

## Data-Strobe signalling (`ds_encoder`, `ds_decoder`)

The transmitter puts each bit on D. If the new bit equals the previous one,
it toggles S instead, so exactly one wire changes per bit and `D xor S` is a
clock that changes on every bit. For the bits 0 1 0 0 1 1 0 1 1 0 (starting
from D = S = 0):

- D goes 0 1 0 0 1 1 0 1 1 0.
- S toggles on the 1st, 4th, 6th and 9th bits.

The receiver does not build a clock from `D xor S`. It samples both wires
with the system clock through two-flop synchronisers and takes one bit on
every change of either wire. That bit's value is the new D. This needs the
system clock to run at least about three times the bit rate.

After the first bit, the receiver raises `disc_err` if no transition arrives
for `DISC_CYCLES` clocks. The default is 85, which is 850 ns at 100 MHz, the
disconnect timeout the design is built around.

## Characters and parity (`char_decoder`, `spw_transmitter`)

This is the part that is easiest to get wrong. Every character starts with a
parity bit P and a control flag, in that order:

| flag | next bits (first sent first) | character |
|------|------------------------------|-----------|
| 1    | 0 0                          | FCT (flow control token) |
| 1    | 0 1                          | EOP (end of packet)      |
| 1    | 1 0                          | EEP (error end of packet) |
| 1    | 1 1                          | ESC                      |
| 0    | D0 … D7 (LSB first)          | data character           |

Two ESC pairs are codes rather than characters:

- **NULL** is ESC followed by FCT. It is 8 bits, sent as `0111 0100` on a fresh line.
- **Time code** is ESC followed by a data character, 14 bits.

Parity is **odd over a window that straddles two characters**. The window is
the data or control bits of the *previous* character, plus P and the flag of
the current one. So the decoder checks parity as soon as the second bit
(the flag) of a character arrives, and the encoder computes P from the
character it sent before. Both sides keep a one-bit `prev_par`: the xor of
the last character's data bits. The two code bits of ESC xor to 0. So the
second half of a NULL or Time code always has P = ~flag.

The decoder works in these steps:

1. It counts bits and reads the flag.
2. The flag gives the character length: 4 bits for a control character, 10 for a data character.
3. It keeps a pending ESC and combines it with the next character.
4. It raises `esc_err` when ESC is followed by EOP, EEP or ESC.
5. It raises `parity_err` when the parity window holds an even number of ones.

Both errors are sticky until the receiver is disabled. After an error, no
more characters are reported.

The transmitter sends only NULLs in Started, and FCTs and NULLs in
Connecting. In Run it picks, in this order:

1. a pending Time code;
2. an FCT, if the receive buffer has room;
3. a user N-Char, if there is credit;
4. a NULL.

## Link start-up and error recovery (`link_fsm`)

| state | transmitter | receiver | leaves to |
|-------|-------------|----------|-----------|
| ErrorReset | reset | reset | ErrorWait after 6.4 µs |
| ErrorWait | reset | on | Ready after 12.8 µs |
| Ready | reset | on | Started when `link_enable` |
| Started | NULLs | on | Connecting on gotNULL; ErrorReset after 12.8 µs |
| Connecting | FCTs/NULLs | on | Run on gotFCT; ErrorReset after 12.8 µs |
| Run | everything | on | ErrorReset when `link_enable` drops |

Any of the following errors sends the link back to ErrorReset:

- A receive error (disconnect, parity or escape) in any state.
- An FCT received in ErrorWait, Ready or Started.
- An N-Char or Time code received before Run.
- A credit error in Run.

gotNULL is latched from the moment the receiver is on. A NULL that arrives
while this end still waits in ErrorWait or Ready therefore still counts.

The timers are the parameters `RESET_CYCLES` (default 640) and `WAIT_CYCLES`
(default 1280).

## Flow control (`spw_credit`, `rx_fifo`)

Each FCT lets the other end send 8 more N-Chars (data bytes, EOP or EEP).
The receive buffer holds 56 N-Chars, so no end may hold more than 56 credit.
There are two counters:

- **`tx_credit`**: what this end may still send. It goes up by 8 for each FCT received and down by 1 for each N-Char sent. An FCT that would take it above 56 is a credit error; for an end that has sent nothing, that is the 8th FCT.
- **`rx_expect`**: what the far end may still send. It goes up by 8 for each FCT sent and down by 1 for each N-Char received. An N-Char that arrives while it is 0 is a credit error.

An FCT is sent only when the buffer has room for 8 more N-Chars beyond those
already promised. A user who stops reading `rx_*` therefore stalls the far
transmitter cleanly, and no data is lost. Both counters clear whenever the
link is not in Connecting or Run.

## Packet monitor (`packet_collector`)

The packet monitor watches the received characters in Run and rebuilds
packets:

- Data characters followed by EOP make a valid packet.
- An EEP discards the packet in progress.
- An EOP or EEP with no data before it is discarded.
- A Time code that arrives inside a packet (before its EOP) discards that packet.
- NULL and FCT are ignored.

A valid packet is held in a `PKT_DEPTH`-byte buffer (default 64). While it
is held, `pkt_valid` and `pkt_len` are set and the bytes can be read
combinationally through `pkt_rd_addr`/`pkt_rd_data` until `pkt_ack`:

- A longer packet is dropped.
- A packet that closes while another is held is reported on `pkt_lost`.

This monitor is a tap. The data path to the user is the receive buffer, which
carries every N-Char, including EOP and EEP markers.

## Top-level interface (`spw_codec`)

| group | signals |
|-------|---------|
| link | `d_in`, `s_in` (from the far end), `d_out`, `s_out` |
| control | `link_enable` starts the link; dropping it in Run disables it |
| send | `tx_valid`, `tx_char` (`nchar_t`: `flag`, `data`), `tx_ready` (one-cycle accept) |
| receive | `rx_valid`, `rx_char`, `rx_ready` (show-ahead buffer head) |
| time | `tick_in`/`time_in` queues a Time code; `tick_out`/`time_out` reports one received in Run |
| monitor | `pkt_valid`, `pkt_len`, `pkt_discard`, `pkt_lost`, `pkt_ack`, `pkt_rd_addr`, `pkt_rd_data` |
| status | `state`, `disc_err`, `parity_err`, `esc_err`, `credit_err`, `fct_rcvd`, `tx_credit`, `rx_expect` |

`nchar_t` uses `flag = 0` for a data byte, and `flag = 1` for an end marker
(EOP when `data[0] = 0`, EEP when `data[0] = 1`).

Parameters: `BIT_CYCLES` (10), `DISC_CYCLES` (85), `RESET_CYCLES` (640),
`WAIT_CYCLES` (1280), `RX_DEPTH` (56), `PKT_DEPTH` (64).

Two back-to-back link ends with default settings reach Run about 20 µs after
reset, and get their full 56 credit a few FCTs later.

## What comes from the reference and what does not

These come from the reference paper:

- the layering;
- the character codes and the ESC combinations;
- the order in which the character decoder checks things;
- the packet rules;
- the six link states, their transitions and the 6.4 µs / 12.8 µs times;
- the 850 ns disconnect timeout;
- the 8-per-FCT credit and the 56 limit.

These are this design's own choices:

- The single 100 MHz system clock, with oversampled DS reception instead of a recovered receive clock.
- A fixed transmit rate (10 Mbit/s by default). The reference quotes links of 2 to 200 Mbit/s. 200 Mbit/s would need a system clock of about 600 MHz with this receiver. The 10 Mbit/s start-up rate switching of full SpaceWire implementations is not modelled.
- The exact odd-parity rule. It is taken from SpaceWire practice; the reference only says that parity of the previous character is checked.
- Character priority in Run, and the rule for when an FCT may be sent.
- The valid/ready user interfaces, the `nchar_t` format, and the packet monitor's buffer size and hand-off.
- Decoding starts at the first received bit. There is no search for the first NULL, which works because a fresh link always starts with a NULL.
- EEP discarding a packet in the monitor. The reference's packet rules do not mention EEP.

Not built: the LVDS drivers and receivers, and cables and connectors, which
are analog. Also not built: the verification-only parts of the reference
environment (sequencer, coverage collection, test library).

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. Each testbench
prints `TB_RESULT checks=N failures=M` and stops on a cycle watchdog. For
example, to build and run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    --top-module tb_spw_codec rtl/spw_pkg.sv tb/tb_spw_codec.sv -o sim
./obj_dir/sim
```

The testbenches and what they cover:

- **Unit tests**: `tb_ds_encoder`, `tb_ds_decoder`, `tb_char_decoder`, `tb_packet_collector`, `tb_rx_fifo`, `tb_spw_credit`, `tb_link_fsm` and `tb_spw_transmitter`. Each checks its block against values the testbench works out itself: its own DS encoder, parity, character parser and counter models. They also check the 850 ns disconnect time, the 6.4/12.8 µs state times, and the credit-error points.
- **`tb_spw_codec`**: two link ends back to back at the default parameters. It covers:
  - start-up;
  - packets both ways, checked byte by byte;
  - Time codes;
  - packets reported and discarded by the monitor;
  - the 10 Mbit/s character rate;
  - a credit stall when the receiver stops reading;
  - a glitch on the strobe wire that causes a parity or escape error;
  - a cut line that causes a disconnect;
  - link disable.

  After each break, it checks that both ends come back to Run.
- **`tb_spw_workloads`**: one link end against a scripted peer. It replays the reference's test cases: start-up with only NULLs and FCTs, a packet built from N-Chars, NULLs, EOP, EEP and Time codes, too many FCTs, and too many N-Chars. It adds a bad parity bit and an ESC followed by EOP, and fails if any character kind, code or error type was never seen.

The credit-error cases are exercised against a scripted peer. Two conforming
link ends never produce one.
