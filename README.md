# A 3x3 packet router with virtual cut-through forwarding

This is a small packet router for an FPGA. It has three inputs and three
outputs. Every packet has a fixed size of twelve 16-bit words and is protected
by a CRC-16. The router makes its routing decision on the packet's first word.
Every packet is written into a buffer at its input port, but the output port
can start reading that buffer while the rest of the packet is still arriving.
A packet sits in the buffer in full only when its output is busy. This is the idea of
virtual cut-through switching: no per-hop store-and-forward wait when the path
is free, and a whole-packet buffer to fall back on when it is not.

Before a packet leaves the router, the output port checks its CRC. A packet that
fails the check is dropped. A packet that passes leaves without its header word.

Everything is plain synthesizable SystemVerilog. One clock drives the whole
design, and `rst` is a synchronous, active-high reset.

## Packet format

| word | contents |
|------|----------|
| 0 | preamble / header: `{8'hA5, 6'b0, dest[1:0]}` |
| 1 | CRC-16 of words 2..11 |
| 2..11 | ten data words |

- The twelve-word layout (preamble, CRC, ten data words) comes from the router's
  specification.
- The header layout is this design's own choice. The upper byte `A5h` is a tag
  that marks a packet start. `dest` names the output port, 0..2. A header with
  `dest = 3` names no port, and that packet is dropped.
- The CRC uses polynomial x^16+x^12+x^5+1 (`0x1021`) with initial value 0, no
  bit reflection and no final XOR. This is the "XMODEM" variant. It covers the
  160 data bits, starting with the most significant bit of data word 0. The
  polynomial is also this design's choice.
- An output channel carries 11 words: the CRC word first, then the ten data
  words.

## How a packet travels

```
pkt_start/dest/data ─> packet_source ─(toggle, word)─> synchronizer ─(valid, word)─> input_port ──┐
        (x3)              CRC-16 generation                 2-flop CDC                  4 buffers  │
                                                                                                   │ request / ack, PLOC
                                                                      read port per output (x3)    │ fill count, read data, release
 disp_word <── out_mux <── out_valid/out_word (x3) <── output_port <──────────────────────────────┘
             select lines                               SelReq, SelData, SFifo, TController, CRC check
```

1. **Source** (`packet_source`). It latches the destination and the ten data
   words. Its bit-serial CRC generator (`crc_gen`) needs 161 clocks for the 160
   bits. The source then sends the twelve words, one every `WORD_GAP` = 4
   clocks. It announces each word by flipping `tgl`.
2. **Synchronizer** (`synchronizer`). It passes the toggle through two flip-flops,
   then detects its edge, and captures the held word. This costs three clocks
   per word. Because it uses a toggle handshake, a source could also run on a
   different clock.
3. **Input port** (`input_port`). See the next section. The packet gets a
   buffer, and the header raises a request to the destination output at once.
4. **Output port** (`output_port`). It queues the request. Its transmit
   controller then reads the buffer word by word as the words are stored.
   After the last word it frees the buffer and checks the CRC. If the CRC is
   good, it sends the 11 words.
5. **Display multiplexer** (`out_mux`). It copies one output channel to
   `disp_word`, one clock later. With `disp_sel` = 0..2 the channel is fixed.
   With `disp_sel` = 3 the select lines are set automatically, a whole packet
   at a time: the multiplexer locks onto the lowest-numbered output that starts
   a packet and stays with it until that packet's last word, so packets from
   different outputs never mix on the display. Packets that start on other
   outputs during that time are not shown. The display device itself is not
   part of this RTL.

Measured with one packet on an idle router at the default sizes:
- The header reaches the input port 168 clocks after `pkt_start`.
- The last word reaches the input port 212 clocks after `pkt_start`.
- The first output word leaves 217 clocks after `pkt_start`, which is 5 clocks
  after the last word came in.
- The rest of the packet leaves at one word per clock unless the output is held.

Most of this latency comes from the bit-serial CRC and the 4-clock word pacing.

## Inside an input port

The input port is made of six small blocks. Together they do two jobs: find
packets in the word stream, and give each packet a buffer.

- **`packet_start`** finds the start of a packet. A word is a packet start
  (`first`) when no packet is in progress and its upper byte is `A5h`. Words
  that arrive between packets without the tag are ignored. `in_pkt` stays high
  until the twelfth word.
- **`pac_cnt`** counts the words of the packet. For each word it registers a
  12-bit one-hot word select, `wsel`, and a `write` strobe. `last` marks the
  twelfth word.
- **`rdata`** splits the stream into even words (`d0`) and odd words (`d1`).
  When the odd word of a pair arrives, it pulses `pair_valid`. The buffers
  therefore store 32-bit pairs, six per packet.
- **`selport`** reads `dest` from the header. It raises the one-hot `request` to
  that output together with `rinfo`, the buffer number (called PLOC). It holds
  both until the output acknowledges on `ackreq`.
- **`availb`** keeps one busy bit per buffer. On a header with a valid
  destination, it gives the packet the lowest-numbered free buffer, in the same
  clock. It then registers `selram`, the one-hot buffer being written, and
  pulses `start`, which clears that buffer's fill count. It drives two status
  signals:
  - `wait_o` (top-level `in_wait`) is high while all four buffers are busy. A
    feeder should not start a packet then.
  - `roomerr` (top-level `room_err`) pulses if a header arrives anyway with all
    four buffers busy. That whole packet is dropped.

  A buffer becomes free when an output releases it through `makeavail`.
- **`fmem`** holds four buffers. Each buffer is a `frame_ram` with one write
  port and one read port, and holds one packet as six 32-bit pairs. `fmem`
  also has three read multiplexers, one per output.
  - A buffer only ever holds a packet for a single output, so it takes its read
    address from whichever output names it. An assertion checks that no two
    outputs read the same buffer at the same time.
  - `fill[o]` is the number of words stored so far in the buffer that output `o`
    names. This count is what makes cut-through reading safe.
  - Read data comes back one clock after `rd_en`, because `frame_ram` has a
    registered read.

A buffer stays busy from the packet's header until the output has read its last
word. This is the case even when the output then drops the packet for a CRC
error.

## Inside an output port

An output port works from request records. Each record is 4 bits,
`{input port, PLOC}` (`router_pkg::req_rec_t`).

- **`selreq`** is a round-robin arbiter. When the record store has room, it
  grants one of the input ports that are requesting this output, one grant per
  clock. The grant also serves as the acknowledge to that input port (`ackreqs`),
  in the same clock.
- **`seldata`** builds the record from the grant and the granted port's PLOC. A
  record is written only when the grant is valid and has exactly one bit set.
- **`sfifo`** stores up to 16 records. It is written at address `ADWrite` from
  the `CountIn` counter and read at `ADRead` from the `CountOut` counter
  (`ptr_counter`). **`reqcount`** counts the records held: `more` means a record
  is waiting, and `room` means one more fits. Sixteen records cover the worst
  case of 3 inputs x 4 buffers = 12 packets waiting for one output. Packets
  leave an output in the order their requests were granted.
- **`tcontroller`** is the transmit controller. It has four states:
  - **IDLE.** If a record is waiting, it takes it (`next`).
  - **READ.** It issues a read of word `k` as soon as `fill > k`, at most one
    read per clock. The header word is discarded. Word 1 and words 2..11 go
    into an 11-word frame register. Words 2..11 also feed `crc_check`, which
    advances a CRC-16 by a whole word per clock.
  - **CHECK.** It pulses `rel` to free the buffer. Then it compares the computed
    CRC with word 1. On a mismatch it pulses `crc_err` and returns to IDLE
    without sending anything.
  - **SEND.** It sends the 11 words, one per clock. It pauses while `hold` is
    high; `hold` is the Wait signal from the next router. `out_sop` marks the
    first word and `out_eop` the last.

The controller reads while the packet is still arriving, but it sends only after
the CRC check. The forwarding decision and the buffer read are therefore
cut-through. The transmission on the output channel waits for the check, so a
corrupted packet never leaves the router.

## Top-level interface (`router_top`)

| port | width | meaning |
|------|-------|---------|
| `pkt_start`, `pkt_dest`, `pkt_data` | 3, 3x2, 3x10x16 | start a packet on a source; its destination and data (sampled on the start clock) |
| `err_inject` | 3 | test hook: the packet gets data bit 0 of word 2 flipped after its CRC is computed |
| `src_busy` | 3 | the source is building or sending a packet; a start is ignored while busy |
| `in_wait`, `room_err` | 3, 3 | all buffers of an input busy; a packet was dropped for lack of a buffer |
| `out_hold` | 3 | downstream not ready: the output pauses |
| `out_valid`, `out_word`, `out_sop`, `out_eop` | 3, 3x16, 3, 3 | output channels |
| `crc_err` | 3 | one-clock pulse: a packet for this output failed its CRC check and was dropped |
| `disp_sel`, `disp_valid`, `disp_word` | 2, 1, 16 | display multiplexer: channel 0..2, or 3 for automatic packet-at-a-time selection |

The default parameters are the design's own sizes:
- from the specification: 3 ports, 16-bit words, 12-word packets, 10 data words,
  4 buffers per input, a 32-bit default message for `crc_gen`;
- this design's choices: a record store 16 deep, a source word gap of 4 clocks.

## What follows the specification and what does not

Taken from the specification:
- three inputs and three outputs;
- the 12-word packet of 16-bit words: preamble, CRC, ten data words;
- CRC generation at the source and a CRC check at the output;
- dropping the header word on output;
- the block structure and block names of the input port: Packet Start, RData
  storing even and odd words, SelPort, PacCnt, AvailB with PLOC, Wait and
  ROOMERR, and FMEM with four buffers and three multiplexers;
- the block structure and block names of the output port: SelReq, ReqCount,
  SelData forming `{port, PLOC}` records, SFifo with CountIn/CountOut, and
  TController with NEXT and Wait;
- a bit-serial CRC generator that counts message bits and copies its result out
  when the count reaches the message length (32 by default);
- a RAM that ignores writes and reads while reset is high;
- a display multiplexer driven by select lines set by the router's control.

Chosen here, because the specification leaves them open:
- the header encoding and the `A5h` start tag;
- the CRC polynomial and initial value;
- the toggle handshake in the synchronizer;
- all handshakes and clock-level timing;
- round-robin arbitration;
- lowest-free-first buffer allocation;
- the meaning of Wait (all buffers busy) and ROOMERR (a packet arrived anyway
  and was dropped);
- dropping packets with a bad CRC or a bad destination;
- sending the CRC word along with the data on the output channel;
- the word-wide CRC step in the checker;
- the registered read of `frame_ram`;
- the packet-at-a-time rule of the automatic display selection;
- the 16-deep record store.

Not included: the display device (an LCD on the board). Only the multiplexed
word that would drive it is brought out.

Limits to keep in mind:
- A source must hold each word for at least four router clocks, because of the
  synchronizer.
- An input port expects at most one unacknowledged request at a time. This
  always holds, because a request is granted within three clocks and packets
  are at least 12 words apart. An assertion in `selport` checks it.
- There is no timeout. A packet whose words stop arriving keeps its buffer, and
  blocks its output, until reset.

## Files

- `rtl/router_pkg.sv`: sizes, the request record type, the CRC reference
  functions, and the header constructor.
- `rtl/router_top.sv`: the top level.
  - `packet_source` with `crc_gen`
  - `synchronizer`
  - `input_port`: `packet_start`, `pac_cnt`, `rdata`, `selport`, `availb`,
    `fmem` (built from `frame_ram`)
  - `output_port`: `selreq`, `seldata`, `reqcount`, `ptr_counter` x2, `sfifo`,
    `tcontroller` (with `crc_check`)
  - `out_mux`
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one
  prints `TB_RESULT checks=N failures=M`.

## Simulating

Every testbench builds the same way with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_router_top \
    -y rtl -y tb -Irtl rtl/router_pkg.sv tb/tb_router_top.sv -o sim
./obj_dir/sim
```

`tb_router_top` runs the whole router at its default sizes in well under a
second. It checks every output word against packets and CRCs it computes
itself. It also counts each mechanism of the design and fails if any of them
never occurs:
- parallel traffic to three outputs;
- contention of three inputs for one output;
- a CRC error;
- a header naming port 3;
- a held output filling all four buffers of an input (Wait);
- a sixth packet dropped for lack of a buffer;
- random holds inside packets;
- cut-through reads;
- the display multiplexer, with fixed and with automatic selection.

The block testbenches check each module on its own against independent models:
- `tb_crc_gen` also checks the published CRC value `0x31C3` for `"123456789"`;
- `tb_tcontroller` and `tb_output_port` model the input buffers, including
  packets that are still arriving.
