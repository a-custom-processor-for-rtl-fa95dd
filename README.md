# Programmable packet parser: a small VLIW processor instead of a parse-graph TCAM

Table-driven packet parsers walk a parse graph. Each step they build a key
from the current state and a few header bytes, then look the key up in a
TCAM. This design replaces the lookup with a program. A small processor with
a very wide instruction word reads each header 1, 2 or 4 bytes at a time.
Every functional unit has its own field in the instruction, so one
instruction can do all of these in the same cycle:

- copy the bytes into the Packet Header Vector (PHV);
- start a header-length counter;
- look up the next protocol;
- test a flag.

The protocols exist only in software. The instruction memory and a handful
of small parameter memories describe them: comparand sets for next-header
lookup, branch targets, and counter formulas. Supporting a new header means
writing a new subroutine, not changing the hardware.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable apart from the
assertions, and all sizes are parameters or package constants.

```
           +----------------------------- packet_parser ------------------------------+
 in_* ---> | incoming_packets_buffer ==> header_parser ==============> phv ==> phv_rd_* |
 (32 B/beat)| (256 B, per-byte EOP)   |   FI | FH | EX | WB                              |
           |                          |   instr_mem, phv_filler, apc                      |
           |                          +=> payload_forwarder ==========================> out_*
 cfg_* --> |  instruction memory and parameter memories                       (32 B/cycle)|
           +--------------------------------------------------------------------------+
```

## How a packet flows

1. Bytes enter the **incoming packets' buffer** in beats of up to 32 bytes.
   The buffer is a byte FIFO, and each byte carries an end-of-packet mark.
   Parsing starts as soon as the first header bytes are present. The parser
   is a streaming parser and never waits for the whole packet.
2. The **header parser** runs the parse program, starting at instruction 0.
   Each instruction takes its segment (0, 1, 2 or 4 bytes) from the head of
   the buffer. If the bytes are not there yet, that pipeline stage waits.
3. When the program reaches the end of the headers, the **payload
   forwarder** takes over the buffer. It moves up to 32 bytes per cycle to
   the `out_*` port. The number of bytes is set by a payload counter, which
   was loaded from a length field such as IPv4 Total Length. Anything left
   before the end-of-packet mark is dropped, for example Ethernet padding.
4. `hdr_done` pulses once the last PHV write has landed. From then on
   `phv_valid` stays high and the PHV can be read through
   `phv_rd_bank/phv_rd_addr`. The read is combinational, and `phv_rd_valid`
   says whether the container was written for this packet.
5. Pulse `phv_ack` to acknowledge the PHV. The next packet starts once its
   predecessor's payload has left and the PHV has been acknowledged. The
   PHV valid bits clear at that start.

## The pipeline

| stage | what happens |
|---|---|
| FI | The APC computes the fetch address combinationally, and `instr_mem` reads it synchronously. |
| FH | The segment named by the instruction is taken from the buffer window and popped. The APC makes all branch decisions here, and the counter target memories are read. |
| EX | The PHV filler cuts the segment into 8/16/32-bit units. Five extraction engines pick the fields that the APC's units need. Counters load and units start. |
| WB | The PHV banks are written. |

A decision taken on the instruction in FH at cycle *t* puts the chosen
instruction into FH at *t+1*. A branch that waits for a unit stops fetching
until the unit reports ready. The instruction fetched in the meantime is
discarded; that slot is the branch penalty. Instructions need no decoding:
each field drives its unit directly.

## The Advanced Program Control unit (APC)

The APC (`apc.sv`) chooses the next instruction address. It checks the
following in strict priority order, every cycle:

1. **Packet start / reset:** fetch instruction 0.
2. **Header counter expiry.** The current header is finished. If a
   next-header lookup was started during the header, jump to its result,
   waiting if the lookup is still running. Otherwise parsing ends and the
   payload forwarder starts.
3. **Expiry of a sub-header payload counter.** An option or TLV is
   finished. If the return stack is non-empty, pop it into the program
   counter. Otherwise parsing ends.
4. **Branch type of the instruction in FH:**

   | branch type | next address |
   |---|---|
   | sequential | PC+1 |
   | `BR_NH` | the next header resolve unit's result |
   | `BR_BC` | the branch catalyst's result |
   | `BR_BCE` | the evaluator's target if the condition holds, else PC+1 |

   The three unit-driven types wait for that unit to become ready.

The units inside the APC:

- **Header counter.** It is loaded with the header size, computed as
  `(field << shift) + offset`. The field comes from the counter's own
  extraction engine, for example the IPv4 IHL nibble. `shift` and the signed
  `offset` come from the target-value memory entry that Address_2 selects.
  A fixed-size header uses the offset alone.
  - The size counts from the first byte of the *loading* instruction's
    segment. At load, the bytes already read by that instruction and by the
    instruction in FH in the same cycle are subtracted.
  - After that, the counter drops by every segment read.
  - Expiry is combinational, in the cycle the last bytes are read, so the
    very next fetch is already the next header's subroutine.
  - TCP shows the formula: its data-offset nibble sits in the fourth word.
    The entry is therefore `doff*4 - 12`, because 12 bytes were read before
    the loading word.
- **Four payload counters.** Each entry of the Address_3 memory chooses a
  counter and one of two kinds:
  - *Sub-header* (option, TLV): counts header bytes read. At zero it
    returns through the stack and then goes idle.
  - *Payload or whole packet:* counts header bytes and forwarded bytes.
    It tells the payload forwarder how much to send. The lowest-numbered
    loaded payload counter is the one used.

  When a header ends, any sub-header counters left over are dropped.
- **Return stack** (4 entries). An instruction can push its own address or
  the following one. The usual pattern: a dispatcher instruction reads an
  option's type and length, starts a sub-header counter and pushes its own
  address. Every option's code then returns to the dispatcher when its
  counter expires. A push onto a full stack is dropped and flagged
  (`ev_stack_overflow`).
- **Next header resolve unit (NHRU).** Compares a 16-bit field with 8
  comparands per memory word, all in parallel. It walks up to `nh_iter`
  consecutive words of the comparand memory and returns the address stored
  next to the first match. With no match it returns a default address, a
  configuration register. Timing: the result is ready 2 cycles after start
  for a match in the first word, plus one cycle for each further word.
  Put the common values first.
- **Branch catalyst (BC).** Same comparison, but it reads only one memory
  word, so it is ready 2 cycles after start. It is made for flag fields
  such as the C/K/S bits of GRE: all 8 combinations resolve in one access.
- **Branch condition evaluator (BCE).** Tests a field against a reference
  value with one of eight conditions: always, ==, !=, <, <=, >, >=, or
  "(field & ref) == 0". It is ready 2 cycles after start. Its entry (the
  reference value and target) is read at Address_1, the address field it
  shares with the branch catalyst.

Each of the five units that consume header data (NHRU, BC, BCE, header
counter, payload counters) has its own **extraction engine**. The engine
works on the EX-stage segment under a 5-bit mode:

| mode | extracts |
|---|---|
| 0 | nothing; the unit is idle |
| 1–8 | nibble 0–7 |
| 9–12 | byte 0–3 |
| 13–15 | the 16-bit field starting at byte 0, 1 or 2 |
| 16 | the whole word |
| 17–30 | single bit 31–18 |
| 31 | activates the unit with a zero field, for constant-only counter targets and unconditional BCE branches |

A single NHRU or BC lookup, an HC load and a PC load can all come from the
same instruction. For example, the first IPv4 word does all of the
following at once:

- writes version/IHL, TOS and Total Length to the PHV;
- loads the header counter from IHL;
- loads a payload counter from Total Length;
- asks the BCE whether IHL > 5.

## Instruction word (96 bits, first field in the MSBs)

| bits | field | use |
|---|---|---|
| 95:94 | `br_type` | sequential / NHRU / BC / BCE |
| 93:91 | `br_cond` | BCE condition |
| 90:66 | `xm_nh, xm_bc, xm_bce, xm_hc, xm_pc` | extraction modes, 5 bits each |
| 65:60 | `a_nh` | NHRU comparand/address memory base |
| 59:53 | `nh_iter` | NHRU words to search (0 acts as 1) |
| 52:47 | `a_bc` | BC memories and BCE entry |
| 46:41 | `a_hc` | header counter target entry |
| 40:35 | `a_pc` | payload counter target entry |
| 34:33 | `seg` | segment size 0 / 1 / 2 / 4 bytes |
| 32:29 | `phv_mode` | PHV filler mode |
| 28:9  | `phv_a0..a3` | PHV addresses (4, 4, 6, 6 bits) |
| 8 | `stk_next` | push PC+1 (1) or PC (0) |
| 7 | `stk_push` | push onto the return stack |
| 6:0 | unused | |

An all-zero word is a no-op that reads nothing. `parser_pkg.sv` defines the
word as the packed struct `instr_t`, and builds programs from it.

## PHV and the PHV filler

The PHV has seven banks, so up to four containers can be written in one
cycle:

| banks | container width | entries |
|---|---|---|
| 4 | 8 bits | 16, 16, 64 and 64 |
| 2 | 16 bits | 64 each |
| 1 | 32 bits | 64 |

`phv_rd_bank` numbers the banks 0–3 for the 8-bit banks, 4–5 for the
16-bit banks and 6 for the 32-bit bank.

The filler splits a segment into units whose sizes add up to the segment
size. The modes are 8, 16, 8+8, 32, 16+16, 16+8+8, 8+16+8, 8+8+16 and
8+8+8+8. The 4-bit mode field has six spare codes, which write nothing.

Address routing:

| address field | drives |
|---|---|
| `phv_a0` | 8-bit bank 0 |
| `phv_a1` | 8-bit bank 1 |
| `phv_a2` | 8-bit bank 2, or 16-bit bank 0, or the 32-bit bank |
| `phv_a3` | 8-bit bank 3, or 16-bit bank 1 |

In the 8+8+8+8 mode, the third byte goes to 8-bit bank 2 and the fourth to
bank 3.

## Configuration

The configuration port writes one entry per cycle. Set `cfg_we`,
`cfg_sel`, `cfg_addr` and `cfg_wdata` (136 bits, right-aligned).

| `cfg_sel` | target | data |
|---|---|---|
| `CFG_IMEM` | instruction memory, 256 × 96 | `instr_t` |
| `CFG_NH_CMP` | NHRU comparands, 64 × 8 slots | `cmp_word_t`: {valid, 16-bit value} per slot |
| `CFG_NH_ADR` | NHRU targets, 64 × 8 | `addr_word_t`: 8-bit address per slot |
| `CFG_BC_CMP`, `CFG_BC_ADR` | branch catalyst | as for the NHRU |
| `CFG_BCE` | BCE entries, 64 | `bce_entry_t`: {reference, target} |
| `CFG_HC`, `CFG_PC` | counter targets, 64 each | `cnt_entry_t`: {counter, kind, use field, shift, offset} |
| `CFG_NH_DEF` | NHRU default address | 8 bits |

Write everything before raising `run`. The memories are not reset.

## Example program (in `tb/tb_prog_pkg.sv`)

The testbenches share one parse program. It covers:

- Ethernet, with VLAN;
- IPv4 with options: a TLV dispatcher, handlers for options 0x44 and 0x07,
  and a byte-skipping loop for unknown options;
- IPv6;
- MPLS stacks, looping on the bottom-of-stack bit;
- VXLAN, found by the NHRU on the UDP destination port 4789;
- L2TP over UDP: the branch catalyst dispatches on the L, S and O flags of
  the first byte, and each handler ends with an unconditional evaluator
  branch to the end subroutine (offset padding is assumed absent);
- GRE over IPv4: the branch catalyst dispatches on the C/K/S flags to one
  of eight short handlers, while the NHRU resolves the protocol type;
- TCP with options, UDP and ICMPv6;
- an "end" subroutine, which is the NHRU default.

The program lies within addresses 0–151 of the 256-word instruction
memory. It is the best place to see how the mechanisms combine.

## Measured parse times

The headers below were parsed with the whole packet already buffered. Each
count is the number of cycles from packet start to `hdr_done`, with the
example program (`tb_header_parser` prints these):

| header stack | header bytes | cycles |
|---|---|---|
| Ethernet / IPv4 / TCP | 54 | 21 |
| Ethernet / IPv6 / TCP | 74 | 24 |
| Ethernet / IPv6 / ICMPv6 (8-byte ICMPv6 header) | 62 | 21 |
| Ethernet / MPLS ×3 / IPv6 / UDP | 74 | 37 |

Time per header is measured from the first issue of the header's
subroutine to that of the next header (to `hdr_done` for the last one):

| header | bytes | cycles |
|---|---|---|
| Ethernet | 14 | 8 |
| IPv4 (no options) | 20 | 6 |
| TCP (no options) | 20 | 6 |
| IPv6 | 40 | 10 |
| MPLS, 3 labels | 12 | 12 (4 per label) |
| GRE, all 8 flag combinations | 4–16 | 6–8 |
| VXLAN (last header) | 8 | 3 |
| L2TP, all 8 combinations of the L/S/O flags | 6–14 | 8–11 |

At a 2 GHz clock, the slowest header stack above, 74 bytes in 37 cycles, would be
about 32 Gb/s of headers for one parser. Timing closure at that clock was
not studied.

## Departures and choices to be aware of

- **No overlap between packets.** Forwarding one packet's payload and
  parsing the next packet's headers do not overlap. The next packet waits
  for both the payload to drain and `phv_ack`.
- **No checksums.** Checksum verification is not implemented.
- **One parser instance.** Several instances sharing input ports are not
  modelled.
- **Memories are plain arrays** with synchronous read. Synthesis maps them
  to memory cells; SRAM macros would replace them in an ASIC flow.
- **This design's own choices.** All encodings are defined in
  `parser_pkg.sv`:
  - extraction modes, filler modes, branch types and conditions;
  - the bit order of the instruction word;
  - the formats of the parameter memories, the counter formula and the
    two payload-counter kinds;
  - the valid bit per comparand slot, and first-match-wins;
  - the BCE sharing Address_1 with the branch catalyst;
  - the end-of-packet marks;
  - the padding drop;
  - the `phv_valid/phv_ack` handshake.
- **Segment sizes.** These are 0, 1, 2 or 4 bytes. A field that straddles
  a 4-byte segment boundary cannot be extracted in one piece. The program
  must read the header so that key fields fall inside one segment; the
  2-byte reads exist for this.
- **Truncated packets.** If a packet ends while its header counter still
  expects bytes, the parser waits for bytes that belong to the next packet.
  The program must not describe more header than the packet has.

## Files

| file | contents |
|---|---|
| `rtl/parser_pkg.sv` | instruction word, memory entry formats, encodings, field extraction and counter formula |
| `rtl/packet_parser.sv` | top |
| `rtl/incoming_packets_buffer.sv` | byte FIFO with per-byte end marks |
| `rtl/header_parser.sv` | FI/FH/EX/WB pipeline |
| `rtl/instr_mem.sv`, `rtl/param_mem.sv` | memories |
| `rtl/phv_filler.sv`, `rtl/phv.sv` | PHV write path and banks |
| `rtl/apc.sv` | program control |
| `rtl/header_counter.sv`, `rtl/payload_counters.sv`, `rtl/apc_stack.sv` | counters and return stack |
| `rtl/next_header_resolve.sv`, `rtl/branch_catalyst.sv`, `rtl/branch_condition_evaluator.sv` | branch units |
| `rtl/extraction_engine.sv` | one extraction engine |
| `rtl/payload_forwarder.sv` | payload output |

Each `tb/tb_<module>.sv` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_packet_parser` runs the top at its default sizes. It sends 60 packets
  of nine kinds, in random-sized beats with random gaps. It checks every
  PHV field and every payload byte. It also counts the following, and fails
  if any of them never happened:
  - buffer stalls;
  - header counter expiries;
  - stack returns and pushes;
  - unit branches;
  - NHRU defaults;
  - padding drops;
  - backpressure.
- `tb_header_parser` exercises the pipeline and the APC on the header
  stacks above and prints the cycle counts.

Simulating with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/parser_pkg.sv tb/tb_prog_pkg.sv tb/tb_packet_parser.sv --top-module tb_packet_parser
./obj_dir/Vtb_packet_parser
```

For a single block, list `rtl/parser_pkg.sv` and its testbench. Add
`tb/tb_prog_pkg.sv` for the top, `tb_header_parser` and `tb_parser_pkg`.
