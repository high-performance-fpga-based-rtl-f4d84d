# Memory-based signature detector for network intrusion detection

Hardware pattern matchers for intrusion detection usually turn every rule
into logic: one comparator chain or state machine per signature. That runs
fast, but the number of rules is limited by the gates on the chip. Signature
databases such as ClamAV's have tens of thousands of entries.

This design keeps the rules in memory instead. The hardware does not decide
on its own whether a packet is malicious. Its job is to cut the software's
work down to checking **one** rule:

1. A **Bloom filter** slides an 8-byte window over the payload, one byte per
   cycle. It flags every window that *may* be the start of a stored
   signature.
2. A small **buffer** holds flagged windows until the next stage is free.
3. The **detection stage** checks each flagged window exactly:
   - a **CAM** looks up the window's first two bytes (the *key*);
   - a **signature RAM** holds the remaining six bytes of each signature;
   - a **comparator** compares them with the window.

   The result is one of three:
   - *not suspicious*: the Bloom filter gave a false positive;
   - *match*, with a 19-bit serial number that names the one rule software
     has to verify;
   - *suspicious information*: the CAM address of a key group too large to
     search in hardware, so software searches that group.

The software analyzer that uses these results is not part of the RTL. The
result ports of `ids_top` are its interface.

```
 payload bytes ──► bloom_filter ──► suspect_fifo ──► fpga_detection ──► results
 (1 byte/cycle)    8-byte window     8 x 64 bit      ┌───────────────┐   match + which[18:0]
                   4 hashes          drop+overflow   │ cam  (16→16)  │   susp  + susp_info[15:0]
                                     when full       │ sig_ram (2^19)│   (or "clean")
                                                     │ sig_comparator│
                                                     │ detection_ctrl│
                                                     └───────────────┘
```

## Key groups and the rule number

This is the part that needs care when the rule tables are built.

A 64-bit window `d` is split into two parts:
- the **key** `d[63:48]`, the first two payload bytes;
- the **remainder** `d[47:0]`.

Signatures with the same key form a **key group**. Each group has one CAM
entry; its CAM address `g` (16 bits) identifies the group. The group's
signatures sit in the signature RAM at rows `{g, slot}`, with `slot` =
000, 001, … (3 bits, so 19-bit row addresses). Each row is 49 bits:

| bit 48 | bits 47:0 |
|---|---|
| finish: 1 on the group's last row, 0 on the others | the signature's remainder |

The detection controller handles one window as follows:

1. Search the CAM for the key. On a miss the result is *not suspicious*.
2. Read row `{g, 000}`.
3. If the remainder equals the row → **match**. The output `which` =
   `{g, slot}` is the rule's serial number.
4. If it does not match and the row's finish bit is 0 → go to the next slot
   (address + 1) and repeat step 3.
5. If it does not match in slot 111 (the eighth row) → **suspicious
   information**: `susp_info = g`. A group can hold signatures beyond
   those eight rows, so software must search the group.
6. If it does not match on a finish row before slot 111 → *not
   suspicious*.

A group therefore holds at most eight signatures in hardware. To load a
group with more than eight, store any eight of them in slots 0–7 and keep
the whole group in software. Step 5 applies to every mismatch in slot 111.
So a group of exactly eight signatures that does not contain the window also
produces suspicious information, not a clean result.

Two worked examples, both reproduced by the testbenches at full size:

- Key `558b` at CAM address `0000` holds two rows, `ecc746020000` and
  `ecc746020040` (finish). The window `558becc746020040` misses slot 0 and
  matches slot 1. The result is match with `which = 19'h00001`.
- Key `5055` at CAM address `2001` holds eight rows, none equal to
  `8becc7460202`. The window `50558becc7460202` reads all eight rows. The
  result is `susp_info = 16'h2001`.

### Loading a rule set

Software does this through the load ports. Any loading order works, but the
tables must be complete before traffic that uses them arrives.

- **CAM**: for each group, write `cam_wr_addr = g`, `cam_wr_key = key`,
  `cam_wr_valid = 1`. Keys must be unique. If a key is stored twice, the
  lowest address wins.
- **Signature RAM**: for each signature, write row `{g, slot}` with the
  remainder and the finish bit.
- **Bloom filter**: for each signature's first 8 bytes `s` and each hash
  `i` in `0..NH-1`, set bit `bf_hash(i, s)` of vector `i`. Leave
  `bf_wr_bit = 1` for a set; write 0 to clear a bit. Clearing is only safe
  if no other signature uses that bit.

`bf_hash` is an H3-class hash, defined in `rtl/ids_pkg.sv`. For each input
bit `b` set in `s`, it XORs in the constant

    C(i, b) = ((b*NH + i + 1) * 0x9E3779B1 mod 2^32) >> (32 - MW)

Reset clears the CAM's valid bits, the Bloom vectors and all control state.
The signature RAM is not reset; a row is read only when its CAM entry is
valid.

## Detection stage timing

The detection stage handles one window at a time. `in_ready` is high only
in the idle state. Take a window accepted at clock edge `t`:

| outcome | result registered at | window occupies the stage for |
|---|---|---|
| key not in the CAM | t+1 | 2 cycles |
| decision at slot k (0–7) | t+2+k | 3+k cycles |

`res_valid`, `match` and `susp` are one-cycle pulses. `which`,
`susp_info` and `result` hold their value until the next result. A
first-slot match therefore costs 3 cycles per 64-bit window; a search
through a full group costs 10.

The Bloom filter can flag a window on every byte, which is one flagged
window per cycle in the worst case. Long runs of flagged windows are not
expected in real traffic; the buffer absorbs short ones. The payload is
never stalled. A window flagged while the buffer is full is dropped, and
`overflow` pulses for it.

## Bloom filter front end

- One 64-bit window, shifted one byte per `byte_valid` cycle. The first
  byte of the window is in bits 63:56.
- Four hash functions (`BF_NH`), each indexing its own 65536-bit vector
  (`BF_MW = 16`). A window is flagged when all four bits are set.
- Sizing: with n signatures loaded, a random window is flagged with
  probability about (1 - e^(-n/2^MW))^4. For the 20000-signature rule set
  this design targets, that is 0.5 % at `BF_MW = 16`. At 12 bits it would
  be 97 %, and every window would go to the detection stage.
- Windows are tested from the eighth byte of a payload onward.
  `pkt_start` restarts the window, so no window spans two payloads.
- Timing: `sus_valid`/`sus_data` come one edge after the edge that took
  the completing byte. `window_tested` pulses for every window tested,
  flagged or not.

## Top-level ports (`ids_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `pkt_start`, `byte_valid`, `byte_in` | in | 1, 1, 8 | payload stream |
| `bf_wr_en`, `bf_wr_sel`, `bf_wr_idx`, `bf_wr_bit` | in | 1, 2, 16, 1 | Bloom vector write |
| `cam_wr_en`, `cam_wr_addr`, `cam_wr_key`, `cam_wr_valid` | in | 1, 16, 16, 1 | CAM entry write |
| `ram_wr_en`, `ram_wr_addr`, `ram_wr_data` | in | 1, 19, 49 | signature row write (`sig_entry_t`) |
| `sus_valid`, `sus_data`, `window_tested` | out | 1, 64, 1 | Bloom filter activity |
| `buf_full`, `overflow` | out | 1, 1 | buffer full; flagged window dropped |
| `res_valid`, `result` | out | 1, 2 | result strobe; `RES_CLEAN`/`RES_MATCH`/`RES_SUSPECT` |
| `match`, `which` | out | 1, 19 | match and rule serial number |
| `susp`, `susp_info` | out | 1, 16 | suspicious information (CAM address of the group) |

Parameters: `CAM_AW` (16; RAM address = `CAM_AW+3`), `BF_NH` (4),
`BF_MW` (16), `FIFO_DEPTH` (8, must be a power of two).

## What follows the source architecture and what is this design's own

Taken from the published architecture:
- the three-stage chain (Bloom filter, detection, software);
- 64-bit windows split into a 16-bit CAM key and a 48-bit comparison;
- the 16-bit CAM address extended by three bits to address the RAM;
- the finish bit as the leftmost bit of a row;
- the address+1 search and the eighth-slot rule;
- the 19-bit address as rule number;
- the two worked examples.

Chosen here, because the architecture does not specify them:
- the Bloom filter's hashes, their number and the vector size;
- the buffer's depth, and dropping windows when it is full;
- all handshakes and cycle timing, and the synchronous memories;
- reset behaviour and the load ports;
- the CAM written as parallel registers (the original builds it from FPGA
  CAM blocks plus glue logic) with lowest-address priority;
- a CAM miss reported as not suspicious;
- what `susp_info` carries: the CAM address of the group. The source's
  prose speaks of "information about the prefix", while its example
  output is the group's address; the address was used.

The published throughput (1.514 Gbit/s on average, 2.432 Gbit/s for the
majority of signatures) is stated without a clock frequency. It cannot be
compared with this RTL. For reference, a first-slot match here needs 3
cycles per 64-bit window, so 2.432 Gbit/s would need about 114 MHz.

## Size and synthesis

At the default size:
- the CAM holds 65536 × 16-bit keys in registers, each with its own
  comparator and a priority encoder;
- the signature RAM is 2^19 × 49 bits (25.7 Mbit);
- the Bloom filter holds 4 × 65536 vector bits in registers, so that
  reset can clear them.

These are the architecture's address widths. They are far larger than a
20000-signature rule set needs, and larger than the FPGA the architecture
was built for. To synthesise for a real device, lower `CAM_AW` to what the
rule set requires (for example 15 for 20000 keys). Or replace `cam` with a
vendor CAM or a hash-based lookup that keeps the same ports. Generic logic
synthesis of the 65536-entry register CAM is very slow.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `cam_tb` | random loads, searches, invalidation, duplicate priority, one-cycle latency, reset |
| `sig_ram_tb` | read-back of every row, read latency and hold |
| `sig_comparator_tb` | every single-bit difference, finish bit pass-through |
| `suspect_fifo_tb` | order, flags, dropped push and overflow pulse against a queue model |
| `bloom_filter_tb` | window-by-window prediction with an independent hash model, packet restart, near-miss strings |
| `detection_ctrl_tb` | every slot, the eighth-slot rule, CAM miss, exact latency per outcome |
| `fpga_detection_tb` | full size (16/19-bit addresses), both worked examples, random groups, latency |
| `ids_top_tb` | full-size end-to-end run |
| `ids_ruleset_tb` | full size with a 20000-signature rule set |

`tb/det_model_pkg.sv` is the shared reference model of the detection stage.

`ids_top_tb` streams two payloads. It checks every flagged window and
every result against its own models. It also counts each mechanism and
requires each to occur at least once: window tested, window flagged,
packet restart, false positive with the key absent, false positive inside
a group, first-slot match, match after address+1, suspicious information,
a window waiting in the buffer, a full buffer, and overflow.

`ids_ruleset_tb` loads 20000 random signatures, which fall into about 17000
key groups, including four groups with more signatures than slots. It
streams 4000 bytes with 120 of them embedded and checks every flagged window
and result. In a typical run, 0.4 % of the random windows are Bloom filter
false positives, all 120 embedded signatures are flagged, and every one is
resolved as a match or as suspicious information.

Not covered: timing closure on any device, and real signature data.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/ids_pkg.sv tb/det_model_pkg.sv tb/ids_top_tb.sv \
  --top-module ids_top_tb -Mdir obj_top
obj_top/Vids_top_tb
```

The packages are listed first; Verilator finds the modules through `-y`.
Swap `ids_top_tb` for any other testbench. Each runs in about a second,
except `ids_ruleset_tb`, which takes about ten seconds to load its 20000
signatures. Testbenches use
two-state values; every register that is read is reset or written first.

## Files

- `rtl/ids_pkg.sv`: widths, `sig_entry_t`, `result_e`, Bloom hash.
- `rtl/ids_top.sv`: the chain.
- `rtl/bloom_filter.sv`, `rtl/suspect_fifo.sv`: front end and buffer.
- `rtl/fpga_detection.sv`: detection stage, built from:
  - `rtl/cam.sv`
  - `rtl/sig_ram.sv`
  - `rtl/sig_comparator.sv`
  - `rtl/detection_ctrl.sv`
- `tb/*_tb.sv`, `tb/det_model_pkg.sv`: testbenches and reference model.
