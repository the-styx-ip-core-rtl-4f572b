# Styx IP-core: a hardware 9P file server and client

Styx (the Inferno name for the 9P2000 protocol) lets devices talk to each
other through files: a device exports a small file tree, and anything that
can open, read and write a file can use the device. Writing a byte to a
`leds` file lights LEDs; reading a `switches` file returns the switch
positions. This RTL puts that protocol in hardware, so a board with no CPU
and no operating system can be mounted over a serial line by a Styx client
(for example Inferno or Plan 9) and its devices used as files, and so a
small system can also act as a Styx client towards another server.

The core is one block, `styx_core`, that is a server and a client at the
same time. As a server it answers requests (`T` messages) from a remote
client out of a namespace held in a 512-byte RAM, whose files are tied to
devices. As a client it turns short instructions from a local CPU into
requests to a remote server and reports the replies (`R` messages). The
board-level top, `styx_top`, adds a UART and a bus controller so that the
serial line feeds the core directly.

## The wire format the core speaks

Every Styx message is `size[4] type[1] tag[2] body`, little-endian, where
`size` counts the whole message. Strings are `len[2]` followed by the
characters. The core handles these requests and replies:

| request | bytes here | reply | bytes here |
|---|---|---|---|
| Tversion (msize, "9P2000") | 19 | Rversion | 19 |
| Tauth (afid, user, password in aname) | 15 + strings | Rauth (QID) | 20 |
| Tattach (fid, afid, user, aname) | 19 + strings | Rattach (root QID) | 20 |
| Twalk (fid, newfid, 0 or 1 name) | 17 / 19 + name | Rwalk (0 or 1 QID) | 9 / 22 |
| Topen (fid, mode) | 12 | Ropen (QID, iounit 0) | 24 |
| Tread (fid, offset[8], count[4]) | 23 | Rread (count, data) | 11 + n |
| Twrite (fid, offset[8], count[4], data) | 23 + n | Rwrite (count) | 11 |
| Tclunk (fid) | 11 | Rclunk | 11 |
| Tstat (fid) | 11 | Rstat (one stat entry) | 58 + name |
| anything else | | Rerror (text) | 9 + text |

A QID is 13 bytes: type[1], version[4], path[8]. Message layouts follow
9P2000 exactly. The original design's published byte counts agree for
version, attach, open, clunk and Rwrite, but give 35 bytes for Rwalk and
33/281 bytes for Twrite of 8/255 data bytes; this RTL keeps to the 9P2000
layout (22, 31 and 278 bytes).

## How a transaction moves through the core

```
 system bus ──► input buffer ─┬─► dispatcher ─┬─► server decoder ──► server encoder ─┐
  (addr 0/1)   msg FIFO  64 B │               │      │   │               ▲          ├─► output FIFO ──► bus (addr 0 read)
               inst FIFO 64 B │               │      ▼   ▼               │ Rread    │      64 B
                              │               │   auth  namespace ───────┘ data     │
                              │               │         (RAM + device control)      │
                              │               └─► client decoder ──► client encoder ┘
                              │                        └─► cl_rsp_* / cl_dat_* (to the CPU)
```

* **Input buffer** (`styx_in_buf`): two 64-byte register FIFOs, one for
  bytes of network messages (bus address 0) and one for instruction bytes
  from the CPU (bus address 1), so that the two never interleave.
* **Dispatcher** (inside `styx_core`): handles one transaction at a time,
  instructions first. It reads an instruction's code and two-byte length,
  or a message's four-byte size and its type, and hands the rest to one
  decoder. Server instructions (codes 0x80 and up) and `T` messages (even
  type numbers) go to the server; client instructions (0x01–0x07) and `R`
  messages (odd types) go to the client. It waits until that decoder, and
  the reply it caused, have finished. Only one message is ever in flight.
* **Decoders** pop the remaining bytes themselves, one per cycle. Bulk data
  is never stored whole: Twrite data goes from the input buffer straight
  into the file, Rread data straight out of the namespace RAM into the
  output buffer. A 278-byte Twrite therefore passes through a 64-byte
  buffer.
* **Encoders** build the outgoing message one byte per cycle into the
  shared 64-byte output FIFO, stalling while it is full. An N-byte message
  takes N cycles once started.

### Bus registers of `styx_core`

| addr | write | read |
|---|---|---|
| 0 | next byte of a network message | next output byte (pops the output FIFO) |
| 1 | next instruction byte (code, len[2], data) | status `{0,0,rsp_pending,rsp_err,out_avail,inst_full,msg_full,busy}` |
| 2 | – | type of the last `R` message the client received (clears rsp_pending) |
| 3 | – | error code of the last server instruction |

Accesses take effect in the cycle `bus_we`/`bus_re` is high; read data is
combinational. `msg_ready` and `out_avail` are also outputs so a network
interface can move bytes without polling.

## The namespace

The namespace is flat: every file is a child of the root (QID type 0x80,
path 0). Files are stored back to back in the RAM as records

```
QID (13 bytes) | name (8 bytes, zero padded) | length (1 byte) | data (length bytes)
```

so a record holds at most 255 bytes and a name at most 8 characters. A
larger file is stored as several records (parts) with the same name, and
the server treats them as one file.

* **Search** (`NS_FIND`) scans records from address 0, 24 cycles per record
  (22 header reads plus compare). A record whose QID type is 0xFF has been
  deleted and is skipped. A search can also be given a file offset. Then
  each part of the named file that ends before the offset is skipped and
  its length subtracted. The search returns the part holding the offset and
  the offset within that part.
* **Adding** a file (instruction 0x80) appends the record at a free pointer
  one byte per cycle and then commits it. The length given fixes the
  record's capacity. Adding a record whose name already exists adds a
  further part to the end of that file. Deleting (0x81) marks every part of
  the file as deleted; the space is not reclaimed.
* **Reset preload:** a reset writes four device files, one data byte each,
  taking 92 cycles:

| file | QID path | device |
|---|---|---|
| `leds` | 1 | byte 0 drives the 8 LEDs |
| `switches` | 2 | reads return the (synchronised) switch inputs |
| `segment` | 3 | byte 0 shown as two hex digits on the 7-segment outputs |
| `bell` | 4 | bell on while byte 0 is non-zero |

The **device control logic** (`styx_devctl`) makes device files live. It
watches writes into them and updates the device, and it answers reads of
the switch file from the switches instead of the RAM. The low byte of a
file's QID path is its device number. A file added later whose path is
1–4 therefore drives the same device.

## Server side

`styx_srv_decoder` goes through COLLECT (gather the fixed fields in a
32-byte buffer), EXEC (check with the authentication unit, search the
namespace, update the fid table), STREAM (move Twrite data or an added
record into the RAM, or drop the rest), REPLY (start the encoder and wait).
A T message of N bytes is decoded in about N + 3 cycles, plus the name
search for a Twalk.

* **fids:** a table of 4 entries (fid, record, opened, mode). Tversion
  clears it. Twalk clones a fid or walks one name from the root. Topen checks
  rights. Tread and Twrite need an opened fid. Tclunk frees the entry.
* **Authentication** (`styx_auth`): the version must be `9P2000`. There
  are 4 user slots with an 8-character name and password. After reset slot 0
  is `inferno`, with no password, so it may attach directly. A user with a
  password must first send Tauth carrying the password in its aname string.
  Passwords are compared in plain text. Each QID path 0–15 has read and
  write permission bits, which allow both by default.
* **Reads and writes** are clipped: Tread returns at most the bytes from
  the offset to the end of the part holding the offset, and Twrite stops at
  the end of that part. A client reading or writing a split file therefore
  gets short counts at part boundaries and carries on from the next
  offset, as 9P clients do anyway. An offset inside the first part is
  served at once; a larger offset costs a part search.
* **Tstat** returns a 9P2000 stat entry for the fid's file: its QID, mode
  0666 (or 0755 with the directory bit for the root), zero times, its
  length, its name (`/` for the root) and empty owner names.
* **Errors:** any failure gives Rerror with a short text: `version`, `auth`,
  `no file`, `bad fid`, `perm`, `full`, `not open`, or `no` for an
  unsupported request.

Server instructions, written to bus address 1 as `code, len[2], data`:

| code | action | data |
|---|---|---|
| 0x80 | add a file, or one more part of it | the whole record: QID[13], name[8], length[1], contents |
| 0x81 | delete a file with all its parts | name[8] |
| 0x82 | set rights | QID path[1], bits[1] (bit 0 read, bit 1 write) |
| 0x83 | set a user | slot[1], name[8], password[8] (empty name removes the user) |
| 0x84 | set verification mode | mode[1], shown on `verif_mode` |

Instructions have no reply. Register 3 holds the result (0 = success).

## Client side

Client instructions (bus address 1) use the same `code, len[2], data`
format. Fid 0 is the root and fid 1 the file being used:

| code | sends | data |
|---|---|---|
| 0x01 | Tversion, tag NOTAG, msize 512 | – |
| 0x02 | Tattach fid 0, afid NOFID | user name |
| 0x03 | Twalk 0 → 1 | one name, or nothing for a clone |
| 0x04 | Twalk 0 → 1 to the name (if any), then Topen fid 1 | mode[1], name |
| 0x05 | Tread fid 1 | offset[1], count[1] |
| 0x06 | Twrite fid 1 at offset 0 | the bytes to write (any length, streamed) |
| 0x07 | Tclunk fid 1 | – |

Tags count up from 0 for every message but Tversion. When an `R` message
arrives, its type and tag are reported on `cl_rsp_*` for one cycle, and
`cl_rsp_err` marks an Rerror. Rread data comes out on `cl_dat_valid`/`cl_dat`,
one byte per cycle. The type also stays readable in register 2.

## Board level: `styx_top`

`styx_top` connects `styx_uart` (8N1, `CLKS_PER_BIT` = 217, i.e. 115200
baud at 25 MHz) through `styx_busctl` to `styx_core`. The bus controller
contains a bridge: it writes each received byte into the message register
when `msg_ready` is set, and moves output bytes to the transmitter. The CPU
port (`cpu_req/we/addr/wdata`, `cpu_gnt`, `cpu_rdata`) reaches the same
registers. When both want the bus in one cycle they take turns. With no CPU
attached (tie `cpu_req` low) the board is a stand-alone Styx file server on
its serial port.

Parameters of `styx_top` (defaults): `CLKS_PER_BIT` 217, `BUF_DEPTH` 64,
`NS_BYTES` 512, `NFID` 4, `NUSERS` 4, `MSIZE` 512.

## Timing

At 25 MHz one cycle is 40 ns. Once the bytes are in the input buffer, an
N-byte request decodes in about N + 3 cycles: about 0.9 µs for a
Tversion and 11.2 µs for a 278-byte Twrite. An N-byte reply is encoded in
N cycles, so a 19-byte Rversion takes 0.76 µs. A Twalk adds 24 cycles for each record ahead of the name in the
namespace. The serial line is far slower: one byte takes 2170 cycles.

## Limits and departures

* The serial line has no flow control. While the core is busy, a message
  longer than the free space of the input buffer overruns the UART
  (`rx_overrun` is set). A client must wait for each reply before sending
  the next request. That is how Styx clients normally behave.
* Tstat on the root describes the root only; it does not list the files.
  For a split file, Rstat reports the length of the first part.
* Tcreate, Tremove, Twstat and Tflush get Rerror. The tree is one level
  deep.
* There is no VGA/switch on-chip verification unit. Only its mode register
  (instruction 0x84) exists.
* Deleted records keep their space. The namespace fills up after enough
  additions.
* The bus register map, the instruction data layouts, the error texts,
  the device numbering and the preload are this design's own choices.

## Files and simulation

`rtl/` holds one module per file: `styx_pkg` (types, message codes, error
texts), `styx_fifo`, `styx_in_buf`, `styx_ns_ram`, `styx_devctl`,
`styx_namespace`, `styx_auth`, `styx_srv_decoder`, `styx_srv_encoder`,
`styx_cli_decoder`, `styx_cli_encoder`, `styx_core`, `styx_uart`,
`styx_busctl`, `styx_top`.

`tb/` has one self-checking testbench per module (`tb_<module>`) and
`styx_tb_pkg`, which builds reference messages byte by byte. Two testbenches
cover the whole design:

* `tb_styx_top` runs it end to end over the serial line and the CPU port
  at a short bit time. This includes a file of two parts and Tstat.
* `tb_styx_top_full` mounts the server with every parameter at its default
  (115200 baud at 25 MHz) and lights the LEDs through
  walk/open/write/clunk.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/styx_pkg.sv tb/styx_tb_pkg.sv \
    tb/tb_styx_core.sv --top-module tb_styx_core -o sim
./obj_dir/sim
```
