# BORPH hardware processes on a BEE2 module: SystemVerilog model

BORPH is an operating system for FPGA-based reconfigurable computers. It
treats a running FPGA design as a UNIX process, called a *hardware process*.
Like a software process, a hardware process can read and write files,
including stdin and stdout. Software reaches its registers and memories as
files: reading a file under the process's `ioreg` directory reads the
hardware.

The kernel runs on a PowerPC in the *control FPGA* of a BEE2 compute module.
Four *user FPGAs* hold the hardware processes. All traffic between the kernel
and a hardware process is a stream of small *messages*, carried one byte at a
time over the shared 8-bit SelectMap bus. The same bus configures the FPGAs.

This repository is the FPGA logic of that arrangement:

- the control FPGA's SelectMap controller;
- the logic placed around a user design in each user FPGA. It turns messages
  into register and memory accesses, and a hardware process's file requests
  into messages;
- example user designs: a counter, two shared memories with a handshake,
  user FIFOs, control registers, and a `stdloop` process that copies stdin to
  stdout.

The PowerPC, the kernel and the vendor cores are not part of this code. The
testbenches play the kernel through the controller's bus registers.

## Structure

```
borph_bee2_top
├── smap_ctrl                      control FPGA: OPB slave that drives the SelectMap bus
└── g_user[0..3].u_user : user_fpga
    ├── smap_fifo                  128-byte receive FIFO and 128-byte transmit FIFO on the bus
    ├── pkt_rx                     bytes -> message header + payload bytes
    ├── ioreg_server               serves READ/WRITE/GREET on ioregs (OPB master)
    ├── hwfile_client              hardware process's file I/O (READ/WRITE/EXIT)
    │   └── stdloop_hwproc         example process: stdin -> stdout
    ├── pkt_tx                     merges server and client messages -> bytes
    ├── opb_bus                    address decode, OR-ed responses, errack time-out
    └── ioregs on the OPB
        ├── ioreg_reg              32-bit registers (cntval, en0/1, rdy0/1, 16 control)
        ├── ioreg_bram ×2          8192-byte shared memories, dual-port
        ├── ioreg_fifo_from_user   FIFO read by software
        ├── ioreg_fifo_to_user     FIFO written by software
        ├── counter_hwproc         free-running counter feeding cntval
        └── shmem_sync ×2          enable/ready handshake filling each memory
```

`sync_fifo` is a shared FIFO helper, and `borph_pkg` holds the types and
constants. The whole design runs on one clock. The document gives 50 MHz for
the SelectMap bus.

## Messages

Every message starts with a 12-byte header:

| byte | field  | meaning |
|------|--------|---------|
| 0    | CMD    | command |
| 1–3  | LOC    | ioreg number for ioreg requests, file descriptor for file requests |
| 4–7  | OFFSET | byte offset, used for seekable ioregs |
| 8–11 | SIZE   | byte count; in an acknowledge, the result (negative on error) |

Multi-byte fields go most significant byte first. A payload of SIZE bytes
follows a WRITE, and a READ_ACK with positive SIZE. No other message has a
payload.

| code | command   | from → to | use |
|------|-----------|-----------|-----|
| 0x01 | READ      | kernel → ioreg server; process → kernel | read SIZE bytes |
| 0x02 | READ_ACK  | either way | count read, then the bytes |
| 0x03 | WRITE     | kernel → ioreg server; process → kernel | SIZE bytes follow |
| 0x04 | WRITE_ACK | ioreg server → kernel | count written |
| 0x05 | GREET     | kernel → server; server echoes it | liveness probe |
| 0x06 | EXIT      | process → kernel | process ends; SIZE = exit status |

The field names and their order are from the BORPH packet format. The byte
order, the command codes and the GREET echo are this design's. The error
values follow Linux errno:

- −22 (EINVAL): no such ioreg;
- −9 (EBADF): a write to a read-only ioreg, or a read from a write-only one.

A hardware process's file WRITE gets no acknowledge, which follows the
document. Its file READ blocks until the READ_ACK arrives.

Routing inside a user FPGA:

- READ, WRITE and GREET go to the ioreg server;
- READ_ACK goes to the file client;
- anything else is dropped.

`pkt_tx` alternates whole messages between the server and the client
(round-robin), so a long READ_ACK from one source holds the other source's
header back.

## The ioreg server

An ioreg is identified by its LOC. The server looks it up in three parameter
tables: OPB base address, size in bytes and kind. It handles each kind as
follows:

- **Register** (4 bytes, not seekable): OFFSET is ignored. At most 4 bytes
  move, and byte k of the word is bits `[31-8k -: 8]`.
- **Memory** (seekable): bytes OFFSET .. OFFSET+SIZE−1 move, clipped at the
  end of the memory. Writes are gathered into words and sent with byte
  enables, so unaligned transfers work.
- **FIFO from user** (read-only): the server first reads the status word at
  base+4 (fill level in words). It then pops as many whole words as the
  request and the fill level allow.
- **FIFO to user** (write-only): the same, using the free space in words.

The acknowledge's SIZE is the count actually moved, as with a UNIX
`read`/`write` return value. On a WRITE, payload bytes beyond that count are
consumed and dropped, so the receiver never stalls. The server handles one
message at a time. The next message waits in the 128-byte receive FIFO, and
`sm_busy` holds the kernel back while that FIFO is full.

## User FPGA ioreg map

LOC k is at OPB address `k << 14`. The document describes the case study only
as two 8192-byte shared memories and more than 20 single-word registers; the
LOC numbers and the address map are this design's.

| LOC | name | kind | bytes |
|-----|------|------|-------|
| 0 | cntval | register, written by the counter | 4 |
| 1 | shmem0 | memory | 8192 |
| 2 | en0 | register, software → hardware | 4 |
| 3 | rdy0 | register, hardware → software | 4 |
| 4 | shmem1 | memory | 8192 |
| 5 | en1 | register | 4 |
| 6 | rdy1 | register | 4 |
| 7 | FIFO from user | read-only FIFO, 256 words | 1024 |
| 8 | FIFO to user | write-only FIFO, 256 words | 1024 |
| 9–24 | control registers | register, brought out on `ctrl_regs` | 4 each |

That makes 21 registers. Each shared memory is guarded by its enable/ready
pair, handled by `shmem_sync`:

1. Software sets `en`.
2. The hardware writes a fresh block from its `samp_*` stream into the memory
   and sets `rdy`.
3. The hardware leaves the memory alone until software clears `en`, which
   also clears `rdy`.

A hardware write to a register wins over a software write in the same clock.

## The SelectMap link

`smap_ctrl` is an OPB slave on the control FPGA with four registers:

| offset | register | bits |
|--------|----------|------|
| 0x0 | CTRL   | `[SW-1:0]` selected user FPGA, `[8]` configuration mode |
| 0x4 | DATA   | write: send byte `[7:0]`; read: `[8]` valid, `[7:0]` byte |
| 0x8 | STATUS | `[7:0]` data waiting per FPGA, `[15:8]` busy per FPGA |
| 0xC | IRQ_EN | interrupt enable per FPGA; `irq` is the OR of enabled waiting bits |

How the registers work:

- A DATA write waits (no acknowledge) while the selected FPGA's receive FIFO
  is full. It then strobes the byte onto the bus for one clock.
- A DATA read returns a byte only if the selected FPGA has data waiting.
  Otherwise it returns 0 straight away.
- In configuration mode `sm_cfg` is high. The user FPGAs' message logic then
  ignores the bus, and the bytes leave through the top's ports for the FPGA
  configuration logic, which is not modelled here.

How the shared bus is built:

- Chip select, direction, strobe and write data fan out to every FPGA.
- Read data is the OR of all FPGAs; each drives zero unless it is selected.
- Busy and interrupt come back on one line per FPGA.

The bus width (8 bits), its two uses and the 128-byte receive FIFO are from
the document. The handshake, the transmit FIFO size and the register map are
this design's.

## OPB subset

The OPB is modelled as two packed structs:

- `opb_req_t`: select, rnw, abus, be, dbus;
- `opb_rsp_t`: dbus, xferack, errack.

Every slave drives zeros except while it acknowledges, so the responses are
OR-ed together. Slaves answer one clock after select. The bus raises errack
if no slave answers within 16 clocks, which covers an unmapped address. The
ioreg server reads an errack on a FIFO status word as an empty or full FIFO
(count 0). During data transfers it returns zero bytes for the failed word.

## Departures from the document and open points

- **The user-FPGA PowerPC is replaced by logic.** The document's user FPGA
  has a PowerPC, a PLB and an OPB bridge. Here the message handling is done
  by `ioreg_server` and `hwfile_client` in logic. The messages and what they
  do are the same.
- **stdloop reads at most `XFER_BYTES` = 128 bytes per request.** The
  document's benchmarks use read sizes up to 4096 bytes. Data of any length
  still passes through correctly, in 128-byte rounds. Set `XFER_BYTES` to
  4096 to issue 4096-byte requests.
- **FIFO ioregs move whole 32-bit words only.** A request that is not a
  multiple of 4 is rounded down.
- **Not built:** the PowerPC cores, the PLB and PLB-to-OPB bridge, Ethernet,
  the DDR2 controller and off-chip memory ioregs, the 50-bit direct links
  between FPGAs, the FPGA configuration logic, the kernel itself, and the
  radio case study's analog front end and spectrum analysis.
- **Unspecified in the document, chosen here:** header byte order, command
  codes, error values, the ioreg map, bus signalling and all reset values.
  Every reset value is zero, except that the arbiter starts so that source 0
  goes first.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. A watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/borph_pkg.sv tb/tb_borph_bee2_top.sv --top-module tb_borph_bee2_top
./obj_dir/Vtb_borph_bee2_top
```

Replace the name to run any other `tb/tb_<module>.sv`.

`tb_borph_bee2_top` runs the full-size design with no overridden parameters:

- four user FPGAs;
- 8192-byte memories;
- 128-byte bus FIFOs.

It takes a few seconds. Acting as the kernel, it only uses `smap_ctrl`'s
registers, and it exercises:

- register, memory and FIFO ioregs;
- the enable/ready handshake;
- error replies and GREET;
- stdloop file I/O to end of file and EXIT;
- configuration mode;
- interrupts, busy back-pressure and arbitration between the two message
  sources.

It counts how often each of these happens and fails any that never did.

`tb_borph_workloads` also runs at full size. It sweeps the benchmark sizes
s = 1, 2, 4, ... 4096 bytes in three workloads:

- ioreg writes and reads of a shared memory at unaligned offsets;
- tokens piped through `stdloop`, each file read returning at most what is
  left of the current token;
- a 4096-byte file copied by `stdloop`.

It prints the clocks each size takes. With the kernel side polling the
controller's registers, a memory write costs about 5 clocks per byte and a
read about 3.

Some unit testbenches shrink parameters to keep runs short:

| testbench | parameter override |
|-----------|--------------------|
| `tb_ioreg_fifo_from_user` | DEPTH 16 |
| `tb_ioreg_fifo_to_user` | DEPTH 16 |
| `tb_shmem_sync` | WORDS 32 |
| `tb_stdloop_hwproc` | XFER_BYTES 32 |

Other testbenches set small bus or arbiter sizes for the same reason. The
simulator is two-state, so all state that is read is reset.

Immediate assertions inside clocked blocks check two handshake rules:

- `smap_fifo`: no bus write while busy, and no bus read while nothing waits;
- `ioreg_server`: no payload byte taken beyond the request's SIZE.
