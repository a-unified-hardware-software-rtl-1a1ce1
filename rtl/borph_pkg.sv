// borph_pkg: types and constants shared by the message network of the
// BORPH user-FPGA shell.
//
// A message (packet) between the kernel on the control FPGA and a user FPGA
// starts with a 12-byte header: one byte CMD, three bytes LOC (a file
// descriptor number or an ioreg location number), a 32-bit OFFSET and a
// 32-bit SIZE. WRITE messages and READ_ACK messages with a positive SIZE are
// followed by SIZE payload bytes. The field layout and the six commands follow
// the document; the numeric command codes, the most-significant-byte-first
// order of multi-byte fields and the error codes are this design's choices.
//
// The on-chip peripheral bus (OPB) is carried in two packed structs, one per
// direction. Slaves drive all-zero responses when not addressed so that the
// bus can OR them together, as OPB does.
package borph_pkg;

  typedef enum logic [7:0] {
    CMD_READ      = 8'h01,
    CMD_READ_ACK  = 8'h02,
    CMD_WRITE     = 8'h03,
    CMD_WRITE_ACK = 8'h04,
    CMD_GREET     = 8'h05,
    CMD_EXIT      = 8'h06
  } cmd_e;

  typedef struct packed {
    cmd_e        cmd;
    logic [23:0] loc;
    logic [31:0] offset;
    logic [31:0] size;     // byte count; negative in an ACK means error
  } msg_hdr_t;

  localparam int HDR_BYTES = 12;

  // Negative return values carried in the SIZE field of an acknowledge.
  localparam logic [31:0] ERR_INVAL = -32'sd22;  // no such ioreg
  localparam logic [31:0] ERR_BADF  = -32'sd9;   // wrong direction

  // Kinds of ioreg (Table of ioreg types: register, memory, FIFOs).
  typedef enum logic [1:0] {
    IOREG_REG       = 2'd0,  // 4 bytes, read/write, not seekable
    IOREG_MEM       = 2'd1,  // any size, read/write, seekable
    IOREG_FIFO_FROM = 2'd2,  // FIFO filled by the user design: software reads
    IOREG_FIFO_TO   = 2'd3   // FIFO drained by the user design: software writes
  } ioreg_type_e;

  // True when a message of this header carries SIZE payload bytes.
  function automatic logic has_payload(msg_hdr_t h);
    return (h.cmd == CMD_WRITE || h.cmd == CMD_READ_ACK) &&
           !h.size[31] && (h.size != 32'd0);
  endfunction

  // OPB request from the master, response from a slave.
  typedef struct packed {
    logic        select;   // transfer in progress, held until an acknowledge
    logic        rnw;      // 1 read, 0 write
    logic [31:0] abus;     // byte address, word aligned
    logic [3:0]  be;       // byte enables, be[3] = bits 31:24 = byte 0
    logic [31:0] dbus;     // write data
  } opb_req_t;

  typedef struct packed {
    logic [31:0] dbus;     // read data, 0 when not acknowledging a read
    logic        xferack;  // transfer done
    logic        errack;   // transfer failed
  } opb_rsp_t;

  localparam opb_rsp_t OPB_RSP_IDLE = '{dbus: 32'd0, xferack: 1'b0, errack: 1'b0};

endpackage
