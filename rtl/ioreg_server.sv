// ioreg_server: answers the kernel's ioreg READ and WRITE messages on a user
// FPGA, moving the data over the OPB as the master.
//
// Each ioreg has a location number (the LOC of the message, its index in the
// IOREG_* tables), an OPB base address, a size in bytes and a kind:
//   register     4 bytes, not seekable: OFFSET ignored, at most 4 bytes move;
//   memory       seekable: bytes OFFSET.. up to the end of the memory move;
//   FIFO from    read only: whole 32-bit words, as many as the FIFO holds;
//   FIFO to      write only: whole words, as many as the FIFO has room for.
// For a FIFO the server first reads its status word (base + 4) to learn the
// fill level or free space. A READ is answered by a READ_ACK header whose
// SIZE is the byte count n, followed by the n bytes; a WRITE has its SIZE
// payload bytes consumed (bytes beyond n are dropped), the first n written,
// and is then answered by a WRITE_ACK carrying n. An unknown LOC gives SIZE
// -22, a write to a read-only or read from a write-only ioreg gives -9. A
// GREET is answered by a GREET. Byte k of a word is bits [31-8k -: 8]; bytes
// are gathered into words so that a memory is written a word per OPB
// transfer with byte enables. One message is served at a time.
//
// The messages, the ioreg kinds and the meaning of the acknowledge count are
// the document's; error values, byte order, the FIFO status word and the
// GREET reply are this design's.
module ioreg_server
  import borph_pkg::*;
#(
  parameter int          NUM_IOREGS = 4,
  parameter logic [31:0] IOREG_BASE  [NUM_IOREGS] = '{32'h0000_0000, 32'h0000_4000, 32'h0000_8000, 32'h0000_C000},
  parameter logic [31:0] IOREG_BYTES [NUM_IOREGS] = '{32'd4, 32'd8192, 32'd1024, 32'd1024},
  parameter ioreg_type_e IOREG_KIND  [NUM_IOREGS] = '{IOREG_REG, IOREG_MEM, IOREG_FIFO_FROM, IOREG_FIFO_TO}
) (
  input  logic       clk,
  input  logic       rst_n,
  // requests from the message receiver
  input  logic       hdr_valid,
  input  msg_hdr_t   hdr,
  output logic       hdr_ready,
  input  logic       pl_valid,
  input  logic [7:0] pl_data,
  output logic       pl_ready,
  // OPB master
  output opb_req_t   opb_req,
  input  opb_rsp_t   opb_rsp,
  // replies to the message transmitter
  output logic       tx_hdr_valid,
  output msg_hdr_t   tx_hdr,
  input  logic       tx_hdr_ready,
  output logic       tx_pl_valid,
  output logic [7:0] tx_pl_data,
  input  logic       tx_pl_ready
);
  typedef enum logic [3:0] {
    S_IDLE, S_SIZE, S_STAT, S_RD_HDR, S_RD_FETCH, S_RD_EMIT, S_WR_BYTE, S_WR_OPB, S_ACK
  } state_e;
  state_e state;

  msg_hdr_t    req;        // request being served
  logic [31:0] base, msize, reqsz, n, i, drained;
  ioreg_type_e kind;
  logic        loc_ok;
  logic [31:0] word, wbuf;
  logic [3:0]  wbe;
  logic [31:0] addr;
  logic [1:0]  lane;
  logic [31:0] ack_size, mem_n;
  cmd_e        ack_cmd;

  function automatic logic [31:0] umin(logic [31:0] a, logic [31:0] b);
    return (a < b) ? a : b;
  endfunction

  // Table lookup of the request being served.
  always_comb begin
    loc_ok = (req.loc < 24'(NUM_IOREGS));
    base = '0;
    msize = '0;
    kind = IOREG_REG;
    for (int k = 0; k < NUM_IOREGS; k++) begin
      if (req.loc == 24'(k)) begin
        base  = IOREG_BASE[k];
        msize = IOREG_BYTES[k];
        kind  = IOREG_KIND[k];
      end
    end
    reqsz = req.size[31] ? 32'd0 : req.size;
  end

  // Byte address of byte i of the transfer.
  assign addr = base + ((kind == IOREG_MEM) ? (req.offset + i) : {30'd0, i[1:0]});
  assign lane = addr[1:0];

  assign hdr_ready = (state == S_IDLE);
  assign pl_ready  = (state == S_WR_BYTE) && (drained != reqsz);
  assign mem_n = (req.offset >= msize) ? 32'd0 : umin(reqsz, msize - req.offset);
  assign tx_hdr_valid = (state == S_RD_HDR) || (state == S_ACK);
  assign tx_hdr = '{cmd: ack_cmd, loc: req.loc, offset: req.offset, size: ack_size};
  assign tx_pl_valid = (state == S_RD_EMIT);
  assign tx_pl_data  = word[8*(3 - int'(lane)) +: 8];

  always_comb begin
    opb_req = '0;
    if (state == S_STAT) begin
      opb_req.select = 1'b1;
      opb_req.rnw    = 1'b1;
      opb_req.abus   = base + 32'd4;
      opb_req.be     = 4'hF;
    end else if (state == S_RD_FETCH) begin
      opb_req.select = 1'b1;
      opb_req.rnw    = 1'b1;
      opb_req.abus   = {addr[31:2], 2'b00};
      opb_req.be     = 4'hF;
    end else if (state == S_WR_OPB) begin
      opb_req.select = 1'b1;
      opb_req.rnw    = 1'b0;
      opb_req.abus   = {addr[31:2], 2'b00};
      opb_req.be     = wbe;
      opb_req.dbus   = wbuf;
    end
  end

  logic opb_done;
  assign opb_done = opb_rsp.xferack || opb_rsp.errack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req      <= '{cmd: CMD_GREET, default: '0};
      n        <= '0;
      i        <= '0;
      drained  <= '0;
      word     <= '0;
      wbuf     <= '0;
      wbe      <= '0;
      ack_size <= '0;
      ack_cmd  <= CMD_GREET;
    end else begin
      unique case (state)
        S_IDLE: if (hdr_valid) begin
          req     <= hdr;
          i       <= '0;
          drained <= '0;
          wbe     <= '0;
          unique case (hdr.cmd)
            CMD_GREET: begin
              ack_cmd  <= CMD_GREET;
              ack_size <= '0;
              state    <= S_ACK;
            end
            CMD_READ: begin
              ack_cmd <= CMD_READ_ACK;
              state   <= S_SIZE;
            end
            CMD_WRITE: begin
              ack_cmd <= CMD_WRITE_ACK;
              state   <= S_SIZE;
            end
            default: state <= S_IDLE;  // not for this server: dropped
          endcase
        end

        // Size the transfer from the table entry of req.
        S_SIZE: begin
          state <= (req.cmd == CMD_READ) ? S_RD_HDR : S_WR_BYTE;
          if (!loc_ok) begin
            n <= '0; ack_size <= ERR_INVAL;
          end else if ((req.cmd == CMD_READ && kind == IOREG_FIFO_TO) ||
                       (req.cmd == CMD_WRITE && kind == IOREG_FIFO_FROM)) begin
            n <= '0; ack_size <= ERR_BADF;
          end else if (kind == IOREG_FIFO_FROM || kind == IOREG_FIFO_TO) begin
            state <= S_STAT;
          end else if (kind == IOREG_REG) begin
            n <= umin(reqsz, 32'd4); ack_size <= umin(reqsz, 32'd4);
          end else begin
            n <= mem_n; ack_size <= mem_n;
          end
        end

        S_STAT: if (opb_done) begin
          // fill level (FIFO from user) or free space (FIFO to user), words
          n <= umin({reqsz[31:2], 2'b00}, {opb_rsp.dbus[29:0], 2'b00});
          if (opb_rsp.errack) n <= '0;
          ack_size <= umin({reqsz[31:2], 2'b00}, {opb_rsp.dbus[29:0], 2'b00});
          if (opb_rsp.errack) ack_size <= '0;
          state <= (req.cmd == CMD_READ) ? S_RD_HDR : S_WR_BYTE;
        end

        S_RD_HDR: begin
          if (tx_hdr_ready) begin
            state <= (n == 32'd0) ? S_IDLE : S_RD_FETCH;
          end
        end

        S_RD_FETCH: if (opb_done) begin
          word  <= opb_rsp.errack ? 32'd0 : opb_rsp.dbus;
          state <= S_RD_EMIT;
        end

        S_RD_EMIT: if (tx_pl_ready) begin
          i <= i + 1'b1;
          if (i + 1'b1 == n)        state <= S_IDLE;
          else if (lane == 2'd3)    state <= S_RD_FETCH;
        end

        S_WR_BYTE: begin
          if (drained == reqsz) begin
            state <= S_ACK;
          end else if (pl_valid) begin
            drained <= drained + 1'b1;
            if (i < n) begin
              wbuf[8*(3 - int'(lane)) +: 8] <= pl_data;
              wbe[3 - int'(lane)] <= 1'b1;
              if (lane == 2'd3 || i + 1'b1 == n) state <= S_WR_OPB;
              else i <= i + 1'b1;
            end
          end
        end

        S_WR_OPB: if (opb_done) begin
          wbe   <= '0;
          i     <= i + 1'b1;
          state <= S_WR_BYTE;
        end

        S_ACK: if (tx_hdr_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // Never more bytes accepted than the request carries.
  always_ff @(posedge clk) begin
    a_no_overrun: assert (!(pl_ready && drained == reqsz));
  end
endmodule
