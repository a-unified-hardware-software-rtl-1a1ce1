// hwfile_client: file I/O for a hardware process, the hardware side of the
// kernel's file system service.
//
// The hardware process issues one request at a time on req_*: READ or WRITE
// req_size bytes on file descriptor req_fd, or EXIT with status req_size.
// The client sends the matching message (CMD, LOC = descriptor, OFFSET = 0,
// SIZE). A WRITE's bytes are then taken from wr_* and sent as its payload;
// no WRITE_ACK is awaited, since the kernel sends none. A READ blocks until
// the kernel's READ_ACK arrives: its SIZE (bytes read, 0 at end of file,
// negative on error) is offered on rsp_*, then the bytes on rd_*. After an
// EXIT the client stops and raises exited. A READ_ACK arriving while none is
// awaited is consumed and dropped so the receiver never stalls.
//
// The message flow follows the document; OFFSET = 0 (the kernel keeps the
// file position) and the exit status in SIZE are this design's choices.
module hwfile_client
  import borph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // requests from the hardware process
  input  logic        req_valid,
  input  cmd_e        req_cmd,
  input  logic [23:0] req_fd,
  input  logic [31:0] req_size,
  output logic        req_ready,
  input  logic        wr_valid,
  input  logic [7:0]  wr_data,
  output logic        wr_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_size,
  input  logic        rsp_ready,
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  input  logic        rd_ready,
  output logic        exited,
  // messages out, to the transmitter
  output logic        tx_hdr_valid,
  output msg_hdr_t    tx_hdr,
  input  logic        tx_hdr_ready,
  output logic        tx_pl_valid,
  output logic [7:0]  tx_pl_data,
  input  logic        tx_pl_ready,
  // READ_ACK messages in, from the receiver
  input  logic        rx_hdr_valid,
  input  msg_hdr_t    rx_hdr,
  output logic        rx_hdr_ready,
  input  logic        rx_pl_valid,
  input  logic [7:0]  rx_pl_data,
  input  logic        rx_pl_last,
  output logic        rx_pl_ready
);
  typedef enum logic [2:0] {
    S_IDLE, S_SEND, S_WDATA, S_WAIT, S_RSP, S_RDATA, S_DRAIN, S_EXITED
  } state_e;
  state_e      state;
  msg_hdr_t    cur;
  logic [31:0] remain;

  assign req_ready    = (state == S_IDLE) && !rx_hdr_valid;
  assign tx_hdr_valid = (state == S_SEND);
  assign tx_hdr       = cur;
  assign tx_pl_valid  = (state == S_WDATA) && wr_valid;
  assign tx_pl_data   = wr_data;
  assign wr_ready     = (state == S_WDATA) && tx_pl_ready;
  assign rx_hdr_ready = (state == S_WAIT) || (state == S_IDLE);
  assign rsp_valid    = (state == S_RSP);
  assign rd_valid     = (state == S_RDATA) && rx_pl_valid;
  assign rd_data      = rx_pl_data;
  assign rx_pl_ready  = (state == S_RDATA) ? rd_ready : (state == S_DRAIN);
  assign exited       = (state == S_EXITED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '{cmd: CMD_READ, default: '0};
      remain   <= '0;
      rsp_size <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rx_hdr_valid) begin
            // unexpected acknowledge: throw it away
            if (has_payload(rx_hdr)) state <= S_DRAIN;
          end else if (req_valid) begin
            cur    <= '{cmd: req_cmd, loc: req_fd, offset: 32'd0, size: req_size};
            remain <= req_size;
            state  <= S_SEND;
          end
        end
        S_SEND: if (tx_hdr_ready) begin
          if (cur.cmd == CMD_WRITE)
            state <= has_payload(cur) ? S_WDATA : S_IDLE;
          else if (cur.cmd == CMD_READ)
            state <= S_WAIT;
          else if (cur.cmd == CMD_EXIT)
            state <= S_EXITED;
          else
            state <= S_IDLE;
        end
        S_WDATA: if (wr_valid && tx_pl_ready) begin
          remain <= remain - 1'b1;
          if (remain == 32'd1) state <= S_IDLE;
        end
        S_WAIT: if (rx_hdr_valid) begin
          rsp_size <= rx_hdr.size;
          state    <= S_RSP;
        end
        S_RSP: if (rsp_ready) begin
          state <= (!rsp_size[31] && rsp_size != 32'd0) ? S_RDATA : S_IDLE;
        end
        S_RDATA: if (rx_pl_valid && rd_ready && rx_pl_last) state <= S_IDLE;
        S_DRAIN: if (rx_pl_valid && rx_pl_last) state <= S_IDLE;
        S_EXITED: state <= S_EXITED;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
