// stdloop_hwproc: the stdloop hardware process, a file I/O benchmark that
// copies its standard input to its standard output.
//
// Repeatedly it asks for XFER_BYTES bytes from descriptor 0 (stdin), waits
// for the reply, stores the n bytes returned in a buffer, and writes those n
// bytes to descriptor 1 (stdout). When a read returns 0 (end of file) or an
// error it sends EXIT with status 0 and stops, raising done. It talks to the
// kernel through an hwfile_client. The loop is the document's; treating a
// non-positive count as the end and the default transfer size are this
// design's. nreads and nbytes count completed reads and bytes copied.
module stdloop_hwproc
  import borph_pkg::*;
#(
  parameter int XFER_BYTES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        req_valid,
  output cmd_e        req_cmd,
  output logic [23:0] req_fd,
  output logic [31:0] req_size,
  input  logic        req_ready,
  output logic        wr_valid,
  output logic [7:0]  wr_data,
  input  logic        wr_ready,
  input  logic        rsp_valid,
  input  logic [31:0] rsp_size,
  output logic        rsp_ready,
  input  logic        rd_valid,
  input  logic [7:0]  rd_data,
  output logic        rd_ready,
  output logic        done,
  output logic [31:0] nreads,
  output logic [31:0] nbytes
);
  localparam int BW = $clog2(XFER_BYTES + 1);
  localparam int IW = (XFER_BYTES > 1) ? $clog2(XFER_BYTES) : 1;
  typedef enum logic [2:0] {S_RD_REQ, S_RD_RSP, S_RD_DATA, S_WR_REQ, S_WR_DATA, S_EXIT, S_DONE} state_e;
  state_e      state;
  logic [7:0]  buffer [XFER_BYTES];
  logic [BW-1:0] n, k;

  assign req_valid = (state == S_RD_REQ) || (state == S_WR_REQ) || (state == S_EXIT);
  always_comb begin
    unique case (state)
      S_WR_REQ: begin req_cmd = CMD_WRITE; req_fd = 24'd1; req_size = 32'(n); end
      S_EXIT:   begin req_cmd = CMD_EXIT;  req_fd = 24'd0; req_size = 32'd0;  end
      default:  begin req_cmd = CMD_READ;  req_fd = 24'd0; req_size = 32'(XFER_BYTES); end
    endcase
  end
  assign rsp_ready = (state == S_RD_RSP);
  assign rd_ready  = (state == S_RD_DATA);
  assign wr_valid  = (state == S_WR_DATA);
  assign wr_data   = buffer[k[IW-1:0]];
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (state == S_RD_DATA && rd_valid) buffer[k[IW-1:0]] <= rd_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RD_REQ;
      n      <= '0;
      k      <= '0;
      nreads <= '0;
      nbytes <= '0;
    end else begin
      unique case (state)
        S_RD_REQ: if (req_ready) state <= S_RD_RSP;
        S_RD_RSP: if (rsp_valid) begin
          k <= '0;
          if (rsp_size[31] || rsp_size == 32'd0) begin
            state <= S_EXIT;
          end else begin
            n      <= (rsp_size > 32'(XFER_BYTES)) ? BW'(XFER_BYTES) : BW'(rsp_size);
            nreads <= nreads + 1'b1;
            state  <= S_RD_DATA;
          end
        end
        S_RD_DATA: if (rd_valid) begin
          k <= k + 1'b1;
          if (k + 1'b1 == n) begin
            k     <= '0;
            state <= S_WR_REQ;
          end
        end
        S_WR_REQ: if (req_ready) state <= S_WR_DATA;
        S_WR_DATA: if (wr_ready) begin
          k      <= k + 1'b1;
          nbytes <= nbytes + 1'b1;
          if (k + 1'b1 == n) state <= S_RD_REQ;
        end
        S_EXIT: if (req_ready) state <= S_DONE;
        S_DONE: state <= S_DONE;
        default: state <= S_RD_REQ;
      endcase
    end
  end
endmodule
