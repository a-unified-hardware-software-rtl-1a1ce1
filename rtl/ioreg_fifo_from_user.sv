// ioreg_fifo_from_user: FIFO ioreg that the user design fills and software
// reads (read-only, not seekable, from software's side).
//
// The user design pushes 32-bit words with u_valid/u_ready. On the OPB, a
// read of word 0 of the window returns the head word and pops it (zero if
// empty), a read of word 1 returns the number of words held; writes are
// acknowledged and ignored. Every transfer is acknowledged one clock after
// select. The FIFO type is the document's; its 32-bit width, DEPTH and the
// status word are this design's.
module ioreg_fifo_from_user
  import borph_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    s_req,
  output opb_rsp_t    s_rsp,
  input  logic        u_valid,
  input  logic [31:0] u_data,
  output logic        u_ready
);
  localparam int CW = $clog2(DEPTH + 1);
  logic          ack, go, pop, full, empty;
  logic [31:0]   head, rdata;
  logic [CW-1:0] count, free;

  assign go  = s_req.select && !ack;
  assign pop = go && s_req.rnw && !s_req.abus[2];
  assign u_ready = !full;
  assign s_rsp = '{dbus: rdata, xferack: ack, errack: 1'b0};

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(u_valid), .wr_data(u_data), .rd_en(pop),
    .rd_data(head), .full, .empty, .count, .free
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack <= go;
      if (go && s_req.rnw)
        rdata <= s_req.abus[2] ? 32'(count) : (empty ? 32'd0 : head);
      else
        rdata <= '0;
    end
  end
endmodule
