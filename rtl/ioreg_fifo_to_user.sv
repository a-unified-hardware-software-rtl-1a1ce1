// ioreg_fifo_to_user: FIFO ioreg that software fills and the user design
// drains (write-only, not seekable, from software's side).
//
// On the OPB, a write of word 0 of the window pushes the data word (dropped
// if full), a read of word 1 returns the free space in words and a read of
// word 0 returns zero. Every transfer is acknowledged one clock after select.
// The user design takes words with u_valid/u_ready. The FIFO type is the
// document's; its 32-bit width, DEPTH and the status word are this design's.
module ioreg_fifo_to_user
  import borph_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    s_req,
  output opb_rsp_t    s_rsp,
  output logic        u_valid,
  output logic [31:0] u_data,
  input  logic        u_ready
);
  localparam int CW = $clog2(DEPTH + 1);
  logic          ack, go, push, full, empty;
  logic [31:0]   rdata;
  logic [CW-1:0] count, free;

  assign go   = s_req.select && !ack;
  assign push = go && !s_req.rnw && !s_req.abus[2];
  assign u_valid = !empty;
  assign s_rsp = '{dbus: rdata, xferack: ack, errack: 1'b0};

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(s_req.dbus), .rd_en(u_ready),
    .rd_data(u_data), .full, .empty, .count, .free
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack   <= go;
      rdata <= (go && s_req.rnw && s_req.abus[2]) ? 32'(free) : 32'd0;
    end
  end
endmodule
