// ioreg_bram: shared on-chip memory ioreg, a dual-port block RAM of BYTES
// bytes (8192 in the document's case study) in 32-bit words.
//
// Port S is an OPB slave used by software through the memory's virtual file
// (seekable, any size): a selected transfer is acknowledged one clock after
// select, reads return the addressed word, writes honour the byte enables.
// Port U belongs to the user design: u_en with u_we writes u_wdata, u_en alone
// reads, and u_rdata holds the word one clock later. Addresses wrap inside the
// memory. If both ports write one word in the same clock the OPB write wins.
// The memory and its size are the document's; widths and latencies are this
// design's choices.
module ioreg_bram
  import borph_pkg::*;
#(
  parameter int BYTES = 8192,
  localparam int WORDS = BYTES / 4,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  opb_req_t      s_req,
  output opb_rsp_t      s_rsp,
  input  logic          u_en,
  input  logic          u_we,
  input  logic [AW-1:0] u_addr,
  input  logic [31:0]   u_wdata,
  output logic [31:0]   u_rdata
);
  logic [31:0]   mem [WORDS];
  logic          ack, s_go, s_rd_q;
  logic [31:0]   s_rdata;
  logic [AW-1:0] s_addr;

  assign s_go   = s_req.select && !ack;
  assign s_addr = s_req.abus[AW+1:2];
  assign s_rsp  = '{dbus: s_rd_q ? s_rdata : 32'd0, xferack: ack, errack: 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack    <= 1'b0;
      s_rd_q <= 1'b0;
    end else begin
      ack    <= s_go;
      s_rd_q <= s_go && s_req.rnw;
    end
  end

  always_ff @(posedge clk) begin
    if (u_en && u_we) mem[u_addr] <= u_wdata;
    if (s_go && !s_req.rnw) begin
      for (int b = 0; b < 4; b++)
        if (s_req.be[b]) mem[s_addr][8*b +: 8] <= s_req.dbus[8*b +: 8];
    end
    s_rdata <= mem[s_addr];
    if (u_en) u_rdata <= mem[u_addr];
  end
endmodule
