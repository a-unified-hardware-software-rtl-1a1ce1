// ioreg_reg: a single-word register ioreg behind an OPB slave interface.
//
// Software reaches it through its virtual file (4 bytes, read/write, not
// seekable): an OPB write updates the bytes whose enables are set, an OPB
// read returns the word. Both are acknowledged one clock after select. The
// user design sees the value on q and may overwrite it with hw_we/hw_d, for
// instance a counter publishing its count or a ready flag; when both write in
// the same clock the hardware write wins. Reset value is zero. The register
// type and its size are the document's; the write priority is this design's.
module ioreg_reg
  import borph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    s_req,
  output opb_rsp_t    s_rsp,
  input  logic        hw_we,
  input  logic [31:0] hw_d,
  output logic [31:0] q
);
  logic        ack;
  logic [31:0] rdata;

  assign s_rsp = '{dbus: rdata, xferack: ack, errack: 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack   <= s_req.select && !ack;
      rdata <= (s_req.select && !ack && s_req.rnw) ? q : 32'd0;
      if (s_req.select && !ack && !s_req.rnw) begin
        for (int b = 0; b < 4; b++)
          if (s_req.be[b]) q[8*b +: 8] <= s_req.dbus[8*b +: 8];
      end
      if (hw_we) q <= hw_d;
    end
  end
endmodule
