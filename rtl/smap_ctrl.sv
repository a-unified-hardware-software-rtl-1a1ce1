// smap_ctrl: SelectMap Control, the control-FPGA core that drives the 8-bit
// SelectMap bus shared by the user FPGAs. It serves the kernel both for
// configuring a user FPGA and, afterwards, as the byte link of the message
// network.
//
// It is an OPB slave with four word registers:
//   0x0 CTRL    [SW-1:0] selected user FPGA, [8] configuration mode
//   0x4 DATA    write: send byte [7:0] to the selected FPGA;
//               read:  [8] byte valid, [7:0] byte from the selected FPGA
//   0x8 STATUS  [7:0] interrupt (data waiting) per FPGA, [15:8] busy per FPGA
//   0xC IRQ_EN  [7:0] interrupt enable per FPGA
// A DATA write waits while the selected FPGA is busy (its receive FIFO full),
// then strobes the byte onto the bus for one clock and acknowledges. A DATA
// read strobes a byte out of the selected FPGA if its interrupt shows data
// waiting and returns it with bit 8 set; otherwise it returns 0 at once. In
// configuration mode (CTRL[8]) sm_cfg is high: bytes written are the
// selected FPGA's configuration stream and are not read back. irq, the OR of
// enabled interrupts, wakes the kernel's message thread. Reset value of all
// registers is zero. The bus, its two uses and its 8-bit width are the
// document's; the register map and handshake are this design's.
module smap_ctrl
  import borph_pkg::*;
#(
  parameter int NUM_USER = 4,
  localparam int SW = (NUM_USER > 1) ? $clog2(NUM_USER) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  opb_req_t            s_req,
  output opb_rsp_t            s_rsp,
  output logic                irq,
  // SelectMap bus
  output logic                sm_cfg,
  output logic [NUM_USER-1:0] sm_cs_n,
  output logic                sm_rdwr_n,
  output logic                sm_strobe,
  output logic [7:0]          sm_dout,
  input  logic [7:0]          sm_din,
  input  logic [NUM_USER-1:0] sm_busy,
  input  logic [NUM_USER-1:0] sm_irq
);
  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD, S_ACK} state_e;
  state_e state;

  logic [SW-1:0]       sel;
  logic                cfg;
  logic [NUM_USER-1:0] irq_en;
  logic [7:0]          wbyte;
  logic [31:0]         rdata;
  logic                go;
  logic [1:0]          reg_idx;

  assign go      = s_req.select && (state == S_IDLE);
  assign reg_idx = s_req.abus[3:2];
  assign s_rsp   = '{dbus: (state == S_ACK) ? rdata : 32'd0,
                     xferack: (state == S_ACK), errack: 1'b0};
  assign irq     = |(sm_irq & irq_en);

  assign sm_cfg    = cfg;
  assign sm_rdwr_n = (state == S_RD);
  assign sm_strobe = (state == S_WR && !sm_busy[sel]) || (state == S_RD);
  assign sm_dout   = (state == S_WR) ? wbyte : 8'h00;
  always_comb begin
    sm_cs_n = '1;
    if (state == S_WR || state == S_RD) sm_cs_n[sel] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      sel    <= '0;
      cfg    <= 1'b0;
      irq_en <= '0;
      wbyte  <= '0;
      rdata  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          rdata <= '0;
          state <= S_ACK;
          if (!s_req.rnw) begin
            unique case (reg_idx)
              2'd0: begin sel <= s_req.dbus[SW-1:0]; cfg <= s_req.dbus[8]; end
              2'd1: begin wbyte <= s_req.dbus[7:0]; state <= S_WR; end
              2'd2: ;
              2'd3: irq_en <= s_req.dbus[NUM_USER-1:0];
              default: ;
            endcase
          end else begin
            unique case (reg_idx)
              2'd0: rdata <= {23'd0, cfg, 8'(sel)};
              2'd1: if (!cfg && sm_irq[sel]) state <= S_RD;
              2'd2: rdata <= {16'd0, 8'(sm_busy), 8'(sm_irq)};
              2'd3: rdata <= 32'(irq_en);
              default: ;
            endcase
          end
        end
        S_WR: if (!sm_busy[sel]) state <= S_ACK;
        S_RD: begin
          rdata <= {23'd0, 1'b1, sm_din};
          state <= S_ACK;
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
