// opb_bus: on-chip peripheral bus (OPB) of a user FPGA, one master and NSLV
// slaves.
//
// Slave k owns the address window k << SLV_SHIFT of size 2**SLV_SHIFT bytes;
// the bus passes the master's request to every slave but raises select only
// for the one addressed. Slaves answer with all-zero outputs except while
// acknowledging, so their responses are OR-ed onto the master. If no slave
// acknowledges within TIMEOUT clocks of select (an unmapped address, or a
// slave that hangs) the bus answers with errack, as the OPB arbiter's time-out
// does. The document names the OPB and places the ioregs on it; this subset
// of OPB signals and the address map are this design's.
module opb_bus
  import borph_pkg::*;
#(
  parameter int NSLV      = 4,
  parameter int SLV_SHIFT = 14,
  parameter int TIMEOUT   = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_req_t m_req,
  output opb_rsp_t m_rsp,
  output opb_req_t s_req [NSLV],
  input  opb_rsp_t s_rsp [NSLV],
  output logic     timeout_evt   // one-cycle pulse when the time-out fires
);
  localparam int TW = $clog2(TIMEOUT + 1);
  logic [TW-1:0] wait_cnt;
  logic          to_ack;
  opb_rsp_t      ored;

  always_comb begin
    for (int k = 0; k < NSLV; k++) begin
      s_req[k] = m_req;
      s_req[k].select = m_req.select &&
                        (m_req.abus[31:SLV_SHIFT] == (32 - SLV_SHIFT)'(k));
    end
  end

  always_comb begin
    ored = OPB_RSP_IDLE;
    for (int k = 0; k < NSLV; k++) begin
      ored.dbus    |= s_rsp[k].dbus;
      ored.xferack |= s_rsp[k].xferack;
      ored.errack  |= s_rsp[k].errack;
    end
    m_rsp = ored;
    m_rsp.errack = ored.errack | to_ack;
  end

  assign timeout_evt = to_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_cnt <= '0;
      to_ack   <= 1'b0;
    end else begin
      to_ack <= 1'b0;
      if (!m_req.select || ored.xferack || ored.errack || to_ack) begin
        wait_cnt <= '0;
      end else if (wait_cnt == TW'(TIMEOUT - 1)) begin
        to_ack   <= 1'b1;
        wait_cnt <= '0;
      end else begin
        wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end
endmodule
