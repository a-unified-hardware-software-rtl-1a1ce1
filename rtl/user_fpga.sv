// user_fpga: the logic of one BEE2 user FPGA running a hardware process,
// with the kernel-side interface the BORPH tool flow inserts around a user
// design.
//
// Kernel side: bytes from the SelectMap bus collect in the receive half of
// smap_fifo; pkt_rx cuts them into messages. READ, WRITE and GREET messages
// go to the ioreg_server, which acts on the ioregs over the OPB and queues
// its acknowledge; READ_ACK messages (answers to the hardware process's own
// file reads) go to the hwfile_client; anything else is dropped. pkt_tx
// merges the server's and the client's messages into the transmit half of
// smap_fifo, whose interrupt tells the control FPGA that data waits.
//
// User side, modelled on the document's cognitive-radio case study: ioreg
// LOC 0 is "cntval", fed by a free-running counter; LOC 1 and 4 are two
// shared memories of SHMEM_BYTES, each guarded by an enable register (LOC 2,
// 5) that software writes and a ready register (LOC 3, 6) that shmem_sync
// writes; LOC 7 is a FIFO from the user design to software, LOC 8 a FIFO from
// software to the user design; LOC 9.. are NUM_CTRL_REGS control registers
// (channel select, gain and the like) brought out on ctrl_regs. ioreg LOC k
// lives at OPB address k << 14. The stdloop hardware process copies its
// stdin to its stdout through the client and raises stdloop_done on exit.
// Every block runs on the one clock of the SelectMap bus.
module user_fpga
  import borph_pkg::*;
#(
  parameter int NUM_CTRL_REGS   = 16,
  parameter int SHMEM_BYTES     = 8192,
  parameter int SMAP_FIFO_BYTES = 128,
  parameter int UFIFO_DEPTH     = 256,
  parameter int XFER_BYTES      = 128,
  localparam int NREG = 9 + NUM_CTRL_REGS
) (
  input  logic        clk,
  input  logic        rst_n,
  // SelectMap bus
  input  logic        sm_cfg,
  input  logic        sm_cs_n,
  input  logic        sm_rdwr_n,
  input  logic        sm_strobe,
  input  logic [7:0]  sm_din,
  output logic [7:0]  sm_dout,
  output logic        sm_busy,
  output logic        sm_irq,
  // result streams into the two shared memories
  input  logic        samp0_valid,
  input  logic [31:0] samp0_data,
  input  logic        samp1_valid,
  input  logic [31:0] samp1_data,
  // user FIFOs
  input  logic        ufifo_in_valid,
  input  logic [31:0] ufifo_in_data,
  output logic        ufifo_in_ready,
  output logic        ufifo_out_valid,
  output logic [31:0] ufifo_out_data,
  input  logic        ufifo_out_ready,
  // control registers and status
  output logic [31:0] ctrl_regs [NUM_CTRL_REGS],
  output logic        stdloop_done
);
  localparam int SHW = $clog2(SHMEM_BYTES / 4);
  localparam int LOC_CNTVAL = 0, LOC_SHM0 = 1, LOC_EN0 = 2, LOC_RDY0 = 3,
                 LOC_SHM1 = 4, LOC_EN1 = 5, LOC_RDY1 = 6,
                 LOC_FIFO_FROM = 7, LOC_FIFO_TO = 8, LOC_CTRL0 = 9;

  typedef logic [31:0] word_tab_t [NREG];
  typedef ioreg_type_e kind_tab_t [NREG];

  function automatic word_tab_t base_tab();
    word_tab_t t;
    for (int k = 0; k < NREG; k++) t[k] = 32'(k) << 14;
    return t;
  endfunction

  function automatic word_tab_t bytes_tab();
    word_tab_t t;
    for (int k = 0; k < NREG; k++) t[k] = 32'd4;
    t[LOC_SHM0] = 32'(SHMEM_BYTES);
    t[LOC_SHM1] = 32'(SHMEM_BYTES);
    t[LOC_FIFO_FROM] = 32'(4 * UFIFO_DEPTH);
    t[LOC_FIFO_TO]   = 32'(4 * UFIFO_DEPTH);
    return t;
  endfunction

  function automatic kind_tab_t kind_tab();
    kind_tab_t t;
    for (int k = 0; k < NREG; k++) t[k] = IOREG_REG;
    t[LOC_SHM0] = IOREG_MEM;
    t[LOC_SHM1] = IOREG_MEM;
    t[LOC_FIFO_FROM] = IOREG_FIFO_FROM;
    t[LOC_FIFO_TO]   = IOREG_FIFO_TO;
    return t;
  endfunction

  localparam word_tab_t IOREG_BASE  = base_tab();
  localparam word_tab_t IOREG_BYTES = bytes_tab();
  localparam kind_tab_t IOREG_KIND  = kind_tab();

  // ---- SelectMap FIFO ----------------------------------------------------
  logic       rxb_valid, rxb_ready, txb_valid, txb_ready;
  logic [7:0] rxb_data, txb_data;

  smap_fifo #(.RX_BYTES(SMAP_FIFO_BYTES), .TX_BYTES(SMAP_FIFO_BYTES)) u_smap (
    .clk, .rst_n, .sm_cfg, .sm_cs_n, .sm_rdwr_n, .sm_strobe, .sm_din, .sm_dout,
    .sm_busy, .sm_irq,
    .rx_valid(rxb_valid), .rx_data(rxb_data), .rx_ready(rxb_ready),
    .tx_valid(txb_valid), .tx_data(txb_data), .tx_ready(txb_ready)
  );

  // ---- message receiver and router ---------------------------------------
  logic       rh_valid, rh_ready, rp_valid, rp_last, rp_ready;
  msg_hdr_t   rh;
  logic [7:0] rp_data;
  cmd_e       rp_cmd;

  pkt_rx u_rx (
    .clk, .rst_n, .in_valid(rxb_valid), .in_data(rxb_data), .in_ready(rxb_ready),
    .hdr_valid(rh_valid), .hdr(rh), .hdr_ready(rh_ready),
    .pl_valid(rp_valid), .pl_data(rp_data), .pl_last(rp_last), .pl_cmd(rp_cmd),
    .pl_ready(rp_ready)
  );

  logic to_srv, to_cli;
  logic srv_hdr_ready, srv_pl_ready, cli_hdr_ready, cli_pl_ready;
  assign to_srv = (rh.cmd == CMD_READ) || (rh.cmd == CMD_WRITE) || (rh.cmd == CMD_GREET);
  assign to_cli = (rh.cmd == CMD_READ_ACK);
  assign rh_ready = to_srv ? srv_hdr_ready : (to_cli ? cli_hdr_ready : 1'b1);
  assign rp_ready = (rp_cmd == CMD_WRITE) ? srv_pl_ready :
                    (rp_cmd == CMD_READ_ACK) ? cli_pl_ready : 1'b1;

  // ---- message transmitter -----------------------------------------------
  logic [1:0] th_valid, th_ready, tp_valid, tp_ready;
  msg_hdr_t   th [2];
  logic [7:0] tp_data [2];

  pkt_tx #(.NSRC(2)) u_tx (
    .clk, .rst_n, .hdr_valid(th_valid), .hdr(th), .hdr_ready(th_ready),
    .pl_valid(tp_valid), .pl_data(tp_data), .pl_ready(tp_ready),
    .out_valid(txb_valid), .out_data(txb_data), .out_ready(txb_ready)
  );

  // ---- ioreg server and OPB ----------------------------------------------
  opb_req_t m_req;
  opb_rsp_t m_rsp;
  opb_req_t s_req [NREG];
  opb_rsp_t s_rsp [NREG];
  logic     opb_timeout;

  ioreg_server #(
    .NUM_IOREGS(NREG), .IOREG_BASE(IOREG_BASE), .IOREG_BYTES(IOREG_BYTES),
    .IOREG_KIND(IOREG_KIND)
  ) u_srv (
    .clk, .rst_n,
    .hdr_valid(rh_valid && to_srv), .hdr(rh), .hdr_ready(srv_hdr_ready),
    .pl_valid(rp_valid && rp_cmd == CMD_WRITE), .pl_data(rp_data), .pl_ready(srv_pl_ready),
    .opb_req(m_req), .opb_rsp(m_rsp),
    .tx_hdr_valid(th_valid[0]), .tx_hdr(th[0]), .tx_hdr_ready(th_ready[0]),
    .tx_pl_valid(tp_valid[0]), .tx_pl_data(tp_data[0]), .tx_pl_ready(tp_ready[0])
  );

  opb_bus #(.NSLV(NREG), .SLV_SHIFT(14), .TIMEOUT(16)) u_opb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .timeout_evt(opb_timeout)
  );

  // ---- ioregs and the user design ----------------------------------------
  logic [31:0] cnt, cntval_q, en0_q, en1_q, rdy0_q, rdy1_q;
  logic        rdy0, rdy1, fill0, fill1;
  logic              m0_we, m1_we;
  logic [SHW-1:0]    m0_addr, m1_addr;
  logic [31:0]       m0_wdata, m1_wdata, m0_rdata, m1_rdata;

  counter_hwproc u_counter (.clk, .rst_n, .cnt);

  ioreg_reg u_cntval (.clk, .rst_n, .s_req(s_req[LOC_CNTVAL]), .s_rsp(s_rsp[LOC_CNTVAL]),
                      .hw_we(1'b1), .hw_d(cnt), .q(cntval_q));

  ioreg_bram #(.BYTES(SHMEM_BYTES)) u_shm0 (
    .clk, .rst_n, .s_req(s_req[LOC_SHM0]), .s_rsp(s_rsp[LOC_SHM0]),
    .u_en(m0_we), .u_we(m0_we), .u_addr(m0_addr), .u_wdata(m0_wdata), .u_rdata(m0_rdata));
  ioreg_reg u_en0 (.clk, .rst_n, .s_req(s_req[LOC_EN0]), .s_rsp(s_rsp[LOC_EN0]),
                   .hw_we(1'b0), .hw_d(32'd0), .q(en0_q));
  ioreg_reg u_rdy0 (.clk, .rst_n, .s_req(s_req[LOC_RDY0]), .s_rsp(s_rsp[LOC_RDY0]),
                    .hw_we(1'b1), .hw_d({31'd0, rdy0}), .q(rdy0_q));
  shmem_sync #(.WORDS(SHMEM_BYTES / 4)) u_sync0 (
    .clk, .rst_n, .enable(en0_q[0]), .ready(rdy0), .d_valid(samp0_valid), .d_data(samp0_data),
    .m_we(m0_we), .m_addr(m0_addr), .m_wdata(m0_wdata), .filling(fill0));

  ioreg_bram #(.BYTES(SHMEM_BYTES)) u_shm1 (
    .clk, .rst_n, .s_req(s_req[LOC_SHM1]), .s_rsp(s_rsp[LOC_SHM1]),
    .u_en(m1_we), .u_we(m1_we), .u_addr(m1_addr), .u_wdata(m1_wdata), .u_rdata(m1_rdata));
  ioreg_reg u_en1 (.clk, .rst_n, .s_req(s_req[LOC_EN1]), .s_rsp(s_rsp[LOC_EN1]),
                   .hw_we(1'b0), .hw_d(32'd0), .q(en1_q));
  ioreg_reg u_rdy1 (.clk, .rst_n, .s_req(s_req[LOC_RDY1]), .s_rsp(s_rsp[LOC_RDY1]),
                    .hw_we(1'b1), .hw_d({31'd0, rdy1}), .q(rdy1_q));
  shmem_sync #(.WORDS(SHMEM_BYTES / 4)) u_sync1 (
    .clk, .rst_n, .enable(en1_q[0]), .ready(rdy1), .d_valid(samp1_valid), .d_data(samp1_data),
    .m_we(m1_we), .m_addr(m1_addr), .m_wdata(m1_wdata), .filling(fill1));

  ioreg_fifo_from_user #(.DEPTH(UFIFO_DEPTH)) u_ffrom (
    .clk, .rst_n, .s_req(s_req[LOC_FIFO_FROM]), .s_rsp(s_rsp[LOC_FIFO_FROM]),
    .u_valid(ufifo_in_valid), .u_data(ufifo_in_data), .u_ready(ufifo_in_ready));
  ioreg_fifo_to_user #(.DEPTH(UFIFO_DEPTH)) u_fto (
    .clk, .rst_n, .s_req(s_req[LOC_FIFO_TO]), .s_rsp(s_rsp[LOC_FIFO_TO]),
    .u_valid(ufifo_out_valid), .u_data(ufifo_out_data), .u_ready(ufifo_out_ready));

  for (genvar c = 0; c < NUM_CTRL_REGS; c++) begin : g_ctrl
    ioreg_reg u_ctrl (.clk, .rst_n, .s_req(s_req[LOC_CTRL0 + c]), .s_rsp(s_rsp[LOC_CTRL0 + c]),
                      .hw_we(1'b0), .hw_d(32'd0), .q(ctrl_regs[c]));
  end

  // ---- stdloop hardware process and its file client ----------------------
  logic        fq_valid, fq_ready, fw_valid, fw_ready, fr_valid, fr_ready;
  logic        fd_valid, fd_ready, cli_exited;
  cmd_e        fq_cmd;
  logic [23:0] fq_fd;
  logic [31:0] fq_size, fr_size, sl_nreads, sl_nbytes;
  logic [7:0]  fw_data, fd_data;

  stdloop_hwproc #(.XFER_BYTES(XFER_BYTES)) u_stdloop (
    .clk, .rst_n,
    .req_valid(fq_valid), .req_cmd(fq_cmd), .req_fd(fq_fd), .req_size(fq_size), .req_ready(fq_ready),
    .wr_valid(fw_valid), .wr_data(fw_data), .wr_ready(fw_ready),
    .rsp_valid(fr_valid), .rsp_size(fr_size), .rsp_ready(fr_ready),
    .rd_valid(fd_valid), .rd_data(fd_data), .rd_ready(fd_ready),
    .done(stdloop_done), .nreads(sl_nreads), .nbytes(sl_nbytes)
  );

  hwfile_client u_cli (
    .clk, .rst_n,
    .req_valid(fq_valid), .req_cmd(fq_cmd), .req_fd(fq_fd), .req_size(fq_size), .req_ready(fq_ready),
    .wr_valid(fw_valid), .wr_data(fw_data), .wr_ready(fw_ready),
    .rsp_valid(fr_valid), .rsp_size(fr_size), .rsp_ready(fr_ready),
    .rd_valid(fd_valid), .rd_data(fd_data), .rd_ready(fd_ready),
    .exited(cli_exited),
    .tx_hdr_valid(th_valid[1]), .tx_hdr(th[1]), .tx_hdr_ready(th_ready[1]),
    .tx_pl_valid(tp_valid[1]), .tx_pl_data(tp_data[1]), .tx_pl_ready(tp_ready[1]),
    .rx_hdr_valid(rh_valid && to_cli), .rx_hdr(rh), .rx_hdr_ready(cli_hdr_ready),
    .rx_pl_valid(rp_valid && rp_cmd == CMD_READ_ACK), .rx_pl_data(rp_data),
    .rx_pl_last(rp_last), .rx_pl_ready(cli_pl_ready)
  );
endmodule
