// borph_bee2_top: the FPGA logic of one BEE2 compute module under BORPH, a
// control FPGA and NUM_USER_FPGAS user FPGAs joined by the shared 8-bit
// SelectMap bus.
//
// On the control FPGA only SelectMap Control is logic of this design: its
// OPB slave port (opb_req / opb_rsp) and interrupt (irq) are brought out,
// since the PowerPC running the kernel and the PLB-to-OPB bridge that would
// drive them are processor and vendor parts. Each user FPGA is a user_fpga
// shell. The bus is shared: chip select, direction, strobe and write data
// fan out from the controller to every user FPGA; the read data is the OR of
// the user FPGAs' outputs (each drives zero unless selected for a read), and
// busy and interrupt come back one line per FPGA. In configuration mode the
// bus bytes are for the selected FPGA's configuration logic, which is not
// modelled: sm_cfg, sm_cs_n, sm_strobe and sm_data carry them out. The user
// designs' streams and registers of every FPGA are ports, indexed by FPGA.
module borph_bee2_top
  import borph_pkg::*;
#(
  parameter int NUM_USER_FPGAS = 4,
  parameter int NUM_CTRL_REGS  = 16,
  parameter int SHMEM_BYTES    = 8192,
  parameter int XFER_BYTES     = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    opb_req,
  output opb_rsp_t    opb_rsp,
  output logic        irq,
  output logic        sm_cfg,
  output logic [NUM_USER_FPGAS-1:0] sm_cs_n,
  output logic        sm_strobe,
  output logic [7:0]  sm_data,
  input  logic [NUM_USER_FPGAS-1:0] samp0_valid,
  input  logic [31:0] samp0_data [NUM_USER_FPGAS],
  input  logic [NUM_USER_FPGAS-1:0] samp1_valid,
  input  logic [31:0] samp1_data [NUM_USER_FPGAS],
  input  logic [NUM_USER_FPGAS-1:0] ufifo_in_valid,
  input  logic [31:0] ufifo_in_data [NUM_USER_FPGAS],
  output logic [NUM_USER_FPGAS-1:0] ufifo_in_ready,
  output logic [NUM_USER_FPGAS-1:0] ufifo_out_valid,
  output logic [31:0] ufifo_out_data [NUM_USER_FPGAS],
  input  logic [NUM_USER_FPGAS-1:0] ufifo_out_ready,
  output logic [31:0] ctrl_regs [NUM_USER_FPGAS][NUM_CTRL_REGS],
  output logic [NUM_USER_FPGAS-1:0] stdloop_done
);
  logic                      sm_rdwr_n;
  logic [7:0]                sm_rd_bus;
  logic [7:0]                sm_dout_u [NUM_USER_FPGAS];
  logic [NUM_USER_FPGAS-1:0] sm_busy, sm_irq;

  smap_ctrl #(.NUM_USER(NUM_USER_FPGAS)) u_smap_ctrl (
    .clk, .rst_n, .s_req(opb_req), .s_rsp(opb_rsp), .irq,
    .sm_cfg, .sm_cs_n, .sm_rdwr_n, .sm_strobe, .sm_dout(sm_data),
    .sm_din(sm_rd_bus), .sm_busy, .sm_irq
  );

  always_comb begin
    sm_rd_bus = '0;
    for (int f = 0; f < NUM_USER_FPGAS; f++) sm_rd_bus |= sm_dout_u[f];
  end

  for (genvar f = 0; f < NUM_USER_FPGAS; f++) begin : g_user
    user_fpga #(
      .NUM_CTRL_REGS(NUM_CTRL_REGS), .SHMEM_BYTES(SHMEM_BYTES), .XFER_BYTES(XFER_BYTES)
    ) u_user (
      .clk, .rst_n,
      .sm_cfg, .sm_cs_n(sm_cs_n[f]), .sm_rdwr_n, .sm_strobe, .sm_din(sm_data),
      .sm_dout(sm_dout_u[f]), .sm_busy(sm_busy[f]), .sm_irq(sm_irq[f]),
      .samp0_valid(samp0_valid[f]), .samp0_data(samp0_data[f]),
      .samp1_valid(samp1_valid[f]), .samp1_data(samp1_data[f]),
      .ufifo_in_valid(ufifo_in_valid[f]), .ufifo_in_data(ufifo_in_data[f]),
      .ufifo_in_ready(ufifo_in_ready[f]),
      .ufifo_out_valid(ufifo_out_valid[f]), .ufifo_out_data(ufifo_out_data[f]),
      .ufifo_out_ready(ufifo_out_ready[f]),
      .ctrl_regs(ctrl_regs[f]), .stdloop_done(stdloop_done[f])
    );
  end
endmodule
