// tb_smap_ctrl: drives SelectMap Control over the OPB while modelling four
// user FPGAs on the bus (busy and interrupt lines under testbench control, a
// distinct byte returned by each when selected for a read). Checks register
// reads and writes, that a DATA write strobes the byte to the selected FPGA
// only, waits while that FPGA is busy and acknowledges afterwards, that DATA
// reads move a byte only when data waits, the status and interrupt logic, and
// configuration mode.
module tb_smap_ctrl;
  import borph_pkg::*;
  localparam int NU = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t req;
  opb_rsp_t rsp;
  logic irq, sm_cfg, sm_rdwr_n, sm_strobe;
  logic [NU-1:0] sm_cs_n, sm_busy, sm_irq;
  logic [7:0] sm_dout, sm_din;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  smap_ctrl #(.NUM_USER(NU)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .irq, .sm_cfg,
    .sm_cs_n, .sm_rdwr_n, .sm_strobe, .sm_dout, .sm_din, .sm_busy, .sm_irq);

  // user FPGA models: FPGA f answers a read with 8'h50 + f
  always_comb begin
    sm_din = 8'h00;
    for (int f = 0; f < NU; f++)
      if (!sm_cs_n[f] && sm_rdwr_n) sm_din |= 8'h50 + 8'(f);
  end
  // log of bus transfers: {cfg, rdwr_n, fpga, byte}
  int bus_log [$];
  always @(posedge clk) if (sm_strobe && rst_n) begin
    int f;
    f = -1;
    for (int k = 0; k < NU; k++) if (!sm_cs_n[k]) f = (f == -1) ? k : 99;
    bus_log.push_back({sm_cfg, sm_rdwr_n, 8'(f), sm_rdwr_n ? sm_din : sm_dout});
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int lat);
    @(negedge clk);
    req = '{select: 1'b1, rnw: rnw, abus: a, be: 4'hF, dbus: d};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!rsp.xferack && lat < 200);
    rd = rsp.dbus;
    req = '0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int lat;
    req = '0; sm_busy = '0; sm_irq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    opb(1'b0, 32'h0, 32'h2, rd, lat);
    opb(1'b1, 32'h0, 0, rd, lat);
    check(rd == 32'h2, "CTRL selects FPGA 2");
    opb(1'b0, 32'h4, 32'hA7, rd, lat);
    check(bus_log.size() == 1 && bus_log[0] == {1'b0, 1'b0, 8'd2, 8'hA7}, "byte strobed to FPGA 2 only");
    // busy holds the write
    sm_busy[2] = 1'b1;
    fork
      begin repeat (20) @(negedge clk); sm_busy[2] = 1'b0; end
    join_none
    opb(1'b0, 32'h4, 32'h3C, rd, lat);
    check(lat >= 20 && bus_log.size() == 2 && bus_log[1][7:0] == 8'h3C, "write waits while busy");
    // busy of another FPGA does not matter
    sm_busy[1] = 1'b1;
    opb(1'b0, 32'h4, 32'h01, rd, lat);
    check(lat <= 3 && bus_log.size() == 3, "other FPGA's busy ignored");
    sm_busy[1] = 1'b0;
    // read with nothing waiting
    opb(1'b1, 32'h4, 0, rd, lat);
    check(rd == 32'h0 && bus_log.size() == 3, "read with no data: 0, no bus cycle");
    sm_irq[2] = 1'b1;
    opb(1'b1, 32'h4, 0, rd, lat);
    check(rd == 32'h152 && bus_log.size() == 4 && bus_log[3] == {1'b0, 1'b1, 8'd2, 8'h52},
          "read returns the FPGA's byte with valid bit");
    // status and interrupt
    sm_busy = 4'b1000; sm_irq = 4'b0110;
    opb(1'b1, 32'h8, 0, rd, lat);
    check(rd == 32'h0000_0806, "STATUS shows busy and interrupt lines");
    check(!irq, "interrupt masked by default");
    opb(1'b0, 32'hC, 32'h2, rd, lat);
    check(irq, "enabled interrupt of FPGA 1 reaches the processor");
    sm_irq = 4'b0100;
    @(negedge clk);
    check(!irq, "FPGA 2's interrupt is not enabled");
    sm_busy = '0;
    // configuration mode
    opb(1'b0, 32'h0, 32'h100 | 32'h3, rd, lat);
    check(sm_cfg, "configuration mode on");
    opb(1'b0, 32'h4, 32'hFF, rd, lat);
    check(bus_log.size() == 5 && bus_log[4] == {1'b1, 1'b0, 8'd3, 8'hFF}, "configuration byte to FPGA 3");
    sm_irq = 4'b1000;
    opb(1'b1, 32'h4, 0, rd, lat);
    check(rd == 0 && bus_log.size() == 5, "no reads in configuration mode");
    opb(1'b0, 32'h0, 32'h3, rd, lat);
    check(!sm_cfg, "back to message mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
