// tb_opb_bus: three modelled slaves (acknowledging after 1, 3 and never
// clocks) behind the bus. Checks that only the addressed slave is selected,
// that read data and acknowledges reach the master, and that an unanswered
// transfer or an unmapped address ends in errack after TIMEOUT clocks.
module tb_opb_bus;
  import borph_pkg::*;
  localparam int NSLV = 3, TIMEOUT = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t m_req;
  opb_rsp_t m_rsp;
  opb_req_t s_req [NSLV];
  opb_rsp_t s_rsp [NSLV];
  logic timeout_evt;
  int checks = 0, failures = 0, n_timeout = 0;
  int lat_cfg [NSLV] = '{1, 3, 0};   // 0 = never answers
  int wait_cnt [NSLV];
  logic [31:0] regs [NSLV];
  always #5 clk = ~clk;

  opb_bus #(.NSLV(NSLV), .SLV_SHIFT(14), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .timeout_evt);

  // slave models: acknowledge lat_cfg clocks after select
  for (genvar k = 0; k < NSLV; k++) begin : g_slv
    always_ff @(posedge clk) begin
      s_rsp[k] <= OPB_RSP_IDLE;
      if (!rst_n) begin
        wait_cnt[k] <= 0;
        regs[k] <= 32'h100 * (k + 1);
      end else if (s_req[k].select && !s_rsp[k].xferack) begin
        wait_cnt[k] <= wait_cnt[k] + 1;
        if (lat_cfg[k] != 0 && wait_cnt[k] + 1 == lat_cfg[k]) begin
          wait_cnt[k] <= 0;
          s_rsp[k].xferack <= 1'b1;
          if (s_req[k].rnw) s_rsp[k].dbus <= regs[k];
          else regs[k] <= s_req[k].dbus;
        end
      end else begin
        wait_cnt[k] <= 0;
      end
    end
  end

  always @(negedge clk) if (timeout_evt) n_timeout++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err, output int lat);
    @(negedge clk);
    m_req = '{select: 1'b1, rnw: rnw, abus: a, be: 4'hF, dbus: d};
    lat = 0;
    do begin
      @(negedge clk); lat++;
      // only the addressed slave sees select
      for (int k = 0; k < NSLV; k++)
        if (s_req[k].select != (a[31:14] == 18'(k))) failures++;
    end while (!m_rsp.xferack && !m_rsp.errack && lat < 100);
    rd = m_rsp.dbus;
    err = m_rsp.errack;
    m_req = '0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic err;
    int lat;
    m_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    opb(1'b1, 32'h0000_0010, 0, rd, err, lat);
    check(rd == 32'h100 && !err && lat == 1, "slave 0 read, one clock");
    opb(1'b1, 32'h0000_4000, 0, rd, err, lat);
    check(rd == 32'h200 && !err && lat == 3, "slave 1 read, three clocks");
    opb(1'b0, 32'h0000_4000, 32'h5555, rd, err, lat);
    opb(1'b1, 32'h0000_4004, 0, rd, err, lat);
    check(rd == 32'h5555 && !err, "slave 1 write then read");
    opb(1'b1, 32'h0000_8000, 0, rd, err, lat);
    check(err && lat == TIMEOUT && rd == 0, "silent slave times out");
    opb(1'b1, 32'h0004_0000, 0, rd, err, lat);
    check(err && lat == TIMEOUT, "unmapped address times out");
    @(negedge clk);
    check(n_timeout == 2, "two time-out events");
    opb(1'b1, 32'h0000_0000, 0, rd, err, lat);
    check(rd == 32'h100 && !err, "bus usable after time-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
