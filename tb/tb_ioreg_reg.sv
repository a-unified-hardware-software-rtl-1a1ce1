// tb_ioreg_reg: drives the register ioreg as an OPB master: full and partial
// (byte-enable) writes, reads, the one-clock acknowledge, and the hardware
// write port taking priority over a simultaneous software write.
module tb_ioreg_reg;
  import borph_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t req;
  opb_rsp_t rsp;
  logic hw_we;
  logic [31:0] hw_d, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioreg_reg dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .hw_we, .hw_d, .q);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One OPB transfer; returns read data and the clocks until acknowledge.
  task automatic opb(input logic rnw, input logic [31:0] a, input logic [3:0] be,
                     input logic [31:0] d, output logic [31:0] rd, output int lat);
    @(negedge clk);
    req = '{select: 1'b1, rnw: rnw, abus: a, be: be, dbus: d};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!rsp.xferack && lat < 50);
    rd = rsp.dbus;
    req = '0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int lat;
    req = '0; hw_we = 1'b0; hw_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(q == 32'd0, "reset value zero");
    opb(1'b0, 32'h0, 4'hF, 32'hDEADBEEF, rd, lat);
    check(lat == 1, "write acknowledged one clock after select");
    check(q == 32'hDEADBEEF, "full write");
    @(negedge clk);
    check(rsp.xferack == 1'b0, "acknowledge is a single pulse");
    opb(1'b1, 32'h0, 4'hF, 32'h0, rd, lat);
    check(rd == 32'hDEADBEEF && lat == 1, "read back");
    opb(1'b0, 32'h0, 4'b1000, 32'h11223344, rd, lat);
    check(q == 32'h11ADBEEF, "byte 0 only (bits 31:24)");
    opb(1'b0, 32'h0, 4'b0011, 32'h55667788, rd, lat);
    check(q == 32'h11AD7788, "bytes 2 and 3");
    @(negedge clk);
    check(rsp.dbus == 32'd0, "idle response is zero");
    // hardware write alone
    hw_we = 1'b1; hw_d = 32'hCAFEF00D;
    @(negedge clk);
    hw_we = 1'b0;
    check(q == 32'hCAFEF00D, "hardware write");
    // simultaneous: hardware wins
    @(negedge clk);
    req = '{select: 1'b1, rnw: 1'b0, abus: 32'h0, be: 4'hF, dbus: 32'h12345678};
    hw_we = 1'b1; hw_d = 32'h0BADCAFE;
    @(negedge clk);
    req = '0; hw_we = 1'b0;
    check(q == 32'h0BADCAFE, "hardware write wins a collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
