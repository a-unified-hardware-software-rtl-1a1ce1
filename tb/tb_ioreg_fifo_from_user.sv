// tb_ioreg_fifo_from_user: the user design pushes words, software pops them
// over the OPB in order; checks the fill-level word, back-pressure when full
// and the zero returned when empty.
module tb_ioreg_fifo_from_user;
  import borph_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t req;
  opb_rsp_t rsp;
  logic u_valid, u_ready;
  logic [31:0] u_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioreg_fifo_from_user #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
    .u_valid, .u_data, .u_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    int lat;
    @(negedge clk);
    req = '{select: 1'b1, rnw: rnw, abus: a, be: 4'hF, dbus: d};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!rsp.xferack && lat < 50);
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
    logic [31:0] q[$];
    int bad;
    req = '0; u_valid = 0; u_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    opb(1'b1, 32'h4, 0, rd);
    check(rd == 0, "empty after reset");
    opb(1'b1, 32'h0, 0, rd);
    check(rd == 0, "pop of empty FIFO returns zero");
    for (int k = 0; k < 5; k++) begin
      u_valid = 1; u_data = 32'h1000 + 32'(k * 7); q.push_back(u_data);
      @(negedge clk);
    end
    u_valid = 0;
    opb(1'b1, 32'h4, 0, rd);
    check(rd == 5, "fill level 5");
    bad = 0;
    for (int k = 0; k < 5; k++) begin
      opb(1'b1, 32'h0, 0, rd);
      if (rd != q.pop_front()) bad++;
    end
    check(bad == 0, "words come out in order");
    opb(1'b1, 32'h4, 0, rd);
    check(rd == 0, "empty again");
    // fill to the top
    for (int k = 0; k < DEPTH + 3; k++) begin
      u_valid = 1; u_data = $urandom;
      if (u_ready) q.push_back(u_data);
      @(negedge clk);
    end
    u_valid = 0;
    check(!u_ready, "not ready when full");
    check(q.size() == DEPTH, "exactly DEPTH words accepted");
    opb(1'b0, 32'h0, 32'hFFFF, rd);   // writes are ignored
    opb(1'b1, 32'h4, 0, rd);
    check(rd == DEPTH, "fill level DEPTH; software write ignored");
    bad = 0;
    for (int k = 0; k < DEPTH; k++) begin
      opb(1'b1, 32'h0, 0, rd);
      if (rd != q.pop_front()) bad++;
    end
    check(bad == 0, "full FIFO drains in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
