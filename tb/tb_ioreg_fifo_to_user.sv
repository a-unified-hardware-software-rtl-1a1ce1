// tb_ioreg_fifo_to_user: software pushes words over the OPB and the user
// design takes them in order; checks the free-space word, the drop of a push
// into a full FIFO and that reads of the data word return zero and push nothing.
module tb_ioreg_fifo_to_user;
  import borph_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t req;
  opb_rsp_t rsp;
  logic u_valid, u_ready;
  logic [31:0] u_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioreg_fifo_to_user #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
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
    req = '0; u_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    opb(1'b1, 32'h4, 0, rd);
    check(rd == DEPTH, "all free after reset");
    check(!u_valid, "nothing for the user after reset");
    for (int k = 0; k < DEPTH + 2; k++) begin
      opb(1'b0, 32'h0, 32'hAB00 + 32'(k), rd);
      if (k < DEPTH) q.push_back(32'hAB00 + 32'(k));
    end
    opb(1'b1, 32'h4, 0, rd);
    check(rd == 0, "no room left; extra pushes dropped");
    opb(1'b1, 32'h0, 0, rd);
    check(rd == 0, "data word reads as zero");
    bad = 0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      if (!u_valid || u_data != q.pop_front()) bad++;
      u_ready = 1;
      @(negedge clk);
      u_ready = 0;
    end
    check(bad == 0, "user side receives the words in order");
    check(!u_valid, "empty after draining");
    opb(1'b1, 32'h4, 0, rd);
    check(rd == DEPTH, "all free again");
    opb(1'b1, 32'h0, 0, rd);
    opb(1'b1, 32'h4, 0, rd);
    check(rd == DEPTH && !u_valid, "a read of the data word pushes nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
