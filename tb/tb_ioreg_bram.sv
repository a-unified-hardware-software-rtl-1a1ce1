// tb_ioreg_bram: fills the shared memory from the user port and reads it over
// the OPB, writes it over the OPB (with byte enables) and reads it back from
// both ports, against a reference array kept by the testbench. Also checks
// the one-clock acknowledge, the all-zero idle response, address wrap and
// that the OPB wins when both ports write one word in the same clock.
module tb_ioreg_bram;
  import borph_pkg::*;
  localparam int BYTES = 8192, WORDS = BYTES / 4, AW = $clog2(WORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t req;
  opb_rsp_t rsp;
  logic u_en, u_we;
  logic [AW-1:0] u_addr;
  logic [31:0] u_wdata, u_rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioreg_bram #(.BYTES(BYTES)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
    .u_en, .u_we, .u_addr, .u_wdata, .u_rdata);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, v;
    int lat, bad;
    req = '0; u_en = 0; u_we = 0; u_addr = '0; u_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // user port fills every word
    for (int w = 0; w < WORDS; w++) begin
      v = $urandom;
      ref_mem[w] = v;
      u_en = 1; u_we = 1; u_addr = AW'(w); u_wdata = v;
      @(negedge clk);
    end
    u_en = 0; u_we = 0;
    bad = 0;
    for (int w = 0; w < WORDS; w += 37) begin
      opb(1'b1, 32'(w * 4), 4'hF, 0, rd, lat);
      if (rd !== ref_mem[w] || lat != 1) bad++;
    end
    check(bad == 0, "OPB reads what the user port wrote, one-clock acknowledge");
    // OPB partial writes
    for (int w = 5; w < WORDS; w += 101) begin
      logic [3:0] be;
      be = 4'($urandom);
      v = $urandom;
      opb(1'b0, 32'(w * 4), be, v, rd, lat);
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[w][8*b +: 8] = v[8*b +: 8];
    end
    bad = 0;
    for (int w = 5; w < WORDS; w += 101) begin
      u_en = 1; u_we = 0; u_addr = AW'(w);
      @(negedge clk);
      u_en = 0;
      if (u_rdata !== ref_mem[w]) bad++;
      opb(1'b1, 32'(w * 4), 4'hF, 0, rd, lat);
      if (rd !== ref_mem[w]) bad++;
    end
    check(bad == 0, "byte-enabled OPB writes seen by both ports");
    // last word of the memory
    opb(1'b0, 32'(BYTES - 4), 4'hF, 32'hA5A5_5A5A, rd, lat);
    u_en = 1; u_we = 0; u_addr = AW'(WORDS - 1);
    @(negedge clk);
    u_en = 0;
    check(u_rdata == 32'hA5A5_5A5A, "last word");
    // write acknowledge: one clock, no data driven onto the OR-ed bus
    opb(1'b0, 32'h40, 4'hF, 32'h1234_5678, rd, lat);
    check(lat == 1 && rd == 32'd0, "write acknowledged after one clock with zero read data");
    repeat (3) @(negedge clk);
    check(rsp == '0, "idle slave drives all-zero response");
    // addresses wrap inside the memory
    opb(1'b1, 32'(BYTES + 32'h40), 4'hF, 0, rd, lat);
    check(rd == 32'h1234_5678, "address beyond the memory wraps");
    // both ports write one word in the same clock: the OPB write wins
    @(negedge clk);
    req = '{select: 1'b1, rnw: 1'b0, abus: 32'h80, be: 4'hF, dbus: 32'hCAFE_0001};
    u_en = 1; u_we = 1; u_addr = AW'(32); u_wdata = 32'hBEEF_0002;
    @(negedge clk);
    req = '0; u_en = 0; u_we = 0;
    opb(1'b1, 32'h80, 4'hF, 0, rd, lat);
    check(rd == 32'hCAFE_0001, "OPB write wins a same-clock collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
