// tb_pkt_rx: feeds a byte stream of messages (READ, WRITE with payload,
// READ_ACK with a negative count and so no payload, READ_ACK with payload)
// with random gaps and random back-pressure, and checks every header field,
// every payload byte, pl_last and pl_cmd against what was sent.
module tb_pkt_rx;
  import borph_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, hdr_valid, hdr_ready, pl_valid, pl_last, pl_ready;
  logic [7:0] in_data, pl_data;
  msg_hdr_t hdr;
  cmd_e pl_cmd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pkt_rx dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .hdr_valid, .hdr, .hdr_ready,
    .pl_valid, .pl_data, .pl_last, .pl_cmd, .pl_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] stream [$];
  // expected results
  logic [7:0]  exp_cmd [$];
  logic [23:0] exp_loc [$];
  logic [31:0] exp_off [$], exp_size [$];
  logic [7:0]  exp_pl [$];
  int          exp_pl_len [$];

  task automatic add_msg(input logic [7:0] c, input logic [23:0] l, input logic [31:0] o,
                         input logic [31:0] sz, input int npl);
    stream.push_back(c);
    stream.push_back(l[23:16]); stream.push_back(l[15:8]); stream.push_back(l[7:0]);
    for (int b = 3; b >= 0; b--) stream.push_back(o[8*b +: 8]);
    for (int b = 3; b >= 0; b--) stream.push_back(sz[8*b +: 8]);
    exp_cmd.push_back(c); exp_loc.push_back(l); exp_off.push_back(o); exp_size.push_back(sz);
    exp_pl_len.push_back(npl);
    for (int k = 0; k < npl; k++) begin
      logic [7:0] v;
      v = 8'($urandom);
      stream.push_back(v);
      exp_pl.push_back(v);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source with random gaps; the handshake is sampled at the clock edge
  logic in_fire = 1'b0;
  always @(posedge clk) in_fire = in_valid && in_ready;
  always @(negedge clk) begin
    if (!rst_n) begin
      in_valid = 0; in_data = 0;
    end else begin
      if (in_fire) void'(stream.pop_front());
      in_valid = (stream.size() > 0) && ($urandom % 4 != 0);
      in_data  = (stream.size() > 0) ? stream[0] : 8'h00;
    end
  end

  initial begin
    int nmsg, bad_hdr, bad_pl, bad_last, bad_cmd, got;
    hdr_ready = 0; pl_ready = 0;
    add_msg(8'h01, 24'h000005, 32'h0000_0010, 32'd64, 0);            // READ
    add_msg(8'h03, 24'h000001, 32'h0000_0100, 32'd7, 7);             // WRITE
    add_msg(8'h02, 24'h000003, 32'h0,         32'hFFFF_FFEA, 0);     // READ_ACK -22
    add_msg(8'h02, 24'h000000, 32'h0,         32'd20, 20);           // READ_ACK 20
    add_msg(8'h05, 24'hABCDEF, 32'h1234_5678, 32'h9ABC_DEF0, 0);     // GREET
    add_msg(8'h03, 24'h000002, 32'h0,         32'd1, 1);             // WRITE 1
    nmsg = exp_cmd.size();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bad_hdr = 0; bad_pl = 0; bad_last = 0; bad_cmd = 0;
    for (int m = 0; m < nmsg; m++) begin
      int len;
      while (!hdr_valid) @(negedge clk);
      repeat ($urandom % 3) @(negedge clk);   // consumer delay
      if (hdr.cmd != exp_cmd[m] || hdr.loc != exp_loc[m] || hdr.offset != exp_off[m] ||
          hdr.size != exp_size[m]) begin
        bad_hdr++;
        $display("hdr %0d: %h %h %h %h", m, hdr.cmd, hdr.loc, hdr.offset, hdr.size);
      end
      hdr_ready = 1;
      @(negedge clk);
      hdr_ready = 0;
      len = exp_pl_len[m];
      got = 0;
      while (got < len) begin
        pl_ready = ($urandom % 3) != 0;
        #1;
        if (pl_valid && pl_ready) begin
          if (pl_data != exp_pl.pop_front()) bad_pl++;
          if (pl_last != (got == len - 1)) bad_last++;
          if (pl_cmd != cmd_e'(exp_cmd[m])) bad_cmd++;
          got++;
        end
        @(negedge clk);
      end
      pl_ready = 0;
    end
    check(bad_hdr == 0, "all header fields");
    check(bad_pl == 0, "all payload bytes");
    check(bad_last == 0, "pl_last on the final byte only");
    check(bad_cmd == 0, "pl_cmd names the message");
    repeat (5) @(negedge clk);
    check(!hdr_valid && !pl_valid, "nothing left over");
    check(stream.size() == 0, "all bytes consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
