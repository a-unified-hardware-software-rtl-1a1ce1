// tb_pkt_tx: two packet sources offer messages at once; checks that whole
// messages come out one after the other (never interleaved), alternating
// between the sources, with the header bytes in order and exactly SIZE
// payload bytes, under random output back-pressure; then that a lone source
// is served back to back and that a negative-SIZE reply has no payload.
module tb_pkt_tx;
  import borph_pkg::*;
  localparam int NSRC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NSRC-1:0] hdr_valid, hdr_ready, pl_valid, pl_ready;
  msg_hdr_t hdr [NSRC];
  logic [7:0] pl_data [NSRC];
  logic out_valid, out_ready;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pkt_tx #(.NSRC(NSRC)) dut (.clk, .rst_n, .hdr_valid, .hdr, .hdr_ready, .pl_valid, .pl_data,
    .pl_ready, .out_valid, .out_data, .out_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // each source: a queue of messages; payload byte k of source s message m
  // is s*64 + m*8 + k
  msg_hdr_t   msgs [NSRC][$];
  int         sent_pl [NSRC];
  int         cur_msg [NSRC];
  logic [7:0] out_bytes [$];

  logic [NSRC-1:0] hdr_fire = '0, pl_fire = '0;
  logic out_fire = 1'b0;
  always @(posedge clk) begin
    hdr_fire = hdr_valid & hdr_ready;
    pl_fire  = pl_valid & pl_ready;
    out_fire = out_valid && out_ready;
    if (out_fire) out_bytes.push_back(out_data);
  end

  for (genvar s = 0; s < NSRC; s++) begin : g_src
    always @(negedge clk) begin
      if (!rst_n) begin
        hdr_valid[s] = 0; pl_valid[s] = 0; pl_data[s] = 0; hdr[s] = '0;
        sent_pl[s] = 0; cur_msg[s] = 0;
      end else begin
        if (hdr_fire[s]) begin
          void'(msgs[s].pop_front());
        end
        if (pl_fire[s]) sent_pl[s]++;
        hdr_valid[s] = msgs[s].size() > 0;
        hdr[s] = (msgs[s].size() > 0) ? msgs[s][0] : '0;
        pl_valid[s] = ($urandom % 4) != 0;
        pl_data[s] = 8'(s * 64 + sent_pl[s]);
      end
    end
  end

  always @(negedge clk) begin
    out_ready = ($urandom % 3) != 0;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_hdr(input msg_hdr_t h, inout int pos, inout int bad);
    logic [95:0] v;
    v = h;
    for (int b = 11; b >= 0; b--) begin
      if (out_bytes[pos] != v[8*b +: 8]) bad++;
      pos++;
    end
  endfunction

  initial begin
    msg_hdr_t a0, a1, b0, b1;
    int pos, bad, pl0, pl1;
    a0 = '{cmd: CMD_READ_ACK, loc: 24'd3, offset: 32'd0, size: 32'd5};
    a1 = '{cmd: CMD_WRITE_ACK, loc: 24'd4, offset: 32'd8, size: 32'd12};   // no payload
    b0 = '{cmd: CMD_WRITE, loc: 24'd1, offset: 32'd0, size: 32'd3};
    b1 = '{cmd: CMD_EXIT, loc: 24'd0, offset: 32'd0, size: 32'd0};
    out_ready = 0;
    msgs[0].push_back(a0); msgs[0].push_back(a1);
    msgs[1].push_back(b0); msgs[1].push_back(b1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) @(negedge clk);
    // expected order: a0 (source 0 first after reset), b0, a1, b1
    check(out_bytes.size() == 12 + 5 + 12 + 3 + 12 + 12, "total byte count");
    pos = 0; bad = 0; pl0 = 0; pl1 = 0;
    if (out_bytes.size() == 56) begin
      expect_hdr(a0, pos, bad);
      for (int k = 0; k < 5; k++) begin if (out_bytes[pos] != 8'(k)) bad++; pos++; end
      expect_hdr(b0, pos, bad);
      for (int k = 0; k < 3; k++) begin if (out_bytes[pos] != 8'(64 + k)) bad++; pos++; end
      expect_hdr(a1, pos, bad);
      expect_hdr(b1, pos, bad);
    end else bad++;
    check(bad == 0, "messages whole, alternating sources, exact bytes");
    check(sent_pl[0] == 5 && sent_pl[1] == 3, "exactly SIZE payload bytes taken");
    // one source alone is served back to back; an error READ_ACK (negative
    // SIZE) carries no payload
    b0 = '{cmd: CMD_READ_ACK, loc: 24'd2, offset: 32'd0, size: -32'sd9};
    b1 = '{cmd: CMD_WRITE, loc: 24'd1, offset: 32'd0, size: 32'd2};
    msgs[1].push_back(b0); msgs[1].push_back(b1);
    repeat (200) @(negedge clk);
    check(out_bytes.size() == 56 + 12 + 12 + 2, "lone source sends both messages");
    pos = 56; bad = 0;
    if (out_bytes.size() == 82) begin
      expect_hdr(b0, pos, bad);
      expect_hdr(b1, pos, bad);
      for (int k = 3; k < 5; k++) begin if (out_bytes[pos] != 8'(64 + k)) bad++; pos++; end
    end else bad++;
    check(bad == 0 && sent_pl[1] == 5, "error reply without payload, then the write's bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
