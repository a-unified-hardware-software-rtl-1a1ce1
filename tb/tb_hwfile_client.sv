// tb_hwfile_client: plays both the hardware process and the kernel around
// the file client. Checks the WRITE message and its payload (and that no
// acknowledge is awaited), the READ message, the blocking wait for READ_ACK
// and the count and data handed back, end of file, a stray READ_ACK being
// drained, and the EXIT message after which the client stays exited.
module tb_hwfile_client;
  import borph_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, wr_valid, wr_ready, rsp_valid, rsp_ready, rd_valid, rd_ready, exited;
  cmd_e req_cmd;
  logic [23:0] req_fd;
  logic [31:0] req_size, rsp_size;
  logic [7:0] wr_data, rd_data, tx_pl_data, rx_pl_data;
  logic tx_hdr_valid, tx_hdr_ready, tx_pl_valid, tx_pl_ready;
  logic rx_hdr_valid, rx_hdr_ready, rx_pl_valid, rx_pl_last, rx_pl_ready;
  msg_hdr_t tx_hdr, rx_hdr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hwfile_client dut (.clk, .rst_n, .req_valid, .req_cmd, .req_fd, .req_size, .req_ready,
    .wr_valid, .wr_data, .wr_ready, .rsp_valid, .rsp_size, .rsp_ready, .rd_valid, .rd_data,
    .rd_ready, .exited, .tx_hdr_valid, .tx_hdr, .tx_hdr_ready, .tx_pl_valid, .tx_pl_data,
    .tx_pl_ready, .rx_hdr_valid, .rx_hdr, .rx_hdr_ready, .rx_pl_valid, .rx_pl_data,
    .rx_pl_last, .rx_pl_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_hdr_t   sent_hdr [$];
  logic [7:0] sent_pl [$];
  logic [7:0] got_rd [$];
  always @(posedge clk) begin
    if (tx_hdr_valid && tx_hdr_ready) sent_hdr.push_back(tx_hdr);
    if (tx_pl_valid && tx_pl_ready) sent_pl.push_back(tx_pl_data);
    if (rd_valid && rd_ready) got_rd.push_back(rd_data);
  end
  always @(negedge clk) begin
    tx_hdr_ready = ($urandom % 2) != 0;
    tx_pl_ready  = ($urandom % 3) != 0;
    rd_ready     = ($urandom % 3) != 0;
  end

  task automatic request(input cmd_e c, input int fd, input int size);
    @(negedge clk);
    req_valid = 1; req_cmd = c; req_fd = 24'(fd); req_size = 32'(size);
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
  endtask

  // kernel sends a READ_ACK with n bytes (value base + k)
  task automatic kernel_ack(input int n, input int base);
    @(negedge clk);
    rx_hdr_valid = 1;
    rx_hdr = '{cmd: CMD_READ_ACK, loc: 24'd0, offset: 32'd0, size: 32'(n)};
    do @(posedge clk); while (!rx_hdr_ready);
    @(negedge clk);
    rx_hdr_valid = 0;
    for (int k = 0; k < n; k++) begin
      rx_pl_valid = 1; rx_pl_data = 8'(base + k); rx_pl_last = (k == n - 1);
      do @(posedge clk); while (!rx_pl_ready);
      @(negedge clk);
      rx_pl_valid = 0;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad, t;
    req_valid = 0; req_cmd = CMD_READ; req_fd = 0; req_size = 0;
    wr_valid = 0; wr_data = 0; rsp_ready = 0;
    rx_hdr_valid = 0; rx_hdr = '0; rx_pl_valid = 0; rx_pl_data = 0; rx_pl_last = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // WRITE 5 bytes to fd 1
    request(CMD_WRITE, 1, 5);
    for (int k = 0; k < 5; k++) begin
      wr_valid = 1; wr_data = 8'hC0 + 8'(k);
      do @(posedge clk); while (!wr_ready);
      @(negedge clk);
      wr_valid = 0;
    end
    repeat (5) @(negedge clk);
    check(sent_hdr.size() == 1 && sent_hdr[0].cmd == CMD_WRITE && sent_hdr[0].loc == 1 &&
          sent_hdr[0].size == 5, "WRITE message");
    bad = 0;
    for (int k = 0; k < 5; k++) if (sent_pl[k] != 8'hC0 + 8'(k)) bad++;
    check(sent_pl.size() == 5 && bad == 0, "WRITE payload");
    check(req_ready, "ready for the next request without a WRITE_ACK");

    // READ 16 from fd 0, kernel answers 6
    request(CMD_READ, 0, 16);
    repeat (20) @(negedge clk);
    check(sent_hdr.size() == 2 && sent_hdr[1].cmd == CMD_READ && sent_hdr[1].size == 16, "READ message");
    check(!req_ready && !rsp_valid, "blocked until READ_ACK");
    fork kernel_ack(6, 8'h30); join_none
    t = 0;
    while (!rsp_valid && t < 100) begin @(negedge clk); t++; end
    check(rsp_valid && rsp_size == 6, "count handed back");
    rsp_ready = 1; @(negedge clk); rsp_ready = 0;
    repeat (30) @(negedge clk);
    bad = 0;
    for (int k = 0; k < 6; k++) if (got_rd[k] != 8'h30 + 8'(k)) bad++;
    check(got_rd.size() == 6 && bad == 0, "read data handed back");

    // end of file
    request(CMD_READ, 0, 16);
    kernel_ack(0, 0);
    t = 0;
    while (!rsp_valid && t < 100) begin @(negedge clk); t++; end
    check(rsp_valid && rsp_size == 0, "end of file: count 0");
    rsp_ready = 1; @(negedge clk); rsp_ready = 0;

    // stray READ_ACK while idle is drained
    kernel_ack(4, 0);
    repeat (5) @(negedge clk);
    check(got_rd.size() == 6 && req_ready, "stray READ_ACK dropped");

    // EXIT
    request(CMD_EXIT, 0, 3);
    repeat (10) @(negedge clk);
    check(sent_hdr.size() == 4 && sent_hdr[3].cmd == CMD_EXIT && sent_hdr[3].size == 3, "EXIT message with status");
    check(exited && !req_ready, "exited and takes no more requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
