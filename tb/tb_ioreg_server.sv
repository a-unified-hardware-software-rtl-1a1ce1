// tb_ioreg_server: the ioreg server with a real OPB and four ioregs (a
// register at LOC 0, an 8192-byte memory at LOC 1, a FIFO from the user
// design at LOC 2, a FIFO to the user design at LOC 3). The testbench plays
// the kernel: it sends READ, WRITE and GREET messages and checks every
// acknowledge (command, LOC, byte count or error) and every data byte
// against its own model of the ioregs, with random back-pressure on replies.
module tb_ioreg_server;
  import borph_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid, hdr_ready, pl_valid, pl_ready;
  msg_hdr_t hdr, tx_hdr;
  logic [7:0] pl_data, tx_pl_data;
  logic tx_hdr_valid, tx_hdr_ready, tx_pl_valid, tx_pl_ready;
  opb_req_t m_req;
  opb_rsp_t m_rsp;
  opb_req_t s_req [4];
  opb_rsp_t s_rsp [4];
  logic to_evt;
  logic ff_valid, ff_ready, ft_valid, ft_ready;
  logic [31:0] ff_data, ft_data, reg_q, bram_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioreg_server dut (.clk, .rst_n, .hdr_valid, .hdr, .hdr_ready, .pl_valid, .pl_data, .pl_ready,
    .opb_req(m_req), .opb_rsp(m_rsp), .tx_hdr_valid, .tx_hdr, .tx_hdr_ready,
    .tx_pl_valid, .tx_pl_data, .tx_pl_ready);
  opb_bus #(.NSLV(4)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .timeout_evt(to_evt));
  ioreg_reg u_reg (.clk, .rst_n, .s_req(s_req[0]), .s_rsp(s_rsp[0]), .hw_we(1'b0), .hw_d(32'd0), .q(reg_q));
  ioreg_bram #(.BYTES(8192)) u_mem (.clk, .rst_n, .s_req(s_req[1]), .s_rsp(s_rsp[1]),
    .u_en(1'b0), .u_we(1'b0), .u_addr(11'd0), .u_wdata(32'd0), .u_rdata(bram_rdata));
  ioreg_fifo_from_user #(.DEPTH(256)) u_ff (.clk, .rst_n, .s_req(s_req[2]), .s_rsp(s_rsp[2]),
    .u_valid(ff_valid), .u_data(ff_data), .u_ready(ff_ready));
  ioreg_fifo_to_user #(.DEPTH(256)) u_ft (.clk, .rst_n, .s_req(s_req[3]), .s_rsp(s_rsp[3]),
    .u_valid(ft_valid), .u_data(ft_data), .u_ready(ft_ready));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reply monitor -------------------------------------------------------
  msg_hdr_t   rep_hdr [$];
  logic [7:0] rep_pl [$];
  always @(posedge clk) begin
    if (tx_hdr_valid && tx_hdr_ready) rep_hdr.push_back(tx_hdr);
    if (tx_pl_valid && tx_pl_ready) rep_pl.push_back(tx_pl_data);
  end
  always @(negedge clk) begin
    tx_hdr_ready = ($urandom % 3) != 0;
    tx_pl_ready  = ($urandom % 4) != 0;
  end

  // ---- kernel side ---------------------------------------------------------
  task automatic send(input cmd_e c, input int loc, input int off, input int size,
                      input logic [7:0] pl [$]);
    @(negedge clk);
    hdr_valid = 1;
    hdr = '{cmd: c, loc: 24'(loc), offset: 32'(off), size: 32'(size)};
    do @(posedge clk); while (!hdr_ready);
    @(negedge clk);
    hdr_valid = 0;
    foreach (pl[k]) begin
      pl_valid = 1; pl_data = pl[k];
      do @(posedge clk); while (!pl_ready);
      @(negedge clk);
      pl_valid = 0;
    end
  endtask

  // waits for one reply; returns its header and n payload bytes
  task automatic reply(output msg_hdr_t h, output logic [7:0] d [$]);
    int n, t;
    t = 0;
    while (rep_hdr.size() == 0 && t < 5000) begin @(negedge clk); t++; end
    h = rep_hdr.pop_front();
    n = has_payload(h) ? int'(h.size) : 0;
    while (rep_pl.size() < n && t < 50000) begin @(negedge clk); t++; end
    d = {};
    for (int k = 0; k < n; k++) d.push_back(rep_pl.pop_front());
  endtask

  logic [7:0] model_mem [8192];

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_hdr_t h;
    logic [7:0] d [$];
    logic [7:0] pl [$];
    logic [7:0] none [$];
    logic [31:0] words [$];
    int bad;
    hdr_valid = 0; hdr = '0; pl_valid = 0; pl_data = 0;
    ff_valid = 0; ff_data = 0; ft_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // register: write 4 bytes, read 8 (clipped to 4)
    send(CMD_WRITE, 0, 0, 4, '{8'hDE, 8'hAD, 8'hBE, 8'hEF});
    reply(h, d);
    check(h.cmd == CMD_WRITE_ACK && h.loc == 0 && h.size == 4, "register write ack 4");
    check(reg_q == 32'hDEADBEEF, "register holds the bytes, first byte most significant");
    send(CMD_READ, 0, 0, 8, none);
    reply(h, d);
    check(h.cmd == CMD_READ_ACK && h.size == 4 && d.size() == 4 &&
          d[0] == 8'hDE && d[1] == 8'hAD && d[2] == 8'hBE && d[3] == 8'hEF,
          "register read clipped to 4 bytes");
    send(CMD_WRITE, 0, 9, 2, '{8'h11, 8'h22});
    reply(h, d);
    check(h.size == 2 && reg_q == 32'h1122BEEF, "register is not seekable: offset ignored");

    // memory: fill 300 bytes at offset 0, then unaligned pieces
    pl = {};
    for (int k = 0; k < 300; k++) begin pl.push_back(8'($urandom)); model_mem[k] = pl[k]; end
    send(CMD_WRITE, 1, 0, 300, pl);
    reply(h, d);
    check(h.cmd == CMD_WRITE_ACK && h.loc == 1 && h.size == 300, "memory write ack 300");
    pl = {};
    for (int k = 0; k < 13; k++) begin pl.push_back(8'($urandom)); model_mem[37 + k] = pl[k]; end
    send(CMD_WRITE, 1, 37, 13, pl);
    reply(h, d);
    check(h.size == 13, "unaligned memory write ack 13");
    send(CMD_READ, 1, 5, 290, none);
    reply(h, d);
    bad = 0;
    for (int k = 0; k < 290; k++) if (d[k] != model_mem[5 + k]) bad++;
    check(h.size == 290 && d.size() == 290 && bad == 0, "memory read back, unaligned start");
    pl = {};
    for (int k = 0; k < 10; k++) begin pl.push_back(8'(k)); if (8186 + k < 8192) model_mem[8186 + k] = 8'(k); end
    send(CMD_WRITE, 1, 8186, 10, pl);
    reply(h, d);
    check(h.size == 6, "write past the end clipped to 6");
    send(CMD_READ, 1, 8184, 100, none);
    reply(h, d);
    check(h.size == 8 && d.size() == 8 && d[2] == 8'd0 && d[7] == 8'd5, "read at the end clipped to 8");
    send(CMD_READ, 1, 9000, 4, none);
    reply(h, d);
    check(h.size == 0 && d.size() == 0, "read beyond the memory returns 0");

    // FIFO from user: 3 words waiting, ask for 21 bytes -> 12
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); ff_valid = 1; ff_data = 32'h0A0B0C00 + 32'(k); words.push_back(ff_data);
    end
    @(negedge clk); ff_valid = 0;
    send(CMD_READ, 2, 0, 21, none);
    reply(h, d);
    bad = 0;
    for (int k = 0; k < 12; k++) if (d[k] != words[k / 4][8 * (3 - k % 4) +: 8]) bad++;
    check(h.size == 12 && d.size() == 12 && bad == 0, "FIFO read: whole words that were there");
    send(CMD_READ, 2, 0, 8, none);
    reply(h, d);
    check(h.size == 0, "empty FIFO read returns 0");
    send(CMD_WRITE, 2, 0, 4, '{8'h1, 8'h2, 8'h3, 8'h4});
    reply(h, d);
    check(h.cmd == CMD_WRITE_ACK && h.size == ERR_BADF, "write to read-only FIFO: -9");

    // FIFO to user: write 9 bytes -> 8 accepted
    send(CMD_WRITE, 3, 0, 9, '{8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60, 8'h70, 8'h80, 8'h90});
    reply(h, d);
    check(h.size == 8, "FIFO write: whole words only");
    @(negedge clk);
    check(ft_valid && ft_data == 32'h10203040, "user receives first word");
    ft_ready = 1; @(negedge clk); ft_ready = 0;
    check(ft_valid && ft_data == 32'h50607080, "user receives second word");
    ft_ready = 1; @(negedge clk); ft_ready = 0;
    check(!ft_valid, "nothing more");
    send(CMD_READ, 3, 0, 4, none);
    reply(h, d);
    check(h.cmd == CMD_READ_ACK && h.size == ERR_BADF && d.size() == 0, "read of write-only FIFO: -9");

    // bad LOC, GREET, and the payload of a refused write is still consumed
    send(CMD_READ, 7, 0, 4, none);
    reply(h, d);
    check(h.cmd == CMD_READ_ACK && h.loc == 7 && h.size == ERR_INVAL, "unknown LOC: -22");
    send(CMD_WRITE, 9, 0, 3, '{8'h1, 8'h2, 8'h3});
    reply(h, d);
    check(h.cmd == CMD_WRITE_ACK && h.size == ERR_INVAL, "unknown LOC write: -22, payload drained");
    send(CMD_GREET, 5, 0, 0, none);
    reply(h, d);
    check(h.cmd == CMD_GREET && h.loc == 5, "GREET answered");
    send(CMD_READ, 0, 0, 2, none);
    reply(h, d);
    check(h.size == 2 && d[0] == 8'h11 && d[1] == 8'h22, "still in step after errors");
    check(rep_hdr.size() == 0 && rep_pl.size() == 0, "no stray replies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
