// tb_user_fpga: one user FPGA driven straight from its SelectMap bus pins.
// The testbench plays the control FPGA and the kernel: it writes message
// bytes when busy is low (reading pending bytes while it is high), reads
// bytes when the interrupt line shows data, and parses messages. Covers
// cntval, a control register, GREET, error replies, a shared memory, the
// enable/ready handshake, both user FIFOs, busy back-pressure, configuration
// mode being ignored, and the stdloop process copying stdin to stdout. The
// bus transfers one byte per clock, so it also checks that a header of 12
// bytes goes in in 12 clocks.
module tb_user_fpga;
  import borph_pkg::*;
  localparam int NCR = 16, SHB = 8192;
  localparam int LOC_CNTVAL = 0, LOC_SHM0 = 1, LOC_EN0 = 2, LOC_RDY0 = 3, LOC_SHM1 = 4,
                 LOC_FIFO_FROM = 7, LOC_FIFO_TO = 8, LOC_CTRL0 = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sm_cfg, sm_cs_n, sm_rdwr_n, sm_strobe, sm_busy, sm_irq;
  logic [7:0] sm_din, sm_dout;
  logic samp0_valid, samp1_valid, ufifo_in_valid, ufifo_in_ready, ufifo_out_valid, ufifo_out_ready;
  logic [31:0] samp0_data, samp1_data, ufifo_in_data, ufifo_out_data;
  logic [31:0] ctrl_regs [NCR];
  logic stdloop_done;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  user_fpga dut (.clk, .rst_n, .sm_cfg, .sm_cs_n, .sm_rdwr_n, .sm_strobe, .sm_din, .sm_dout,
    .sm_busy, .sm_irq, .samp0_valid, .samp0_data, .samp1_valid, .samp1_data, .ufifo_in_valid,
    .ufifo_in_data, .ufifo_in_ready, .ufifo_out_valid, .ufifo_out_data, .ufifo_out_ready,
    .ctrl_regs, .stdloop_done);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [23:0] scount;
  always @(negedge clk) begin
    samp0_valid = rst_n; samp0_data = {8'h00, scount};
    samp1_valid = rst_n; samp1_data = {8'h01, scount};
  end
  always @(posedge clk) scount <= rst_n ? scount + 1 : 24'd0;

  int n_busy = 0;
  logic [7:0] raw [$];

  task automatic bus_read(output logic [7:0] b);
    sm_cs_n = 0; sm_rdwr_n = 1; sm_strobe = 1;
    #1 b = sm_dout;
    @(negedge clk);
    sm_strobe = 0; sm_cs_n = 1;
  endtask

  task automatic put_byte(input logic [7:0] b);
    logic [7:0] r;
    while (sm_busy) begin
      n_busy++;
      if (sm_irq) begin bus_read(r); raw.push_back(r); end
      else @(negedge clk);
    end
    sm_cs_n = 0; sm_rdwr_n = 0; sm_strobe = 1; sm_din = b;
    @(negedge clk);
    sm_strobe = 0; sm_cs_n = 1;
  endtask

  task automatic get_byte(output logic [7:0] b);
    int t;
    if (raw.size() > 0) begin b = raw.pop_front(); return; end
    t = 0;
    while (!sm_irq && t < 100000) begin @(negedge clk); t++; end
    if (!sm_irq) begin failures++; $display("FAIL: no reply byte"); end
    bus_read(b);
  endtask

  task automatic put_msg(input msg_hdr_t h, input logic [7:0] pl [$]);
    logic [95:0] v;
    v = h;
    for (int k = 11; k >= 0; k--) put_byte(v[8*k +: 8]);
    foreach (pl[k]) put_byte(pl[k]);
  endtask

  task automatic get_msg(output msg_hdr_t h, output logic [7:0] pl [$]);
    logic [95:0] v;
    logic [7:0] b;
    for (int k = 11; k >= 0; k--) begin get_byte(b); v[8*k +: 8] = b; end
    h = v;
    pl = {};
    if (has_payload(h)) for (int k = 0; k < int'(h.size); k++) begin get_byte(b); pl.push_back(b); end
  endtask

  logic [7:0] stdin_data [$], stdout_data [$];
  int stdin_pos = 0, n_exit = 0;

  task automatic serve_hw(input msg_hdr_t h, input logic [7:0] pl [$]);
    logic [7:0] d [$];
    int n;
    if (h.cmd == CMD_READ) begin
      n = stdin_data.size() - stdin_pos;
      if (n > int'(h.size)) n = int'(h.size);
      d = {};
      for (int k = 0; k < n; k++) d.push_back(stdin_data[stdin_pos + k]);
      stdin_pos += n;
      put_msg('{cmd: CMD_READ_ACK, loc: h.loc, offset: 32'd0, size: 32'(n)}, d);
    end else if (h.cmd == CMD_WRITE) begin
      foreach (pl[k]) stdout_data.push_back(pl[k]);
    end else if (h.cmd == CMD_EXIT) begin
      n_exit++;
    end else begin
      failures++;
      $display("FAIL: unexpected message %h", h.cmd);
    end
  endtask

  task automatic kcall(input cmd_e c, input int loc, input int off, input int size,
                       input logic [7:0] pl [$], output msg_hdr_t rh, output logic [7:0] rpl [$]);
    put_msg('{cmd: c, loc: 24'(loc), offset: 32'(off), size: 32'(size)}, pl);
    forever begin
      get_msg(rh, rpl);
      if (rh.cmd == CMD_READ_ACK || rh.cmd == CMD_WRITE_ACK || rh.cmd == CMD_GREET) break;
      serve_hw(rh, rpl);
    end
  endtask

  function automatic logic [31:0] word_of(input logic [7:0] d [$], input int k);
    return {d[4*k], d[4*k + 1], d[4*k + 2], d[4*k + 3]};
  endfunction

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_hdr_t rh;
    logic [7:0] rpl [$], pl [$], none [$];
    logic [31:0] v0, v1;
    int bad, t, c0;
    sm_cfg = 0; sm_cs_n = 1; sm_rdwr_n = 0; sm_strobe = 0; sm_din = 0;
    ufifo_in_valid = 0; ufifo_in_data = 0; ufifo_out_ready = 0;
    for (int k = 0; k < 200; k++) stdin_data.push_back(8'($urandom));
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // configuration-mode bytes are ignored
    sm_cfg = 1;
    for (int k = 0; k < 20; k++) put_byte(8'h99);
    sm_cfg = 0;
    check(dut.u_rx.nbyte == 0 && dut.u_rx.state == 0, "configuration bytes ignored");

    // a header enters in 12 clocks, one byte per clock
    c0 = int'(scount);
    put_msg('{cmd: CMD_READ, loc: 24'(LOC_CNTVAL), offset: 32'd0, size: 32'd4}, none);
    check(int'(scount) - c0 == 12, "12 header bytes in 12 clocks");
    forever begin
      get_msg(rh, rpl);
      if (rh.cmd == CMD_READ_ACK) break;
      serve_hw(rh, rpl);
    end
    v0 = word_of(rpl, 0);
    kcall(CMD_READ, LOC_CNTVAL, 0, 4, none, rh, rpl);
    v1 = word_of(rpl, 0);
    check(rh.size == 4 && v1 > v0 && v0 > 0, "cntval counts");

    kcall(CMD_WRITE, LOC_CTRL0 + 15, 0, 4, '{8'hAB, 8'hCD, 8'hEF, 8'h01}, rh, rpl);
    check(rh.cmd == CMD_WRITE_ACK && rh.size == 4 && ctrl_regs[15] == 32'hABCDEF01, "last control register");
    kcall(CMD_GREET, 3, 0, 0, none, rh, rpl);
    check(rh.cmd == CMD_GREET && rh.loc == 3, "GREET");
    kcall(CMD_WRITE, LOC_FIFO_FROM, 0, 4, '{8'h1, 8'h2, 8'h3, 8'h4}, rh, rpl);
    check(rh.cmd == CMD_WRITE_ACK && rh.size == ERR_BADF, "write to read-only FIFO: -9");
    kcall(CMD_WRITE, 25, 0, 2, '{8'h1, 8'h2}, rh, rpl);
    check(rh.size == ERR_INVAL, "no ioreg 25: -22");

    // memory
    pl = {};
    for (int k = 0; k < 64; k++) pl.push_back(8'(k * 3 + 1));
    kcall(CMD_WRITE, LOC_SHM1, 8160, 64, pl, rh, rpl);
    check(rh.size == 32, "write clipped at the end of the memory");
    kcall(CMD_READ, LOC_SHM1, 8160, 64, none, rh, rpl);
    bad = 0;
    for (int k = 0; k < 32; k++) if (rpl[k] != pl[k]) bad++;
    check(rh.size == 32 && bad == 0, "memory read back");

    // enable/ready handshake, then the whole block
    kcall(CMD_WRITE, LOC_EN0, 0, 4, '{8'h0, 8'h0, 8'h0, 8'h1}, rh, rpl);
    t = 0;
    do begin kcall(CMD_READ, LOC_RDY0, 0, 4, none, rh, rpl); t++; end
    while (word_of(rpl, 0) != 1 && t < 100);
    check(word_of(rpl, 0) == 1, "ready after enable");
    kcall(CMD_READ, LOC_SHM0, 0, SHB, none, rh, rpl);
    bad = 0;
    for (int k = 0; k < SHB / 4; k++) if (word_of(rpl, k) != word_of(rpl, 0) + 32'(k)) bad++;
    check(rh.size == SHB && bad == 0, "block of consecutive results");
    kcall(CMD_WRITE, LOC_EN0, 0, 4, '{8'h0, 8'h0, 8'h0, 8'h0}, rh, rpl);
    kcall(CMD_READ, LOC_RDY0, 0, 4, none, rh, rpl);
    check(word_of(rpl, 0) == 0, "ready cleared");

    // busy: an uncollected long read, then a long write
    put_msg('{cmd: CMD_READ, loc: 24'(LOC_SHM1), offset: 32'd0, size: 32'd2048}, none);
    repeat (300) @(negedge clk);
    pl = {};
    for (int k = 0; k < 300; k++) pl.push_back(8'($urandom));
    put_msg('{cmd: CMD_WRITE, loc: 24'(LOC_SHM1), offset: 32'd0, size: 32'd300}, pl);
    t = 0;
    while (t < 2) begin
      get_msg(rh, rpl);
      if (rh.cmd == CMD_READ_ACK || rh.cmd == CMD_WRITE_ACK) t++;
      else serve_hw(rh, rpl);
    end
    check(n_busy > 0, "busy back-pressure seen");
    kcall(CMD_READ, LOC_SHM1, 0, 300, none, rh, rpl);
    bad = 0;
    foreach (pl[k]) if (rpl[k] != pl[k]) bad++;
    check(bad == 0, "write sent under back-pressure landed intact");

    // user FIFOs
    @(negedge clk); ufifo_in_valid = 1; ufifo_in_data = 32'h600D_CAFE;
    @(negedge clk); ufifo_in_valid = 0;
    kcall(CMD_READ, LOC_FIFO_FROM, 0, 8, none, rh, rpl);
    check(rh.size == 4 && word_of(rpl, 0) == 32'h600D_CAFE, "FIFO from user");
    kcall(CMD_WRITE, LOC_FIFO_TO, 0, 4, '{8'hFE, 8'hED, 8'hBE, 8'hEF}, rh, rpl);
    check(rh.size == 4 && ufifo_out_valid && ufifo_out_data == 32'hFEEDBEEF, "FIFO to user");

    // stdloop to the end
    t = 0;
    while (n_exit == 0 && t < 1000) begin get_msg(rh, rpl); serve_hw(rh, rpl); t++; end
    repeat (5) @(negedge clk);
    bad = (stdout_data.size() != stdin_data.size());
    if (!bad) foreach (stdin_data[k]) if (stdout_data[k] != stdin_data[k]) bad++;
    check(n_exit == 1 && stdloop_done && bad == 0, "stdloop copied stdin to stdout and exited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
