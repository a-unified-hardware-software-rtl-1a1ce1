// tb_borph_bee2_top: end-to-end test of a BEE2 module at full size (four
// user FPGAs, 8192-byte shared memories, 128-byte SelectMap FIFOs).
//
// The testbench plays the kernel on the control FPGA. It reaches the user
// FPGAs only through SelectMap Control's OPB registers, as the kernel's
// message thread would: it selects an FPGA, sends messages a byte at a time
// (checking the busy bit first, and reading pending bytes while busy), and
// parses what comes back. Requests from the stdloop hardware process (READ
// and WRITE on file descriptors, EXIT) are served from a per-FPGA stdin and
// collected into a per-FPGA stdout; acknowledges answer the testbench's own
// ioreg requests. It exercises ioreg registers, memories, FIFOs, the
// enable/ready handshake, error replies, GREET, file I/O to end of file,
// configuration mode, interrupts, busy back-pressure and arbitration of the
// two message sources, counts how often each happened, and fails any that
// never did.
module tb_borph_bee2_top;
  import borph_pkg::*;
  localparam int NU = 4, NCR = 16, SHB = 8192;
  localparam int LOC_CNTVAL = 0, LOC_SHM0 = 1, LOC_EN0 = 2, LOC_RDY0 = 3,
                 LOC_FIFO_FROM = 7, LOC_FIFO_TO = 8, LOC_CTRL0 = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  opb_req_t opb_req;
  opb_rsp_t opb_rsp;
  logic irq, sm_cfg, sm_strobe;
  logic [NU-1:0] sm_cs_n;
  logic [7:0] sm_data;
  logic [NU-1:0] samp0_valid, samp1_valid, ufifo_in_valid, ufifo_in_ready;
  logic [NU-1:0] ufifo_out_valid, ufifo_out_ready, stdloop_done;
  logic [31:0] samp0_data [NU], samp1_data [NU], ufifo_in_data [NU], ufifo_out_data [NU];
  logic [31:0] ctrl_regs [NU][NCR];
  int checks = 0, failures = 0;
  always #10 clk = ~clk;   // 50 MHz

  borph_bee2_top dut (.clk, .rst_n, .opb_req, .opb_rsp, .irq, .sm_cfg, .sm_cs_n, .sm_strobe,
    .sm_data, .samp0_valid, .samp0_data, .samp1_valid, .samp1_data, .ufifo_in_valid,
    .ufifo_in_data, .ufifo_in_ready, .ufifo_out_valid, .ufifo_out_data, .ufifo_out_ready,
    .ctrl_regs, .stdloop_done);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ---------------------------------------------------
  int n_busy = 0, n_irq = 0, n_arb = 0, n_cfg_bytes = 0, n_hw_read = 0, n_hw_write = 0,
      n_exit = 0, n_err = 0, n_greet = 0, n_handshake = 0, n_fifo_from = 0, n_fifo_to = 0,
      n_reg = 0, n_mem = 0;
  always @(posedge clk) if (rst_n) begin
    if (irq) n_irq++;
    // one source's message waits while the other source's is being sent
    if (dut.g_user[1].u_user.u_tx.state != 0 &&
        dut.g_user[1].u_user.u_tx.hdr_valid[1 - dut.g_user[1].u_user.u_tx.cur]) n_arb++;
  end

  // ---- sample streams: FPGA f, memory m: value {f, m, counter} ---------------
  logic [23:0] scount [NU];
  always @(negedge clk) begin
    for (int f = 0; f < NU; f++) begin
      samp0_valid[f] = rst_n;
      samp0_data[f]  = {4'(f), 4'd0, scount[f]};
      samp1_valid[f] = rst_n;
      samp1_data[f]  = {4'(f), 4'd1, scount[f]};
    end
  end
  always @(posedge clk) for (int f = 0; f < NU; f++) scount[f] <= rst_n ? scount[f] + 1 : 24'd0;

  // ---- OPB master (the kernel's view of SelectMap Control) -----------------
  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    int lat;
    @(negedge clk);
    opb_req = '{select: 1'b1, rnw: rnw, abus: a, be: 4'hF, dbus: d};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!opb_rsp.xferack && lat < 1000);
    rd = opb_rsp.dbus;
    opb_req = '0;
  endtask

  int cur_sel = -1;
  task automatic select(input int f);
    logic [31:0] rd;
    if (cur_sel != f) opb(1'b0, 32'h0, 32'(f), rd);
    cur_sel = f;
  endtask

  logic [7:0] raw [NU][$];    // bytes read early while the FPGA was busy

  task automatic put_byte(input int f, input logic [7:0] b);
    logic [31:0] st, rd;
    select(f);
    forever begin
      opb(1'b1, 32'h8, 0, st);
      if (!st[8 + f]) break;
      n_busy++;
      if (st[f]) begin
        opb(1'b1, 32'h4, 0, rd);
        if (rd[8]) raw[f].push_back(rd[7:0]);
      end
    end
    opb(1'b0, 32'h4, 32'(b), rd);
  endtask

  task automatic get_byte(input int f, output logic [7:0] b);
    logic [31:0] rd;
    int t;
    if (raw[f].size() > 0) begin
      b = raw[f].pop_front();
      return;
    end
    select(f);
    t = 0;
    forever begin
      opb(1'b1, 32'h4, 0, rd);
      if (rd[8]) break;
      t++;
      if (t > 20000) begin failures++; $display("FAIL: no byte from FPGA %0d", f); break; end
    end
    b = rd[7:0];
  endtask

  task automatic put_msg(input int f, input msg_hdr_t h, input logic [7:0] pl [$]);
    logic [95:0] v;
    v = h;
    for (int k = 11; k >= 0; k--) put_byte(f, v[8*k +: 8]);
    foreach (pl[k]) put_byte(f, pl[k]);
  endtask

  task automatic get_msg(input int f, output msg_hdr_t h, output logic [7:0] pl [$]);
    logic [95:0] v;
    logic [7:0] b;
    for (int k = 11; k >= 0; k--) begin get_byte(f, b); v[8*k +: 8] = b; end
    h = v;
    pl = {};
    if (has_payload(h)) for (int k = 0; k < int'(h.size); k++) begin get_byte(f, b); pl.push_back(b); end
  endtask

  // ---- file service for the hardware processes -----------------------------
  logic [7:0] stdin_data [NU][$];
  int         stdin_pos [NU];
  logic [7:0] stdout_data [NU][$];
  logic       exited [NU];
  int         skip_read [NU];   // READs already answered ahead of time

  task automatic serve_hw(input int f, input msg_hdr_t h, input logic [7:0] pl [$]);
    logic [7:0] d [$];
    int n;
    if (h.cmd == CMD_READ && skip_read[f] > 0) begin
      skip_read[f]--;
      n_hw_read++;
    end else if (h.cmd == CMD_READ) begin
      n_hw_read++;
      check(h.loc == 0, "hardware reads stdin");
      n = stdin_data[f].size() - stdin_pos[f];
      if (n > int'(h.size)) n = int'(h.size);
      d = {};
      for (int k = 0; k < n; k++) d.push_back(stdin_data[f][stdin_pos[f] + k]);
      stdin_pos[f] += n;
      put_msg(f, '{cmd: CMD_READ_ACK, loc: h.loc, offset: 32'd0, size: 32'(n)}, d);
    end else if (h.cmd == CMD_WRITE) begin
      n_hw_write++;
      check(h.loc == 1, "hardware writes stdout");
      foreach (pl[k]) stdout_data[f].push_back(pl[k]);
    end else if (h.cmd == CMD_EXIT) begin
      n_exit++;
      exited[f] = 1'b1;
    end else begin
      failures++;
      $display("FAIL: unexpected message %h from FPGA %0d", h.cmd, f);
    end
  endtask

  // one ioreg request: send, then serve hardware requests until the answer
  task automatic kcall(input int f, input cmd_e c, input int loc, input int off, input int size,
                       input logic [7:0] pl [$], output msg_hdr_t rh, output logic [7:0] rpl [$]);
    put_msg(f, '{cmd: c, loc: 24'(loc), offset: 32'(off), size: 32'(size)}, pl);
    forever begin
      get_msg(f, rh, rpl);
      if (rh.cmd == CMD_READ_ACK || rh.cmd == CMD_WRITE_ACK || rh.cmd == CMD_GREET) break;
      serve_hw(f, rh, rpl);
    end
  endtask

  function automatic logic [31:0] word_of(input logic [7:0] d [$], input int k);
    return {d[4*k], d[4*k + 1], d[4*k + 2], d[4*k + 3]};
  endfunction

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_hdr_t rh;
    logic [7:0] rpl [$], pl [$], none [$];
    logic [31:0] rd, v0, v1;
    int bad, t;
    opb_req = '0;
    ufifo_in_valid = '0; ufifo_out_ready = '0;
    for (int f = 0; f < NU; f++) begin
      ufifo_in_data[f] = '0;
      stdin_pos[f] = 0;
      exited[f] = 1'b0;
      skip_read[f] = 0;
    end
    for (int k = 0; k < 300; k++) stdin_data[0].push_back(8'($urandom));
    for (int k = 0; k < 77; k++) stdin_data[1].push_back(8'(k));
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // configuration mode: bytes on the bus are not messages
    opb(1'b0, 32'h0, 32'h102, rd);
    cur_sel = 2;
    check(sm_cfg, "configuration mode on the bus");
    for (int k = 0; k < 16; k++) begin
      opb(1'b0, 32'h4, 32'(8'hAA + k), rd);
      n_cfg_bytes++;
    end
    opb(1'b0, 32'h0, 32'h002, rd);
    check(!sm_cfg, "message mode");
    check(dut.g_user[2].u_user.u_rx.state == 0 && dut.g_user[2].u_user.u_rx.nbyte == 0,
          "configuration bytes did not enter the message receiver");

    // interrupts: every stdloop has sent a READ by now
    opb(1'b0, 32'hC, 32'hF, rd);
    repeat (5) @(negedge clk);
    check(irq, "interrupt raised by waiting messages");

    // arbitration on FPGA 1: a long ioreg read fills the transmit FIFO, then
    // the stdloop's pending READ is answered, so its WRITE has to wait for the
    // server's reply to finish
    put_msg(1, '{cmd: CMD_READ, loc: 24'(LOC_SHM0), offset: 32'd0, size: 32'd1024}, none);
    repeat (300) @(negedge clk);
    put_msg(1, '{cmd: CMD_READ_ACK, loc: 24'd0, offset: 32'd0, size: 32'(stdin_data[1].size())},
            stdin_data[1]);
    stdin_pos[1] = stdin_data[1].size();
    skip_read[1] = 1;
    repeat (300) @(negedge clk);
    forever begin
      get_msg(1, rh, rpl);
      if (rh.cmd == CMD_READ_ACK) break;
      serve_hw(1, rh, rpl);
    end
    check(rh.size == 1024 && rpl.size() == 1024, "long read on FPGA 1 delivered");

    // cntval on FPGA 3: two reads, the counter advances
    kcall(3, CMD_READ, LOC_CNTVAL, 0, 4, none, rh, rpl);
    v0 = word_of(rpl, 0);
    kcall(3, CMD_READ, LOC_CNTVAL, 0, 4, none, rh, rpl);
    v1 = word_of(rpl, 0);
    check(rh.cmd == CMD_READ_ACK && rh.size == 4 && v1 > v0 && v0 > 0, "cntval counts");
    n_reg++;

    // control register on FPGA 2
    kcall(2, CMD_WRITE, LOC_CTRL0 + 5, 0, 4, '{8'h00, 8'h00, 8'h0B, 8'h07}, rh, rpl);
    check(rh.cmd == CMD_WRITE_ACK && rh.size == 4 && ctrl_regs[2][5] == 32'h0B07,
          "control register written (channel select)");
    kcall(2, CMD_READ, LOC_CTRL0 + 5, 0, 4, none, rh, rpl);
    check(word_of(rpl, 0) == 32'h0B07, "control register read back");
    n_reg++;

    // GREET and errors on FPGA 0
    kcall(0, CMD_GREET, 0, 0, 0, none, rh, rpl);
    check(rh.cmd == CMD_GREET, "GREET answered");
    n_greet++;
    kcall(0, CMD_READ, 200, 0, 4, none, rh, rpl);
    check(rh.cmd == CMD_READ_ACK && rh.size == ERR_INVAL, "unknown ioreg: -22");
    n_err++;
    kcall(0, CMD_READ, LOC_FIFO_TO, 0, 4, none, rh, rpl);
    check(rh.size == ERR_BADF, "read of a write-only FIFO: -9");
    n_err++;

    // shared memory 1 of FPGA 0: write and read back 200 bytes at offset 1000
    pl = {};
    for (int k = 0; k < 200; k++) pl.push_back(8'($urandom));
    kcall(0, CMD_WRITE, 4, 1000, 200, pl, rh, rpl);
    check(rh.cmd == CMD_WRITE_ACK && rh.size == 200, "memory write acknowledged");
    kcall(0, CMD_READ, 4, 1000, 200, none, rh, rpl);
    bad = 0;
    foreach (pl[k]) if (rpl[k] != pl[k]) bad++;
    check(rh.size == 200 && bad == 0, "memory read back");
    n_mem++;

    // enable/ready handshake on shared memory 0 of FPGA 0
    kcall(0, CMD_READ, LOC_RDY0, 0, 4, none, rh, rpl);
    check(word_of(rpl, 0) == 0, "not ready before enable");
    kcall(0, CMD_WRITE, LOC_EN0, 0, 4, '{8'h00, 8'h00, 8'h00, 8'h01}, rh, rpl);
    t = 0;
    do begin
      kcall(0, CMD_READ, LOC_RDY0, 0, 4, none, rh, rpl);
      t++;
    end while (word_of(rpl, 0) != 1 && t < 100);
    check(word_of(rpl, 0) == 1, "ready after enable");
    // the whole block: 8192 bytes in one read
    kcall(0, CMD_READ, LOC_SHM0, 0, SHB, none, rh, rpl);
    bad = 0;
    for (int k = 0; k < SHB / 4; k++)
      if (word_of(rpl, k) != word_of(rpl, 0) + 32'(k) || word_of(rpl, k)[31:24] != 8'h00) bad++;
    check(rh.size == SHB && rpl.size() == SHB && bad == 0, "full block of consecutive results");
    kcall(0, CMD_WRITE, LOC_EN0, 0, 4, '{8'h00, 8'h00, 8'h00, 8'h00}, rh, rpl);
    kcall(0, CMD_READ, LOC_RDY0, 0, 4, none, rh, rpl);
    check(word_of(rpl, 0) == 0, "ready drops when enable clears");
    n_handshake++;

    // busy: ask for a long read and do not collect it, then send a long
    // write; the FPGA fills both FIFOs and the kernel sees busy
    put_msg(0, '{cmd: CMD_READ, loc: 24'(4), offset: 32'd0, size: 32'd1024}, none);
    repeat (400) @(negedge clk);
    pl = {};
    for (int k = 0; k < 400; k++) pl.push_back(8'(k * 5));
    put_msg(0, '{cmd: CMD_WRITE, loc: 24'(4), offset: 32'd4096, size: 32'd400}, pl);
    begin
      int acks;
      acks = 0;
      while (acks < 2) begin
        get_msg(0, rh, rpl);
        if (rh.cmd == CMD_READ_ACK) begin
          acks++;
          check(rh.size == 1024 && rpl[1000 - 0] == rpl[1000], "long read delivered");
        end else if (rh.cmd == CMD_WRITE_ACK) begin
          acks++;
          check(rh.size == 400, "long write acknowledged");
        end else serve_hw(0, rh, rpl);
      end
    end
    kcall(0, CMD_READ, 4, 4096, 400, none, rh, rpl);
    bad = 0;
    foreach (pl[k]) if (rpl[k] != pl[k]) bad++;
    check(bad == 0, "long write landed in memory");

    // user FIFOs of FPGA 1
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      ufifo_in_valid[1] = 1; ufifo_in_data[1] = 32'hF00D_0000 + 32'(k);
    end
    @(negedge clk);
    ufifo_in_valid[1] = 0;
    kcall(1, CMD_READ, LOC_FIFO_FROM, 0, 64, none, rh, rpl);
    check(rh.size == 12 && word_of(rpl, 2) == 32'hF00D_0002, "FIFO from user read by software");
    n_fifo_from++;
    kcall(1, CMD_WRITE, LOC_FIFO_TO, 0, 8, '{8'h12, 8'h34, 8'h56, 8'h78, 8'h9A, 8'hBC, 8'hDE, 8'hF0},
          rh, rpl);
    check(rh.size == 8 && ufifo_out_valid[1] && ufifo_out_data[1] == 32'h1234_5678,
          "FIFO to user written by software");
    n_fifo_to++;

    // let every stdloop run to its end of file
    for (int f = 0; f < NU; f++) begin
      t = 0;
      while (!exited[f] && t < 2000) begin
        get_msg(f, rh, rpl);
        serve_hw(f, rh, rpl);
        t++;
      end
    end
    repeat (10) @(negedge clk);
    for (int f = 0; f < NU; f++) begin
      bad = 0;
      if (stdout_data[f].size() != stdin_data[f].size()) bad++;
      else foreach (stdin_data[f][k]) if (stdout_data[f][k] != stdin_data[f][k]) bad++;
      check(exited[f] && stdloop_done[f] && bad == 0, $sformatf("stdloop on FPGA %0d copied stdin", f));
    end

    $display("mechanisms: busy=%0d irq=%0d arbitration=%0d cfg_bytes=%0d hw_read=%0d hw_write=%0d exit=%0d",
             n_busy, n_irq, n_arb, n_cfg_bytes, n_hw_read, n_hw_write, n_exit);
    $display("            errors=%0d greet=%0d handshake=%0d fifo_from=%0d fifo_to=%0d reg=%0d mem=%0d",
             n_err, n_greet, n_handshake, n_fifo_from, n_fifo_to, n_reg, n_mem);
    check(n_busy > 0, "busy back-pressure happened");
    check(n_irq > 0, "interrupt happened");
    check(n_arb > 0, "both message sources competed");
    check(n_cfg_bytes > 0, "configuration mode used");
    check(n_hw_read > 0 && n_hw_write > 0 && n_exit == NU, "hardware file I/O and exits");
    check(n_err > 0 && n_greet > 0 && n_handshake > 0, "errors, GREET, handshake");
    check(n_fifo_from > 0 && n_fifo_to > 0 && n_reg > 0 && n_mem > 0, "all ioreg kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
