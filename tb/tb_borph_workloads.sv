// tb_borph_workloads: the benchmark workloads of BORPH run on the full-size
// design (four user FPGAs, 8192-byte shared memories, 128-byte SelectMap
// FIFOs, no parameter overridden).
//
// Like the end-to-end test, the testbench plays the kernel through SelectMap
// Control's OPB registers only. It runs three sweeps over the request size
// s = 1, 2, 4, ... 4096 bytes, the range the BORPH measurements cover:
//   1. ioreg access to on-chip memory (FPGA 3): WRITE s bytes into a shared
//      memory at an unaligned offset, READ them back, compare, and check that
//      both acknowledges report s bytes.
//   2. a software | hardware | software pipe (FPGA 0): one token of each size
//      is fed to the stdloop process, with each file READ returning at most
//      what is left of the current token, as a pipe does; the tokens must come
//      back unchanged on stdout.
//   3. a plain file copy (FPGA 1): stdloop copies a 4096-byte file to the end
//      and exits with status 0.
// For every size it prints the clocks taken, as a measure of the link; the
// times include the kernel-side polling done here and are not checked
// against the published BORPH timings, which include software overheads this
// model does not have. The sizes are the document's; the data is random.
module tb_borph_workloads;
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
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LOC_SHM1 = 4;
  localparam int NSIZES = 13;   // 1 .. 4096

  initial begin
    msg_hdr_t rh;
    logic [7:0] rpl [$], pl [$], none [$];
    logic [7:0] tok [$];
    int bad, s, off, n, tok_k, tok_left, out_goal, status;
    longint t0, t_wr, t_rd, t_tok [NSIZES];
    opb_req = '0;
    ufifo_in_valid = '0; ufifo_out_ready = '0;
    for (int f = 0; f < NU; f++) begin
      ufifo_in_data[f] = '0;
      stdin_pos[f] = 0;
      exited[f] = 1'b0;
      skip_read[f] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ---- 1. ioreg read/write of on-chip memory ------------------------------
    // FPGA 3's stdloop has an empty stdin: its READ is answered with 0 and it
    // exits while the sweep runs.
    $display("ioreg memory access, FPGA 3:   s   write clocks   read clocks");
    for (int i = 0; i < NSIZES; i++) begin
      s = 1 << i;
      off = (i * 1237) % (SHB - s + 1);
      pl = {};
      for (int k = 0; k < s; k++) pl.push_back(8'($urandom));
      t0 = cyc;
      kcall(3, CMD_WRITE, LOC_SHM1, off, s, pl, rh, rpl);
      t_wr = cyc - t0;
      check(rh.cmd == CMD_WRITE_ACK && rh.size == 32'(s), $sformatf("write of %0d bytes acknowledged", s));
      t0 = cyc;
      kcall(3, CMD_READ, LOC_SHM1, off, s, none, rh, rpl);
      t_rd = cyc - t0;
      bad = 0;
      if (rpl.size() != s) bad++;
      else foreach (pl[k]) if (rpl[k] != pl[k]) bad++;
      check(rh.cmd == CMD_READ_ACK && rh.size == 32'(s) && bad == 0,
            $sformatf("read of %0d bytes returns what was written", s));
      $display("  %5d  %8d  %8d", s, t_wr, t_rd);
    end
    check(exited[3], "stdloop on FPGA 3 exits at end of its empty stdin");

    // ---- 2. sendtok | stdloop | recvtok on FPGA 0 ---------------------------
    for (int i = 0; i < NSIZES; i++)
      for (int k = 0; k < (1 << i); k++) stdin_data[0].push_back(8'($urandom));
    tok_k = 0;
    tok_left = 1;
    out_goal = 1;
    t0 = cyc;
    while (!exited[0]) begin
      get_msg(0, rh, rpl);
      if (rh.cmd == CMD_READ) begin
        n_hw_read++;
        n = (tok_left < int'(rh.size)) ? tok_left : int'(rh.size);
        tok = {};
        for (int k = 0; k < n; k++) tok.push_back(stdin_data[0][stdin_pos[0] + k]);
        stdin_pos[0] += n;
        tok_left -= n;
        put_msg(0, '{cmd: CMD_READ_ACK, loc: rh.loc, offset: 32'd0, size: 32'(n)}, tok);
      end else if (rh.cmd == CMD_WRITE) begin
        n_hw_write++;
        check(rh.loc == 1 && rpl.size() == int'(rh.size), "pipe write goes to stdout with its bytes");
        foreach (rpl[k]) stdout_data[0].push_back(rpl[k]);
        // a token is received once all its bytes are out; the next token is
        // sent after that, as recvtok and sendtok take turns
        if (stdout_data[0].size() == out_goal && tok_k < NSIZES) begin
          t_tok[tok_k] = cyc - t0;
          tok_k++;
          if (tok_k < NSIZES) begin
            tok_left = 1 << tok_k;
            out_goal += tok_left;
          end
          t0 = cyc;
        end
      end else if (rh.cmd == CMD_EXIT) begin
        n_exit++;
        exited[0] = 1'b1;
        status = int'(rh.size);
      end else begin
        failures++;
        $display("FAIL: unexpected message %h from FPGA 0", rh.cmd);
        break;
      end
    end
    check(tok_k == NSIZES, "every token passed through the pipe");
    check(stdout_data[0] == stdin_data[0], "pipe output equals its input");
    check(status == 0, "stdloop exit status 0");
    $display("pipe through stdloop, FPGA 0:   s   clocks per token");
    for (int i = 0; i < NSIZES; i++) $display("  %5d  %8d", 1 << i, t_tok[i]);

    // ---- 3. stdloop file copy on FPGA 1 -------------------------------------
    for (int k = 0; k < 4096; k++) stdin_data[1].push_back(8'($urandom));
    t0 = cyc;
    while (!exited[1]) begin
      get_msg(1, rh, rpl);
      serve_hw(1, rh, rpl);
    end
    check(stdout_data[1] == stdin_data[1], "4096-byte file copied by stdloop");
    $display("file copy of 4096 bytes, FPGA 1: %0d clocks", cyc - t0);

    $display("file requests: read=%0d write=%0d exit=%0d", n_hw_read, n_hw_write, n_exit);
    check(n_exit == 3, "three stdloop processes exited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
