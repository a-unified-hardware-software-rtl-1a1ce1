// tb_stdloop_hwproc: the testbench answers stdloop's file requests as the
// file client would, serving a 300-byte stdin in pieces of at most the
// requested size (sometimes fewer), and collects what is written to stdout.
// Checks that stdout equals stdin, that reads ask fd 0 for XFER_BYTES and
// writes go to fd 1 with the count just read, and that end of file leads to
// EXIT and done.
module tb_stdloop_hwproc;
  import borph_pkg::*;
  localparam int XFER = 32, NIN = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, wr_valid, wr_ready, rsp_valid, rsp_ready, rd_valid, rd_ready, done;
  cmd_e req_cmd;
  logic [23:0] req_fd;
  logic [31:0] req_size, rsp_size, nreads, nbytes;
  logic [7:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  stdloop_hwproc #(.XFER_BYTES(XFER)) dut (.clk, .rst_n, .req_valid, .req_cmd, .req_fd,
    .req_size, .req_ready, .wr_valid, .wr_data, .wr_ready, .rsp_valid, .rsp_size, .rsp_ready,
    .rd_valid, .rd_data, .rd_ready, .done, .nreads, .nbytes);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] stdin [NIN];
    logic [7:0] stdout [$];
    int pos, bad_req, nexit, n, last_n, reads;
    req_ready = 0; wr_ready = 0; rsp_valid = 0; rsp_size = 0; rd_valid = 0; rd_data = 0;
    for (int k = 0; k < NIN; k++) stdin[k] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pos = 0; bad_req = 0; nexit = 0; last_n = 0; reads = 0;
    while (nexit == 0) begin
      // wait for a request
      while (!req_valid) @(negedge clk);
      req_ready = 1;
      #1;
      if (req_cmd == CMD_READ) begin
        if (req_fd != 0 || req_size != XFER) bad_req++;
        @(negedge clk); req_ready = 0;
        n = NIN - pos;
        if (n > XFER) n = XFER;
        if (n > 5 && ($urandom % 2)) n = n - 5;   // short read
        repeat (3) @(negedge clk);
        rsp_valid = 1; rsp_size = 32'(n);
        do @(posedge clk); while (!rsp_ready);
        @(negedge clk); rsp_valid = 0;
        for (int k = 0; k < n; k++) begin
          rd_valid = 1; rd_data = stdin[pos + k];
          do @(posedge clk); while (!rd_ready);
          @(negedge clk); rd_valid = 0;
        end
        pos += n;
        last_n = n;
        if (n > 0) reads++;
      end else if (req_cmd == CMD_WRITE) begin
        if (req_fd != 1 || req_size != 32'(last_n)) bad_req++;
        @(negedge clk); req_ready = 0;
        for (int k = 0; k < last_n; k++) begin
          wr_ready = ($urandom % 2);
          do begin
            @(posedge clk);
            if (wr_valid && wr_ready) break;
            @(negedge clk);
            wr_ready = 1;
          end while (1);
          stdout.push_back(wr_data);
          @(negedge clk); wr_ready = 0;
        end
      end else begin
        if (req_cmd == CMD_EXIT && req_size == 0) nexit++;
        else bad_req++;
        @(negedge clk); req_ready = 0;
        nexit++;
      end
    end
    repeat (3) @(negedge clk);
    check(bad_req == 0, "request fields");
    check(nexit == 2, "EXIT with status 0");
    check(done, "done after exit");
    check(stdout.size() == NIN, "all bytes copied");
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < NIN && k < stdout.size(); k++) if (stdout[k] != stdin[k]) bad++;
      check(bad == 0, "stdout equals stdin");
    end
    check(nreads == 32'(reads) && nbytes == NIN, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
