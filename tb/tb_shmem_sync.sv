// tb_shmem_sync: software-side enable/ready handshake around a shared memory.
// The testbench plays software and the result stream (with gaps). It checks
// that nothing is written before enable, that a block of WORDS words lands
// at addresses 0..WORDS-1 in stream order, that ready rises only after the
// last word and the memory is then left alone, and that clearing enable
// drops ready so that the next enable writes a new block.
module tb_shmem_sync;
  localparam int WORDS = 32, AW = $clog2(WORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, ready, d_valid, m_we, filling;
  logic [31:0] d_data, m_wdata;
  logic [AW-1:0] m_addr;
  logic [31:0] mem [WORDS];
  int writes = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  shmem_sync #(.WORDS(WORDS)) dut (.clk, .rst_n, .enable, .ready, .d_valid, .d_data,
    .m_we, .m_addr, .m_wdata, .filling);

  always @(posedge clk) if (m_we) begin mem[m_addr] <= m_wdata; writes <= writes + 1; end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result stream: a counting sequence, valid about two clocks in three
  logic [31:0] next_val = 32'h5000;
  always @(negedge clk) begin
    d_valid = ($urandom % 3) != 0;
    d_data  = next_val;
  end
  always @(posedge clk) if (d_valid && rst_n) next_val <= next_val + 1;

  initial begin
    int first, bad, w0, prev_first;
    enable = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(writes == 0 && !ready, "idle: no writes, not ready");
    for (int round = 0; round < 2; round++) begin
      enable = 1;
      w0 = writes;
      @(negedge clk);
      while (!ready) begin
        @(negedge clk);
        if (writes - w0 > WORDS) break;
      end
      check(writes - w0 == WORDS, "exactly one block written before ready");
      bad = 0;
      first = int'(mem[0]);
      if (round == 1 && first <= prev_first + WORDS - 1) bad++;   // a new block
      prev_first = first;
      for (int k = 0; k < WORDS; k++) if (mem[k] != 32'(first + k)) bad++;
      check(bad == 0, "block holds consecutive stream values from address 0");
      repeat (30) @(negedge clk);
      check(writes - w0 == WORDS && ready, "memory left alone while ready");
      enable = 0;
      @(negedge clk);
      @(negedge clk);
      check(!ready, "ready drops after enable clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
