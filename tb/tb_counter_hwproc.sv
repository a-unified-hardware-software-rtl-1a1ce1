// tb_counter_hwproc: checks that the counter is zero in reset, advances by
// exactly one per clock afterwards, and wraps from all-ones to zero.
module tb_counter_hwproc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  counter_hwproc dut (.clk, .rst_n, .cnt);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    repeat (3) @(negedge clk);
    check(cnt == 32'd0, "zero during reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(cnt == 32'd1, "one after first clock");
    repeat (99) @(negedge clk);
    check(cnt == 32'd100, "100 after 100 clocks");
    for (int k = 0; k < 50; k++) begin
      prev = cnt;
      @(negedge clk);
      check(cnt == prev + 32'd1, "advances by one per clock");
    end
    // wrap: force the count near the top through reset-free deposit
    dut.cnt = 32'hFFFF_FFFE;
    @(negedge clk);
    check(cnt == 32'hFFFF_FFFF, "reaches all ones");
    @(negedge clk);
    check(cnt == 32'h0000_0000, "wraps to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
