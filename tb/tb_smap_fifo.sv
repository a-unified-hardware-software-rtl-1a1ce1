// tb_smap_fifo: plays the control FPGA on the SelectMap bus. Writes bytes
// until busy rises (after exactly 128), checks they reach the receive side in
// order at one byte per clock, then queues bytes from the transmit side and
// reads them back over the bus while checking the interrupt line, the zero
// read data when not selected, and that configuration mode is ignored.
module tb_smap_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sm_cfg, sm_cs_n, sm_rdwr_n, sm_strobe, sm_busy, sm_irq;
  logic [7:0] sm_din, sm_dout;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  smap_fifo dut (.clk, .rst_n, .sm_cfg, .sm_cs_n, .sm_rdwr_n, .sm_strobe, .sm_din, .sm_dout,
    .sm_busy, .sm_irq, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q[$];
    int n, bad, cyc;
    sm_cfg = 0; sm_cs_n = 1; sm_rdwr_n = 0; sm_strobe = 0; sm_din = 0;
    rx_ready = 0; tx_valid = 0; tx_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!sm_busy && !sm_irq && !rx_valid, "idle after reset");
    // configuration-mode bytes are not for the message link
    sm_cfg = 1; sm_cs_n = 0; sm_strobe = 1; sm_din = 8'h77;
    repeat (5) @(negedge clk);
    sm_cfg = 0; sm_strobe = 0; sm_cs_n = 1;
    check(!rx_valid, "configuration bytes ignored");
    // fill the receive FIFO
    n = 0;
    sm_cs_n = 0; sm_rdwr_n = 0;
    while (!sm_busy && n < 200) begin
      sm_strobe = 1; sm_din = 8'(n * 3 + 1); q.push_back(sm_din);
      @(negedge clk);
      n++;
    end
    sm_strobe = 0; sm_cs_n = 1;
    check(n == 128, "busy after exactly 128 bytes");
    // drain at full rate
    bad = 0; cyc = 0;
    rx_ready = 1;
    while (q.size() > 0 && cyc < 400) begin
      if (rx_valid) begin if (rx_data != q.pop_front()) bad++; end
      @(negedge clk);
      cyc++;
    end
    rx_ready = 0;
    check(bad == 0, "received bytes in order");
    check(cyc == 128, "one byte per clock");
    check(!sm_busy, "busy clears when drained");
    // transmit side
    for (int k = 0; k < 10; k++) begin
      tx_valid = 1; tx_data = 8'hA0 + 8'(k); q.push_back(tx_data);
      @(negedge clk);
    end
    tx_valid = 0;
    check(sm_irq, "interrupt while data waits");
    sm_rdwr_n = 1; sm_cs_n = 1;
    @(negedge clk);
    check(sm_dout == 8'h00, "zero read data when not selected");
    bad = 0;
    sm_cs_n = 0;
    for (int k = 0; k < 10; k++) begin
      sm_strobe = 1;
      #1;
      if (sm_dout != q.pop_front()) bad++;
      @(negedge clk);
    end
    sm_strobe = 0; sm_cs_n = 1;
    check(bad == 0, "bus reads return the transmit bytes in order");
    check(!sm_irq, "interrupt clears when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
