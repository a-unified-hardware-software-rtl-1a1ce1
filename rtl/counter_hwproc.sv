// counter_hwproc: the free-running counter hardware process whose value
// software reads through the ioreg register "cntval".
//
// A 32-bit count advances by one every clock from reset (zero) and wraps.
// Its value goes to the hardware write port of an ioreg register each clock,
// so every software read of the register returns a fresh count. The example
// is the document's; the width follows its eight-hex-digit readings.
module counter_hwproc (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 32'd1;
  end
endmodule
