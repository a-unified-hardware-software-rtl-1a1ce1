// sync_fifo: single-clock first-in first-out buffer of DEPTH words of WIDTH
// bits, used for the SelectMap FIFOs and the user FIFO ioregs.
//
// The head word is always visible on rd_data while not empty (fall-through),
// so a pop is a one-cycle valid/ready handshake. A push when full and a pop
// when empty are ignored. count gives the fill level, free the room left.
// Storage is an array so that a tool may map it to block RAM; pointers wrap
// at DEPTH, which need not be a power of two.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 128,
  localparam int CW = $clog2(DEPTH + 1),
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count,
  output logic [CW-1:0]    free
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign free  = CW'(DEPTH) - count;
  assign push  = wr_en && !full;
  assign pop   = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end
endmodule
