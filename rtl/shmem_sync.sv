// shmem_sync: the enable/ready handshake that guards one shared memory
// between a hardware producer and software.
//
// Software sets its enable register to say it wants to read the memory.
// The hardware then writes a fresh block of WORDS result words, taken from
// the d_valid/d_data stream, into addresses 0..WORDS-1 of the memory's user
// port and raises ready, after which it leaves the memory alone so that
// software reads a stable block. When software clears enable, ready drops and
// the next enable starts a new block. ready is the hardware-written register
// of the pair. The two-register handshake is the document's; filling a whole
// block after each enable is this design's reading of "when the data in the
// shared memory is ready".
module shmem_sync #(
  parameter int WORDS = 2048,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          ready,
  input  logic          d_valid,
  input  logic [31:0]   d_data,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [31:0]   m_wdata,
  output logic          filling
);
  typedef enum logic [1:0] {S_IDLE, S_FILL, S_READY} state_e;
  state_e state;

  assign filling = (state == S_FILL);
  assign m_we    = (state == S_FILL) && d_valid;
  assign m_wdata = d_data;
  assign ready   = (state == S_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      m_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (enable) begin
          m_addr <= '0;
          state  <= S_FILL;
        end
        S_FILL: if (d_valid) begin
          m_addr <= m_addr + 1'b1;
          if (m_addr == AW'(WORDS - 1)) state <= S_READY;
        end
        S_READY: if (!enable) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
