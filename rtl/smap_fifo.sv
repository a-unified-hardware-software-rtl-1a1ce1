// smap_fifo: the user-FPGA end of the SelectMap bus once the FPGA is
// configured, when the bus serves as a byte-wide message link to the kernel.
//
// Two FIFOs sit between the bus and the message logic. Bytes the control FPGA
// writes (sm_rdwr_n = 0, one per sm_strobe while sm_cs_n is low) go into the
// receive FIFO, 128 bytes as the document gives; sm_busy is raised while it is
// full and the bus master must hold off. Bytes the message transmitter
// produces go into the transmit FIFO (also 128 bytes, this design's choice);
// sm_irq is raised while it holds data, and each read strobe (sm_rdwr_n = 1)
// pops one byte, which is on sm_dout in the strobe cycle. sm_dout is zero
// when this FPGA is not selected for a read, so the shared bus can be an OR
// of all user FPGAs. While sm_cfg is high the bus carries configuration data
// and is ignored here.
//
// The pin names echo Xilinx SelectMap (CS_B, RDWR_B, BUSY); the exact
// signalling is this design's. Throughput is one byte per clock each way.
module smap_fifo #(
  parameter int RX_BYTES = 128,
  parameter int TX_BYTES = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  // SelectMap bus
  input  logic       sm_cfg,
  input  logic       sm_cs_n,
  input  logic       sm_rdwr_n,
  input  logic       sm_strobe,
  input  logic [7:0] sm_din,
  output logic [7:0] sm_dout,
  output logic       sm_busy,
  output logic       sm_irq,
  // received bytes, to the message receiver
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       rx_ready,
  // bytes to send, from the message transmitter
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready
);
  localparam int RCW = $clog2(RX_BYTES + 1);
  localparam int TCW = $clog2(TX_BYTES + 1);

  logic sel, bus_wr, bus_rd;
  logic rx_full, rx_empty, tx_full, tx_empty;
  logic [7:0] tx_head;
  logic [RCW-1:0] rx_count, rx_free;
  logic [TCW-1:0] tx_count, tx_free;

  assign sel    = !sm_cfg && !sm_cs_n;
  assign bus_wr = sel && sm_strobe && !sm_rdwr_n;
  assign bus_rd = sel && sm_strobe &&  sm_rdwr_n;

  sync_fifo #(.WIDTH(8), .DEPTH(RX_BYTES)) u_rx (
    .clk, .rst_n,
    .wr_en(bus_wr), .wr_data(sm_din),
    .rd_en(rx_ready), .rd_data(rx_data),
    .full(rx_full), .empty(rx_empty), .count(rx_count), .free(rx_free)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(TX_BYTES)) u_tx (
    .clk, .rst_n,
    .wr_en(tx_valid), .wr_data(tx_data),
    .rd_en(bus_rd), .rd_data(tx_head),
    .full(tx_full), .empty(tx_empty), .count(tx_count), .free(tx_free)
  );

  assign rx_valid = !rx_empty;
  assign tx_ready = !tx_full;
  assign sm_busy  = rx_full;
  assign sm_irq   = !tx_empty;
  assign sm_dout  = (sel && sm_rdwr_n && !tx_empty) ? tx_head : 8'h00;

  // The master must not write while busy nor read while no data waits.
  always_ff @(posedge clk) begin
    a_no_write_when_busy: assert (!(bus_wr && rx_full));
    a_no_read_when_empty: assert (!(bus_rd && tx_empty));
  end
endmodule
