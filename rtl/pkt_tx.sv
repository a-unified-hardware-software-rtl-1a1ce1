// pkt_tx: message transmitter of the user-FPGA message network.
//
// NSRC packet sources (here the ioreg server and the hardware-process file
// client) each offer a header with hdr_valid and, when the header says so, a
// payload of SIZE bytes on their pl_* stream. The transmitter picks one
// source round-robin, sends its 12 header bytes most significant first, then
// copies exactly SIZE payload bytes from that source, and only then picks
// again, so messages never interleave. One byte leaves per clock when the
// output is ready. The document fixes the header format; the arbitration is
// this design's.
module pkt_tx
  import borph_pkg::*;
#(
  parameter int NSRC = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] hdr_valid,
  input  msg_hdr_t        hdr [NSRC],
  output logic [NSRC-1:0] hdr_ready,
  input  logic [NSRC-1:0] pl_valid,
  input  logic [7:0]      pl_data [NSRC],
  output logic [NSRC-1:0] pl_ready,
  output logic            out_valid,
  output logic [7:0]      out_data,
  input  logic            out_ready
);
  localparam int SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAYLOAD} state_e;
  state_e state;
  logic [SW-1:0] cur, last_grant, pick;
  logic          any;
  logic [95:0]   shreg;
  logic [3:0]    nbyte;
  logic [31:0]   remain;

  // Round-robin choice: first valid source after the last one granted.
  always_comb begin
    pick = last_grant;
    any  = 1'b0;
    for (int k = 1; k <= NSRC; k++) begin
      if (!any && hdr_valid[(int'(last_grant) + k) % NSRC]) begin
        any  = 1'b1;
        pick = SW'((int'(last_grant) + k) % NSRC);
      end
    end
  end

  always_comb begin
    hdr_ready = '0;
    pl_ready  = '0;
    if (state == S_IDLE && any) hdr_ready[pick] = 1'b1;
    if (state == S_PAYLOAD)     pl_ready[cur]   = out_ready;
  end

  assign out_valid = (state == S_HDR) || (state == S_PAYLOAD && pl_valid[cur]);
  assign out_data  = (state == S_HDR) ? shreg[95:88] : pl_data[cur];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      last_grant <= SW'(NSRC - 1);
      shreg      <= '0;
      nbyte      <= '0;
      remain     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any) begin
          cur        <= pick;
          last_grant <= pick;
          shreg      <= hdr[pick];
          remain     <= has_payload(hdr[pick]) ? hdr[pick].size : 32'd0;
          nbyte      <= '0;
          state      <= S_HDR;
        end
        S_HDR: if (out_ready) begin
          shreg <= {shreg[87:0], 8'h00};
          if (nbyte == 4'(HDR_BYTES - 1)) begin
            state <= (remain != 32'd0) ? S_PAYLOAD : S_IDLE;
          end else begin
            nbyte <= nbyte + 1'b1;
          end
        end
        S_PAYLOAD: if (out_ready && pl_valid[cur]) begin
          remain <= remain - 1'b1;
          if (remain == 32'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
