// pkt_rx: message receiver of the user-FPGA message network.
//
// It shifts the first 12 bytes of each message into a header register (CMD,
// LOC, OFFSET, SIZE, most significant byte first) and offers it on hdr with
// hdr_valid until a consumer takes it with hdr_ready. If the header says a
// payload follows (WRITE, or READ_ACK with a positive SIZE) the next SIZE
// bytes are passed through on the pl_* stream, with pl_last on the final
// byte and pl_cmd naming the message they belong to, so that a router can
// steer them. Then the next header is collected. The bytes of a payload pass
// straight through, one per clock; collecting a header takes 12 clocks.
module pkt_rx
  import borph_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       hdr_valid,
  output msg_hdr_t   hdr,
  input  logic       hdr_ready,
  output logic       pl_valid,
  output logic [7:0] pl_data,
  output logic       pl_last,
  output cmd_e       pl_cmd,
  input  logic       pl_ready
);
  typedef enum logic [1:0] {S_HDR, S_OFFER, S_PAYLOAD} state_e;
  state_e state;
  logic [3:0]  nbyte;
  logic [31:0] remain;
  logic [95:0] shreg;

  assign hdr       = msg_hdr_t'(shreg);
  assign hdr_valid = (state == S_OFFER);
  assign pl_cmd    = hdr.cmd;
  assign pl_valid  = (state == S_PAYLOAD) && in_valid;
  assign pl_data   = in_data;
  assign pl_last   = (remain == 32'd1);
  assign in_ready  = (state == S_HDR) || (state == S_PAYLOAD && pl_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_HDR;
      nbyte  <= '0;
      remain <= '0;
      shreg  <= '0;
    end else begin
      unique case (state)
        S_HDR: if (in_valid) begin
          shreg <= {shreg[87:0], in_data};
          if (nbyte == 4'(HDR_BYTES - 1)) begin
            nbyte <= '0;
            state <= S_OFFER;
          end else begin
            nbyte <= nbyte + 1'b1;
          end
        end
        S_OFFER: if (hdr_ready) begin
          remain <= hdr.size;
          state  <= has_payload(hdr) ? S_PAYLOAD : S_HDR;
        end
        S_PAYLOAD: if (in_valid && pl_ready) begin
          remain <= remain - 1'b1;
          if (remain == 32'd1) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
