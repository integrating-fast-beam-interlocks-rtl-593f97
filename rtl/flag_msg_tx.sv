// flag_msg_tx - transmitter of the fail-safe flag message.
//
// Every `period` cycles a message is made ready that carries the current flag
// vector (16 flags and the Com flag). It is handed byte by byte to the
// data-slot arbiter over a valid/ready stream:
//   K_FLAG_SOF (K), flags[7:0], flags[15:8], {7'b0, Com}, checksum, K_FLAG_EOF (K)
// with m_last on the end marker. The vector is sampled when the message is
// made ready. The regular sending, the start/end markers and the checksum are
// the document's; the byte layout, the marker codes and the checksum type
// (inverted 8-bit sum) are this design's. The period timer runs on while a
// message waits, so a waiting message does not shift later ones. A period of
// 0 or 1 sends back to back. With enable = 0 (fail-safe protocol off) no new
// message is started; a message already under way is finished.
module flag_msg_tx
  import fbi_pkg::*;
#(
  parameter int PW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic [PW-1:0] period,
  input  flagvec_t      flags,
  output logic          m_valid,
  input  logic          m_ready,
  output logic [7:0]    m_byte,
  output logic          m_k,
  output logic          m_last
);

  logic [PW-1:0] timer;
  logic          due;       // a period has elapsed since the last message was made
  logic [2:0]    idx;       // byte index while a message is out
  logic [23:0]   payload;

  always_ff @(posedge clk) begin
    if (rst) begin
      timer   <= '0;
      due     <= 1'b1;
      m_valid <= 1'b0;
      idx     <= '0;
      payload <= '0;
    end else begin
      if (timer + 1'b1 >= period) begin
        timer <= '0;
        due   <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
      if (!m_valid && due && enable) begin
        m_valid <= 1'b1;
        idx     <= '0;
        payload <= flag_payload(flags);
        if (!(timer + 1'b1 >= period)) due <= 1'b0;
      end else if (m_valid && m_ready) begin
        if (idx == 3'(MSG_LEN - 1)) m_valid <= 1'b0;
        else                        idx <= idx + 1'b1;
      end
    end
  end

  always_comb begin
    m_k    = 1'b0;
    m_last = 1'b0;
    unique case (idx)
      3'd0:    begin m_byte = K_FLAG_SOF; m_k = 1'b1; end
      3'd1:    m_byte = payload[7:0];
      3'd2:    m_byte = payload[15:8];
      3'd3:    m_byte = payload[23:16];
      3'd4:    m_byte = flag_checksum(payload);
      default: begin m_byte = K_FLAG_EOF; m_k = 1'b1; m_last = 1'b1; end
    endcase
  end

endmodule
