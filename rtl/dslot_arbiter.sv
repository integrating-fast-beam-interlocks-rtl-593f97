// dslot_arbiter - shares the serial data slot between flag messages and
// ordinary data-buffer traffic.
//
// Flag messages (from flag_msg_tx) are sent whole and have priority whenever
// the slot is between transfers. Data-buffer bytes are sent in segments of at
// most DBUF_MAX bytes, each framed by K_DBUF_SOF and K_DBUF_EOF; a longer
// buffer simply continues in the next segment. A pending flag message
// therefore waits at most DBUF_MAX + 2 cycles. A pause in the data-buffer
// stream also ends the segment. With limit_en = 0 (fail-safe protocol off)
// a data buffer goes out as one segment of any length. The length limit on data buffers while the
// fail-safe protocol is active is the document's; segmenting, the markers and
// the idle character are this design's.
//
// Interface: two valid/ready byte streams in, one registered data-slot byte
// with its K flag out (one cycle latency).
module dslot_arbiter
  import fbi_pkg::*;
#(
  parameter int DBUF_MAX = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       limit_en,  // limit data-buffer segments to DBUF_MAX
  // flag message stream
  input  logic       f_valid,
  output logic       f_ready,
  input  logic [7:0] f_byte,
  input  logic       f_k,
  input  logic       f_last,
  // data-buffer stream
  input  logic       d_valid,
  output logic       d_ready,
  input  logic [7:0] d_byte,
  input  logic       d_last,
  // data slot
  output logic [7:0] dbyte,
  output logic       dk
);

  typedef enum logic [1:0] {A_IDLE, A_FLAG, A_DBUF} state_e;
  state_e state;
  localparam int CW = $clog2(DBUF_MAX + 1);
  logic [CW-1:0] cnt;
  logic          d_closed;  // last byte of the buffer sent, end marker next

  always_comb begin
    f_ready = 1'b0;
    d_ready = 1'b0;
    unique case (state)
      A_IDLE: f_ready = f_valid;
      A_FLAG: f_ready = 1'b1;
      A_DBUF: d_ready = (cnt < CW'(DBUF_MAX)) || (!limit_en && !d_closed);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE;
      cnt   <= '0;
      d_closed <= 1'b0;
      dbyte <= K_IDLE;
      dk    <= 1'b1;
    end else begin
      unique case (state)
        A_IDLE: begin
          if (f_valid) begin
            dbyte <= f_byte;
            dk    <= f_k;
            if (!f_last) state <= A_FLAG;
          end else if (d_valid) begin
            dbyte <= K_DBUF_SOF;
            dk    <= 1'b1;
            cnt   <= '0;
            state <= A_DBUF;
          end else begin
            dbyte <= K_IDLE;
            dk    <= 1'b1;
          end
        end
        A_FLAG: begin
          dbyte <= f_byte;
          dk    <= f_k;
          if (f_last) state <= A_IDLE;
        end
        A_DBUF: begin
          if (d_valid && d_ready) begin
            dbyte <= d_byte;
            dk    <= 1'b0;
            if (limit_en) cnt <= cnt + 1'b1;
            if (d_last) begin cnt <= CW'(DBUF_MAX); d_closed <= 1'b1; end  // close after the last byte
          end else begin
            dbyte <= K_DBUF_EOF;
            dk    <= 1'b1;
            d_closed <= 1'b0;
            state <= A_IDLE;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
