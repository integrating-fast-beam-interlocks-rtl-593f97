// timestamp_counter - event-clock timestamp of an event receiver.
//
// ticks counts event-clock cycles (10 ns); the timestamp-reset event
// (EVT_TS_RESET, sent by the master on every PPS edge) advances the seconds
// and clears the ticks. Because every receiver sees that event in the same
// event cycle, timestamps agree across the system. Software may load the
// seconds (sec_load). The document asks for log timestamps generated from
// the event clock and synchronised by PPS; the event code and the load are
// this design's, following common MRF practice.
module timestamp_counter
  import fbi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  evt,
  input  logic        sec_load,
  input  logic [31:0] sec_value,
  output logic [31:0] sec,
  output logic [31:0] ticks
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sec   <= '0;
      ticks <= '0;
    end else begin
      if (evt == EVT_TS_RESET) begin
        ticks <= '0;
        sec   <= sec + 1'b1;
      end else begin
        ticks <= ticks + 1'b1;
      end
      if (sec_load) sec <= sec_value;
    end
  end

endmodule
