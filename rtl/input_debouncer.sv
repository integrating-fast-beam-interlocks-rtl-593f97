// input_debouncer - conditions the physical interlock inputs of an event receiver.
//
// Each input is first brought into the event-clock domain by a two-flop
// synchroniser. A per-input counter then watches for the synchronised level
// to differ from the accepted (clean) level; the new level is accepted only
// after it has been seen for dbnc_time consecutive cycles, and any bounce
// back restarts the count. dbnc_time = 0 accepts a change one cycle after
// synchronisation. The per-input configurable debounce time is from the
// document; the counter scheme, the synchroniser and the reset level
// (0 = fault) are this design's choices.
//
// Timing: a clean step on raw appears on clean after 2 + dbnc_time + 1 cycles.
module input_debouncer #(
  parameter int N_IN = 16,  // number of interlock inputs
  parameter int CW   = 16   // debounce counter width (cycles)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N_IN-1:0]        raw,
  input  logic [N_IN-1:0][CW-1:0] dbnc_time,
  output logic [N_IN-1:0]        clean
);

  logic [N_IN-1:0] sync1, sync2;
  logic [N_IN-1:0][CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
      clean <= '0;
      cnt   <= '0;
    end else begin
      sync1 <= raw;
      sync2 <= sync1;
      for (int i = 0; i < N_IN; i++) begin
        if (sync2[i] == clean[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] >= dbnc_time[i]) begin
          clean[i] <= sync2[i];
          cnt[i]   <= '0;
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

endmodule
