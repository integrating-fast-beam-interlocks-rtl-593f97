// pulse_generator - the stock trigger pulsers of an event receiver.
//
// Each of the N_PULSERS pulsers watches the received event stream for its
// event code; a match starts a delay of cfg.delay cycles after which the
// pulser output is high for cfg.width cycles (10 ns steps at the 100 MHz
// event clock). A new match restarts the pulser. Code 0 disables it. The
// document only names pulsers as output sources and gives the 10 ns delay
// resolution; the one-code-per-pulser structure and 32-bit fields are this
// design's.
//
// Timing: with delay = 0 the pulse starts the cycle after the event.
module pulse_generator
  import fbi_pkg::*;
#(
  parameter int N_PULSERS = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [7:0]                    evt,
  input  pulser_cfg_t [N_PULSERS-1:0]   cfg,
  output logic [N_PULSERS-1:0]          pulse
);

  logic [N_PULSERS-1:0]       in_delay;
  logic [N_PULSERS-1:0][31:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_delay <= '0;
      pulse    <= '0;
      cnt      <= '0;
    end else begin
      for (int i = 0; i < N_PULSERS; i++) begin
        if (cfg[i].code != EVT_NULL && evt == cfg[i].code) begin
          if (cfg[i].delay == 0) begin
            in_delay[i] <= 1'b0;
            pulse[i]    <= (cfg[i].width != 0);
            cnt[i]      <= cfg[i].width - 1;
          end else begin
            in_delay[i] <= 1'b1;
            pulse[i]    <= 1'b0;
            cnt[i]      <= cfg[i].delay - 1;
          end
        end else if (in_delay[i]) begin
          if (cnt[i] == 0) begin
            in_delay[i] <= 1'b0;
            pulse[i]    <= (cfg[i].width != 0);
            cnt[i]      <= cfg[i].width - 1;
          end else begin
            cnt[i] <= cnt[i] - 1;
          end
        end else if (pulse[i]) begin
          if (cnt[i] == 0) pulse[i] <= 1'b0;
          else             cnt[i]   <= cnt[i] - 1;
        end
      end
    end
  end

endmodule
