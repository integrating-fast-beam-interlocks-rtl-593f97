// postmortem_trigger - turns a flag fault into synchronised postmortem events.
//
// At the event master, the falling edge (OK -> fault) of any flag enabled in
// pm_en gives a one-cycle trigger pulse (pm_pulse). The pulse arms the user
// event registers: each of the N_PM_EVT registers holding a non-zero code is
// marked pending, and the pending codes are sent in the event stream, lowest
// register first, one per cycle in which the sequencer sends no event. The
// falling-edge trigger, the enable register and the eight pre-armed codes are
// the document's; since the link carries one event code per cycle, codes the
// document says "fire together" leave here in successive free cycles.
//
// Timing: pm_pulse one cycle after the flag edge; first code the cycle after.
module postmortem_trigger
  import fbi_pkg::*;
#(
  parameter int N_PM_EVT = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  flagvec_t                 flags,
  input  flagvec_t                 pm_en,
  input  logic [N_PM_EVT-1:0][7:0] pm_codes,
  input  logic [7:0]               seq_evt,
  output logic [7:0]               evt_out,
  output logic                     pm_pulse
);

  flagvec_t              prev;
  logic [N_PM_EVT-1:0]   pending;
  logic [N_PM_EVT-1:0]   armed;
  logic [N_PM_EVT-1:0]   take;     // one-hot: register sent this cycle

  always_comb begin
    for (int i = 0; i < N_PM_EVT; i++) armed[i] = (pm_codes[i] != EVT_NULL);
    take = '0;
    if (seq_evt == EVT_NULL)
      for (int i = N_PM_EVT - 1; i >= 0; i--)
        if (pending[i]) take = N_PM_EVT'(1) << i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev     <= '0;
      pending  <= '0;
      pm_pulse <= 1'b0;
      evt_out  <= EVT_NULL;
    end else begin
      prev     <= flags;
      pm_pulse <= |(prev & ~flags & pm_en);
      pending  <= (pending & ~take) | (pm_pulse ? armed : '0);
      evt_out  <= seq_evt;
      for (int i = 0; i < N_PM_EVT; i++)
        if (take[i]) evt_out <= pm_codes[i];
    end
  end

endmodule
