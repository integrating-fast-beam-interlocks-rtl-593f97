// flag_latch - per-flag Beam Permit / Fast Beam Interrupt behaviour at the
// event master.
//
// For a Beam Permit flag (fbi_mode = 0) the output follows the global flag
// and recovers by itself when the fault clears. For a Fast Beam Interrupt
// flag (fbi_mode = 1) a fault sets a latch that holds the output in fault
// until software acknowledges (ack pulse) while the input is OK again. Both
// behaviours are the document's; ignoring an acknowledge given while the fault
// is still present and clearing the latches on reset are this design's.
// Since the global flags read fault until the first messages arrive, every
// FBI flag is latched shortly after reset and needs one acknowledge.
//
// Timing: flags_out is registered; a fault reaches it one cycle later.
module flag_latch
  import fbi_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  flagvec_t flags_in,
  input  flagvec_t fbi_mode,
  input  flagvec_t ack,
  output flagvec_t flags_out,
  output flagvec_t latched
);

  flagvec_t latch_next;

  always_comb begin
    for (int f = 0; f < FLAG_W; f++) begin
      if (fbi_mode[f] && !flags_in[f])      latch_next[f] = 1'b1;
      else if (!fbi_mode[f])                latch_next[f] = 1'b0;
      else if (ack[f])                      latch_next[f] = 1'b0;
      else                                  latch_next[f] = latched[f];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      latched   <= '0;
      flags_out <= '0;
    end else begin
      latched   <= latch_next;
      flags_out <= flags_in & ~latch_next;
    end
  end

endmodule
