// flag_msg_rx - receiver and link watchdog of the fail-safe flag message.
//
// Watches the data slot of an incoming link for K_FLAG_SOF, then takes three
// payload bytes and the checksum (all data characters) and expects K_FLAG_EOF.
// A message that is complete, correctly framed and whose checksum matches
// updates flags_raw and restarts the watchdog. The receiver raises the
// communication error (com_ok = 0) when:
//   - no valid message has arrived for more than `timeout` cycles,
//   - a message has a bad checksum or bad framing, or
//   - the transceiver reports the link down.
// These error conditions are the document's. com_ok returns with the next
// valid message, and flags_safe reads all-fault while com_ok is 0; both are
// this design's fail-safe choices. err_count counts error events and
// saturates. Other data-slot traffic (data-buffer segments, idle) is ignored.
//
// Timing: flags_raw, com_ok and msg_stb change the cycle after the end marker.
module flag_msg_rx
  import fbi_pkg::*;
#(
  parameter int TW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  link_t         link,
  input  logic [TW-1:0] timeout,
  output logic          com_ok,
  output flagvec_t      flags_raw,
  output flagvec_t      flags_safe,
  output logic          msg_stb,
  output logic [15:0]   err_count
);

  typedef enum logic [2:0] {S_HUNT, S_B0, S_B1, S_B2, S_CHK, S_EOF} state_e;
  state_e        state;
  logic [23:0]   pay;
  logic [7:0]    chk;
  logic [TW-1:0] wdog;
  logic          err;     // error event this cycle
  logic          good;    // valid message completed this cycle
  logic          in_msg;

  assign in_msg = (state != S_HUNT);

  always_comb begin
    err  = 1'b0;
    good = 1'b0;
    if (!link.up) begin
      err = com_ok;  // count the loss once
    end else if (in_msg) begin
      if (state == S_EOF) begin
        if (link.dk && link.dbyte == K_FLAG_EOF && chk == flag_checksum(pay)) good = 1'b1;
        else err = 1'b1;
      end else if (link.dk) begin
        err = 1'b1;  // control character inside a message
      end
    end
    if (!good && com_ok && wdog >= timeout) err = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_HUNT;
      pay       <= '0;
      chk       <= '0;
      wdog      <= '0;
      com_ok    <= 1'b0;
      flags_raw <= '0;
      msg_stb   <= 1'b0;
      err_count <= '0;
    end else begin
      msg_stb <= good;
      if (good) begin
        flags_raw <= {pay[16], pay[15:0]};
        com_ok    <= 1'b1;
        wdog      <= '0;
      end else begin
        if (wdog != '1) wdog <= wdog + 1'b1;
        if (err) com_ok <= 1'b0;
      end
      if (err && err_count != 16'hFFFF) err_count <= err_count + 1'b1;

      if (!link.up) begin
        state <= S_HUNT;
      end else begin
        unique case (state)
          S_HUNT: if (link.dk && link.dbyte == K_FLAG_SOF) state <= S_B0;
          S_B0:   begin pay[7:0]   <= link.dbyte; state <= link.dk ? S_HUNT : S_B1; end
          S_B1:   begin pay[15:8]  <= link.dbyte; state <= link.dk ? S_HUNT : S_B2; end
          S_B2:   begin pay[23:16] <= link.dbyte; state <= link.dk ? S_HUNT : S_CHK; end
          S_CHK:  begin chk        <= link.dbyte; state <= link.dk ? S_HUNT : S_EOF; end
          S_EOF:  state <= S_HUNT;
          default: state <= S_HUNT;
        endcase
        // a start marker always begins a new message
        if (link.dk && link.dbyte == K_FLAG_SOF) state <= S_B0;
      end
    end
  end

  assign flags_safe = com_ok ? flags_raw : '0;

endmodule
