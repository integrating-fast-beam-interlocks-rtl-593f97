// fbi_pkg - types and constants shared by the beam-interlock extension of the
// event-based timing system.
//
// The interlock carries 16 logical flags plus one communication flag ("Com").
// Everywhere in this design a flag bit of 1 means OK and 0 means fault, so
// that a dead wire, a missing message or a reset register reads as a fault.
// Bit COM_BIT (16) of a flag vector is the Com flag.
//
// A fiber link is modelled, per event-clock cycle, as one event-code byte and
// one data-slot byte with its K (control character) flag, plus the
// transceiver's link-up status. The flag-message markers, the data-buffer
// markers and the idle character are this design's choice of 8b/10b control
// codes; the document only says that the markers are dedicated to the
// extension. The timestamp-reset event code 0x7D follows common MRF practice.
package fbi_pkg;

  localparam int NUM_FLAGS = 16;            // logical flags F01..F16
  localparam int FLAG_W    = NUM_FLAGS + 1; // plus the Com flag
  localparam int COM_BIT   = NUM_FLAGS;

  typedef logic [FLAG_W-1:0] flagvec_t;

  // data-slot control characters (8b/10b K codes)
  localparam logic [7:0] K_DBUF_SOF = 8'h1C;  // K28.0 data-buffer segment start
  localparam logic [7:0] K_DBUF_EOF = 8'h3C;  // K28.1 data-buffer segment end
  localparam logic [7:0] K_FLAG_SOF = 8'h5C;  // K28.2 flag message start
  localparam logic [7:0] K_FLAG_EOF = 8'h7C;  // K28.3 flag message end
  localparam logic [7:0] K_IDLE     = 8'hBC;  // K28.5 idle

  // a flag message is SOF, three payload bytes, checksum, EOF
  localparam int MSG_LEN = 6;

  // event codes
  localparam logic [7:0] EVT_NULL     = 8'h00;
  localparam logic [7:0] EVT_TS_RESET = 8'h7D;  // seconds marker, sent on PPS

  // one cycle of a fiber link
  typedef struct packed {
    logic       up;     // transceiver has lock / signal
    logic [7:0] evt;    // event code (downstream only, 0 = no event)
    logic       dk;     // data-slot byte is a control character
    logic [7:0] dbyte;  // data-slot byte
  } link_t;

  localparam link_t LINK_IDLE = '{up: 1'b1, evt: EVT_NULL, dk: 1'b1, dbyte: K_IDLE};
  localparam link_t LINK_DOWN = '{up: 1'b0, evt: EVT_NULL, dk: 1'b1, dbyte: K_IDLE};

  // output modes of the flag-to-output mapping
  typedef enum logic [1:0] {
    OUT_STOCK  = 2'd0,  // pulser passes unchanged
    OUT_GATED  = 2'd1,  // pulser held idle while an assigned flag is in fault
    OUT_MIRROR = 2'd2   // output shows the assigned flags as a level
  } out_mode_e;

  // one pulser of an event receiver
  typedef struct packed {
    logic [7:0]  code;   // triggering event code, 0 = disabled
    logic [31:0] delay;  // cycles from event to pulse start
    logic [31:0] width;  // pulse length in cycles
  } pulser_cfg_t;

  // payload bytes of a flag message
  function automatic logic [23:0] flag_payload(flagvec_t f);
    return {7'b0, f[COM_BIT], f[15:8], f[7:0]};
  endfunction

  // checksum: bitwise inverse of the 8-bit sum of the payload bytes
  function automatic logic [7:0] flag_checksum(logic [23:0] p);
    logic [7:0] s;
    s = p[7:0] + p[15:8] + p[23:16];
    return ~s;
  endfunction

endpackage
