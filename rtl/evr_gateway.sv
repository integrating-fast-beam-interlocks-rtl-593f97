// evr_gateway - beam-interlock extension of an event receiver (EVR).
//
// Upstream path: the physical inputs are debounced (input_debouncer), grouped
// into 16 local flags (input_flag_mapper) and, together with this receiver's
// own downstream link status as Com bit, sent to the event master as a
// periodic flag message (flag_msg_tx) in the upstream data slot, which it
// shares with data-buffer traffic (dslot_arbiter). With cfg_fs_en = 0 the
// fail-safe protocol is off: no flag messages, unsegmented data buffers.
// Downstream path: the received event codes drive the stock pulsers
// (pulse_generator) and the timestamp (timestamp_counter); the data slot
// carries the system-wide flag message from the master (flag_msg_rx). The
// system flags then gate, mirror or pass each pulser output (output_gate).
// While the downstream link has a communication error the system flags read
// all-fault, so gated outputs are held idle.
// Every change of a log-enabled input or output gate is logged with the
// event-clock timestamp (event_logger).
//
// Configuration registers are ports; the register map and the host bus are
// outside this design. Latency from a raw input to the upstream data slot:
// 2 (sync) + debounce + 1 (mapper) + up to one message period + 1.
module evr_gateway
  import fbi_pkg::*;
#(
  parameter int N_IN      = 16,
  parameter int N_OUT     = 18,
  parameter int N_PULSERS = 16,
  parameter int LOG_DEPTH = 512,
  parameter int DBUF_MAX  = 16,
  localparam int SW       = $clog2(N_PULSERS),
  localparam int LW       = 64 + N_IN + N_OUT
) (
  input  logic                            clk,
  input  logic                            rst,
  // fiber
  input  link_t                           dn_in,
  output link_t                           up_out,
  // front-panel / rear I/O
  input  logic [N_IN-1:0]                 in_raw,
  output logic [N_OUT-1:0]                outs,
  // configuration
  input  logic [N_IN-1:0][15:0]           cfg_dbnc,
  input  logic [N_IN-1:0][NUM_FLAGS-1:0]  cfg_in_map,
  input  logic [N_IN-1:0]                 cfg_in_log,
  input  logic [N_OUT-1:0][SW-1:0]        cfg_out_src,
  input  out_mode_e [N_OUT-1:0]           cfg_out_mode,
  input  flagvec_t [N_OUT-1:0]            cfg_out_map,
  input  logic [N_OUT-1:0]                cfg_out_log,
  input  logic                            cfg_ext_en,
  input  logic                            cfg_fs_en,   // fail-safe protocol on
  input  logic [15:0]                     cfg_tx_period,
  input  logic [15:0]                     cfg_rx_timeout,
  input  pulser_cfg_t [N_PULSERS-1:0]     cfg_pulser,
  input  logic                            sec_load,
  input  logic [31:0]                     sec_value,
  // upstream data buffer from software
  input  logic                            d_valid,
  output logic                            d_ready,
  input  logic [7:0]                      d_byte,
  input  logic                            d_last,
  // log read-out
  input  logic                            log_rd_en,
  output logic [LW-1:0]                   log_rd_data,
  output logic                            log_not_empty,
  output logic                            log_overflow,
  input  logic                            log_ovf_clear,
  // status
  output flagvec_t                        local_flags,
  output flagvec_t                        sys_flags,
  output logic                            com_ok,
  output logic [15:0]                     rx_err_count,
  output logic [31:0]                     ts_sec,
  output logic [31:0]                     ts_ticks
);

  logic [N_IN-1:0]      in_clean;
  logic [NUM_FLAGS-1:0] in_flags;
  logic [N_PULSERS-1:0] pulses;
  logic [N_OUT-1:0]     gate_ok;
  logic                 f_valid, f_ready, f_k, f_last;
  logic [7:0]           f_byte, up_byte;
  logic                 up_k;
  flagvec_t             rx_raw;
  logic                 rx_stb;
  logic [$clog2(LOG_DEPTH):0] log_count;

  input_debouncer #(.N_IN(N_IN), .CW(16)) u_dbnc (
    .clk, .rst, .raw(in_raw), .dbnc_time(cfg_dbnc), .clean(in_clean));

  input_flag_mapper #(.N_IN(N_IN)) u_map (
    .clk, .rst, .in_ok(in_clean), .in_map(cfg_in_map), .flags(in_flags));

  assign local_flags = {com_ok, in_flags};

  flag_msg_tx #(.PW(16)) u_tx (
    .clk, .rst, .enable(cfg_fs_en), .period(cfg_tx_period), .flags(local_flags),
    .m_valid(f_valid), .m_ready(f_ready), .m_byte(f_byte), .m_k(f_k), .m_last(f_last));

  dslot_arbiter #(.DBUF_MAX(DBUF_MAX)) u_arb (
    .clk, .rst, .limit_en(cfg_fs_en),
    .f_valid, .f_ready, .f_byte, .f_k, .f_last,
    .d_valid, .d_ready, .d_byte, .d_last,
    .dbyte(up_byte), .dk(up_k));

  assign up_out = '{up: 1'b1, evt: EVT_NULL, dk: up_k, dbyte: up_byte};

  flag_msg_rx #(.TW(16)) u_rx (
    .clk, .rst, .link(dn_in), .timeout(cfg_rx_timeout),
    .com_ok, .flags_raw(rx_raw), .flags_safe(sys_flags), .msg_stb(rx_stb),
    .err_count(rx_err_count));

  pulse_generator #(.N_PULSERS(N_PULSERS)) u_pulse (
    .clk, .rst, .evt(dn_in.evt), .cfg(cfg_pulser), .pulse(pulses));

  output_gate #(.N_OUT(N_OUT), .N_SRC(N_PULSERS)) u_gate (
    .clk, .rst, .src(pulses), .out_src(cfg_out_src), .out_mode(cfg_out_mode),
    .out_map(cfg_out_map), .flags(sys_flags), .ext_en(cfg_ext_en),
    .outs, .gate_ok);

  timestamp_counter u_ts (
    .clk, .rst, .evt(dn_in.evt), .sec_load, .sec_value, .sec(ts_sec), .ticks(ts_ticks));

  event_logger #(.N_IN(N_IN), .N_OUT(N_OUT), .DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst, .ins(in_clean), .gates(gate_ok),
    .log_in_en(cfg_in_log), .log_out_en(cfg_out_log),
    .sec(ts_sec), .ticks(ts_ticks),
    .rd_en(log_rd_en), .rd_data(log_rd_data), .not_empty(log_not_empty),
    .count(log_count), .overflow(log_overflow), .ovf_clear(log_ovf_clear));

endmodule
