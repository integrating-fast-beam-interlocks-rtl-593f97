// evm_master_gateway - beam-interlock extension of the event master (EVM).
//
// Each fiber port has a flag-message receiver (flag_msg_rx) that checks the
// upstream link and yields that port's flag vector, all-fault on a link
// error. flag_aggregator ANDs the enabled ports into the global flags, and
// flag_latch applies the per-flag Beam Permit / Fast Beam Interrupt
// behaviour. The resulting vector is sent back downstream as a periodic flag
// message, identical on every port at the same time, sharing the data slot
// with the master's data-buffer traffic. With cfg_fs_en = 0 no flag messages
// are sent and data buffers are not segmented.
// The event stream: the sequencer's event code, replaced by the
// timestamp-reset event on every rising PPS edge (common MRF practice), then
// merged with the postmortem events (postmortem_trigger), which fire on the
// falling edge of any postmortem-enabled latched flag.
//
// Latency from an upstream end marker to the latched flag: 1 (rx) + 1
// (aggregator) + 1 (latch) cycles, then up to one message period to the
// downstream slot.
module evm_master_gateway
  import fbi_pkg::*;
#(
  parameter int N_PORTS  = 8,
  parameter int N_PM_EVT = 8,
  parameter int DBUF_MAX = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  link_t [N_PORTS-1:0]          up_in,
  output link_t [N_PORTS-1:0]          dn_out,
  input  logic [7:0]                   seq_evt,
  input  logic                         pps,
  // configuration
  input  logic                         cfg_fs_en,   // fail-safe protocol on
  input  logic [N_PORTS-1:0]           cfg_port_en,
  input  flagvec_t                     cfg_fbi_mode,
  input  flagvec_t                     cfg_pm_en,
  input  logic [N_PM_EVT-1:0][7:0]     cfg_pm_codes,
  input  logic [15:0]                  cfg_tx_period,
  input  logic [15:0]                  cfg_rx_timeout,
  input  flagvec_t                     ack,
  // downstream data buffer from software
  input  logic                         d_valid,
  output logic                         d_ready,
  input  logic [7:0]                   d_byte,
  input  logic                         d_last,
  // status
  output logic [N_PORTS-1:0]           port_com_ok,
  output logic [N_PORTS-1:0][15:0]     port_err_count,
  output flagvec_t                     global_flags,
  output flagvec_t                     flags,
  output flagvec_t                     latched,
  output logic                         pm_pulse
);

  flagvec_t [N_PORTS-1:0] port_flags, port_raw;
  logic [N_PORTS-1:0]     port_stb;
  logic                   f_valid, f_ready, f_k, f_last, dk;
  logic [7:0]             f_byte, dbyte, evt, seq_mod;
  logic [2:0]             pps_sync;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    flag_msg_rx #(.TW(16)) u_rx (
      .clk, .rst, .link(up_in[p]), .timeout(cfg_rx_timeout),
      .com_ok(port_com_ok[p]), .flags_raw(port_raw[p]), .flags_safe(port_flags[p]),
      .msg_stb(port_stb[p]), .err_count(port_err_count[p]));
  end

  flag_aggregator #(.N_PORTS(N_PORTS)) u_agg (
    .clk, .rst, .port_flags, .port_en(cfg_port_en), .local_flags('1),
    .global_flags);

  flag_latch u_latch (
    .clk, .rst, .flags_in(global_flags), .fbi_mode(cfg_fbi_mode), .ack,
    .flags_out(flags), .latched);

  flag_msg_tx #(.PW(16)) u_tx (
    .clk, .rst, .enable(cfg_fs_en), .period(cfg_tx_period), .flags(flags),
    .m_valid(f_valid), .m_ready(f_ready), .m_byte(f_byte), .m_k(f_k), .m_last(f_last));

  dslot_arbiter #(.DBUF_MAX(DBUF_MAX)) u_arb (
    .clk, .rst, .limit_en(cfg_fs_en),
    .f_valid, .f_ready, .f_byte, .f_k, .f_last,
    .d_valid, .d_ready, .d_byte, .d_last,
    .dbyte, .dk);

  // PPS: synchronise, send the timestamp-reset event on the rising edge
  always_ff @(posedge clk) begin
    if (rst) pps_sync <= '0;
    else     pps_sync <= {pps_sync[1:0], pps};
  end
  assign seq_mod = (pps_sync[1] && !pps_sync[2]) ? EVT_TS_RESET : seq_evt;

  postmortem_trigger #(.N_PM_EVT(N_PM_EVT)) u_pm (
    .clk, .rst, .flags, .pm_en(cfg_pm_en), .pm_codes(cfg_pm_codes),
    .seq_evt(seq_mod), .evt_out(evt), .pm_pulse);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_dn
    assign dn_out[p] = '{up: 1'b1, evt: evt, dk: dk, dbyte: dbyte};
  end

endmodule
