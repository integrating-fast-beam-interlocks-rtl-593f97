// fbi_timing_network - an event-based timing network with the fast beam
// interlock built into its firmware: one EVM master, one fan-out EVM and
// N_EVR event receivers in a two-hop star.
//
// Every fiber carries, per 100 MHz event-clock cycle, one event code
// downstream and one data-slot byte in each direction. Flag messages travel
// upstream from each EVR (16 local flags + its link status) to its EVM; the
// fan-out aggregates its EVRs and forwards one message to the master; the
// master aggregates all ports, applies the Beam Permit / Fast Beam Interrupt
// latch and broadcasts the system flags back down, through the fan-out
// unchanged, to every EVR, where they gate the timing outputs. A flag falling
// at the master also fires the postmortem event codes, which reach all EVRs
// through the ordinary event path.
//
// Wiring: EVRs 0..N_MASTER_EVR-1 hang on master ports 0..N_MASTER_EVR-1, the
// fan-out on master port N_PORTS-1, EVRs N_MASTER_EVR..N_EVR-1 on fan-out
// ports 0.. . The document gives one master, one fan-out and twelve EVRs; the
// split between master and fan-out is this design's. fiber_ok[i] is the
// transceiver status of the fiber to EVR i, fiber_ok[N_EVR] that of the
// master-to-fan-out fiber: a 0 takes that link down in both directions. The
// serial transceivers themselves, the sequencer and delay compensation are
// outside this design; the sequencer's event stream and PPS are inputs.
// All configuration registers are ports, indexed per EVR.
module fbi_timing_network
  import fbi_pkg::*;
#(
  parameter int N_EVR        = 12,
  parameter int N_MASTER_EVR = 6,
  parameter int N_PORTS      = 8,
  parameter int N_IN         = 16,
  parameter int N_OUT        = 18,
  parameter int N_PULSERS    = 16,
  parameter int LOG_DEPTH    = 512,
  parameter int DBUF_MAX     = 16,
  localparam int SW          = $clog2(N_PULSERS),
  localparam int LW          = 64 + N_IN + N_OUT
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [N_EVR:0]                         fiber_ok,
  // master
  input  logic [7:0]                             seq_evt,
  input  logic                                   pps,
  input  logic                                   m_fs_en,
  input  logic [N_PORTS-1:0]                     m_port_en,
  input  flagvec_t                               m_fbi_mode,
  input  flagvec_t                               m_pm_en,
  input  logic [7:0][7:0]                        m_pm_codes,
  input  logic [15:0]                            m_tx_period,
  input  logic [15:0]                            m_rx_timeout,
  input  flagvec_t                               m_ack,
  input  logic                                   m_d_valid,
  output logic                                   m_d_ready,
  input  logic [7:0]                             m_d_byte,
  input  logic                                   m_d_last,
  output logic [N_PORTS-1:0]                     m_port_com_ok,
  output flagvec_t                               m_global_flags,
  output flagvec_t                               m_flags,
  output flagvec_t                               m_latched,
  output logic                                   m_pm_pulse,
  output logic [N_PORTS-1:0][15:0]               m_port_err_count,
  // fan-out
  input  logic                                   f_fs_en,
  input  logic [N_PORTS-1:0]                     f_port_en,
  input  logic [15:0]                            f_tx_period,
  input  logic [15:0]                            f_rx_timeout,
  output logic                                   f_dn_com_ok,
  output logic [N_PORTS-1:0]                     f_port_com_ok,
  output flagvec_t                               f_up_flags,
  // receivers
  input  logic [N_EVR-1:0][N_IN-1:0]             evr_in,
  output logic [N_EVR-1:0][N_OUT-1:0]            evr_out,
  input  logic [N_EVR-1:0][N_IN-1:0][15:0]       evr_dbnc,
  input  logic [N_EVR-1:0][N_IN-1:0][NUM_FLAGS-1:0] evr_in_map,
  input  logic [N_EVR-1:0][N_IN-1:0]             evr_in_log,
  input  logic [N_EVR-1:0][N_OUT-1:0][SW-1:0]    evr_out_src,
  input  out_mode_e [N_EVR-1:0][N_OUT-1:0]       evr_out_mode,
  input  flagvec_t [N_EVR-1:0][N_OUT-1:0]        evr_out_map,
  input  logic [N_EVR-1:0][N_OUT-1:0]            evr_out_log,
  input  logic [N_EVR-1:0]                       evr_ext_en,
  input  logic [N_EVR-1:0]                       evr_fs_en,
  input  logic [15:0]                            evr_tx_period,
  input  logic [15:0]                            evr_rx_timeout,
  input  pulser_cfg_t [N_EVR-1:0][N_PULSERS-1:0] evr_pulser,
  input  logic [N_EVR-1:0]                       evr_sec_load,
  input  logic [31:0]                            evr_sec_value,
  input  logic [N_EVR-1:0]                       evr_d_valid,
  output logic [N_EVR-1:0]                       evr_d_ready,
  input  logic [N_EVR-1:0][7:0]                  evr_d_byte,
  input  logic [N_EVR-1:0]                       evr_d_last,
  input  logic [N_EVR-1:0]                       evr_log_rd_en,
  output logic [N_EVR-1:0][LW-1:0]               evr_log_rd_data,
  output logic [N_EVR-1:0]                       evr_log_not_empty,
  output logic [N_EVR-1:0]                       evr_log_overflow,
  input  logic [N_EVR-1:0]                       evr_log_ovf_clear,
  output flagvec_t [N_EVR-1:0]                   evr_local_flags,
  output flagvec_t [N_EVR-1:0]                   evr_sys_flags,
  output logic [N_EVR-1:0]                       evr_com_ok,
  output logic [N_EVR-1:0][15:0]                 evr_rx_err_count,
  output logic [N_EVR-1:0][31:0]                 evr_ts_sec,
  output logic [N_EVR-1:0][31:0]                 evr_ts_ticks
);

  link_t [N_PORTS-1:0] m_up, m_dn, f_up, f_dn;
  link_t [N_EVR-1:0]   evr_dn, evr_up;
  link_t               fo_up;

  // ---- fibers ----
  for (genvar e = 0; e < N_EVR; e++) begin : g_fiber
    if (e < N_MASTER_EVR) begin : g_m
      assign evr_dn[e] = fiber_ok[e] ? m_dn[e] : LINK_DOWN;
      assign m_up[e]   = fiber_ok[e] ? evr_up[e] : LINK_DOWN;
    end else begin : g_f
      assign evr_dn[e] = fiber_ok[e] ? f_dn[e-N_MASTER_EVR] : LINK_DOWN;
      assign f_up[e-N_MASTER_EVR] = fiber_ok[e] ? evr_up[e] : LINK_DOWN;
    end
  end
  for (genvar p = N_MASTER_EVR; p < N_PORTS - 1; p++) begin : g_m_unused
    assign m_up[p] = LINK_DOWN;
  end
  assign m_up[N_PORTS-1] = fiber_ok[N_EVR] ? fo_up : LINK_DOWN;
  for (genvar p = N_EVR - N_MASTER_EVR; p < N_PORTS; p++) begin : g_f_unused
    assign f_up[p] = LINK_DOWN;
  end

  // ---- master ----
  evm_master_gateway #(.N_PORTS(N_PORTS), .N_PM_EVT(8), .DBUF_MAX(DBUF_MAX)) u_master (
    .clk, .rst, .up_in(m_up), .dn_out(m_dn), .seq_evt, .pps,
    .cfg_fs_en(m_fs_en), .cfg_port_en(m_port_en), .cfg_fbi_mode(m_fbi_mode), .cfg_pm_en(m_pm_en),
    .cfg_pm_codes(m_pm_codes), .cfg_tx_period(m_tx_period), .cfg_rx_timeout(m_rx_timeout),
    .ack(m_ack), .d_valid(m_d_valid), .d_ready(m_d_ready), .d_byte(m_d_byte), .d_last(m_d_last),
    .port_com_ok(m_port_com_ok), .port_err_count(m_port_err_count), .global_flags(m_global_flags),
    .flags(m_flags), .latched(m_latched), .pm_pulse(m_pm_pulse));

  // ---- fan-out ----
  evm_fanout_gateway #(.N_PORTS(N_PORTS)) u_fanout (
    .clk, .rst,
    .dn_in(fiber_ok[N_EVR] ? m_dn[N_PORTS-1] : LINK_DOWN), .dn_out(f_dn),
    .up_in(f_up), .up_out(fo_up),
    .cfg_fs_en(f_fs_en), .cfg_port_en(f_port_en), .cfg_tx_period(f_tx_period), .cfg_rx_timeout(f_rx_timeout),
    .dn_com_ok(f_dn_com_ok), .port_com_ok(f_port_com_ok), .up_flags(f_up_flags));

  // ---- receivers ----
  for (genvar e = 0; e < N_EVR; e++) begin : g_evr
    evr_gateway #(.N_IN(N_IN), .N_OUT(N_OUT), .N_PULSERS(N_PULSERS),
                  .LOG_DEPTH(LOG_DEPTH), .DBUF_MAX(DBUF_MAX)) u_evr (
      .clk, .rst, .dn_in(evr_dn[e]), .up_out(evr_up[e]),
      .in_raw(evr_in[e]), .outs(evr_out[e]),
      .cfg_dbnc(evr_dbnc[e]), .cfg_in_map(evr_in_map[e]), .cfg_in_log(evr_in_log[e]),
      .cfg_out_src(evr_out_src[e]), .cfg_out_mode(evr_out_mode[e]), .cfg_out_map(evr_out_map[e]),
      .cfg_out_log(evr_out_log[e]), .cfg_ext_en(evr_ext_en[e]), .cfg_fs_en(evr_fs_en[e]),
      .cfg_tx_period(evr_tx_period), .cfg_rx_timeout(evr_rx_timeout),
      .cfg_pulser(evr_pulser[e]), .sec_load(evr_sec_load[e]), .sec_value(evr_sec_value),
      .d_valid(evr_d_valid[e]), .d_ready(evr_d_ready[e]), .d_byte(evr_d_byte[e]), .d_last(evr_d_last[e]),
      .log_rd_en(evr_log_rd_en[e]), .log_rd_data(evr_log_rd_data[e]),
      .log_not_empty(evr_log_not_empty[e]), .log_overflow(evr_log_overflow[e]),
      .log_ovf_clear(evr_log_ovf_clear[e]),
      .local_flags(evr_local_flags[e]), .sys_flags(evr_sys_flags[e]), .com_ok(evr_com_ok[e]),
      .rx_err_count(evr_rx_err_count[e]), .ts_sec(evr_ts_sec[e]), .ts_ticks(evr_ts_ticks[e]));
  end

endmodule
