// evm_fanout_gateway - beam-interlock extension of a fan-out event master.
//
// Downstream, the fan-out passes the master's stream (events and data slot,
// hence the master's flag message) unchanged to all its ports, one register
// stage later, as the document describes. It also receives that flag message
// itself to check the health of its own downstream link.
// Upstream, which the document does not detail, it works like a small
// master without latch: a flag_msg_rx per port, flag_aggregator over the
// enabled ports with its own downstream link status as Com bit, and a
// periodic flag message of the aggregated vector towards the master. So a
// fault behind the fan-out still reaches the master as a fault, and a broken
// link on either side of the fan-out reads as a Com fault.
// With cfg_fs_en = 0 the upstream flag message is not sent (the master then
// sees a Com fault on this port).
module evm_fanout_gateway
  import fbi_pkg::*;
#(
  parameter int N_PORTS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  link_t                    dn_in,
  output link_t [N_PORTS-1:0]      dn_out,
  input  link_t [N_PORTS-1:0]      up_in,
  output link_t                    up_out,
  // configuration
  input  logic                     cfg_fs_en,   // fail-safe protocol on
  input  logic [N_PORTS-1:0]       cfg_port_en,
  input  logic [15:0]              cfg_tx_period,
  input  logic [15:0]              cfg_rx_timeout,
  // status
  output logic                     dn_com_ok,
  output logic [N_PORTS-1:0]       port_com_ok,
  output flagvec_t                 up_flags
);

  flagvec_t [N_PORTS-1:0] port_flags, port_raw;
  logic [N_PORTS-1:0]     port_stb;
  logic [N_PORTS-1:0][15:0] port_err;
  flagvec_t               dn_raw, dn_safe;
  logic                   dn_stb;
  logic [15:0]            dn_err;
  logic                   f_valid, f_ready, f_k, f_last, dk, d_ready;
  logic [7:0]             f_byte, dbyte;
  link_t                  dn_q;

  always_ff @(posedge clk) begin
    if (rst) dn_q <= LINK_DOWN;
    else     dn_q <= dn_in;
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    assign dn_out[p] = dn_q;
    flag_msg_rx #(.TW(16)) u_rx (
      .clk, .rst, .link(up_in[p]), .timeout(cfg_rx_timeout),
      .com_ok(port_com_ok[p]), .flags_raw(port_raw[p]), .flags_safe(port_flags[p]),
      .msg_stb(port_stb[p]), .err_count(port_err[p]));
  end

  flag_msg_rx #(.TW(16)) u_dn_rx (
    .clk, .rst, .link(dn_in), .timeout(cfg_rx_timeout),
    .com_ok(dn_com_ok), .flags_raw(dn_raw), .flags_safe(dn_safe),
    .msg_stb(dn_stb), .err_count(dn_err));

  flag_aggregator #(.N_PORTS(N_PORTS)) u_agg (
    .clk, .rst, .port_flags, .port_en(cfg_port_en),
    .local_flags({dn_com_ok, {NUM_FLAGS{1'b1}}}), .global_flags(up_flags));

  flag_msg_tx #(.PW(16)) u_tx (
    .clk, .rst, .enable(cfg_fs_en), .period(cfg_tx_period), .flags(up_flags),
    .m_valid(f_valid), .m_ready(f_ready), .m_byte(f_byte), .m_k(f_k), .m_last(f_last));

  dslot_arbiter #(.DBUF_MAX(1)) u_arb (
    .clk, .rst, .limit_en(1'b1),
    .f_valid, .f_ready, .f_byte, .f_k, .f_last,
    .d_valid(1'b0), .d_ready, .d_byte(8'h00), .d_last(1'b0),
    .dbyte, .dk);

  assign up_out = '{up: 1'b1, evt: EVT_NULL, dk: dk, dbyte: dbyte};

endmodule
