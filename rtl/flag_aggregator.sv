// flag_aggregator - builds the system-wide flag view at an event master.
//
// A global flag stays OK only while every enabled port reports it OK (logical
// AND over ports), so a fault at any receiver drives the global flag to
// fault; this is the document's rule. Port vectors come from flag_msg_rx's
// flags_safe, so a port whose link has a communication error reports fault
// on every flag including Com. port_en masks unused fiber ports, and
// local_flags lets a device add its own flags (all ones when it has none);
// both are this design's. Output registered, one cycle.
module flag_aggregator
  import fbi_pkg::*;
#(
  parameter int N_PORTS = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  flagvec_t [N_PORTS-1:0] port_flags,
  input  logic [N_PORTS-1:0]    port_en,
  input  flagvec_t              local_flags,
  output flagvec_t              global_flags
);

  flagvec_t g;

  always_comb begin
    g = local_flags;
    for (int p = 0; p < N_PORTS; p++)
      if (port_en[p]) g &= port_flags[p];
  end

  always_ff @(posedge clk) begin
    if (rst) global_flags <= '0;
    else     global_flags <= g;
  end

endmodule
