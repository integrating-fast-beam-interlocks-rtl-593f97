// tb_evm_fanout_gateway - the fan-out between a model master (tb_flag_sender
// on its downstream input) and three model receivers on ports 0-2. Checks:
// the downstream stream reaches every port unchanged one cycle later; the
// upstream message to the master is the AND of the enabled ports; a dark
// receiver port and a dark downstream fiber both appear as faults upstream.
module tb_evm_fanout_gateway;
  import fbi_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst = 1;
  link_t dn_in, up_out, dn_q;
  link_t [NP-1:0] dn_out, up_in;
  logic [NP-1:0] cfg_port_en, port_com_ok;
  logic cfg_fs_en;
  logic [15:0] cfg_tx_period, cfg_rx_timeout;
  logic dn_com_ok; flagvec_t up_flags;
  int checks = 0, failures = 0, n_mismatch = 0;
  logic m_up; logic [16:0] m_fl; logic [7:0] m_evt;
  logic [2:0] s_up; logic [2:0][16:0] s_flags;
  logic [16:0] u_flags; int u_good, u_bad, u_dbuf, u_last;

  tb_flag_sender u_m (.clk, .up(m_up), .flags(m_fl), .period(45), .evt(m_evt), .link(dn_in));
  for (genvar p = 0; p < 3; p++) begin : g_s
    tb_flag_sender u_s (.clk, .up(s_up[p]), .flags(s_flags[p]), .period(37 + 5 * p), .evt(8'h00), .link(up_in[p]));
  end
  for (genvar p = 3; p < NP; p++) begin : g_dark
    assign up_in[p] = '{up: 1'b0, evt: 8'h00, dk: 1'b1, dbyte: 8'hBC};
  end
  tb_flag_monitor u_mon (.clk, .link(up_out), .flags(u_flags), .n_good(u_good), .n_bad(u_bad), .n_dbuf(u_dbuf), .last_good_cycle(u_last));

  evm_fanout_gateway dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_q = 1;
  always @(posedge clk) begin
    dn_q <= dn_in;
    rst_q <= rst;
    if (!rst_q) for (int p = 0; p < NP; p++) if (dn_out[p] != dn_q) n_mismatch++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg_port_en = 8'h07; cfg_fs_en = 1; cfg_tx_period = 16'd50; cfg_rx_timeout = 16'd200;
    m_up = 1; m_fl = 17'h1FFFF; m_evt = 0;
    s_up = '1; s_flags = '{default: 17'h1FFFF};
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (400) @(negedge clk);
    chk(dn_com_ok && port_com_ok == 8'h07, "links up");
    chk(u_flags == 17'h1FFFF, "upstream all OK");
    s_flags[0][2] = 0; s_flags[2][9] = 0;
    repeat (200) @(negedge clk);
    chk(u_flags == 17'h1FDFB, "upstream is the AND of the ports");
    s_flags = '{default: 17'h1FFFF};
    for (int i = 0; i < 20; i++) begin @(negedge clk); m_evt = 8'(i + 1); end
    @(negedge clk); m_evt = 0;
    repeat (200) @(negedge clk);
    chk(u_flags == 17'h1FFFF, "upstream recovers");
    s_up[1] = 0;
    repeat (300) @(negedge clk);
    chk(!port_com_ok[1] && u_flags == 17'h00000, "dark receiver port faults every flag");
    s_up[1] = 1;
    repeat (200) @(negedge clk);
    m_up = 0;
    repeat (300) @(negedge clk);
    chk(!dn_com_ok && u_flags == 17'h0FFFF, "dark downstream fiber reported as Com fault");
    m_up = 1;
    repeat (300) @(negedge clk);
    chk(u_flags == 17'h1FFFF, "all recovered");
    chk(n_mismatch == 0, "downstream passed through unchanged");
    chk(u_bad == 0 && u_good > 20, "upstream messages well formed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
