// tb_evm_master_gateway - the event master with four model receivers
// (tb_flag_sender) on ports 0-3 and ports 4-7 disabled and dark. A decoder
// (tb_flag_monitor) reads the downstream message; all ports must carry the
// same stream in every cycle. Checks: aggregation (a fault on any port
// reaches the global flag), Beam Permit recovery, Fast Beam Interrupt hold
// until acknowledge, acknowledge ignored while the fault persists,
// postmortem events after an enabled flag falls, the PPS timestamp event,
// sequencer events passing, a dark enabled port faulting every flag.
module tb_evm_master_gateway;
  import fbi_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst = 1;
  link_t [NP-1:0] up_in, dn_out;
  logic [7:0] seq_evt; logic pps;
  logic [NP-1:0] cfg_port_en;
  logic cfg_fs_en;
  flagvec_t cfg_fbi_mode, cfg_pm_en, ack;
  logic [7:0][7:0] cfg_pm_codes;
  logic [15:0] cfg_tx_period, cfg_rx_timeout;
  logic d_valid, d_ready, d_last; logic [7:0] d_byte;
  logic [NP-1:0] port_com_ok; logic [NP-1:0][15:0] port_err_count;
  flagvec_t global_flags, flags, latched; logic pm_pulse;
  int checks = 0, failures = 0;
  logic [3:0] s_up; logic [3:0][16:0] s_flags;
  logic [16:0] m_flags; int m_good, m_bad, m_dbuf, m_last;
  int n_evt [256];

  for (genvar p = 0; p < 4; p++) begin : g_s
    tb_flag_sender u_s (.clk, .up(s_up[p]), .flags(s_flags[p]), .period(40 + 3 * p), .evt(8'h00), .link(up_in[p]));
  end
  for (genvar p = 4; p < NP; p++) begin : g_dark
    assign up_in[p] = '{up: 1'b0, evt: 8'h00, dk: 1'b1, dbyte: 8'hBC};
  end
  tb_flag_monitor u_mon (.clk, .link(dn_out[0]), .flags(m_flags), .n_good(m_good), .n_bad(m_bad), .n_dbuf(m_dbuf), .last_good_cycle(m_last));

  evm_master_gateway dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_diff = 0;
  always @(posedge clk) begin
    if (!rst) begin
      n_evt[dn_out[0].evt]++;
      for (int p = 1; p < NP; p++) if (dn_out[p] != dn_out[0]) n_diff++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_msgs(int n);
    repeat (n * 50 + 20) @(negedge clk);
  endtask

  initial begin
    seq_evt = 0; pps = 0; cfg_port_en = 8'h0F; cfg_fs_en = 1;
    cfg_fbi_mode = 17'h00080; cfg_pm_en = 17'h00080; ack = '0;
    cfg_pm_codes = '0; cfg_pm_codes[0] = 8'h50; cfg_pm_codes[3] = 8'h51;
    cfg_tx_period = 16'd50; cfg_rx_timeout = 16'd200;
    d_valid = 0; d_last = 0; d_byte = 0;
    s_up = '1; s_flags = '{default: 17'h1FFFF};
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait_msgs(6);
    // FBI flags come out of reset latched (no message yet = fault): acknowledge
    chk(latched[7] && m_flags[7] == 0, "FBI flag latched after start-up");
    @(negedge clk); ack = '1; @(negedge clk); ack = '0;
    wait_msgs(2);
    chk(port_com_ok == 8'h0F, "ports 0-3 up, 4-7 dark");
    chk(global_flags == '1 && m_flags == 17'h1FFFF, $sformatf("all flags OK downstream (%h %h %0d %0d)", global_flags, m_flags, m_good, m_bad));
    // Beam Permit flag 4 fault on port 2
    s_flags[2][4] = 0;
    wait_msgs(3);
    chk(global_flags[4] == 0 && m_flags == 17'h1FFEF, "BP fault on one port reaches downstream");
    s_flags[2][4] = 1;
    wait_msgs(3);
    chk(m_flags == 17'h1FFFF, "BP flag recovers by itself");
    // Fast Beam Interrupt flag 7 fault on port 1, then cleared
    s_flags[1][7] = 0;
    wait_msgs(3);
    chk(m_flags[7] == 0, "FBI fault downstream");
    chk(n_evt[8'h50] == 1 && n_evt[8'h51] == 1, "postmortem events sent once each");
    @(negedge clk); ack[7] = 1; @(negedge clk); ack[7] = 0;
    wait_msgs(2);
    chk(m_flags[7] == 0, "acknowledge ignored while the fault persists");
    s_flags[1][7] = 1;
    wait_msgs(3);
    chk(m_flags[7] == 0 && latched[7] && global_flags[7], "FBI flag held after the fault cleared");
    @(negedge clk); ack[7] = 1; @(negedge clk); ack[7] = 0;
    wait_msgs(2);
    chk(m_flags == 17'h1FFFF, "FBI flag recovers after acknowledge");
    // enabled port goes dark: every flag faults
    s_up[3] = 0;
    wait_msgs(3);
    chk(!port_com_ok[3] && m_flags == 17'h00000, "broken fiber on an enabled port faults every flag");
    s_up[3] = 1;
    wait_msgs(3);
    chk(m_flags[6:0] == 7'h7F && m_flags[16:8] == 9'h1FF, "flags recover when the fiber is back");
    chk(m_flags[7] == 0, "FBI flag 7 latched by the link loss");
    @(negedge clk); ack = '1; @(negedge clk); ack = '0;
    wait_msgs(2);
    chk(m_flags == 17'h1FFFF, "all OK after acknowledge");
    // PPS and sequencer events
    @(negedge clk); pps = 1; repeat (5) @(negedge clk); pps = 0;
    @(negedge clk); seq_evt = 8'h21; @(negedge clk); seq_evt = 0;
    repeat (10) @(negedge clk);
    chk(n_evt[8'h7D] == 1, "one timestamp event per PPS edge");
    chk(n_evt[8'h21] == 1, "sequencer event passes");
    chk(n_evt[8'h50] == 2 && n_evt[8'h51] == 2, "postmortem fired again on the link loss");
    chk(n_diff == 0, "all ports broadcast the same stream");
    chk(m_bad == 0 && m_good > 20, "downstream messages well formed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
