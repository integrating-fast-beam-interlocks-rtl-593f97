// tb_fbi_timing_network - end-to-end test of the whole network at its
// default size: EVM master, fan-out EVM and twelve EVRs (six on each EVM).
// Every EVR maps input i to flag i; output 0 is gated by flag 0, output 1 by
// flag 1 (a Fast Beam Interrupt flag), output 2 mirrors flag 0 and Com,
// output 3 is a stock output on the postmortem event. The test walks through
// every mechanism and counts each: Beam Permit trip and recovery (with the
// input-to-output latency across both hops, required below 30 us = 3000
// cycles), FBI latch and acknowledge, postmortem events at every EVR,
// debounce rejection, broken EVR fiber, broken fan-out fiber, event logging,
// log overflow and clear, upstream and downstream data buffers, PPS
// timestamps, mirror outputs and the extension bypass. A mechanism that
// never happened counts as a failure.
module tb_fbi_timing_network;
  import fbi_pkg::*;
  localparam int NE = 12, NM = 6, NP = 8, NI = 16, NO = 18, NPU = 16, LW = 64 + NI + NO;
  logic clk = 0, rst = 1;
  logic [NE:0] fiber_ok;
  logic [7:0] seq_evt; logic pps;
  logic [NP-1:0] m_port_en; flagvec_t m_fbi_mode, m_pm_en, m_ack;
  logic [7:0][7:0] m_pm_codes; logic [15:0] m_tx_period, m_rx_timeout;
  logic m_d_valid, m_d_ready, m_d_last; logic [7:0] m_d_byte;
  logic [NP-1:0] m_port_com_ok; flagvec_t m_global_flags, m_flags, m_latched; logic m_pm_pulse;
  logic [NP-1:0][15:0] m_port_err_count;
  logic [NP-1:0] f_port_en; logic [15:0] f_tx_period, f_rx_timeout;
  logic f_dn_com_ok; logic [NP-1:0] f_port_com_ok; flagvec_t f_up_flags;
  logic [NE-1:0][NI-1:0] evr_in; logic [NE-1:0][NO-1:0] evr_out;
  logic [NE-1:0][NI-1:0][15:0] evr_dbnc; logic [NE-1:0][NI-1:0][15:0] evr_in_map;
  logic [NE-1:0][NI-1:0] evr_in_log; logic [NE-1:0][NO-1:0][3:0] evr_out_src;
  out_mode_e [NE-1:0][NO-1:0] evr_out_mode; flagvec_t [NE-1:0][NO-1:0] evr_out_map;
  logic [NE-1:0][NO-1:0] evr_out_log; logic [NE-1:0] evr_ext_en, evr_fs_en; logic m_fs_en, f_fs_en;
  logic [15:0] evr_tx_period, evr_rx_timeout;
  pulser_cfg_t [NE-1:0][NPU-1:0] evr_pulser;
  logic [NE-1:0] evr_sec_load; logic [31:0] evr_sec_value;
  logic [NE-1:0] evr_d_valid, evr_d_ready, evr_d_last; logic [NE-1:0][7:0] evr_d_byte;
  logic [NE-1:0] evr_log_rd_en, evr_log_not_empty, evr_log_overflow, evr_log_ovf_clear;
  logic [NE-1:0][LW-1:0] evr_log_rd_data;
  flagvec_t [NE-1:0] evr_local_flags, evr_sys_flags; logic [NE-1:0] evr_com_ok;
  logic [NE-1:0][15:0] evr_rx_err_count;
  logic [NE-1:0][31:0] evr_ts_sec, evr_ts_ticks;

  int checks = 0, failures = 0;
  int n_bp = 0, n_fbi = 0, n_pm = 0, n_glitch = 0, n_evr_link = 0, n_fo_link = 0, n_log = 0,
      n_ovf = 0, n_dbuf = 0, n_pps = 0, n_mirror = 0, n_bypass = 0, n_gated = 0;
  int max_latency = 0;

  fbi_timing_network dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count high cycles of output k on every EVR
  int hi [NE][4];
  always @(posedge clk)
    for (int e = 0; e < NE; e++)
      for (int k = 0; k < 4; k++) hi[e][k] += evr_out[e][k];

  task automatic clear_hi();
    for (int e = 0; e < NE; e++) for (int k = 0; k < 4; k++) hi[e][k] = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic seq(logic [7:0] code);
    @(negedge clk); seq_evt = code; @(negedge clk); seq_evt = 0;
  endtask

  task automatic master_ack();
    @(negedge clk); m_ack = '1; @(negedge clk); m_ack = '0;
  endtask

  // fire pulser event 0x30 and return how many EVRs showed the 5-cycle pulse on output k
  function automatic int pulsed(int k);
    int n = 0;
    for (int e = 0; e < NE; e++) if (hi[e][k] == 5) n++;
    return n;
  endfunction

  initial begin
    int n, lat;
    fiber_ok = '1; seq_evt = 0; pps = 0;
    m_port_en = 8'hBF; m_fbi_mode = 17'h00002; m_pm_en = 17'h00002; m_ack = '0;
    m_pm_codes = '0; m_pm_codes[0] = 8'h60; m_pm_codes[1] = 8'h61;
    m_tx_period = 16'd100; m_rx_timeout = 16'd300;
    m_d_valid = 0; m_d_last = 0; m_d_byte = 0;
    f_port_en = 8'h3F; f_tx_period = 16'd100; f_rx_timeout = 16'd300;
    evr_in = '1; evr_ext_en = '1; evr_fs_en = '1; m_fs_en = 1; f_fs_en = 1; evr_tx_period = 16'd100; evr_rx_timeout = 16'd300;
    evr_in_log = '1; evr_out_log = '1; evr_sec_load = '0; evr_sec_value = 0;
    evr_d_valid = '0; evr_d_last = '0; evr_d_byte = '0; evr_log_rd_en = '0; evr_log_ovf_clear = '0;
    for (int e = 0; e < NE; e++) begin
      for (int i = 0; i < NI; i++) begin evr_dbnc[e][i] = 16'd10; evr_in_map[e][i] = 16'(1) << i; end
      evr_out_src[e] = '0; evr_out_mode[e] = '{default: OUT_STOCK}; evr_out_map[e] = '0;
      evr_out_mode[e][0] = OUT_GATED;  evr_out_map[e][0] = 17'h00001;
      evr_out_mode[e][1] = OUT_GATED;  evr_out_map[e][1] = 17'h00002;
      evr_out_mode[e][2] = OUT_MIRROR; evr_out_map[e][2] = 17'h10001;
      evr_out_src[e][3] = 4'd1;
      evr_pulser[e] = '0;
      evr_pulser[e][0] = '{code: 8'h30, delay: 32'd3, width: 32'd5};
      evr_pulser[e][1] = '{code: 8'h60, delay: 32'd0, width: 32'd5};
    end
    evr_dbnc[11][15] = 16'd0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // ---- start-up: links come up, acknowledge the FBI latch ----
    cycles(2000);
    master_ack();
    cycles(1000);
    chk(evr_com_ok == '1 && f_dn_com_ok && m_port_com_ok == 8'hBF, "all links up");
    n = 0;
    for (int e = 0; e < NE; e++) if (evr_sys_flags[e] == 17'h1FFFF) n++;
    chk(n == NE, $sformatf("%0d EVRs see all flags OK", n));
    for (int e = 0; e < NE; e++) while (evr_log_not_empty[e]) begin
      evr_log_rd_en[e] = 1; @(negedge clk); evr_log_rd_en[e] = 0;
    end
    clear_hi(); seq(8'h30); cycles(20);
    chk(pulsed(0) == NE && pulsed(1) == NE, "trigger reaches every EVR with flags OK");
    n = 0;
    for (int e = 0; e < NE; e++) if (evr_out[e][2]) n++;
    chk(n == NE, "mirror outputs high");
    n_mirror += n;

    // ---- Beam Permit trip: input 0 of EVR 9 (behind the fan-out) ----
    evr_in[9][0] = 0;
    lat = 0;
    while (evr_out[2][2] && lat < 10000) begin @(negedge clk); lat++; end
    chk(lat < 3000, $sformatf("BP input-to-output latency %0d cycles (%0d ns)", lat, lat * 10));
    if (lat > max_latency) max_latency = lat;
    cycles(50);
    n = 0;
    for (int e = 0; e < NE; e++) if (!evr_out[e][2] && !evr_sys_flags[e][0]) n++;
    chk(n == NE, "every EVR sees flag 0 in fault");
    n_mirror += n;
    clear_hi(); seq(8'h30); cycles(20);
    chk(pulsed(0) == 0 && pulsed(1) == NE, "flag 0 blocks output 0 only");
    n_gated += NE;
    chk(evr_log_not_empty[9] && evr_log_rd_data[9][0] == 1'b0, "input change logged at EVR 9");
    if (evr_log_not_empty[9]) n_log++;
    // extension disabled on EVR 4: stock behaviour despite the fault
    evr_ext_en[4] = 0;
    clear_hi(); seq(8'h30); cycles(20);
    chk(hi[4][0] == 5 && hi[3][0] == 0, "bypass on the EVR with the extension disabled");
    n_bypass++;
    evr_ext_en[4] = 1;
    evr_in[9][0] = 1;
    cycles(1500);
    chk(m_flags[0] && evr_sys_flags[2][0], "BP flag recovers without acknowledge");
    clear_hi(); seq(8'h30); cycles(20);
    chk(pulsed(0) == NE, "gated outputs released");
    n_bp++;

    // ---- debounce: a 6-cycle glitch on EVR 5 never reaches the master ----
    evr_in[5][0] = 0; cycles(6); evr_in[5][0] = 1;
    n = 0;
    repeat (1500) begin @(negedge clk); if (!m_global_flags[0]) n++; end
    chk(n == 0, "glitch rejected by the debouncer");
    n_glitch++;

    // ---- Fast Beam Interrupt: short fault on EVR 0 input 1 ----
    clear_hi();
    evr_in[0][1] = 0; cycles(300); evr_in[0][1] = 1;
    cycles(1500);
    chk(!m_flags[1] && m_latched[1] && m_global_flags[1], "FBI flag held after the fault cleared");
    n = 0;
    for (int e = 0; e < NE; e++) if (hi[e][3] == 5) n++;
    chk(n == NE, $sformatf("postmortem event 0x60 fired the pulser at %0d EVRs", n));
    if (n == NE) n_pm++;
    clear_hi(); seq(8'h30); cycles(20);
    chk(pulsed(1) == 0 && pulsed(0) == NE, "latched FBI flag blocks output 1");
    master_ack();
    cycles(1000);
    clear_hi(); seq(8'h30); cycles(20);
    chk(pulsed(1) == NE, "FBI flag released after acknowledge");
    n_fbi++;

    // ---- broken EVR fiber (EVR 10, behind the fan-out) ----
    fiber_ok[10] = 0;
    cycles(1500);
    chk(!evr_com_ok[10] && !f_port_com_ok[4], "broken fiber detected at both ends");
    chk(!m_flags[16] && !m_flags[0], "broken fiber faults Com and the flags at the master");
    n = 0;
    for (int e = 0; e < NE; e++) if (!evr_out[e][2]) n++;
    chk(n == NE, "every mirror output drops on the broken fiber");
    fiber_ok[10] = 1;
    cycles(2000);
    master_ack();
    cycles(1000);
    chk(evr_com_ok[10] && m_flags == 17'h1FFFF, "network recovers after the fiber is back");
    n_evr_link++;

    // ---- broken fan-out fiber ----
    fiber_ok[NE] = 0;
    cycles(1500);
    n = 0;
    for (int e = NM; e < NE; e++) if (!evr_com_ok[e]) n++;
    chk(n == NE - NM && !m_port_com_ok[7] && !m_flags[16], "fan-out fiber loss seen by its EVRs and the master");
    fiber_ok[NE] = 1;
    cycles(2000);
    master_ack();
    cycles(1000);
    chk(evr_com_ok == '1 && m_flags == 17'h1FFFF, "recovered from fan-out fiber loss");
    n_fo_link++;

    // ---- data buffers: 40 bytes up from EVR 3, 20 bytes down from the master ----
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          @(negedge clk); evr_d_valid[3] = 1; evr_d_byte[3] = 8'(i); evr_d_last[3] = (i == 39);
          @(posedge clk); while (!evr_d_ready[3]) @(posedge clk);
          n_dbuf++;
        end
        @(negedge clk); evr_d_valid[3] = 0;
      end
      begin
        for (int i = 0; i < 20; i++) begin
          @(negedge clk); m_d_valid = 1; m_d_byte = 8'(i); m_d_last = (i == 19);
          @(posedge clk); while (!m_d_ready) @(posedge clk);
          n_dbuf++;
        end
        @(negedge clk); m_d_valid = 0;
      end
    join
    cycles(1000);
    chk(n_dbuf == 60 && m_flags == 17'h1FFFF && evr_com_ok == '1, "data buffers sent without disturbing the flags");

    // ---- PPS: every EVR advances its seconds on the same event ----
    @(negedge clk); pps = 1; cycles(10); pps = 0;
    cycles(50);
    n = 0;
    for (int e = 0; e < NE; e++) if (evr_ts_sec[e] == 1) n++;
    chk(n == NE, "seconds advanced at every EVR");
    n = 0;
    for (int e = 1; e < NM; e++) if (evr_ts_ticks[e] == evr_ts_ticks[0]) n++;
    for (int e = NM + 1; e < NE; e++) if (evr_ts_ticks[e] == evr_ts_ticks[NM]) n++;
    chk(n == NE - 2, "ticks equal among the EVRs of each hop");
    n_pps++;

    // ---- log overflow on EVR 11: input 15 (no debounce) toggled 1200 times ----
    for (int i = 0; i < 1200; i++) begin evr_in[11][15] = ~evr_in[11][15]; cycles(4); end
    evr_in[11][15] = 1;
    cycles(20);
    chk(evr_log_overflow[11], "log overflow flagged");
    n = 0;
    while (evr_log_not_empty[11] && n < 2000) begin evr_log_rd_en[11] = 1; @(negedge clk); n++; end
    evr_log_rd_en[11] = 0;
    chk(n == 512, $sformatf("%0d entries kept (buffer depth 512)", n));
    n_log += n;
    evr_in[11][14] = 0; cycles(30);
    chk(!evr_log_not_empty[11], "no writes while overflow is set");
    @(negedge clk); evr_log_ovf_clear[11] = 1; @(negedge clk); evr_log_ovf_clear[11] = 0;
    evr_in[11][14] = 1; cycles(30);
    chk(evr_log_not_empty[11] && !evr_log_overflow[11], "logging resumes after clear");
    n_ovf++;

    // ---- every mechanism happened ----
    chk(n_bp > 0, "BP trip"); chk(n_fbi > 0, "FBI latch"); chk(n_pm > 0, "postmortem");
    chk(n_glitch > 0, "debounce"); chk(n_evr_link > 0, "EVR fiber loss"); chk(n_fo_link > 0, "fan-out fiber loss");
    chk(n_log > 0, "logging"); chk(n_ovf > 0, "log overflow"); chk(n_dbuf > 0, "data buffer");
    chk(n_pps > 0, "PPS"); chk(n_mirror > 0, "mirror"); chk(n_bypass > 0, "bypass"); chk(n_gated > 0, "gating");
    $display("mechanisms: bp=%0d fbi=%0d postmortem=%0d glitch=%0d evr_link=%0d fanout_link=%0d log=%0d overflow=%0d dbuf_bytes=%0d pps=%0d mirror=%0d bypass=%0d gated=%0d",
             n_bp, n_fbi, n_pm, n_glitch, n_evr_link, n_fo_link, n_log, n_ovf, n_dbuf, n_pps, n_mirror, n_bypass, n_gated);
    $display("worst BP input-to-output latency %0d cycles = %0d ns (limit 30000 ns)", max_latency, max_latency * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
