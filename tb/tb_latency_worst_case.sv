// tb_latency_worst_case - the latency requirement as a workload: the full
// network at default size, with the upstream data slot of the faulting EVR
// and the master's downstream data slot saturated by data-buffer traffic.
// In 40 trials a random input of a random EVR behind the fan-out faults (or
// recovers) at a random moment; the time until the mirror outputs of all six
// EVRs on the master follow is measured. Every trial must stay within the
// 30 us requirement (3000 cycles) and within this design's computed bound of
// 375 cycles for 100-cycle message periods and 10-cycle debounce.
module tb_latency_worst_case;
  import fbi_pkg::*;
  localparam int NE = 12, NM = 6, NP = 8, NI = 16, NO = 18, NPU = 16, LW = 64 + NI + NO;
  localparam int BOUND = 375;
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
  int checks = 0, failures = 0, worst = 0, n_dbuf_up = 0, n_dbuf_dn = 0;

  fbi_timing_network dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // saturating data-buffer sources: 100-byte buffers back to back
  int cu = 0, cd = 0;
  always @(posedge clk) begin
    if (!rst) begin
      for (int e = 0; e < NE; e++)
        if (evr_d_valid[e] && evr_d_ready[e]) begin n_dbuf_up++; evr_d_byte[e] <= evr_d_byte[e] + 1; end
      if (m_d_valid && m_d_ready) begin n_dbuf_dn++; cd <= (cd + 1) % 100; end
    end
  end
  always_comb begin
    for (int e = 0; e < NE; e++) evr_d_last[e] = (evr_d_byte[e] % 100 == 99);
    m_d_last = (cd == 99);
  end

  function automatic bit all_master_evrs(logic v, int f);
    for (int e = 0; e < NM; e++) if (evr_out[e][f] != v) return 0;
    return 1;
  endfunction

  initial begin
    int src, inp, lat;
    logic v;
    fiber_ok = '1; seq_evt = 0; pps = 0;
    m_port_en = 8'hBF; m_fbi_mode = '0; m_pm_en = '0; m_ack = '0; m_pm_codes = '0;
    m_tx_period = 16'd100; m_rx_timeout = 16'd300;
    m_d_valid = 0; m_d_byte = 0;
    f_port_en = 8'h3F; f_tx_period = 16'd100; f_rx_timeout = 16'd300;
    evr_in = '1; evr_ext_en = '1; evr_fs_en = '1; m_fs_en = 1; f_fs_en = 1; evr_tx_period = 16'd100; evr_rx_timeout = 16'd300;
    evr_in_log = '0; evr_out_log = '0; evr_sec_load = '0; evr_sec_value = 0;
    evr_d_valid = '0; evr_d_byte = '0; evr_log_rd_en = '0; evr_log_ovf_clear = '0;
    for (int e = 0; e < NE; e++) begin
      for (int i = 0; i < NI; i++) begin evr_dbnc[e][i] = 16'd10; evr_in_map[e][i] = 16'(1) << i; end
      evr_out_src[e] = '0; evr_out_mode[e] = '{default: OUT_MIRROR}; evr_out_map[e] = '0;
      for (int k = 0; k < NI; k++) evr_out_map[e][k] = 17'(1) << k;   // output k mirrors flag k
      evr_pulser[e] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (2000) @(negedge clk);
    evr_d_valid = '1; m_d_valid = 1;
    repeat (500) @(negedge clk);
    checks++;
    if (m_flags != 17'h1FFFF || evr_com_ok != '1) begin failures++; $display("network not up under load"); end
    for (int t = 0; t < 40; t++) begin
      src = $urandom_range(NM, NE - 1);
      inp = $urandom_range(0, NI - 1);
      repeat ($urandom_range(0, 250)) @(negedge clk);
      // fault, then recovery, on the same input
      for (int ph = 0; ph < 2; ph++) begin
        v = (ph == 1);
        evr_in[src][inp] = v;
        lat = 0;
        while (!all_master_evrs(v, inp) && lat < 5000) begin @(negedge clk); lat++; end
        checks++;
        if (lat >= 3000 || lat > BOUND) begin
          failures++; $display("trial %0d: EVR %0d input %0d -> %0d took %0d cycles", t, src, inp, v, lat);
        end
        if (lat > worst) worst = lat;
        repeat ($urandom_range(400, 600)) @(negedge clk);
      end
    end
    checks++;
    if (n_dbuf_up < 10000 || n_dbuf_dn < 10000) begin failures++; $display("data-buffer load too low"); end
    checks++;
    if (m_port_err_count != '0 || evr_rx_err_count != '0) begin failures++; $display("link errors under load"); end
    $display("worst input-to-output latency %0d cycles = %0d ns (requirement 30000 ns, bound %0d cycles)", worst, worst * 10, BOUND);
    $display("data-buffer bytes: upstream %0d, downstream %0d", n_dbuf_up, n_dbuf_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
