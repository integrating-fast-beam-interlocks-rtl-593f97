// tb_evr_gateway - one event receiver between a model master (tb_flag_sender
// driving its downstream fiber) and a decoder of its upstream fiber
// (tb_flag_monitor). Checks: input fault reaches the upstream message within
// the bound 2 + debounce + 1 + period + 8 cycles; a downstream flag fault
// blocks a gated output but not a stock one; a mirror output follows its
// flags; a broken downstream fiber clears com_ok, blocks gated outputs and
// is reported as Com fault upstream; the extension disable restores stock
// outputs; input changes are logged with the input snapshot; data-buffer
// traffic is segmented while flag messages keep flowing.
module tb_evr_gateway;
  import fbi_pkg::*;
  localparam int NI = 16, NO = 18, NPU = 16, LW = 64 + NI + NO;
  logic clk = 0, rst = 1;
  link_t dn_in, up_out;
  logic [NI-1:0] in_raw;
  logic [NO-1:0] outs;
  logic [NI-1:0][15:0] cfg_dbnc;
  logic [NI-1:0][15:0] cfg_in_map;
  logic [NI-1:0] cfg_in_log;
  logic [NO-1:0][3:0] cfg_out_src;
  out_mode_e [NO-1:0] cfg_out_mode;
  flagvec_t [NO-1:0] cfg_out_map;
  logic [NO-1:0] cfg_out_log;
  logic cfg_ext_en;
  logic cfg_fs_en;
  logic [15:0] cfg_tx_period, cfg_rx_timeout;
  pulser_cfg_t [NPU-1:0] cfg_pulser;
  logic sec_load; logic [31:0] sec_value;
  logic d_valid, d_ready, d_last; logic [7:0] d_byte;
  logic log_rd_en, log_not_empty, log_overflow, log_ovf_clear;
  logic [LW-1:0] log_rd_data;
  flagvec_t local_flags, sys_flags;
  logic com_ok; logic [15:0] rx_err_count; logic [31:0] ts_sec, ts_ticks;
  int checks = 0, failures = 0;

  // far end
  logic s_up; logic [16:0] s_flags; logic [7:0] s_evt;
  logic [16:0] m_flags; int m_good, m_bad, m_dbuf, m_last;

  tb_flag_sender u_snd (.clk, .up(s_up), .flags(s_flags), .period(50), .evt(s_evt), .link(dn_in));
  tb_flag_monitor u_mon (.clk, .link(up_out), .flags(m_flags), .n_good(m_good), .n_bad(m_bad), .n_dbuf(m_dbuf), .last_good_cycle(m_last));

  evr_gateway dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fire the pulser event and count high cycles on outputs 0 and 2
  task automatic fire(output int h0, output int h2);
    h0 = 0; h2 = 0;
    @(negedge clk); s_evt = 8'h20;
    @(negedge clk); s_evt = 8'h00;
    repeat (30) begin @(negedge clk); h0 += outs[0]; h2 += outs[2]; end
  endtask

  initial begin
    int h0, h2, n;
    in_raw = '1;
    for (int i = 0; i < NI; i++) begin cfg_dbnc[i] = 16'd10; cfg_in_map[i] = 16'(1) << i; end
    cfg_in_log = '1; cfg_out_log = '1;
    cfg_out_src = '0; cfg_out_mode = '{default: OUT_STOCK}; cfg_out_map = '0;
    cfg_out_mode[0] = OUT_GATED;  cfg_out_map[0] = 17'h00001;
    cfg_out_mode[1] = OUT_MIRROR; cfg_out_map[1] = 17'h10002;
    cfg_ext_en = 1; cfg_fs_en = 1; cfg_tx_period = 16'd50; cfg_rx_timeout = 16'd200;
    cfg_pulser = '0; cfg_pulser[0] = '{code: 8'h20, delay: 32'd5, width: 32'd4};
    sec_load = 0; sec_value = 0; d_valid = 0; d_last = 0; d_byte = 0;
    log_rd_en = 0; log_ovf_clear = 0;
    s_up = 1; s_flags = '1; s_evt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (400) @(negedge clk);
    chk(com_ok && sys_flags == '1, "link up, system flags OK");
    chk(m_flags == 17'h1FFFF && m_good > 3, "upstream message all OK with Com");
    chk(outs[1] == 1'b1, "mirror output high while its flags are OK");
    fire(h0, h2);
    chk(h0 == 4 && h2 == 4, $sformatf("pulses pass when OK (%0d, %0d)", h0, h2));
    // drain the start-up log entries
    log_rd_en = 1; while (log_not_empty) @(negedge clk); log_rd_en = 0;
    // input 3 fault: upstream latency
    in_raw[3] = 0;
    n = 0;
    while (m_flags[3] && n < 1000) begin @(negedge clk); n++; end
    chk(n <= 2 + 10 + 1 + 50 + 8, $sformatf("input fault upstream after %0d cycles", n));
    chk(m_flags == 17'h1FFF7, "only flag 3 in fault upstream");
    chk(log_not_empty && log_rd_data[3] == 1'b0 && log_rd_data[NI-1:0] == 16'hFFF7, "input change logged with snapshot");
    @(negedge clk); log_rd_en = 1; @(negedge clk); log_rd_en = 0;
    // a 4-cycle glitch on input 5 is rejected
    in_raw[5] = 0; repeat (4) @(negedge clk); in_raw[5] = 1;
    repeat (120) @(negedge clk);
    chk(m_flags == 17'h1FFF7, "glitch shorter than debounce rejected");
    // downstream flag 0 fault: gated output blocked, stock output not
    s_flags = 17'h1FFFE;
    repeat (120) @(negedge clk);
    fire(h0, h2);
    chk(h0 == 0 && h2 == 4, $sformatf("gated output blocked by flag fault (%0d, %0d)", h0, h2));
    chk(outs[1] == 1'b1, "mirror unaffected by an unassigned flag");
    // extension disabled: stock behaviour
    cfg_ext_en = 0;
    fire(h0, h2);
    chk(h0 == 4, "bypass when extension disabled");
    cfg_ext_en = 1;
    s_flags = 17'h1FFFD;  // flag 1 fault: mirror goes low
    repeat (120) @(negedge clk);
    chk(outs[1] == 1'b0, "mirror shows flag fault");
    s_flags = '1;
    repeat (120) @(negedge clk);
    chk(outs[1] == 1'b1, "mirror recovers");
    // broken downstream fiber
    s_up = 0;
    repeat (20) @(negedge clk);
    chk(!com_ok && sys_flags == '0, "link down: comFlag raised, flags all-fault");
    chk(outs[1] == 1'b0, "mirror low while link down");
    repeat (120) @(negedge clk);
    chk(m_flags[16] == 1'b0, "upstream Com bit reports the broken link");
    fire(h0, h2);
    chk(h0 == 0, "gated output blocked while link down");
    s_up = 1;
    repeat (200) @(negedge clk);
    chk(com_ok && m_flags[16] == 1'b1 && rx_err_count != 0, "link recovers, error counted");
    // upstream data buffer of 40 bytes
    n = m_dbuf;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d_valid = 1; d_byte = 8'(i); d_last = (i == 39);
      while (!d_ready) @(negedge clk);
    end
    @(negedge clk); d_valid = 0; d_last = 0;
    repeat (200) @(negedge clk);
    chk(m_dbuf - n == 3, $sformatf("40-byte buffer in %0d segments", m_dbuf - n));
    // fail-safe protocol off: no flag messages, the buffer goes out whole
    cfg_fs_en = 0;
    repeat (60) @(negedge clk);
    n = m_dbuf; h0 = m_good;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d_valid = 1; d_byte = 8'(i); d_last = (i == 39);
      while (!d_ready) @(negedge clk);
    end
    @(negedge clk); d_valid = 0; d_last = 0;
    repeat (200) @(negedge clk);
    chk(m_dbuf - n == 1, $sformatf("protocol off: 40-byte buffer in %0d segments", m_dbuf - n));
    chk(m_good == h0, "protocol off: no flag messages sent");
    cfg_fs_en = 1;
    repeat (200) @(negedge clk);
    chk(m_good > h0, "protocol on again: flag messages resume");
    chk(m_bad == 0, "no corrupt flag message upstream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
