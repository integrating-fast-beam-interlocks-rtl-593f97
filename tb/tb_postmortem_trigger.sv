// tb_postmortem_trigger - drops flags (enabled and not enabled) and checks:
// one pm_pulse per falling edge of an enabled flag and none otherwise; after
// a pulse, every armed (non-zero) code appears exactly once in the event
// stream, in register order, only in cycles where the sequencer was silent;
// sequencer events always pass unchanged.
module tb_postmortem_trigger;
  import fbi_pkg::*;
  logic clk = 0, rst = 1;
  flagvec_t flags, pm_en;
  logic [7:0][7:0] pm_codes;
  logic [7:0] seq_evt, evt_out, seq_q;
  logic pm_pulse;
  int checks = 0, failures = 0, n_pulse = 0, n_exp_pulse = 0;
  logic [7:0] expq [$];

  postmortem_trigger #(.N_PM_EVT(8)) dut (.clk, .rst, .flags, .pm_en, .pm_codes, .seq_evt, .evt_out, .pm_pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    seq_q <= seq_evt;
    if (!rst) begin
      if (pm_pulse) begin
        n_pulse++;
        for (int i = 0; i < 8; i++) if (pm_codes[i] != 0) expq.push_back(pm_codes[i]);
      end
    end
  end

  // output check, sampled mid-cycle: evt_out reflects the previous cycle's slot
  always @(negedge clk) begin
    if (!rst && $time > 40) begin
      if (seq_q != 0) begin
        checks++;
        if (evt_out != seq_q) begin failures++; $display("sequencer event %h lost (got %h)", seq_q, evt_out); end
      end else if (evt_out != 0) begin
        checks++;
        if (expq.size() == 0 || evt_out != expq[0]) begin
          failures++; $display("unexpected event %h", evt_out);
        end else void'(expq.pop_front());
      end
    end
  end

  initial begin
    flags = '1; pm_en = 17'h00013; seq_evt = 0;
    pm_codes = {8'h00, 8'h47, 8'h00, 8'h46, 8'h45, 8'h00, 8'h44, 8'h43};
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      int f;
      f = $urandom_range(0, 16);
      @(negedge clk);
      flags[f] = 1'b0;
      if (pm_en[f]) n_exp_pulse++;
      // sequencer busy for a few cycles with random codes
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        seq_evt = ($urandom_range(0, 2) == 0) ? 8'($urandom_range(1, 63)) : 8'h00;
      end
      @(negedge clk);
      seq_evt = 0;
      flags = '1;
      repeat (10) @(negedge clk);
      checks++;
      if (expq.size() != 0) begin failures++; $display("%0d codes never sent", expq.size()); expq.delete(); end
    end
    checks++;
    if (n_pulse != n_exp_pulse || n_pulse == 0) begin failures++; $display("pulses %0d expected %0d", n_pulse, n_exp_pulse); end
    $display("postmortem pulses %0d", n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
