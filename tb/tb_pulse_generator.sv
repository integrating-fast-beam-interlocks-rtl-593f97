// tb_pulse_generator - sends event codes and checks, for each pulser, that
// its output rises exactly delay+1 cycles after its event and stays high for
// exactly `width` cycles; a disabled pulser (code 0) never fires.
module tb_pulse_generator;
  import fbi_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst = 1;
  logic [7:0] evt;
  pulser_cfg_t [NP-1:0] cfg;
  logic [NP-1:0] pulse;
  int checks = 0, failures = 0;

  pulse_generator #(.N_PULSERS(NP)) dut (.clk, .rst, .evt, .cfg, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fire(int p);
    int rise, len;
    @(negedge clk);
    evt = cfg[p].code;
    @(negedge clk);
    evt = 0;
    rise = 1;   // cycles since the edge that took the event
    while (!pulse[p] && rise < 500) begin @(negedge clk); rise++; end
    len = 0;
    while (pulse[p] && len < 500) begin @(negedge clk); len++; end
    checks++;
    if (rise != int'(cfg[p].delay) + 1 || len != int'(cfg[p].width)) begin
      failures++;
      $display("pulser %0d: rise after %0d (exp %0d), width %0d (exp %0d)", p, rise, cfg[p].delay + 1, len, cfg[p].width);
    end
  endtask

  initial begin
    evt = 0;
    cfg[0] = '{code: 8'h10, delay: 32'd0,  width: 32'd1};
    cfg[1] = '{code: 8'h11, delay: 32'd7,  width: 32'd3};
    cfg[2] = '{code: 8'h12, delay: 32'd25, width: 32'd12};
    cfg[3] = '{code: 8'h00, delay: 32'd2,  width: 32'd2};
    repeat (2) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 5; r++)
      for (int p = 0; p < 3; p++) begin
        cfg[p].delay = $urandom_range(0, 40);
        cfg[p].width = $urandom_range(1, 30);
        fire(p);
      end
    // the disabled pulser ignores code 0 and everything else
    for (int c = 0; c < 50; c++) begin
      @(negedge clk);
      evt = 8'(c);
      checks++;
      if (pulse[3]) begin failures++; $display("disabled pulser fired"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
