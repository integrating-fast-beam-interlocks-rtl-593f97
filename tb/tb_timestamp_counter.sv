// tb_timestamp_counter - checks ticks counting, the seconds marker event
// (seconds + 1, ticks cleared), other events ignored, and the seconds load.
module tb_timestamp_counter;
  logic clk = 0, rst = 1;
  logic [7:0] evt;
  logic sec_load;
  logic [31:0] sec_value, sec, ticks;
  int checks = 0, failures = 0;

  timestamp_counter dut (.clk, .rst, .evt, .sec_load, .sec_value, .sec, .ticks);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_t, gap;
    evt = 0; sec_load = 0; sec_value = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    exp_s = 0; exp_t = 0;
    for (int s = 0; s < 20; s++) begin
      gap = $urandom_range(5, 200);
      for (int c = 0; c < gap; c++) begin
        @(negedge clk);
        evt = ($urandom_range(0, 9) == 0) ? 8'h20 : 8'h00;
        exp_t++;
        checks++;
        if (ticks != 32'(exp_t) || sec != 32'(exp_s)) begin
          failures++; $display("sec %0d ticks %0d expected %0d %0d", sec, ticks, exp_s, exp_t);
        end
      end
      evt = 8'h7D;
      @(negedge clk);
      evt = 0;
      exp_s++; exp_t = 0;
      checks++;
      if (ticks != 0 || sec != 32'(exp_s)) begin failures++; $display("marker: sec %0d ticks %0d", sec, ticks); end
      exp_t = 0;
      // exp_t tracks ticks seen at each following negedge
    end
    @(negedge clk);
    sec_load = 1; sec_value = 32'd1750155477;
    @(negedge clk);
    sec_load = 0;
    checks++;
    if (sec != 32'd1750155477) begin failures++; $display("seconds load failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
