// tb_input_debouncer - checks the debounce latency (2 sync + dbnc_time + 1
// cycles) for several debounce times, both edges, and that glitches shorter
// than the debounce time never reach the output.
module tb_input_debouncer;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] raw;
  logic [N-1:0][15:0] dt;
  logic [N-1:0] clean;
  int checks = 0, failures = 0;

  input_debouncer #(.N_IN(N), .CW(16)) dut (.clk, .rst, .raw, .dbnc_time(dt), .clean);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int i, logic v);
    int n;
    @(negedge clk);
    raw[i] = v;
    n = 0;
    while (clean[i] != v && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (n != 3 + int'(dt[i])) begin
      failures++;
      $display("input %0d -> %0d after %0d cycles, expected %0d", i, v, n, 3 + int'(dt[i]));
    end
  endtask

  task automatic glitch(int i, int len);
    logic v0;
    v0 = clean[i];
    @(negedge clk);
    raw[i] = ~v0;
    repeat (len) @(negedge clk);
    raw[i] = v0;
    repeat (40) begin
      @(negedge clk);
      checks++;
      if (clean[i] != v0) begin failures++; $display("glitch of %0d passed on input %0d", len, i); end
    end
  endtask

  initial begin
    raw = '0;
    dt  = {16'd5, 16'd10, 16'd3, 16'd0};
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      step(i, 1'b1);
      step(i, 1'b0);
      step(i, 1'b1);
    end
    // glitches one cycle shorter than the debounce window are rejected
    glitch(1, 2);          // dt=3: 3-cycle window
    glitch(2, 10);         // dt=10
    glitch(3, 5);          // dt=5
    // a glitch exactly as long as the window passes
    @(negedge clk);
    raw[2] = 1'b0;
    repeat (11) @(negedge clk);
    raw[2] = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (clean[2] != 1'b0) begin failures++; $display("11-cycle low on dt=10 not accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
