// tb_input_flag_mapper - random inputs and mappings against an independent
// per-flag reference: a flag is OK iff no assigned input is in fault.
module tb_input_flag_mapper;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  logic [N-1:0] in_ok;
  logic [N-1:0][15:0] in_map;
  logic [15:0] flags, exp_f;
  int checks = 0, failures = 0;

  input_flag_mapper #(.N_IN(N)) dut (.clk, .rst, .in_ok, .in_map, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_ok = '1;
    in_map = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // sparse inputs faults and sparse mappings so both outcomes occur
      for (int i = 0; i < N; i++) begin
        in_ok[i] = ($urandom_range(0, 3) != 0);
        in_map[i] = 16'($urandom) & 16'($urandom) & 16'($urandom);
      end
      if (t == 0) in_map = '0;  // nothing assigned: all flags permanently OK
      exp_f = '1;
      for (int f = 0; f < 16; f++)
        for (int i = 0; i < N; i++)
          if (in_map[i][f] && !in_ok[i]) exp_f[f] = 1'b0;
      @(negedge clk);
      checks++;
      if (flags !== exp_f) begin
        failures++;
        $display("t=%0d flags=%h expected %h", t, flags, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
