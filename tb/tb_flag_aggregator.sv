// tb_flag_aggregator - random port vectors, enables and local flags against
// an independent per-flag reference (OK iff no enabled port and no local
// flag reports a fault), one cycle after the inputs.
module tb_flag_aggregator;
  import fbi_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst = 1;
  flagvec_t [NP-1:0] port_flags;
  logic [NP-1:0] port_en;
  flagvec_t local_flags, global_flags, exp_g;
  int checks = 0, failures = 0;

  flag_aggregator #(.N_PORTS(NP)) dut (.clk, .rst, .port_flags, .port_en, .local_flags, .global_flags);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_flags = '1; port_en = '0; local_flags = '1;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      port_en = NP'($urandom);
      local_flags = ($urandom_range(0, 3) == 0) ? flagvec_t'($urandom) : '1;
      for (int p = 0; p < NP; p++)
        for (int f = 0; f < FLAG_W; f++)
          port_flags[p][f] = ($urandom_range(0, 15) != 0);
      for (int f = 0; f < FLAG_W; f++) begin
        exp_g[f] = local_flags[f];
        for (int p = 0; p < NP; p++)
          if (port_en[p] && !port_flags[p][f]) exp_g[f] = 1'b0;
      end
      @(negedge clk);
      checks++;
      if (global_flags != exp_g) begin failures++; $display("got %h expected %h", global_flags, exp_g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
