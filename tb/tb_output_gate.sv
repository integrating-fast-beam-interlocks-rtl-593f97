// tb_output_gate - random pulser levels, flag vectors and per-output
// configuration against a reference of the three output modes and the
// extension bypass; counts that gating, mirroring and bypass all occurred.
module tb_output_gate;
  import fbi_pkg::*;
  localparam int NO = 18, NS = 16;
  logic clk = 0, rst = 1;
  logic [NS-1:0] src;
  logic [NO-1:0][3:0] out_src;
  out_mode_e [NO-1:0] out_mode;
  flagvec_t [NO-1:0] out_map;
  flagvec_t flags;
  logic ext_en;
  logic [NO-1:0] outs, gate_ok, exp_o, exp_ok;
  int checks = 0, failures = 0, n_blocked = 0, n_mirror = 0, n_bypass = 0;

  output_gate #(.N_OUT(NO), .N_SRC(NS)) dut (.clk, .rst, .src, .out_src, .out_mode, .out_map, .flags, .ext_en, .outs, .gate_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = '0; out_src = '0; out_mode = '{default: OUT_STOCK}; out_map = '0; flags = '1; ext_en = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      src = NS'($urandom);
      ext_en = ($urandom_range(0, 4) != 0);
      for (int f = 0; f < FLAG_W; f++) flags[f] = ($urandom_range(0, 7) != 0);
      if (t % 50 == 0)
        for (int k = 0; k < NO; k++) begin
          out_src[k] = 4'($urandom);
          out_mode[k] = out_mode_e'($urandom_range(0, 2));
          out_map[k] = '0;
          repeat ($urandom_range(0, 3)) out_map[k][$urandom_range(0, FLAG_W - 1)] = 1'b1;
        end
      for (int k = 0; k < NO; k++) begin
        exp_ok[k] = 1'b1;
        for (int f = 0; f < FLAG_W; f++) if (out_map[k][f] && !flags[f]) exp_ok[k] = 1'b0;
        if (!ext_en) begin exp_o[k] = src[out_src[k]]; n_bypass++; end
        else if (out_mode[k] == OUT_GATED) begin
          exp_o[k] = src[out_src[k]] && exp_ok[k];
          if (src[out_src[k]] && !exp_ok[k]) n_blocked++;
        end else if (out_mode[k] == OUT_MIRROR) begin exp_o[k] = exp_ok[k]; n_mirror++; end
        else exp_o[k] = src[out_src[k]];
      end
      @(negedge clk);
      checks++;
      if (outs != exp_o || gate_ok != exp_ok) begin
        failures++; $display("t=%0d outs=%h exp=%h gate=%h exp=%h", t, outs, exp_o, gate_ok, exp_ok);
      end
    end
    checks++;
    if (n_blocked == 0 || n_mirror == 0 || n_bypass == 0) begin failures++; $display("a mode never exercised"); end
    $display("blocked pulses %0d, mirror %0d, bypass %0d", n_blocked, n_mirror, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
