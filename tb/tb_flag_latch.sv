// tb_flag_latch - random fault patterns, modes and acknowledges against a
// reference model of Beam Permit (follow) and Fast Beam Interrupt (hold a
// fault until an acknowledge arrives while the input is OK) flags.
module tb_flag_latch;
  import fbi_pkg::*;
  logic clk = 0, rst = 1;
  flagvec_t flags_in, fbi_mode, ack, flags_out, latched;
  flagvec_t m_lat, exp_out;
  int checks = 0, failures = 0, n_held = 0, n_ack = 0;

  flag_latch dut (.clk, .rst, .flags_in, .fbi_mode, .ack, .flags_out, .latched);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags_in = '1; fbi_mode = 17'h0F0F5; ack = '0; m_lat = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t == 1500) fbi_mode = 17'h1A5A0;
      for (int f = 0; f < FLAG_W; f++) begin
        flags_in[f] = ($urandom_range(0, 19) != 0);
        ack[f]      = ($urandom_range(0, 9) == 0);
      end
      // reference
      for (int f = 0; f < FLAG_W; f++) begin
        if (!fbi_mode[f]) m_lat[f] = 1'b0;
        else if (!flags_in[f]) m_lat[f] = 1'b1;
        else if (ack[f]) begin if (m_lat[f]) n_ack++; m_lat[f] = 1'b0; end
        exp_out[f] = flags_in[f] && !m_lat[f];
        if (flags_in[f] && m_lat[f]) n_held++;
      end
      @(negedge clk);
      ack = '0;
      checks++;
      if (flags_out != exp_out || latched != m_lat) begin
        failures++; $display("t=%0d out=%h exp=%h latched=%h exp=%h", t, flags_out, exp_out, latched, m_lat);
      end
    end
    checks++;
    if (n_held == 0 || n_ack == 0) begin failures++; $display("latch never exercised"); end
    $display("held-by-latch cycles %0d, acknowledged latches %0d", n_held, n_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
