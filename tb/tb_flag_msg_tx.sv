// tb_flag_msg_tx - collects the transmitter's byte stream, checks the frame
// (start marker, payload, inverted-sum checksum, end marker, K flags), that
// the payload equals the flags presented when the message was made, and that
// messages start every `period` cycles when the slot is free. A second phase
// stalls m_ready at random and checks the bytes still come out in order.
module tb_flag_msg_tx;
  import fbi_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] period;
  logic enable;
  flagvec_t flags, exp_flags;
  logic m_valid, m_ready, m_k, m_last;
  logic [7:0] m_byte;
  int checks = 0, failures = 0;
  int n_msgs = 0, last_start = -1, cyc = 0;
  logic [7:0] buf_b [6];
  logic       buf_k [6];
  int idx = 0;
  flagvec_t hist [$];
  bit check_spacing;

  flag_msg_tx #(.PW(16)) dut (.clk, .rst, .enable, .period, .flags, .m_valid, .m_ready, .m_byte, .m_k, .m_last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference checksum, written independently of the package
  function automatic logic [7:0] ref_chk(logic [7:0] a, logic [7:0] b, logic [7:0] c);
    int s;
    s = (int'(a) + int'(b) + int'(c)) % 256;
    return 8'(255 - s);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && m_valid && m_ready) begin
      if (idx == 0) begin
        if (check_spacing && last_start >= 0) begin
          checks++;
          if (cyc - last_start != int'(period)) begin
            failures++; $display("message spacing %0d, expected %0d", cyc - last_start, period);
          end
        end
        last_start = cyc;
      end
      buf_b[idx] = m_byte;
      buf_k[idx] = m_k;
      checks++;
      if (m_last != (idx == 5)) begin failures++; $display("m_last wrong at byte %0d", idx); end
      idx++;
      if (idx == 6) begin
        idx = 0;
        n_msgs++;
        checks++;
        if (!(buf_k[0] && buf_b[0] == 8'h5C && buf_k[5] && buf_b[5] == 8'h7C &&
              !buf_k[1] && !buf_k[2] && !buf_k[3] && !buf_k[4])) begin
          failures++; $display("bad framing");
        end
        checks++;
        if (buf_b[4] != ref_chk(buf_b[1], buf_b[2], buf_b[3])) begin failures++; $display("bad checksum"); end
        checks++;
        if ({buf_b[3][0], buf_b[2], buf_b[1]} != hist[0] || buf_b[3][7:1] != 0) begin
          failures++; $display("payload %h expected %h", {buf_b[3][0], buf_b[2], buf_b[1]}, hist[0]);
        end
        void'(hist.pop_front());
      end
    end
  end

  // record the flag vector at the cycle each message is made ready
  logic v_q = 0;
  always @(posedge clk) begin
    if (!rst && m_valid && !v_q) hist.push_back(flags_at_start);
    v_q <= rst ? 1'b0 : (m_valid && !(m_valid && m_ready && m_last));
  end
  flagvec_t flags_at_start, flags_prev;
  always @(posedge clk) flags_prev <= flags;
  assign flags_at_start = flags_prev;

  initial begin
    period = 16'd20;
    enable = 1'b1;
    flags = '0;
    m_ready = 1'b1;
    check_spacing = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t % 7 == 0) flags = flagvec_t'($urandom);
    end
    check_spacing = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      m_ready = ($urandom_range(0, 2) != 0);
      if (t % 5 == 0) flags = flagvec_t'($urandom);
    end
    @(negedge clk);
    m_ready = 1'b1;
    repeat (30) @(negedge clk);
    // protocol off: no new message starts
    enable = 1'b0;
    repeat (10) @(negedge clk);
    begin
      int n0;
      n0 = n_msgs;
      repeat (200) @(negedge clk);
      checks++;
      if (n_msgs != n0 || m_valid) begin failures++; $display("messages sent while disabled"); end
    end
    checks++;
    if (n_msgs < 40) begin failures++; $display("only %0d messages", n_msgs); end
    $display("messages: %0d", n_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
