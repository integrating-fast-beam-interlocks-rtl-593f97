// tb_flag_msg_rx - feeds hand-built flag messages, mixed with idle and
// data-buffer traffic, into the receiver. Checks: no com_ok before the first
// valid message; the decoded flags; the timeout window (com_ok drops exactly
// `timeout`+1 cycles after the edge that took the last good end marker); a bad checksum, a broken
// frame and a link-down each raise the error at once and count in err_count;
// flags_safe is all-fault while com_ok is low; recovery on the next message.
module tb_flag_msg_rx;
  import fbi_pkg::*;
  logic clk = 0, rst = 1;
  link_t link;
  logic [15:0] timeout;
  logic com_ok, msg_stb;
  flagvec_t flags_raw, flags_safe;
  logic [15:0] err_count;
  int checks = 0, failures = 0;

  flag_msg_rx #(.TW(16)) dut (.clk, .rst, .link, .timeout, .com_ok, .flags_raw, .flags_safe, .msg_stb, .err_count);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic k, logic [7:0] b);
    @(negedge clk);
    link = '{up: 1'b1, evt: 8'h00, dk: k, dbyte: b};
  endtask

  task automatic idle(int n);
    repeat (n) put(1'b1, 8'hBC);
  endtask

  // send one message; corrupt: 0 none, 1 checksum, 2 missing end marker
  task automatic send(logic [16:0] f, int corrupt);
    logic [7:0] b0, b1, b2, c;
    b0 = f[7:0]; b1 = f[15:8]; b2 = {7'b0, f[16]};
    c = 8'(255 - ((int'(b0) + int'(b1) + int'(b2)) % 256));
    if (corrupt == 1) c = c ^ 8'h10;
    put(1'b1, 8'h5C); put(1'b0, b0); put(1'b0, b1); put(1'b0, b2); put(1'b0, c);
    if (corrupt == 2) put(1'b1, 8'hBC); else put(1'b1, 8'h7C);
    idle(1);
  endtask

  task automatic expect_state(logic ok, logic [16:0] f, string what);
    checks++;
    if (com_ok != ok || (ok && (flags_raw != f || flags_safe != f)) || (!ok && flags_safe != 0)) begin
      failures++;
      $display("%s: com_ok=%0d flags=%h safe=%h expected ok=%0d flags=%h", what, com_ok, flags_raw, flags_safe, ok, f);
    end
  endtask

  initial begin
    logic [16:0] f;
    int n, e0;
    link = '{up: 1'b1, evt: 8'h00, dk: 1'b1, dbyte: 8'hBC};
    timeout = 16'd100;
    repeat (2) @(posedge clk);
    rst = 0;
    idle(20);
    expect_state(1'b0, '0, "before first message");
    for (int t = 0; t < 30; t++) begin
      f = 17'($urandom);
      send(f, 0);
      expect_state(1'b1, f, "good message");
      // a data-buffer segment whose payload looks like markers as data bytes
      put(1'b1, 8'h1C); put(1'b0, 8'h5C); put(1'b0, 8'h7C); put(1'b1, 8'h3C);
      idle($urandom_range(0, 40));
      expect_state(1'b1, f, "after other traffic");
    end
    // timeout: count cycles from the last good message to com_ok falling
    f = 17'h1ABCD;
    send(f, 0);
    n = 0;
    while (com_ok && n < 1000) begin idle(1); n++; end
    checks++;
    // n counts event-clock cycles from the edge that took the good end marker
    if (n != int'(timeout) + 1) begin failures++; $display("timeout after %0d cycles", n); end
    expect_state(1'b0, f, "timed out");
    send(f, 0);
    expect_state(1'b1, f, "recovered");
    // bad checksum
    e0 = err_count;
    send(17'h0, 1);
    expect_state(1'b0, f, "bad checksum");
    checks++;
    if (err_count != 16'(e0 + 1)) begin failures++; $display("err_count %0d expected %0d", err_count, e0 + 1); end
    send(f, 0);
    expect_state(1'b1, f, "recovered 2");
    // broken frame
    send(17'h0, 2);
    expect_state(1'b0, f, "bad frame");
    send(f, 0);
    expect_state(1'b1, f, "recovered 3");
    // link down
    @(negedge clk);
    link.up = 1'b0;
    @(negedge clk);
    expect_state(1'b0, f, "link down");
    idle(3);
    send(~f, 0);
    expect_state(1'b1, ~f, "link back");
    checks++;
    if (err_count != 16'(e0 + 3)) begin failures++; $display("err_count %0d expected %0d", err_count, e0 + 3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
