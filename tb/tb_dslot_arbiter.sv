// tb_dslot_arbiter - drives a flag-message stream (period 40, 6 bytes) and a
// continuous data-buffer stream with long buffers into the arbiter. A
// monitor parses the data slot and checks: every flag message arrives whole
// and in order; data-buffer segments never exceed DBUF_MAX bytes and the
// concatenated data-buffer bytes equal what was offered; a flag message
// waits at most DBUF_MAX + 2 cycles for the slot.
module tb_dslot_arbiter;
  localparam int DMAX = 8;
  logic clk = 0, rst = 1;
  logic limit_en;
  logic f_valid, f_ready, f_k, f_last, d_valid, d_ready, d_last, dk;
  logic [7:0] f_byte, d_byte, dbyte;
  int checks = 0, failures = 0;
  int fidx = 0, fwait = 0, max_wait = 0, n_flag = 0, n_seg = 0, seglen = 0, in_seg = 0, in_flag = 0;
  logic [7:0] dsent [$];
  logic [7:0] fmsg_no = 0, fmsg_rx = 0;
  int dcount = 0;

  dslot_arbiter #(.DBUF_MAX(DMAX)) dut (.clk, .rst, .limit_en, .f_valid, .f_ready, .f_byte, .f_k, .f_last,
    .d_valid, .d_ready, .d_byte, .d_last, .dbyte, .dk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flag source: message "5C n n n n 7C" every 40 cycles
  int ftimer = 0;
  always_comb begin
    f_k    = (fidx == 0 || fidx == 5);
    f_last = (fidx == 5);
    f_byte = (fidx == 0) ? 8'h5C : (fidx == 5) ? 8'h7C : fmsg_no;
  end
  always @(posedge clk) begin
    if (rst) begin f_valid <= 0; fidx <= 0; end
    else begin
      ftimer <= ftimer + 1;
      if (f_valid && !f_ready && fidx == 0) fwait <= fwait + 1;
      if (f_valid && f_ready) begin
        if (fidx == 0) begin
          if (fwait > max_wait) max_wait = fwait;
          fwait <= 0;
        end
        if (f_last) begin f_valid <= 0; fidx <= 0; fmsg_no <= fmsg_no + 1; end
        else fidx <= fidx + 1;
      end
      if (ftimer % 40 == 0 && !f_valid) f_valid <= 1;
    end
  end

  // data-buffer source: buffers of 1..30 bytes back to back
  int dleft = 0;
  always @(posedge clk) begin
    if (rst) begin d_valid <= 0; dleft <= 0; end
    else begin
      if (d_valid && d_ready) begin
        dsent.push_back(d_byte);
        dleft <= dleft - 1;
        d_byte <= d_byte + 1;
        if (dleft == 1) d_valid <= 0;
      end else if (!d_valid) begin
        dleft <= $urandom_range(1, 30);
        d_valid <= 1;
      end
    end
  end
  assign d_last = (dleft == 1);

  // monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (dk && dbyte == 8'h1C) begin in_seg = 1; seglen = 0; end
      else if (dk && dbyte == 8'h3C) begin
        in_seg = 0; n_seg++;
        checks++;
        if (longest < seglen) longest = seglen;
        if ((limit_en && seglen > DMAX) || seglen == 0) begin failures++; $display("segment of %0d bytes", seglen); end
      end else if (dk && dbyte == 8'h5C) begin in_flag = 1; fidx_m = 0; end
      else if (dk && dbyte == 8'h7C) begin
        in_flag = 0; n_flag++;
        checks++;
        if (fidx_m != 4) begin failures++; $display("flag message with %0d bytes", fidx_m); end
        fmsg_rx = fmsg_rx + 1;
      end else if (!dk && in_flag) begin
        checks++;
        if (dbyte != fmsg_rx) begin failures++; $display("flag message %0d out of order", dbyte); end
        fidx_m++;
      end else if (!dk && in_seg) begin
        seglen++;
        checks++;
        if (dsent.size() == 0 || dbyte != dsent[0]) begin failures++; $display("data byte mismatch"); end
        else void'(dsent.pop_front());
        dcount++;
      end else if (!dk) begin
        failures++; $display("data byte outside any frame");
      end
    end
  end
  int fidx_m = 0;
  int longest = 0;

  initial begin
    d_byte = 0;
    limit_en = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (5000) @(posedge clk);
    checks++;
    if (longest != DMAX) begin failures++; $display("longest segment %0d with limit", longest); end
    checks++;
    if (max_wait > DMAX + 2) begin failures++; $display("flag message waited %0d cycles", max_wait); end
    checks++;
    if (n_flag < 100 || dcount < 1000) begin failures++; $display("too little traffic"); end
    // protocol off: whole buffers (up to 30 bytes) go out as one segment
    @(negedge clk);
    limit_en = 0;
    longest = 0;
    repeat (3000) @(posedge clk);
    checks++;
    if (longest <= DMAX) begin failures++; $display("no long segment without limit"); end
    $display("flag messages %0d, segments %0d, data bytes %0d, longest flag wait %0d", n_flag, n_seg, dcount, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
