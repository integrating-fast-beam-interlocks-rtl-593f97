// tb_event_logger - random changes on inputs and gates (some masked by the
// log enables), with a timestamp counter, against a reference queue of the
// expected entries. Software reads at random; a burst then fills the buffer
// and the test checks that overflow is set, that the earliest entries are
// the ones kept, that no entry is written until overflow is cleared, and
// that logging resumes afterwards.
module tb_event_logger;
  localparam int NI = 16, NO = 18, D = 16, EW = 64 + NI + NO;
  logic clk = 0, rst = 1;
  logic [NI-1:0] ins, ins_q, log_in_en;
  logic [NO-1:0] gates, gates_q, log_out_en;
  logic [31:0] sec, ticks;
  logic rd_en, not_empty, overflow, ovf_clear;
  logic [EW-1:0] rd_data;
  logic [$clog2(D):0] count;
  logic [EW-1:0] expq [$];
  int checks = 0, failures = 0, n_entries = 0, n_ovf = 0;
  bit primed = 0, halted = 0;

  event_logger #(.N_IN(NI), .N_OUT(NO), .DEPTH(D)) dut (.clk, .rst, .ins, .gates, .log_in_en, .log_out_en,
    .sec, .ticks, .rd_en, .rd_data, .not_empty, .count, .overflow, .ovf_clear);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the write side
  always @(posedge clk) begin
    if (rst) begin primed = 0; halted = 0; end
    else begin
      if (primed && (((ins ^ ins_q) & log_in_en) != 0 || ((gates ^ gates_q) & log_out_en) != 0)) begin
        if (expq.size() >= D || halted) begin
          if (!halted) n_ovf++;
          halted = 1;
        end else expq.push_back({sec, ticks, gates, ins});
      end else if (ovf_clear) halted = 0;
      if (rd_en && not_empty) begin
        checks++;
        if (expq.size() == 0 || rd_data != expq[0]) begin
          failures++; $display("read %h expected %h", rd_data, expq.size() ? expq[0] : {EW{1'b0}});
        end
        if (expq.size()) void'(expq.pop_front());
        n_entries++;
      end
      primed = 1;
      ins_q <= ins;
      gates_q <= gates;
      ticks <= ticks + 1;
      if (ticks % 1000 == 999) begin sec <= sec + 1; ticks <= 0; end
    end
  end

  task automatic wiggle(int n, int rd_pct);
    repeat (n) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) ins[$urandom_range(0, NI - 1)] ^= 1'b1;
      if ($urandom_range(0, 3) == 0) gates[$urandom_range(0, NO - 1)] ^= 1'b1;
      rd_en = ($urandom_range(0, 99) < rd_pct);
    end
  endtask

  initial begin
    ins = 0; gates = 0; log_in_en = 16'hF0FF; log_out_en = 18'h3FF0F;
    sec = 32'd1750155477; ticks = 0; rd_en = 0; ovf_clear = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    wiggle(2000, 60);
    // burst with no reads: fills the buffer and overflows
    wiggle(300, 0);
    @(negedge clk);
    checks++;
    if (!overflow || count != ($clog2(D) + 1)'(D)) begin failures++; $display("no overflow (count %0d)", count); end
    // drain everything: the earliest entries must come out (the model kept those)
    while (not_empty) begin @(negedge clk); rd_en = 1; end
    @(negedge clk);
    rd_en = 0;
    // still halted: changes are not logged
    wiggle(50, 0);
    @(negedge clk);
    checks++;
    if (not_empty) begin failures++; $display("wrote while overflow was set"); end
    ovf_clear = 1;
    @(negedge clk);
    ovf_clear = 0;
    wiggle(500, 50);
    @(negedge clk); rd_en = 1;
    while (not_empty) @(negedge clk);
    rd_en = 0;
    checks++;
    if (n_entries < 200 || n_ovf == 0 || expq.size() != 0) begin
      failures++; $display("entries %0d overflows %0d left %0d", n_entries, n_ovf, expq.size());
    end
    $display("entries read %0d, overflows %0d", n_entries, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
