// event_logger - timestamped log of interlock input and output-gate changes.
//
// Every cycle in which a log-enabled input or output gate differs from its
// value in the previous cycle, one entry is written to a DEPTH-entry buffer:
//   rd_data = {sec[31:0], ticks[31:0], gates[N_OUT-1:0], ins[N_IN-1:0]}
// i.e. the event-clock timestamp and a snapshot of all inputs and gates.
// not_empty tells software that entries are waiting; the head entry is on
// rd_data (first-word fall-through) and rd_en removes it. When a change finds
// the buffer full, the logger sets overflow and writes nothing more, so the
// earliest entries (the onset of a fault) are kept, until software clears
// overflow with ovf_clear. Logging on change, the snapshot, the data-ready
// signal and the halt-on-full policy are the document's; the depth, the entry
// layout and the read interface are this design's.
//
// Timing: an entry is written the cycle after the change and is visible on
// rd_data one cycle later.
module event_logger #(
  parameter int N_IN  = 16,
  parameter int N_OUT = 18,
  parameter int DEPTH = 512,
  localparam int EW   = 64 + N_IN + N_OUT,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  ins,
  input  logic [N_OUT-1:0] gates,
  input  logic [N_IN-1:0]  log_in_en,
  input  logic [N_OUT-1:0] log_out_en,
  input  logic [31:0]      sec,
  input  logic [31:0]      ticks,
  input  logic             rd_en,
  output logic [EW-1:0]    rd_data,
  output logic             not_empty,
  output logic [AW:0]      count,
  output logic             overflow,
  input  logic             ovf_clear
);

  logic [EW-1:0]    mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [N_IN-1:0]  ins_q;
  logic [N_OUT-1:0] gates_q;
  logic             primed;   // previous-value registers hold real data
  logic             change, full, do_wr, do_rd;

  assign change = primed && (|((ins ^ ins_q) & log_in_en) || |((gates ^ gates_q) & log_out_en));
  assign full   = (count == (AW + 1)'(DEPTH));
  assign do_wr  = change && !full && !overflow;
  assign do_rd  = rd_en && not_empty;
  assign not_empty = (count != 0);
  assign rd_data   = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= {sec, ticks, gates, ins};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
      ins_q    <= '0;
      gates_q  <= '0;
      primed   <= 1'b0;
    end else begin
      ins_q   <= ins;
      gates_q <= gates;
      primed  <= 1'b1;
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
      if (change && full) overflow <= 1'b1;
      else if (ovf_clear) overflow <= 1'b0;
    end
  end

endmodule
