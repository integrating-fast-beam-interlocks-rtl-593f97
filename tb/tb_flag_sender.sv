// tb_flag_sender - testbench model of the far end of a fiber: sends a flag
// message (K28.2, flags[7:0], flags[15:8], {7'b0, com}, inverted-sum
// checksum, K28.3) every `period` cycles and idles (K28.5) otherwise. Event
// codes are passed in `evt`. up = 0 models a broken fiber.
module tb_flag_sender
  import fbi_pkg::*;
(
  input  logic        clk,
  input  logic        up,
  input  logic [16:0] flags,
  input  int          period,
  input  logic [7:0]  evt,
  output link_t       link
);
  int t = 0;
  logic [7:0] b [6];
  int idx = 6;

  always @(posedge clk) begin
    t <= t + 1;
    if (idx < 6) begin
      link <= '{up: up, evt: evt, dk: (idx == 0 || idx == 5), dbyte: b[idx]};
      idx  <= idx + 1;
    end else if (t % period == 0) begin
      b[0] = 8'h5C; b[1] = flags[7:0]; b[2] = flags[15:8]; b[3] = {7'b0, flags[16]};
      b[4] = 8'(255 - ((int'(b[1]) + int'(b[2]) + int'(b[3])) % 256));
      b[5] = 8'h7C;
      link <= '{up: up, evt: evt, dk: 1'b1, dbyte: b[0]};
      idx  <= 1;
    end else begin
      link <= '{up: up, evt: evt, dk: 1'b1, dbyte: 8'hBC};
    end
  end
endmodule
