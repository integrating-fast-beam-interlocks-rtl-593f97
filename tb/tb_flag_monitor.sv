// tb_flag_monitor - testbench decoder of the flag messages on one data-slot
// stream. Keeps the flags of the last complete message with a good
// checksum, counts good and bad messages and data-buffer segments.
module tb_flag_monitor
  import fbi_pkg::*;
(
  input  logic        clk,
  input  link_t       link,
  output logic [16:0] flags,
  output int          n_good,
  output int          n_bad,
  output int          n_dbuf,
  output int          last_good_cycle
);
  int idx = -1, cyc = 0;
  logic [7:0] b [5];
  initial begin flags = '0; n_good = 0; n_bad = 0; n_dbuf = 0; last_good_cycle = 0; end

  always @(posedge clk) begin
    cyc++;
    if (link.up) begin
      if (link.dk && link.dbyte == 8'h5C) idx = 1;
      else if (link.dk && link.dbyte == 8'h1C) n_dbuf++;
      else if (idx >= 1 && idx <= 4 && !link.dk) begin b[idx] = link.dbyte; idx++; end
      else if (idx == 5) begin
        if (link.dk && link.dbyte == 8'h7C &&
            b[4] == 8'(255 - ((int'(b[1]) + int'(b[2]) + int'(b[3])) % 256))) begin
          flags = {b[3][0], b[2], b[1]};
          n_good++;
          last_good_cycle = cyc;
        end else n_bad++;
        idx = -1;
      end else if (idx >= 1) begin n_bad++; idx = -1; end
    end
  end
endmodule
