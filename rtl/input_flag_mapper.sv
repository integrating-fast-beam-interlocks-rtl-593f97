// input_flag_mapper - input-to-flag mapping of an event receiver.
//
// Groups the debounced inputs into the 16 logical flags. Bit f of in_map[i]
// assigns input i to flag f. A flag is OK (1) only while every input assigned
// to it is OK; a flag with no input assigned is permanently OK. Both rules are
// the document's. The output is registered (one cycle), which is this
// design's choice.
module input_flag_mapper
  import fbi_pkg::*;
#(
  parameter int N_IN = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_IN-1:0]               in_ok,
  input  logic [N_IN-1:0][NUM_FLAGS-1:0] in_map,
  output logic [NUM_FLAGS-1:0]          flags
);

  logic [NUM_FLAGS-1:0] f_next;

  always_comb begin
    f_next = '1;
    for (int i = 0; i < N_IN; i++)
      f_next &= ~in_map[i] | {NUM_FLAGS{in_ok[i]}};
  end

  always_ff @(posedge clk) begin
    if (rst) flags <= '0;
    else     flags <= f_next;
  end

endmodule
