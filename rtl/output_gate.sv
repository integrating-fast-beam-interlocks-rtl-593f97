// output_gate - flag-to-output mapping of an event receiver.
//
// Each timing output takes its pulse from a selected pulser (out_src) and is
// configured by out_mode and by out_map, the set of system flags (F01..F16
// and Com) assigned to it. gate_ok of an output is 1 while all its assigned
// flags are OK.
//   OUT_GATED  : output = pulse while gate_ok, else held idle (0)
//   OUT_MIRROR : output = gate_ok, exporting the flags as a level
//   OUT_STOCK  : output = pulse
// With ext_en = 0 (extension disabled) every output behaves as OUT_STOCK.
// The modes and the bypass are the document's; idle level 0, the AND over
// several assigned flags for a mirror output and the register stage are this
// design's.
//
// Timing: outs and gate_ok are registered, one cycle after their inputs.
module output_gate
  import fbi_pkg::*;
#(
  parameter int N_OUT = 18,
  parameter int N_SRC = 16
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [N_SRC-1:0]                  src,
  input  logic [N_OUT-1:0][$clog2(N_SRC)-1:0] out_src,
  input  out_mode_e [N_OUT-1:0]             out_mode,
  input  flagvec_t [N_OUT-1:0]              out_map,
  input  flagvec_t                          flags,
  input  logic                              ext_en,
  output logic [N_OUT-1:0]                  outs,
  output logic [N_OUT-1:0]                  gate_ok
);

  logic [N_OUT-1:0] ok, o;

  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      ok[k] = &(~out_map[k] | flags);
      if (!ext_en) o[k] = src[out_src[k]];
      else begin
        unique case (out_mode[k])
          OUT_GATED:  o[k] = src[out_src[k]] & ok[k];
          OUT_MIRROR: o[k] = ok[k];
          default:    o[k] = src[out_src[k]];
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      outs    <= '0;
      gate_ok <= '0;
    end else begin
      outs    <= o;
      gate_ok <= ok;
    end
  end

endmodule
