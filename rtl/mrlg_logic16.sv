// mrlg_logic16 - all sixteen Boolean functions of two one-bit operands,
// computed by a single MRLG gate.
//
// A 4-bit function code picks one of eight input configurations of the
// gate and one of its four outputs (table in mrlg_pkg). Four small input
// multiplexers tie each gate input to A, B, A', B', 0 or 1; the gate then
// computes, and an output multiplexer returns the chosen gate output as f.
// The other three gate outputs are unused for that function; they are
// brought out on gate_out for observation.
//
// Interface: a, b operands; fsel function code (Fn of the standard table
// of sixteen two-variable functions has code n-1, which equals its
// truth-table column, bit 3 for AB = 00 down to bit 0 for AB = 11);
// f result; gate_in = {A,B,C,D} and gate_out = {P,Q,R,S} of the gate.
// Timing: purely combinational.
//
// The eight configurations and the output used for each function follow
// the published set of operations; the code, the multiplexers and the use
// of inverters for A' and B' are this design's own.
module mrlg_logic16
  import mrlg_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [3:0] fsel,
  output logic       f,
  output logic [3:0] gate_in,
  output logic [3:0] gate_out
);

  fn_map_t   map;
  gate_src_t src;

  always_comb begin
    map        = fn_map(fsel);
    src        = cfg_sources(map.cfg);
    gate_in[3] = src_value(src.src_a, a, b);
    gate_in[2] = src_value(src.src_b, a, b);
    gate_in[1] = src_value(src.src_c, a, b);
    gate_in[0] = src_value(src.src_d, a, b);
  end

  mrlg u_mrlg (
    .a(gate_in[3]),
    .b(gate_in[2]),
    .c(gate_in[1]),
    .d(gate_in[0]),
    .p(gate_out[3]),
    .q(gate_out[2]),
    .r(gate_out[1]),
    .s(gate_out[0])
  );

  always_comb begin
    unique case (map.out)
      OUT_P:   f = gate_out[3];
      OUT_Q:   f = gate_out[2];
      OUT_R:   f = gate_out[1];
      default: f = gate_out[0];  // OUT_S
    endcase
  end

endmodule
