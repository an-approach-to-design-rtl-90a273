// mrlg_top - a bare MRLG gate beside the 16-function logic circuit built
// from one MRLG.
//
// The bare gate maps gate_in = {A,B,C,D} to gate_out = {P,Q,R,S} with
// P = A, Q = AB ^ A'C, R = B ^ AC, S = B ^ AC ^ D; it is reversible, so
// gate_in can be recovered from gate_out. The logic circuit returns on f
// the function of op_a and op_b whose truth-table column is fsel (bit 3 for
// AB = 00 down to bit 0 for AB = 11), and shows on lu_gate_in/lu_gate_out
// the inputs it applied to its gate and all four gate outputs.
//
// Timing: purely combinational; no clock, no reset. The two parts share
// nothing; placing them side by side under one top is this design's own.
module mrlg_top (
  input  logic [3:0] gate_in,
  output logic [3:0] gate_out,
  input  logic       op_a,
  input  logic       op_b,
  input  logic [3:0] fsel,
  output logic       f,
  output logic [3:0] lu_gate_in,
  output logic [3:0] lu_gate_out
);

  mrlg u_gate (
    .a(gate_in[3]),
    .b(gate_in[2]),
    .c(gate_in[1]),
    .d(gate_in[0]),
    .p(gate_out[3]),
    .q(gate_out[2]),
    .r(gate_out[1]),
    .s(gate_out[0])
  );

  mrlg_logic16 u_logic16 (
    .a       (op_a),
    .b       (op_b),
    .fsel    (fsel),
    .f       (f),
    .gate_in (lu_gate_in),
    .gate_out(lu_gate_out)
  );

endmodule
