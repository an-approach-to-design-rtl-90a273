// mrlg - Multifunctional Reversible Logic Gate, a 4x4 reversible gate.
//
// The gate maps the input vector (A, B, C, D) to the output vector
//   P = A
//   Q = A&B ^ ~A&C      (A selects B or C: a 2:1 multiplexer)
//   R = B ^ A&C
//   S = B ^ A&C ^ D     (= R ^ D)
// The mapping is a bijection on 4-bit vectors, so the inputs can always be
// recovered from the outputs: with A = 0 the gate passes (C, B, B^D) and
// with A = 1 it passes (B, B^C, B^C^D), both invertible.
//
// Interface: four single-bit inputs a..d and four single-bit outputs p..s.
// Timing: purely combinational, no clock and no state.
//
// The output equations are the gate's definition. The published gate is a
// transistor-level circuit (static CMOS or pass-transistor); this module
// describes only its logic function, at gate level and without delays.
module mrlg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic ac;  // A AND C, shared by R and S

  always_comb begin
    ac = a & c;
    p  = a;
    q  = (a & b) ^ (~a & c);
    r  = b ^ ac;
    s  = r ^ d;
  end

endmodule
