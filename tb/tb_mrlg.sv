// tb_mrlg - self-checking testbench for the MRLG gate.
//
// Sweeps all 16 input vectors in the order of a counter with A as the
// most significant bit (A slowest, D fastest) and compares P, Q, R, S with
// a reference written case by case: with A = 0 the gate must give
// (0, C, B, B^D), with A = 1 it must give (1, B, B^C, B^C^D). It also
// checks that the gate is reversible: no two inputs give the same output
// vector, and the inputs are recovered from the outputs by the inverse
// mapping. Finally it checks the worked example A=1, B=1, C=0, D=1, which
// must give P=1, Q=1, R=1, S=0. A watchdog ends the run if it hangs.
module tb_mrlg;

  logic a, b, c, d;
  logic p, q, r, s;
  int   checks   = 0;
  int   failures = 0;

  mrlg dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [15:0] seen;
    logic [3:0]  in_v, out_v, exp_v, rec_v;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      in_v = 4'(i);
      {a, b, c, d} = in_v;
      #10;
      out_v = {p, q, r, s};
      // reference, written per value of A
      if (in_v[3] == 1'b0) exp_v = {1'b0, in_v[1], in_v[2], in_v[2] ^ in_v[0]};
      else exp_v = {1'b1, in_v[2], in_v[2] ^ in_v[1], in_v[2] ^ in_v[1] ^ in_v[0]};
      check($sformatf("outputs for ABCD=%b", in_v), out_v, exp_v);
      // one-to-one: each output vector appears once
      checks++;
      if (seen[out_v]) begin
        failures++;
        $display("FAIL output %b repeated (ABCD=%b)", out_v, in_v);
      end
      seen[out_v] = 1'b1;
      // inverse mapping recovers the inputs
      if (out_v[3] == 1'b0) rec_v = {1'b0, out_v[1], out_v[2], out_v[0] ^ out_v[1]};
      else rec_v = {1'b1, out_v[2], out_v[1] ^ out_v[2], out_v[0] ^ out_v[1]};
      check($sformatf("inverse of PQRS=%b", out_v), rec_v, in_v);
    end
    check("all 16 output vectors reached", {3'b0, &seen}, 4'b0001);
    // worked example: A=1, B=1, C=0, D=1
    {a, b, c, d} = 4'b1101;
    #10;
    check("worked example 1101", {p, q, r, s}, 4'b1110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
