// tb_mrlg_top - end-to-end testbench of the top level, at its defaults.
//
// Runs the 64 combinations of function code and operands through the
// logic circuit while the bare gate sweeps its 16 input vectors four
// times over. Checks:
//   - f against the truth-table column of the selected function;
//   - the bare gate against a per-case reference and against its inverse
//     (reversibility: the inputs are recovered from the outputs, and every
//     output vector occurs once per sweep);
//   - that the bare gate, given the same inputs the logic circuit applies
//     to its own gate, gives the same four outputs.
// It counts how often each of the eight input configurations (a)..(h) and
// each of the sixteen functions was exercised, and counts a failure for
// any that never was. A watchdog ends the run if it hangs.
module tb_mrlg_top;

  logic [3:0] gate_in, gate_out;
  logic       op_a, op_b;
  logic [3:0] fsel;
  logic       f;
  logic [3:0] lu_gate_in, lu_gate_out;
  int         checks   = 0;
  int         failures = 0;
  int         cfg_hits [8];
  int         fn_hits  [16];
  int         rev_hits = 0;

  mrlg_top dut (
    .gate_in    (gate_in),
    .gate_out   (gate_out),
    .op_a       (op_a),
    .op_b       (op_b),
    .fsel       (fsel),
    .f          (f),
    .lu_gate_in (lu_gate_in),
    .lu_gate_out(lu_gate_out)
  );

  // Configuration (0 = a .. 7 = h) each function code is meant to use.
  function automatic int cfg_of(logic [3:0] code);
    case (code)
      4'd1, 4'd3, 4'd5, 4'd10: return 0;
      4'd4, 4'd14:             return 1;
      4'd6, 4'd9, 4'd13:       return 2;
      4'd11:                   return 3;
      4'd7, 4'd12:             return 4;
      4'd2:                    return 5;
      4'd8:                    return 6;
      default:                 return 7;  // codes 0 and 15
    endcase
  endfunction

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [15:0] seen;
    logic [3:0]  gexp, grec, lu_in_snapshot, lu_out_snapshot;
    foreach (cfg_hits[i]) cfg_hits[i] = 0;
    foreach (fn_hits[i]) fn_hits[i] = 0;
    seen = '0;
    for (int step = 0; step < 64; step++) begin
      fsel    = 4'(step >> 2);
      op_a    = step[1];
      op_b    = step[0];
      gate_in = 4'(step);
      #10;
      // logic circuit
      check($sformatf("F%0d A=%b B=%b", fsel + 1, op_a, op_b), {3'b0, f},
            {3'b0, fsel[3 - {op_a, op_b}]});
      fn_hits[fsel]++;
      cfg_hits[cfg_of(fsel)]++;
      // bare gate, reference per value of A
      if (!gate_in[3]) gexp = {1'b0, gate_in[1], gate_in[2], gate_in[2] ^ gate_in[0]};
      else gexp = {1'b1, gate_in[2], gate_in[2] ^ gate_in[1], gate_in[2] ^ gate_in[1] ^ gate_in[0]};
      check($sformatf("gate ABCD=%b", gate_in), gate_out, gexp);
      // bare gate, inverse mapping
      if (!gate_out[3]) grec = {1'b0, gate_out[1], gate_out[2], gate_out[0] ^ gate_out[1]};
      else grec = {1'b1, gate_out[2], gate_out[1] ^ gate_out[2], gate_out[0] ^ gate_out[1]};
      check($sformatf("gate inverse PQRS=%b", gate_out), grec, gate_in);
      checks++;
      if (seen[gate_out]) begin
        failures++;
        $display("FAIL gate output %b repeated within a sweep", gate_out);
      end
      seen[gate_out] = 1'b1;
      if (gate_in == 4'hF) begin
        check("sweep reached all 16 outputs", {3'b0, &seen}, 4'b0001);
        if (&seen) rev_hits++;
        seen = '0;
      end
    end
    // cross-check: the bare gate given the logic circuit's gate inputs
    for (int step = 0; step < 64; step++) begin
      fsel = 4'(step >> 2);
      op_a = step[1];
      op_b = step[0];
      #10;
      lu_in_snapshot  = lu_gate_in;
      lu_out_snapshot = lu_gate_out;
      gate_in         = lu_in_snapshot;
      #10;
      check($sformatf("F%0d gate cross-check", fsel + 1), lu_out_snapshot, gate_out);
    end
    for (int i = 0; i < 8; i++) begin
      $display("configuration (%c) exercised %0d times", 8'("a") + 8'(i), cfg_hits[i]);
      checks++;
      if (cfg_hits[i] == 0) failures++;
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (fn_hits[i] == 0) begin
        failures++;
        $display("FAIL F%0d never exercised", i + 1);
      end
    end
    $display("full reversible sweeps of the bare gate: %0d", rev_hits);
    checks++;
    if (rev_hits != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
