// tb_mrlg_logic16 - self-checking testbench for the 16-function logic
// circuit built from one MRLG.
//
// For every function code and every operand pair it checks f against the
// function's truth-table column (f must equal fsel[3 - {A,B}]), and checks
// the applied gate inputs and the gate outputs against the configuration
// each function is meant to use, recomputed here from the gate equations.
// It also repeats the 64 cases in random order to catch any dependence on
// the previous input. A watchdog ends the run if it hangs.
module tb_mrlg_logic16;

  logic       a, b;
  logic [3:0] fsel;
  logic       f;
  logic [3:0] gate_in, gate_out;
  int         checks   = 0;
  int         failures = 0;

  mrlg_logic16 dut (.a(a), .b(b), .fsel(fsel), .f(f), .gate_in(gate_in), .gate_out(gate_out));

  // Expected gate inputs {A,B,C,D} for each function, one configuration
  // per function as in the published set of operations.
  function automatic logic [3:0] exp_in(logic [3:0] code, logic x, logic y);
    case (code)
      4'd0, 4'd15:        return {1'b0, 1'b0, 1'b0, 1'b1};   // (h)
      4'd1, 4'd3, 4'd5,
      4'd10:              return {x, y, 1'b0, 1'b1};         // (a)
      4'd4, 4'd14:        return {x, 1'b0, y, 1'b1};         // (b)
      4'd6, 4'd9, 4'd13:  return {x, y, 1'b1, 1'b1};         // (c)
      4'd11:              return {y, x, 1'b1, 1'b1};         // (d)
      4'd7, 4'd12:        return {~x, y, 1'b1, 1'b1};        // (e)
      4'd2:               return {~y, x, 1'b0, 1'b1};        // (f)
      default:            return {~x, ~y, 1'b0, 1'b1};       // (g), code 8
    endcase
  endfunction

  function automatic logic [3:0] gate_ref(logic [3:0] v);
    logic ga, gb, gc, gd;
    {ga, gb, gc, gd} = v;
    return {ga, ga ? gb : gc, gb ^ (ga & gc), gb ^ (ga & gc) ^ gd};
  endfunction

  task automatic run_case(logic [3:0] code, logic x, logic y);
    logic [3:0] ein;
    fsel = code;
    a    = x;
    b    = y;
    #10;
    checks++;
    if (f !== code[3 - {x, y}]) begin
      failures++;
      $display("FAIL F%0d A=%b B=%b: f=%b expected %b", code + 1, x, y, f, code[3 - {x, y}]);
    end
    ein = exp_in(code, x, y);
    checks++;
    if (gate_in !== ein) begin
      failures++;
      $display("FAIL F%0d A=%b B=%b: gate inputs %b expected %b", code + 1, x, y, gate_in, ein);
    end
    checks++;
    if (gate_out !== gate_ref(ein)) begin
      failures++;
      $display("FAIL F%0d A=%b B=%b: gate outputs %b expected %b", code + 1, x, y, gate_out,
               gate_ref(ein));
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
    int order[64];
    for (int k = 0; k < 16; k++)
      for (int ab = 0; ab < 4; ab++)
        run_case(4'(k), ab[1], ab[0]);
    // random order: shuffle the 64 cases
    for (int i = 0; i < 64; i++) order[i] = i;
    for (int i = 63; i > 0; i--) begin
      int t;
      logic [5:0] j;
      j        = 6'($urandom_range(i, 0));
      t        = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    for (int i = 0; i < 64; i++)
      run_case(4'(order[i] >> 2), order[i][1], order[i][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
