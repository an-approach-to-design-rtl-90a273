// mrlg_pkg - shared types and the configuration table of the 16-function
// logic circuit built from one MRLG gate.
//
// A two-input Boolean function is named by its 4-bit truth-table column:
// bit 3 is its value for (A,B) = 00, bit 2 for 01, bit 1 for 10 and bit 0
// for 11. Function Fn of the usual table of sixteen functions (F1 = false,
// F2 = AB, ..., F16 = true) then has code n-1.
//
// Each function is produced by one of eight input configurations of the
// gate (labelled a..h): each gate input is tied to A, B, A', B', 0 or 1,
// and one of the four gate outputs is taken. The eight configurations and
// the output used for each function are those of the published set of
// sixteen operations; the code assignment is this design's own.
package mrlg_pkg;

  // What drives one gate input.
  typedef enum logic [2:0] {
    SRC_ZERO = 3'd0,
    SRC_ONE  = 3'd1,
    SRC_A    = 3'd2,
    SRC_B    = 3'd3,
    SRC_NA   = 3'd4,
    SRC_NB   = 3'd5
  } src_e;

  // Which gate output carries the function.
  typedef enum logic [1:0] {
    OUT_P = 2'd0,
    OUT_Q = 2'd1,
    OUT_R = 2'd2,
    OUT_S = 2'd3
  } out_e;

  // The eight input configurations.
  typedef enum logic [2:0] {
    CFG_A = 3'd0,  // A , B , 0, 1
    CFG_B = 3'd1,  // A , 0 , B, 1
    CFG_C = 3'd2,  // A , B , 1, 1
    CFG_D = 3'd3,  // B , A , 1, 1
    CFG_E = 3'd4,  // A', B , 1, 1
    CFG_F = 3'd5,  // B', A , 0, 1
    CFG_G = 3'd6,  // A', B', 0, 1
    CFG_H = 3'd7   // 0 , 0 , 0, 1
  } cfg_e;

  typedef struct packed {
    src_e src_a;
    src_e src_b;
    src_e src_c;
    src_e src_d;
  } gate_src_t;

  typedef struct packed {
    cfg_e cfg;
    out_e out;
  } fn_map_t;

  // Gate input sources of each configuration.
  function automatic gate_src_t cfg_sources(cfg_e cfg);
    gate_src_t g;
    unique case (cfg)
      CFG_A:   g = '{SRC_A,    SRC_B,    SRC_ZERO, SRC_ONE};
      CFG_B:   g = '{SRC_A,    SRC_ZERO, SRC_B,    SRC_ONE};
      CFG_C:   g = '{SRC_A,    SRC_B,    SRC_ONE,  SRC_ONE};
      CFG_D:   g = '{SRC_B,    SRC_A,    SRC_ONE,  SRC_ONE};
      CFG_E:   g = '{SRC_NA,   SRC_B,    SRC_ONE,  SRC_ONE};
      CFG_F:   g = '{SRC_NB,   SRC_A,    SRC_ZERO, SRC_ONE};
      CFG_G:   g = '{SRC_NA,   SRC_NB,   SRC_ZERO, SRC_ONE};
      default: g = '{SRC_ZERO, SRC_ZERO, SRC_ZERO, SRC_ONE};  // CFG_H
    endcase
    return g;
  endfunction

  // Configuration and output for each function code (code = Fn - 1).
  function automatic fn_map_t fn_map(logic [3:0] code);
    fn_map_t m;
    unique case (code)
      4'd0:    m = '{CFG_H, OUT_P};  // F1  false
      4'd1:    m = '{CFG_A, OUT_Q};  // F2  A B
      4'd2:    m = '{CFG_F, OUT_Q};  // F3  A B'
      4'd3:    m = '{CFG_A, OUT_P};  // F4  A
      4'd4:    m = '{CFG_B, OUT_Q};  // F5  A' B
      4'd5:    m = '{CFG_A, OUT_R};  // F6  B
      4'd6:    m = '{CFG_C, OUT_R};  // F7  A xor B
      4'd7:    m = '{CFG_E, OUT_Q};  // F8  A + B
      4'd8:    m = '{CFG_G, OUT_Q};  // F9  A' B'
      4'd9:    m = '{CFG_C, OUT_S};  // F10 A xnor B
      4'd10:   m = '{CFG_A, OUT_S};  // F11 B'
      4'd11:   m = '{CFG_D, OUT_Q};  // F12 A + B'
      4'd12:   m = '{CFG_E, OUT_P};  // F13 A'
      4'd13:   m = '{CFG_C, OUT_Q};  // F14 A' + B
      4'd14:   m = '{CFG_B, OUT_S};  // F15 (A B)'
      default: m = '{CFG_H, OUT_S};  // F16 true
    endcase
    return m;
  endfunction

  // Value placed on a gate input for a given source.
  function automatic logic src_value(src_e src, logic a, logic b);
    logic v;
    unique case (src)
      SRC_ZERO: v = 1'b0;
      SRC_ONE:  v = 1'b1;
      SRC_A:    v = a;
      SRC_B:    v = b;
      SRC_NA:   v = ~a;
      default:  v = ~b;  // SRC_NB
    endcase
    return v;
  endfunction

endpackage
