// nfa_pkg: types, constants and helper functions shared by the one-hot NFA
// engine and the blocks around it.
//
// The engine is a logic-based automata processor: every NFA state is a
// flip-flop and every transition is an AND/OR of state outputs with the
// decoded input character, so one 8-bit character is consumed per clock.
// States carry their symbol set (homogeneous NFA, as in the ANML format),
// and the engine also has counter and boolean elements with the behaviour of
// the Automata Processor's elements of the same name.
//
// Element numbering used by every parameter that refers to elements:
//   0 .. N_STE-1                     state (STE) flip-flops
//   N_STE .. N_STE+CW-1              counter elements (CW = max(N_CNT,1))
//   N_STE+CW .. N_STE+CW+BW-1        boolean elements (BW = max(N_BOOL,1))
// When a design has no counter (boolean) the single padding slot is a
// constant 0.
//
// The encodings of counter modes and boolean functions are this design's own
// choice. The default NFA below holds the example patterns a+bc, bcd+, cde
// and ab+[cd]e, plus one counter and one boolean element added so that every
// kind of element is present in the default build.
package nfa_pkg;

  localparam int unsigned ALPHABET   = 256;   // 8-bit input characters
  localparam int unsigned CNT_WIDTH  = 12;    // counter target width

  typedef logic [7:0] char_t;

  // Counter modes
  localparam logic [1:0] CNT_PULSE = 2'd0;  // fire once when the target is reached
  localparam logic [1:0] CNT_LATCH = 2'd1;  // fire from the target on until reset
  localparam logic [1:0] CNT_ROLL  = 2'd2;  // fire at the target and restart from 0

  // Boolean functions
  localparam logic [1:0] BOOL_AND  = 2'd0;
  localparam logic [1:0] BOOL_OR   = 2'd1;
  localparam logic [1:0] BOOL_NAND = 2'd2;
  localparam logic [1:0] BOOL_NOR  = 2'd3;  // with one input this is an inverter

  // Class map of an uncompressed alphabet: every character is its own class.
  function automatic logic [ALPHABET-1:0][7:0] identity_class_map();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = 8'(c);
    return m;
  endfunction

  // Symbol mask holding a single character.
  function automatic logic [ALPHABET-1:0] sym1(input char_t c);
    logic [ALPHABET-1:0] m;
    m = '0;
    m[c] = 1'b1;
    return m;
  endfunction

  // ---------------------------------------------------------------------------
  // Default NFA (13 STEs, 1 counter, 1 boolean, 15 element slots)
  //   STE 0 'a'  (start, self loop)  STE 1 'b'  STE 2 'c' (report)   : a+bc
  //   STE 3 'b'  (start)             STE 4 'c'  STE 5 'd' (self loop, report) : bcd+
  //   STE 6 'c'  (start)             STE 7 'd'  STE 8 'e' (report)   : cde
  //   STE 9 'a'  (start)  STE 10 'b' (self loop)  STE 11 [cd]  STE 12 'e' (report)
  //                                                                  : ab+[cd]e
  //   counter 13: counts matches of STE 12, target 2, latch mode (report)
  //   boolean 14: AND of STE 2 and STE 4 (report)
  // ---------------------------------------------------------------------------
  localparam int unsigned DEF_N_STE  = 13;
  localparam int unsigned DEF_N_CNT  = 1;
  localparam int unsigned DEF_N_BOOL = 1;
  localparam int unsigned DEF_N_ELEM = 15;

  function automatic logic [DEF_N_STE-1:0][ALPHABET-1:0] def_ste_mask();
    logic [DEF_N_STE-1:0][ALPHABET-1:0] m;
    m[0]  = sym1("a"); m[1]  = sym1("b"); m[2]  = sym1("c");
    m[3]  = sym1("b"); m[4]  = sym1("c"); m[5]  = sym1("d");
    m[6]  = sym1("c"); m[7]  = sym1("d"); m[8]  = sym1("e");
    m[9]  = sym1("a"); m[10] = sym1("b"); m[11] = sym1("c") | sym1("d");
    m[12] = sym1("e");
    return m;
  endfunction

  function automatic logic [DEF_N_STE-1:0][DEF_N_ELEM-1:0] def_ste_pred();
    logic [DEF_N_STE-1:0][DEF_N_ELEM-1:0] p;
    p = '0;
    p[0][0]   = 1'b1;                       // a+ self loop
    p[1][0]   = 1'b1;
    p[2][1]   = 1'b1;
    p[4][3]   = 1'b1;
    p[5][4]   = 1'b1; p[5][5] = 1'b1;       // d+ self loop
    p[7][6]   = 1'b1;
    p[8][7]   = 1'b1;
    p[10][9]  = 1'b1; p[10][10] = 1'b1;     // b+ self loop
    p[11][10] = 1'b1;
    p[12][11] = 1'b1;
    return p;
  endfunction

  localparam logic [DEF_N_STE-1:0]  DEF_START_ALL = 13'b0_0010_0100_1001; // 0,3,6,9
  localparam logic [DEF_N_STE-1:0]  DEF_START_SOD = '0;
  localparam logic [DEF_N_ELEM-1:0] DEF_CNT_EN    = 15'(1) << 12;
  localparam logic [DEF_N_ELEM-1:0] DEF_CNT_RST   = '0;
  localparam logic [DEF_N_ELEM-1:0] DEF_BOOL_IN   = (15'(1) << 2) | (15'(1) << 4);
  localparam logic [DEF_N_ELEM-1:0] DEF_REPORT    =
      (15'(1) << 2) | (15'(1) << 5) | (15'(1) << 8) | (15'(1) << 12) |
      (15'(1) << 13) | (15'(1) << 14);

endpackage
