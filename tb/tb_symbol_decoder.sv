// tb_symbol_decoder: checks the character decoder exhaustively, once as a
// plain 8-to-256 decoder (identity class map) and once with alphabet
// compression to the DNA alphabet {A, C, G, T} (4 classes; every other
// character maps to class 4, which is outside the vector and decodes to 0),
// and once with the DNA map and a stride of two characters, over every pair
// of characters (16 compound symbols: class of the first character plus 4
// times the class of the second).
module tb_symbol_decoder;
  import nfa_pkg::*;

  function automatic logic [ALPHABET-1:0][7:0] dna_map();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = 8'd4;
    m["A"] = 8'd0; m["C"] = 8'd1; m["G"] = 8'd2; m["T"] = 8'd3;
    return m;
  endfunction

  char_t            ch;
  logic [255:0]     sym_full;
  logic [3:0]       sym_dna;
  int checks = 0, failures = 0;

  symbol_decoder u_full (.ch(ch), .sym(sym_full));
  symbol_decoder #(.N_CLASSES(4), .CLASS_MAP(dna_map())) u_dna (.ch(ch), .sym(sym_dna));

  char_t [1:0]  ch2;
  logic [15:0]  sym_s2;
  symbol_decoder #(.N_CLASSES(4), .CLASS_MAP(dna_map()), .STRIDE(2)) u_s2 (.ch(ch2), .sym(sym_s2));

  function automatic int dna_class(int c);
    case (c)
      "A": return 0;
      "C": return 1;
      "G": return 2;
      "T": return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      logic [255:0] exp_full;
      logic [3:0]   exp_dna;
      ch = char_t'(c);
      #1;
      exp_full = '0;
      exp_full[c] = 1'b1;
      case (c)
        "A": exp_dna = 4'b0001;
        "C": exp_dna = 4'b0010;
        "G": exp_dna = 4'b0100;
        "T": exp_dna = 4'b1000;
        default: exp_dna = 4'b0000;
      endcase
      checks += 2;
      if (sym_full !== exp_full) begin
        failures++;
        $display("FAIL full decode of %0d", c);
      end
      if (sym_dna !== exp_dna) begin
        failures++;
        $display("FAIL dna decode of %0d: %b", c, sym_dna);
      end
    end
    for (int c0 = 0; c0 < 256; c0++)
      for (int c1 = 0; c1 < 256; c1++) begin
        logic [15:0] exp_s2;
        ch2 = {char_t'(c1), char_t'(c0)};
        #1;
        exp_s2 = '0;
        if (dna_class(c0) >= 0 && dna_class(c1) >= 0)
          exp_s2[dna_class(c0) + 4 * dna_class(c1)] = 1'b1;
        checks++;
        if (sym_s2 !== exp_s2) begin
          failures++;
          if (failures < 20) $display("FAIL stride-2 decode of %0d,%0d: %b", c0, c1, sym_s2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
