// symbol_decoder: turns the input character(s) of one step into the one-hot
// symbol vector that every state of the one-hot NFA ANDs with its
// predecessors.
//
// Each character first goes through a class map (alphabet compression): each
// of the 256 characters is assigned a symbol class, and characters that no
// state tells apart share one class, so the states need fewer decoded lines.
// With the default identity map every character is its own class and the
// block is a plain 8-to-256 decoder.
//
// Striding: with STRIDE > 1 the decoder takes STRIDE characters per step
// (ch[0] is the earliest) and decodes the tuple of their classes into one
// compound symbol, number cls[0] + N_CLASSES*cls[1] + N_CLASSES^2*cls[2] ...,
// so the output has N_CLASSES^STRIDE lines. The NFA must then be written for
// compound symbols (a strided NFA). Striding pays off only together with
// alphabet compression, which keeps N_CLASSES^STRIDE small.
//
// A class number at or above N_CLASSES marks a character that no state
// accepts: the whole step then decodes to all zeros.
//
// Interface: ch in, sym out, purely combinational (no clock, zero latency).
// The engine registers the result of the transition logic, not the decoder.
// Alphabet compression, striding and the one-hot decoded character follow
// the document; the table form of the class map and the compound symbol
// numbering are this design's choices.
module symbol_decoder
  import nfa_pkg::*;
#(
  parameter int unsigned                   N_CLASSES = ALPHABET,
  parameter logic [ALPHABET-1:0][7:0]      CLASS_MAP = identity_class_map(),
  parameter int unsigned                   STRIDE    = 1,
  localparam int unsigned                  N_SYM     = N_CLASSES ** STRIDE
) (
  input  char_t [STRIDE-1:0]    ch,
  output logic [N_SYM-1:0]      sym
);

  logic [31:0] idx;
  logic        known;

  always_comb begin
    idx   = '0;
    known = 1'b1;
    for (int s = STRIDE - 1; s >= 0; s--) begin
      logic [7:0] cls;
      cls   = CLASS_MAP[ch[s]];
      known = known && (32'(cls) < N_CLASSES);
      idx   = idx * N_CLASSES + 32'(cls);
    end
    sym = '0;
    for (int k = 0; k < N_SYM; k++)
      sym[k] = known && (idx == k);
  end

endmodule
