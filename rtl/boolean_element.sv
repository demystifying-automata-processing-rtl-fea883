// boolean_element: a logical operator over the activations of a set of NFA
// states, with the function of the Automata Processor's boolean element.
//
// SEL picks which of the N_IN inputs take part; FUNC selects AND, OR, NAND or
// NOR over the selected inputs (NOR of a single input is an inverter). The
// output is an activation like that of a state: it can enable successor
// states for the next character and can be a report element.
//
// Interface: in (activations of the states after the current character),
// out. Purely combinational, so the output belongs to the same character
// step as its inputs. The document names the element and says the FPGA
// engine supports it; the set of functions and this timing are this
// design's choice.
module boolean_element
  import nfa_pkg::*;
#(
  parameter int unsigned      N_IN = 2,
  parameter logic [N_IN-1:0]  SEL  = '1,
  parameter logic [1:0]       FUNC = BOOL_AND
) (
  input  logic [N_IN-1:0] in,
  output logic            out
);

  logic all_set, any_set;

  assign all_set = &(in | ~SEL);
  assign any_set = |(in & SEL);

  always_comb begin
    unique case (FUNC)
      BOOL_AND:  out = all_set;
      BOOL_OR:   out = any_set;
      BOOL_NAND: out = ~all_set;
      default:   out = ~any_set;   // BOOL_NOR
    endcase
  end

endmodule
