// tb_boolean_element: checks all four boolean functions exhaustively over a
// 4-input element of which three inputs (0, 1 and 3) are selected.
module tb_boolean_element;
  import nfa_pkg::*;

  localparam logic [3:0] SEL = 4'b1011;

  logic [3:0] in;
  logic [3:0] out;   // one bit per function
  int checks = 0, failures = 0;

  boolean_element #(.N_IN(4), .SEL(SEL), .FUNC(BOOL_AND))  u_and  (.in(in), .out(out[0]));
  boolean_element #(.N_IN(4), .SEL(SEL), .FUNC(BOOL_OR))   u_or   (.in(in), .out(out[1]));
  boolean_element #(.N_IN(4), .SEL(SEL), .FUNC(BOOL_NAND)) u_nand (.in(in), .out(out[2]));
  boolean_element #(.N_IN(4), .SEL(SEL), .FUNC(BOOL_NOR))  u_nor  (.in(in), .out(out[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit a, b, d;
      logic [3:0] exp;
      in = 4'(v);
      #1;
      a = v[0]; b = v[1]; d = v[3];     // input 2 is not selected
      exp[0] = a & b & d;
      exp[1] = a | b | d;
      exp[2] = !(a & b & d);
      exp[3] = !(a | b | d);
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (out[f] !== exp[f]) begin
          failures++;
          $display("FAIL function %0d inputs %b: got %b", f, in, out[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
