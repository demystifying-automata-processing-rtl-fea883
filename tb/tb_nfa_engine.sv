// tb_nfa_engine: runs two one-hot NFA engines on random character streams
// and compares their reports after every character with reference models
// that match the patterns directly on the character history.
//
//   engine A: the default NFA (a+bc, bcd+, cde, ab+[cd]e, a latched counter
//             of ab+[cd]e matches with target 2, and an AND boolean);
//             checked against tb_nfa_ref_pkg.
//   engine B: a small NFA exercising what A does not: a start-of-data state
//             ('q' first in a stream, then 's'), a roll-mode counter of 'x'
//             with target 3 reset by 'r' whose output enables state 'y', and
//             a NOR boolean ("neither x nor r") enabling state 'z'.
// Characters are offered with random gaps and random stream restarts (sod).
// The last quarter offers a character every cycle (one character per clock).
module tb_nfa_engine;
  import nfa_pkg::*;
  import tb_nfa_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adv, sod;
  char_t ch_a, ch_b;
  always #5 clk = ~clk;

  // ---------------- engine A: default NFA ----------------
  logic [255:0] sym_a;
  logic [5:0]   rep_a;
  symbol_decoder u_dec_a (.ch(ch_a), .sym(sym_a));
  nfa_engine u_a (.clk, .rst_n, .adv, .sod, .sym(sym_a), .act(), .report(rep_a));

  // ---------------- engine B ----------------
  // STE 0 'x' start   STE 1 'r' start   STE 2 'y' after counter
  // STE 3 'q' start of data   STE 4 's' after 3   STE 5 'z' after boolean
  // element 6: counter (en STE0, reset STE1, target 3, roll)
  // element 7: boolean NOR(STE0, STE1)
  localparam int unsigned B_STE = 6;
  function automatic logic [B_STE-1:0][255:0] b_mask();
    logic [B_STE-1:0][255:0] m;
    m[0] = sym1("x"); m[1] = sym1("r"); m[2] = sym1("y");
    m[3] = sym1("q"); m[4] = sym1("s"); m[5] = sym1("z");
    return m;
  endfunction
  function automatic logic [B_STE-1:0][7:0] b_pred();
    logic [B_STE-1:0][7:0] p;
    p = '0;
    p[2][6] = 1'b1;
    p[4][3] = 1'b1;
    p[5][7] = 1'b1;
    return p;
  endfunction

  logic [255:0] sym_b;
  logic [4:0]   rep_b;
  symbol_decoder u_dec_b (.ch(ch_b), .sym(sym_b));
  nfa_engine #(
    .N_STE(B_STE), .N_CNT(1), .N_BOOL(1),
    .STE_MASK(b_mask()), .STE_PRED(b_pred()),
    .START_ALL(6'b000011), .START_SOD(6'b001000),
    .CNT_EN(8'b0000_0001), .CNT_RST(8'b0000_0010),
    .CNT_TARGET(12'd3), .CNT_MODE(CNT_ROLL),
    .BOOL_IN(8'b0000_0011), .BOOL_FUNC(BOOL_NOR),
    .REPORT(8'b1111_0100)
  ) u_b (.clk, .rst_n, .adv, .sod, .sym(sym_b), .act(), .report(rep_b));

  int checks = 0, failures = 0;
  int seen_a[6] = '{0, 0, 0, 0, 0, 0};
  int seen_b[5] = '{0, 0, 0, 0, 0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state for engine B
  int  b_pos;        // position in the stream of the last character
  int  b_n;          // counter value
  bit  b_fire;       // counter output of the last step
  bit  b_nor;        // boolean output of the last step
  bit  b_q0;         // last step was 'q' at stream start

  function automatic logic [4:0] step_b(byte unsigned c, bit new_stream);
    logic [4:0] r;
    bit ste_y, ste_s, ste_z, q0;
    if (new_stream) begin
      b_pos = 0;
      b_n = 0;
    end else b_pos++;
    ste_y = (c == "y") && !new_stream && b_fire;
    ste_s = (c == "s") && !new_stream && b_q0;
    ste_z = (c == "z") && !new_stream && b_nor;
    q0    = (c == "q") && new_stream;
    // counter and boolean of this step
    if (c == "r") begin
      b_fire = 0;
      b_n = 0;
    end else if (c == "x") begin
      b_fire = (b_n == 2);
      b_n = b_fire ? 0 : b_n + 1;
    end else b_fire = 0;
    b_nor = !(c == "x" || c == "r");
    b_q0 = q0;
    r = {b_nor, b_fire, ste_z, ste_s, ste_y};
    return r;
  endfunction

  initial begin
    stream_t q;
    int n_match;
    logic [5:0] exp_a;
    logic [4:0] exp_b;
    int n_adv;
    adv = 0; sod = 0; ch_a = 0; ch_b = 0;
    n_match = 0;
    b_fire = 0; b_nor = 0; b_q0 = 0; b_n = 0; b_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_adv = 0;
    exp_a = '0;
    exp_b = '0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // the reports describe the last consumed character until the next one
      if (n_adv > 0) begin
        checks += 2;
        if (rep_a !== exp_a) begin
          failures++;
          $display("FAIL A cycle %0d '%c': report %b expected %b", i, ch_a, rep_a, exp_a);
        end
        if (rep_b !== exp_b) begin
          failures++;
          $display("FAIL B cycle %0d '%c': report %b expected %b", i, ch_b, rep_b, exp_b);
        end
      end
      // random gaps, and a stretch of one character every cycle at the end
      adv = (i >= 15000) || ($urandom_range(0, 2) == 0);
      sod = adv && ($urandom_range(0, 63) == 0);
      if (adv) begin
        ch_a = rand_char();
        case ($urandom_range(0, 6))
          0: ch_b = "x"; 1: ch_b = "y"; 2: ch_b = "r"; 3: ch_b = "q";
          4: ch_b = "s"; 5: ch_b = "z"; default: ch_b = "x";
        endcase
        exp_a = step(q, n_match, ch_a, sod || (n_adv == 0));
        exp_b = step_b(ch_b, sod || (n_adv == 0));
        for (int k = 0; k < 6; k++) if (exp_a[k]) seen_a[k]++;
        for (int k = 0; k < 5; k++) if (exp_b[k]) seen_b[k]++;
        n_adv++;
      end else begin
        ch_a = rand_char();   // ignored while adv is low
        ch_b = "x";
      end
    end
    // every report element of both engines must have fired
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen_a[k] == 0) begin failures++; $display("FAIL A element %0d never reported", k); end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen_b[k] == 0) begin failures++; $display("FAIL B element %0d never reported", k); end
    end
    $display("A reports: %p  B reports: %p", seen_a, seen_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
