// tb_stride_top: a device taking two characters per stream per clock. The
// testbench turns the pattern states of the default NFA (a+bc, bcd+, cde,
// ab+[cd]e) into a stride-2 NFA over the compound symbols of a 6-class
// alphabet (a, b, c, d, e, anything else), as a pattern compiler would:
//   P(p,q)  one state per transition p -> q: p on the first character of a
//           pair and q on the second;
//   H(s)    a start state s beginning on the second character of a pair;
//   F(r)    a report state r matched on the first character of a pair.
// The device runs with 8-character windows (4 steps). For each window the
// testbench ORs the reports of all strided states that stand for the same
// pattern and compares them with the single-character reference model
// (tb_nfa_ref_pkg). It also checks that a window of 8 characters takes
// 4 + 1 cycles at full rate, i.e. two characters per clock.
module tb_stride_top;
  import nfa_pkg::*;
  import tb_nfa_ref_pkg::*;

  localparam int C = 6;                  // symbol classes
  localparam int N1 = DEF_N_STE;         // states of the single-step NFA
  localparam int N_INPUTS = 8, STRIDE = 2, OUT_PINS = 32;
  localparam int WINDOWS = 400;
  localparam int ORIG_REP[4] = '{2, 5, 8, 12};

  function automatic logic [ALPHABET-1:0][7:0] cmap();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = 8'd5;
    for (int k = 0; k < 5; k++) m["a" + k] = 8'(k);
    return m;
  endfunction

  localparam logic [N1-1:0][ALPHABET-1:0]   M1  = def_ste_mask();
  localparam logic [N1-1:0][DEF_N_ELEM-1:0] PR1 = def_ste_pred();

  // class mask of a single-step state
  function automatic bit cm(int j, int k);
    return M1[j][(k < 5) ? ("a" + k) : "x"];
  endfunction

  function automatic bit pred1(int q, int p);
    return PR1[q][p];
  endfunction

  function automatic int rep_of(int j);   // index into ORIG_REP, or -1
    for (int r = 0; r < 4; r++) if (ORIG_REP[r] == j) return r;
    return -1;
  endfunction

  // strided state numbering: all P(p,q) in order of q then p, then H(s),
  // then F(r). Tables hold the index of each, 255 where none exists.
  function automatic logic [N1-1:0][N1-1:0][7:0] p_table();
    logic [N1-1:0][N1-1:0][7:0] t;
    int n = 0;
    t = '1;
    for (int q = 0; q < N1; q++)
      for (int p = 0; p < N1; p++)
        if (pred1(q, p)) begin
          t[p][q] = 8'(n);
          n++;
        end
    return t;
  endfunction
  function automatic int count_pairs();
    int n = 0;
    for (int q = 0; q < N1; q++) for (int p = 0; p < N1; p++) if (pred1(q, p)) n++;
    return n;
  endfunction
  localparam int N_PAIRS = count_pairs();
  localparam int N_STARTS = $countones(DEF_START_ALL);
  localparam logic [N1-1:0][N1-1:0][7:0] PT = p_table();

  function automatic logic [N1-1:0][7:0] h_table();
    logic [N1-1:0][7:0] t;
    int n = N_PAIRS;
    t = '1;
    for (int s = 0; s < N1; s++)
      if (DEF_START_ALL[s]) begin
        t[s] = 8'(n);
        n++;
      end
    return t;
  endfunction
  localparam logic [N1-1:0][7:0] HT = h_table();

  // kind 0 = P(a,b), 1 = H(a), 2 = F(a), 3 = total count
  function automatic int sidx(int kind, int a, int b);
    case (kind)
      0: return (PT[a][b] == 8'hff) ? -1 : int'(PT[a][b]);
      1: return (HT[a] == 8'hff) ? -1 : int'(HT[a]);
      2: return (rep_of(a) < 0) ? -1 : N_PAIRS + N_STARTS + rep_of(a);
      default: return N_PAIRS + N_STARTS + 4;
    endcase
  endfunction

  localparam int N2 = sidx(3, 0, 0);
  localparam int N_ELEM = N2 + 2;

  function automatic logic [N2-1:0][C*C-1:0] s_mask();
    logic [N2-1:0][C*C-1:0] m;
    m = '0;
    for (int c1 = 0; c1 < C; c1++)
      for (int c2 = 0; c2 < C; c2++) begin
        for (int q = 0; q < N1; q++)
          for (int p = 0; p < N1; p++)
            if (pred1(q, p)) m[sidx(0, p, q)][c1 + C*c2] = cm(p, c1) && cm(q, c2);
        for (int s = 0; s < N1; s++)
          if (DEF_START_ALL[s]) m[sidx(1, s, 0)][c1 + C*c2] = cm(s, c2);
        for (int r = 0; r < 4; r++)
          m[sidx(2, ORIG_REP[r], 0)][c1 + C*c2] = cm(ORIG_REP[r], c1);
      end
    return m;
  endfunction

  // strided states that leave single-step state y active after a step
  function automatic logic [N_ELEM-1:0] ends_in(int y);
    logic [N_ELEM-1:0] v;
    v = '0;
    for (int x = 0; x < N1; x++) if (pred1(y, x)) v[sidx(0, x, y)] = 1'b1;
    if (DEF_START_ALL[y]) v[sidx(1, y, 0)] = 1'b1;
    return v;
  endfunction

  function automatic logic [N2-1:0][N_ELEM-1:0] s_pred();
    logic [N2-1:0][N_ELEM-1:0] pr;
    pr = '0;
    for (int q = 0; q < N1; q++)
      for (int p = 0; p < N1; p++)
        if (pred1(q, p))
          for (int y = 0; y < N1; y++) if (pred1(p, y)) pr[sidx(0, p, q)] |= ends_in(y);
    for (int r = 0; r < 4; r++)
      for (int y = 0; y < N1; y++) if (pred1(ORIG_REP[r], y)) pr[sidx(2, ORIG_REP[r], 0)] |= ends_in(y);
    return pr;
  endfunction

  function automatic logic [N2-1:0] s_start();
    logic [N2-1:0] s;
    s = '0;
    for (int q = 0; q < N1; q++)
      for (int p = 0; p < N1; p++)
        if (pred1(q, p) && DEF_START_ALL[p]) s[sidx(0, p, q)] = 1'b1;
    for (int j = 0; j < N1; j++) if (DEF_START_ALL[j]) s[sidx(1, j, 0)] = 1'b1;
    for (int r = 0; r < 4; r++) if (DEF_START_ALL[ORIG_REP[r]]) s[sidx(2, ORIG_REP[r], 0)] = 1'b1;
    return s;
  endfunction

  function automatic logic [N_ELEM-1:0] s_report();
    logic [N_ELEM-1:0] rp;
    rp = '0;
    for (int q = 0; q < N1; q++)
      for (int p = 0; p < N1; p++)
        if (pred1(q, p) && rep_of(q) >= 0) rp[sidx(0, p, q)] = 1'b1;
    for (int s = 0; s < N1; s++) if (DEF_START_ALL[s] && rep_of(s) >= 0) rp[sidx(1, s, 0)] = 1'b1;
    for (int r = 0; r < 4; r++) rp[sidx(2, ORIG_REP[r], 0)] = 1'b1;
    return rp;
  endfunction

  localparam logic [N_ELEM-1:0] REP = s_report();
  localparam int N_REP = $countones(REP);

  // which pattern each bit of the report vector stands for
  function automatic int bit_pattern(int k);
    int n = 0;
    for (int j = 0; j < N2; j++)
      if (REP[j]) begin
        if (n == k) begin
          for (int q = 0; q < N1; q++)
            for (int p = 0; p < N1; p++)
              if (pred1(q, p) && j == sidx(0, p, q)) return rep_of(q);
          for (int s = 0; s < N1; s++) if (DEF_START_ALL[s] && j == sidx(1, s, 0)) return rep_of(s);
          for (int r = 0; r < 4; r++) if (j == sidx(2, ORIG_REP[r], 0)) return r;
        end
        n++;
      end
    return -1;
  endfunction

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sod, in_ready, out_valid, out_last;
  char_t [0:0][1:0] in_char;
  logic [OUT_PINS-1:0] out_data;
  always #5 clk = ~clk;

  nfa_fpga_top #(
    .NUM_STREAMS(1), .N_INPUTS(N_INPUTS), .OUT_PINS(OUT_PINS),
    .N_CLASSES(C), .CLASS_MAP(cmap()), .STRIDE(STRIDE),
    .N_STE(N2), .N_CNT(0), .N_BOOL(0),
    .STE_MASK(s_mask()), .STE_PRED(s_pred()),
    .START_ALL(s_start()), .START_SOD('0),
    .CNT_EN('0), .CNT_RST('0), .CNT_TARGET(12'd1), .CNT_MODE(CNT_PULSE),
    .BOOL_IN('0), .BOOL_FUNC(BOOL_OR),
    .REPORT(REP)
  ) dut (.clk, .rst_n, .in_valid, .in_sod, .in_char, .in_ready, .out_valid, .out_data, .out_last);

  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  int odd_end = 0, even_end = 0;       // matches ending on 1st / 2nd char of a pair
  logic [3:0] expect_q[$];
  int windows_out = 0;
  longint t_last[$];

  initial begin
    repeat (WINDOWS * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      logic [3:0] got, e;
      got = '0;
      for (int k = 0; k < N_REP; k++) if (out_data[k]) got[bit_pattern(k)] = 1'b1;
      windows_out++;
      t_last.push_back($time);
      e = expect_q.size() > 0 ? expect_q.pop_front() : 'x;
      checks++;
      if (got !== e) begin
        failures++;
        $display("FAIL window %0d: patterns %b expected %b", windows_out, got, e);
      end
    end
  end

  initial begin
    stream_t q;
    int n_match = 0;
    n_match = 0;
    in_valid = 0; in_sod = 0; in_char = '0;
    checks++;
    for (int k = 0; k < N_REP; k++) if (bit_pattern(k) < 0) begin
      failures++;
      $display("FAIL report bit %0d maps to no pattern", k);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WINDOWS; w++) begin
      logic [3:0] e;
      bit sod;
      e = '0;
      sod = (w == 0) || ($urandom_range(0, 3) == 0);
      for (int st = 0; st < N_INPUTS / STRIDE; st++) begin
        logic [5:0] r0, r1;
        byte unsigned c0, c1;
        c0 = rand_char();
        c1 = rand_char();
        r0 = step(q, n_match, c0, sod && st == 0);
        r1 = step(q, n_match, c1, 0);
        e |= r0[3:0] | r1[3:0];
        for (int k = 0; k < 4; k++) begin
          if (r0[k]) begin seen[k]++; odd_end++; end
          if (r1[k]) begin seen[k]++; even_end++; end
        end
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1;
        in_sod = sod && (st == 0);
        in_char[0][0] = c0;
        in_char[0][1] = c1;
        @(posedge clk);
      end
      expect_q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    wait (windows_out == WINDOWS);
    // full rate from the second window on: 4 steps + 1 output cycle each
    for (int w = 2; w < WINDOWS; w++) begin
      checks++;
      if (t_last[w] - t_last[w-1] != 10 * (N_INPUTS / STRIDE + 1)) begin
        failures++;
        $display("FAIL window %0d took %0d cycles", w, (t_last[w] - t_last[w-1]) / 10);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL pattern %0d never matched", k); end
    end
    checks++;
    if (odd_end == 0 || even_end == 0) begin
      failures++;
      $display("FAIL matches did not end on both characters of a pair");
    end
    $display("%0d strided states, %0d report bits; matches ending on 1st/2nd char: %0d/%0d",
             N2, N_REP, odd_end, even_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
