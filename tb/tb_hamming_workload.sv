// tb_hamming_workload: one automaton of the motif-finding workload: a
// Hamming-distance NFA that reports every substring of length K = 8 within
// distance D = 2 of a fixed motif, over the DNA alphabet. The NFA is
// generated here in homogeneous form: for position i of the motif and
// error count e there is a "match" state (symbol = motif[i]) and, for e >= 1,
// a "mismatch" state (the three other letters), with (2D+1)K - D^2 = 36
// states in all. The characters go through the alphabet-compressing
// decoder (A, C, G, T -> 4 classes), so each state needs only a 4-bit mask.
//
// A random A/C/G/T trace is fed one character per cycle, and after every
// character the engine's reports are compared with a brute-force Hamming
// distance of the last K characters: a report is expected exactly when the
// distance is at most D, and it must come from the state whose error count
// equals that distance and whose last character matched or not as the
// trace's did.
module tb_hamming_workload;
  import nfa_pkg::*;

  localparam int K = 8, D = 2;
  localparam int N_STE = (2*D + 1)*K - D*D;   // 36
  localparam int N_ELEM = N_STE + 2;          // plus the unused counter/boolean slots
  localparam byte unsigned MOTIF[K] = '{"G", "A", "T", "T", "A", "C", "A", "G"};
  localparam int TRACE = 20000;

  function automatic int cls(byte unsigned c);
    case (c)
      "A": return 0;
      "C": return 1;
      "G": return 2;
      default: return 3;   // "T"
    endcase
  endfunction

  function automatic logic [ALPHABET-1:0][7:0] dna_map();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = 8'd4;
    m["A"] = 8'd0; m["C"] = 8'd1; m["G"] = 8'd2; m["T"] = 8'd3;
    return m;
  endfunction

  // index of state (i = 1..K, e, mismatch) in the numbering used below
  function automatic int sidx(int i, int e, bit mis);
    int n = 0;
    for (int ii = 1; ii <= K; ii++) begin
      for (int ee = 0; ee <= D && ee <= ii - 1; ee++) begin
        if (ii == i && ee == e && !mis) return n;
        n++;
      end
      for (int ee = 1; ee <= D && ee <= ii; ee++) begin
        if (ii == i && ee == e && mis) return n;
        n++;
      end
    end
    return -1;
  endfunction

  function automatic logic [N_STE-1:0][3:0] h_mask();
    logic [N_STE-1:0][3:0] m;
    m = '0;
    for (int i = 1; i <= K; i++)
      for (int e = 0; e <= D; e++) begin
        if (sidx(i, e, 0) >= 0) m[sidx(i, e, 0)] = 4'(1) << cls(MOTIF[i-1]);
        if (sidx(i, e, 1) >= 0) m[sidx(i, e, 1)] = ~(4'(1) << cls(MOTIF[i-1]));
      end
    return m;
  endfunction

  function automatic logic [N_STE-1:0][N_ELEM-1:0] h_pred();
    logic [N_STE-1:0][N_ELEM-1:0] p;
    p = '0;
    for (int i = 2; i <= K; i++)
      for (int e = 0; e <= D; e++) begin
        // match state (i,e) follows any state (i-1,e)
        if (sidx(i, e, 0) >= 0) begin
          if (sidx(i-1, e, 0) >= 0) p[sidx(i, e, 0)][sidx(i-1, e, 0)] = 1'b1;
          if (sidx(i-1, e, 1) >= 0) p[sidx(i, e, 0)][sidx(i-1, e, 1)] = 1'b1;
        end
        // mismatch state (i,e) follows any state (i-1,e-1)
        if (e >= 1 && sidx(i, e, 1) >= 0) begin
          if (sidx(i-1, e-1, 0) >= 0) p[sidx(i, e, 1)][sidx(i-1, e-1, 0)] = 1'b1;
          if (sidx(i-1, e-1, 1) >= 0) p[sidx(i, e, 1)][sidx(i-1, e-1, 1)] = 1'b1;
        end
      end
    return p;
  endfunction

  function automatic logic [N_STE-1:0] h_start();
    logic [N_STE-1:0] s;
    s = '0;
    s[sidx(1, 0, 0)] = 1'b1;
    s[sidx(1, 1, 1)] = 1'b1;
    return s;
  endfunction

  function automatic logic [N_ELEM-1:0] h_report();
    logic [N_ELEM-1:0] r;
    r = '0;
    for (int e = 0; e <= D; e++) begin
      if (sidx(K, e, 0) >= 0) r[sidx(K, e, 0)] = 1'b1;
      if (sidx(K, e, 1) >= 0) r[sidx(K, e, 1)] = 1'b1;
    end
    return r;
  endfunction

  localparam logic [N_ELEM-1:0] REP = h_report();
  localparam int N_REP = $countones(REP);

  logic clk = 0, rst_n = 0;
  logic adv;
  char_t ch;
  logic [3:0] sym;
  logic [N_REP-1:0] report;
  always #5 clk = ~clk;

  symbol_decoder #(.N_CLASSES(4), .CLASS_MAP(dna_map())) u_dec (.ch(ch), .sym(sym));
  nfa_engine #(
    .N_STE(N_STE), .N_SYM(4), .N_CNT(0), .N_BOOL(0),
    .STE_MASK(h_mask()), .STE_PRED(h_pred()),
    .START_ALL(h_start()), .START_SOD('0),
    .CNT_EN('0), .CNT_RST('0), .CNT_TARGET(12'd1), .CNT_MODE(CNT_PULSE),
    .BOOL_IN('0), .BOOL_FUNC(BOOL_OR),
    .REPORT(REP)
  ) u_nfa (.clk, .rst_n, .adv, .sod(1'b0), .sym, .act(), .report);

  int checks = 0, failures = 0, hits = 0;
  int hits_by_dist[D+1];

  initial begin
    repeat (2 * TRACE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned trace[$];
    static byte unsigned dna[4] = '{"A", "C", "G", "T"};
    adv = 0; ch = "A";
    for (int e = 0; e <= D; e++) hits_by_dist[e] = 0;
    checks++;
    if (N_REP != 2*D + 1) begin failures++; $display("FAIL %0d report states", N_REP); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TRACE; t++) begin
      automatic int hd;
      logic [N_REP-1:0] exp_rep;
      @(negedge clk);
      // plant the motif with 0..3 substitutions now and then
      if (t % 97 == 0 && t + K < TRACE) begin
        automatic int nsub = $urandom_range(0, 3);
        for (int i = 0; i < K; i++) trace.push_back(MOTIF[i]);
        for (int n = 0; n < nsub; n++) trace[trace.size() - 1 - $urandom_range(0, K-1)] = dna[$urandom_range(0, 3)];
      end
      if (trace.size() <= t) trace.push_back(dna[$urandom_range(0, 3)]);
      ch = trace[t];
      adv = 1;
      @(negedge clk);
      #1;
      // reference: Hamming distance of the last K characters
      hd = K + 1;
      if (t >= K - 1) begin
        hd = 0;
        for (int i = 0; i < K; i++) if (trace[t - K + 1 + i] != MOTIF[i]) hd++;
      end
      // expected: the report state at position K with error count hd
      exp_rep = '0;
      if (hd <= D) begin
        automatic int j = 0;
        automatic bit last_mis = (trace[t] != MOTIF[K-1]);
        for (int s = 0; s < N_ELEM; s++) begin
          if (REP[s]) begin
            if (s == sidx(K, hd, last_mis)) exp_rep[j] = 1'b1;
            j++;
          end
        end
        hits++;
        hits_by_dist[hd]++;
      end
      checks++;
      if (report !== exp_rep) begin
        failures++;
        $display("FAIL t=%0d distance %0d: report %b expected %b", t, hd, report, exp_rep);
      end
      adv = 0;
    end
    for (int e = 0; e <= D; e++) begin
      checks++;
      if (hits_by_dist[e] == 0) begin failures++; $display("FAIL no match at distance %0d", e); end
    end
    $display("%0d characters, %0d matches (distance 0/1/2: %0d/%0d/%0d)",
             TRACE, hits, hits_by_dist[0], hits_by_dist[1], hits_by_dist[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
