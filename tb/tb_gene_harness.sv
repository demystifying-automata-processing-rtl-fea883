// tb_gene_harness: runs one configuration of the motif-finding workload
// through a whole device (nfa_fpga_top) and checks it.
//
// A "gene region" of N_MOTIF + K - 1 DNA letters is made up at elaboration
// time (a fixed linear congruential sequence). Every substring of length K
// in it is a motif, and each motif gets a Hamming-distance NFA for distance
// D ((2D+1)K - D^2 states, match and mismatch states per motif position, as
// in tb_hamming_workload). All the NFAs sit side by side in one engine. The
// device runs with alphabet compression to 4 classes and a 500-character
// reporting window, and each window starts a new stream (one gene).
//
// The input is random A/C/G/T with motifs planted with 0..3 substitutions.
// For every window, the reference marks, per motif, the report state of
// each substring within distance D (the state is set by the distance and by
// whether the last letter matched). The window's match bits must equal
// that. Results go out on the ports when done is set.
module tb_gene_harness
  import nfa_pkg::*;
#(
  parameter int K       = 8,
  parameter int D       = 2,
  parameter int N_MOTIF = 4,
  parameter int WINDOWS = 6
) (
  output int checks,
  output int failures,
  output int hits,
  output bit done
);
  localparam int S       = (2*D + 1)*K - D*D;       // states per motif NFA
  localparam int N_STE   = N_MOTIF * S;
  localparam int N_ELEM  = N_STE + 2;
  localparam int REGION  = N_MOTIF + K - 1;
  localparam int N_IN    = 500;                      // gene region length
  localparam int RPM     = 2*D + 1;                  // report states per motif
  localparam int R_ALL   = N_MOTIF * RPM;
  localparam int OUT_PINS = 32;
  localparam int OUT_CYCLES = (R_ALL + OUT_PINS - 1) / OUT_PINS;

  function automatic int letter(int n);   // 0..3 = A C G T
    int unsigned x = 32'd12345 + 32'(K) * 32'd7919;
    for (int i = 0; i <= n; i++) x = x * 32'd1103515245 + 32'd12345;
    return int'((x >> 16) & 3);
  endfunction

  function automatic byte unsigned dna(int c);
    case (c)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  function automatic logic [ALPHABET-1:0][7:0] dna_map();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = 8'd4;
    m["A"] = 8'd0; m["C"] = 8'd1; m["G"] = 8'd2; m["T"] = 8'd3;
    return m;
  endfunction

  // state index within one motif's NFA, -1 if the state does not exist
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

  function automatic logic [N_STE-1:0][3:0] g_mask();
    logic [N_STE-1:0][3:0] m;
    m = '0;
    for (int mo = 0; mo < N_MOTIF; mo++)
      for (int i = 1; i <= K; i++)
        for (int e = 0; e <= D; e++) begin
          logic [3:0] lm;
          lm = 4'(1) << letter(mo + i - 1);
          if (sidx(i, e, 0) >= 0) m[mo*S + sidx(i, e, 0)] = lm;
          if (sidx(i, e, 1) >= 0) m[mo*S + sidx(i, e, 1)] = ~lm;
        end
    return m;
  endfunction

  function automatic logic [N_STE-1:0][N_ELEM-1:0] g_pred();
    logic [N_STE-1:0][N_ELEM-1:0] p;
    p = '0;
    for (int mo = 0; mo < N_MOTIF; mo++)
      for (int i = 2; i <= K; i++)
        for (int e = 0; e <= D; e++)
          for (int pm = 0; pm < 2; pm++) begin
            if (sidx(i, e, 0) >= 0 && sidx(i-1, e, pm[0]) >= 0)
              p[mo*S + sidx(i, e, 0)][mo*S + sidx(i-1, e, pm[0])] = 1'b1;
            if (e >= 1 && sidx(i, e, 1) >= 0 && sidx(i-1, e-1, pm[0]) >= 0)
              p[mo*S + sidx(i, e, 1)][mo*S + sidx(i-1, e-1, pm[0])] = 1'b1;
          end
    return p;
  endfunction

  function automatic logic [N_STE-1:0] g_start();
    logic [N_STE-1:0] s;
    s = '0;
    for (int mo = 0; mo < N_MOTIF; mo++) begin
      s[mo*S + sidx(1, 0, 0)] = 1'b1;
      s[mo*S + sidx(1, 1, 1)] = 1'b1;
    end
    return s;
  endfunction

  function automatic logic [N_ELEM-1:0] g_report();
    logic [N_ELEM-1:0] r;
    r = '0;
    for (int mo = 0; mo < N_MOTIF; mo++)
      for (int e = 0; e <= D; e++) begin
        if (sidx(K, e, 0) >= 0) r[mo*S + sidx(K, e, 0)] = 1'b1;
        if (sidx(K, e, 1) >= 0) r[mo*S + sidx(K, e, 1)] = 1'b1;
      end
    return r;
  endfunction

  // position of a motif's report state among its RPM report bits
  function automatic int rpos(int e, bit mis);
    int n = 0;
    for (int j = 0; j < S; j++) begin
      if (j == sidx(K, e, mis)) return n;
      for (int ee = 0; ee <= D; ee++)
        if (j == sidx(K, ee, 0) || j == sidx(K, ee, 1)) n++;
    end
    return -1;
  endfunction

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sod, in_ready, out_valid, out_last;
  char_t [0:0] in_char;
  logic [OUT_PINS-1:0] out_data;
  always #5 clk = ~clk;

  nfa_fpga_top #(
    .NUM_STREAMS(1), .N_INPUTS(N_IN), .OUT_PINS(OUT_PINS),
    .N_CLASSES(4), .CLASS_MAP(dna_map()),
    .N_STE(N_STE), .N_CNT(0), .N_BOOL(0),
    .STE_MASK(g_mask()), .STE_PRED(g_pred()),
    .START_ALL(g_start()), .START_SOD('0),
    .CNT_EN('0), .CNT_RST('0), .CNT_TARGET(12'd1), .CNT_MODE(CNT_PULSE),
    .BOOL_IN('0), .BOOL_FUNC(BOOL_OR),
    .REPORT(g_report())
  ) dut (.clk, .rst_n, .in_valid, .in_sod, .in_char, .in_ready, .out_valid, .out_data, .out_last);

  logic [R_ALL-1:0] expect_q[$];
  int beat = 0, windows_out = 0;
  logic [OUT_CYCLES*OUT_PINS-1:0] got;

  always @(negedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      got[beat*OUT_PINS +: OUT_PINS] = out_data;
      beat++;
      if (beat == OUT_CYCLES) begin
        logic [R_ALL-1:0] e;
        beat = 0;
        windows_out++;
        checks++;
        e = expect_q.size() > 0 ? expect_q.pop_front() : '1;
        if (got[R_ALL-1:0] !== e) begin
          failures++;
          $display("FAIL K=%0d window %0d: got %h expected %h", K, windows_out, got[R_ALL-1:0], e);
        end
      end
    end
  end

  initial begin
    byte unsigned win[N_IN];
    logic [R_ALL-1:0] exp_v;
    checks = 0; failures = 0; hits = 0; done = 0;
    in_valid = 0; in_sod = 0; in_char = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WINDOWS; w++) begin
      // make one gene region of input with planted motifs
      for (int t = 0; t < N_IN; t++) win[t] = dna($urandom_range(0, 3));
      for (int p = 0; p + K < N_IN; p += 37) begin
        automatic int mo = $urandom_range(0, N_MOTIF - 1);
        for (int i = 0; i < K; i++) win[p + i] = dna(letter(mo + i));
        for (int n = $urandom_range(0, 3); n > 0; n--)
          win[p + $urandom_range(0, K - 1)] = dna($urandom_range(0, 3));
      end
      // reference
      exp_v = '0;
      for (int t = K - 1; t < N_IN; t++)
        for (int mo = 0; mo < N_MOTIF; mo++) begin
          automatic int hd = 0;
          for (int i = 0; i < K; i++) if (win[t - K + 1 + i] != dna(letter(mo + i))) hd++;
          if (hd <= D) begin
            exp_v[mo*RPM + rpos(hd, win[t] != dna(letter(mo + K - 1)))] = 1'b1;
            hits++;
          end
        end
      expect_q.push_back(exp_v);
      // drive it, one character per cycle when the device is ready
      for (int t = 0; t < N_IN; t++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1;
        in_sod = (t == 0);
        in_char[0] = win[t];
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      in_sod = 0;
    end
    wait (windows_out == WINDOWS);
    checks++;
    if (hits == 0) begin failures++; $display("FAIL K=%0d no motif occurrence", K); end
    done = 1;
  end
endmodule
