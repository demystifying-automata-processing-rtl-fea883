// tb_synth_harness: runs one synthetic regular-expression workload through a
// whole device (nfa_fpga_top) and checks every reporting window.
//
// The NFA is generated at elaboration time with the shape of a large rule
// set with shared prefixes: F0 entry states, and a state at depth d gets
// max(1, F0 * (GPCT/100)^d) children, so fan-out is high near the entry and
// falls to single chains deeper down. States are numbered breadth first and
// generation stops at N_STE states; the states left without children are
// the report states. Each state accepts one symbol (70%), a set of four
// symbols (20%) or any symbol (10%, a wildcard), and one state in eight
// repeats itself (a self loop). Choices come from a fixed hash, so the NFA
// is the same in every run. The alphabet has ALPHA symbols; with ALPHA < 256
// the device maps characters 0..ALPHA-1 to classes and all others to no
// class (alphabet compression).
//
// The input trace walks the NFA: with probability PFORW percent it moves to
// a random child of the current state and emits a symbol that child
// accepts, otherwise it emits a random character and goes back to the entry.
// Each 1000-character window is a new stream. The reference below keeps the
// NFA as a parent table and simulates its active set character by
// character; the window's report bits must match. Results go out on the
// ports when done is set.
module tb_synth_harness
  import nfa_pkg::*;
#(
  parameter int N_STE   = 96,
  parameter int ALPHA   = 64,
  parameter int F0      = 6,
  parameter int GPCT    = 50,
  parameter int PFORW   = 90,
  parameter int STREAMS = 2,
  parameter int WINDOWS = 4
) (
  output int checks,
  output int failures,
  output int hits,
  output bit done
);
  localparam int N_ELEM   = N_STE + 2;
  localparam int N_IN     = 1000;
  localparam int OUT_PINS = 32;

  function automatic int unsigned hash(int j, int salt);
    int unsigned x = 32'(j) * 32'd2654435761 + 32'(salt) * 32'd40503 + 32'(ALPHA);
    x = x ^ (x >> 15);
    x = x * 32'd2246822519;
    return x ^ (x >> 13);
  endfunction

  function automatic int outdeg(int d);
    int num = F0, den = 1;
    for (int i = 0; i < d; i++) begin num *= GPCT; den *= 100; end
    return (num / den) < 1 ? 1 : num / den;
  endfunction

  // parent of each state plus 1 (0: entry state), breadth first
  function automatic logic [N_STE-1:0][15:0] g_parent();
    logic [N_STE-1:0][15:0] p;
    int depth[N_STE];
    int n;
    p = '0;
    n = (F0 < N_STE) ? F0 : N_STE;
    for (int j = 0; j < n; j++) depth[j] = 1;
    for (int j = 0; j < N_STE && n < N_STE; j++)
      for (int c = 0; c < outdeg(depth[j]) && n < N_STE; c++) begin
        p[n] = 16'(j + 1);
        depth[n] = depth[j] + 1;
        n++;
      end
    return p;
  endfunction
  localparam logic [N_STE-1:0][15:0] PAR = g_parent();

  function automatic logic [N_STE-1:0][ALPHA-1:0] g_mask();
    logic [N_STE-1:0][ALPHA-1:0] m;
    m = '0;
    for (int j = 0; j < N_STE; j++) begin
      automatic int unsigned kind = hash(j, 1) % 10;
      automatic int s = int'(hash(j, 2) % ALPHA);
      if (kind < 7)      m[j][s] = 1'b1;
      else if (kind < 9) for (int i = 0; i < 4; i++) m[j][(s + i) % ALPHA] = 1'b1;
      else               m[j] = '1;
    end
    return m;
  endfunction
  localparam logic [N_STE-1:0][ALPHA-1:0] MASK = g_mask();

  function automatic logic [N_STE-1:0] g_loop();
    logic [N_STE-1:0] l;
    for (int j = 0; j < N_STE; j++) l[j] = (hash(j, 3) % 8) == 0;
    return l;
  endfunction
  localparam logic [N_STE-1:0] LOOP = g_loop();

  function automatic logic [N_STE-1:0] g_leaf();
    logic [N_STE-1:0] f;
    f = '1;
    for (int j = 0; j < N_STE; j++) if (PAR[j] != 0) f[PAR[j] - 1] = 1'b0;
    return f;
  endfunction
  localparam logic [N_STE-1:0] LEAF = g_leaf();
  localparam int N_REP = $countones(LEAF);
  localparam int R_ALL = STREAMS * N_REP;
  localparam int OUT_CYCLES = (R_ALL + OUT_PINS - 1) / OUT_PINS;

  function automatic logic [N_STE-1:0][N_ELEM-1:0] g_pred();
    logic [N_STE-1:0][N_ELEM-1:0] p;
    p = '0;
    for (int j = 0; j < N_STE; j++) begin
      if (PAR[j] != 0) p[j][PAR[j] - 1] = 1'b1;
      if (LOOP[j]) p[j][j] = 1'b1;
    end
    return p;
  endfunction

  function automatic logic [N_STE-1:0] g_start();
    logic [N_STE-1:0] s;
    for (int j = 0; j < N_STE; j++) s[j] = (PAR[j] == 0);
    return s;
  endfunction

  function automatic logic [N_ELEM-1:0] g_report();
    return N_ELEM'(LEAF);
  endfunction

  function automatic logic [ALPHABET-1:0][7:0] cmap();
    logic [ALPHABET-1:0][7:0] m;
    for (int c = 0; c < ALPHABET; c++) m[c] = (c < ALPHA) ? 8'(c) : 8'(ALPHA % 256);
    return m;
  endfunction

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sod, in_ready, out_valid, out_last;
  char_t [STREAMS-1:0] in_char;
  logic [OUT_PINS-1:0] out_data;
  always #5 clk = ~clk;

  nfa_fpga_top #(
    .NUM_STREAMS(STREAMS), .N_INPUTS(N_IN), .OUT_PINS(OUT_PINS),
    .N_CLASSES(ALPHA), .CLASS_MAP(cmap()),
    .N_STE(N_STE), .N_CNT(0), .N_BOOL(0),
    .STE_MASK(MASK), .STE_PRED(g_pred()),
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
          $display("FAIL ALPHA=%0d F0=%0d window %0d: got %h expected %h",
                   ALPHA, F0, windows_out, got[R_ALL-1:0], e);
        end
      end
    end
  end

  // one character of the trace generator; cur is the state last walked to
  // (-1: entry)
  function automatic int next_char(ref int cur);
    int kids[$];
    int syms[$];
    for (int j = 0; j < N_STE; j++) if (int'(PAR[j]) == cur + 1) kids.push_back(j);
    if (kids.size() > 0 && $urandom_range(0, 99) < PFORW) begin
      cur = kids[$urandom_range(0, kids.size() - 1)];
      for (int s = 0; s < ALPHA; s++) if (MASK[cur][s]) syms.push_back(s);
      return syms[$urandom_range(0, syms.size() - 1)];
    end
    cur = -1;
    if (ALPHA < ALPHABET && $urandom_range(0, 49) == 0)
      return $urandom_range(ALPHA, ALPHABET - 1);   // outside the alphabet
    return $urandom_range(0, ALPHA - 1);
  endfunction

  initial begin
    byte unsigned win[STREAMS][N_IN];
    logic [R_ALL-1:0] exp_v;
    checks = 0; failures = 0; hits = 0; done = 0;
    in_valid = 0; in_sod = 0; in_char = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WINDOWS; w++) begin
      exp_v = '0;
      for (int s = 0; s < STREAMS; s++) begin
        automatic int cur = -1;
        automatic bit act[N_STE];
        automatic bit nxt[N_STE];
        for (int t = 0; t < N_IN; t++) win[s][t] = 8'(next_char(cur));
        // reference: active-set simulation of the parent table
        for (int j = 0; j < N_STE; j++) act[j] = 0;
        for (int t = 0; t < N_IN; t++) begin
          automatic int c = int'(win[s][t]);
          for (int j = 0; j < N_STE; j++) begin
            automatic bit en = (PAR[j] == 0);
            if (t > 0 && PAR[j] != 0 && act[PAR[j] - 1]) en = 1;
            if (t > 0 && LOOP[j] && act[j]) en = 1;
            nxt[j] = en && c < ALPHA && MASK[j][c];
          end
          act = nxt;
          begin
            automatic int r = 0;
            for (int j = 0; j < N_STE; j++)
              if (LEAF[j]) begin
                if (act[j]) begin
                  exp_v[s*N_REP + r] = 1'b1;
                  hits++;
                end
                r++;
              end
          end
        end
      end
      expect_q.push_back(exp_v);
      for (int t = 0; t < N_IN; t++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1;
        in_sod = (t == 0);
        for (int s = 0; s < STREAMS; s++) in_char[s] = win[s][t];
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      in_sod = 0;
    end
    wait (windows_out == WINDOWS);
    checks++;
    if (hits == 0) begin failures++; $display("FAIL ALPHA=%0d F0=%0d no match", ALPHA, F0); end
    done = 1;
  end
endmodule
