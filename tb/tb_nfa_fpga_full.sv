// tb_nfa_fpga_full: the device at its default size: four streams, the
// default NFA, a window of 65536 characters (64K, the longest IP packet)
// and 32 output pins, so a window's 24 match bits leave in one cycle while
// input stalls for that cycle. It runs two full windows (about 164,000
// cycles with random input gaps and stream restarts) and compares each
// window's match bits with a reference model per stream (tb_nfa_ref_pkg).
// It also requires an input stall, a stream restart, every report element
// of every stream, and the a+, b+ and d+ self loops to occur.
module tb_nfa_fpga_full;
  import nfa_pkg::*;
  import tb_nfa_ref_pkg::*;

  localparam int NS = 4, N_REP = 6, N_INPUTS = 65536, OUT_PINS = 32;
  localparam int R_ALL = NS * N_REP;
  localparam int OUT_CYCLES = (R_ALL + OUT_PINS - 1) / OUT_PINS;
  localparam int WINDOWS = 2;
  localparam int RESTART_ONE_IN = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sod, in_ready, out_valid, out_last;
  char_t [NS-1:0] in_char;
  logic [OUT_PINS-1:0] out_data;
  always #5 clk = ~clk;

  nfa_fpga_top dut (
    .clk, .rst_n, .in_valid, .in_sod, .in_char, .in_ready, .out_valid, .out_data, .out_last);

  int checks = 0, failures = 0;
  longint cycles = 0;

  // mechanism counters
  int n_stall = 0, n_multibeat = 0, n_sod = 0, n_loop_a = 0, n_loop_b = 0, n_loop_d = 0;
  int seen[NS][N_REP];

  always @(posedge clk) cycles++;

  logic taken = 0;
  always @(posedge clk) taken <= in_valid && in_ready;

  initial begin
    repeat (WINDOWS * (N_INPUTS + OUT_CYCLES) * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference: window OR per stream ----------------
  stream_t hist[NS];
  int      nmatch[NS];
  logic [R_ALL-1:0] win_or;
  int      in_win;
  logic [R_ALL-1:0] expect_q[$];
  bit      started;

  task automatic ref_char(input char_t c[NS], input bit sod);
    logic [N_REP-1:0] r;
    for (int s = 0; s < NS; s++) begin
      int t;
      r = step(hist[s], nmatch[s], c[s], sod);
      win_or[s*N_REP +: N_REP] |= r;
      for (int k = 0; k < N_REP; k++) if (r[k]) seen[s][k]++;
      t = hist[s].size() - 1;
      if (r[0] && t >= 3 && hist[s][t-3] == "a") n_loop_a++;
      if (r[1] && t >= 1 && hist[s][t-1] == "d") n_loop_d++;
      if (r[3] && t >= 3 && hist[s][t-3] == "b") n_loop_b++;
    end
    in_win++;
    if (in_win == N_INPUTS) begin
      expect_q.push_back(win_or);
      win_or = '0;
      in_win = 0;
    end
  endtask

  // ---------------- output reassembly ----------------
  int beat = 0, windows = 0;
  logic [OUT_CYCLES*OUT_PINS-1:0] got;
  always @(negedge clk) begin
    #1;   // after the stimulus block has updated the reference at this edge
    if (rst_n && out_valid) begin
      got[beat*OUT_PINS +: OUT_PINS] = out_data;
      beat++;
      checks++;
      if (out_last !== (beat == OUT_CYCLES)) begin
        failures++;
        $display("FAIL out_last %b at beat %0d", out_last, beat - 1);
      end
      if (beat == OUT_CYCLES) begin
        logic [R_ALL-1:0] e;
        if (OUT_CYCLES > 1) n_multibeat++;
        beat = 0;
        windows++;
        checks++;
        e = expect_q.size() > 0 ? expect_q.pop_front() : '1;
        if (got[R_ALL-1:0] !== e) begin
          failures++;
          $display("FAIL window %0d: got %h expected %h", windows, got[R_ALL-1:0], e);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    char_t c[NS];
    bit first = 1;
    in_valid = 0; in_sod = 0; in_char = '0;
    win_or = '0; in_win = 0;
    for (int s = 0; s < NS; s++) begin
      nmatch[s] = 0;
      for (int k = 0; k < N_REP; k++) seen[s][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (windows < WINDOWS) begin
      @(negedge clk);
      // was the character presented at the last clock edge taken?
      if (taken) begin
        ref_char(c, in_sod || first);
        first = 0;
      end
      if (in_valid && !in_ready) n_stall++;
      // keep a character that was not taken, otherwise maybe offer a new one
      if (taken || !in_valid) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_sod = in_valid && ($urandom_range(0, RESTART_ONE_IN - 1) == 0);
        if (in_sod) n_sod++;
        for (int s = 0; s < NS; s++) begin
          c[s] = rand_char();
          in_char[s] = c[s];
        end
      end
    end
    // mechanism coverage
    checks++;
    if (n_stall == 0)     begin failures++; $display("FAIL no input stall"); end
    checks++;
    if (OUT_CYCLES > 1 && n_multibeat == 0) begin failures++; $display("FAIL no multi-cycle output"); end
    checks++;
    if (n_sod == 0)       begin failures++; $display("FAIL no stream restart"); end
    checks++;
    if (n_loop_a == 0 || n_loop_b == 0 || n_loop_d == 0) begin
      failures++; $display("FAIL a self loop never taken");
    end
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < N_REP; k++) begin
        checks++;
        if (seen[s][k] == 0) begin
          failures++;
          $display("FAIL stream %0d element %0d never reported", s, k);
        end
      end
    $display("windows %0d cycles %0d stalls %0d multi-cycle outputs %0d restarts %0d",
             windows, cycles, n_stall, n_multibeat, n_sod);
    $display("self loops a+ %0d b+ %0d d+ %0d; counter %0d boolean %0d (stream 0)",
             n_loop_a, n_loop_b, n_loop_d, seen[0][4], seen[0][5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
