// tb_report_collector: a collector for 10 report bits, a window of 7
// characters and 4 output pins (3 output cycles per window) is fed random
// report vectors, with random gaps in the input. The testbench keeps its own
// OR of each window's reports and checks every output slice, the out_last
// flag, that input is stalled exactly while a window is sent out, and that at
// full input rate a window takes N_INPUTS + 3 cycles.
module tb_report_collector;
  localparam int N_REP = 10, N_INPUTS = 7, OUT_PINS = 4, OUT_CYCLES = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, adv;
  logic [N_REP-1:0] report;
  logic in_ready, out_valid, out_last;
  logic [OUT_PINS-1:0] out_data;
  always #5 clk = ~clk;

  assign adv = in_valid && in_ready;

  report_collector #(.N_REP(N_REP), .N_INPUTS(N_INPUTS), .OUT_PINS(OUT_PINS)) dut (
    .clk, .rst_n, .adv, .report, .in_ready, .out_valid, .out_data, .out_last);

  int checks = 0, failures = 0;
  int windows = 0, stalls = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source side: report changes only in the cycle after a consumed character
  logic [N_REP-1:0] window_or, sent_or;
  int n_in;
  logic [N_REP-1:0] expect_q[$];

  always @(posedge clk) begin
    if (rst_n && adv) begin
      n_in++;
      report <= N_REP'($urandom) & N_REP'($urandom);   // value of this character
    end
  end

  // collect expected window contents: OR of the reports of N_INPUTS chars
  logic adv_d;
  always @(posedge clk) adv_d <= rst_n && adv;
  int in_window;
  always @(negedge clk) begin
    if (adv_d) begin
      window_or = window_or | report;
      in_window++;
      if (in_window == N_INPUTS) begin
        expect_q.push_back(window_or);
        window_or = '0;
        in_window = 0;
      end
    end
  end

  // output side: reassemble slices and compare
  int beat;
  longint last_t[$];
  logic [OUT_CYCLES*OUT_PINS-1:0] got;
  logic [N_REP-1:0] exp_v;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready === out_valid) begin
        failures++;
        $display("FAIL in_ready %b while out_valid %b", in_ready, out_valid);
      end
      if (out_valid) begin
        stalls++;
        got[beat*OUT_PINS +: OUT_PINS] = out_data;
        checks++;
        if (out_last !== (beat == OUT_CYCLES - 1)) begin
          failures++;
          $display("FAIL out_last %b at beat %0d", out_last, beat);
        end
        beat++;
        if (beat == OUT_CYCLES) begin
          beat = 0;
          windows++;
          last_t.push_back($time);
          checks++;
          exp_v = expect_q.size() > 0 ? expect_q.pop_front() : 'x;
          if (got[N_REP-1:0] !== exp_v || got[OUT_CYCLES*OUT_PINS-1:N_REP] != 0) begin
            failures++;
            $display("FAIL window %0d: got %b expected %b", windows, got, exp_v);
          end
        end
      end
    end
  end

  initial begin
    int w0;
    in_valid = 0; report = '0; n_in = 0; window_or = '0; in_window = 0;
    beat = 0; got = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random gaps
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
    end
    // full rate: successive windows must end N_INPUTS + OUT_CYCLES cycles apart
    @(negedge clk);
    in_valid = 1;
    wait (windows > 0);
    w0 = windows + 1;
    wait (windows == w0 + 10);
    for (int w = w0; w < w0 + 10; w++) begin
      checks++;
      if (last_t[w] - last_t[w-1] != 10 * (N_INPUTS + OUT_CYCLES)) begin
        failures++;
        $display("FAIL window %0d took %0d cycles, expected %0d",
                 w, (last_t[w] - last_t[w-1]) / 10, N_INPUTS + OUT_CYCLES);
      end
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (windows < 50) begin
      failures++;
      $display("FAIL only %0d windows", windows);
    end
    $display("windows %0d, stalled cycles %0d", windows, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
