// tb_counter_element: drives three counters (pulse, latch and roll mode,
// target 3) with random count, reset, clear and advance inputs and compares
// their outputs with a model kept in the testbench, every step.
module tb_counter_element;
  import nfa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adv, clear, cnt_in, rst_in;
  logic [2:0] fire;
  int checks = 0, failures = 0;
  int fired[3] = '{0, 0, 0};

  always #5 clk = ~clk;

  counter_element #(.TARGET(12'd3), .MODE(CNT_PULSE)) u_p
    (.clk, .rst_n, .adv, .clear, .cnt_in, .rst_in, .fire(fire[0]));
  counter_element #(.TARGET(12'd3), .MODE(CNT_LATCH)) u_l
    (.clk, .rst_n, .adv, .clear, .cnt_in, .rst_in, .fire(fire[1]));
  counter_element #(.TARGET(12'd3), .MODE(CNT_ROLL)) u_r
    (.clk, .rst_n, .adv, .clear, .cnt_in, .rst_in, .fire(fire[2]));

  // model: number of counted activations since the last reset/clear
  int n[3];
  bit held[3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adv = 0; clear = 0; cnt_in = 0; rst_in = 0;
    n = '{0, 0, 0};
    held = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [2:0] exp;
      @(negedge clk);
      adv    = ($urandom_range(0, 3) != 0);
      cnt_in = ($urandom_range(0, 1) != 0);
      rst_in = ($urandom_range(0, 15) == 0);
      clear  = ($urandom_range(0, 31) == 0);
      #1;
      // expected output of this step
      exp[0] = !rst_in && cnt_in && (n[0] == 2);            // pulse: 3rd count
      exp[1] = !rst_in && (held[1] || (cnt_in && n[1] == 2));
      exp[2] = !rst_in && cnt_in && (n[2] == 2);
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (fire[m] !== exp[m]) begin
          failures++;
          $display("FAIL step %0d mode %0d: fire %b expected %b", i, m, fire[m], exp[m]);
        end
        if (fire[m] && adv) fired[m]++;
      end
      // model update at the edge
      if (adv) begin
        for (int m = 0; m < 3; m++) begin
          if (clear || rst_in) begin
            n[m] = 0;
            held[m] = 0;
          end else if (exp[m]) begin
            if (m == 2) n[m] = 0; else begin n[m] = 3; held[m] = 1; end
          end else if (cnt_in && n[m] < 3) begin
            n[m]++;
          end
        end
      end
    end
    checks++;
    if (fired[0] == 0 || fired[1] == 0 || fired[2] == 0) begin
      failures++;
      $display("FAIL a counter never fired");
    end
    $display("fired: pulse %0d latch %0d roll %0d", fired[0], fired[1], fired[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
