// tb_synthetic_workload: the synthetic rule-set workloads in their four
// variants, deep and shallow NFA shape with a 64- and a 256-symbol
// alphabet, each through its own two-stream device (tb_synth_harness).
// "Deep" has few entry branches that soon turn into long single chains
// (about 13 levels here); "shallow" has more, wider entry branches and ends
// after about 5 levels. The trace generator moves deeper with probability
// 0.9, and every 1000-character window is checked against a reference.
// The NFAs hold 96 states each, a small cut of the same construction.
module tb_synthetic_workload;
  int c[4], f[4], h[4];
  bit d[4];

  tb_synth_harness #(.ALPHA(64),  .F0(4), .GPCT(50)) u_deep64     (.checks(c[0]), .failures(f[0]), .hits(h[0]), .done(d[0]));
  tb_synth_harness #(.ALPHA(256), .F0(4), .GPCT(50)) u_deep256    (.checks(c[1]), .failures(f[1]), .hits(h[1]), .done(d[1]));
  tb_synth_harness #(.ALPHA(64),  .F0(8), .GPCT(40)) u_shallow64  (.checks(c[2]), .failures(f[2]), .hits(h[2]), .done(d[2]));
  tb_synth_harness #(.ALPHA(256), .F0(8), .GPCT(40)) u_shallow256 (.checks(c[3]), .failures(f[3]), .hits(h[3]), .done(d[3]));

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("report-state activations: deep-64 %0d, deep-256 %0d, shallow-64 %0d, shallow-256 %0d",
             h[0], h[1], h[2], h[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
