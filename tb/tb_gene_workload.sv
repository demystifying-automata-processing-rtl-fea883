// tb_gene_workload: the motif-finding workload at the four motif lengths
// K = 8, 12, 16, 20 with Hamming distance 2, each through its own device
// (tb_gene_harness). Each device holds the NFAs of all length-K substrings
// of a short gene region (4 motifs) and processes six 500-letter gene
// regions, reporting once per region.
module tb_gene_workload;
  int c[4], f[4], h[4];
  bit d[4];

  tb_gene_harness #(.K(8))  u_k8  (.checks(c[0]), .failures(f[0]), .hits(h[0]), .done(d[0]));
  tb_gene_harness #(.K(12)) u_k12 (.checks(c[1]), .failures(f[1]), .hits(h[1]), .done(d[1]));
  tb_gene_harness #(.K(16)) u_k16 (.checks(c[2]), .failures(f[2]), .hits(h[2]), .done(d[2]));
  tb_gene_harness #(.K(20)) u_k20 (.checks(c[3]), .failures(f[3]), .hits(h[3]), .done(d[3]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("motif occurrences found: K=8 %0d, K=12 %0d, K=16 %0d, K=20 %0d",
             h[0], h[1], h[2], h[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
