// tb_ils_workloads: runs the ILS metric-update loop in the configurations the design is
// evaluated in: list sizes 16, 32 and 64 with 8 metrics per group (G = 4, 8, 16), and
// list size 8 with G = 2, 4 and 8 (the interleaving examples). For each it checks the
// stored metrics and candidate indices step by step against the reference model, and
// the comparator and stage counts: 72, 144 and 288 comparators in 6 stages for the
// 8-metric groups; 2k = 8, 4 and 2 give 6, 3 and 1 stages for L = 8.
module tb_ils_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NR = 6;
  int c [NR], f [NR], a [NR];
  logic fin [NR];

  ils_top_check #(.L(16), .G(4),  .EXP_CAS(72),  .EXP_STAGES(6)) u_l16 (.clk(clk), .checks(c[0]), .failures(f[0]), .approx(a[0]), .finished(fin[0]));
  ils_top_check #(.L(32), .G(8),  .EXP_CAS(144), .EXP_STAGES(6)) u_l32 (.clk(clk), .checks(c[1]), .failures(f[1]), .approx(a[1]), .finished(fin[1]));
  ils_top_check #(.L(64), .G(16), .EXP_CAS(288), .EXP_STAGES(6)) u_l64 (.clk(clk), .checks(c[2]), .failures(f[2]), .approx(a[2]), .finished(fin[2]));
  ils_top_check #(.L(8),  .G(2),  .EXP_CAS(36),  .EXP_STAGES(6)) u_g2  (.clk(clk), .checks(c[3]), .failures(f[3]), .approx(a[3]), .finished(fin[3]));
  ils_top_check #(.L(8),  .G(4),  .EXP_CAS(20),  .EXP_STAGES(3)) u_g4  (.clk(clk), .checks(c[4]), .failures(f[4]), .approx(a[4]), .finished(fin[4]));
  ils_top_check #(.L(8),  .G(8),  .EXP_CAS(8),   .EXP_STAGES(1)) u_g8  (.clk(clk), .checks(c[5]), .failures(f[5]), .approx(a[5]), .finished(fin[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int r = 0; r < NR; r++) begin
      checks += c[r];
      failures += f[r];
      $display("run %0d: checks=%0d failures=%0d approximate steps=%0d", r, c[r], f[r], a[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
