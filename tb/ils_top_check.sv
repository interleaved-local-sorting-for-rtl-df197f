// ils_top_check: parameterised stimulus-and-check harness for ils_top, used by
// tb_ils_workloads to run the design at several list sizes and group counts.
//
// It resets the design, then decodes NCW codewords of NBITS information bits each with
// random LLR magnitudes, comparing after every step each stored metric with the
// reference model (ils_ref_pkg) and each stored candidate index with the candidates of
// its group. It also checks that the architecture holds the expected number of
// comparators (G times that of one 2k-to-k sorter, EXP_CAS) and that one 2k-to-k sorter
// has EXP_STAGES compare stages. finished rises when the run is over; checks and
// failures hold the totals.
module ils_top_check #(
  parameter int L          = 16,
  parameter int G          = 4,
  parameter int NCW        = 10,
  parameter int NBITS      = 32,
  parameter int EXP_CAS    = 72,
  parameter int EXP_STAGES = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   approx,
  output logic finished
);
  import ils_ref_pkg::*;
  localparam int K = L / G;
  localparam int TAG_W = $clog2(2 * L);

  logic rst_n = 1, init = 0, step = 0;
  logic [6:0]       llr_abs   [L];
  logic [7:0]       pm_metric [L];
  logic [TAG_W-1:0] pm_cand   [L];
  logic [L-1:0]     sat;
  logic             done;

  ils_top #(.L(L), .G(G)) dut (.clk(clk), .rst_n(rst_n), .init(init), .step(step),
    .llr_abs(llr_abs), .pm_metric(pm_metric), .pm_cand(pm_cand), .sat(sat), .done(done));

  initial begin
    arr_t model, key, exp_m;
    int s;
    bit used [128];
    checks = 0; failures = 0; approx = 0; finished = 0;
    checks++;
    if (G * dut.u_ils.g_sort[0].u_sorter.NUM_CAS != EXP_CAS ||
        dut.u_ils.g_sort[0].u_sorter.NS != EXP_STAGES) begin
      failures++;
      $display("FAIL L=%0d G=%0d: %0d comparators, %0d stages", L, G,
               G * dut.u_ils.g_sort[0].u_sorter.NUM_CAS, dut.u_ils.g_sort[0].u_sorter.NS);
    end
    $display("L=%0d G=%0d: %0d comparators, %0d stages", L, G,
             G * dut.u_ils.g_sort[0].u_sorter.NUM_CAS, dut.u_ils.g_sort[0].u_sorter.NS);
    for (int l = 0; l < L; l++) llr_abs[l] = '0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int cw = 0; cw < NCW; cw++) begin
      @(negedge clk);
      init = 1; step = 0;
      @(posedge clk);
      #1;
      model = '{default: 0};
      for (int l = 1; l < L; l++) model[l] = 255;
      for (int b = 0; b < NBITS; b++) begin
        @(negedge clk);
        init = 0; step = 1;
        for (int l = 0; l < L; l++) llr_abs[l] = 7'($urandom % 20);
        key = '{default: 0};
        for (int l = 0; l < L; l++) begin
          key[2*l] = model[l];
          s = model[l] + int'(llr_abs[l]);
          key[2*l+1] = (s > 255) ? 255 : s;
        end
        @(posedge clk);
        #1;
        ref_sort(L, G, key, exp_m);
        model = exp_m;
        used = '{default: 0};
        s = 0;
        for (int l = 0; l < L; l++) begin
          int c;
          c = int'(pm_cand[l]);
          s += model[l];
          checks++;
          if (int'(pm_metric[l]) != model[l]) begin
            failures++; $display("FAIL L=%0d slot %0d metric %0d expected %0d", L, l, pm_metric[l], model[l]);
          end
          checks++;
          if (used[c] || key[c] != model[l] || ref_group(L, G, c) != l / K) begin
            failures++; $display("FAIL L=%0d slot %0d candidate %0d", L, l, c);
          end
          used[c] = 1;
        end
        if (s != exact_sum(L, key)) approx++;
      end
    end
    @(negedge clk) step = 0;
    finished = 1;
  end
endmodule
