// tb_ils_top: end-to-end test of the ILS metric-update loop at its default size
// (L = 16, G = 4, 8-bit metrics, 7-bit LLR magnitudes).
//
// It decodes a series of codewords of random length: each codeword starts with init,
// then information-bit steps with random LLR magnitudes, with idle cycles in between.
// A reference model (ils_ref_pkg) keeps its own copy of the path metrics. After every
// step, each stored metric must equal the model's (the k smallest of its interleaved
// group), each stored candidate index must be a distinct candidate of that group whose
// extended metric is the stored one, and done must pulse exactly one cycle after the
// step. The mechanisms of the design are counted and each must occur at least once:
// codeword restart (init), init winning over a simultaneous step, idle cycles that
// must leave the memory unchanged, saturation of an extended metric, and steps where
// local sorting keeps a different set than exact selection of the L smallest would.
module tb_ils_top;
  import ils_ref_pkg::*;
  localparam int L = ils_pkg::L_DEF, G = ils_pkg::G_DEF, K = L / G;
  localparam int TAG_W = $clog2(2 * L);

  logic clk = 0, rst_n = 1, init = 0, step = 0;
  logic [6:0]       llr_abs   [L];
  logic [7:0]       pm_metric [L];
  logic [TAG_W-1:0] pm_cand   [L];
  logic [L-1:0]     sat;
  logic             done;

  int checks = 0, failures = 0;
  int n_init = 0, n_init_step = 0, n_idle = 0, n_sat = 0, n_approx = 0, n_steps = 0;
  arr_t model;

  ils_top dut (.clk(clk), .rst_n(rst_n), .init(init), .step(step), .llr_abs(llr_abs),
               .pm_metric(pm_metric), .pm_cand(pm_cand), .sat(sat), .done(done));

  always #5 clk = ~clk;

  task automatic model_start();
    model = '{default: 0};
    for (int l = 1; l < L; l++) model[l] = 255;
  endtask

  task automatic check_metrics(input string what);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (int'(pm_metric[l]) != model[l]) begin
        failures++; $display("FAIL %s slot %0d metric %0d expected %0d", what, l, pm_metric[l], model[l]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arr_t key, exp_m;
    int s;
    bit used [2*L];
    for (int l = 0; l < L; l++) llr_abs[l] = '0;
    #1 rst_n = 0;
    #1 model_start();
    check_metrics("reset");
    @(negedge clk) rst_n = 1;
    for (int cw = 0; cw < 60; cw++) begin
      // Start of a codeword; sometimes together with a step, which init must override.
      @(negedge clk);
      init = 1;
      step = (cw % 7 == 3);
      @(posedge clk);
      n_init++;
      if (step) n_init_step++;
      #1 model_start();
      check_metrics("init");
      checks++;
      if (done !== 1'b0) begin failures++; $display("FAIL done after init"); end
      for (int b = 0; b < 10 + int'($urandom % 30); b++) begin
        @(negedge clk);
        init = 0;
        step = ($urandom % 4) != 0;
        for (int l = 0; l < L; l++)
          llr_abs[l] = (cw % 5 == 4) ? 7'($urandom) : 7'($urandom % 24);
        #1;
        // Extended metrics of the model and the saturation flags.
        key = '{default: 0};
        for (int l = 0; l < L; l++) begin
          key[2*l] = model[l];
          s = model[l] + int'(llr_abs[l]);
          key[2*l+1] = (s > 255) ? 255 : s;
          checks++;
          if (sat[l] !== (s > 255)) begin failures++; $display("FAIL sat flag %0d", l); end
        end
        @(posedge clk);
        #1;
        if (!step) begin
          n_idle++;
          check_metrics("idle");
          checks++;
          if (done !== 1'b0) begin failures++; $display("FAIL done on idle"); end
          continue;
        end
        n_steps++;
        if (sat != '0) n_sat++;
        ref_sort(L, G, key, exp_m);
        model = exp_m;
        check_metrics("step");
        checks++;
        if (done !== 1'b1) begin failures++; $display("FAIL done missing one cycle after step"); end
        used = '{default: 0};
        s = 0;
        for (int l = 0; l < L; l++) begin
          int c;
          c = int'(pm_cand[l]);
          s += model[l];
          checks++;
          if (used[c] || key[c] != model[l] || ref_group(L, G, c) != l / K) begin
            failures++; $display("FAIL slot %0d candidate %0d", l, c);
          end
          used[c] = 1;
        end
        if (s != exact_sum(L, key)) n_approx++;
      end
    end
    $display("steps=%0d init=%0d init_with_step=%0d idle=%0d saturating_steps=%0d approximate_steps=%0d",
             n_steps, n_init, n_init_step, n_idle, n_sat, n_approx);
    checks++; if (n_init == 0)      begin failures++; $display("FAIL no init"); end
    checks++; if (n_init_step == 0) begin failures++; $display("FAIL no init with step"); end
    checks++; if (n_idle == 0)      begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_approx == 0)    begin failures++; $display("FAIL no approximate step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
