// tb_pm_extension: self-checking test of the path metric extension at L = 16.
// m[2l] must equal n[l], m[2l+1] must equal n[l] + a[l] clipped to 255, each tagged
// with its candidate index; sat must flag exactly the clipped sums.
module tb_pm_extension;
  localparam int L = 16, PM_W = 8, LLR_W = 7, TAG_W = 5, W = PM_W + TAG_W;
  logic [PM_W-1:0]  n [L];
  logic [LLR_W-1:0] a [L];
  logic [W-1:0]     m [2*L];
  logic [L-1:0]     sat;
  int checks = 0, failures = 0, nsat = 0;

  pm_extension dut (.n(n), .a(a), .m(m), .sat(sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int l = 0; l < L; l++) begin
        n[l] = PM_W'($urandom);
        a[l] = LLR_W'($urandom);
        if (t == 0) begin n[l] = 8'd255; a[l] = 7'd127; end
        if (t == 1) begin n[l] = 8'd0; a[l] = 7'd0; end
      end
      #1;
      for (int l = 0; l < L; l++) begin
        int s;
        s = int'(n[l]) + int'(a[l]);
        checks++;
        if (m[2*l] !== {n[l], TAG_W'(2*l)}) begin
          failures++; $display("FAIL even l=%0d", l);
        end
        checks++;
        if (m[2*l+1] !== {PM_W'(s > 255 ? 255 : s), TAG_W'(2*l+1)}) begin
          failures++; $display("FAIL odd l=%0d n=%0d a=%0d m=%h", l, n[l], a[l], m[2*l+1]);
        end
        checks++;
        if (sat[l] !== (s > 255)) begin failures++; $display("FAIL sat l=%0d", l); end
        if (s > 255) nsat++;
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated sums: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
