// tb_ils_cas: self-checking test of the compare-and-swap unit. Random and equal-metric
// pairs; the smaller metric must leave on lo, the larger on hi, each with its own tag,
// and equal metrics must pass unswapped.
module tb_ils_cas;
  localparam int KEY_W = 8, TAG_W = 5, W = KEY_W + TAG_W;
  logic [W-1:0] a, b, lo, hi;
  int checks = 0, failures = 0;

  ils_cas #(.KEY_W(KEY_W), .TAG_W(TAG_W)) dut (.a(a), .b(b), .lo(lo), .hi(hi));

  task automatic check(input logic [W-1:0] ea, input logic [W-1:0] eb);
    logic [W-1:0] elo, ehi;
    a = ea; b = eb;
    #1;
    if (ea[W-1:TAG_W] > eb[W-1:TAG_W]) begin elo = eb; ehi = ea; end
    else begin elo = ea; ehi = eb; end
    checks++;
    if (lo !== elo || hi !== ehi) begin
      failures++;
      $display("FAIL a=%h b=%h lo=%h hi=%h", ea, eb, lo, hi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check({8'd10, 5'd1}, {8'd3, 5'd2});
    check({8'd3, 5'd1}, {8'd10, 5'd2});
    check({8'd7, 5'd4}, {8'd7, 5'd9});
    check({8'd255, 5'd0}, {8'd0, 5'd31});
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] x, y;
      x = W'($urandom);
      y = W'($urandom);
      if (n % 5 == 0) y[W-1:TAG_W] = x[W-1:TAG_W];
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
