// tb_ils_sorter: self-checking test of the 2k-to-k sorter, at the default 2k = 8 and at
// 2k = 16. Random words (with many equal metrics) and directed patterns; the k outputs
// must carry the k smallest input metrics in ascending order, each output tag must be a
// distinct input tag with that metric. The comparator and stage counts of the 8-to-4
// network (18 and 6) are checked as well.
module tb_ils_sorter;
  localparam int KEY_W = 8, TAG_W = 5, W = KEY_W + TAG_W;
  int checks = 0, failures = 0;

  logic [W-1:0] d8  [8];
  logic [W-1:0] q8  [4];
  logic [W-1:0] d16 [16];
  logic [W-1:0] q16 [8];

  ils_sorter dut (.din(d8), .dout(q8));
  ils_sorter #(.K(8)) dut16 (.din(d16), .dout(q16));

  task automatic check_k(input int k, input int key [16], input int tag [16], input int okey [8],
                         input int otag [8]);
    int s [16];
    int t;
    bit used [16];
    for (int x = 0; x < 2 * k; x++) s[x] = key[x];
    for (int x = 1; x < 2 * k; x++)
      for (int y = x; y > 0 && s[y-1] > s[y]; y--) begin t = s[y]; s[y] = s[y-1]; s[y-1] = t; end
    used = '{default: 0};
    for (int x = 0; x < k; x++) begin
      bit ok;
      checks++;
      if (okey[x] != s[x]) begin
        failures++; $display("FAIL k=%0d out %0d key %0d expected %0d", k, x, okey[x], s[x]);
      end
      ok = 0;
      for (int y = 0; y < 2 * k; y++)
        if (tag[y] == otag[x] && key[y] == okey[x] && !used[y]) begin used[y] = 1; ok = 1; break; end
      checks++;
      if (!ok) begin failures++; $display("FAIL k=%0d out %0d tag %0d", k, x, otag[x]); end
    end
  endtask

  task automatic run(input int mode);
    int key [16], tag [16], okey [8], otag [8];
    for (int x = 0; x < 16; x++) begin
      case (mode)
        0: key[x] = int'($urandom % 256);
        1: key[x] = int'($urandom % 4);
        2: key[x] = 15 - x;
        default: key[x] = x;
      endcase
      tag[x] = x;
    end
    for (int x = 0; x < 8; x++) d8[x] = {KEY_W'(key[x]), TAG_W'(tag[x])};
    for (int x = 0; x < 16; x++) d16[x] = {KEY_W'(key[x]), TAG_W'(tag[x])};
    #1;
    for (int x = 0; x < 4; x++) begin okey[x] = int'(q8[x][W-1:TAG_W]); otag[x] = int'(q8[x][TAG_W-1:0]); end
    check_k(4, key, tag, okey, otag);
    for (int x = 0; x < 8; x++) begin okey[x] = int'(q16[x][W-1:TAG_W]); otag[x] = int'(q16[x][TAG_W-1:0]); end
    check_k(8, key, tag, okey, otag);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.NUM_CAS != 18 || dut.NS != 6) begin
      failures++; $display("FAIL 8-to-4: %0d comparators, %0d stages", dut.NUM_CAS, dut.NS);
    end
    checks++;
    if (dut16.NS != 10) begin failures++; $display("FAIL 16-to-8 stages %0d", dut16.NS); end
    $display("8-to-4: %0d comparators in %0d stages; 16-to-8: %0d comparators in %0d stages",
             dut.NUM_CAS, dut.NS, dut16.NUM_CAS, dut16.NS);
    run(2);
    run(3);
    for (int n = 0; n < 3000; n++) run(n % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
