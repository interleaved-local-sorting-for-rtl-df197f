// tb_ils_sorter_array: self-checking test of the ILS architecture (interleaver plus G
// sorters) at the default L = 16, G = 4. Random 2L candidate words; every output slot
// must hold the metric the reference model predicts for it (the k smallest of its
// interleaved group, ascending), and its tag must be a distinct candidate of that group
// carrying that metric. The comparator count of the whole architecture must be 72.
module tb_ils_sorter_array;
  import ils_ref_pkg::*;
  localparam int L = 16, G = 4, KEY_W = 8, TAG_W = 5, W = KEY_W + TAG_W;
  logic [W-1:0] din [2*L];
  logic [W-1:0] dout [L];
  int checks = 0, failures = 0, differs = 0;

  ils_sorter_array dut (.din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arr_t key, okey;
    int total, sum;
    bit used [2*L];
    total = dut.g_sort[0].u_sorter.NUM_CAS + dut.g_sort[1].u_sorter.NUM_CAS +
            dut.g_sort[2].u_sorter.NUM_CAS + dut.g_sort[3].u_sorter.NUM_CAS;
    checks++;
    if (total != 72) begin failures++; $display("FAIL %0d comparators", total); end
    for (int n = 0; n < 2000; n++) begin
      key = '{default: 0};
      for (int c = 0; c < 2 * L; c++) begin
        key[c] = (n % 3 == 0) ? int'($urandom % 8) : int'($urandom % 256);
        din[c] = {KEY_W'(key[c]), TAG_W'(c)};
      end
      #1;
      ref_sort(L, G, key, okey);
      used = '{default: 0};
      sum = 0;
      for (int s = 0; s < L; s++) begin
        int t;
        t = int'(dout[s][TAG_W-1:0]);
        sum += int'(dout[s][W-1:TAG_W]);
        checks++;
        if (int'(dout[s][W-1:TAG_W]) != okey[s]) begin
          failures++; $display("FAIL slot %0d metric %0d expected %0d", s, dout[s][W-1:TAG_W], okey[s]);
        end
        checks++;
        if (used[t] || key[t] != okey[s] || ref_group(L, G, t) != s / (L / G)) begin
          failures++; $display("FAIL slot %0d tag %0d", s, t);
        end
        used[t] = 1;
      end
      if (sum != exact_sum(L, key)) differs++;
    end
    $display("steps where local sorting kept a larger metric than exact sorting: %0d of 2000", differs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
