// tb_ils_interleaver: self-checking test of the interleaver.
// Each input word carries its own candidate index, so the outputs show the permutation.
// For L = 8 and G = 2, 4, 8 the outputs are compared with the element order of the
// published interleaving examples, written out by hand below. For the default L = 16,
// G = 4 the test checks that the map is a permutation, that every word lands in the
// group the reference model predicts, and that the 2k words of each group come from 2k
// different positions of their source groups.
module tb_ils_interleaver;
  import ils_ref_pkg::*;
  localparam int W = 7;
  int checks = 0, failures = 0;

  logic [W-1:0] in8  [16];
  logic [W-1:0] o2   [16];
  logic [W-1:0] o4   [16];
  logic [W-1:0] o8   [16];
  logic [W-1:0] in16 [32];
  logic [W-1:0] od   [32];

  // Expected candidate index per output slot, groups laid out one after the other.
  localparam int EXP2 [16] = '{0, 9, 2, 11, 4, 13, 6, 15, 1, 10, 3, 12, 5, 14, 7, 8};
  localparam int EXP4 [16] = '{0, 5, 10, 15, 1, 6, 11, 12, 2, 7, 8, 13, 3, 4, 9, 14};
  localparam int EXP8 [16] = '{0, 3, 1, 2, 4, 7, 5, 6, 8, 11, 9, 10, 12, 15, 13, 14};

  ils_interleaver #(.L(8), .G(2), .W(W)) u_g2 (.din(in8), .dout(o2));
  ils_interleaver #(.L(8), .G(4), .W(W)) u_g4 (.din(in8), .dout(o4));
  ils_interleaver #(.L(8), .G(8), .W(W)) u_g8 (.din(in8), .dout(o8));
  ils_interleaver #(.W(W)) u_def (.din(in16), .dout(od));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [32];
    bit pos [8];
    for (int c = 0; c < 16; c++) in8[c] = W'(c);
    for (int c = 0; c < 32; c++) in16[c] = W'(c);
    #1;
    for (int s = 0; s < 16; s++) begin
      checks += 3;
      if (int'(o2[s]) != EXP2[s]) begin failures++; $display("FAIL G=2 slot %0d: %0d", s, o2[s]); end
      if (int'(o4[s]) != EXP4[s]) begin failures++; $display("FAIL G=4 slot %0d: %0d", s, o4[s]); end
      if (int'(o8[s]) != EXP8[s]) begin failures++; $display("FAIL G=8 slot %0d: %0d", s, o8[s]); end
    end
    // Default size: L = 16, G = 4, 2k = 8.
    seen = '{default: 0};
    for (int s = 0; s < 32; s++) begin
      checks++;
      if (seen[od[s][4:0]]) begin failures++; $display("FAIL duplicate %0d", od[s]); end
      seen[od[s][4:0]] = 1;
      checks++;
      if (ref_group(16, 4, int'(od[s])) != s / 8) begin
        failures++; $display("FAIL slot %0d holds %0d of group %0d", s, od[s], ref_group(16, 4, int'(od[s])));
      end
    end
    for (int g = 0; g < 4; g++) begin
      pos = '{default: 0};
      for (int y = 0; y < 8; y++) pos[od[g*8 + y] % 8] = 1;
      for (int y = 0; y < 8; y++) begin
        checks++;
        if (!pos[y]) begin failures++; $display("FAIL group %0d lacks position %0d", g, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
