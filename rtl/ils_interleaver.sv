// ils_interleaver: the interleaver of the ILS sorter; wiring only, no logic.
//
// The 2L candidate words are read as G groups of 2k = 2L/G consecutive words
// (group i holds m[i*2k .. i*2k+2k-1]). Group i is rotated by i % 2k, so its j-th
// element becomes m[i*2k + (i+j) % 2k]. The j-th element of rotated group i is then
// moved to group 2k*floor(i/2k) + j % G. Both steps follow the document. The order of
// words inside a destination group, (i % P) + P*floor(j/G) with P = min(G, 2k), is
// taken from the drawn examples for L = 8 and G = 2, 4, 8; it does not change which
// metrics survive, since each group is sorted afterwards.
//   din  : 2L words in candidate order
//   dout : 2L words, group g at dout[g*2k .. g*2k+2k-1]
module ils_interleaver #(
  parameter int unsigned L = ils_pkg::L_DEF,
  parameter int unsigned G = ils_pkg::G_DEF,
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] din  [2*L],
  output logic [W-1:0] dout [2*L]
);
  localparam int unsigned N2K = 2 * L / G;

  for (genvar i = 0; i < G; i++) begin : g_grp
    for (genvar j = 0; j < N2K; j++) begin : g_elem
      assign dout[ils_pkg::il_dst(L, G, i, j)] = din[ils_pkg::il_src(L, G, i, j)];
    end
  end
endmodule
