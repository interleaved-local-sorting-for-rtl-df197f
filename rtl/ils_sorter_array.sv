// ils_sorter_array: the interleaved local sorting (ILS) architecture proper.
//
// The 2L extended metrics are interleaved across G groups (ils_interleaver, wires
// only), and each group of 2k = 2L/G words goes to its own 2k-to-k sorter
// (ils_sorter). The k smallest words of every group, L in all, are the survivors.
// Because every group is sorted on its own, the depth is that of one 2k-input
// network (6 compare stages for 2k = 8) whatever the list size; the price is that the
// result is only approximately the L smallest of the 2L, which the interleaving makes
// rarely matter. Output group g occupies dout[g*k .. g*k+k-1], ascending inside the
// group; there is no order between groups. Combinational.
//   din  : 2L words {metric, candidate index}, candidate order
//   dout : L surviving words
module ils_sorter_array #(
  parameter int unsigned L     = ils_pkg::L_DEF,
  parameter int unsigned G     = ils_pkg::G_DEF,
  parameter int unsigned KEY_W = ils_pkg::PM_W,
  localparam int unsigned TAG_W = $clog2(2 * L),
  localparam int unsigned W     = KEY_W + TAG_W
) (
  input  logic [W-1:0] din  [2*L],
  output logic [W-1:0] dout [L]
);
  localparam int unsigned K = L / G;

  // Sizes the architecture is defined for: powers of two with at least 2 words a group.
  if ((L & (L - 1)) != 0 || (G & (G - 1)) != 0 || G > L) begin : g_bad_size
    $error("ils_sorter_array: L = %0d and G = %0d must be powers of two with G <= L", L, G);
  end

  logic [W-1:0] il [2*L];

  ils_interleaver #(.L(L), .G(G), .W(W)) u_il (
    .din (din),
    .dout(il)
  );

  for (genvar g = 0; g < G; g++) begin : g_sort
    logic [W-1:0] gin  [2*K];
    logic [W-1:0] gout [K];
    for (genvar x = 0; x < 2 * K; x++) begin : g_i
      assign gin[x] = il[g*2*K + x];
    end
    ils_sorter #(.K(K), .KEY_W(KEY_W), .TAG_W(TAG_W)) u_sorter (
      .din (gin),
      .dout(gout)
    );
    for (genvar x = 0; x < K; x++) begin : g_o
      assign dout[g*K + x] = gout[x];
    end
  end
endmodule
