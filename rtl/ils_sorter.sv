// ils_sorter: 2k-to-k sorter, one per group of the ILS sorter.
//
// It takes the 2k words of one interleaved group and returns the k words with the
// smallest metrics, smallest first. The network is Batcher's odd-even merge sort on
// 2k wires, built stage by stage from compare-and-swap units (ils_cas); the inputs
// have no known order, so no comparator can be dropped for that reason. Comparators
// whose outputs can never reach the k smallest outputs are pruned. For 2k = 8 this
// gives the document's network: 6 stages and 18 comparators (19 minus the one between
// wires 5 and 6 in the last stage). The schedule and the pruning are computed at
// elaboration by functions of ils_pkg, so other powers of two for 2k also work.
// Combinational: dout is valid in the same cycle as din.
//   din  : 2k words {metric, tag}
//   dout : the k words of smallest metric, ascending
module ils_sorter #(
  parameter int unsigned K     = 4,
  parameter int unsigned KEY_W = ils_pkg::PM_W,
  parameter int unsigned TAG_W = 5,
  localparam int unsigned W    = KEY_W + TAG_W
) (
  input  logic [W-1:0] din  [2*K],
  output logic [W-1:0] dout [K]
);
  localparam int unsigned N  = 2 * K;
  localparam int unsigned NS = ils_pkg::oem_num_stages(N);
  // Number of comparators kept; 18 for 2k = 8.
  localparam int unsigned NUM_CAS = ils_pkg::oem_num_cas(N, K);

  // The document's 8-to-4 network has 18 comparators; stop elaboration otherwise.
  if (N == 8 && NUM_CAS != 18) begin : g_chk
    $error("ils_sorter: %0d comparators instead of 18 for 2k = 8", NUM_CAS);
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic [W-1:0] vin  [N];
    logic [W-1:0] vout [N];
    if (s == 0) begin : g_first
      assign vin = din;
    end else begin : g_next
      assign vin = g_stage[s-1].vout;
    end
    for (genvar x = 0; x < N; x++) begin : g_wire
      localparam int PT  = ils_pkg::oem_partner(N, s, x);
      localparam bit USE = ils_pkg::oem_needed(N, K, s, x);
      if (PT > x && USE) begin : g_cas
        ils_cas #(.KEY_W(KEY_W), .TAG_W(TAG_W)) u_cas (
          .a (vin[x]),
          .b (vin[PT]),
          .lo(vout[x]),
          .hi(vout[PT])
        );
      end else if (PT < 0 || !USE) begin : g_pass
        assign vout[x] = vin[x];
      end
    end
  end

  for (genvar x = 0; x < K; x++) begin : g_out
    assign dout[x] = g_stage[NS-1].vout[x];
  end
endmodule
