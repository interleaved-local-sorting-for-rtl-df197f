// ils_top: metric-update loop of an SCL polar decoder built on interleaved local
// sorting (ILS).
//
// For every information bit, the L parent path metrics held in the path metric memory
// are extended to 2L child metrics with the LLR magnitudes of that bit
// (pm_extension), interleaved over G groups and sorted locally to the k = L/G
// smallest per group (ils_sorter_array), and the L survivors are written back to the
// memory as the parents of the next bit. This is the datapath of the document's block
// diagram; the default is its main configuration, L = 16, G = 4 (2k = 8) and 8-bit
// unsigned metrics. The extension and sorting are one combinational path (6 compare
// stages for 2k = 8), so one information bit is processed per clock.
// Each survivor keeps the index c of the child candidate it came from: parent path
// c >> 1, decided bit c & 1. That tag, the start-of-codeword contents of the memory and
// the step/init handshake are choices of this design; frozen bits, LLR computation and
// path copying belong to the rest of a decoder and are not part of this block.
// Timing: with step = 1 at a rising edge, pm_metric/pm_cand show the survivors from the
// next cycle on and done pulses for that one cycle. init = 1 restarts a codeword
// (metric 0 in slot 0, the largest metric elsewhere) and wins over step.
//   llr_abs   : |LLR| of the current information bit for each of the L paths
//   pm_metric : the L stored path metrics
//   pm_cand   : candidate index (2*parent + bit) of each stored path
//   sat       : per parent, its m[2l+1] saturated in the current (combinational) step
//   done      : high for the one cycle after an accepted step
// Assertions check that done only follows an accepted step and that each group's
// stored survivors are in ascending order.
module ils_top #(
  parameter int unsigned L     = ils_pkg::L_DEF,
  parameter int unsigned G     = ils_pkg::G_DEF,
  parameter int unsigned PM_W  = ils_pkg::PM_W,
  parameter int unsigned LLR_W = ils_pkg::LLR_W,
  localparam int unsigned TAG_W = $clog2(2 * L)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             step,
  input  logic [LLR_W-1:0] llr_abs   [L],
  output logic [PM_W-1:0]  pm_metric [L],
  output logic [TAG_W-1:0] pm_cand   [L],
  output logic [L-1:0]     sat,
  output logic             done
);
  localparam int unsigned W = PM_W + TAG_W;

  logic [W-1:0] mem_q  [L];
  logic [W-1:0] ext    [2*L];
  logic [W-1:0] sorted [L];
  logic [PM_W-1:0] parent [L];

  for (genvar l = 0; l < L; l++) begin : g_split
    assign parent[l]    = mem_q[l][W-1:TAG_W];
    assign pm_metric[l] = mem_q[l][W-1:TAG_W];
    assign pm_cand[l]   = mem_q[l][TAG_W-1:0];
  end

  pm_extension #(.L(L), .PM_W(PM_W), .LLR_W(LLR_W)) u_ext (
    .n  (parent),
    .a  (llr_abs),
    .m  (ext),
    .sat(sat)
  );

  ils_sorter_array #(.L(L), .G(G), .KEY_W(PM_W)) u_ils (
    .din (ext),
    .dout(sorted)
  );

  pm_memory #(.L(L), .KEY_W(PM_W)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .init (init),
    .we   (step),
    .wdata(sorted),
    .rdata(mem_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= step && !init;
  end

  // Handshake rule: done only ever follows a step that init did not override.
  a_done_after_step: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> $past(step && !init));

  // After a step, the survivors of every sorter are stored in ascending order.
  for (genvar g = 0; g < G; g++) begin : g_chk
    for (genvar x = 0; x + 1 < L / G; x++) begin : g_pair
      a_group_sorted: assert property (@(posedge clk) disable iff (!rst_n)
        done |-> pm_metric[g*(L/G) + x] <= pm_metric[g*(L/G) + x + 1]);
    end
  end
endmodule
