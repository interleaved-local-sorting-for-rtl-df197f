// pm_extension: path metric extension of one SCL information-bit step.
//
// Each of the L parent paths splits into two child candidates. With the hardware
// approximation used by LLR-based list decoders, candidate 2l keeps the parent metric
// and candidate 2l+1 adds the magnitude of the parent's LLR:
//   m[2l] = n[l],   m[2l+1] = n[l] + a[l],   l = 0 .. L-1.
// The sum saturates at the largest PM_W-bit value, a choice of this design (the
// document fixes the metric width at 8 bits but does not say how overflow is handled).
// Every output word is {metric, candidate index c}, so that a survivor can later be
// traced to its parent (c >> 1) and decided bit (c & 1). Combinational.
//   n   : L parent metrics, PM_W-bit unsigned
//   a   : L LLR magnitudes, LLR_W-bit unsigned
//   m   : 2L candidate words {metric, index}
//   sat : one bit per parent, set when its m[2l+1] was clipped
module pm_extension #(
  parameter int unsigned L     = ils_pkg::L_DEF,
  parameter int unsigned PM_W  = ils_pkg::PM_W,
  parameter int unsigned LLR_W = ils_pkg::LLR_W,
  localparam int unsigned TAG_W = $clog2(2 * L),
  localparam int unsigned W     = PM_W + TAG_W
) (
  input  logic [PM_W-1:0]  n   [L],
  input  logic [LLR_W-1:0] a   [L],
  output logic [W-1:0]     m   [2*L],
  output logic [L-1:0]     sat
);
  for (genvar l = 0; l < L; l++) begin : g_path
    logic [PM_W:0] sum;
    always_comb begin
      sum        = {1'b0, n[l]} + (PM_W + 1)'(a[l]);
      sat[l]     = sum[PM_W];
      m[2*l]     = {n[l], TAG_W'(2 * l)};
      m[2*l + 1] = {(sum[PM_W] ? {PM_W{1'b1}} : sum[PM_W-1:0]), TAG_W'(2 * l + 1)};
    end
  end
endmodule
