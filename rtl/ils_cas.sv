// ils_cas: compare-and-swap unit, the single building block of the ILS sorting network.
//
// Each word carries a KEY_W-bit unsigned path metric in its upper bits and a TAG_W-bit
// payload (the index of the child candidate) in its lower bits. Only the metric is
// compared. As in the document, the two words are swapped when the upper input is
// larger than the lower input and pass unchanged otherwise, so equal metrics keep their
// order. Purely combinational: lo/hi follow a/b within the same cycle.
//   a, b   : upper and lower input word
//   lo, hi : the word with the smaller and with the larger metric
// Carrying a tag alongside the metric is a choice of this design.
module ils_cas #(
  parameter int unsigned KEY_W = 8,
  parameter int unsigned TAG_W = 5
) (
  input  logic [KEY_W+TAG_W-1:0] a,
  input  logic [KEY_W+TAG_W-1:0] b,
  output logic [KEY_W+TAG_W-1:0] lo,
  output logic [KEY_W+TAG_W-1:0] hi
);
  logic swap;

  always_comb begin
    swap = a[KEY_W+TAG_W-1:TAG_W] > b[KEY_W+TAG_W-1:TAG_W];
    lo   = swap ? b : a;
    hi   = swap ? a : b;
  end
endmodule
