// pm_memory: path metric memory of the ILS sorter.
//
// Holds the L surviving words {metric, candidate index} of the last decoded
// information bit; they are the parent metrics of the next bit. All L entries are
// written at once (one write per decoding step) and are always readable, so it is a
// register file rather than an addressed RAM. The document names this memory and what
// it holds; its reset and start-of-codeword contents are this design's choice: entry 0
// gets metric 0 and every other entry the largest metric, so that decoding starts from
// a single path and the unused list slots lose every comparison until they fill up.
// Timing: wdata written on the rising clock edge where we = 1; init (or an active-low
// asynchronous reset) loads the start pattern and takes priority over we.
//   clk, rst_n : clock, asynchronous active-low reset
//   init       : load the start-of-codeword contents
//   we, wdata  : write all L entries
//   rdata      : the stored entries
module pm_memory #(
  parameter int unsigned L     = ils_pkg::L_DEF,
  parameter int unsigned KEY_W = ils_pkg::PM_W,
  localparam int unsigned TAG_W = $clog2(2 * L),
  localparam int unsigned W     = KEY_W + TAG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         we,
  input  logic [W-1:0] wdata [L],
  output logic [W-1:0] rdata [L]
);
  function automatic logic [W-1:0] start_word(int unsigned l);
    if (l == 0) return {{KEY_W{1'b0}}, TAG_W'(0)};
    return {{KEY_W{1'b1}}, TAG_W'(2 * l)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < L; l++) rdata[l] <= start_word(l);
    end else if (init) begin
      for (int unsigned l = 0; l < L; l++) rdata[l] <= start_word(l);
    end else if (we) begin
      rdata <= wdata;
    end
  end
endmodule
