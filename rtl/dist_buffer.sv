// dist_buffer: the on-chip "dist" array through which the distance kernel
// passes its results to the k-smallest kernel.
//
// A simple dual-port RAM of DEPTH distances: one write port used by the
// distance kernel and one read port used by the k-smallest kernel. A read
// returns the word one cycle after rd_en (registered output, as a block
// RAM does). The array is never reset; the reader only ever reads words
// that have already been written in the current run. Mapping this array
// to block RAM instead of external DRAM is the article's; the port
// arrangement and the default depth (the 300,000-point workload rounded up
// to 2**19 words) are this design's choice.
module dist_buffer
  import knn_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** IDX_W
) (
  input  logic  clk,
  input  logic  wr_en,
  input  idx_t  wr_addr,
  input  dist_t wr_data,
  input  logic  rd_en,
  input  idx_t  rd_addr,
  output dist_t rd_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  dist_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr[AW-1:0]];
  end

endmodule
