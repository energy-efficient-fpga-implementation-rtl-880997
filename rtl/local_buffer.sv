// local_buffer: local memory of the distance kernel, a ring of DEPTH
// points between the global-memory reader and the distance pipeline.
//
// Point number p of a run is kept in word p mod DEPTH. The reader writes
// each point as it arrives; the compute side reads it back, one cycle after
// rd_en, once it is there. DEPTH must be a power of two; by default it
// holds two work groups of 256 points, so that one group can be copied in
// while the previous one is being computed. Copying each point into local
// memory before the distance computation is the article's; the ring
// organisation and its size are this design's choice.
module local_buffer
  import knn_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  point_t                   wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output point_t                   rd_data
);

  point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
