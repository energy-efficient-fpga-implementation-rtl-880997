// dist_unit: pipelined squared Euclidean distance between a reference point
// and the query point, d = (x1 - x2)^2 + (y1 - y2)^2.
//
// Three register stages: coordinate differences, squares, sum. A new point
// is accepted every cycle (initiation interval 1) and its distance appears
// LATENCY = 3 cycles later on out_valid/out_dist, together with the index
// that came in with it. There is no back-pressure: the consumer (the dist
// buffer) always accepts. The formula is the article's; the stage split,
// the fixed-point format and the index side band are this design's choice.
module dist_unit
  import knn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  point_t query,       // held constant during a run
  input  logic   in_valid,
  input  point_t in_point,
  input  idx_t   in_idx,
  output logic   out_valid,
  output dist_t  out_dist,
  output idx_t   out_idx
);

  localparam int unsigned DIFF_W = COORD_W + 1;
  localparam int unsigned SQ_W   = 2 * COORD_W + 1;  // |diff| <= 2**COORD_W

  logic                     v1, v2;
  idx_t                     i1, i2;
  logic signed [DIFF_W-1:0] dx1, dy1;
  logic        [SQ_W-1:0]   sx2, sy2;

  // Stage 1: differences, sign-extended so that they cannot overflow.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      i1  <= '0;
      dx1 <= '0;
      dy1 <= '0;
    end else begin
      v1  <= in_valid;
      i1  <= in_idx;
      dx1 <= DIFF_W'(in_point.x) - DIFF_W'(query.x);
      dy1 <= DIFF_W'(in_point.y) - DIFF_W'(query.y);
    end
  end

  // Stage 2: squares. The product of two equal signed values is never
  // negative and below 2**SQ_W, so its low SQ_W bits hold it as an
  // unsigned number; the top bit of px and py is always zero and unused.
  logic signed [2*DIFF_W-1:0] px, py;
  always_comb begin
    px = dx1 * dx1;
    py = dy1 * dy1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2  <= 1'b0;
      i2  <= '0;
      sx2 <= '0;
      sy2 <= '0;
    end else begin
      v2  <= v1;
      i2  <= i1;
      sx2 <= px[SQ_W-1:0];
      sy2 <= py[SQ_W-1:0];
    end
  end

  // Stage 3: sum.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_dist  <= '0;
    end else begin
      out_valid <= v2;
      out_idx   <= i2;
      out_dist  <= DIST_W'(sx2) + DIST_W'(sy2);
    end
  end

endmodule
