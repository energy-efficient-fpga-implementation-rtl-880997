// dist_kernel: the distance kernel. It reads the n reference points from
// global memory, copies them into local memory and computes the squared
// distance of every point to the query, writing it to the dist buffer at
// the point's index.
//
// Structure: burst_reader streams the points into the local_buffer ring
// (LOCAL_DEPTH = 2 * WG points) and the compute side reads them back in
// order, one per cycle, into the pipelined dist_unit. The reader only
// requests a burst when the ring has room for it, counting the points the
// compute side has taken, so one work group can be copied in while the
// previous one is computed and the memory latency stays hidden. wr_count
// counts the distances already written (always in index order), so that a
// consumer can follow the kernel while it runs. done pulses once all n
// distances are written.
//
// Interface: start (one cycle, while idle) latches n, the word address of
// point 0 and the query. Point i is read from word base + i.
// Timing: with a memory that returns one beat per cycle the kernel
// sustains one point per cycle; a run takes about n + memory latency + 8
// cycles. The kernel's steps (local copy, distance, store to dist) follow
// the article; the ring, the work-group size and the burst size are this
// design's choice.
module dist_kernel
  import knn_pkg::*;
#(
  parameter int unsigned WG        = 256,  // points per work group
  parameter int unsigned BURST_LEN = 16    // beats per memory burst
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W:0]    n,
  input  logic [ADDR_W-1:0] base,
  input  point_t            query,
  output logic              busy,
  output logic              done,
  mem_rd_if.master          mem,
  output logic              dist_we,
  output idx_t              dist_waddr,
  output dist_t             dist_wdata,
  output logic [IDX_W:0]    wr_count
);

  localparam int unsigned LOCAL_DEPTH = 2 * WG;
  localparam int unsigned LW          = $clog2(LOCAL_DEPTH);

  point_t         query_q;
  logic [IDX_W:0] n_q;

  logic           launch;
  logic           rd_busy, rd_done, rd_valid;
  logic [IDX_W:0] rd_pos, received;
  point_t         rd_point;

  logic [IDX_W:0] cp_ptr;        // next point to compute
  logic           cp_rd;         // a local read is issued this cycle
  logic           lb_valid;      // local read data valid this cycle
  idx_t           lb_idx;
  point_t         lb_point;

  assign launch = start && !busy;

  burst_reader #(.BURST_LEN(BURST_LEN), .WINDOW(LOCAL_DEPTH)) u_reader (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (launch),
    .base     (base),
    .count    (n),
    .consumed (cp_ptr),
    .busy     (rd_busy),
    .done     (rd_done),
    .mem      (mem),
    .out_valid(rd_valid),
    .out_pos  (rd_pos),
    .out_data (rd_point),
    .received (received)
  );

  always_comb begin
    cp_rd = busy && (cp_ptr < received);
  end

  local_buffer #(.DEPTH(LOCAL_DEPTH)) u_local (
    .clk    (clk),
    .wr_en  (rd_valid),
    .wr_addr(rd_pos[LW-1:0]),
    .wr_data(rd_point),
    .rd_en  (cp_rd),
    .rd_addr(cp_ptr[LW-1:0]),
    .rd_data(lb_point)
  );

  dist_unit u_dist (
    .clk      (clk),
    .rst_n    (rst_n),
    .query    (query_q),
    .in_valid (lb_valid),
    .in_point (lb_point),
    .in_idx   (lb_idx),
    .out_valid(dist_we),
    .out_dist (dist_wdata),
    .out_idx  (dist_waddr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      n_q      <= '0;
      query_q  <= '0;
      cp_ptr   <= '0;
      lb_valid <= 1'b0;
      lb_idx   <= '0;
      wr_count <= '0;
    end else begin
      done     <= 1'b0;
      lb_valid <= cp_rd;
      lb_idx   <= IDX_W'(cp_ptr);
      if (launch) begin
        busy     <= 1'b1;
        n_q      <= n;
        query_q  <= query;
        cp_ptr   <= '0;
        wr_count <= '0;
      end else if (busy) begin
        if (cp_rd) cp_ptr <= cp_ptr + 1'b1;
        if (dist_we) wr_count <= wr_count + 1'b1;
        if (wr_count == n_q && !rd_busy) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Points are computed only after they have arrived, and none is lost.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> cp_ptr <= received);
  a_reader_done: assert property (@(posedge clk) disable iff (!rst_n)
    rd_done |-> received == n_q);

endmodule
