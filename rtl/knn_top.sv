// knn_top: k-nearest-neighbour search accelerator. Given a query point q
// and n two-dimensional reference points in global memory, it returns the
// indices (and squared distances) of the K points nearest to q.
//
// Two kernels run at the same time and stream through an on-chip buffer:
//   dist_kernel  reads the points in bursts into a local memory ring of
//                two work groups and computes the squared Euclidean
//                distance of each to q, one per cycle;
//   dist_buffer  the block-RAM "dist" array holding one distance per point;
//   kmin_kernel  reads the distances back in index order as soon as they
//                are written and keeps the K smallest in a sorted list.
// start (one cycle while idle) launches both; done pulses when the result
// is final; result/result_valid then hold until the next start.
// run_cycles counts the cycles of the last run and stall_cycles the cycles
// in which the k-smallest kernel waited for the distance kernel;
// insert_count counts the distances that entered the sorted list.
//
// Memory port: an AXI-like read channel (see mem_rd_if), one point per
// beat: x in bits [COORD_W-1:0], y in the upper half. Point i is at word
// base + i. With a memory that answers every cycle a run takes about
// n + (memory latency) + 10 cycles: one point per clock.
//
// Following the article: distances computed on the device, the dist array
// kept on chip, the k-smallest search on the device as a second kernel fed
// from it, k = 5. This design's choice: fixed-point coordinates, the
// memory channel, the work-group and burst sizes, the local memory ring
// with its credit scheme and the concurrent start of both kernels.
module knn_top
  import knn_pkg::*;
#(
  parameter int unsigned K         = 5,
  parameter int unsigned WG        = 256,
  parameter int unsigned BURST_LEN = 16,
  parameter int unsigned N_MAX     = 2 ** IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // control, as set up by the host
  input  logic              start,
  input  logic [IDX_W:0]    n,        // number of reference points, <= N_MAX
  input  logic [ADDR_W-1:0] base,     // word address of point 0
  input  point_t            query,
  output logic              busy,
  output logic              done,
  output cand_t             result       [K],
  output logic              result_valid [K],
  output logic [31:0]       run_cycles,
  output logic [31:0]       stall_cycles,
  output logic [31:0]       insert_count, // distances that entered the list
  output logic              dist_done,    // distance kernel finished (pulse)
  // global memory read port
  output logic              mem_ar_valid,
  input  logic              mem_ar_ready,
  output logic [ADDR_W-1:0] mem_ar_addr,
  output logic [LEN_W-1:0]  mem_ar_len,
  input  logic              mem_r_valid,
  output logic              mem_r_ready,
  input  point_t            mem_r_data,
  input  logic              mem_r_last
);

  mem_rd_if mem ();

  assign mem_ar_valid = mem.ar_valid;
  assign mem.ar_ready = mem_ar_ready;
  assign mem_ar_addr  = mem.ar_addr;
  assign mem_ar_len   = mem.ar_len;
  assign mem.r_valid  = mem_r_valid;
  assign mem_r_ready  = mem.r_ready;
  assign mem.r_data   = mem_r_data;
  assign mem.r_last   = mem_r_last;

  logic           launch;
  logic           k1_busy, k2_busy, k2_stall, k2_ins;
  logic           dist_we, dist_re;
  idx_t           dist_waddr, dist_raddr;
  dist_t          dist_wdata, dist_rdata;
  logic [IDX_W:0] wr_count;

  assign busy   = k1_busy || k2_busy;
  assign launch = start && !busy;

  dist_kernel #(.WG(WG), .BURST_LEN(BURST_LEN)) u_k1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (launch),
    .n         (n),
    .base      (base),
    .query     (query),
    .busy      (k1_busy),
    .done      (dist_done),
    .mem       (mem),
    .dist_we   (dist_we),
    .dist_waddr(dist_waddr),
    .dist_wdata(dist_wdata),
    .wr_count  (wr_count)
  );

  dist_buffer #(.DEPTH(N_MAX)) u_dist (
    .clk    (clk),
    .wr_en  (dist_we),
    .wr_addr(dist_waddr),
    .wr_data(dist_wdata),
    .rd_en  (dist_re),
    .rd_addr(dist_raddr),
    .rd_data(dist_rdata)
  );

  kmin_kernel #(.K(K)) u_k2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (launch),
    .n           (n),
    .avail       (wr_count),
    .busy        (k2_busy),
    .done        (done),
    .stalled     (k2_stall),
    .inserted    (k2_ins),
    .rd_en       (dist_re),
    .rd_addr     (dist_raddr),
    .rd_data     (dist_rdata),
    .result      (result),
    .result_valid(result_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cycles   <= '0;
      stall_cycles <= '0;
      insert_count <= '0;
    end else if (launch) begin
      run_cycles   <= 32'd1;
      stall_cycles <= '0;
      insert_count <= '0;
    end else if (busy) begin
      run_cycles   <= run_cycles + 1'b1;
      if (k2_stall) stall_cycles <= stall_cycles + 1'b1;
      if (k2_ins)   insert_count <= insert_count + 1'b1;
    end
  end

  a_n_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    launch |-> n <= (IDX_W+1)'(N_MAX));

endmodule
