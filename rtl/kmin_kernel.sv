// kmin_kernel: the k-smallest kernel. It reads the n distances from the
// dist buffer in index order, passes each with its index to kmin_unit and,
// when the last one has been taken, presents the K nearest neighbours.
//
// The kernel follows the distance kernel while that one still runs: it
// reads dist[i] only once avail (the producer's count of written
// distances) is above i, and otherwise waits; stalled is high in such a
// cycle. This lets both kernels stream at one distance per cycle with
// the dist buffer between them. The buffer read has one cycle of latency,
// so a distance reaches kmin_unit the cycle after its read is issued.
//
// Interface: start (one cycle, while idle) latches n and empties the list.
// done pulses when the list holds the final result; result/result_valid
// then stay until the next start. If n < K only the first n entries are
// valid. Finding the k smallest distances with their indices on the device
// is the article's; following the producer's write count is this design's
// way of streaming between the kernels.
module kmin_kernel
  import knn_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [IDX_W:0] n,
  input  logic [IDX_W:0] avail,
  output logic           busy,
  output logic           done,
  output logic           stalled,
  output logic           inserted,   // a distance entered the list
  output logic           rd_en,
  output idx_t           rd_addr,
  input  dist_t          rd_data,
  output cand_t          result       [K],
  output logic           result_valid [K]
);

  logic [IDX_W:0] n_q;
  logic [IDX_W:0] rd_ptr;     // next index to read
  logic           pend;       // a read was issued last cycle
  idx_t           pend_idx;

  always_comb begin
    rd_en   = busy && (rd_ptr < n_q) && (rd_ptr < avail);
    stalled = busy && (rd_ptr < n_q) && !(rd_ptr < avail);
    rd_addr = IDX_W'(rd_ptr);
  end

  kmin_unit #(.K(K)) u_kmin (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start && !busy),
    .in_valid  (pend),
    .in_cand   ('{dsq: rd_data, idx: pend_idx}),
    .list      (result),
    .list_valid(result_valid),
    .inserted  (inserted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      n_q      <= '0;
      rd_ptr   <= '0;
      pend     <= 1'b0;
      pend_idx <= '0;
    end else begin
      done     <= 1'b0;
      pend     <= rd_en;
      pend_idx <= rd_addr;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          n_q    <= n;
          rd_ptr <= '0;
        end
      end else begin
        if (rd_en) rd_ptr <= rd_ptr + 1'b1;
        if (rd_ptr == n_q && !pend) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
