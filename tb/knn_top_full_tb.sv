// knn_top_full_tb: one complete search at the design's default sizes
// (K = 5, work group 256, bursts of 16, dist buffer of 2**19 words) over
// 300,000 reference points, the size of the hurricane data set the design
// targets. The memory model answers after 30 cycles and then returns one
// point per cycle. The K results are compared with a full sort of all
// (distance, index) keys, and the run must take no more than
// n + 64 cycles, i.e. one point per clock; at 240 MHz that is 1.25 ms.
module knn_top_full_tb;
  import knn_pkg::*;

  localparam int unsigned K       = 5;
  localparam int unsigned NPTS    = 300000;
  localparam int unsigned LATENCY = 30;
  localparam int unsigned SEED    = 2016;
  localparam int unsigned BASE    = 32'h0010_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done, dist_done;
  logic [IDX_W:0]    n;
  logic [ADDR_W-1:0] base;
  point_t            query;
  cand_t             result [K];
  logic              result_valid [K];
  logic [31:0]       run_cycles, stall_cycles, insert_count;
  logic              mem_ar_valid, mem_ar_ready, mem_r_valid, mem_r_ready, mem_r_last;
  logic [ADDR_W-1:0] mem_ar_addr;
  logic [LEN_W-1:0]  mem_ar_len;
  point_t            mem_r_data;
  int unsigned       n_req, n_mstall;

  knn_top dut (.*);

  mem_model #(.LATENCY(LATENCY), .SEED(SEED)) u_mem (
    .clk(clk), .rst_n(rst_n), .stall_pct(0),
    .ar_valid(mem_ar_valid), .ar_ready(mem_ar_ready), .ar_addr(mem_ar_addr),
    .ar_len(mem_ar_len), .r_valid(mem_r_valid), .r_ready(mem_r_ready),
    .r_data(mem_r_data), .r_last(mem_r_last), .n_req(n_req), .n_stall(n_mstall));

  int checks = 0, failures = 0;

  function automatic dist_t ref_dist(point_t a, point_t b);
    longint signed dx, dy;
    dx = longint'(a.x) - longint'(b.x);
    dy = longint'(a.y) - longint'(b.y);
    return dist_t'(dx * dx + dy * dy);
  endfunction

  initial begin
    longint unsigned keys [$];
    point_t q;
    start = 0; n = '0; base = '0; query = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    q = '{x: 16'sd1234, y: -16'sd4321};
    for (int i = 0; i < NPTS; i++)
      keys.push_back({11'(0), ref_dist(u_mem.point_of(BASE + i, SEED, 1'b0), q), 19'(i)});
    keys.sort();
    @(negedge clk);
    n = (IDX_W+1)'(NPTS); base = BASE; query = q; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int j = 0; j < K; j++) begin
      checks++;
      if (!result_valid[j] || result[j].idx != idx_t'(keys[j][18:0]) ||
          result[j].dsq != dist_t'(keys[j][52:19])) begin
        failures++;
        $display("FAIL entry %0d: idx %0d dist %0d, expected idx %0d dist %0d", j,
                 result[j].idx, result[j].dsq, keys[j][18:0], keys[j][52:19]);
      end else begin
        $display("neighbour %0d: index %0d, squared distance %0d", j, result[j].idx, result[j].dsq);
      end
    end
    checks++;
    if (run_cycles > NPTS + 64) begin
      failures++; $display("FAIL: %0d cycles for %0d points", run_cycles, NPTS);
    end
    checks++;
    if (int'(n_req) != (NPTS + 15) / 16) begin
      failures++; $display("FAIL: %0d bursts", n_req);
    end
    $display("%0d points in %0d cycles (%0d us at 240 MHz), %0d bursts, %0d list insertions",
             NPTS, run_cycles, run_cycles / 240, n_req, insert_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
