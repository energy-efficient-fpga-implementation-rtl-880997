// dist_kernel_tb: runs dist_kernel against the memory model for several
// point counts (under one work group, whole groups, a short last group)
// and memory back-pressure levels. Every distance written must equal the
// squared distance from the query to the point the model holds at that
// index, the writes must come in index order with wr_count following
// them, and done must come once all are written. With no back-pressure
// the run must take at most n + LATENCY + 10 cycles (one point per clock),
// and loading and computing must overlap.
module dist_kernel_tb;
  import knn_pkg::*;

  localparam int unsigned WG        = 32;
  localparam int unsigned BURST_LEN = 8;
  localparam int unsigned LATENCY   = 10;
  localparam int unsigned SEED      = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done, dist_we;
  logic [IDX_W:0]    n, wr_count;
  logic [ADDR_W-1:0] base;
  point_t            query;
  idx_t              dist_waddr;
  dist_t             dist_wdata;
  int unsigned       stall_pct, n_req, n_mstall;

  mem_rd_if mem ();

  dist_kernel #(.WG(WG), .BURST_LEN(BURST_LEN)) dut (.*);

  mem_model #(.LATENCY(LATENCY), .SEED(SEED)) u_mem (
    .clk(clk), .rst_n(rst_n), .stall_pct(stall_pct),
    .ar_valid(mem.ar_valid), .ar_ready(mem.ar_ready), .ar_addr(mem.ar_addr),
    .ar_len(mem.ar_len), .r_valid(mem.r_valid), .r_ready(mem.r_ready),
    .r_data(mem.r_data), .r_last(mem.r_last), .n_req(n_req), .n_stall(n_mstall));

  int checks = 0, failures = 0;
  int overlap = 0;

  always @(posedge clk) if (dut.rd_busy && dut.cp_rd) overlap++;

  function automatic dist_t ref_dist(point_t a, point_t b);
    longint signed dx, dy;
    dx = longint'(a.x) - longint'(b.x);
    dy = longint'(a.y) - longint'(b.y);
    return dist_t'(dx * dx + dy * dy);
  endfunction

  task automatic run(int nn, int unsigned b, int unsigned sp);
    int got = 0, t0, t1;
    longint cyc;
    stall_pct = sp;
    @(negedge clk);
    n = (IDX_W+1)'(nn); base = b; query = point_t'($urandom); start = 1;
    t0 = int'($time / 10);
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      if (dist_we) begin
        checks++;
        if (int'(dist_waddr) != got ||
            dist_wdata != ref_dist(u_mem.point_of(b + got, SEED, 1'b0), query)) begin
          failures++;
          $display("FAIL n=%0d: write %0d at %0d = %0d", nn, got, dist_waddr, dist_wdata);
        end
        got++;
      end
      @(negedge clk);
      if (int'(wr_count) != got) begin
        failures++; $display("FAIL: wr_count %0d after %0d writes", wr_count, got);
      end
    end
    t1 = int'($time / 10);
    checks++;
    if (got != nn || busy) begin
      failures++; $display("FAIL n=%0d: %0d writes, busy %0d", nn, got, busy);
    end
    if (sp == 0) begin
      checks++;
      cyc = t1 - t0;
      if (cyc > nn + LATENCY + 10) begin
        failures++; $display("FAIL n=%0d took %0d cycles", nn, cyc);
      end
      $display("n=%0d: %0d cycles", nn, cyc);
    end
  endtask

  initial begin
    start = 0; n = '0; base = '0; query = '0; stall_pct = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 5, 0);
    run(WG - 3, 100, 0);
    run(8 * WG, 0, 0);
    run(5 * WG + 7, 777, 0);
    run(3 * WG + 1, 50, 30);
    run(6 * WG, 12345, 60);
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL: loading never overlapped computing"); end
    $display("overlap cycles %0d, memory stalls %0d", overlap, n_mstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
