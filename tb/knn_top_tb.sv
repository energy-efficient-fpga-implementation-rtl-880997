// knn_top_tb: end-to-end test of the kNN accelerator at reduced sizes
// (work group 32, bursts of 8, dist buffer of 4096) against the memory
// model. Each run picks n, a query and a memory back-pressure level and
// compares the K results with a full sort of all n (distance, index)
// keys, so ties go to the lower index. It also checks that runs without
// back-pressure take at most n + LATENCY + 12 cycles (one point per
// clock) and counts how often each mechanism of the design occurred:
// the k-smallest kernel stalling on the distance kernel,
// memory back-pressure, short final bursts, short final work groups,
// loading overlapping computing, list insertions and rejections, ties,
// fewer points than K, and a full dist buffer. One that never occurred is
// a failure.
module knn_top_tb;
  import knn_pkg::*;

  localparam int unsigned K         = 5;
  localparam int unsigned WG        = 32;
  localparam int unsigned BURST_LEN = 8;
  localparam int unsigned N_MAX     = 4096;
  localparam int unsigned LATENCY   = 12;
  localparam int unsigned SEED      = 11;

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
  int unsigned       stall_pct, n_req, n_mstall;
  bit                narrow;

  knn_top #(.K(K), .WG(WG), .BURST_LEN(BURST_LEN), .N_MAX(N_MAX)) dut (.*);

  // two memory models, full-range and narrow coordinates, selected per run
  logic   ar_ready_w, ar_ready_n, r_valid_w, r_valid_n, r_last_w, r_last_n;
  point_t r_data_w, r_data_n;
  int unsigned n_req_w, n_req_n, n_st_w, n_st_n;

  mem_model #(.LATENCY(LATENCY), .SEED(SEED), .NARROW(1'b0)) u_mem_w (
    .clk(clk), .rst_n(rst_n), .stall_pct(stall_pct),
    .ar_valid(mem_ar_valid && !narrow), .ar_ready(ar_ready_w), .ar_addr(mem_ar_addr),
    .ar_len(mem_ar_len), .r_valid(r_valid_w), .r_ready(mem_r_ready && !narrow),
    .r_data(r_data_w), .r_last(r_last_w), .n_req(n_req_w), .n_stall(n_st_w));
  mem_model #(.LATENCY(LATENCY), .SEED(SEED), .NARROW(1'b1)) u_mem_n (
    .clk(clk), .rst_n(rst_n), .stall_pct(stall_pct),
    .ar_valid(mem_ar_valid && narrow), .ar_ready(ar_ready_n), .ar_addr(mem_ar_addr),
    .ar_len(mem_ar_len), .r_valid(r_valid_n), .r_ready(mem_r_ready && narrow),
    .r_data(r_data_n), .r_last(r_last_n), .n_req(n_req_n), .n_stall(n_st_n));

  assign mem_ar_ready = narrow ? ar_ready_n : ar_ready_w;
  assign mem_r_valid  = narrow ? r_valid_n  : r_valid_w;
  assign mem_r_data   = narrow ? r_data_n   : r_data_w;
  assign mem_r_last   = narrow ? r_last_n   : r_last_w;
  assign n_mstall     = n_st_w + n_st_n;

  int checks = 0, failures = 0;
  int ev_stall = 0, ev_mem_bp = 0, ev_short_burst = 0, ev_short_group = 0, ev_overlap = 0;
  int ev_insert = 0, ev_reject = 0, ev_tie = 0, ev_few = 0, ev_full = 0;

  always @(posedge clk) if (dut.u_k1.rd_busy && dut.u_k1.cp_rd) ev_overlap++;

  function automatic dist_t ref_dist(point_t a, point_t b);
    longint signed dx, dy;
    dx = longint'(a.x) - longint'(b.x);
    dy = longint'(a.y) - longint'(b.y);
    return dist_t'(dx * dx + dy * dy);
  endfunction

  task automatic run(int nn, int unsigned b, int unsigned sp, bit nar);
    longint unsigned keys [$];
    int t0, cyc;
    int unsigned mst0;
    point_t q;
    stall_pct = sp;
    narrow    = nar;
    mst0      = n_mstall;
    q = point_t'($urandom);
    if (nar) begin
      q.x = coord_t'(signed'(q.x[3:0]));
      q.y = coord_t'(signed'(q.y[3:0]));
    end
    for (int i = 0; i < nn; i++)
      keys.push_back({11'(0), ref_dist(u_mem_w.point_of(b + i, SEED, nar), q), 19'(i)});
    @(negedge clk);
    n = (IDX_W+1)'(nn); base = b; query = q; start = 1;
    t0 = int'($time / 10);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cyc = int'($time / 10) - t0;
    keys.sort();
    for (int j = 0; j < K; j++) begin
      checks++;
      if (j < nn) begin
        if (!result_valid[j] || result[j].idx != idx_t'(keys[j][18:0])
            || result[j].dsq != ref_dist(u_mem_w.point_of(b + int'(keys[j][18:0]), SEED, nar), q)) begin
          failures++;
          $display("FAIL n=%0d entry %0d: idx %0d dist %0d, expected idx %0d", nn, j,
                   result[j].idx, result[j].dsq, keys[j][18:0]);
        end
      end else if (result_valid[j]) begin
        failures++; $display("FAIL n=%0d entry %0d should be empty", nn, j);
      end
    end
    checks++;
    if (run_cycles != 32'(cyc)) begin
      failures++; $display("FAIL: run_cycles %0d, measured %0d", run_cycles, cyc);
    end
    if (sp == 0 && nn > 0) begin
      checks++;
      if (cyc > nn + LATENCY + 12) begin
        failures++; $display("FAIL n=%0d took %0d cycles", nn, cyc);
      end
    end
    // events
    if (stall_cycles > 0) ev_stall++;
    if (n_mstall > mst0) ev_mem_bp++;
    if (nn % BURST_LEN != 0) ev_short_burst++;
    if (nn % WG != 0 && nn > WG) ev_short_group++;
    ev_insert += int'(insert_count);
    ev_reject += nn - int'(insert_count);
    if (nn > K && keys[K-1][52:19] == keys[K][52:19]) ev_tie++;
    if (nn < K) ev_few++;
    if (nn == N_MAX) ev_full++;
    $display("n=%0d stall%%=%0d narrow=%0d: %0d cycles, %0d stalled, %0d inserted",
             nn, sp, nar, cyc, stall_cycles, insert_count);
  endtask

  task automatic expect_event(string name, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: %s never happened", name); end
    else $display("%s: %0d", name, count);
  endtask

  initial begin
    start = 0; n = '0; base = '0; query = '0; stall_pct = 0; narrow = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 0, 0, 0);
    run(3, 40, 0, 0);
    run(WG, 100, 0, 0);
    run(10 * WG + 5, 1000, 0, 0);
    run(700, 5000, 30, 0);
    run(600, 20, 0, 1);
    run(333, 9000, 50, 1);
    run(N_MAX, 0, 0, 0);
    run(N_MAX, 123, 20, 1);
    expect_event("k-smallest kernel stalls", ev_stall);
    expect_event("memory back-pressure", ev_mem_bp);
    expect_event("short final burst", ev_short_burst);
    expect_event("short final work group", ev_short_group);
    expect_event("load/compute overlap", ev_overlap);
    expect_event("list insertions", ev_insert);
    expect_event("list rejections", ev_reject);
    expect_event("tie at the K-th place", ev_tie);
    expect_event("fewer points than K", ev_few);
    expect_event("full dist buffer", ev_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
