// kmin_kernel_tb: runs kmin_kernel on a dist_buffer that a behavioural
// producer fills in index order. Runs: buffer already full (checks the
// one-distance-per-cycle rate: n + 3 cycles from start to done), a slow
// random producer (the kernel must stall and still be right), small n
// (fewer than K valid results) and narrow distance ranges (ties). Each
// result is compared with a stable sort of all n distances.
module kmin_kernel_tb;
  import knn_pkg::*;

  localparam int unsigned K     = 5;
  localparam int unsigned DEPTH = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, busy, done, stalled, inserted, rd_en;
  logic [IDX_W:0] n, avail;
  idx_t           rd_addr;
  dist_t          rd_data;
  cand_t          result [K];
  logic           result_valid [K];

  logic  wr_en;
  idx_t  wr_addr;
  dist_t wr_data;

  dist_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  kmin_kernel #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall_total = 0;
  dist_t vals [DEPTH];

  always @(posedge clk) if (stalled) n_stall_total++;

  task automatic check_result(int nn);
    cand_t s [$];
    for (int i = 0; i < nn; i++) s.push_back('{dsq: vals[i], idx: idx_t'(i)});
    for (int i = 1; i < s.size(); i++) begin
      cand_t c = s[i];
      int j = i - 1;
      while (j >= 0 && s[j].dsq > c.dsq) begin s[j+1] = s[j]; j--; end
      s[j+1] = c;
    end
    for (int j = 0; j < K; j++) begin
      checks++;
      if (j < nn) begin
        if (!result_valid[j] || result[j] != s[j]) begin
          failures++;
          $display("FAIL n=%0d entry %0d: %0d/%0d expected %0d/%0d", nn, j,
                   result[j].dsq, result[j].idx, s[j].dsq, s[j].idx);
        end
      end else if (result_valid[j]) begin
        failures++; $display("FAIL n=%0d entry %0d should be empty", nn, j);
      end
    end
  endtask

  // mode 0: prefilled; mode 1: slow random producer
  task automatic run(int nn, int mode, int range);
    int t0, t1, produced;
    for (int i = 0; i < nn; i++) vals[i] = (range == 0) ? dist_t'({$urandom, $urandom})
                                                        : dist_t'($urandom % range);
    avail = '0;
    produced = 0;
    if (mode == 0) begin
      for (int i = 0; i < nn; i++) begin
        @(negedge clk); wr_en = 1; wr_addr = idx_t'(i); wr_data = vals[i];
      end
      @(negedge clk); wr_en = 0; avail = (IDX_W+1)'(nn);
    end
    @(negedge clk);
    n = (IDX_W+1)'(nn); start = 1;
    t0 = $time / 10;
    @(negedge clk); start = 0;
    while (!done) begin
      if (mode == 1) begin
        wr_en = 0;
        if (produced < nn && ($urandom % 3) == 0) begin
          wr_en = 1; wr_addr = idx_t'(produced); wr_data = vals[produced];
          produced++;
        end
      end
      @(negedge clk);
      // the write of the previous half cycle is now in the buffer
      if (mode == 1) avail = (IDX_W+1)'(produced);
    end
    wr_en = 0;
    t1 = $time / 10;
    if (mode == 0 && nn > 0) begin
      checks++;
      if (t1 - t0 > nn + 3) begin
        failures++; $display("FAIL: n=%0d took %0d cycles", nn, t1 - t0);
      end
    end
    check_result(nn);
  endtask

  initial begin
    start = 0; n = '0; avail = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1000, 0, 0);
    run(1000, 1, 0);
    run(3, 0, 0);
    run(1, 1, 0);
    run(500, 0, 7);
    run(500, 1, 3);
    run(DEPTH, 0, 0);
    checks++;
    if (n_stall_total == 0) begin failures++; $display("FAIL: never stalled"); end
    $display("stall cycles %0d", n_stall_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
