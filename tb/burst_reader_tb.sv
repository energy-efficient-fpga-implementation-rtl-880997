// burst_reader_tb: streams ranges of random base and length (short and
// whole final bursts) through burst_reader from the memory model, with a
// consumer that releases points either at once or slowly, and with and
// without memory back-pressure. Checks every beat's data and position,
// the number of bursts requested, received and done, that the points held
// never exceed WINDOW (and that this limit is reached with a slow
// consumer requests are held back for room), and, with a fast consumer and no back-pressure, that a range
// of c points takes at most c + LATENCY + 6 cycles.
module burst_reader_tb;
  import knn_pkg::*;

  localparam int unsigned BURST_LEN = 8;
  localparam int unsigned WINDOW    = 32;
  localparam int unsigned LATENCY   = 6;
  localparam int unsigned SEED      = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done, out_valid;
  logic [ADDR_W-1:0] base;
  logic [IDX_W:0]    count, consumed, out_pos, received;
  point_t            out_data;
  int unsigned       stall_pct, n_req, n_mstall;
  int unsigned       consume_pct;

  mem_rd_if mem ();

  burst_reader #(.BURST_LEN(BURST_LEN), .WINDOW(WINDOW)) dut (.*);

  mem_model #(.LATENCY(LATENCY), .SEED(SEED)) u_mem (
    .clk(clk), .rst_n(rst_n), .stall_pct(stall_pct),
    .ar_valid(mem.ar_valid), .ar_ready(mem.ar_ready), .ar_addr(mem.ar_addr),
    .ar_len(mem.ar_len), .r_valid(mem.r_valid), .r_ready(mem.r_ready),
    .r_data(mem.r_data), .r_last(mem.r_last), .n_req(n_req), .n_stall(n_mstall));

  int checks = 0, failures = 0;
  int n_short = 0, n_full = 0, n_window_full = 0;
  logic [IDX_W:0] max_held = '0;

  // consumer: releases one received point per cycle, with some probability
  always @(posedge clk) begin
    if (start) consumed <= '0;
    else if (consumed < received && ($urandom % 100) < consume_pct) consumed <= consumed + 1'b1;
    if (rst_n && busy && received - consumed > max_held) max_held = received - consumed;
    // a request held back for lack of room in the ring
    if (rst_n && busy && dut.req_left != '0 && !dut.room) n_window_full++;
    if (rst_n && busy && received - consumed > (IDX_W+1)'(WINDOW)) begin
      failures++; $display("FAIL: %0d points held (received %0d consumed %0d) at %0t", received - consumed, received, consumed, $time);
    end
  end

  task automatic run(int c, int unsigned b);
    int beats = 0, t0, req0;
    req0 = int'(n_req);
    @(negedge clk);
    base = b; count = (IDX_W+1)'(c); start = 1;
    t0 = int'($time / 10);
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (out_data != u_mem.point_of(b + beats, SEED, 1'b0) || int'(out_pos) != beats) begin
          failures++;
          $display("FAIL: beat %0d pos %0d data %h", beats, out_pos, out_data);
        end
        beats++;
      end
      @(negedge clk);
    end
    checks++;
    if (beats != c || int'(received) != c ||
        int'(n_req) - req0 != (c + BURST_LEN - 1) / BURST_LEN) begin
      failures++;
      $display("FAIL: count %0d got %0d beats, %0d bursts", c, beats, int'(n_req) - req0);
    end
    if (c % BURST_LEN != 0) n_short++; else n_full++;
    if (stall_pct == 0 && consume_pct == 100) begin
      checks++;
      if (int'($time / 10) - t0 > c + LATENCY + 6) begin
        failures++; $display("FAIL: count %0d took %0d cycles", c, int'($time / 10) - t0);
      end
    end
    while (consumed != received) @(negedge clk);
  endtask

  initial begin
    start = 0; base = '0; count = '0; stall_pct = 0; consume_pct = 100; consumed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(200, 0);
    run(1, 100);
    run(BURST_LEN + 1, 1000);
    for (int i = 0; i < 10; i++) run(1 + $urandom % 300, $urandom % 100000);
    consume_pct = 40;
    for (int i = 0; i < 10; i++) run(1 + $urandom % 300, $urandom % 100000);
    stall_pct = 30; consume_pct = 100;
    for (int i = 0; i < 10; i++) run(1 + $urandom % 300, $urandom % 100000);
    checks++;
    if (n_short == 0 || n_full == 0 || n_mstall == 0 || n_window_full == 0) begin
      failures++;
      $display("FAIL: short %0d full %0d stalls %0d window full %0d max held %0d", n_short,
               n_full, n_mstall, n_window_full, max_held);
    end
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
