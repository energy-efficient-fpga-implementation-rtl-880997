// dist_buffer_tb: writes random distances to random addresses of a
// reduced-depth dist_buffer while reading at the same time, and checks
// every read (one cycle of latency) against a shadow array. Reads of the
// address being written in the same cycle are skipped (old data is not
// specified).
module dist_buffer_tb;
  import knn_pkg::*;

  localparam int unsigned DEPTH = 1024;

  logic  clk = 1'b0;
  always #5 clk = ~clk;

  logic  wr_en, rd_en;
  idx_t  wr_addr, rd_addr;
  dist_t wr_data, rd_data;

  dist_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  dist_t shadow [DEPTH];
  bit    written [DEPTH];
  bit    pend;
  dist_t pend_exp;
  idx_t  pend_addr;

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    pend = 1'b0;
    // fill every word once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = idx_t'(a); wr_data = dist_t'({$urandom, $urandom});
      shadow[a] = wr_data; written[a] = 1'b1;
    end
    @(negedge clk); wr_en = 1'b0;
    // mixed traffic
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data != pend_exp) begin
          failures++;
          $display("FAIL: addr %0d read %h expected %h", pend_addr, rd_data, pend_exp);
        end
      end
      wr_en   = ($urandom % 2) == 1;
      wr_addr = idx_t'($urandom % DEPTH);
      wr_data = dist_t'({$urandom, $urandom});
      rd_en   = ($urandom % 3) != 0;
      rd_addr = idx_t'($urandom % DEPTH);
      if (wr_en && rd_en && rd_addr == wr_addr) rd_en = 1'b0;
      pend      = rd_en;
      pend_exp  = shadow[rd_addr[9:0]];
      pend_addr = rd_addr;
      if (wr_en) shadow[wr_addr[9:0]] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
