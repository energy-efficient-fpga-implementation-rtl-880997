// local_buffer_tb: uses a small local_buffer as a ring, as the distance
// kernel does: a writer puts points 0, 1, 2, ... at p mod DEPTH at a random
// rate, a reader takes them back in order whenever it is behind, and the
// writer never gets more than DEPTH ahead. Every point read (one cycle
// after rd_en) must be the one written for that position.
module local_buffer_tb;
  import knn_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  point_t        wr_data, rd_data;

  local_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  point_t sent [$];
  int     wp = 0, rp = 0;
  bit     pend = 0;
  point_t pend_exp;
  int     n_full = 0;

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data != pend_exp) begin
          failures++; $display("FAIL: position %0d read %h expected %h", rp - 1, rd_data, pend_exp);
        end
      end
      // reader: takes the oldest point if one is there (written last cycle or before)
      rd_en = (rp < wp) && (($urandom % 100) < ((i / 500) % 2 == 0 ? 90 : 30));
      rd_addr = AW'(rp);
      pend = rd_en;
      if (rd_en) begin pend_exp = sent[rp]; rp++; end
      // writer: adds a point if the ring has room
      if (wp - rp == DEPTH) n_full++;
      wr_en = (wp - rp < DEPTH) && (($urandom % 100) < 60);
      wr_addr = AW'(wp);
      wr_data = point_t'($urandom);
      if (wr_en) begin sent.push_back(wr_data); wp++; end
    end
    checks++;
    if (n_full == 0 || rp < 1000) begin
      failures++; $display("FAIL: ring full %0d times, %0d points read", n_full, rp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
