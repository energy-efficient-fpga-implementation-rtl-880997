// dist_unit_tb: drives random and extreme points (one per cycle, with idle
// cycles in between) through dist_unit and checks every distance, its
// index and the fixed 3-cycle latency against a 64-bit reference.
module dist_unit_tb;
  import knn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  point_t query, in_point;
  logic   in_valid, out_valid;
  idx_t   in_idx, out_idx;
  dist_t  out_dist;

  dist_unit dut (.*);

  int checks = 0, failures = 0;
  localparam int LAT = 3;
  localparam int NV  = 2000;

  // expected results, indexed by input cycle
  longint unsigned exp_d [NV];
  idx_t            exp_i [NV];
  int              exp_t [NV];
  int n_in = 0, n_out = 0, cyc = 0;

  function automatic longint unsigned ref_dist(point_t a, point_t b);
    longint signed dx, dy;
    dx = longint'(a.x) - longint'(b.x);
    dy = longint'(a.y) - longint'(b.y);
    return longint'(dx * dx + dy * dy);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (n_out >= n_in) begin
        failures++; $display("FAIL: unexpected output");
      end else if (longint'(out_dist) != exp_d[n_out] || out_idx != exp_i[n_out]
                   || cyc - exp_t[n_out] != LAT) begin
        failures++;
        $display("FAIL #%0d: dist %0d idx %0d lat %0d, expected %0d %0d %0d", n_out,
                 out_dist, out_idx, cyc - exp_t[n_out], exp_d[n_out], exp_i[n_out], LAT);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 1'b0; in_point = '0; in_idx = '0; query = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 4; q++) begin
      // extreme query points first, then random ones
      case (q)
        0: query = '{x: 16'sh7fff, y: 16'sh8000};
        1: query = '{x: 16'sh8000, y: 16'sh8000};
        default: query = point_t'($urandom);
      endcase
      for (int i = 0; i < NV / 4; i++) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        case (i % 7)
          0: in_point = '{x: 16'sh8000, y: 16'sh7fff};
          1: in_point = query;
          default: in_point = point_t'($urandom);
        endcase
        in_idx = idx_t'($urandom);
        if (in_valid) begin
          exp_d[n_in] = ref_dist(in_point, query);
          exp_i[n_in] = in_idx;
          exp_t[n_in] = cyc;
          n_in++;
        end
      end
      @(negedge clk); in_valid = 1'b0;
      repeat (LAT + 2) @(posedge clk);
    end
    checks++;
    if (n_out != n_in) begin
      failures++; $display("FAIL: %0d inputs, %0d outputs", n_in, n_out);
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
