// mem_model: behavioural model of the global memory read port, for
// testbenches only (not synthesizable intent; it stands for DRAM and its
// controller, which this design does not include).
//
// Requests (word address, length-1) are queued on the address channel; the
// data of each request starts LATENCY cycles after it was accepted and
// comes one beat per cycle in request order, with r_last on each burst's
// final beat. With stall_pct > 0 ar_ready and r_valid are withheld at
// random in that share of cycles. A word's content is a hash of its
// address and SEED; with NARROW = 1 coordinates are limited to -8..7 so that
// equal distances are frequent. The same hash is in the testbenches'
// reference models.
module mem_model
  import knn_pkg::*;
#(
  parameter int unsigned LATENCY   = 8,
  parameter int unsigned SEED      = 1,
  parameter bit          NARROW    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  int unsigned       stall_pct,  // share of cycles withheld, 0..100
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output point_t            r_data,
  output logic              r_last,
  output int unsigned       n_req,     // requests accepted
  output int unsigned       n_stall    // cycles with a beat ready but withheld
);

  function automatic point_t point_of(int unsigned a, int unsigned seed, bit narrow);
    logic [31:0] h;
    point_t p;
    h = a * 32'h9E37_79B1 ^ seed;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA77;
    h = h ^ (h >> 13);
    if (narrow) begin
      p.x = coord_t'(signed'(h[3:0]));
      p.y = coord_t'(signed'(h[19:16]));
    end else begin
      p.x = h[15:0];
      p.y = h[31:16];
    end
    return p;
  endfunction

  localparam int QD = 64;
  logic [ADDR_W-1:0] q_addr [QD];
  logic [LEN_W-1:0]  q_len  [QD];
  longint unsigned   q_time [QD];
  int unsigned       q_wr, q_rd, q_cnt;
  int unsigned       beat;
  longint unsigned   now;
  logic              gap;

  assign ar_ready = rst_n && (q_cnt < QD) && !gap;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wr <= 0; q_rd <= 0; q_cnt <= 0; beat <= 0; now <= 0;
      r_valid <= 1'b0; r_data <= '0; r_last <= 1'b0;
      n_req <= 0; n_stall <= 0; gap <= 1'b0;
    end else begin
      int unsigned cnt, rd, bt, have;
      cnt = q_cnt;
      now <= now + 1;
      gap <= (stall_pct > 0) && (($urandom % 100) < stall_pct);
      if (ar_valid && ar_ready) begin
        q_addr[q_wr] <= ar_addr;
        q_len[q_wr]  <= ar_len;
        q_time[q_wr] <= now;
        q_wr  <= (q_wr + 1) % QD;
        cnt   = cnt + 1;
        n_req <= n_req + 1;
      end
      // data channel: a beat, once offered, stays until it is taken
      rd   = q_rd;
      bt   = beat;
      have = q_cnt;
      if (r_valid && r_ready) begin
        if (r_last) begin
          rd   = (rd + 1) % QD;
          cnt  = cnt - 1;
          have = have - 1;
          bt   = 0;
        end else begin
          bt = bt + 1;
        end
      end
      if (!r_valid || r_ready) begin
        if (have > 0 && now >= q_time[rd] + LATENCY && !gap) begin
          r_valid <= 1'b1;
          r_data  <= point_of(q_addr[rd] + bt, SEED, NARROW);
          r_last  <= (bt == int'(q_len[rd]));
        end else begin
          if (have > 0 && now >= q_time[rd] + LATENCY) n_stall <= n_stall + 1;
          r_valid <= 1'b0;
        end
      end
      q_rd <= rd;
      beat <= bt;
      q_cnt <= cnt;
    end
  end

endmodule
