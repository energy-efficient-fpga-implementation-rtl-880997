// burst_reader: streams a contiguous range of points from global memory
// into a ring buffer of WINDOW points, in bursts.
//
// On start it latches a word address and a point count. The address
// channel issues bursts of BURST_LEN beats (the last one shorter if
// needed) without waiting for data, as long as the ring has room for the
// whole burst: points requested minus points the consumer has released
// (consumed) may not exceed WINDOW. So the memory latency is covered by
// the requests in flight and, with a memory that answers every cycle, one
// point arrives per cycle. Data beats are always accepted while a transfer
// is open (room was reserved when the burst was requested) and leave on
// out_valid with their position out_pos in the range; received counts
// them. done pulses one cycle after the last beat. Reading in bursts is
// the article's; the credit scheme, burst length and channel protocol
// are this design's choice.
module burst_reader
  import knn_pkg::*;
#(
  parameter int unsigned BURST_LEN = 16,   // beats per burst
  parameter int unsigned WINDOW    = 512   // ring buffer size, in points
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [IDX_W:0]    count,
  input  logic [IDX_W:0]    consumed,   // points the consumer has released
  output logic              busy,
  output logic              done,
  mem_rd_if.master          mem,
  output logic              out_valid,
  output logic [IDX_W:0]    out_pos,
  output point_t            out_data,
  output logic [IDX_W:0]    received
);

  logic [ADDR_W-1:0] req_addr;     // next burst address
  logic [IDX_W:0]    req_ptr;      // points requested so far
  logic [IDX_W:0]    count_q;

  logic [IDX_W:0] req_left, this_len;
  logic           room;
  always_comb begin
    req_left = count_q - req_ptr;
    this_len = (req_left > (IDX_W+1)'(BURST_LEN)) ? (IDX_W+1)'(BURST_LEN) : req_left;
    room     = (req_ptr + this_len - consumed) <= (IDX_W+1)'(WINDOW);
  end

  assign mem.ar_valid = busy && (req_left != '0) && room;
  assign mem.ar_addr  = req_addr;
  assign mem.ar_len   = LEN_W'(this_len - 1'b1);
  assign mem.r_ready  = busy;

  wire ar_fire = mem.ar_valid && mem.ar_ready;
  wire r_fire  = mem.r_valid && mem.r_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      req_addr <= '0;
      req_ptr  <= '0;
      count_q  <= '0;
      received <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= (count != '0);
          done     <= (count == '0);
          req_addr <= base;
          req_ptr  <= '0;
          count_q  <= count;
          received <= '0;
        end
      end else begin
        if (ar_fire) begin
          req_addr <= req_addr + ADDR_W'(this_len);
          req_ptr  <= req_ptr + this_len;
        end
        if (r_fire) begin
          received <= received + 1'b1;
          if (received + 1'b1 == count_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign out_valid = r_fire;
  assign out_pos   = received;
  assign out_data  = mem.r_data;

  // The address channel must not change or drop a request that waits.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem.ar_valid && !mem.ar_ready |=> mem.ar_valid && $stable(mem.ar_addr) && $stable(mem.ar_len));

  // r_last must come exactly on the final beat of each burst.
  logic [LEN_W:0] beat_in_burst;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beat_in_burst <= '0;
    else if (r_fire) beat_in_burst <= mem.r_last ? '0 : beat_in_burst + 1'b1;
  end
  a_r_last: assert property (@(posedge clk) disable iff (!rst_n)
    r_fire |-> mem.r_last == ((beat_in_burst == (LEN_W+1)'(BURST_LEN - 1))
                              || (received + 1'b1 == count_q)));
  a_no_data_when_idle: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !r_fire);
  a_window: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (received - consumed) <= (IDX_W+1)'(WINDOW));

endmodule
