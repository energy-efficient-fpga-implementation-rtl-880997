// mem_rd_if: read channel bundle between a kernel and global memory.
//
// Two handshaked channels in the style of an AXI read port. The address
// channel (ar_*) carries a word address and a burst length (beats - 1);
// a request is taken in the cycle where ar_valid and ar_ready are both
// high. The data channel (r_*) returns one point per beat, in request
// order, with r_last on the final beat of each burst; a beat is taken when
// r_valid and r_ready are both high. The channel layout is this design's
// choice; the article only says that points are read in bursts.
interface mem_rd_if;
  import knn_pkg::*;

  logic                 ar_valid;
  logic                 ar_ready;
  logic [ADDR_W-1:0]    ar_addr;
  logic [LEN_W-1:0]     ar_len;
  logic                 r_valid;
  logic                 r_ready;
  point_t               r_data;
  logic                 r_last;

  modport master (output ar_valid, ar_addr, ar_len, r_ready,
                  input  ar_ready, r_valid, r_data, r_last);
  modport slave  (input  ar_valid, ar_addr, ar_len, r_ready,
                  output ar_ready, r_valid, r_data, r_last);
endinterface
