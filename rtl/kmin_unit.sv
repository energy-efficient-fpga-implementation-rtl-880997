// kmin_unit: keeps the K smallest distances seen so far, with their
// indices, in ascending order.
//
// The list is a row of K registers, entry 0 the nearest. Every candidate is
// compared with all entries at once; it goes in at the first position whose
// entry is empty or farther away, and the entries behind that position move
// back one place, dropping the last. A candidate that is no nearer than all
// K entries is dropped. One candidate is taken per cycle (initiation
// interval 1) and the list is up to date the cycle after. On equal
// distances the earlier candidate stays ahead. clear empties the list.
// Selecting the k smallest distances while keeping their indices, in a
// pipelined way, is the article's; the insertion structure, the tie rule
// and the empty-entry flags are this design's choice.
module kmin_unit
  import knn_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  cand_t in_cand,
  output cand_t list  [K],
  output logic  list_valid [K],
  output logic  inserted        // the last candidate taken entered the list
);

  logic [K-1:0] closer;   // candidate goes before entry j
  always_comb begin
    for (int j = 0; j < K; j++) begin
      closer[j] = !list_valid[j] || (in_cand.dsq < list[j].dsq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) begin
        list[j]       <= '0;
        list_valid[j] <= 1'b0;
      end
      inserted <= 1'b0;
    end else if (clear) begin
      for (int j = 0; j < K; j++) begin
        list_valid[j] <= 1'b0;
      end
      inserted <= 1'b0;
    end else begin
      inserted <= in_valid && closer[K-1];
      if (in_valid) begin
        // closer[] is monotone: once true it stays true for larger j, so
        // the first true position takes the candidate and the rest shift.
        if (closer[0]) begin
          list[0]       <= in_cand;
          list_valid[0] <= 1'b1;
        end
        for (int j = 1; j < K; j++) begin
          if (closer[j] && !closer[j-1]) begin
            list[j]       <= in_cand;
            list_valid[j] <= 1'b1;
          end else if (closer[j]) begin
            list[j]       <= list[j-1];
            list_valid[j] <= list_valid[j-1];
          end
        end
      end
    end
  end

endmodule
