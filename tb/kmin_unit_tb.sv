// kmin_unit_tb: feeds streams of random candidates (with many equal
// distances, idle cycles and clears between streams) into kmin_unit and
// after every accepted candidate compares the list with a reference that
// keeps all candidates and picks the K smallest by (distance, arrival).
module kmin_unit_tb;
  import knn_pkg::*;

  localparam int unsigned K = 5;

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  clear, in_valid, inserted;
  cand_t in_cand;
  cand_t list [K];
  logic  list_valid [K];

  kmin_unit #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  int n_ins = 0, n_rej = 0;
  cand_t seen [$];

  // reference: stable selection of the K smallest of seen[]
  task automatic check_list();
    cand_t ref_l [$];
    ref_l = seen;
    // stable insertion sort by distance
    for (int i = 1; i < ref_l.size(); i++) begin
      cand_t c = ref_l[i];
      int j = i - 1;
      while (j >= 0 && ref_l[j].dsq > c.dsq) begin
        ref_l[j+1] = ref_l[j];
        j--;
      end
      ref_l[j+1] = c;
    end
    for (int j = 0; j < K; j++) begin
      checks++;
      if (j < ref_l.size()) begin
        if (!list_valid[j] || list[j] != ref_l[j]) begin
          failures++;
          $display("FAIL entry %0d: %0d/%0d v%0d expected %0d/%0d", j, list[j].dsq, list[j].idx,
                   list_valid[j], ref_l[j].dsq, ref_l[j].idx);
        end
      end else if (list_valid[j]) begin
        failures++;
        $display("FAIL entry %0d valid with only %0d candidates", j, ref_l.size());
      end
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_cand = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      @(negedge clk); clear = 1; in_valid = 1; in_cand = '0;  // clear wins
      @(negedge clk); clear = 0; in_valid = 0;
      seen.delete();
      check_list();
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        in_valid = ($urandom % 5) != 0;
        in_cand.dsq = (s % 2 == 0) ? dist_t'($urandom % 20) : dist_t'({$urandom, $urandom});
        in_cand.idx = idx_t'(i);
        if (in_valid) begin
          seen.push_back(in_cand);
          @(negedge clk);
          in_valid = 0;
          checks++;
          // inserted: was the candidate among the K smallest at that time?
          begin
            int n_le;
            n_le = 0;
            for (int m = 0; m < seen.size() - 1; m++)
              if (seen[m].dsq <= in_cand.dsq) n_le++;
            if (inserted != (n_le < K)) begin
              failures++; $display("FAIL: inserted flag %0d", inserted);
            end
            if (inserted) n_ins++; else n_rej++;
          end
          check_list();
        end
      end
    end
    checks++;
    if (n_ins == 0 || n_rej == 0) begin
      failures++; $display("FAIL: inserts %0d rejects %0d", n_ins, n_rej);
    end
    $display("inserted %0d rejected %0d", n_ins, n_rej);
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
