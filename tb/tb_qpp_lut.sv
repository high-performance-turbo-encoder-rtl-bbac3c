// tb_qpp_lut: checks the size index and coefficient table.
// For all 188 LTE sizes (generated from their step rule): the index equals
// the table position, the entry's K matches, legal is high and the entry
// gives a permutation (every address hit once). For the reference sizes the
// coefficients are compared with the values of the LTE table. Every other
// 13-bit length must be reported not legal.
module tb_qpp_lut;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  blklen_t    k_in;
  qpp_idx_t   idx;
  qpp_entry_t entry;
  logic       legal;
  int checks = 0, failures = 0;
  int range_hits [5];

  qpp_lut dut (.k_in, .idx, .entry, .legal);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  initial begin
    bit seen [KMAX];
    bit is_size [8192];
    for (int n = 0; n < 188; n++) begin
      automatic int k = lte_size(n);
      is_size[k] = 1'b1;
      k_in = blklen_t'(k);
      #1;
      checks++;
      if (int'(idx) != n) fail($sformatf("K=%0d idx=%0d exp %0d", k, idx, n));
      checks++;
      if (!legal || int'(entry.k) != k) fail($sformatf("K=%0d legal=%b entry.k=%0d", k, legal, entry.k));
      range_hits[k < 512 ? 0 : k < 1024 ? 1 : k < 2048 ? 2 : k < 4096 ? 3 : 4]++;
      for (int i = 0; i < k; i++) seen[i] = 1'b0;
      for (int i = 0; i < k; i++) seen[qpp_pi(k, int'(entry.f1), int'(entry.f2), i)] = 1'b1;
      checks++;
      for (int i = 0; i < k; i++) if (!seen[i]) begin
        fail($sformatf("K=%0d f1=%0d f2=%0d is not a permutation", k, entry.f1, entry.f2));
        break;
      end
    end
    for (int r = 0; r < NREF; r++) begin
      k_in = blklen_t'(REF_K[r]);
      #1;
      checks++;
      if (int'(entry.f1) != REF_F1[r] || int'(entry.f2) != REF_F2[r])
        fail($sformatf("K=%0d f1=%0d f2=%0d exp %0d %0d", REF_K[r], entry.f1, entry.f2, REF_F1[r], REF_F2[r]));
    end
    for (int k = 0; k < 8192; k++) if (!is_size[k]) begin
      k_in = blklen_t'(k);
      #1;
      checks++;
      if (legal) fail($sformatf("K=%0d reported legal", k));
    end
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (range_hits[r] == 0) fail($sformatf("index range %0d never used", r));
    end
    $display("sizes per index range: %0d %0d %0d %0d %0d", range_hits[0], range_hits[1],
             range_hits[2], range_hits[3], range_hits[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
