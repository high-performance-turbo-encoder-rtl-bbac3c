// tb_qpp_interleaver: runs the address generator for every LTE block size.
// Each sequence must start two cycles after `start`, deliver K consecutive
// pairs with in_seq = 0..K-1, first/last on the ends, and int_seq equal to
// (f1*i + f2*i*i) mod K computed directly; for the reference sizes f1, f2
// are the LTE values, for the others they are read from a separate qpp_lut.
// Sequences are started back to back as soon as the generator is idle.
// An unsupported length must give len_err and no sequence.
module tb_qpp_interleaver;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, len_err, valid_seq, first_seq, last_seq;
  blklen_t length, in_seq, int_seq;
  blklen_t lk;
  qpp_entry_t le;
  logic lleg;
  int checks = 0, failures = 0;

  qpp_interleaver dut (.clk, .rst_n, .start, .length, .busy, .len_err, .valid_seq,
                       .first_seq, .last_seq, .in_seq, .int_seq);
  qpp_lut u_ref_lut (.k_in(lk), .idx(), .entry(le), .legal(lleg));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  task automatic run_size(input int k);
    int f1, f2, lat;
    bit found = 0;
    for (int r = 0; r < NREF; r++) if (REF_K[r] == k) begin
      f1 = REF_F1[r]; f2 = REF_F2[r]; found = 1;
    end
    if (!found) begin
      lk = blklen_t'(k); #1;
      f1 = int'(le.f1); f2 = int'(le.f2);
    end
    start = 1'b1; length = blklen_t'(k);
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!valid_seq && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) fail($sformatf("K=%0d latency %0d, expected 2", k, lat));
    for (int i = 0; i < k; i++) begin
      checks++;
      if (!valid_seq || int'(in_seq) != i || int'(int_seq) != qpp_pi(k, f1, f2, i) ||
          first_seq != (i == 0) || last_seq != (i == k - 1)) begin
        fail($sformatf("K=%0d i=%0d: valid=%b in=%0d int=%0d exp %0d first=%b last=%b", k, i,
                       valid_seq, in_seq, int_seq, qpp_pi(k, f1, f2, i), first_seq, last_seq));
        break;
      end
      @(negedge clk);
    end
    checks++;
    if (valid_seq) fail($sformatf("K=%0d: valid after last", k));
  endtask

  initial begin
    start = 0; length = '0; lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 188; n++) run_size(lte_size(n));
    // unsupported length
    start = 1'b1; length = 13'd41;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    checks++;
    if (!len_err || valid_seq) fail("length 41 not rejected");
    repeat (3) @(negedge clk);
    checks++;
    if (valid_seq || busy) fail("sequence after rejected length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
