// tb_data_sync_unit: ping/pong buffers, mux and control with the QPP
// interleaver. Random blocks stream in with random gaps; for every block the
// unit must deliver, one per clock, the pair (X_i, X_pi(i)) for i = 0..K-1
// with pi computed directly from the LTE coefficients, flag the first and
// last bit, and follow the block with three tail cycles. Both buffers must
// have been read from.
module tb_data_sync_unit;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, sop_in, eop_in, data_in, ready_in;
  blklen_t size_in, itl_length, in_seq, int_seq;
  logic itl_start, itl_busy, itl_valid, itl_first, itl_last, itl_len_err;
  logic bit_valid, bit_first, bit_last, bit_tail, bit_tail_last, x_bit, xi_bit, rd_sel, blk_err;
  logic [1:0] full;
  int checks = 0, failures = 0;

  data_sync_unit dut (.clk, .rst_n, .valid_in, .sop_in, .eop_in, .data_in, .size_in, .ready_in,
    .itl_start, .itl_length, .itl_busy, .itl_valid, .itl_first, .itl_last, .itl_len_err,
    .in_seq, .int_seq, .bit_valid, .bit_first, .bit_last, .bit_tail, .bit_tail_last,
    .x_bit, .xi_bit, .full, .rd_sel, .blk_err);
  qpp_interleaver u_itl (.clk, .rst_n, .start(itl_start), .length(itl_length), .busy(itl_busy),
    .len_err(itl_len_err), .valid_seq(itl_valid), .first_seq(itl_first), .last_seq(itl_last),
    .in_seq, .int_seq);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%t %s", $time, msg);
  endtask

  typedef struct { int k; int r; bit d [$]; } blk_t;
  blk_t sent [$];
  blk_t cur;
  int i = -1, tcnt = 0, done = 0;
  bit used [2];

  always @(posedge clk) if (rst_n) begin
    if (bit_valid && !bit_tail) begin
      if (bit_first) begin
        checks++;
        if (i != -1) fail("first bit inside a block");
        if (sent.size() == 0) fail("unexpected block");
        else cur = sent.pop_front();
        i = 0;
        used[rd_sel] = 1'b1;
      end
      if (i >= 0) begin
        automatic int p = qpp_pi(REF_K[cur.r], REF_F1[cur.r], REF_F2[cur.r], i);
        checks++;
        if (x_bit !== cur.d[i] || xi_bit !== cur.d[p] || bit_last != (i == cur.k - 1))
          fail($sformatf("K=%0d i=%0d got x=%b xi=%b last=%b exp %b %b", cur.k, i, x_bit, xi_bit,
                         bit_last, cur.d[i], cur.d[p]));
        i++;
        if (i == cur.k) begin i = -1; tcnt = 0; end
      end
    end
    if (bit_tail) begin
      tcnt++;
      checks++;
      if (x_bit || xi_bit || (bit_tail_last != (tcnt == 3))) fail("tail framing");
      if (bit_tail_last) done++;
    end
  end

  task automatic send_block(input int r, input int gap_pct);
    blk_t b;
    b.k = REF_K[r]; b.r = r;
    for (int j = 0; j < b.k; j++) b.d.push_back(1'($urandom));
    sent.push_back(b);
    for (int j = 0; j < b.k; j++) begin
      while ($urandom_range(0, 99) < gap_pct) begin valid_in = 0; @(negedge clk); end
      valid_in = 1; sop_in = (j == 0); eop_in = (j == b.k - 1); size_in = blklen_t'(b.k);
      data_in = b.d[j];
      @(posedge clk);
      while (!ready_in) @(posedge clk);
      @(negedge clk);
    end
    valid_in = 0; sop_in = 0; eop_in = 0;
  endtask

  initial begin
    valid_in = 0; sop_in = 0; eop_in = 0; size_in = '0; data_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 30; n++) send_block(int'($urandom_range(0, 10)), n < 15 ? 0 : 20);
    send_block(NREF - 1, 0);
    repeat (8000) @(negedge clk);
    $display("blocks delivered %0d", done);
    checks++; if (done != 31 || sent.size() != 0) fail("not every block delivered");
    checks++; if (!used[0] || !used[1]) fail("ping or pong never read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
