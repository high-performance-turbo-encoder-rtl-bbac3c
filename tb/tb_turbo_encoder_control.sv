// tb_turbo_encoder_control: the ping/pong control logic together with the
// QPP interleaver it starts. A stream of blocks is pushed with no idle
// cycles (so the input has to stall) and then with random gaps. Checked:
// each block is written to addresses 0..K-1 of alternating buffers, the
// interleaver is started once per block with that block's length, in order,
// from the buffer it was written to; tail is high for exactly the three
// cycles after each last address pair; a block that is already loaded
// starts its first pair right after the previous tail; ready_in drops only
// when both buffers are full; a block with an unsupported length is dropped
// with blk_err.
module tb_turbo_encoder_control;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, sop_in, eop_in, ready_in;
  blklen_t size_in;
  logic [1:0] wr_en, full;
  blklen_t wr_addr;
  logic rd_sel, itl_start, itl_busy, itl_valid, itl_first, itl_last, itl_len_err;
  logic tail, tail_last, blk_err;
  blklen_t itl_length, in_seq, int_seq;
  int checks = 0, failures = 0;

  turbo_encoder_control dut (.clk, .rst_n, .valid_in, .sop_in, .eop_in, .size_in, .ready_in,
    .wr_en, .wr_addr, .rd_sel, .itl_start, .itl_length, .itl_busy, .itl_valid, .itl_last,
    .itl_len_err, .tail, .tail_last, .blk_err, .full);
  qpp_interleaver u_itl (.clk, .rst_n, .start(itl_start), .length(itl_length), .busy(itl_busy),
    .len_err(itl_len_err), .valid_seq(itl_valid), .first_seq(itl_first), .last_seq(itl_last),
    .in_seq, .int_seq);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%t %s", $time, msg);
  endtask

  // expected blocks, in order: length and buffer
  int exp_k [$], exp_buf [$], exp_rd_k [$], exp_rd_buf [$];
  int stalls = 0, gapless = 0, tails = 0, errs = 0, blocks_read = 0;

  // write-side monitor
  int wbuf = 0, waddr = 0, wk = 0;
  bit wopen = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (wr_en == 2'b11) fail("both buffers written");
    if (valid_in && !ready_in) begin
      stalls++;
      checks++;
      if (full != 2'b11) fail("stall while a buffer is free");
    end
    if (wr_en != 2'b00) begin
      if (!wopen) begin
        wopen = 1; waddr = 0;
        if (exp_k.size() == 0) fail("unexpected write");
        else begin wk = exp_k.pop_front(); wbuf = exp_buf.pop_front(); end
      end
      checks++;
      if (wr_en[wbuf] !== 1'b1 || int'(wr_addr) != waddr)
        fail($sformatf("write to buf %b addr %0d, exp buf %0d addr %0d", wr_en, wr_addr, wbuf, waddr));
      waddr++;
      if (waddr == wk) wopen = 0;
    end
  end

  // read-side monitor
  int rk = 0, rbuf = 0, ri = 0, tail_run = 0, since_last = -1, since_tail = -1;
  always @(posedge clk) if (rst_n) begin
    if (itl_start) begin
      checks++;
      if (exp_rd_k.size() == 0) fail("unexpected interleaver start");
      else begin
        rk = exp_rd_k.pop_front(); rbuf = exp_rd_buf.pop_front();
        if (int'(itl_length) != rk) fail($sformatf("start length %0d exp %0d", itl_length, rk));
      end
    end
    if (blk_err) errs++;
    if (itl_valid) begin
      if (itl_first) begin
        ri = 0;
        checks++;
        if (int'(rd_sel) != rbuf) fail($sformatf("reading buffer %0d exp %0d", rd_sel, rbuf));
        if (since_tail == 1) gapless++;
      end
      checks++;
      if (!full[rd_sel]) fail("reading a buffer that is not full");
      ri++;
      if (itl_last) begin
        checks++;
        if (ri != rk) fail($sformatf("block of %0d pairs, exp %0d", ri, rk));
        blocks_read++;
      end
    end
    // tail: exactly 3 cycles after the last pair
    if (since_last >= 1 && since_last <= 3) begin
      checks++;
      if (!tail || (tail_last != (since_last == 3))) fail($sformatf("tail missing %0d", since_last));
    end else begin
      checks++;
      if (tail) fail("tail outside its slot");
    end
    if (tail_last) tails++;
    since_tail = tail_last ? 1 : (since_tail >= 0 ? since_tail + 1 : -1);
    since_last = (itl_valid && itl_last) ? 1 : (since_last >= 0 ? since_last + 1 : -1);
  end

  int nbuf = 0;
  task automatic send_block(input int k, input int len_field, input int gap_pct);
    exp_k.push_back(k); exp_buf.push_back(nbuf);
    if (len_field == k) begin exp_rd_k.push_back(k); exp_rd_buf.push_back(nbuf); end
    nbuf ^= 1;
    for (int i = 0; i < k; i++) begin
      while ($urandom_range(0, 99) < gap_pct) begin
        valid_in = 0; @(negedge clk);
      end
      valid_in = 1; sop_in = (i == 0); eop_in = (i == k - 1); size_in = blklen_t'(len_field);
      @(posedge clk);
      while (!ready_in) @(posedge clk);
      @(negedge clk);
    end
    valid_in = 0; sop_in = 0; eop_in = 0;
  endtask

  initial begin
    valid_in = 0; sop_in = 0; eop_in = 0; size_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 12; b++) send_block(REF_K[b % 6], REF_K[b % 6], 0);
    send_block(41, 41, 0);   // unsupported length
    for (int b = 0; b < 12; b++) begin
      automatic int k = REF_K[$urandom_range(0, 7)];
      send_block(k, k, 30);
    end
    repeat (2000) @(negedge clk);
    $display("blocks read %0d, stalls %0d, gapless starts %0d, tails %0d, length errors %0d",
             blocks_read, stalls, gapless, tails, errs);
    checks++; if (blocks_read != 24 || tails != 24) fail("not all blocks encoded");
    checks++; if (exp_k.size() != 0 || exp_rd_k.size() != 0) fail("blocks left over");
    checks++; if (stalls == 0) fail("input never stalled");
    checks++; if (gapless == 0) fail("no gap-free block change");
    checks++; if (errs != 1) fail("unsupported length not reported once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
