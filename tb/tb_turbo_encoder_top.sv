// tb_turbo_encoder_top: end-to-end test of the turbo encoder at its default
// size (6144-bit buffers). Blocks of lengths from all five size ranges, the
// largest (6144) among them, stream in; every output triple {Z', Z, X} and
// the 12 tail bits of each block are compared with a reference encoder (XOR
// shift-register RSC, directly evaluated QPP permutation). Also checked:
// the 5-clock latency from a block's last input bit to its first output on
// an idle encoder, that each block leaves the output as K+3 consecutive
// triples, and that a block with an unsupported length is dropped with
// blk_err. Each mechanism of the design is counted and must occur: use of
// the ping and of the pong buffer, input stall (ready_in low), gap-free
// change between blocks at the output, trellis termination, length error,
// and every range of the size index.
module tb_turbo_encoder_top;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  blklen_t size_in;
  logic valid_in, sop_in, eop_in, data_in, ready_in;
  logic valid_out, sop_out, eop_out, tail_out, tail_xi_out, blk_err;
  logic [2:0] data_out;
  int checks = 0, failures = 0;
  longint cycle = 0;

  turbo_encoder_top dut (.clk, .rst_n, .size_in, .valid_in, .sop_in, .eop_in, .data_in, .ready_in,
    .valid_out, .sop_out, .eop_out, .tail_out, .data_out, .tail_xi_out, .blk_err);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0d: %s", cycle, msg);
  endtask

  // expected output words: {sop, eop, tail, tail_xi, data_out}
  typedef logic [6:0] word_t;
  word_t  expq [$];
  int     blk_len [$];
  longint last_in_cycle [$];

  function automatic void model_block(input int r, input bit d [$]);
    int k = REF_K[r];
    logic [2:0] s1 = 3'b000, s2 = 3'b000;
    logic [4:0] a, b;
    for (int i = 0; i < k; i++) begin
      a = rsc_step(s1, d[i], 1'b0);
      b = rsc_step(s2, d[qpp_pi(k, REF_F1[r], REF_F2[r], i)], 1'b0);
      s1 = a[4:2]; s2 = b[4:2];
      expq.push_back({i == 0, 1'b0, 1'b0, 1'b0, b[0], a[0], a[1]});
    end
    for (int t = 0; t < 3; t++) begin
      a = rsc_step(s1, 1'b0, 1'b1);
      b = rsc_step(s2, 1'b0, 1'b1);
      s1 = a[4:2]; s2 = b[4:2];
      expq.push_back({1'b0, t == 2, 1'b1, b[1], b[0], a[0], a[1]});
    end
    blk_len.push_back(k);
  endfunction

  // mechanism counters
  int n_ping = 0, n_pong = 0, n_stall = 0, n_gapless = 0, n_tail = 0, n_err = 0, n_blocks = 0;
  int range_hits [5];
  int run = 0, cur_k = 0;
  bit prev_eop = 0;
  longint first_out_cycle = -1;

  always @(posedge clk) if (rst_n) begin
    if (valid_in && !ready_in) n_stall++;
    if (blk_err) n_err++;
    if (valid_out) begin
      word_t got, exp;
      got = {sop_out, eop_out, tail_out, tail_xi_out, data_out};
      checks++;
      if (expq.size() == 0) fail("output with nothing expected");
      else begin
        exp = expq.pop_front();
        if (got !== exp) fail($sformatf("got %b exp %b (sop eop tail xi | Z' Z X)", got, exp));
      end
      if (sop_out) begin
        run = 0;
        cur_k = blk_len.size() ? blk_len.pop_front() : 0;
        if (dut.u_sync.rd_q) n_pong++; else n_ping++;
        if (prev_eop) n_gapless++;
        if (first_out_cycle < 0) first_out_cycle = cycle;
      end
      run++;
      if (eop_out) begin
        n_tail++;
        n_blocks++;
        checks++;
        if (run != cur_k + 3) fail($sformatf("block of %0d left in %0d cycles, exp %0d", cur_k, run, cur_k + 3));
      end
    end else if (run > 0 && run < cur_k + 3) begin
      checks++;
      fail("gap inside an output block");
      run = 0;
    end
    prev_eop = valid_out && eop_out;
  end

  task automatic send_block(input int r, input int gap_pct, input bit bad_len);
    bit d [$];
    int k = REF_K[r];
    for (int j = 0; j < k; j++) d.push_back(1'($urandom));
    if (!bad_len) begin
      model_block(r, d);
      range_hits[k < 512 ? 0 : k < 1024 ? 1 : k < 2048 ? 2 : k < 4096 ? 3 : 4]++;
    end
    for (int j = 0; j < k; j++) begin
      while ($urandom_range(0, 99) < gap_pct) begin valid_in = 0; @(negedge clk); end
      valid_in = 1; sop_in = (j == 0); eop_in = (j == k - 1); data_in = d[j];
      size_in = bad_len ? blklen_t'(k + 1) : blklen_t'(k);
      @(posedge clk);
      while (!ready_in) @(posedge clk);
      @(negedge clk);
    end
    last_in_cycle.push_back(cycle);
    valid_in = 0; sop_in = 0; eop_in = 0;
  endtask

  initial begin
    valid_in = 0; sop_in = 0; eop_in = 0; size_in = '0; data_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // 1. single block on an idle encoder: latency
    send_block(0, 0, 1'b0);
    repeat (60) @(negedge clk);
    checks++;
    if (first_out_cycle - last_in_cycle[0] != 5)
      fail($sformatf("latency %0d clocks, expected 5", first_out_cycle - last_in_cycle[0]));
    // 2. streaming without pauses, mixed sizes including the largest
    for (int r = 0; r < NREF; r++) send_block(r, 0, 1'b0);
    send_block(NREF - 1, 0, 1'b0);
    // 3. unsupported length is dropped
    send_block(0, 0, 1'b1);
    // 4. streaming with random input pauses
    for (int n = 0; n < 20; n++) send_block(int'($urandom_range(0, 7)), 25, 1'b0);
    repeat (14000) @(negedge clk);

    $display("blocks %0d  ping %0d  pong %0d  stalls %0d  gap-free changes %0d  terminations %0d  length errors %0d",
             n_blocks, n_ping, n_pong, n_stall, n_gapless, n_tail, n_err);
    $display("blocks per size range: %0d %0d %0d %0d %0d", range_hits[0], range_hits[1],
             range_hits[2], range_hits[3], range_hits[4]);
    checks++; if (expq.size() != 0) fail($sformatf("%0d expected outputs missing", expq.size()));
    checks++; if (n_ping == 0) fail("ping buffer never used");
    checks++; if (n_pong == 0) fail("pong buffer never used");
    checks++; if (n_stall == 0) fail("input never stalled");
    checks++; if (n_gapless == 0) fail("no gap-free block change");
    checks++; if (n_tail != n_blocks || n_tail == 0) fail("termination count");
    checks++; if (n_err != 1) fail("length error not seen once");
    for (int q = 0; q < 5; q++) begin
      checks++;
      if (range_hits[q] == 0) fail($sformatf("size range %0d never used", q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
