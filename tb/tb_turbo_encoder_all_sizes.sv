// tb_turbo_encoder_all_sizes: throughput and block-size workload. All 188
// LTE block sizes, 6144 down to 40 bits, are streamed through the turbo
// encoder back to back with no input pauses. Every output triple and tail bit is
// compared with a reference encoder (XOR shift-register RSC, direct QPP
// evaluation). The coefficients for the reference come from a separate
// instance of the coefficient table, whose values are checked on their own
// by tb_qpp_lut. The sustained rate is measured as information bits per
// clock from the first to the last output triple; it must reach
// K/(K+3) over the run, i.e. no clock is lost beyond the three tail clocks
// per block. At a 300 MHz clock this is the encoder's information bit rate.
module tb_turbo_encoder_all_sizes;
  import turbo_ref_pkg::*;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  blklen_t size_in;
  logic valid_in, sop_in, eop_in, data_in, ready_in;
  logic valid_out, sop_out, eop_out, tail_out, tail_xi_out, blk_err;
  logic [2:0] data_out;
  blklen_t    lk;
  qpp_entry_t le;
  logic       lleg;
  int checks = 0, failures = 0;
  longint cycle = 0;

  turbo_encoder_top dut (.clk, .rst_n, .size_in, .valid_in, .sop_in, .eop_in, .data_in, .ready_in,
    .valid_out, .sop_out, .eop_out, .tail_out, .data_out, .tail_xi_out, .blk_err);
  qpp_lut u_coef (.k_in(lk), .idx(), .entry(le), .legal(lleg));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0d: %s", cycle, msg);
  endtask

  typedef logic [6:0] word_t;   // {sop, eop, tail, tail_xi, Z', Z, X}
  word_t expq [$];
  longint info_bits = 0, out_first = -1, out_last = -1;
  int blocks_out = 0, tail_cycles = 0;

  task automatic model_block(input int k, input int f1, input int f2, input bit d [$]);
    logic [2:0] s1 = 3'b000, s2 = 3'b000;
    logic [4:0] a, b;
    for (int i = 0; i < k; i++) begin
      a = rsc_step(s1, d[i], 1'b0);
      b = rsc_step(s2, d[qpp_pi(k, f1, f2, i)], 1'b0);
      s1 = a[4:2]; s2 = b[4:2];
      expq.push_back({i == 0, 1'b0, 1'b0, 1'b0, b[0], a[0], a[1]});
    end
    for (int t = 0; t < 3; t++) begin
      a = rsc_step(s1, 1'b0, 1'b1);
      b = rsc_step(s2, 1'b0, 1'b1);
      s1 = a[4:2]; s2 = b[4:2];
      expq.push_back({1'b0, t == 2, 1'b1, b[1], b[0], a[0], a[1]});
    end
  endtask

  always @(posedge clk) if (rst_n && valid_out) begin
    word_t got, exp;
    got = {sop_out, eop_out, tail_out, tail_xi_out, data_out};
    checks++;
    if (expq.size() == 0) fail("output with nothing expected");
    else begin
      exp = expq.pop_front();
      if (got !== exp) fail($sformatf("got %b exp %b", got, exp));
    end
    if (out_first < 0) out_first = cycle;
    out_last = cycle;
    if (tail_out) tail_cycles++; else info_bits++;
    if (eop_out) blocks_out++;
  end

  task automatic send_block(input int k);
    bit d [$];
    lk = blklen_t'(k);
    #1;
    for (int j = 0; j < k; j++) d.push_back(1'($urandom));
    model_block(k, int'(le.f1), int'(le.f2), d);
    for (int j = 0; j < k; j++) begin
      valid_in = 1; sop_in = (j == 0); eop_in = (j == k - 1); data_in = d[j];
      size_in = blklen_t'(k);
      @(posedge clk);
      while (!ready_in) @(posedge clk);
      @(negedge clk);
    end
    valid_in = 0; sop_in = 0; eop_in = 0;
  endtask

  initial begin
    longint total_k = 0;
    real rate;
    valid_in = 0; sop_in = 0; eop_in = 0; size_in = '0; data_in = 0; lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // Largest first: each block is then loaded before the previous one has
    // left the encoder, so the output side is the bottleneck.
    for (int n = 187; n >= 0; n--) begin
      send_block(lte_size(n));
      total_k += lte_size(n);
    end
    repeat (7000) @(negedge clk);
    rate = real'(info_bits) / real'(out_last - out_first + 1);
    $display("blocks %0d, information bits %0d, output clocks %0d, %.5f bits/clock, %.1f Mbit/s at 300 MHz",
             blocks_out, info_bits, out_last - out_first + 1, rate, rate * 300.0);
    checks++; if (blocks_out != 188 || expq.size() != 0) fail("not every block came out");
    checks++; if (info_bits != total_k) fail("information bit count");
    checks++; if (tail_cycles != 3 * 188) fail("tail cycle count");
    checks++;
    if (out_last - out_first + 1 != total_k + 3 * 188)
      fail($sformatf("output took %0d clocks, expected %0d", out_last - out_first + 1, total_k + 3 * 188));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
