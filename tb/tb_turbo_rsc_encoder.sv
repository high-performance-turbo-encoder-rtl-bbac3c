// tb_turbo_rsc_encoder: checks the table-driven RSC state machine against an
// XOR shift-register model of the LTE constituent code. Random blocks of
// random length are encoded, each followed by three termination cycles;
// every cycle the encoded bit, the parity and the state are compared, the
// state must be 000 after the tail, and all 16 (input, state) rows of the
// transition table must have been exercised.
module tb_turbo_rsc_encoder;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, term, x_in, x_out, z_out;
  logic [2:0] state;
  int checks = 0, failures = 0, cycles = 0;
  bit [15:0] rows_seen;
  logic [2:0] ref_s;

  turbo_rsc_encoder dut (.clk, .rst_n, .en, .first, .term, .x_in, .x_out, .z_out, .state);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic f, input logic t, input logic x);
    logic [4:0] r;
    logic [2:0] cur;
    en = 1'b1; first = f; term = t; x_in = x;
    #1;
    cur = f ? 3'b000 : ref_s;
    r = rsc_step(cur, x, t);
    checks++;
    if (x_out !== r[1] || z_out !== r[0]) begin
      failures++;
      if (failures < 10) $display("mismatch state=%b x=%b term=%b: got %b%b exp %b%b", cur, x, t, x_out, z_out, r[1], r[0]);
    end
    rows_seen[{r[1], cur}] = 1'b1;
    @(posedge clk); #1;
    ref_s = r[4:2];
    checks++;
    if (state !== ref_s) begin
      failures++;
      if (failures < 10) $display("state mismatch got %b exp %b", state, ref_s);
    end
  endtask

  initial begin
    en = 0; first = 0; term = 0; x_in = 0; ref_s = 3'b000; rows_seen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int b = 0; b < 200; b++) begin
      automatic int len = 1 + int'($urandom_range(0, 60));
      for (int i = 0; i < len; i++) step(i == 0, 1'b0, 1'($urandom));
      for (int t = 0; t < 3; t++) step(1'b0, 1'b1, 1'($urandom));
      checks++;
      if (state !== 3'b000) begin
        failures++;
        $display("not terminated: state %b", state);
      end
      // idle cycles keep the state
      en = 1'b0;
      repeat (2) @(posedge clk);
      #1;
    end
    checks++;
    if (rows_seen !== 16'hFFFF) begin
      failures++;
      $display("transition rows not all exercised: %b", rows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
