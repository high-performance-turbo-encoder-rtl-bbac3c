// tb_code_block_buffer: fills the 6144-bit buffer with random bits through
// port A, then reads it back with port A in natural order and port B at
// random addresses in the same cycles, checking both against a model array
// and the one-cycle read latency. Also checks that a disabled port holds its
// read data, and that writes go through while port B reads.
module tb_code_block_buffer;
  localparam int DEPTH = 6144;
  localparam int AW = 13;

  logic clk = 1'b0;
  logic a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [0:0] a_wdata, a_rdata, b_rdata;
  bit model [DEPTH];
  int checks = 0, failures = 0;

  code_block_buffer dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                                  .b_en, .b_addr, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_en = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 1'($urandom);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = model[i];
      @(negedge clk);
    end
    a_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      automatic int r = int'($urandom_range(0, DEPTH - 1));
      a_en = 1; a_addr = AW'(i); b_en = 1; b_addr = AW'(r);
      @(negedge clk);
      chk("port A", a_rdata[0], model[i]);
      chk("port B", b_rdata[0], model[r]);
    end
    // hold when disabled
    begin
      logic ha, hb;
      ha = a_rdata[0]; hb = b_rdata[0];
      a_en = 0; b_en = 0; a_addr = '0; b_addr = '0;
      repeat (3) @(negedge clk);
      chk("hold A", a_rdata[0], ha);
      chk("hold B", b_rdata[0], hb);
    end
    // write on A while B reads
    for (int i = 0; i < 200; i++) begin
      automatic int w = int'($urandom_range(0, DEPTH - 1));
      automatic int r = int'($urandom_range(0, DEPTH - 1));
      automatic bit d = 1'($urandom);
      a_en = 1; a_we = 1; a_addr = AW'(w); a_wdata = d; b_en = 1; b_addr = AW'(r);
      @(negedge clk);
      if (r != w) chk("port B during write", b_rdata[0], model[r]);
      model[w] = d;
    end
    a_we = 0; b_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_addr = AW'(i);
      @(negedge clk);
      chk("readback", a_rdata[0], model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
