// tb_pingpong_mux: exhaustive check of the 2x1 ping/pong multiplexer.
module tb_pingpong_mux;
  logic sel;
  logic [1:0] ping_d, pong_d, y;
  int checks = 0, failures = 0;

  pingpong_mux dut (.sel, .ping_d, .pong_d, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, ping_d, pong_d} = 5'(v);
      #1;
      checks++;
      if (y !== (sel ? pong_d : ping_d)) begin
        failures++;
        $display("sel=%b ping=%b pong=%b y=%b", sel, ping_d, pong_d, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
