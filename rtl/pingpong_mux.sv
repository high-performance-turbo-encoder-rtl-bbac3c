// pingpong_mux: 2x1 multiplexer between the ping and pong code block buffers.
//
// The control logic sets `sel` to the buffer being encoded; the selected
// buffer's read data (natural-order bit and interleaved bit) goes on to the
// RSC encoders. Combinational, W bits wide. The mux and its control by the
// turbo control logic are part of the architecture; carrying both bits of
// the pair (W = 2) is this design's choice.
module pingpong_mux #(
  parameter int unsigned W = 2
) (
  input  logic         sel,    // 0: ping, 1: pong
  input  logic [W-1:0] ping_d,
  input  logic [W-1:0] pong_d,
  output logic [W-1:0] y
);

  always_comb y = sel ? pong_d : ping_d;

endmodule
