// turbo_rsc_encoder: 8-state recursive systematic convolutional encoder of the
// LTE turbo code, written as a Mealy state machine.
//
// Instead of XOR gates on a shift register, the encoder holds a 3-bit state
// (s1 s2 s3) and looks up the next state and the parity bit in the 16-row
// state transition table of the code (input bit x, current state). The
// outputs depend on the current state and on the present input, which makes
// this a Mealy machine. The table is that of the LTE constituent code with
// feedback 1 + D^2 + D^3 and parity 1 + D + D^3.
//
// A block starts from state 000: on the cycle where `first` is high the
// stored state is ignored and 000 is used. After the last information bit the
// encoder is driven for three `term` cycles in which the input is replaced by
// the feedback bit (s2 xor s3); this is the trellis termination of LTE and
// returns the state to 000. x_out is then the tail systematic bit. The
// termination follows the standard encoder structure (switch in the feedback
// path); its exact sequencing is this design's choice.
//
// Timing: x_out, z_out are combinational from (state, x_in, first, term);
// the state register advances on every clock with en high.
module turbo_rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,     // a bit is encoded this cycle
  input  logic       first,  // this bit is the first of a block (state taken as 000)
  input  logic       term,   // trellis termination cycle: input = feedback bit
  input  logic       x_in,   // information bit
  output logic       x_out,  // systematic bit actually encoded (tail bit when term)
  output logic       z_out,  // parity bit
  output rsc_state_t state   // current state register
);

  rsc_state_t cur, nxt;
  logic       u, par;

  // State transition table: {next state, parity} for (input, current state).
  function automatic logic [3:0] fsm_table(input logic x, input rsc_state_t s);
    unique case ({x, s})
      4'b0_000: return {3'b000, 1'b0};
      4'b1_000: return {3'b100, 1'b1};
      4'b0_001: return {3'b100, 1'b0};
      4'b1_001: return {3'b000, 1'b1};
      4'b0_010: return {3'b101, 1'b1};
      4'b1_010: return {3'b001, 1'b0};
      4'b0_011: return {3'b001, 1'b1};
      4'b1_011: return {3'b101, 1'b0};
      4'b0_100: return {3'b010, 1'b1};
      4'b1_100: return {3'b110, 1'b0};
      4'b0_101: return {3'b110, 1'b1};
      4'b1_101: return {3'b010, 1'b0};
      4'b0_110: return {3'b111, 1'b0};
      4'b1_110: return {3'b011, 1'b1};
      4'b0_111: return {3'b011, 1'b0};
      4'b1_111: return {3'b111, 1'b1};
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    cur = first ? 3'b000 : state;
    // Tail input s2 ^ s3 cancels the feedback, driving the first delay to 0.
    u = term ? (cur[1] ^ cur[0]) : x_in;
    {nxt, par} = fsm_table(u, cur);
  end

  assign x_out = u;
  assign z_out = par;

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= 3'b000;
    else if (en) state <= nxt;
  end

endmodule
