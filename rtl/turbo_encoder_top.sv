// turbo_encoder_top: rate-1/3 LTE turbo encoder with a ping/pong input buffer,
// a LUT-based QPP interleaver and two FSM-coded RSC encoders.
//
// Information bits arrive serially, one per clock, framed by sop_in/eop_in,
// with the block length K (one of the 188 LTE sizes, 40..6144) on size_in at
// sop_in. The data synchronization unit stores each block in the ping or
// pong buffer; once a block is complete the QPP interleaver produces the
// address pairs (i, pi(i)), both buffer ports are read in the same clock,
// and the upper encoder receives X_i while the lower one receives the
// interleaved bit X'_i = X_pi(i). Each clock then yields one output triple
// data_out = {Z'_i, Z_i, X_i}. After bit K-1 three tail cycles terminate
// both trellises (tail_out high): data_out then carries {Z'_tail, Z_tail,
// X_tail} and tail_xi_out the lower encoder's tail bit X'_tail, i.e. the 12
// LTE tail bits in 3 clocks. The next block follows without a gap if it has
// already been loaded, so a K-bit block occupies K+3 clocks at the output.
//
// Timing: registered outputs. With the input streaming, the first triple of
// a block appears 5 clocks after the block's last input bit (closing the
// buffer, interleaver start and look-up, RAM read, output register).
// ready_in drops only while both buffers hold unencoded blocks.
//
// The serial input port, the output framing and the tail bit layout are this
// design's choices; the block structure (ping/pong dual-port RAMs, 2x1 mux,
// control logic, LUT QPP interleaver, two table-driven RSC FSMs) follows
// the architecture being implemented.
module turbo_encoder_top
  import turbo_pkg::*;
#(
  parameter int unsigned KMAX_P = KMAX   // buffer capacity in bits
) (
  input  logic       clk,
  input  logic       rst_n,
  input  blklen_t    size_in,
  input  logic       valid_in,
  input  logic       sop_in,
  input  logic       eop_in,
  input  logic       data_in,
  output logic       ready_in,
  output logic       valid_out,
  output logic       sop_out,
  output logic       eop_out,
  output logic       tail_out,
  output logic [2:0] data_out,     // {Z', Z, X}
  output logic       tail_xi_out,  // X' of the lower encoder's tail
  output logic       blk_err       // a block was dropped: size_in not an LTE size
);

  logic       itl_start, itl_busy, itl_valid, itl_first, itl_last, itl_len_err;
  blklen_t    itl_length, in_seq, int_seq;
  logic       bit_valid, bit_first, bit_last, bit_tail, bit_tail_last;
  logic       x_bit, xi_bit;
  logic [1:0] full;
  logic       rd_sel;
  logic       x_sys, z_sys, x_int, z_int;
  rsc_state_t st_sys, st_int;

  data_sync_unit #(.DEPTH(KMAX_P)) u_sync (
    .clk, .rst_n,
    .valid_in, .sop_in, .eop_in, .data_in, .size_in, .ready_in,
    .itl_start, .itl_length, .itl_busy, .itl_valid, .itl_first, .itl_last, .itl_len_err,
    .in_seq, .int_seq,
    .bit_valid, .bit_first, .bit_last, .bit_tail, .bit_tail_last,
    .x_bit, .xi_bit,
    .full, .rd_sel, .blk_err
  );

  qpp_interleaver u_interleaver (
    .clk, .rst_n,
    .start     (itl_start),
    .length    (itl_length),
    .busy      (itl_busy),
    .len_err   (itl_len_err),
    .valid_seq (itl_valid),
    .first_seq (itl_first),
    .last_seq  (itl_last),
    .in_seq,
    .int_seq
  );

  // Upper encoder: natural order (parity Z).
  turbo_rsc_encoder u_sys_parity (
    .clk, .rst_n,
    .en (bit_valid), .first (bit_first), .term (bit_tail), .x_in (x_bit),
    .x_out (x_sys), .z_out (z_sys), .state (st_sys)
  );

  // Lower encoder: interleaved order (parity Z').
  turbo_rsc_encoder u_int_parity (
    .clk, .rst_n,
    .en (bit_valid), .first (bit_first), .term (bit_tail), .x_in (xi_bit),
    .x_out (x_int), .z_out (z_int), .state (st_int)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_out   <= 1'b0;
      sop_out     <= 1'b0;
      eop_out     <= 1'b0;
      tail_out    <= 1'b0;
      data_out    <= '0;
      tail_xi_out <= 1'b0;
    end else begin
      valid_out   <= bit_valid;
      sop_out     <= bit_first;
      eop_out     <= bit_tail_last;
      tail_out    <= bit_tail;
      data_out    <= bit_valid ? {z_int, z_sys, x_sys} : 3'b000;
      tail_xi_out <= bit_tail && x_int;
    end
  end

  // The termination starts right after the last information bit.
  a_tail_follows: assert property (@(posedge clk) disable iff (!rst_n)
    bit_last |=> bit_tail);
  // Only a completely loaded buffer is ever read.
  a_read_full: assert property (@(posedge clk) disable iff (!rst_n)
    itl_valid |-> full[rd_sel]);
  // Both trellises are back in state 000 after the termination.
  a_terminated: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(bit_tail) |-> (st_sys == 3'b000 && st_int == 3'b000));

endmodule
