// data_sync_unit: ping/pong input buffering of the turbo encoder.
//
// Holds two code block buffers (ping and pong), the control logic and the
// 2x1 multiplexer between them. While one buffer is read by the encoders the
// next block is written into the other, so the input can stream without a
// pause between blocks. For the buffer being encoded, port A reads the bit
// at the natural address in_seq = i and port B the bit at the interleaved
// address int_seq = pi(i) supplied by the QPP interleaver; the mux passes the
// pair (X_i, X_pi(i)) on. The buffer being written uses port A for writing.
//
// Interface: the input stream (valid/ready with sop/eop and a block length)
// on one side; the interleaver's start/length request and its address pairs
// on another; on the third, one bit pair per clock towards the RSC encoders
// with framing (bit_first, bit_last) and the three trellis termination
// cycles (bit_tail, bit_tail_last) following each block's last bit.
//
// Timing: the outputs lag the interleaver's address pair by one clock (the
// registered RAM read); the framing signals are delayed to match.
//
// The make-up of the unit (two dual-port RAMs, control logic, 2x1 mux)
// follows the architecture; reading the interleaved bit through the second
// RAM port, instead of reordering data in a separate interleaver memory, is
// this design's choice.
module data_sync_unit
  import turbo_pkg::*;
#(
  parameter int unsigned DEPTH = KMAX
) (
  input  logic       clk,
  input  logic       rst_n,
  // input stream
  input  logic       valid_in,
  input  logic       sop_in,
  input  logic       eop_in,
  input  logic       data_in,
  input  blklen_t    size_in,
  output logic       ready_in,
  // interleaver
  output logic       itl_start,
  output blklen_t    itl_length,
  input  logic       itl_busy,
  input  logic       itl_valid,
  input  logic       itl_first,
  input  logic       itl_last,
  input  logic       itl_len_err,
  input  blklen_t    in_seq,
  input  blklen_t    int_seq,
  // towards the RSC encoders
  output logic       bit_valid,      // information or tail cycle
  output logic       bit_first,
  output logic       bit_last,       // last information bit
  output logic       bit_tail,
  output logic       bit_tail_last,
  output logic       x_bit,          // X_i
  output logic       xi_bit,         // X_pi(i)
  // status
  output logic [1:0] full,
  output logic       rd_sel,
  output logic       blk_err
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [1:0] wr_en;
  blklen_t    wr_addr;
  logic       tail, tail_last;
  logic       rd_q;
  logic [1:0] ping_d, pong_d, sel_d;
  logic [1:0] a_en, a_we, b_en;
  logic [AW-1:0] a_addr [2];

  turbo_encoder_control #(.DEPTH(DEPTH)) u_control (
    .clk, .rst_n,
    .valid_in, .sop_in, .eop_in, .size_in, .ready_in,
    .wr_en, .wr_addr,
    .rd_sel,
    .itl_start, .itl_length, .itl_busy, .itl_valid, .itl_last, .itl_len_err,
    .tail, .tail_last, .blk_err, .full
  );

  // Port control per buffer: the write side owns port A of the buffer it
  // writes; the read side uses both ports of buffer rd_sel.
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      a_we[b]   = wr_en[b];
      a_en[b]   = wr_en[b] || (itl_valid && rd_sel == 1'(b));
      b_en[b]   = itl_valid && rd_sel == 1'(b);
      a_addr[b] = wr_en[b] ? AW'(wr_addr) : AW'(in_seq);
    end
  end

  code_block_buffer #(.DEPTH(DEPTH), .DW(1)) u_ping (
    .clk,
    .a_en (a_en[0]), .a_we (a_we[0]), .a_addr (a_addr[0]), .a_wdata (data_in), .a_rdata (ping_d[0]),
    .b_en (b_en[0]), .b_addr (AW'(int_seq)), .b_rdata (ping_d[1])
  );

  code_block_buffer #(.DEPTH(DEPTH), .DW(1)) u_pong (
    .clk,
    .a_en (a_en[1]), .a_we (a_we[1]), .a_addr (a_addr[1]), .a_wdata (data_in), .a_rdata (pong_d[0]),
    .b_en (b_en[1]), .b_addr (AW'(int_seq)), .b_rdata (pong_d[1])
  );

  pingpong_mux #(.W(2)) u_mux (
    .sel (rd_q), .ping_d (ping_d), .pong_d (pong_d), .y (sel_d)
  );

  // Align the framing with the registered RAM read.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_valid     <= 1'b0;
      bit_first     <= 1'b0;
      bit_last      <= 1'b0;
      bit_tail      <= 1'b0;
      bit_tail_last <= 1'b0;
      rd_q          <= 1'b0;
    end else begin
      bit_valid     <= itl_valid || tail;
      bit_first     <= itl_valid && itl_first;
      bit_last      <= itl_valid && itl_last;
      bit_tail      <= tail;
      bit_tail_last <= tail_last;
      rd_q          <= rd_sel;
    end
  end

  // During tail cycles the encoders ignore the data bits; force them to 0.
  assign x_bit  = sel_d[0] && !bit_tail;
  assign xi_bit = sel_d[1] && !bit_tail;

endmodule
