// turbo_encoder_control: ping/pong sequencing of the turbo encoder.
//
// Write side: incoming blocks are written alternately into buffer 0 (ping)
// and buffer 1 (pong). A block opens with sop_in, which also samples its
// length size_in, and closes when its last bit (bit K-1, or an earlier
// eop_in) is written; the buffer is then marked full and writing moves to the
// other buffer. ready_in is low only while the next buffer to be written is
// still full, i.e. still being encoded; a bit is taken when valid_in and
// ready_in are both high. Bits outside a block (no sop_in) are dropped.
//
// Read side: when the read buffer (rd_sel) is full, the interleaver is
// started with that block's length. It then delivers one address pair per
// clock; after the last pair, `tail` is high for three cycles for the RSC
// trellis termination. On the last tail cycle the buffer is released and
// rd_sel toggles. If the other buffer is already full, the interleaver is
// restarted during the tail, so the next block's first pair follows the last
// tail cycle directly: a block of K bits takes K+3 clocks. A length the
// interleaver rejects (itl_len_err) releases the buffer and pulses blk_err.
//
// All of this sequencing is this design's own choice: the architecture only
// states that the control logic alternates ping and pong between writing and
// reading and drives the 2x1 mux.
module turbo_encoder_control
  import turbo_pkg::*;
#(
  parameter int unsigned DEPTH = KMAX    // capacity of each buffer in bits
) (
  input  logic       clk,
  input  logic       rst_n,
  // input stream
  input  logic       valid_in,
  input  logic       sop_in,
  input  logic       eop_in,
  input  blklen_t    size_in,
  output logic       ready_in,
  // buffer write
  output logic [1:0] wr_en,      // one-hot: write a bit into buffer 0 / 1
  output blklen_t    wr_addr,
  // buffer read / interleaver
  output logic       rd_sel,     // buffer being encoded
  output logic       itl_start,
  output blklen_t    itl_length,
  input  logic       itl_busy,
  input  logic       itl_valid,
  input  logic       itl_last,
  input  logic       itl_len_err,
  output logic       tail,       // trellis termination cycle (address timeline)
  output logic       tail_last,  // last of the three tail cycles
  output logic       blk_err,    // pulse: a block was dropped for its length
  output logic [1:0] full        // buffer holds a complete block
);

  typedef enum logic [1:0] {R_IDLE, R_RUN, R_TAIL} rd_state_e;

  // write side
  logic       wr_sel, w_busy;
  blklen_t    wr_cnt;
  blklen_t    len_q [2];
  logic       accept, w_close;

  // read side
  rd_state_e  rst_q;
  logic [1:0] tail_cnt;
  logic       next_started;
  logic       release_buf;

  assign ready_in = w_busy || !full[wr_sel];
  assign accept   = valid_in && ready_in;
  assign w_close  = accept && w_busy &&
                    (eop_in || (wr_cnt == len_q[wr_sel] - 13'd1) || (wr_cnt == blklen_t'(DEPTH - 1)));

  always_comb begin
    wr_en   = 2'b00;
    wr_addr = w_busy ? wr_cnt : '0;
    if (accept && (w_busy || sop_in)) wr_en[wr_sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_sel   <= 1'b0;
      w_busy   <= 1'b0;
      wr_cnt   <= '0;
      len_q[0] <= '0;
      len_q[1] <= '0;
    end else if (accept) begin
      if (!w_busy) begin
        if (sop_in) begin
          len_q[wr_sel] <= size_in;
          wr_cnt        <= 13'd1;
          w_busy        <= 1'b1;
        end
      end else if (w_close) begin
        w_busy <= 1'b0;
        wr_cnt <= '0;
        wr_sel <= ~wr_sel;
      end else begin
        wr_cnt <= wr_cnt + 13'd1;
      end
    end
  end

  // Read sequencing.
  always_comb begin
    itl_start  = 1'b0;
    itl_length = len_q[rd_sel];
    unique case (rst_q)
      R_IDLE: itl_start = full[rd_sel] && !itl_busy;
      R_TAIL: if (tail_cnt == 2'd1 && full[~rd_sel]) begin
                itl_start  = 1'b1;
                itl_length = len_q[~rd_sel];
              end
      default: ;
    endcase
  end

  assign tail        = (rst_q == R_TAIL);
  assign tail_last   = tail && (tail_cnt == 2'(NUM_TAIL - 1));
  assign release_buf = tail_last || (rst_q == R_RUN && itl_len_err);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst_q        <= R_IDLE;
      rd_sel       <= 1'b0;
      tail_cnt     <= '0;
      next_started <= 1'b0;
      blk_err      <= 1'b0;
    end else begin
      blk_err <= 1'b0;
      unique case (rst_q)
        R_IDLE: if (itl_start) rst_q <= R_RUN;
        R_RUN: begin
          if (itl_len_err) begin
            rd_sel  <= ~rd_sel;
            blk_err <= 1'b1;
            rst_q   <= R_IDLE;
          end else if (itl_valid && itl_last) begin
            tail_cnt <= '0;
            rst_q    <= R_TAIL;
          end
        end
        R_TAIL: begin
          if (itl_start) next_started <= 1'b1;
          tail_cnt <= tail_cnt + 2'd1;
          if (tail_last) begin
            rd_sel       <= ~rd_sel;
            next_started <= 1'b0;
            rst_q        <= next_started ? R_RUN : R_IDLE;
          end
        end
        default: rst_q <= R_IDLE;
      endcase
    end
  end

  // Buffer occupancy: set when the writer closes a block, cleared on release.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= 2'b00;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (w_close && wr_sel == 1'(b))           full[b] <= 1'b1;
        else if (release_buf && rd_sel == 1'(b))  full[b] <= 1'b0;
      end
    end
  end

  // A block must announce its end on its last bit.
  a_eop_on_last: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && w_busy && wr_cnt == len_q[wr_sel] - 13'd1) |-> eop_in);
  // The writer never writes into the buffer being encoded.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en != 2'b00) |-> !full[wr_sel]);

endmodule
