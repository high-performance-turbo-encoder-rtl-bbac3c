// qpp_interleaver: LUT-based QPP interleaver address generator.
//
// For a code block of length K the LTE interleaver reads bit pi(i) of the
// block as interleaved bit i, with pi(i) = (f1*i + f2*i^2) mod K. On `start`
// the block length is latched; the next cycle qpp_lut turns it into (f1, f2),
// and from then on one pair (in_seq = i, int_seq = pi(i)) is produced per
// clock for i = 0 .. K-1. No multiplier is used: with
//   g(i) = (f1 + f2*(2i+1)) mod K
// the sequence obeys pi(i+1) = (pi(i) + g(i)) mod K and
// g(i+1) = (g(i) + 2*f2) mod K, so each step is two additions, each followed
// by one conditional subtraction of K (all operands are below K). This
// recursion is this design's way of evaluating the polynomial; the
// coefficient look-up and the index rule are in qpp_lut.
//
// Timing: start in cycle t, first valid pair in cycle t+2, last in t+K+1.
// A start while busy is ignored. A start with a length that is not one of
// the 188 LTE sizes raises len_err for one cycle and produces no sequence.
module qpp_interleaver
  import turbo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,      // begin a sequence for `length`
  input  blklen_t length,     // code block length K
  output logic    busy,       // a sequence is being set up or produced
  output logic    len_err,    // pulse: start with an unsupported length
  output logic    valid_seq,  // in_seq / int_seq hold a valid pair
  output logic    first_seq,  // pair i = 0
  output logic    last_seq,   // pair i = K-1
  output blklen_t in_seq,     // natural index i
  output blklen_t int_seq     // interleaved index pi(i)
);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_RUN} itl_state_e;

  itl_state_e     st;
  blklen_t        k_q;
  blklen_t        g_q, step_q;
  qpp_entry_t     entry;
  logic           legal;
  logic [K_W:0]   sum_g0, sum_step, sum_pi, sum_g;
  blklen_t        g0, step, pi_nxt, g_nxt;

  qpp_lut u_lut (
    .k_in  (k_q),
    .idx   (),
    .entry (entry),
    .legal (legal)
  );

  // Modular additions: a + b with a, b < K needs at most one subtraction of K.
  always_comb begin
    sum_g0   = {1'b0, blklen_t'(entry.f1)} + {1'b0, blklen_t'(entry.f2)};
    g0       = (sum_g0 >= {1'b0, k_q}) ? blklen_t'(sum_g0 - {1'b0, k_q}) : sum_g0[K_W-1:0];
    sum_step = {1'b0, blklen_t'(entry.f2)} + {1'b0, blklen_t'(entry.f2)};
    step     = (sum_step >= {1'b0, k_q}) ? blklen_t'(sum_step - {1'b0, k_q}) : sum_step[K_W-1:0];
    sum_pi   = {1'b0, int_seq} + {1'b0, g_q};
    pi_nxt   = (sum_pi >= {1'b0, k_q}) ? blklen_t'(sum_pi - {1'b0, k_q}) : sum_pi[K_W-1:0];
    sum_g    = {1'b0, g_q} + {1'b0, step_q};
    g_nxt    = (sum_g >= {1'b0, k_q}) ? blklen_t'(sum_g - {1'b0, k_q}) : sum_g[K_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      k_q       <= '0;
      g_q       <= '0;
      step_q    <= '0;
      in_seq    <= '0;
      int_seq   <= '0;
      valid_seq <= 1'b0;
      first_seq <= 1'b0;
      last_seq  <= 1'b0;
      len_err   <= 1'b0;
    end else begin
      len_err <= 1'b0;
      unique case (st)
        S_IDLE: begin
          valid_seq <= 1'b0;
          first_seq <= 1'b0;
          last_seq  <= 1'b0;
          if (start) begin
            k_q <= length;
            st  <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (legal) begin
            g_q       <= g0;
            step_q    <= step;
            in_seq    <= '0;
            int_seq   <= '0;
            valid_seq <= 1'b1;
            first_seq <= 1'b1;
            last_seq  <= 1'b0;
            st        <= S_RUN;
          end else begin
            len_err <= 1'b1;
            st      <= S_IDLE;
          end
        end
        S_RUN: begin
          first_seq <= 1'b0;
          if (last_seq) begin
            valid_seq <= 1'b0;
            last_seq  <= 1'b0;
            st        <= S_IDLE;
          end else begin
            in_seq   <= in_seq + 1'b1;
            int_seq  <= pi_nxt;
            g_q      <= g_nxt;
            last_seq <= (in_seq == k_q - 13'd2);
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule
