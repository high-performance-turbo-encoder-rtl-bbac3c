// turbo_pkg: types and constants shared by the LTE turbo encoder.
//
// Block lengths are 13-bit numbers (the largest, 6144, needs 13 bits); the
// QPP coefficient table has 188 entries, one per LTE code block size from 40
// to 6144. The 3-bit RSC state is written s1 s2 s3, s1 being the first delay
// element of the shift register.
package turbo_pkg;

  localparam int unsigned K_W       = 13;    // width of a block length / bit address
  localparam int unsigned KMIN      = 40;    // smallest LTE code block
  localparam int unsigned KMAX      = 6144;  // largest LTE code block
  localparam int unsigned NUM_SIZES = 188;   // number of LTE code block sizes
  localparam int unsigned IDX_W     = 8;     // width of a table index (0..187)
  localparam int unsigned F1_W      = 9;     // largest f1 is 477
  localparam int unsigned F2_W      = 10;    // largest f2 is 954
  localparam int unsigned NUM_TAIL  = 3;     // trellis termination cycles per encoder

  typedef logic [K_W-1:0]   blklen_t;
  typedef logic [IDX_W-1:0] qpp_idx_t;

  // One row of the QPP coefficient table.
  typedef struct packed {
    blklen_t         k;
    logic [F1_W-1:0] f1;
    logic [F2_W-1:0] f2;
  } qpp_entry_t;

  typedef logic [2:0] rsc_state_t;

endpackage
