// code_block_buffer: dual-port RAM holding one turbo code block (ping or pong).
//
// Port A is a read/write port: the input bits of a block are written through
// it, and while the block is encoded it reads the bits in natural order
// (address i). Port B is read-only and fetches the interleaved bit (address
// pi(i)) in the same cycle, so one buffer feeds both RSC encoders at one bit
// per clock. Two such buffers, ping and pong, alternate between being loaded
// and being read. The port split is this design's choice; the two dual-port
// buffers are the architecture's.
//
// Timing: synchronous write; both reads are registered (data one cycle after
// the address, held while the port is disabled). Written as an array so that
// synthesis maps it to block RAM.
module code_block_buffer #(
  parameter int unsigned DEPTH = 6144,             // bits per block (largest LTE block)
  parameter int unsigned DW    = 1,                // bits per word
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: read/write
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
