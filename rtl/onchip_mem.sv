// onchip_mem -- the processor's on-chip memory used during test.
//
// Holds two areas: the replacement words, written by the tester through
// the memory I/O controller and only read by the processor, and the
// current blocks of the test vector, read and written by the processor.
// Port A is the tester's write port; port B is the processor's read/write
// port with a registered read (data on the edge after b_en). Where the
// areas lie is set by the users of the memory, not here. The two-port
// organisation and the one-cycle latency are this design's choices; the
// memory is not reset, so every word must be written before it is read.
module onchip_mem #(
  parameter int W     = 32,
  parameter int DEPTH = 64,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: tester path, write only
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  // port B: processor
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
