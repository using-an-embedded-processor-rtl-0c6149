// scan_chain -- one scan chain of a core under test.
//
// A mux-D scan shift register. While shift_en is high it shifts toward
// the scan output, taking `si` at bit 0 and presenting bit LEN-1 on `so`;
// the bit shifted out goes to the signature register. When `capture` is
// high (the system clock applied to the core) it loads the core's
// response in parallel. The first bit shifted in ends at q[LEN-1], so
// after a full load q reads, from the top, the blocks in the order they
// were sent. The chain belongs to the core; the architecture only shifts
// vectors into it and responses out of it, so its form here is this
// design's choice.
//
// Interface and timing: one bit per clock edge with shift_en=1; capture
// takes one edge and has priority over shift. Reset clears the chain.
module scan_chain #(
  parameter int LEN = 56
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           si,
  input  logic           capture,
  input  logic [LEN-1:0] resp,
  output logic [LEN-1:0] q,
  output logic           so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (capture)  q <= resp;
    else if (shift_en) q <= {q[LEN-2:0], si};
  end

  assign so = q[LEN-1];

endmodule
