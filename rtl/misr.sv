// misr -- multi-input signature register compacting scan-chain responses.
//
// Internal-XOR (Galois) form: every enabled clock the signature shifts
// left by one, the bit leaving the top is fed back through the polynomial
// taps, and the NIN parallel inputs are XORed into the low bits. The
// architecture names a MISR at the scan outputs; its width and polynomial
// are this design's choices (default x^16 + x^14 + x^13 + x^11 + 1, whose
// low terms give POLY = 16'h6801).
//
// Interface and timing: `clear` zeroes the signature on the next edge and
// has priority; with `en` high the signature advances on each edge.
module misr #(
  parameter int               WIDTH = 16,
  parameter int               NIN   = 4,
  parameter logic [WIDTH-1:0] POLY  = 16'h6801
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [NIN-1:0]   d,
  output logic [WIDTH-1:0] sig
);

  logic [WIDTH-1:0] fb, nxt;

  always_comb begin
    fb  = sig[WIDTH-1] ? POLY : '0;
    nxt = {sig[WIDTH-2:0], 1'b0} ^ fb ^ WIDTH'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= nxt;
  end

  initial assert (NIN <= WIDTH) else $error("misr: NIN must not exceed WIDTH");

endmodule
