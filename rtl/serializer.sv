// serializer -- parallel-to-serial converter feeding one scan chain.
//
// The processor writes one b-bit block into the serializer; a small
// controller then shifts it into the scan chain one bit per clock, most
// significant bit first, and keeps `busy` high until the whole block is
// out. That it is a register plus a small state controller shifting one
// bit per clock follows the architecture description; the bit order and
// the handshake are this design's choices.
//
// Interface and timing:
//   load/din  on a clock edge with load=1 and busy=0 the block is taken.
//   so        bit to the chain, valid while shift_en=1.
//   shift_en  high for exactly B cycles after the load edge; the chain
//             samples `so` on each of those B edges.
//   busy      equal to shift_en: a new block can be loaded on the edge
//             that ends the last shift cycle's successor.
module serializer #(
  parameter int B = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [B-1:0] din,
  output logic         busy,
  output logic         so,
  output logic         shift_en
);

  localparam int CW = $clog2(B + 1);

  logic [B-1:0]  sh;
  logic [CW-1:0] cnt;   // bits still to shift

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= '0;
      cnt <= '0;
    end else if (load && cnt == '0) begin
      sh  <= din;
      cnt <= CW'(B);
    end else if (cnt != '0) begin
      sh  <= {sh[B-2:0], 1'b0};
      cnt <= cnt - 1'b1;
    end
  end

  assign busy     = (cnt != '0);
  assign shift_en = busy;
  assign so       = sh[B-1];

  // The controller must wait for an idle serializer before loading it.
  a_no_load_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !busy);

endmodule
